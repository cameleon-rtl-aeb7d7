// tb_read_buffer: checks reset to 0, load and hold of the read buffer.
module tb_read_buffer;
  localparam int unsigned W = 64;
  logic         clk = 1'b0, rst_n, load;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  read_buffer #(.W(W)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; d = '1;
    #12;
    checks++;
    if (q !== '0) failures++;
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      load = $urandom; d = {$urandom, $urandom};
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
