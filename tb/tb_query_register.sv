// tb_query_register: checks reset, load and hold of the query and bit-mask
// registers.
module tb_query_register;
  localparam int unsigned KB = 128;
  logic          clk = 1'b0, rst_n, load;
  logic [KB-1:0] query_in, mask_in, query, mask, mq, mm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  query_register #(.KEY_BITS(KB)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b1; query_in = '1; mask_in = '1;
    #12;
    checks++;
    if (query !== '0 || mask !== '0) failures++;
    rst_n = 1'b1;
    mq = '0; mm = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      query_in = {$urandom, $urandom, $urandom, $urandom};
      mask_in  = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk); #1;
      if (load) begin mq = query_in; mm = mask_in; end
      checks++;
      if (query !== mq || mask !== mm) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
