// tb_priority_encoder: random sparse and dense match vectors; the expected
// index is the lowest set bit, found by a scan, and the count a popcount.
module tb_priority_encoder;
  localparam int unsigned N = 1024;
  logic [N-1:0]         match;
  logic                 hit;
  logic [$clog2(N)-1:0] index;
  logic [$clog2(N):0]   count;
  int checks = 0, failures = 0;

  priority_encoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int lo, n;
      match = '0;
      n = (t % 4 == 0) ? 0 : (t % 4 == 1) ? 1 : ($urandom % 20);
      for (int k = 0; k < n; k++) match[$urandom % N] = 1'b1;
      if (t == 399) match = '1;
      #1;
      lo = -1;
      for (int i = N - 1; i >= 0; i--) if (match[i]) lo = i;
      checks++;
      if (hit !== (lo >= 0) || (lo >= 0 && int'(index) != lo) || int'(count) != $countones(match)) begin
        failures++;
        $display("n=%0d hit=%b index=%0d count=%0d expected %0d", n, hit, index, count, lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
