// tb_wl_merge: checks the word-line OR against a bitwise reference, with the
// CAM word lines enabled and disabled.
module tb_wl_merge;
  localparam int unsigned N = 40;
  logic         cam_en;
  logic [N-1:0] wl_ctrl, wl_cam, wl_out;
  int checks = 0, failures = 0;

  wl_merge #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] exp;
      cam_en  = $urandom;
      wl_ctrl = {$urandom, $urandom} & {$urandom, $urandom};
      wl_cam  = {$urandom, $urandom};
      #1;
      for (int i = 0; i < N; i++) exp[i] = wl_ctrl[i] || (cam_en && wl_cam[i]);
      checks++;
      if (wl_out !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
