// tb_tile_controller: checks that CAM mode passes the sequencer step through
// and that CRAM mode decodes host commands: NOP unless selected, NOR
// threshold = number of input rows (output row excluded), AND threshold 1,
// targets 1/0, CAM word lines disabled.
module tb_tile_controller;
  import cameleon_pkg::*;
  localparam int unsigned ROWS = 64, COLS = 16;
  localparam int unsigned RW = $clog2(ROWS), TW = $clog2(ROWS + 1);

  logic            cam_mode, cam_target, cam_sig_en, host_sel, target, sig_en;
  cram_op_e        cam_op, host_op, op;
  gate_e           host_gate;
  logic [ROWS-1:0] cam_rows, host_rows, rows;
  logic [COLS-1:0] cam_col_en, cam_wdata, host_col_en, host_wdata, col_en, wdata;
  logic [RW-1:0]   cam_out_row, host_out_row, out_row;
  logic [TW-1:0]   cam_thresh, thresh;
  int checks = 0, failures = 0;

  tile_controller #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int n;
      cam_mode = $urandom; host_sel = $urandom;
      cam_op = cram_op_e'($urandom % 4); host_op = cram_op_e'($urandom % 4);
      host_gate = gate_e'($urandom % 2);
      cam_rows = {$urandom, $urandom}; host_rows = {$urandom, $urandom} & {$urandom, $urandom};
      cam_col_en = COLS'($urandom); cam_wdata = COLS'($urandom);
      host_col_en = COLS'($urandom); host_wdata = COLS'($urandom);
      cam_out_row = RW'($urandom); host_out_row = RW'($urandom);
      cam_thresh = TW'($urandom); cam_target = $urandom; cam_sig_en = $urandom;
      #1;
      if (cam_mode) begin
        chk(op == cam_op && rows == cam_rows && col_en == cam_col_en && wdata == cam_wdata &&
            out_row == cam_out_row && thresh == cam_thresh && target == cam_target &&
            sig_en == cam_sig_en, "cam pass-through");
      end else begin
        n = 0;
        for (int r = 0; r < ROWS; r++) if (host_rows[r] && r != host_out_row) n++;
        chk(op == (host_sel ? host_op : CRAM_NOP), "host op");
        chk(rows == host_rows && col_en == host_col_en && wdata == host_wdata &&
            out_row == host_out_row && !sig_en, "host fields");
        chk(thresh == ((host_gate == GATE_NOR) ? TW'(n) : TW'(1)), "threshold");
        chk(target == (host_gate == GATE_NOR), "target");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
