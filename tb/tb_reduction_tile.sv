// tb_reduction_tile: one reduction tile fed with random read-buffer
// contents. After the constant rows are cleared, each reduction presets the
// output row, runs the NOR with the read buffers enabling cells (threshold
// S) and reads the output row; the expected match bit of column c is the AND
// of the S partial outcomes of c. Also checks that regular CRAM mode ignores
// the read buffers.
module tb_reduction_tile;
  import cameleon_pkg::*;
  localparam int unsigned S = 8, ROWS = 16, COLS = 16;
  localparam int unsigned RW = $clog2(ROWS), TW = $clog2(ROWS + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   cam_mode, cam_target, cam_sig_en, host_sel;
  logic [S-1:0][COLS-1:0] rb_in;
  cram_op_e               cam_op, host_op;
  gate_e                  host_gate;
  logic [ROWS-1:0]        cam_rows, host_rows;
  logic [COLS-1:0]        cam_col_en, cam_wdata, host_col_en, host_wdata, rdata;
  logic [RW-1:0]          cam_out_row, host_out_row;
  logic [TW-1:0]          cam_thresh;

  reduction_tile #(.S(S), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cam_op = CRAM_NOP; cam_rows = '0; cam_col_en = '1; cam_wdata = '0; cam_out_row = RW'(S);
    cam_thresh = TW'(S); cam_target = 1'b1; cam_sig_en = 1'b0;
    host_sel = 1'b0; host_op = CRAM_NOP; host_gate = GATE_NOR; host_rows = '0;
    host_col_en = '0; host_wdata = '0; host_out_row = '0;
  endtask

  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  task automatic reduce(output logic [COLS-1:0] got);
    cam_op = CRAM_WRITE; cam_rows[S] = 1; step();
    cam_op = CRAM_LOGIC; cam_rows[S] = 1; cam_sig_en = 1; step();
    cam_op = CRAM_READ; cam_rows[S] = 1; #1 got = rdata; step();
  endtask

  initial begin
    logic [COLS-1:0] got, exp;
    idle();
    cam_mode = 1'b1;
    rb_in = '0;
    cam_op = CRAM_WRITE; cam_rows = ROWS'((1 << S) - 1); step();
    for (int t = 0; t < 300; t++) begin
      for (int s = 0; s < S; s++)
        rb_in[s] = (t % 3 == 0) ? COLS'($urandom) : ~(COLS'($urandom) & COLS'($urandom) & COLS'($urandom));
      if (t == 0) rb_in = '1;
      reduce(got);
      exp = '1;
      for (int s = 0; s < S; s++) exp &= rb_in[s];
      checks++;
      if (got !== exp) begin
        failures++;
        $display("t=%0d got %b expected %b", t, got, exp);
      end
    end
    // Regular CRAM mode: read-buffer word lines must not reach the tile.
    cam_mode = 1'b0;
    rb_in = '1;
    host_sel = 1; host_op = CRAM_WRITE; host_rows[0] = 1; host_col_en = '1; host_wdata = '1; step();
    host_sel = 1; host_op = CRAM_READ; host_rows[1] = 1; #1;
    checks++;
    if (rdata !== '0) failures++;
    step();
    host_sel = 1; host_op = CRAM_READ; host_rows[0] = 1; #1;
    checks++;
    if (rdata !== '1) failures++;
    step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
