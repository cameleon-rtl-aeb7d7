// tb_cram_tile: self-checking test of the CRAM tile model.
//
// Keeps a reference copy of the array and checks: row writes with column
// enables, reads of every row, per-cell word lines, NOR gates of 1..8 inputs
// (output preset 0) and AND gates (output preset 1) on random data, and that
// a NOR whose output was not preset keeps its value.
module tb_cram_tile;
  import cameleon_pkg::*;

  localparam int unsigned ROWS = 16;
  localparam int unsigned COLS = 8;
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned TW = $clog2(ROWS + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cram_op_e                  op;
  logic [COLS-1:0][ROWS-1:0] wl;
  logic [COLS-1:0]           col_en, wdata, rdata;
  logic [RW-1:0]             out_row;
  logic [TW-1:0]             thresh;
  logic                      target;

  cram_tile #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [COLS-1:0][ROWS-1:0] model;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    op = CRAM_NOP; wl = '0; col_en = '0; wdata = '0; out_row = '0; thresh = '0; target = 1'b0;
  endtask

  task automatic write_row(int r, logic [COLS-1:0] d, logic [COLS-1:0] en);
    idle();
    op = CRAM_WRITE; col_en = en; wdata = d;
    for (int c = 0; c < COLS; c++) wl[c][r] = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < COLS; c++) if (en[c]) model[c][r] = d[c];
    idle();
  endtask

  task automatic check_row(int r);
    logic [COLS-1:0] exp;
    idle();
    op = CRAM_READ;
    for (int c = 0; c < COLS; c++) begin wl[c][r] = 1'b1; exp[c] = model[c][r]; end
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("read row %0d: got %b expected %b", r, rdata, exp);
    end
    @(posedge clk); #1;
    idle();
  endtask

  // Threshold gate from the rows in `ins` into row `o` of every column.
  task automatic gate(logic [ROWS-1:0] ins, int o, int th, logic tgt);
    idle();
    op = CRAM_LOGIC; out_row = RW'(o); thresh = TW'(th); target = tgt;
    for (int c = 0; c < COLS; c++) begin wl[c] = ins; wl[c][o] = 1'b1; end
    @(posedge clk); #1;
    for (int c = 0; c < COLS; c++) begin
      int lows = 0;
      for (int r = 0; r < ROWS; r++) if (ins[r] && r != o && !model[c][r]) lows++;
      if (lows >= th) model[c][o] = tgt;
    end
    idle();
  endtask

  initial begin
    idle();
    @(posedge clk); #1;
    // Fill the array, half the columns at a time, then read it all back.
    for (int r = 0; r < ROWS; r++) write_row(r, COLS'($urandom), '1);
    for (int r = 0; r < ROWS; r++) write_row(r, COLS'($urandom), COLS'(8'h0F));
    for (int r = 0; r < ROWS; r++) check_row(r);

    // Per-cell word lines: write a diagonal of ones.
    idle();
    op = CRAM_WRITE; col_en = '1; wdata = '1;
    for (int c = 0; c < COLS; c++) wl[c][c % ROWS] = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < COLS; c++) model[c][c % ROWS] = 1'b1;
    for (int r = 0; r < ROWS; r++) check_row(r);

    // Random NOR and AND gates into row ROWS-1.
    for (int t = 0; t < 200; t++) begin
      logic [ROWS-1:0] ins;
      int n;
      for (int r = 0; r < ROWS - 1; r++) write_row(r, COLS'($urandom) & COLS'($urandom), '1);
      ins = '0;
      n = 1 + ($urandom % 8);
      for (int k = 0; k < n; k++) ins[$urandom % (ROWS - 1)] = 1'b1;
      n = $countones(ins);
      if (t % 2 == 0) begin
        write_row(ROWS - 1, '0, '1);          // NOR: preset 0
        gate(ins, ROWS - 1, n, 1'b1);
      end else begin
        write_row(ROWS - 1, '1, '1);          // AND: preset 1
        gate(ins, ROWS - 1, 1, 1'b0);
      end
      check_row(ROWS - 1);
    end

    // A NOR with all inputs 0 must switch the preset cell: explicit case.
    for (int r = 0; r < 4; r++) write_row(r, '0, '1);
    write_row(ROWS - 1, '0, '1);
    gate(ROWS'(4'hF), ROWS - 1, 4, 1'b1);
    checks++;
    if (model[0][ROWS-1] !== 1'b1) failures++;
    check_row(ROWS - 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
