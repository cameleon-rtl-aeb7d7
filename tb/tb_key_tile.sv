// tb_key_tile: one key tile driven step by step as in a search.
//
// Keys are written column by column in the two-step form (all 1 cells, then
// all 0 cells including the reserved wildcard rows). Each search presets the
// chunk outputs, runs one NOR per chunk with the RSL selecting the rows, ANDs
// the chunk outputs and reads the result row into the read buffer. The
// expected partial outcome of column c is worked out from the stored key
// and the query directly: every unmasked bit equal. Binary and ternary
// searches are run, including the two worked examples of the description
// (binary query 0001 against keys 1001/0001, ternary 1XX1). A regular CRAM
// write, read and NOR through the host port close the test.
module tb_key_tile;
  import cameleon_pkg::*;
  localparam int unsigned SEG = 16, NI = 8, ROWS = 64, COLS = 8;
  localparam int unsigned RW = $clog2(ROWS), TW = $clog2(ROWS + 1);
  localparam int unsigned P0 = 3 * SEG, PRES = P0 + 2;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic            cam_mode, tcam, cam_target, cam_sig_en, rb_load, host_sel;
  logic [SEG-1:0]  query, mask;
  logic [0:0]      chunk;
  cram_op_e        cam_op, host_op;
  gate_e           host_gate;
  logic [ROWS-1:0] cam_rows, host_rows;
  logic [COLS-1:0] cam_col_en, cam_wdata, host_col_en, host_wdata, host_rdata, rb_q;
  logic [RW-1:0]   cam_out_row, host_out_row;
  logic [TW-1:0]   cam_thresh;

  key_tile #(.SEG_BITS(SEG), .NOR_INPUTS(NI), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [SEG-1:0] keys [COLS];
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cam_op = CRAM_NOP; cam_rows = '0; cam_col_en = '0; cam_wdata = '0; cam_out_row = '0;
    cam_thresh = '0; cam_target = 1'b0; cam_sig_en = 1'b0; rb_load = 1'b0; chunk = '0;
    host_sel = 1'b0; host_op = CRAM_NOP; host_gate = GATE_NOR; host_rows = '0;
    host_col_en = '0; host_wdata = '0; host_out_row = '0;
  endtask

  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  task automatic load_key(int c, logic [SEG-1:0] k);
    for (int pol = 1; pol >= 0; pol--) begin
      cam_op = CRAM_WRITE; cam_col_en = COLS'(1) << c; cam_wdata = {COLS{pol[0]}};
      for (int i = 0; i < SEG; i++) begin
        cam_rows[2*i]       = (k[i] == pol[0]);
        cam_rows[2*i+1]     = (k[i] != pol[0]);
        cam_rows[2*SEG + i] = (pol == 0);
      end
      step();
    end
    keys[c] = k;
  endtask

  task automatic search(logic [SEG-1:0] q, logic [SEG-1:0] m);
    logic [COLS-1:0] exp;
    query = q; mask = m;
    cam_op = CRAM_WRITE; cam_col_en = '1; cam_wdata = '0; cam_rows[P0] = 1; cam_rows[P0+1] = 1; step();
    cam_op = CRAM_WRITE; cam_col_en = '1; cam_wdata = '1; cam_rows[PRES] = 1; step();
    for (int j = 0; j < 2; j++) begin
      cam_op = CRAM_LOGIC; cam_rows[P0 + j] = 1; cam_out_row = RW'(P0 + j);
      cam_thresh = TW'(NI); cam_target = 1'b1; cam_sig_en = 1'b1; chunk = j[0];
      step();
    end
    cam_op = CRAM_LOGIC; cam_rows[P0] = 1; cam_rows[P0+1] = 1; cam_rows[PRES] = 1;
    cam_out_row = RW'(PRES); cam_thresh = TW'(1); cam_target = 1'b0; step();
    cam_op = CRAM_READ; cam_rows[PRES] = 1; rb_load = 1'b1; step();
    for (int c = 0; c < COLS; c++) exp[c] = (((keys[c] ^ q) & ~(tcam ? m : '0)) == '0);
    checks++;
    if (rb_q !== exp) begin
      failures++;
      $display("q=%h m=%h tcam=%b: got %b expected %b", q, m, tcam, rb_q, exp);
    end
  endtask

  initial begin
    idle();
    rst_n = 1'b0; cam_mode = 1'b1; tcam = 1'b0; query = '0; mask = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (rb_q !== '0) failures++;

    for (int c = 0; c < COLS; c++) load_key(c, SEG'($urandom));
    // Worked example: keys 1001 and 0001, query 0001 matches only the second.
    load_key(0, 16'h0009);
    load_key(1, 16'h0001);
    search(16'h0001, '0);
    checks++;
    if (rb_q[1:0] !== 2'b10) failures++;

    // Binary: exact copies, single-bit misses in each chunk, random.
    for (int t = 0; t < 40; t++) begin
      int c = $urandom % COLS;
      search(keys[c], '0);
      search(keys[c] ^ (SEG'(1) << ($urandom % SEG)), '0);
      search(SEG'($urandom), '0);
    end

    // Ternary: the example 1XX1 matches 1001 but not 0001.
    tcam = 1'b1;
    search(16'h0009, 16'h0006);
    checks++;
    if (rb_q[1:0] !== 2'b01) failures++;
    for (int t = 0; t < 60; t++) begin
      int c = $urandom % COLS;
      logic [SEG-1:0] m = SEG'($urandom);
      search(keys[c] ^ (SEG'($urandom) & m), m);
      search(SEG'($urandom), SEG'($urandom));
      search(SEG'($urandom), SEG'($urandom) | SEG'($urandom));
    end
    search(SEG'($urandom), '1);   // all wildcards: everything matches
    checks++;
    if (rb_q !== '1) failures++;

    // Regular CRAM mode: write/read an extra row, then a NOR into another.
    cam_mode = 1'b0;
    host_sel = 1; host_op = CRAM_WRITE; host_rows[60] = 1; host_col_en = '1; host_wdata = 8'b1100_0101; step();
    host_sel = 1; host_op = CRAM_WRITE; host_rows[61] = 1; host_col_en = '1; host_wdata = 8'b1010_0011; step();
    host_sel = 1; host_op = CRAM_WRITE; host_rows[62] = 1; host_col_en = '1; host_wdata = '0; step();
    host_sel = 1; host_op = CRAM_LOGIC; host_gate = GATE_NOR; host_rows[60] = 1; host_rows[61] = 1;
    host_rows[62] = 1; host_out_row = 62; step();
    host_sel = 1; host_op = CRAM_READ; host_rows[62] = 1; #1;
    checks++;
    if (host_rdata !== ~(8'b1100_0101 | 8'b1010_0011)) begin
      failures++;
      $display("host NOR got %b", host_rdata);
    end
    step();
    // Without a host command nothing changes, even with CAM signals present.
    cam_op = CRAM_WRITE; cam_rows = '1; cam_col_en = '1; cam_wdata = '1; step();
    host_sel = 1; host_op = CRAM_READ; host_rows[60] = 1; #1;
    checks++;
    if (host_rdata !== 8'b1100_0101) failures++;
    step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
