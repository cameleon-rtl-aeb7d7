// tb_cam_sequencer: checks the step sequence, the bus contents of each step,
// the handshakes and the timing of the sequencer.
//
// Expected, worked out from the search procedure: entering CAM mode takes
// one clearing step; a key load is two writes to one column of one group;
// a search is PRESET_LO, PRESET_HI, NOR chunk 0, NOR chunk 1, AND, READ on
// the key tiles, then PRESET, NOR, READ on the reduction tiles, so the match
// bits are captured 9 cycles after the query is accepted, and back-to-back
// queries are accepted every 6 cycles.
module tb_cam_sequencer;
  import cameleon_pkg::*;
  localparam int unsigned NK = 128, KB = 64, SEG = 16, NI = 8, ROWS = 64, COLS = 32;
  localparam int unsigned S = KB / SEG, G = NK / COLS;
  localparam int unsigned RW = $clog2(ROWS), TW = $clog2(ROWS + 1);
  localparam int unsigned P0 = 3 * SEG, PRES = P0 + 2;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic                   cfg_valid, cfg_cam_mode, cfg_tcam, cfg_ready;
  logic                   key_valid, key_ready, q_valid, q_ready, qr_load;
  logic [$clog2(NK)-1:0]  key_index;
  logic [KB-1:0]          key_data;
  logic                   cam_mode, tcam, rb_load, res_capture;
  key_step_e              kstep;
  red_step_e              rstep;
  cram_op_e               kt_op, rt_op;
  logic [S-1:0][ROWS-1:0] kt_rows;
  logic [G-1:0][COLS-1:0] kt_col_en;
  logic [COLS-1:0]        kt_wdata, rt_col_en, rt_wdata;
  logic [RW-1:0]          kt_out_row, rt_out_row;
  logic [TW-1:0]          kt_thresh, rt_thresh;
  logic                   kt_target, kt_sig_en, rt_target, rt_sig_en;
  logic [0:0]             kt_chunk;
  logic [ROWS-1:0]        rt_rows;

  cam_sequencer #(.NUM_KEYS(NK), .KEY_BITS(KB), .SEG_BITS(SEG), .NOR_INPUTS(NI),
                  .ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int accept_cyc[$], capture_cyc[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (qr_load) accept_cyc.push_back(cycle);
    if (res_capture) capture_cyc.push_back(cycle);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: %s", cycle, what); end
  endtask

  task automatic next();
    @(posedge clk); #1;
  endtask

  initial begin
    logic [KB-1:0] k;
    cfg_valid = 0; cfg_cam_mode = 0; cfg_tcam = 0; key_valid = 0; key_index = '0;
    key_data = '0; q_valid = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!cam_mode && !key_ready && !q_ready && cfg_ready, "reset state");

    // Enter ternary CAM mode.
    cfg_valid = 1; cfg_cam_mode = 1; cfg_tcam = 1;
    next();
    cfg_valid = 0;
    chk(cam_mode && tcam, "mode set");
    chk(kstep == KS_INIT && kt_op == CRAM_WRITE && kt_col_en == '1 && kt_wdata == '0, "key init step");
    for (int s = 0; s < S; s++)
      chk(kt_rows[s] == (ROWS'({SEG{1'b1}}) << (2 * SEG)), "init clears wildcard rows");
    chk(rstep == RS_INIT && rt_op == CRAM_WRITE && rt_rows == ROWS'((1 << S) - 1) && rt_wdata == '0,
        "reduction init clears constant rows");
    next();
    chk(kstep == KS_IDLE && key_ready && q_ready, "ready after init");

    // Key 37 goes to group 1, column 5.
    k = {$urandom, $urandom};
    key_valid = 1; key_index = 37; key_data = k;
    next();
    key_valid = 0;
    for (int pol = 1; pol >= 0; pol--) begin
      chk(kstep == (pol ? KS_LOAD_ONES : KS_LOAD_ZEROS) && kt_op == CRAM_WRITE, "load step");
      chk(kt_col_en == ((G*COLS)'(1) << 37) && kt_wdata == {COLS{pol[0]}}, "load column");
      for (int s = 0; s < S; s++)
        for (int i = 0; i < SEG; i++)
          chk(kt_rows[s][2*i] == (k[s*SEG+i] == pol[0]) && kt_rows[s][2*i+1] == (k[s*SEG+i] != pol[0]) &&
              kt_rows[s][2*SEG+i] == (pol == 0), "load rows");
      next();
    end
    chk(kstep == KS_IDLE, "load done in two steps");

    // One query: follow the steps.
    q_valid = 1;
    #0;
    chk(q_ready, "query ready");
    next();
    q_valid = 0;
    chk(kstep == KS_PRESET_LO && kt_op == CRAM_WRITE && kt_wdata == '0 && kt_rows[0][P0] && kt_rows[0][P0+1], "preset lo");
    next();
    chk(kstep == KS_PRESET_HI && kt_op == CRAM_WRITE && kt_wdata == '1 && kt_rows[2][PRES], "preset hi");
    for (int j = 0; j < 2; j++) begin
      next();
      chk(kstep == KS_NOR && kt_op == CRAM_LOGIC && kt_chunk == j[0] && kt_sig_en &&
          kt_out_row == RW'(P0 + j) && kt_thresh == TW'(NI) && kt_target && kt_rows[1][P0+j], "nor chunk");
    end
    next();
    chk(kstep == KS_AND && kt_op == CRAM_LOGIC && !kt_sig_en && kt_out_row == RW'(PRES) &&
        kt_thresh == 1 && !kt_target && kt_rows[3][P0] && kt_rows[3][P0+1] && kt_rows[3][PRES], "and");
    next();
    chk(kstep == KS_READ && kt_op == CRAM_READ && rb_load && kt_rows[0] == ROWS'(1) << PRES, "read");
    next();
    chk(rstep == RS_PRESET && rt_op == CRAM_WRITE && rt_rows == ROWS'(1) << S && kstep == KS_IDLE, "red preset");
    next();
    chk(rstep == RS_NOR && rt_op == CRAM_LOGIC && rt_sig_en && rt_thresh == TW'(S) && rt_out_row == RW'(S), "red nor");
    next();
    chk(rstep == RS_READ && rt_op == CRAM_READ && res_capture, "red read");
    next();
    chk(capture_cyc.size() == 1 && capture_cyc[0] - accept_cyc[0] == 9, "search latency 9 cycles");

    // Five back-to-back queries: one every 6 cycles, no capture lost.
    accept_cyc.delete(); capture_cyc.delete();
    q_valid = 1;
    wait (accept_cyc.size() == 5);
    #1 q_valid = 0;
    repeat (12) next();
    chk(capture_cyc.size() == 5, "five results");
    for (int i = 1; i < 5; i++) chk(accept_cyc[i] - accept_cyc[i-1] == 6, "query interval 6");
    for (int i = 0; i < 5; i++) chk(capture_cyc[i] - accept_cyc[i] == 9, "pipelined latency 9");

    // A key load is refused while a search is in the key stage.
    q_valid = 1; key_valid = 1;
    next();
    chk(kstep == KS_LOAD_ONES, "key load wins over query");
    key_valid = 0;
    accept_cyc.delete();
    wait (accept_cyc.size() == 1);
    #1 q_valid = 0;
    chk(kstep == KS_PRESET_LO, "query taken after the load");

    // Back to regular CRAM mode: keys and queries refused.
    cfg_valid = 1; cfg_cam_mode = 0;
    wait (cfg_ready);
    next();
    cfg_valid = 0;
    chk(!cam_mode && !key_ready && !q_ready && kstep == KS_IDLE, "CRAM mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
