// tb_cameleon_full: the end-to-end test of tb_cameleon_top with the array at
// its default size: 1024 keys of 128 bits, eight 16-bit segments, 128 key
// tiles and 16 reduction tiles of 64x64 cells, 8-input NOR gates.
//
// A reference model keeps every key and computes the full match vector of
// each query (a key matches when every unmasked bit is equal). The test:
//   1. regular CRAM mode: writes, reads and an in-array NOR and AND through
//      the host port on a key tile and a reduction tile;
//   2. binary CAM mode: all keys loaded, exact, one-bit-off and random
//      queries, issued back to back so that the key tiles of one query
//      overlap the reduction of the previous one;
//   3. ternary CAM mode: queries made from a
//      stored key with half of its bits turned into wildcards (and those
//      bits scrambled), plus multi-match and all-wildcard queries;
//   4. back to CRAM mode: a host read of a key tile shows the stored key
//      bits, and extra rows are used without disturbing the keys;
//   5. CAM mode again: the keys still match.
// Each result must arrive 10 cycles after its query was accepted. Every
// mechanism is counted and a mechanism that never happened is a failure.
module tb_cameleon_full;
  import cameleon_pkg::*;
  localparam int unsigned NK = DEF_NUM_KEYS, KB = DEF_KEY_BITS, SEG = DEF_SEG_BITS;
  localparam int unsigned ROWS = DEF_TILE_ROWS, COLS = DEF_TILE_COLS, NI = DEF_NOR_INPUTS;
  localparam int unsigned NQ = 24;
  localparam int LAT = 10;  // cycles from query acceptance to res_valid
  localparam int unsigned S = KB / SEG, G = NK / COLS, NT = G * S + G;
  localparam int unsigned KIW = $clog2(NK), TIW = $clog2(NT), RW = $clog2(ROWS);

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic            cfg_valid, cfg_cam_mode, cfg_tcam, cfg_ready, cam_mode, tcam;
  logic            key_valid, key_ready, q_valid, q_ready, res_valid, res_hit;
  logic [KIW-1:0]  key_index, res_index;
  logic [KIW:0]    res_count;
  logic [KB-1:0]   key_data, q_data, q_mask;
  logic [NK-1:0]   res_match;
  logic            cram_valid, cram_gate, cram_ready, cram_rvalid;
  logic [TIW-1:0]  cram_tile;
  logic [1:0]      cram_op;
  logic [ROWS-1:0] cram_rows;
  logic [RW-1:0]   cram_out_row;
  logic [COLS-1:0] cram_col_en, cram_wdata, cram_rdata;

  cameleon_top dut (.*);

  logic [KB-1:0] keys [NK];
  logic [NK-1:0] exp_q [$];
  int            acc_q [$];
  int checks = 0, failures = 0, cycle = 0;
  int n_cram_write = 0, n_cram_read = 0, n_cram_nor = 0, n_cram_and = 0;
  int n_to_cam = 0, n_to_cram = 0, n_key_load = 0, n_bcam = 0, n_tcam = 0;
  int n_wild = 0, n_hit = 0, n_miss = 0, n_multi = 0, n_overlap = 0, n_results = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  // Result monitor: compares every result with the model, in order.
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      logic [NK-1:0] e;
      int lo, lat;
      e = exp_q.pop_front();
      lo = -1;
      for (int k = NK - 1; k >= 0; k--) if (e[k]) lo = k;
      chk(res_match == e, $sformatf("match vector: %0d matches, expected %0d", $countones(res_match), $countones(e)));
      chk(res_hit == (e != '0) && (lo < 0 || int'(res_index) == lo) && int'(res_count) == $countones(e),
          "encoder output");
      lat = cycle - acc_q.pop_front();
      chk(lat == LAT, $sformatf("search latency %0d instead of %0d", lat, LAT));
      n_results++;
      if ($countones(e) > 1) n_multi++;
      if (e != '0) n_hit++; else n_miss++;
    end
    if (rst_n && dut.kstep inside {KS_PRESET_LO, KS_PRESET_HI, KS_NOR, KS_AND} && dut.rstep != RS_IDLE) n_overlap++;
  end

  task automatic idle_inputs();
    cfg_valid = 0; cfg_cam_mode = 0; cfg_tcam = 0; key_valid = 0; key_index = '0; key_data = '0;
    q_valid = 0; q_data = '0; q_mask = '0; cram_valid = 0; cram_tile = '0; cram_op = '0;
    cram_gate = 0; cram_rows = '0; cram_out_row = '0; cram_col_en = '0; cram_wdata = '0;
  endtask

  task automatic configure(logic cam, logic t);
    cfg_valid = 1; cfg_cam_mode = cam; cfg_tcam = t;
    do @(negedge clk); while (!cfg_ready);   // ready is stable mid-cycle
    @(posedge clk);
    #1 cfg_valid = 0;
    if (cam) n_to_cam++; else n_to_cram++;
    repeat (2) @(posedge clk);
    #1;
    chk(cam_mode == cam && (!cam || tcam == t), "mode switch");
  endtask

  task automatic load_key(int idx, logic [KB-1:0] k);
    key_valid = 1; key_index = KIW'(idx); key_data = k;
    do @(negedge clk); while (!key_ready);   // ready is stable mid-cycle
    @(posedge clk);
    #1 key_valid = 0;
    keys[idx] = k;
    n_key_load++;
  endtask

  function automatic logic [NK-1:0] model(logic [KB-1:0] q, logic [KB-1:0] m, logic t);
    logic [NK-1:0] e;
    for (int k = 0; k < NK; k++) e[k] = (((keys[k] ^ q) & ~(t ? m : '0)) == '0);
    return e;
  endfunction

  task automatic search(logic [KB-1:0] q, logic [KB-1:0] m);
    q_valid = 1; q_data = q; q_mask = m;
    do @(negedge clk); while (!q_ready);   // ready is stable mid-cycle
    acc_q.push_back(cycle);                 // count of the accepting edge
    @(posedge clk);
    exp_q.push_back(model(q, m, tcam));
    #1 q_valid = 0;
    if (tcam) begin n_tcam++; if (m != '0) n_wild++; end else n_bcam++;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(posedge clk);
    #1;
  endtask

  task automatic cram(int tile, logic [1:0] op, logic gate, logic [ROWS-1:0] rows, int out_row,
                      logic [COLS-1:0] col_en, logic [COLS-1:0] wdata);
    cram_valid = 1; cram_tile = TIW'(tile); cram_op = op; cram_gate = gate; cram_rows = rows;
    cram_out_row = RW'(out_row); cram_col_en = col_en; cram_wdata = wdata;
    do @(negedge clk); while (!cram_ready);   // ready is stable mid-cycle
    @(posedge clk);
    #1 cram_valid = 0;
    case (op)
      2'd1: n_cram_write++;
      2'd2: n_cram_read++;
      2'd3: if (gate) n_cram_and++; else n_cram_nor++;
      default: ;
    endcase
  endtask

  task automatic cram_read(int tile, int row, output logic [COLS-1:0] d);
    cram(tile, 2'd2, 0, ROWS'(1) << row, 0, '0, '0);
    chk(cram_rvalid, "read data valid one cycle later");
    d = cram_rdata;
  endtask

  // Host logic test on one tile: rows a, b random; row o = gate(a, b).
  task automatic host_gate_test(int tile, logic and_gate);
    logic [COLS-1:0] a, b, d;
    int ra = 56, rb = 57, ro = 58;
    a = COLS'({$urandom, $urandom, $urandom, $urandom}); b = COLS'({$urandom, $urandom, $urandom, $urandom});
    cram(tile, 2'd1, 0, ROWS'(1) << ra, 0, '1, a);
    cram(tile, 2'd1, 0, ROWS'(1) << rb, 0, '1, b);
    cram(tile, 2'd1, 0, ROWS'(1) << ro, 0, '1, and_gate ? '1 : '0);
    cram(tile, 2'd3, and_gate, (ROWS'(1) << ra) | (ROWS'(1) << rb) | (ROWS'(1) << ro), ro, '0, '0);
    cram_read(tile, ro, d);
    chk(d == (and_gate ? (a & b) : ~(a | b)), and_gate ? "host AND" : "host NOR");
  endtask

  initial begin
    logic [COLS-1:0] d, lo_half;
    idle_inputs();
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. Regular CRAM mode.
    chk(!cam_mode && cram_ready, "starts in CRAM mode");
    host_gate_test(0, 0);
    host_gate_test(NT - 1, 1);
    host_gate_test(S + 1, 1);
    lo_half = (COLS'(1) << (COLS / 2)) - 1'b1;
    cram(3, 2'd1, 0, ROWS'(1) << 40, 0, lo_half, '1);
    cram(3, 2'd1, 0, ROWS'(1) << 40, 0, ~lo_half, '0);
    cram_read(3, 40, d);
    chk(d == lo_half, "column-masked writes");

    // 2. Binary CAM.
    configure(1, 0);
    chk(!cram_ready, "host port closed in CAM mode");
    for (int k = 0; k < NK; k++) load_key(k, {$urandom, $urandom, $urandom, $urandom});
    fork
      for (int t = 0; t < NQ; t++) begin
        int k = $urandom % NK;
        case (t % 3)
          0: search(keys[k], '1);
          1: search(keys[k] ^ (KB'(1) << ($urandom % KB)), '0);
          default: search({$urandom, $urandom, $urandom, $urandom}, '0);
        endcase
        if (t % 10 == 9) begin repeat ($urandom % 8) @(posedge clk); #1; end
      end
    join
    drain();

    // 3. Ternary CAM: half the bits of a stored key turned into wildcards.
    configure(1, 1);
    keys[77] = keys[5] ^ KB'(8);
    load_key(77, keys[77]);
    search(keys[5], KB'(8));                   // keys 5 and 77 both match
    for (int t = 0; t < NQ; t++) begin
      int k = $urandom % NK;
      logic [KB-1:0] m = '0;
      while ($countones(m) < KB / 2) m[$urandom % KB] = 1'b1;
      case (t % 4)
        0, 1: search(keys[k] ^ ({$urandom, $urandom, $urandom, $urandom} & m), m);
        2: search({$urandom, $urandom, $urandom, $urandom}, m);
        default: search(keys[k] ^ (KB'(1) << ($urandom % KB)), '0);
      endcase
    end
    search({$urandom, $urandom, $urandom, $urandom}, '1);          // every key matches
    drain();

    // 4. Back to CRAM mode: key bits are visible as ordinary cells.
    configure(0, 0);
    cram_read(1 * S + 2, 2 * 5 + 1, d);        // group 1, segment 2, bit 5 inverse row
    for (int c = 0; c < COLS; c++)
      chk(d[c] == !keys[COLS + c][2 * SEG + 5], "inverted key bit read in CRAM mode");
    host_gate_test(1 * S + 2, 0);              // extra rows of a key tile used for logic

    // 5. CAM mode again: the keys are still there.
    configure(1, 0);
    for (int t = 0; t < 10; t++) search(keys[$urandom % NK], '0);
    drain();

    chk(n_results == 2 * NQ + 12, "every query answered");
    chk(n_cram_write > 0, "mechanism: CRAM write");
    chk(n_cram_read > 0, "mechanism: CRAM read");
    chk(n_cram_nor > 0, "mechanism: CRAM NOR");
    chk(n_cram_and > 0, "mechanism: CRAM AND");
    chk(n_to_cam > 1 && n_to_cram > 0, "mechanism: mode switches both ways");
    chk(n_key_load > 0, "mechanism: key load");
    chk(n_bcam > 0 && n_tcam > 0, "mechanism: binary and ternary search");
    chk(n_wild > 0, "mechanism: wildcard bits");
    chk(n_hit > 0 && n_miss > 0, "mechanism: hit and miss");
    chk(n_multi > 0, "mechanism: multiple matches");
    chk(n_overlap > 0, "mechanism: pipelined overlap of key and reduction stages");
    $display("cram w/r/nor/and=%0d/%0d/%0d/%0d to_cam=%0d to_cram=%0d loads=%0d bcam=%0d tcam=%0d wild=%0d hit=%0d miss=%0d multi=%0d overlap=%0d",
             n_cram_write, n_cram_read, n_cram_nor, n_cram_and, n_to_cam, n_to_cram, n_key_load,
             n_bcam, n_tcam, n_wild, n_hit, n_miss, n_multi, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
