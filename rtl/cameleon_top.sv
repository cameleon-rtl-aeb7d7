// cameleon_top: CAMeleon, a binary/ternary CAM built from CRAM tiles.
//
// NUM_KEYS keys of KEY_BITS bits are cut into S = KEY_BITS/SEG_BITS segments.
// The keys form G = NUM_KEYS/TILE_COLS groups; key tile (g, s), numbered
// g*S + s, holds segment s of the TILE_COLS keys of group g, one key per
// column. Reduction tile g, numbered G*S + g, combines the S partial
// outcomes of group g into one match bit per key. The query and bit-mask
// registers are shared: segment s of the query drives the row selection
// logic of every key tile of segment s. The match bits of all reduction
// tiles form the match vector, which a priority encoder turns into an index.
//
// Interfaces (valid/ready unless stated):
//   cfg_*    select CAM mode (cfg_cam_mode = 1; cfg_tcam picks ternary) or
//            regular CRAM mode. Accepted only when no search is in flight.
//   key_*    write key key_index (CAM mode). Two cycles per key.
//   q_*      search q_data with wildcard mask q_mask (1 = don't care; used in
//            ternary mode only). One query every 6 cycles with the defaults.
//   res_*    res_valid pulses for one cycle per query, 10 cycles after the
//            query was accepted; res_match holds the match bit of every key,
//            res_hit/res_index/res_count come from the priority encoder
//            (lowest index wins). No back-pressure.
//   cram_*   regular CRAM command to one tile (CRAM mode only): write
//            cram_wdata into the rows in cram_rows of the columns in
//            cram_col_en; read the row in cram_rows (cram_rvalid/cram_rdata
//            one cycle later); or an in-array NOR/AND from the other rows of
//            cram_rows into the preset cell at cram_out_row of every column.
//            cram_op: 1 write, 2 read, 3 logic; cram_gate: 0 NOR, 1 AND.
// The tiling, the partition into segments and the pipelining through the
// read buffers follow the described architecture; the interfaces are this
// design's own.
module cameleon_top
  import cameleon_pkg::*;
#(
  parameter int unsigned NUM_KEYS   = DEF_NUM_KEYS,
  parameter int unsigned KEY_BITS   = DEF_KEY_BITS,
  parameter int unsigned SEG_BITS   = DEF_SEG_BITS,
  parameter int unsigned TILE_ROWS  = DEF_TILE_ROWS,
  parameter int unsigned TILE_COLS  = DEF_TILE_COLS,
  parameter int unsigned NOR_INPUTS = DEF_NOR_INPUTS,
  localparam int unsigned S      = KEY_BITS / SEG_BITS,
  localparam int unsigned G      = NUM_KEYS / TILE_COLS,
  localparam int unsigned NTILES = G * S + G,
  localparam int unsigned KIW    = $clog2(NUM_KEYS),
  localparam int unsigned TIW    = $clog2(NTILES),
  localparam int unsigned RW     = $clog2(TILE_ROWS),
  localparam int unsigned TW     = $clog2(TILE_ROWS + 1),
  localparam int unsigned NCHUNK = num_chunks(SEG_BITS, NOR_INPUTS),
  localparam int unsigned CW     = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // mode configuration
  input  logic                  cfg_valid,
  input  logic                  cfg_cam_mode,
  input  logic                  cfg_tcam,
  output logic                  cfg_ready,
  output logic                  cam_mode,
  output logic                  tcam,
  // key load
  input  logic                  key_valid,
  input  logic [KIW-1:0]        key_index,
  input  logic [KEY_BITS-1:0]   key_data,
  output logic                  key_ready,
  // search
  input  logic                  q_valid,
  input  logic [KEY_BITS-1:0]   q_data,
  input  logic [KEY_BITS-1:0]   q_mask,
  output logic                  q_ready,
  output logic                  res_valid,
  output logic [NUM_KEYS-1:0]   res_match,
  output logic                  res_hit,
  output logic [KIW-1:0]        res_index,
  output logic [KIW:0]          res_count,
  // regular CRAM access
  input  logic                  cram_valid,
  input  logic [TIW-1:0]        cram_tile,
  input  logic [1:0]            cram_op,
  input  logic                  cram_gate,
  input  logic [TILE_ROWS-1:0]  cram_rows,
  input  logic [RW-1:0]         cram_out_row,
  input  logic [TILE_COLS-1:0]  cram_col_en,
  input  logic [TILE_COLS-1:0]  cram_wdata,
  output logic                  cram_ready,
  output logic                  cram_rvalid,
  output logic [TILE_COLS-1:0]  cram_rdata
);

  initial begin
    assert (KEY_BITS % SEG_BITS == 0) else $fatal(1, "KEY_BITS must be a multiple of SEG_BITS");
    assert (NUM_KEYS % TILE_COLS == 0) else $fatal(1, "NUM_KEYS must be a multiple of TILE_COLS");
  end

  // ------------------------------------------------------------ sequencer
  key_step_e                          kstep;
  red_step_e                          rstep;
  logic                               qr_load, rb_load, res_capture, seq_idle;
  cram_op_e                           kt_op, rt_op;
  logic [S-1:0][TILE_ROWS-1:0]        kt_rows;
  logic [G-1:0][TILE_COLS-1:0]        kt_col_en;
  logic [TILE_COLS-1:0]               kt_wdata, rt_col_en, rt_wdata;
  logic [RW-1:0]                      kt_out_row, rt_out_row;
  logic [TW-1:0]                      kt_thresh, rt_thresh;
  logic                               kt_target, kt_sig_en, rt_target, rt_sig_en;
  logic [CW-1:0]                      kt_chunk;
  logic [TILE_ROWS-1:0]               rt_rows;

  cam_sequencer #(
    .NUM_KEYS(NUM_KEYS), .KEY_BITS(KEY_BITS), .SEG_BITS(SEG_BITS),
    .NOR_INPUTS(NOR_INPUTS), .ROWS(TILE_ROWS), .COLS(TILE_COLS)
  ) u_seq (
    .clk, .rst_n,
    .cfg_valid, .cfg_cam_mode, .cfg_tcam, .cfg_ready,
    .key_valid, .key_index, .key_data, .key_ready,
    .q_valid, .q_ready, .qr_load,
    .cam_mode, .tcam, .kstep, .rstep,
    .kt_op, .kt_rows, .kt_col_en, .kt_wdata, .kt_out_row, .kt_thresh,
    .kt_target, .kt_sig_en, .kt_chunk, .rb_load,
    .rt_op, .rt_rows, .rt_col_en, .rt_wdata, .rt_out_row, .rt_thresh,
    .rt_target, .rt_sig_en, .res_capture
  );

  // ------------------------------------------------- query / bit-mask register
  logic [KEY_BITS-1:0] query, mask;

  query_register #(.KEY_BITS(KEY_BITS)) u_qreg (
    .clk, .rst_n, .load(qr_load), .query_in(q_data), .mask_in(q_mask),
    .query, .mask
  );

  // ------------------------------------------------------- host CRAM access
  logic                               cram_fire;
  cram_op_e                           host_op;
  gate_e                              host_gate;
  logic [NTILES-1:0][TILE_COLS-1:0]   tile_rdata;

  assign seq_idle   = (kstep == KS_IDLE) && (rstep == RS_IDLE);
  assign cram_ready = !cam_mode && seq_idle;
  assign cram_fire  = cram_valid && cram_ready;
  assign host_op    = cram_op_e'(cram_op);
  assign host_gate  = gate_e'(cram_gate);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cram_rvalid <= 1'b0;
      cram_rdata  <= '0;
    end else begin
      cram_rvalid <= cram_fire && (host_op == CRAM_READ);
      if (cram_fire && host_op == CRAM_READ) cram_rdata <= tile_rdata[cram_tile];
    end
  end

  // ------------------------------------------------------------ tile array
  logic [G-1:0][S-1:0][TILE_COLS-1:0] rb_q;
  logic [NUM_KEYS-1:0]                match_bits;

  for (genvar g = 0; g < G; g++) begin : g_group
    for (genvar s = 0; s < S; s++) begin : g_seg
      key_tile #(
        .SEG_BITS(SEG_BITS), .NOR_INPUTS(NOR_INPUTS),
        .ROWS(TILE_ROWS), .COLS(TILE_COLS)
      ) u_ktile (
        .clk, .rst_n, .cam_mode, .tcam,
        .query(query[s*SEG_BITS +: SEG_BITS]),
        .mask(mask[s*SEG_BITS +: SEG_BITS]),
        .chunk(kt_chunk),
        .cam_op(kt_op), .cam_rows(kt_rows[s]), .cam_col_en(kt_col_en[g]),
        .cam_wdata(kt_wdata), .cam_out_row(kt_out_row), .cam_thresh(kt_thresh),
        .cam_target(kt_target), .cam_sig_en(kt_sig_en), .rb_load,
        .host_sel(cram_fire && (int'(cram_tile) == g * S + s)),
        .host_op, .host_gate, .host_rows(cram_rows), .host_col_en(cram_col_en),
        .host_wdata(cram_wdata), .host_out_row(cram_out_row),
        .host_rdata(tile_rdata[g * S + s]),
        .rb_q(rb_q[g][s])
      );
    end

    reduction_tile #(.S(S), .ROWS(TILE_ROWS), .COLS(TILE_COLS)) u_rtile (
      .clk, .cam_mode, .rb_in(rb_q[g]),
      .cam_op(rt_op), .cam_rows(rt_rows), .cam_col_en(rt_col_en),
      .cam_wdata(rt_wdata), .cam_out_row(rt_out_row), .cam_thresh(rt_thresh),
      .cam_target(rt_target), .cam_sig_en(rt_sig_en),
      .host_sel(cram_fire && (int'(cram_tile) == G * S + g)),
      .host_op, .host_gate, .host_rows(cram_rows), .host_col_en(cram_col_en),
      .host_wdata(cram_wdata), .host_out_row(cram_out_row),
      .rdata(tile_rdata[G * S + g])
    );

    assign match_bits[g*TILE_COLS +: TILE_COLS] = tile_rdata[G * S + g];
  end

  // ---------------------------------------------------------- search result
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_match <= '0;
    end else begin
      res_valid <= res_capture;
      if (res_capture) res_match <= match_bits;
    end
  end

  priority_encoder #(.N(NUM_KEYS)) u_enc (
    .match(res_match), .hit(res_hit), .index(res_index), .count(res_count)
  );

endmodule
