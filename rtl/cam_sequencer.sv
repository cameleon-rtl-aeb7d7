// cam_sequencer: step sequencer of CAMeleon's CAM operation.
//
// Drives two command buses, one shared by all key tiles and one shared by
// all reduction tiles, one CRAM step per clock cycle:
//
//   configuration  cfg sets CAM mode (binary or ternary) or regular CRAM
//                  mode. Entering CAM mode takes one step (KS_INIT/RS_INIT)
//                  that writes 0 into the reserved wildcard rows of every key
//                  tile and into the constant rows of every reduction tile.
//   key load       key k goes to column k mod COLS of the key tiles of group
//                  k / COLS, one segment per tile. Two steps: all cells of
//                  the column that must hold 1 are written with 1 in one
//                  write, all that must hold 0 (the wildcard rows included)
//                  with 0 in the next.
//   search         key-tile stage: PRESET_LO (NOR outputs to 0), PRESET_HI
//                  (AND output to 1, only with more than one chunk), one NOR
//                  per chunk of NOR_INPUTS query bits, AND of the chunk
//                  outputs (only with more than one chunk), READ into the read
//                  buffers. Reduction stage, started by that read: PRESET,
//                  NOR over the read-buffer-enabled cells (threshold S), READ
//                  of the match bits (res_capture).
//
// The read buffers are the pipeline register between the stages: the key
// tiles accept the next query in their READ step and search it while the
// reduction tiles finish the previous one. With the defaults (2 chunks) the
// key stage takes 6 steps and the reduction stage 3, so a query is accepted
// every 6 cycles and its match bits are captured 9 cycles after acceptance.
// If the reduction stage were ever still busy with its NOR when the key
// stage wants to reload the read buffers, the key stage waits in READ.
//
// Handshakes are valid/ready; configuration wins over key load, key load
// over a query. Keys and queries are refused outside CAM mode. The step
// order follows the described search; the handshakes, the two-step key
// write and the mode-entry step are this design's choices.
// Many bits of the word-line and write-data outputs are constant 0: the
// rows a search never touches (above the result row, above row S in the
// reduction tiles) are left free for regular CRAM use.
module cam_sequencer
  import cameleon_pkg::*;
#(
  parameter int unsigned NUM_KEYS   = DEF_NUM_KEYS,
  parameter int unsigned KEY_BITS   = DEF_KEY_BITS,
  parameter int unsigned SEG_BITS   = DEF_SEG_BITS,
  parameter int unsigned NOR_INPUTS = DEF_NOR_INPUTS,
  parameter int unsigned ROWS       = DEF_TILE_ROWS,
  parameter int unsigned COLS       = DEF_TILE_COLS,
  localparam int unsigned S      = KEY_BITS / SEG_BITS,
  localparam int unsigned G      = NUM_KEYS / COLS,
  localparam int unsigned KIW    = $clog2(NUM_KEYS),
  localparam int unsigned RW     = $clog2(ROWS),
  localparam int unsigned TW     = $clog2(ROWS + 1),
  localparam int unsigned NCHUNK = num_chunks(SEG_BITS, NOR_INPUTS),
  localparam int unsigned CW     = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // mode configuration
  input  logic                        cfg_valid,
  input  logic                        cfg_cam_mode,
  input  logic                        cfg_tcam,
  output logic                        cfg_ready,
  // key load
  input  logic                        key_valid,
  input  logic [KIW-1:0]              key_index,
  input  logic [KEY_BITS-1:0]         key_data,
  output logic                        key_ready,
  // query
  input  logic                        q_valid,
  output logic                        q_ready,
  output logic                        qr_load,
  // state
  output logic                        cam_mode,
  output logic                        tcam,
  output key_step_e                   kstep,
  output red_step_e                   rstep,
  // key-tile bus
  output cram_op_e                    kt_op,
  output logic [S-1:0][ROWS-1:0]      kt_rows,
  output logic [G-1:0][COLS-1:0]      kt_col_en,
  output logic [COLS-1:0]             kt_wdata,
  output logic [RW-1:0]               kt_out_row,
  output logic [TW-1:0]               kt_thresh,
  output logic                        kt_target,
  output logic                        kt_sig_en,
  output logic [CW-1:0]               kt_chunk,
  output logic                        rb_load,
  // reduction-tile bus
  output cram_op_e                    rt_op,
  output logic [ROWS-1:0]             rt_rows,
  output logic [COLS-1:0]             rt_col_en,
  output logic [COLS-1:0]             rt_wdata,
  output logic [RW-1:0]               rt_out_row,
  output logic [TW-1:0]               rt_thresh,
  output logic                        rt_target,
  output logic                        rt_sig_en,
  output logic                        res_capture
);

  localparam int unsigned P0   = key_preset_row(SEG_BITS);
  localparam int unsigned PRES = key_result_row(SEG_BITS, NOR_INPUTS);

  key_step_e           ks, ks_next;
  red_step_e           rs, rs_next;
  logic [CW-1:0]       chunk_q;
  logic [KIW-1:0]      kl_index;
  logic [KEY_BITS-1:0] kl_data;
  logic                handoff_ok, kidle, cfg_fire, key_fire;

  assign kstep = ks;
  assign rstep = rs;

  // The reduction tiles no longer need the read buffers once their NOR is done.
  assign handoff_ok = (rs == RS_IDLE) || (rs == RS_READ);
  assign kidle      = (ks == KS_IDLE);
  assign cfg_ready  = kidle && (rs == RS_IDLE);
  assign key_ready  = cam_mode && kidle && !cfg_valid;
  assign q_ready    = cam_mode && !cfg_valid && !(kidle && key_valid) &&
                      (kidle || (ks == KS_READ && handoff_ok));
  assign cfg_fire   = cfg_valid && cfg_ready;
  assign key_fire   = key_valid && key_ready;
  assign qr_load    = q_valid && q_ready;
  assign rb_load    = (ks == KS_READ) && handoff_ok;

  // ---------------------------------------------------------------- key stage
  always_comb begin
    ks_next = ks;
    unique case (ks)
      KS_IDLE: begin
        if (cfg_fire)      ks_next = cfg_cam_mode ? KS_INIT : KS_IDLE;
        else if (key_fire) ks_next = KS_LOAD_ONES;
        else if (qr_load)  ks_next = KS_PRESET_LO;
      end
      KS_INIT:       ks_next = KS_IDLE;
      KS_LOAD_ONES:  ks_next = KS_LOAD_ZEROS;
      KS_LOAD_ZEROS: ks_next = KS_IDLE;
      KS_PRESET_LO:  ks_next = (NCHUNK > 1) ? KS_PRESET_HI : KS_NOR;
      KS_PRESET_HI:  ks_next = KS_NOR;
      KS_NOR:        ks_next = (int'(chunk_q) == NCHUNK - 1) ? ((NCHUNK > 1) ? KS_AND : KS_READ)
                                                             : KS_NOR;
      KS_AND:        ks_next = KS_READ;
      KS_READ: begin
        if (handoff_ok) ks_next = qr_load ? KS_PRESET_LO : KS_IDLE;
      end
      default:       ks_next = KS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks       <= KS_IDLE;
      chunk_q  <= '0;
      cam_mode <= 1'b0;
      tcam     <= 1'b0;
      kl_index <= '0;
      kl_data  <= '0;
    end else begin
      ks <= ks_next;
      if (ks == KS_NOR) chunk_q <= chunk_q + 1'b1;
      if (ks_next != KS_NOR) chunk_q <= '0;
      if (cfg_fire) begin
        cam_mode <= cfg_cam_mode;
        tcam     <= cfg_tcam;
      end
      if (key_fire) begin
        kl_index <= key_index;
        kl_data  <= key_data;
      end
    end
  end

  always_comb begin
    logic pol;
    int unsigned grp, col, bits;
    kt_op      = CRAM_NOP;
    kt_rows    = '0;
    kt_col_en  = '0;
    kt_wdata   = '0;
    kt_out_row = RW'(P0);
    kt_thresh  = '0;
    kt_target  = 1'b0;
    kt_sig_en  = 1'b0;
    kt_chunk   = chunk_q;
    bits       = 0;
    pol        = (ks == KS_LOAD_ONES);
    grp        = int'(kl_index) / COLS;
    col        = int'(kl_index) % COLS;
    unique case (ks)
      KS_INIT: begin
        kt_op     = CRAM_WRITE;
        kt_col_en = '1;
        for (int s = 0; s < S; s++)
          for (int i = 0; i < SEG_BITS; i++) kt_rows[s][2*SEG_BITS + i] = 1'b1;
      end
      KS_LOAD_ONES, KS_LOAD_ZEROS: begin
        kt_op          = CRAM_WRITE;
        kt_wdata       = {COLS{pol}};
        kt_col_en[grp] = COLS'(1) << col;
        for (int s = 0; s < S; s++) begin
          for (int i = 0; i < SEG_BITS; i++) begin
            kt_rows[s][2*i]            = (kl_data[s*SEG_BITS + i] == pol);
            kt_rows[s][2*i+1]          = (kl_data[s*SEG_BITS + i] != pol);
            kt_rows[s][2*SEG_BITS + i] = !pol;
          end
        end
      end
      KS_PRESET_LO: begin
        kt_op     = CRAM_WRITE;
        kt_col_en = '1;
        kt_wdata  = '0;
        for (int s = 0; s < S; s++)
          for (int j = 0; j < NCHUNK; j++) kt_rows[s][P0 + j] = 1'b1;
      end
      KS_PRESET_HI: begin
        kt_op     = CRAM_WRITE;
        kt_col_en = '1;
        kt_wdata  = '1;
        for (int s = 0; s < S; s++) kt_rows[s][PRES] = 1'b1;
      end
      KS_NOR: begin
        bits       = SEG_BITS - int'(chunk_q) * NOR_INPUTS;
        if (bits > NOR_INPUTS) bits = NOR_INPUTS;
        kt_op      = CRAM_LOGIC;
        kt_out_row = RW'(P0 + int'(chunk_q));
        kt_thresh  = TW'(bits);
        kt_target  = 1'b1;
        kt_sig_en  = 1'b1;
        for (int s = 0; s < S; s++) kt_rows[s][P0 + int'(chunk_q)] = 1'b1;
      end
      KS_AND: begin
        kt_op      = CRAM_LOGIC;
        kt_out_row = RW'(PRES);
        kt_thresh  = TW'(1);
        kt_target  = 1'b0;
        for (int s = 0; s < S; s++)
          for (int j = 0; j <= NCHUNK; j++) kt_rows[s][P0 + j] = 1'b1;
      end
      KS_READ: begin
        kt_op = CRAM_READ;
        for (int s = 0; s < S; s++) kt_rows[s][PRES] = 1'b1;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------- reduction stage
  always_comb begin
    rs_next = rs;
    unique case (rs)
      RS_IDLE:   rs_next = (cfg_fire && cfg_cam_mode) ? RS_INIT
                         : rb_load ? RS_PRESET : RS_IDLE;
      RS_INIT:   rs_next = RS_IDLE;
      RS_PRESET: rs_next = RS_NOR;
      RS_NOR:    rs_next = RS_READ;
      RS_READ:   rs_next = rb_load ? RS_PRESET : RS_IDLE;
      default:   rs_next = RS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rs <= RS_IDLE;
    else        rs <= rs_next;
  end

  always_comb begin
    rt_op       = CRAM_NOP;
    rt_rows     = '0;
    rt_col_en   = '1;
    rt_wdata    = '0;
    rt_out_row  = RW'(S);
    rt_thresh   = TW'(S);
    rt_target   = 1'b1;
    rt_sig_en   = 1'b0;
    res_capture = 1'b0;
    unique case (rs)
      RS_INIT: begin
        rt_op = CRAM_WRITE;
        for (int s = 0; s < S; s++) rt_rows[s] = 1'b1;
      end
      RS_PRESET: begin
        rt_op     = CRAM_WRITE;
        rt_rows[S] = 1'b1;
      end
      RS_NOR: begin
        rt_op      = CRAM_LOGIC;
        rt_rows[S] = 1'b1;
        rt_sig_en  = 1'b1;
      end
      RS_READ: begin
        rt_op       = CRAM_READ;
        rt_rows[S]  = 1'b1;
        res_capture = 1'b1;
      end
      default: ;
    endcase
  end

  // A handshake that was offered stays offered until taken.
  property p_query_held;
    @(posedge clk) (q_valid && !q_ready) |=> q_valid;
  endproperty
  a_query_held: assert property (p_query_held);
  // The read buffers are never reloaded while the reduction NOR uses them.
  a_rb_safe: assert property (@(posedge clk) rb_load |-> rs != RS_NOR);

endmodule
