// key_tile: CRAM tile that stores one segment of COLS key words.
//
// Column c holds segment SEG of key c as SEG_BITS bit-pairs (row 2i the key
// bit, row 2i+1 its inverse), followed by SEG_BITS reserved wildcard rows
// (always 0 in CAM mode), the preset rows (one NOR output per query chunk
// and, with more than one chunk, one AND output) and extra rows free for
// regular CRAM work. During a search the row selection logic picks, per
// query bit, the cell that holds 0 on a match; a NOR over one chunk of those
// cells sets the chunk's preset cell to 1 iff the chunk matches, and an AND of
// the chunk outputs gives the partial outcome of the segment. A read step
// copies the result row into the read buffer, whose outputs go to a
// reduction tile.
//
// Word lines: the controller's row word lines ORed with the RSL's (a plain
// OR merge), the same row word line reaching every column. Every
// operation takes one clock cycle; the read buffer loads at the edge that
// ends the read step (rb_load). host_rdata is the sensed read data,
// combinational, for regular CRAM reads.
module key_tile
  import cameleon_pkg::*;
#(
  parameter int unsigned SEG_BITS   = DEF_SEG_BITS,
  parameter int unsigned NOR_INPUTS = DEF_NOR_INPUTS,
  parameter int unsigned ROWS       = DEF_TILE_ROWS,
  parameter int unsigned COLS       = DEF_TILE_COLS,
  localparam int unsigned RW     = $clog2(ROWS),
  localparam int unsigned TW     = $clog2(ROWS + 1),
  localparam int unsigned NCHUNK = num_chunks(SEG_BITS, NOR_INPUTS),
  localparam int unsigned CW     = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cam_mode,
  input  logic                 tcam,
  // query segment and search chunk
  input  logic [SEG_BITS-1:0]  query,
  input  logic [SEG_BITS-1:0]  mask,
  input  logic [CW-1:0]        chunk,
  // sequencer step
  input  cram_op_e             cam_op,
  input  logic [ROWS-1:0]      cam_rows,
  input  logic [COLS-1:0]      cam_col_en,
  input  logic [COLS-1:0]      cam_wdata,
  input  logic [RW-1:0]        cam_out_row,
  input  logic [TW-1:0]        cam_thresh,
  input  logic                 cam_target,
  input  logic                 cam_sig_en,
  input  logic                 rb_load,
  // host command
  input  logic                 host_sel,
  input  cram_op_e             host_op,
  input  gate_e                host_gate,
  input  logic [ROWS-1:0]      host_rows,
  input  logic [COLS-1:0]      host_col_en,
  input  logic [COLS-1:0]      host_wdata,
  input  logic [RW-1:0]        host_out_row,
  // outputs
  output logic [COLS-1:0]      host_rdata,
  output logic [COLS-1:0]      rb_q
);

  initial begin
    assert (3 * SEG_BITS + NCHUNK + ((NCHUNK > 1) ? 1 : 0) <= ROWS)
      else $fatal(1, "key_tile: segment does not fit in the tile rows");
  end

  cram_op_e                  op;
  logic [ROWS-1:0]           rows_ctrl, rows_cam, rows;
  logic [COLS-1:0]           col_en, wdata;
  logic [RW-1:0]             out_row;
  logic [TW-1:0]             thresh;
  logic                      target, sig_en;
  logic [3*SEG_BITS-1:0]     rsl_rows;
  logic [COLS-1:0][ROWS-1:0] wl;

  tile_controller #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .cam_mode, .cam_op, .cam_rows, .cam_col_en, .cam_wdata, .cam_out_row,
    .cam_thresh, .cam_target, .cam_sig_en,
    .host_sel, .host_op, .host_gate, .host_rows, .host_col_en, .host_wdata,
    .host_out_row,
    .op, .rows(rows_ctrl), .col_en, .wdata, .out_row, .thresh, .target, .sig_en
  );

  row_select_logic #(.SEG_BITS(SEG_BITS), .NOR_INPUTS(NOR_INPUTS)) u_rsl (
    .en(sig_en), .tcam, .chunk, .query, .mask, .wl_rows(rsl_rows)
  );

  always_comb begin
    rows_cam = '0;
    rows_cam[3*SEG_BITS-1:0] = rsl_rows;
  end

  wl_merge #(.N(ROWS)) u_merge (
    .cam_en(sig_en), .wl_ctrl(rows_ctrl), .wl_cam(rows_cam), .wl_out(rows)
  );

  // A row word line reaches every column of the tile.
  assign wl = {COLS{rows}};

  cram_tile #(.ROWS(ROWS), .COLS(COLS)) u_tile (
    .clk, .op, .wl, .col_en, .wdata, .out_row, .thresh, .target,
    .rdata(host_rdata)
  );

  read_buffer #(.W(COLS)) u_rb (
    .clk, .rst_n, .load(rb_load), .d(host_rdata), .q(rb_q)
  );

endmodule
