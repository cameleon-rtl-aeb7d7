// reduction_tile: CRAM tile that reduces partial outcomes to match bits.
//
// Column c serves key c of a group of COLS keys. Rows 0..S-1 hold constant
// 0 cells, one per segment; row S is the reduction output (preset 0); the
// remaining rows are extra cells for regular CRAM work. Unlike a key tile,
// each cell has its own word line: cell (s, c) is enabled by bit c of the
// read buffer of the key tile of segment s. In a NOR step every enabled
// cell is a low-resistance input, and the output switches to 1 only when all
// S cells are connected (threshold S), i.e. when every segment of key c
// matched. A read step then senses row S, giving one match bit per key.
//
// Word lines: the controller's row word lines (to every column) ORed cell by
// cell with the read-buffer word lines. One operation per
// clock cycle; rdata is combinational.
module reduction_tile
  import cameleon_pkg::*;
#(
  parameter int unsigned S    = DEF_KEY_BITS / DEF_SEG_BITS,
  parameter int unsigned ROWS = DEF_TILE_ROWS,
  parameter int unsigned COLS = DEF_TILE_COLS,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned TW = $clog2(ROWS + 1)
) (
  input  logic                   clk,
  input  logic                   cam_mode,
  // partial outcomes from the read buffers of the S key tiles
  input  logic [S-1:0][COLS-1:0] rb_in,
  // sequencer step
  input  cram_op_e               cam_op,
  input  logic [ROWS-1:0]        cam_rows,
  input  logic [COLS-1:0]        cam_col_en,
  input  logic [COLS-1:0]        cam_wdata,
  input  logic [RW-1:0]          cam_out_row,
  input  logic [TW-1:0]          cam_thresh,
  input  logic                   cam_target,
  input  logic                   cam_sig_en,
  // host command
  input  logic                   host_sel,
  input  cram_op_e               host_op,
  input  gate_e                  host_gate,
  input  logic [ROWS-1:0]        host_rows,
  input  logic [COLS-1:0]        host_col_en,
  input  logic [COLS-1:0]        host_wdata,
  input  logic [RW-1:0]          host_out_row,
  output logic [COLS-1:0]        rdata
);

  initial begin
    assert (S + 1 <= ROWS) else $fatal(1, "reduction_tile: too many segments for the tile rows");
  end

  cram_op_e                  op;
  logic [ROWS-1:0]           rows_ctrl;
  logic [COLS-1:0]           col_en, wdata;
  logic [RW-1:0]             out_row;
  logic [TW-1:0]             thresh;
  logic                      target, sig_en;
  logic [COLS-1:0][ROWS-1:0] wl_ctrl, wl_cam, wl;

  tile_controller #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .cam_mode, .cam_op, .cam_rows, .cam_col_en, .cam_wdata, .cam_out_row,
    .cam_thresh, .cam_target, .cam_sig_en,
    .host_sel, .host_op, .host_gate, .host_rows, .host_col_en, .host_wdata,
    .host_out_row,
    .op, .rows(rows_ctrl), .col_en, .wdata, .out_row, .thresh, .target, .sig_en
  );

  // Read-buffer bit c of segment s drives the word line of cell (s, c).
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      wl_ctrl[c] = rows_ctrl;
      wl_cam[c]  = '0;
      for (int s = 0; s < S; s++) wl_cam[c][s] = rb_in[s][c];
    end
  end

  wl_merge #(.N(ROWS * COLS)) u_merge (
    .cam_en(sig_en), .wl_ctrl(wl_ctrl), .wl_cam(wl_cam), .wl_out(wl)
  );

  cram_tile #(.ROWS(ROWS), .COLS(COLS)) u_tile (
    .clk, .op, .wl, .col_en, .wdata, .out_row, .thresh, .target, .rdata
  );

endmodule
