// tile_controller: word-line and operation driver of one CRAM tile.
//
// A tile is driven either by the CAM search sequencer (cam_mode = 1) or by
// regular CRAM memory and logic commands from the host (cam_mode = 0).
// In CAM mode the sequencer's step is passed on unchanged, including
// sig_en, which lets the row selection logic (key tile) or the read buffers
// (reduction tile) add their word lines to the controller's.
// In CRAM mode a host command addressed to this tile (host_sel) is decoded:
//   write / read  rows and columns as given;
//   logic         the rows in host_rows other than host_out_row are the gate
//                 inputs, host_out_row the preset output cell. GATE_NOR
//                 switches the output to 1 when all inputs are 0 (threshold =
//                 number of inputs); GATE_AND switches it to 0 when any input
//                 is 0 (threshold 1). The host presets the output cell first.
// Without a command the tile does nothing. The command format is this
// design's own. Purely combinational.
module tile_controller
  import cameleon_pkg::*;
#(
  parameter int unsigned ROWS = DEF_TILE_ROWS,
  parameter int unsigned COLS = DEF_TILE_COLS,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned TW = $clog2(ROWS + 1)
) (
  input  logic              cam_mode,
  // step from the CAM sequencer
  input  cram_op_e          cam_op,
  input  logic [ROWS-1:0]   cam_rows,
  input  logic [COLS-1:0]   cam_col_en,
  input  logic [COLS-1:0]   cam_wdata,
  input  logic [RW-1:0]     cam_out_row,
  input  logic [TW-1:0]     cam_thresh,
  input  logic              cam_target,
  input  logic              cam_sig_en,
  // regular CRAM command from the host
  input  logic              host_sel,
  input  cram_op_e          host_op,
  input  gate_e             host_gate,
  input  logic [ROWS-1:0]   host_rows,
  input  logic [COLS-1:0]   host_col_en,
  input  logic [COLS-1:0]   host_wdata,
  input  logic [RW-1:0]     host_out_row,
  // to the tile
  output cram_op_e          op,
  output logic [ROWS-1:0]   rows,
  output logic [COLS-1:0]   col_en,
  output logic [COLS-1:0]   wdata,
  output logic [RW-1:0]     out_row,
  output logic [TW-1:0]     thresh,
  output logic              target,
  output logic              sig_en
);

  logic [TW-1:0] n_inputs;

  always_comb begin
    n_inputs = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (host_rows[r] && r != int'(host_out_row)) n_inputs++;
    end
  end

  always_comb begin
    if (cam_mode) begin
      op      = cam_op;
      rows    = cam_rows;
      col_en  = cam_col_en;
      wdata   = cam_wdata;
      out_row = cam_out_row;
      thresh  = cam_thresh;
      target  = cam_target;
      sig_en  = cam_sig_en;
    end else begin
      op      = host_sel ? host_op : CRAM_NOP;
      rows    = host_rows;
      col_en  = host_col_en;
      wdata   = host_wdata;
      out_row = host_out_row;
      thresh  = (host_gate == GATE_NOR) ? n_inputs : TW'(1);
      target  = (host_gate == GATE_NOR);
      sig_en  = 1'b0;
    end
  end

endmodule
