// wl_merge: word-line merge in front of a key or reduction tile.
//
// To keep every cell usable for regular CRAM work, the word lines the tile
// controller generates are ORed with the word lines CAM search generates
// (from the row selection logic in a key tile, from the read buffers in a
// reduction tile). The CAM word lines only take part while cam_en is high;
// otherwise the controller's word lines alone drive the tile. The gating by
// cam_en is this design's reading of "the tile controller takes precedence"
// outside CAM operation. Purely combinational; N is the number of word lines.
module wl_merge #(
  parameter int unsigned N = 64
) (
  input  logic         cam_en,
  input  logic [N-1:0] wl_ctrl,
  input  logic [N-1:0] wl_cam,
  output logic [N-1:0] wl_out
);

  always_comb wl_out = wl_ctrl | (cam_en ? wl_cam : '0);

endmodule
