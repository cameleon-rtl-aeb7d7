// row_select_logic: row selection logic (RSL) of the key tiles of one segment.
//
// Each stored key bit occupies a bit-pair of rows in a column: row 2i holds
// the key bit, row 2i+1 its inverse. Row 2*SEG_BITS+i is the reserved
// wildcard bit (RWB) of CAM cell i and always holds 0. For query bit q and
// mask bit m:
//   BCAM:  q = 0 selects the key-bit row, q = 1 the inverted-key-bit row;
//   TCAM:  as BCAM when m = 0; m = 1 selects the RWB row instead of either.
// A selected cell holds 0 exactly when the bit matches, so a NOR over the
// selected cells of a column detects a match. With mask all zero the TCAM
// selection equals the BCAM one; in BCAM mode the mask is ignored.
//
// The segment is searched in chunks of NOR_INPUTS bits because an in-array
// gate has a limited number of inputs; only the bits of chunk `chunk` drive
// their rows, and nothing is driven while en is low (regular CRAM mode).
// The chunk gating is this design's way of sequencing the chunks.
// Purely combinational.
module row_select_logic
  import cameleon_pkg::*;
#(
  parameter int unsigned SEG_BITS   = DEF_SEG_BITS,
  parameter int unsigned NOR_INPUTS = DEF_NOR_INPUTS,
  localparam int unsigned NCHUNK = num_chunks(SEG_BITS, NOR_INPUTS),
  localparam int unsigned CW     = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic                    en,
  input  logic                    tcam,
  input  logic [CW-1:0]           chunk,
  input  logic [SEG_BITS-1:0]     query,
  input  logic [SEG_BITS-1:0]     mask,
  output logic [3*SEG_BITS-1:0]   wl_rows
);

  always_comb begin
    wl_rows = '0;
    for (int i = 0; i < SEG_BITS; i++) begin
      logic act, wild;
      act  = en && ((i / NOR_INPUTS) == int'(chunk));
      wild = tcam && mask[i];
      wl_rows[2*i]            = act && !wild && !query[i];
      wl_rows[2*i+1]          = act && !wild &&  query[i];
      wl_rows[2*SEG_BITS + i] = act &&  wild;
    end
  end

endmodule
