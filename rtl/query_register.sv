// query_register: query register and bit-mask register.
//
// Holds the query word being searched and, for ternary search, the bit-mask
// word whose 1 bits mark wildcard positions of the query. Both are loaded
// together on load and held for the whole key-tile stage of the search; the
// segments of both words feed the row selection logic of each segment's key
// tiles. Cleared on reset (this design's choice).
module query_register
  import cameleon_pkg::*;
#(
  parameter int unsigned KEY_BITS = DEF_KEY_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [KEY_BITS-1:0] query_in,
  input  logic [KEY_BITS-1:0] mask_in,
  output logic [KEY_BITS-1:0] query,
  output logic [KEY_BITS-1:0] mask
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      query <= '0;
      mask  <= '0;
    end else if (load) begin
      query <= query_in;
      mask  <= mask_in;
    end
  end

endmodule
