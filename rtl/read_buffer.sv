// read_buffer: read buffer (RB) of a key tile.
//
// A row of D flip-flops that captures the partial search outcomes read out
// of a key tile's result row, one bit per column (one per stored key
// segment). Its outputs drive the individual word lines of one row of the
// reduction tile. It is also the pipeline register between the key-tile
// stage and the reduction stage: the reduction tile works from the buffer
// while the key tiles search the next query. Loads on load at the clock edge;
// clears to 0 (no partial match) on reset, which is this design's choice.
module read_buffer #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
