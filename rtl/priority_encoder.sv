// priority_encoder: match-line encoder of the CAM.
//
// Turns the N match bits into the location of the match. Ternary search can
// match several keys, so the lowest-numbered matching key wins; that priority
// order is this design's choice. hit is 0 and index 0 when nothing matches.
// count gives the number of matches. Purely combinational.
module priority_encoder #(
  parameter int unsigned N = 1024,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     match,
  output logic             hit,
  output logic [IW-1:0]    index,
  output logic [IW:0]      count
);

  always_comb begin
    hit   = 1'b0;
    index = '0;
    count = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit   = 1'b1;
        index = IW'(i);
      end
    end
    for (int i = 0; i < N; i++) count += (IW+1)'(match[i]);
  end

endmodule
