// cram_tile: digital equivalent of one spintronic CRAM tile.
//
// A tile is a ROWS x COLS array of cells. In the real part each cell is an
// STT-MTJ plus access transistor and each column shares a logic line; here a
// cell is a flip-flop and the analog current summing is reduced to the
// threshold rule it implements. The array is indexed column first,
// mem[c][r], because a column is the unit that computes.
//
// Word lines are given per cell (wl[c][r]); a key tile drives the same row
// word line into every column, a reduction tile drives cells individually.
// One operation per clock cycle, chosen by op:
//   CRAM_WRITE  every cell with an active word line in a column with
//               col_en[c] set takes wdata[c] at the clock edge.
//   CRAM_READ   rdata[c] is the OR of the active cells of column c (the
//               controller activates one); combinational, captured outside.
//   CRAM_LOGIC  in every column whose cell at out_row is active, the active
//               cells of the other rows are the gate inputs. A cell holding 0
//               is low resistance; when the number of low-resistance inputs
//               reaches thresh, the gate current exceeds the critical current
//               and the output cell switches to target, otherwise it keeps
//               its preset. NOR = (preset 0, target 1, thresh = #inputs);
//               AND = (preset 1, target 0, thresh = 1).
// The cells are non-volatile memory and have no reset.
module cram_tile
  import cameleon_pkg::*;
#(
  parameter int unsigned ROWS = DEF_TILE_ROWS,
  parameter int unsigned COLS = DEF_TILE_COLS,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned TW = $clog2(ROWS + 1)
) (
  input  logic                           clk,
  input  cram_op_e                       op,
  input  logic [COLS-1:0][ROWS-1:0]      wl,
  input  logic [COLS-1:0]                col_en,
  input  logic [COLS-1:0]                wdata,
  input  logic [RW-1:0]                  out_row,
  input  logic [TW-1:0]                  thresh,
  input  logic                           target,
  output logic [COLS-1:0]                rdata
);

  logic [COLS-1:0][ROWS-1:0] mem;
  logic [COLS-1:0]           fire;

  // Threshold evaluation and sensing; every column is an independent
  // compute unit.
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      logic [ROWS-1:0] low_in;
      low_in          = wl[c] & ~mem[c];
      low_in[out_row] = 1'b0;
      fire[c]  = wl[c][out_row] && (TW'($countones(low_in)) >= thresh);
      rdata[c] = |(wl[c] & mem[c]);
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < COLS; c++) begin
      if (op == CRAM_WRITE && col_en[c]) begin
        mem[c] <= (mem[c] & ~wl[c]) | (wl[c] & {ROWS{wdata[c]}});
      end else if (op == CRAM_LOGIC && fire[c]) begin
        mem[c][out_row] <= target;
      end
    end
  end

endmodule
