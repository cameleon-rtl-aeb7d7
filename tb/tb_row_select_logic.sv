// tb_row_select_logic: exhaustive-by-random test of the row selection logic.
//
// For random query, mask, mode and chunk values the expected word lines are
// worked out bit by bit: key-bit row for query 0, inverse row for query 1,
// reserved wildcard row for a masked bit in ternary mode, nothing for bits
// outside the selected chunk or when disabled. Also checks a small worked
// example: query 1011 (bits 3..0) selects rows 1, 3, 4, 7 (bit i at pair i).
module tb_row_select_logic;
  localparam int unsigned SEG = 16;
  localparam int unsigned NI  = 8;

  logic            en, tcam;
  logic [0:0]      chunk;
  logic [SEG-1:0]  query, mask;
  logic [3*SEG-1:0] wl_rows, exp;
  int checks = 0, failures = 0;

  row_select_logic #(.SEG_BITS(SEG), .NOR_INPUTS(NI)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom % 8) != 0; tcam = $urandom; chunk = $urandom;
      query = SEG'($urandom); mask = SEG'($urandom);
      #1;
      exp = '0;
      for (int i = 0; i < SEG; i++) begin
        if (en && (i / NI) == chunk) begin
          if (tcam && mask[i]) exp[2*SEG + i] = 1'b1;
          else if (query[i])   exp[2*i + 1]   = 1'b1;
          else                 exp[2*i]       = 1'b1;
        end
      end
      checks++;
      if (wl_rows !== exp) begin
        failures++;
        if (failures < 10) $display("q=%h m=%h tcam=%b ch=%0d: got %h exp %h", query, mask, tcam, chunk, wl_rows, exp);
      end
      // Exactly one row per active bit.
      checks++;
      if ($countones(wl_rows) != (en ? NI : 0)) failures++;
    end
    // Binary example: bits 3..0 = 1,0,1,1 in chunk 0.
    en = 1; tcam = 0; chunk = 0; query = 16'h000B; mask = '1;
    #1;
    checks++;
    if (wl_rows[7:0] !== 8'b1001_1010) failures++;
    // Ternary example: mask on bit 3 moves it to its wildcard row.
    tcam = 1; mask = 16'h0008;
    #1;
    checks++;
    if (wl_rows[7:0] !== 8'b0001_1010 || wl_rows[2*SEG + 3] !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
