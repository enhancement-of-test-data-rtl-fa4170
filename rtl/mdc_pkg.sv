// Shared types and constants of the multistage test-data decompressor.
//
// The decompressor expands a tester stream in two stages: a first-stage
// run-length decoder (AFDER or RLHC) rebuilds the nine-coded (9C) stream, and
// the 9C decoder turns every 9C codeword into one K-bit scan block. This
// package holds the 9C symbol names, the select code of the 3-to-1 scan MUX and
// the table that says, for each 9C symbol, what drives the left and the right
// half of the block. The codeword set and the half patterns are those of the
// nine-coded technique for K = 8; the binary values of the enums are this
// design's own choice.
package mdc_pkg;

  // The nine 9C symbols (cases 1..9 of the code table).
  //   C1 '0'     all 0           C2 '10'    all 1
  //   C3 '11000' 0 then 1        C4 '11001' 1 then 0
  //   C5 '11010' 1 then u        C6 '11011' u then 1
  //   C7 '11100' 0 then u        C8 '11101' u then 0
  //   C9 '1111'  u then u        (u = K/2 bits copied from the stream)
  typedef enum logic [3:0] {
    C1 = 4'd1, C2 = 4'd2, C3 = 4'd3, C4 = 4'd4, C5 = 4'd5,
    C6 = 4'd6, C7 = 4'd7, C8 = 4'd8, C9 = 4'd9
  } c9_sym_e;

  // Select lines {Sel1, Sel0} of the 3-to-1 scan MUX.
  typedef enum logic [1:0] {
    SEL_ZERO = 2'b00,   // constant 0
    SEL_ONE  = 2'b01,   // constant 1
    SEL_U    = 2'b10    // mismatched bit taken from the coded stream
  } mux_sel_e;

  // Source of one half of a K-bit block; half 0 is the left half, which is
  // shifted into the scan chain first.
  function automatic mux_sel_e c9_half_sel(c9_sym_e sym, logic half);
    mux_sel_e l, r;
    unique case (sym)
      C1:      begin l = SEL_ZERO; r = SEL_ZERO; end
      C2:      begin l = SEL_ONE;  r = SEL_ONE;  end
      C3:      begin l = SEL_ZERO; r = SEL_ONE;  end
      C4:      begin l = SEL_ONE;  r = SEL_ZERO; end
      C5:      begin l = SEL_ONE;  r = SEL_U;    end
      C6:      begin l = SEL_U;    r = SEL_ONE;  end
      C7:      begin l = SEL_ZERO; r = SEL_U;    end
      C8:      begin l = SEL_U;    r = SEL_ZERO; end
      default: begin l = SEL_U;    r = SEL_U;    end
    endcase
    return half ? r : l;
  endfunction

  // First-stage scheme selected at the top.
  typedef enum logic {
    SCHEME_AFDER = 1'b0,
    SCHEME_RLHC  = 1'b1
  } scheme_e;

endpackage
