// 3-to-1 scan data multiplexer.
//
// Chooses the bit sent to the scan chain: constant 0, constant 1, or the
// mismatched bit Data_in_u taken from the 9C-coded stream. The two select lines
// {Sel1, Sel0} come from the 9C decoder FSM. Purely combinational. The three
// inputs and the two select lines follow the decompression architecture; the
// binary select code is this design's own (see mdc_pkg), and the unused code
// 2'b11 gives 0.
module scan_mux
  import mdc_pkg::*;
(
  input  mux_sel_e sel,        // {Sel1, Sel0}
  input  logic     data_in_u,  // mismatched bit from the synchronization block
  output logic     data_out    // bit towards the scan chain
);

  always_comb begin
    unique case (sel)
      SEL_ZERO: data_out = 1'b0;
      SEL_ONE:  data_out = 1'b1;
      SEL_U:    data_out = data_in_u;
      default:  data_out = 1'b0;
    endcase
  end

endmodule
