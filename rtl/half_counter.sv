// Half-block counter of the 9C decoder.
//
// Counts the bits of one half block (K/2 bits) as they go from the scan MUX to
// the scan chain. The count is held at zero while Cnt_en is low; while Cnt_en is
// high it advances on every cycle with INC high. Done is raised combinationally
// in the cycle that carries the last bit of the half (count = HALF-1 and INC),
// and the count wraps to zero for the next half. The 9C FSM therefore sees Done
// twice per block. Counting to K/2 and the Cnt_en / INC / Done signals follow
// the decompression architecture; the same-cycle Done and the clear-on-idle are
// this design's own choices.
//
// Timing: one bit per clock; a half block of HALF bits takes HALF cycles with
// INC held high.
module half_counter #(
  parameter int unsigned HALF = 4          // K/2
) (
  input  logic clk,
  input  logic rst_n,                      // synchronous, active low
  input  logic cnt_en,                     // Cnt_en from the 9C FSM
  input  logic inc,                        // INC: one bit moved this cycle
  output logic done,                       // Done: last bit of the half
  output logic [$clog2(HALF+1)-1:0] count  // bits already moved in this half
);

  always_ff @(posedge clk) begin
    if (!rst_n || !cnt_en)
      count <= '0;
    else if (inc)
      count <= done ? '0 : count + 1'b1;
  end

  assign done = cnt_en && inc && (count == ($clog2(HALF+1))'(HALF - 1));

endmodule
