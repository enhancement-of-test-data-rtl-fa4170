// 9C decoder FSM (second stage, FSM2).
//
// Reads the nine-coded stream one bit per clock from the synchronization
// block and expands every codeword into one K-bit scan block. Codeword
// detection walks a six-state tree:
//   S1 --0--> C1          S1 --1--> S2
//   S2 --0--> C2          S2 --1--> S3
//   S3 --0--> S4 ('110')  S3 --1--> S5 ('111')
//   S4 --b--> S6 (b kept) S5 --1--> C9,  S5 --0--> S6
//   S6 --b--> C3/C4/C5/C6 after '110', C7/C8 after '1110'
// When a codeword is complete the FSM enters the emit phase: for each of the
// two halves it drives the MUX select {Sel1, Sel0} from the code table and
// holds Cnt_en high; the half counter raises Done after K/2 bits. In a half of
// mismatched bits (u) every scan bit is popped straight from the stream through
// the MUX, so the emit phase stalls in any cycle where the stream has no bit.
// After the second Done the FSM returns to S1 and pulses ACK.
//
// The code table, the six detection states, the counter handshake and the MUX
// follow the decompression architecture. Choices of this design: the left half
// goes to the scan chain first; Sc_en is a per-cycle shift enable, high only in
// cycles that carry a valid scan bit; the mismatched bits follow their codeword
// directly in the stream.
//
// Timing: a codeword of |C| bits followed by K scan bits takes |C| + K clocks
// when the stream never runs dry (|C| = 1, 2, 4 or 5).
module c9_fsm
  import mdc_pkg::*;
#(
  parameter int unsigned K = 8               // block size, even
) (
  input  logic     clk,
  input  logic     rst_n,                    // synchronous, active low
  // 9C-coded stream from the synchronization block
  input  logic     in_valid,                 // 9C_EN: a bit is available
  input  logic     in_bit,                   // DATA_IN1
  output logic     in_pop,                   // bit consumed this cycle
  // scan MUX and half counter
  output mux_sel_e sel,                      // {Sel1, Sel0}
  output logic     cnt_en,                   // Cnt_en
  output logic     inc,                      // INC
  input  logic     done,                     // Done from the counter
  // scan chain and status
  output logic     sc_en,                    // Sc_en: shift one bit this cycle
  output logic     ack,                      // ACK: block finished (pulse)
  output c9_sym_e  sym                       // codeword being expanded
);

  typedef enum logic [2:0] {S1, S2, S3, S4, S5, S6, EMIT} state_e;

  state_e  state;
  logic    t1;       // bit kept by S4
  logic    grp7;     // S6 reached through '1110'
  logic    half;     // half being emitted
  logic    emitting; // in the emit phase
  c9_sym_e sym_q;

  // Decoded symbol when the current stream bit completes a codeword.
  logic    code_end;
  c9_sym_e code_sym;

  always_comb begin
    code_end = 1'b0;
    code_sym = C1;
    unique case (state)
      S1: begin code_end = !in_bit; code_sym = C1; end
      S2: begin code_end = !in_bit; code_sym = C2; end
      S5: begin code_end =  in_bit; code_sym = C9; end
      S6: begin
        code_end = 1'b1;
        if (grp7)      code_sym = in_bit ? C8 : C7;
        else unique case ({t1, in_bit})
          2'b00:   code_sym = C3;
          2'b01:   code_sym = C4;
          2'b10:   code_sym = C5;
          default: code_sym = C6;
        endcase
      end
      default: ;
    endcase
  end

  assign emitting = (state == EMIT);
  assign sym      = sym_q;
  assign sel      = emitting ? c9_half_sel(sym_q, half) : SEL_ZERO;
  assign cnt_en   = emitting;
  assign inc      = emitting && (sel != SEL_U || in_valid);
  assign sc_en    = inc;
  assign in_pop   = emitting ? (sel == SEL_U && in_valid) : in_valid;
  assign ack      = emitting && done && half;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S1;
      t1    <= 1'b0;
      grp7  <= 1'b0;
      half  <= 1'b0;
      sym_q <= C1;
    end else begin
      unique case (state)
        EMIT: begin
          if (done) begin
            half <= !half;
            if (half) state <= S1;
          end
        end
        default: begin
          if (in_valid) begin
            if (code_end) begin
              sym_q <= code_sym;
              half  <= 1'b0;
              state <= EMIT;
            end else begin
              unique case (state)
                S1: state <= S2;
                S2: state <= S3;
                S3: state <= in_bit ? S5 : S4;
                S4: begin t1 <= in_bit; grp7 <= 1'b0; state <= S6; end
                S5: begin grp7 <= 1'b1; state <= S6; end
                default: state <= S1;
              endcase
            end
          end
        end
      endcase
    end
  end

  // The block must split into two equal halves.
  if (K < 2 || K % 2 != 0) begin : g_bad_k
    $error("c9_fsm: K must be even");
  end

  // A scan bit taken from the stream must exist in that cycle.
  a_u_needs_data: assert property (@(posedge clk) disable iff (!rst_n)
    (emitting && sel == SEL_U && inc) |-> in_valid);

endmodule
