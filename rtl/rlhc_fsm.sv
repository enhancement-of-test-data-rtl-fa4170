// RLHC decoder FSM (first stage, FSM1 of the 9C-RLHC scheme).
//
// Run-length based Huffman coding (RLHC) cuts the fully specified 9C stream
// into patterns L_0 .. L_MH: L_i (i < MH) is i zeros followed by a one, and
// L_MH is MH zeros with no closing one, MH being the group size. Each pattern
// gets a codeword from a Huffman tree that grows only to the right, so the
// codeword of the pattern ranked r-th by frequency is r ones followed by a
// zero, and the last-ranked pattern is MH ones:
//   rank 0: 0   rank 1: 10   rank 2: 110  ...  rank MH: 1...1 (MH ones)
// Decoding therefore counts leading ones (states S1..S_MH) until a zero or MH
// ones. The rank-to-pattern map depends on the test set's statistics; it is
// an input (rank_to_sym) here rather than wired into the state machine, which
// is this design's own choice. The pattern is then written one bit per clock
// to the synchronization block.
//
// Interface: tester bits come in with a valid/ready handshake (in_valid is the
// ATE clock strobe, in_ready is ACK_H); no tester bit is taken while a pattern
// is written (DEC_EN). code_done pulses with code_rank when a codeword is
// complete; cmp pulses on the last bit of each pattern.
//
// Timing: a codeword of n bits needs n accepted tester bits; pattern L_i then
// takes i+1 clocks (L_MH: MH clocks) if the synchronization block never fills.
module rlhc_fsm #(
  parameter int unsigned M_H = 4,                   // group size m_h
  localparam int unsigned SW = $clog2(M_H + 1)      // symbol / rank width
) (
  input  logic          clk,
  input  logic          rst_n,              // synchronous, active low
  input  logic          restart,            // new test set
  input  logic          en,                 // this scheme is selected
  input  logic [SW-1:0] rank_to_sym [M_H+1],// pattern index L_i of each rank
  // tester side
  input  logic          in_valid,           // DATA_IN strobe at the ATE rate
  input  logic          in_bit,             // DATA_IN
  output logic          in_ready,           // ACK_H
  // to the synchronization block
  output logic          out_valid,
  output logic          out_bit,            // DATA_OUT1
  input  logic          out_ready,
  // status
  output logic          dec_en,             // DEC_EN: writing a pattern
  output logic          cmp,                // CMP: last bit of a pattern written
  output logic          code_done,          // codeword complete (pulse)
  output logic [SW-1:0] code_rank           // rank of that codeword
);

  typedef enum logic {R_CODE, R_OUT} state_e;

  state_e        state;
  logic [SW-1:0] ones;     // leading ones seen (tree depth)
  logic [SW:0]   rem;      // pattern bits still to write
  logic          close1;   // pattern ends with a one

  logic          take;
  logic [SW-1:0] sym;

  assign in_ready  = en && (state == R_CODE);
  assign take      = in_ready && in_valid;
  assign dec_en    = (state == R_OUT);
  assign out_valid = (state == R_OUT);
  assign out_bit   = close1 && (rem == (SW+1)'(1));
  assign cmp       = out_valid && out_ready && (rem == (SW+1)'(1));

  always_comb begin
    code_done = take && (!in_bit || ones == SW'(M_H - 1));
    code_rank = in_bit ? SW'(M_H) : ones;
    sym       = rank_to_sym[code_rank];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      state  <= R_CODE;
      ones   <= '0;
      rem    <= '0;
      close1 <= 1'b0;
    end else begin
      unique case (state)
        R_CODE: if (take) begin
          if (code_done) begin
            ones <= '0;
            if (sym < SW'(M_H)) begin
              rem    <= (SW+1)'(sym) + 1'b1;
              close1 <= 1'b1;
            end else begin
              rem    <= (SW+1)'(M_H);
              close1 <= 1'b0;
            end
            state <= R_OUT;
          end else begin
            ones <= ones + 1'b1;
          end
        end
        R_OUT: if (out_ready) begin
          rem <= rem - 1'b1;
          if (rem == (SW+1)'(1)) state <= R_CODE;
        end
        default: state <= R_CODE;
      endcase
    end
  end

  // The rank-to-pattern map must name existing patterns.
  for (genvar r = 0; r <= M_H; r++) begin : g_tbl_chk
    a_sym_range: assert property (@(posedge clk) disable iff (!rst_n)
      en |-> rank_to_sym[r] <= SW'(M_H));
  end

endmodule
