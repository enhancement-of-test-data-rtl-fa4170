// AFDER decoder FSM (first stage, FSM1 of the 9C-AFDER scheme).
//
// Alternating frequency-directed equal-run-length (AFDER) coding describes the
// fully specified 9C stream as alternating runs of 0s and 1s. Each run length
// r >= 1 is sent as one codeword:
//   group 1 (r = 1, 2)        : 00 t            (3 bits)
//   group k >= 2 (r = 2^k-1 .. 2^(k+1)-2) : (k-1 ones) 0, then k tail bits
//                               r = 2^k - 1 + tail   (10tt, 110ttt, 1110tttt..)
//   repeat                    : 01   (same length as the previous run)
// Runs alternate in value, so only the value of the first run must be known:
// the decoder takes it from the first bit of the stream after reset or
// restart. The polarity bit and the group/tail/repeat code follow the AFDER
// code table; taking the polarity as a leading header bit is this design's own
// choice.
//
// Interface: tester bits come in with a valid/ready handshake (in_valid is the
// ATE clock strobe, in_ready is ACK_H). While a run is being expanded (DEC_EN)
// no tester bit is taken, and the run is written one bit per clock to the
// synchronization block through out_valid/out_ready. code_done pulses, with
// code_group (0 = repeat code, else the group number), in the cycle a codeword
// is complete; cmp pulses on the last bit of each run.
//
// Timing: a codeword of n bits needs n accepted tester bits; its run of r bits
// then takes r clocks if the synchronization block never fills. The longest run
// is L_max = 2^(MAX_GROUP+1) - 2; a longer prefix raises the sticky err flag.
module afder_fsm #(
  parameter int unsigned MAX_GROUP = 6,                 // number of groups A1..A6
  localparam int unsigned RW = MAX_GROUP + 1,           // run-length width
  localparam int unsigned GW = $clog2(MAX_GROUP + 1)    // group number width
) (
  input  logic          clk,
  input  logic          rst_n,        // synchronous, active low
  input  logic          restart,      // new test set: read the polarity bit again
  input  logic          en,           // this scheme is selected
  // tester side
  input  logic          in_valid,     // DATA_IN strobe at the ATE rate
  input  logic          in_bit,       // DATA_IN
  output logic          in_ready,     // ACK_H
  // to the synchronization block
  output logic          out_valid,
  output logic          out_bit,      // DATA_OUT1
  input  logic          out_ready,
  // status
  output logic          dec_en,       // DEC_EN: expanding a run
  output logic          cmp,          // CMP: last bit of a run written
  output logic          code_done,    // codeword complete (pulse)
  output logic [GW-1:0] code_group,   // 0: repeat, 1..MAX_GROUP: group
  output logic          err           // prefix longer than MAX_GROUP, or repeat first
);

  typedef enum logic [2:0] {A_INIT, A_P0, A_P1, A_ONES, A_TAIL, A_OUT} state_e;

  state_e        state;
  logic          pol;      // value of the current run
  logic [GW-1:0] ones;     // prefix ones seen
  logic [GW-1:0] grp;      // group of the codeword being read
  logic [GW-1:0] tcnt;     // tail bits still to read
  logic [MAX_GROUP-2:0] tail;     // tail bits read so far
  logic [RW-1:0] prev;     // previous run length, 0 before the first run
  logic [RW-1:0] run;      // length of the run being written
  logic [RW-1:0] rem;      // bits of the run still to write

  logic take;
  assign in_ready  = en && (state != A_OUT);
  assign take      = in_ready && in_valid;
  assign dec_en    = (state == A_OUT);
  assign out_valid = (state == A_OUT);
  assign out_bit   = pol;
  assign cmp       = out_valid && out_ready && (rem == RW'(1));

  // Run length of group g with the last tail bit b appended.
  logic [MAX_GROUP-1:0] tail_full;
  logic [RW-1:0]        run_len;
  assign tail_full = {tail, in_bit};
  assign run_len   = (RW'(1) << grp) - RW'(1) + RW'(tail_full);

  always_comb begin
    code_done  = 1'b0;
    code_group = grp;
    if (take) begin
      unique case (state)
        A_P1:   if (in_bit) begin code_done = 1'b1; code_group = '0; end
        A_TAIL: code_done = (tcnt == GW'(1));
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      state <= A_INIT;
      pol   <= 1'b0;
      ones  <= '0;
      grp   <= '0;
      tcnt  <= '0;
      tail  <= '0;
      prev  <= '0;
      run   <= '0;
      rem   <= '0;
      if (!rst_n) err <= 1'b0;
    end else begin
      unique case (state)
        A_INIT: if (take) begin pol <= in_bit; state <= A_P0; end
        A_P0: if (take) begin
          if (in_bit) begin ones <= GW'(1); state <= A_ONES; end
          else state <= A_P1;
        end
        A_P1: if (take) begin
          if (in_bit) begin                      // '01': repeat code
            if (prev == '0) begin err <= 1'b1; state <= A_P0; end
            else begin run <= prev; rem <= prev; state <= A_OUT; end
          end else begin                         // '00': group 1, one tail bit
            grp <= GW'(1); tcnt <= GW'(1); tail <= '0; state <= A_TAIL;
          end
        end
        A_ONES: if (take) begin
          if (in_bit) begin
            if (ones == GW'(MAX_GROUP - 1)) err <= 1'b1;
            else ones <= ones + 1'b1;
          end else begin
            grp <= ones + 1'b1; tcnt <= ones + 1'b1; tail <= '0; state <= A_TAIL;
          end
        end
        A_TAIL: if (take) begin
          tail <= tail_full[MAX_GROUP-2:0];
          tcnt <= tcnt - 1'b1;
          if (tcnt == GW'(1)) begin run <= run_len; rem <= run_len; state <= A_OUT; end
        end
        A_OUT: if (out_ready) begin
          rem <= rem - 1'b1;
          if (rem == RW'(1)) begin
            prev  <= run;
            pol   <= !pol;
            state <= A_P0;
          end
        end
        default: state <= A_INIT;
      endcase
    end
  end

endmodule
