// Multistage test-data decompressor (9C-AFDER / 9C-RLHC).
//
// Scan test data are compressed off-chip in two stages: first with the
// nine-coded (9C) technique, which turns every K-bit block of a test cube into
// one of nine codewords plus any mismatched bits, and then, because the 9C
// stream consists of long runs and repeated run lengths, a second time with
// either AFDER (run-length codes with a short code for a repeated run length)
// or RLHC (run-length patterns with a right-grown Huffman code). This block
// undoes both stages on chip:
//
//   data_in --> FSM1 (afder_fsm | rlhc_fsm) --> sync_block --> c9_fsm (FSM2)
//                                                  |            |  Sel, Cnt_en/INC/Done
//                                                  +--u bits--> scan_mux + half_counter
//                                                                  --> data_out, sc_en
//
// FSM1 takes compressed bits from the tester (one per ATE clock strobe, with
// ACK_H as the ready signal) and writes the rebuilt 9C stream into the
// synchronization block at the system clock rate; FSM2 reads it at the system
// clock rate and shifts K bits per codeword into the scan chain. Both stages
// run at the same time, and the synchronization block absorbs the difference
// in their rates (FSM1 stalls when it is full, FSM2 when it is empty).
//
// The dataflow, the two FSMs, the counter, the 3-to-1 MUX and the
// synchronization block follow the decompression architecture, where FSM1 is
// either decoder. Choices of this design: both first-stage decoders are
// built and scheme_sel picks one at run time; the whole block runs in the
// system clock domain, and the slower tester clock appears as a data strobe
// (data_in_valid), so f_ATE = f_SYS / phi means one strobe every phi clocks.
//
// Timing: a compressed bit is taken in the cycle data_in_valid and ack_h are
// both high; the 9C stage needs |C| + K clocks per block when fed in time.
module mdc_decoder
  import mdc_pkg::*;
#(
  parameter int unsigned K          = 8,   // 9C block size
  parameter int unsigned M_H        = 4,   // RLHC group size
  parameter int unsigned MAX_GROUP  = 6,   // AFDER groups A1..A6
  parameter int unsigned FIFO_DEPTH = 16,  // synchronization block storage
  localparam int unsigned SW = $clog2(M_H + 1),
  localparam int unsigned GW = $clog2(MAX_GROUP + 1)
) (
  input  logic          clk,                    // SOC_CLK
  input  logic          rst_n,                  // synchronous, active low
  input  logic          restart,                // new compressed test set
  input  scheme_e       scheme_sel,             // first-stage code
  input  logic [SW-1:0] rlhc_table [M_H+1],     // RLHC rank -> pattern L_i
  // tester
  input  logic          data_in,                // DATA_IN
  input  logic          data_in_valid,          // ATE clock strobe
  output logic          ack_h,                  // ACK_H: ready for a bit
  // scan chain
  output logic          data_out,
  output logic          sc_en,                  // Sc_en: shift this cycle
  // status
  output logic          dec_en,                 // DEC_EN of FSM1
  output logic          cmp,                    // CMP of FSM1
  output logic          ack,                    // ACK of FSM2: block done
  output c9_sym_e       c9_sym,                 // 9C codeword being expanded
  output logic          fsm1_code_done,         // FSM1 codeword complete
  output logic [GW-1:0] afder_group,            // its AFDER group (0 = repeat)
  output logic [SW-1:0] rlhc_rank,              // its RLHC rank
  output logic          sync_full,
  output logic          sync_empty,
  output logic          err                     // invalid AFDER codeword seen
);

  // ---------------- first stage ----------------
  logic a_ready, a_valid, a_bit, a_dec, a_cmp, a_done;
  logic r_ready, r_valid, r_bit, r_dec, r_cmp, r_done;
  logic w_ready;
  logic use_rlhc;

  assign use_rlhc = (scheme_sel == SCHEME_RLHC);

  afder_fsm #(.MAX_GROUP(MAX_GROUP)) u_afder (
    .clk, .rst_n, .restart,
    .en        (!use_rlhc),
    .in_valid  (data_in_valid && !use_rlhc),
    .in_bit    (data_in),
    .in_ready  (a_ready),
    .out_valid (a_valid),
    .out_bit   (a_bit),
    .out_ready (w_ready && !use_rlhc),
    .dec_en    (a_dec),
    .cmp       (a_cmp),
    .code_done (a_done),
    .code_group(afder_group),
    .err       (err)
  );

  rlhc_fsm #(.M_H(M_H)) u_rlhc (
    .clk, .rst_n, .restart,
    .en         (use_rlhc),
    .rank_to_sym(rlhc_table),
    .in_valid   (data_in_valid && use_rlhc),
    .in_bit     (data_in),
    .in_ready   (r_ready),
    .out_valid  (r_valid),
    .out_bit    (r_bit),
    .out_ready  (w_ready && use_rlhc),
    .dec_en     (r_dec),
    .cmp        (r_cmp),
    .code_done  (r_done),
    .code_rank  (rlhc_rank)
  );

  assign ack_h          = use_rlhc ? r_ready : a_ready;
  assign dec_en         = use_rlhc ? r_dec   : a_dec;
  assign cmp            = use_rlhc ? r_cmp   : a_cmp;
  assign fsm1_code_done = use_rlhc ? r_done  : a_done;

  // ---------------- synchronization ----------------
  logic s_valid, s_bit, s_pop;

  sync_block #(.DEPTH(FIFO_DEPTH)) u_sync (
    .clk, .rst_n,
    .wr_valid(use_rlhc ? r_valid : a_valid),
    .wr_bit  (use_rlhc ? r_bit   : a_bit),
    .wr_ready(w_ready),
    .rd_valid(s_valid),
    .rd_bit  (s_bit),
    .rd_pop  (s_pop),
    .full    (sync_full),
    .empty   (sync_empty)
  );

  // ---------------- second stage ----------------
  mux_sel_e sel;
  logic     cnt_en, inc, done;

  c9_fsm #(.K(K)) u_c9 (
    .clk, .rst_n,
    .in_valid(s_valid),
    .in_bit  (s_bit),
    .in_pop  (s_pop),
    .sel, .cnt_en, .inc, .done,
    .sc_en,
    .ack,
    .sym     (c9_sym)
  );

  half_counter #(.HALF(K / 2)) u_cnt (
    .clk, .rst_n, .cnt_en, .inc, .done,
    .count()
  );

  scan_mux u_mux (
    .sel,
    .data_in_u(s_bit),
    .data_out
  );

  initial begin
    assert (K >= 2 && K % 2 == 0) else $error("mdc_decoder: K must be even");
  end

endmodule
