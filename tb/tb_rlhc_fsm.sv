// RLHC decoder check (group size MH = 4).
// Part 1 decodes the 24-bit codeword sequence 1111 0 10 110 10 1110 0 0 10 0
// 110 under a fixed rank-to-pattern map and compares with the patterns worked
// out by hand. Part 2 splits a random stream into patterns, ranks them by
// frequency, encodes them with the reference encoder, sends them at one bit per
// PHI clocks with a randomly stalling consumer and checks every output bit, the
// count of codewords per rank, and that each codeword takes as many accepted
// tester bits as it is long.
module tb_rlhc_fsm;
  import tb_mdc_pkg::*;

  localparam int unsigned M_H = 4;
  localparam int unsigned SW = $clog2(M_H + 1);
  localparam int PHI = 4;

  logic clk = 0, rst_n = 0, restart = 0, en = 1;
  logic [SW-1:0] rank_to_sym [M_H+1];
  logic in_valid = 0, in_bit = 0, in_ready;
  logic out_valid, out_bit, out_ready = 1;
  logic dec_en, cmp, code_done;
  logic [SW-1:0] code_rank;

  rlhc_fsm #(.M_H(M_H)) dut (.*);

  always #5 clk = !clk;

  int    checks = 0, failures = 0;
  bitq_t tx, expq;
  int    hist_dut[16], hist_ref[16];
  int    bits_in_code;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(bit stall, int limit);
    int c = 0;
    bits_in_code = 0;
    while ((tx.size() > 0 || expq.size() > 0 || out_valid) && c < limit) begin
      @(negedge clk);
      in_valid  = (tx.size() > 0) && (c % PHI == 0);
      in_bit    = (tx.size() > 0) ? tx[0] : 1'b0;
      out_ready = !(stall && $urandom_range(0, 3) == 0);
      #1;
      c++;
      if (dec_en && in_ready) begin failures++; $display("FAIL ACK_H high while decoding"); end
      if (out_valid && out_ready) begin
        checks++;
        if (expq.size() == 0 || out_bit !== expq[0]) begin
          failures++;
          $display("FAIL pattern bit %0d at cycle %0d, %0d bits expected", out_bit, c, expq.size());
        end
        if (expq.size()) void'(expq.pop_front());
      end
      if (in_valid && in_ready) begin
        void'(tx.pop_front());
        bits_in_code++;
      end
      if (code_done) begin
        int exp_len = (code_rank == M_H) ? M_H : code_rank + 1;
        hist_dut[code_rank]++;
        checks++;
        if (bits_in_code != exp_len) begin
          failures++;
          $display("FAIL rank %0d codeword took %0d bits", code_rank, bits_in_code);
        end
        bits_in_code = 0;
      end
    end
    checks++;
    if (tx.size() || expq.size()) begin
      failures++;
      $display("FAIL stream left %0d input and %0d output bits", tx.size(), expq.size());
    end
  endtask

  task automatic push_str(string s, ref bitq_t q);
    foreach (s[i]) if (s[i] == "0" || s[i] == "1") q.push_back(s[i] == "1");
  endtask

  initial begin
    bitq_t s;
    int    syms[$], r2s[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---- part 1: rank 0..4 -> L4, L0, L1, L2, L3
    rank_to_sym = '{3'd4, 3'd0, 3'd1, 3'd2, 3'd3};
    tx = {}; expq = {};
    push_str("1111 0 10 110 10 1110 0 0 10 0 110", tx);
    // ranks 4 0 1 2 1 3 0 0 1 0 2 -> L3 L4 L0 L1 L0 L2 L4 L4 L0 L4 L1
    push_str("0001 0000 1 01 1 001 0000 0000 1 0000 01", expq);
    stream(0, 2000);
    checks++;
    if (hist_dut[0] != 4 || hist_dut[1] != 3 || hist_dut[2] != 2 || hist_dut[3] != 1 || hist_dut[4] != 1) begin
      failures++;
      $display("FAIL part 1 rank counts %p", hist_dut);
    end

    // ---- part 2: random stream, frequency-ranked code
    restart = 1; @(negedge clk); restart = 0;
    hist_dut = '{default: 0};
    s = {};
    for (int i = 0; i < 6000; i++) s.push_back($urandom_range(0, 99) < 30);
    while (rlhc_split(s, M_H, syms) != 0) begin   // end on a pattern boundary
      s.push_back(1'b0);
      syms = {};
    end
    syms = {};
    void'(rlhc_split(s, M_H, syms));
    rlhc_rank_patterns(syms, M_H, r2s);
    foreach (r2s[r]) rank_to_sym[r] = SW'(r2s[r]);
    tx = {}; expq = s;
    rlhc_encode(syms, M_H, r2s, tx, hist_ref);
    stream(1, 300000);
    for (int r = 0; r <= M_H; r++) begin
      checks++;
      if (hist_dut[r] != hist_ref[r] || hist_ref[r] == 0) begin
        failures++;
        $display("FAIL rank %0d: %0d decoded, %0d encoded", r, hist_dut[r], hist_ref[r]);
      end
    end
    $display("rank map %p, ranks used %p", r2s, hist_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
