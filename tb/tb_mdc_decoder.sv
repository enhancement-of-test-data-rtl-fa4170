// End-to-end check of the multistage decompressor at its default parameters
// (K = 8, MH = 4, six AFDER groups, 16-bit synchronization block).
//
// A random test set with unspecified bits (long stretches of don't-care
// blocks, half-specified blocks and dense blocks, NBLK blocks of K bits) is
// compressed by the reference encoders: 9C with minimum-transition fill, then
// AFDER, and in a second pass RLHC with a frequency-ranked code. Each
// compressed set is sent from a tester model that offers one bit every PHI
// clocks (f_ATE = f_SYS / PHI) and holds it until ACK_H takes it. The scan
// bits (data_out while sc_en) must equal the filled test set bit for bit.
// Pass order: 9C-AFDER, switch to 9C-RLHC, switch back to 9C-AFDER on a new
// set. Every mechanism is counted and must occur: all nine 9C codewords, every
// AFDER group and the repeat code, every RLHC rank, the synchronization block
// full (FSM1 stalled) and empty (FSM2 starved), the tester waiting on ACK_H,
// and the scheme switch. The clock count of each pass is checked against
// the bounds max(PHI*|T_E|, K*N) <= cycles <= PHI*|T_E| + K*N + |T_E1|.
module tb_mdc_decoder;
  import mdc_pkg::*;
  import tb_mdc_pkg::*;

  localparam int unsigned K = 8, M_H = 4, MAX_GROUP = 6;
  localparam int unsigned SW = $clog2(M_H + 1), GW = $clog2(MAX_GROUP + 1);
  localparam int PHI = 4;
  localparam int NBLK = 3000;                 // 24,000 test bits per set
  localparam int L_MAX = (1 << (MAX_GROUP + 1)) - 2;

  logic          clk = 0, rst_n = 0, restart = 0;
  scheme_e       scheme_sel = SCHEME_AFDER;
  logic [SW-1:0] rlhc_table [M_H+1];
  logic          data_in = 0, data_in_valid = 0, ack_h;
  logic          data_out, sc_en, dec_en, cmp, ack;
  c9_sym_e       c9_sym;
  logic          fsm1_code_done, sync_full, sync_empty, err;
  logic [GW-1:0] afder_group;
  logic [SW-1:0] rlhc_rank;

  mdc_decoder dut (.*);

  always #5 clk = !clk;

  int    checks = 0, failures = 0;
  bitq_t tx, expq, c9s;
  int    n_c9[10], n_grp[16], n_rank[16], n_ref_grp[16], n_ref_rank[16];
  int    n_full = 0, n_starve = 0, n_ate_wait = 0, n_switch = 0, n_blocks = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Builds a random test set; returns the filled scan bits and the 9C stream.
  // Repeats until no run of the 9C stream exceeds the longest AFDER run.
  task automatic make_set(int nblk, ref bitq_t scan, ref bitq_t code, ref int cases[$]);
    bit val[], care[];
    bit prev_long;
    do begin
      bit last = 0;
      int b = 0;
      scan = {}; code = {}; cases = {};
      prev_long = 0;
      while (b < nblk) begin
        // an unspecified stretch is always followed by specified blocks
        int seg_kind = prev_long ? $urandom_range(2, 9) : $urandom_range(0, 9);
        int seg_len  = (seg_kind < 2) ? $urandom_range(1, 90) : $urandom_range(1, 6);
        prev_long = (seg_kind < 2);
        for (int i = 0; i < seg_len && b < nblk; i++, b++) begin
          rand_block(K, (seg_kind < 2) ? 0 : $urandom_range(0, 6), val, care);
          cases.push_back(c9_encode_block(val, care, K, last, code, scan));
        end
      end
    end while (longest_run(code) > L_MAX);
  endtask

  // Sends tx from the tester model and checks the scan output against expq.
  task automatic run_pass(string name, int nblk, int te_bits, int te1_bits);
    int c = 0, ack0 = n_blocks, lo, hi;
    bit offered = 0;
    while ((tx.size() > 0 || expq.size() > 0) && c < 2_000_000) begin
      @(negedge clk);
      // the tester offers a bit on its clock edge and holds it until taken
      if (c % PHI == 0 && tx.size() > 0) offered = 1;
      data_in_valid = offered;
      data_in       = (tx.size() > 0) ? tx[0] : 1'b0;
      #1;
      c++;
      if (data_in_valid && !ack_h) n_ate_wait++;
      if (sync_full) n_full++;
      if (sync_empty && expq.size() > 0) n_starve++;
      if (sc_en) begin
        checks++;
        if (expq.size() == 0 || data_out !== expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL %s scan bit %0d, %0d bits expected", name, data_out, expq.size());
        end
        if (expq.size()) void'(expq.pop_front());
      end
      if (ack) begin
        n_blocks++;
        n_c9[c9_sym]++;
      end
      if (fsm1_code_done) begin
        if (scheme_sel == SCHEME_AFDER) n_grp[afder_group]++;
        else n_rank[rlhc_rank]++;
      end
      if (data_in_valid && ack_h) begin
        void'(tx.pop_front());
        offered = 0;
      end
    end
    @(negedge clk);
    data_in_valid = 0;
    checks += 3;
    if (tx.size() || expq.size()) begin
      failures++;
      $display("FAIL %s left %0d tester bits and %0d scan bits", name, tx.size(), expq.size());
    end
    if (n_blocks - ack0 != nblk) begin
      failures++;
      $display("FAIL %s: %0d blocks acknowledged, %0d sent", name, n_blocks - ack0, nblk);
    end
    lo = (PHI * te_bits > K * nblk) ? PHI * te_bits : K * nblk;
    hi = PHI * te_bits + K * nblk + te1_bits;
    if (c < lo - PHI || c > hi) begin
      failures++;
      $display("FAIL %s: %0d cycles outside [%0d, %0d]", name, c, lo, hi);
    end
    $display("%s: %0d test bits, 9C %0d bits, compressed %0d bits (%0.1f%% smaller), %0d clocks (bounds %0d..%0d)",
             name, K * nblk, te1_bits, te_bits, 100.0 * (K * nblk - te_bits) / (K * nblk), c, lo, hi);
  endtask

  initial begin
    bitq_t scan, code;
    int    cases[$], syms[$], r2s[$], nblk;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // ---- pass 1: 9C-AFDER
    make_set(NBLK, scan, code, cases);
    tx = {}; expq = scan;
    afder_encode(code, tx, n_ref_grp);
    run_pass("9C-AFDER", NBLK, tx.size(), code.size());

    // ---- pass 2: switch to 9C-RLHC
    scheme_sel = SCHEME_RLHC; restart = 1; @(negedge clk); restart = 0; n_switch++;
    make_set(NBLK, scan, code, cases);
    nblk = NBLK;
    syms = {};
    while (rlhc_split(code, M_H, syms) != 0) begin   // pad with all-0 blocks
      bit last;
      bit v[], cr[];
      last = scan[$];
      v = new[K]; cr = new[K];
      foreach (v[i]) begin v[i] = 0; cr[i] = 1; end
      void'(c9_encode_block(v, cr, K, last, code, scan));
      nblk++;
      syms = {};
    end
    syms = {};
    void'(rlhc_split(code, M_H, syms));
    rlhc_rank_patterns(syms, M_H, r2s);
    foreach (r2s[r]) rlhc_table[r] = SW'(r2s[r]);
    tx = {}; expq = scan;
    rlhc_encode(syms, M_H, r2s, tx, n_ref_rank);
    run_pass("9C-RLHC", nblk, tx.size(), code.size());

    // ---- pass 3: back to 9C-AFDER with a new set
    scheme_sel = SCHEME_AFDER; restart = 1; @(negedge clk); restart = 0; n_switch++;
    make_set(NBLK / 4, scan, code, cases);
    tx = {}; expq = scan;
    afder_encode(code, tx, n_ref_grp);
    run_pass("9C-AFDER again", NBLK / 4, tx.size(), code.size());

    // ---- mechanism coverage
    for (int i = 1; i <= 9; i++) begin
      checks++;
      if (n_c9[i] == 0) begin failures++; $display("FAIL 9C codeword C%0d never decoded", i); end
    end
    for (int g = 0; g <= MAX_GROUP; g++) begin
      checks++;
      if (n_grp[g] == 0 || n_grp[g] != n_ref_grp[g]) begin
        failures++;
        $display("FAIL AFDER group %0d: %0d decoded, %0d sent", g, n_grp[g], n_ref_grp[g]);
      end
    end
    for (int r = 0; r <= M_H; r++) begin
      checks++;
      if (n_rank[r] == 0 || n_rank[r] != n_ref_rank[r]) begin
        failures++;
        $display("FAIL RLHC rank %0d: %0d decoded, %0d sent", r, n_rank[r], n_ref_rank[r]);
      end
    end
    checks += 5;
    if (n_full == 0)     begin failures++; $display("FAIL synchronization block never full"); end
    if (n_starve == 0)   begin failures++; $display("FAIL 9C decoder never starved"); end
    if (n_ate_wait == 0) begin failures++; $display("FAIL tester never waited on ACK_H"); end
    if (n_switch != 2)   begin failures++; $display("FAIL scheme switched %0d times", n_switch); end
    if (err)             begin failures++; $display("FAIL error flag set"); end
    $display("9C codewords %p", n_c9);
    $display("AFDER groups (0 = repeat) %p", n_grp);
    $display("RLHC ranks %p", n_rank);
    $display("sync full %0d clocks, 9C starved %0d clocks, tester waits %0d, switches %0d",
             n_full, n_starve, n_ate_wait, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
