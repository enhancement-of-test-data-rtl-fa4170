// One workload run for tb_iscas_workloads: builds a synthetic test set of
// NBITS bits (rounded up to whole K-bit blocks), compresses it with 9C and
// then AFDER or RLHC, sends it to its own mdc_decoder instance at one tester
// bit per PHI clocks and checks every scan bit. Reports its check and failure
// counts and the compressed size when `done` rises.
module tb_wl_runner
  import mdc_pkg::*;
  import tb_mdc_pkg::*;
#(
  parameter string       NAME   = "set",
  parameter int          NBITS  = 1000,
  parameter bit          RLHC   = 0,
  parameter int unsigned M_H    = 4,
  parameter int          PHI    = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned K = 8, MAX_GROUP = 6;
  localparam int unsigned SW = $clog2(M_H + 1), GW = $clog2(MAX_GROUP + 1);
  localparam int L_MAX = (1 << (MAX_GROUP + 1)) - 2;

  logic          restart = 0;
  scheme_e       scheme_sel;
  logic [SW-1:0] rlhc_table [M_H+1];
  logic          data_in = 0, data_in_valid = 0, ack_h;
  logic          data_out, sc_en, dec_en, cmp, ack;
  c9_sym_e       c9_sym;
  logic          fsm1_code_done, sync_full, sync_empty, err;
  logic [GW-1:0] afder_group;
  logic [SW-1:0] rlhc_rank;

  assign scheme_sel = RLHC ? SCHEME_RLHC : SCHEME_AFDER;

  mdc_decoder #(.M_H(M_H)) dut (.*);

  initial begin
    bitq_t scan, code, tx;
    int    syms[$], r2s[$], hist[16], nblk, c;
    bit    offered;
    bit    val[], care[];
    bit    prev_long;
    done = 0; checks = 0; failures = 0;
    foreach (rlhc_table[i]) rlhc_table[i] = '0;
    nblk = (NBITS + K - 1) / K;
    // mostly don't-care test data: long unspecified stretches, sparse and
    // dense blocks; AFDER sets are rebuilt until no run exceeds L_max
    do begin
      bit last;
      int b;
      last = 0; b = 0;
      scan = {}; code = {};
      prev_long = 0;
      while (b < nblk) begin
        int seg_kind, seg_len;
        // an unspecified stretch is always followed by specified blocks
        seg_kind  = prev_long ? $urandom_range(3, 9) : $urandom_range(0, 9);
        seg_len   = (seg_kind < 3) ? $urandom_range(1, 60) : $urandom_range(1, 6);
        prev_long = (seg_kind < 3);
        for (int i = 0; i < seg_len && b < nblk; i++, b++) begin
          rand_block(K, (seg_kind < 3) ? 0 : $urandom_range(0, 6), val, care);
          void'(c9_encode_block(val, care, K, last, code, scan));
        end
      end
    end while (!RLHC && longest_run(code) > L_MAX);
    tx = {};
    if (RLHC) begin
      syms = {};
      while (rlhc_split(code, M_H, syms) != 0) begin
        bit last;
        last = scan[$];
        val = new[K]; care = new[K];
        foreach (val[i]) begin val[i] = 0; care[i] = 1; end
        void'(c9_encode_block(val, care, K, last, code, scan));
        nblk++;
        syms = {};
      end
      syms = {};
      void'(rlhc_split(code, M_H, syms));
      rlhc_rank_patterns(syms, M_H, r2s);
      foreach (r2s[r]) rlhc_table[r] = SW'(r2s[r]);
      rlhc_encode(syms, M_H, r2s, tx, hist);
    end else begin
      afder_encode(code, tx, hist);
    end
    begin
      int te, te1, nscan, hi;
      te = tx.size(); te1 = code.size(); nscan = scan.size();
      @(posedge rst_n);
      c = 0; offered = 0;
      while ((tx.size() > 0 || scan.size() > 0) && c < 20 * nscan) begin
        @(negedge clk);
        if (c % PHI == 0 && tx.size() > 0) offered = 1;
        data_in_valid = offered;
        data_in       = (tx.size() > 0) ? tx[0] : 1'b0;
        #1;
        c++;
        if (sc_en) begin
          checks++;
          if (scan.size() == 0 || data_out !== scan[0]) begin
            failures++;
            if (failures < 5) $display("FAIL %s scan bit mismatch", NAME);
          end
          if (scan.size()) void'(scan.pop_front());
        end
        if (data_in_valid && ack_h) begin void'(tx.pop_front()); offered = 0; end
      end
      data_in_valid = 0;
      hi = PHI * te + nscan + te1;
      checks += 3;
      if (tx.size() || scan.size()) begin failures++; $display("FAIL %s incomplete", NAME); end
      if (c > hi) begin failures++; $display("FAIL %s %0d clocks above bound %0d", NAME, c, hi); end
      if (err) begin failures++; $display("FAIL %s error flag", NAME); end
      $display("%-8s %-12s: %0d test bits -> 9C %0d -> %0d bits (%0.1f%% smaller), %0d clocks",
               NAME, RLHC ? $sformatf("RLHC mh=%0d", M_H) : "AFDER", nscan, te1, te,
               100.0 * (nscan - te) / nscan, c);
    end
    done = 1;
  end
endmodule
