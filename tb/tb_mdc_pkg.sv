// Reference encoders and test-cube generator shared by the decompressor
// testbenches.
//
// These functions model the off-chip side of the scheme, written
// independently of the RTL: the nine-coded (9C) encoder with minimum-transition
// fill of the unspecified bits, the AFDER run-length encoder and the RLHC
// pattern encoder with frequency-ranked right-grown Huffman codewords. A test
// cube is held as two bit vectors per K-bit block, a value and a care mask
// (care = 0 marks an unspecified bit). Bit queues are in transmission order:
// index 0 is sent first, and in a block the left half is sent first.
package tb_mdc_pkg;

  typedef bit bitq_t[$];

  // ---------------------------------------------------------------- 9C
  // Is a half (bits lo..hi of val/care) compatible with all-v?
  function automatic bit half_is(bit val[], bit care[], int lo, int hi, bit v);
    for (int i = lo; i <= hi; i++)
      if (care[i] && val[i] != v) return 0;
    return 1;
  endfunction

  // Encode one block: appends the codeword and the mismatched bits to `code`,
  // the fully specified block to `scan`, returns the case number 1..9.
  // Unspecified mismatched bits repeat the previous scan bit (`last`).
  function automatic int c9_encode_block(bit val[], bit care[], int K,
                                         ref bit last, ref bitq_t code,
                                         ref bitq_t scan);
    int  h = K / 2;
    bit  l0 = half_is(val, care, 0, h-1, 0), l1 = half_is(val, care, 0, h-1, 1);
    bit  r0 = half_is(val, care, h, K-1, 0), r1 = half_is(val, care, h, K-1, 1);
    int  cs;
    // left / right source: 0, 1, or 2 = mismatched
    int  ls, rs;
    if      (l0 && r0) begin cs = 1; ls = 0; rs = 0; end
    else if (l1 && r1) begin cs = 2; ls = 1; rs = 1; end
    else if (l0 && r1) begin cs = 3; ls = 0; rs = 1; end
    else if (l1 && r0) begin cs = 4; ls = 1; rs = 0; end
    else if (l1)       begin cs = 5; ls = 1; rs = 2; end
    else if (r1)       begin cs = 6; ls = 2; rs = 1; end
    else if (l0)       begin cs = 7; ls = 0; rs = 2; end
    else if (r0)       begin cs = 8; ls = 2; rs = 0; end
    else               begin cs = 9; ls = 2; rs = 2; end
    case (cs)
      1: code.push_back(0);
      2: begin code.push_back(1); code.push_back(0); end
      9: repeat (4) code.push_back(1);
      default: begin
        bit [4:0] cw = 5'b11000 + 5'(cs - 3);
        for (int i = 4; i >= 0; i--) code.push_back(cw[i]);
      end
    endcase
    for (int i = 0; i < K; i++) begin
      int src = (i < h) ? ls : rs;
      bit b;
      if (src == 2) begin
        b = care[i] ? val[i] : last;
        code.push_back(b);
      end else b = bit'(src);
      scan.push_back(b);
      last = b;
    end
    return cs;
  endfunction

  // ---------------------------------------------------------------- AFDER
  // Appends the AFDER codeword of run length r (r >= 1, fits MAX_GROUP).
  function automatic void afder_code(int r, int prev, ref bitq_t q);
    int k;
    if (r == prev) begin q.push_back(0); q.push_back(1); return; end
    if (r <= 2) begin
      q.push_back(0); q.push_back(0); q.push_back(bit'(r - 1)); return;
    end
    k = 2;
    while (r > (1 << (k + 1)) - 2) k++;
    repeat (k - 1) q.push_back(1);
    q.push_back(0);
    for (int i = k - 1; i >= 0; i--) q.push_back(bit'((r - ((1 << k) - 1)) >> i));
  endfunction

  // Encodes a bit stream: polarity bit of the first run, then one codeword per
  // run. `grp_hist[0]` counts repeat codes, `grp_hist[g]` group g codes.
  function automatic void afder_encode(bitq_t s, ref bitq_t q, ref int grp_hist[16]);
    int i = 0, prev = 0;
    if (s.size() == 0) return;
    q.push_back(s[0]);
    while (i < s.size()) begin
      int r = 1, g;
      while (i + r < s.size() && s[i + r] == s[i]) r++;
      if (r == prev) g = 0;
      else begin g = 1; while (r > (1 << (g + 1)) - 2) g++; end
      grp_hist[g]++;
      afder_code(r, prev, q);
      prev = r;
      i += r;
    end
  endfunction

  // Longest run in a bit stream.
  function automatic int longest_run(bitq_t s);
    int best = 0, r = 0;
    for (int i = 0; i < s.size(); i++) begin
      r = (i > 0 && s[i] == s[i-1]) ? r + 1 : 1;
      if (r > best) best = r;
    end
    return best;
  endfunction

  // ---------------------------------------------------------------- RLHC
  // Splits a stream into patterns L_0..L_mh (L_i = i zeros then 1, L_mh =
  // mh zeros). Returns the number of trailing zeros left unmatched.
  function automatic int rlhc_split(bitq_t s, int mh, ref int syms[$]);
    int z = 0;
    foreach (s[i]) begin
      if (s[i]) begin syms.push_back(z); z = 0; end
      else begin
        z++;
        if (z == mh) begin syms.push_back(mh); z = 0; end
      end
    end
    return z;
  endfunction

  // Ranks the patterns by descending frequency (ties: lower index first);
  // rank_to_sym[r] is the pattern that gets codeword r.
  function automatic void rlhc_rank_patterns(int syms[$], int mh, ref int rank_to_sym[$]);
    int  freq[$];
    bit  used[$];
    freq = {}; used = {};
    for (int i = 0; i <= mh; i++) begin freq.push_back(0); used.push_back(0); end
    foreach (syms[i]) freq[syms[i]]++;
    rank_to_sym = {};
    for (int r = 0; r <= mh; r++) begin
      int best = -1;
      for (int i = 0; i <= mh; i++)
        if (!used[i] && (best < 0 || freq[i] > freq[best])) best = i;
      used[best] = 1;
      rank_to_sym.push_back(best);
    end
  endfunction

  // Appends the codeword of every pattern: rank r -> r ones and a zero,
  // rank mh -> mh ones.
  function automatic void rlhc_encode(int syms[$], int mh, int rank_to_sym[$],
                                      ref bitq_t q, ref int rank_hist[16]);
    foreach (syms[i]) begin
      int r = 0;
      while (rank_to_sym[r] != syms[i]) r++;
      rank_hist[r]++;
      repeat (r) q.push_back(1);
      if (r < mh) q.push_back(0);
    end
  endfunction

  // ---------------------------------------------------------------- cubes
  // Random K-bit test-cube block: kind 0 all unspecified, 1 specified zeros
  // with X, 2 specified ones with X, 3..5 halves of mixed kinds, 6 fully random.
  function automatic void rand_block(int K, int kind, ref bit val[], ref bit care[]);
    int hl = kind, hr = kind;
    if (kind >= 3 && kind <= 5) begin hl = $urandom_range(0, 6); hr = $urandom_range(0, 6); end
    val = new[K]; care = new[K];
    for (int i = 0; i < K; i++) begin
      int hk = (i < K/2) ? hl : hr;
      case (hk)
        0: begin care[i] = 0; val[i] = 0; end
        1: begin care[i] = ($urandom_range(0, 3) == 0); val[i] = 0; end
        2: begin care[i] = ($urandom_range(0, 3) == 0); val[i] = 1; end
        default: begin care[i] = ($urandom_range(0, 2) != 0); val[i] = bit'($urandom_range(0, 1)); end
      endcase
    end
  endfunction

endpackage
