// AFDER decoder check.
// Part 1 sends the codewords of the AFDER code table by hand (groups 1-4, the
// repeat code) and checks the run lengths and their alternating values.
// Part 2 builds random alternating runs up to L_max = 126 with many equal
// consecutive lengths, encodes them with the reference encoder and sends them
// at one bit per PHI clocks with a randomly stalling consumer; every output bit
// and the count of codewords per group are checked, and so is ACK_H staying
// low while a run is expanded. Part 3 checks the error flag on a prefix that
// is too long.
module tb_afder_fsm;
  import tb_mdc_pkg::*;

  localparam int unsigned MAX_GROUP = 6;
  localparam int unsigned GW = $clog2(MAX_GROUP + 1);
  localparam int PHI = 4;

  logic clk = 0, rst_n = 0, restart = 0, en = 1;
  logic in_valid = 0, in_bit = 0, in_ready;
  logic out_valid, out_bit, out_ready = 1;
  logic dec_en, cmp, code_done, err;
  logic [GW-1:0] code_group;

  afder_fsm #(.MAX_GROUP(MAX_GROUP)) dut (.*);

  always #5 clk = !clk;

  int    checks = 0, failures = 0;
  bitq_t tx, expq;
  int    hist_dut[16], hist_ref[16];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends tx at one bit per PHI clocks and collects output bits against expq.
  task automatic stream(bit stall, int limit);
    int c = 0;
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
          $display("FAIL run bit %0d at cycle %0d, %0d bits expected", out_bit, c, expq.size());
        end
        if (expq.size()) void'(expq.pop_front());
      end
      if (code_done) hist_dut[code_group]++;
      if (in_valid && in_ready) void'(tx.pop_front());
    end
    checks++;
    if (tx.size() || expq.size()) begin
      failures++;
      $display("FAIL stream left %0d input and %0d output bits", tx.size(), expq.size());
    end
  endtask

  task automatic push_str(string s);
    foreach (s[i]) if (s[i] == "0" || s[i] == "1") tx.push_back(s[i] == "1");
  endtask

  task automatic push_run(bit v, int n);
    repeat (n) expq.push_back(v);
  endtask

  initial begin
    bitq_t s;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---- part 1: code table entries, first run is a run of 1s
    tx = {}; expq = {};
    push_str("1");                                  // polarity
    push_str("000");      push_run(1, 1);           // A1, run 1
    push_str("001");      push_run(0, 2);           // A1, run 2
    push_str("1000");     push_run(1, 3);           // A2, run 3
    push_str("1011");     push_run(0, 6);           // A2, run 6
    push_str("01");       push_run(1, 6);           // repeat
    push_str("110000");   push_run(0, 7);           // A3, run 7
    push_str("110111");   push_run(1, 14);          // A3, run 14
    push_str("11100000"); push_run(0, 15);          // A4, run 15
    push_str("11101111"); push_run(1, 30);          // A4, run 30
    push_str("01");       push_run(0, 30);          // repeat
    push_str("01");       push_run(1, 30);          // repeat again
    stream(0, 5000);
    checks++;
    if (hist_dut[0] != 3 || hist_dut[1] != 2 || hist_dut[2] != 2 || hist_dut[3] != 2 || hist_dut[4] != 2) begin
      failures++;
      $display("FAIL part 1 group counts %p", hist_dut);
    end

    // ---- part 2: random runs
    restart = 1; @(negedge clk); restart = 0;
    hist_dut = '{default: 0};
    s = {};
    begin
      bit v = bit'($urandom_range(0, 1));
      int prev = 0;
      for (int r = 0; r < 600; r++) begin
        int len;
        case ($urandom_range(0, 9))
          0, 1, 2: len = (prev > 0) ? prev : 1;           // equal run length
          3, 4:    len = $urandom_range(1, 2);
          5:       len = $urandom_range(3, 14);
          6:       len = $urandom_range(15, 30);
          7:       len = $urandom_range(31, 62);
          8:       len = $urandom_range(63, 126);
          default: len = $urandom_range(1, 6);
        endcase
        repeat (len) s.push_back(v);
        v = !v;
        prev = len;
      end
    end
    tx = {}; expq = s;
    afder_encode(s, tx, hist_ref);
    stream(1, 300000);
    for (int g = 0; g <= MAX_GROUP; g++) begin
      checks++;
      if (hist_dut[g] != hist_ref[g] || hist_ref[g] == 0) begin
        failures++;
        $display("FAIL group %0d: %0d decoded, %0d encoded", g, hist_dut[g], hist_ref[g]);
      end
    end
    checks++;
    if (err) begin failures++; $display("FAIL err set by a valid stream"); end

    // ---- part 3: prefix longer than the last group
    restart = 1; @(negedge clk); restart = 0;
    tx = {}; expq = {};
    push_str("0 1111111");
    stream(0, 200);
    checks++;
    if (!err) begin failures++; $display("FAIL err not raised"); end

    $display("groups decoded %p", hist_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
