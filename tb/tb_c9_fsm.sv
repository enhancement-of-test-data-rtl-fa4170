// 9C decoder check. The FSM is wired to its half counter and scan MUX as in the
// decompressor. Random test-cube blocks of all nine cases are 9C-encoded by the
// reference encoder; the coded stream is fed bit by bit and every scan bit,
// every decoded symbol and every ACK is compared. Phase 1 feeds the stream
// without gaps and checks that each block takes |codeword| + K clocks; phase 2
// feeds it with random gaps (stream running dry, also inside u halves).
module tb_c9_fsm;
  import mdc_pkg::*;
  import tb_mdc_pkg::*;

  localparam int unsigned K = 8;

  logic     clk = 0, rst_n = 0;
  logic     in_valid = 0, in_bit = 0, in_pop;
  mux_sel_e sel;
  logic     cnt_en, inc, done, sc_en, ack, data_out;
  c9_sym_e  sym;
  logic [$clog2(K/2+1)-1:0] count;

  c9_fsm #(.K(K)) dut (.*);
  half_counter #(.HALF(K/2)) u_cnt (.clk, .rst_n, .cnt_en, .inc, .done, .count);
  scan_mux u_mux (.sel, .data_in_u(in_bit), .data_out);

  always #5 clk = !clk;

  int    checks = 0, failures = 0;
  bitq_t code, scan;
  int    cases[$], cwlen[$];
  int    seen[10];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(int nblk, bit gaps);
    bit val[], care[];
    bit last = 0;
    int  cycles = 0, exp_cycles = 0, nack = 0;
    code = {}; scan = {}; cases = {}; cwlen = {};
    for (int b = 0; b < nblk; b++) begin
      int cs;
      rand_block(K, (b < 18) ? b % 9 : $urandom_range(0, 6), val, care);
      cs = c9_encode_block(val, care, K, last, code, scan);
      cases.push_back(cs);
      seen[cs]++;
      // codeword length without the mismatched bits
      cwlen.push_back(cs == 1 ? 1 : cs == 2 ? 2 : cs == 9 ? 4 : 5);
      exp_cycles += cwlen[$] + K;
    end
    while (nack < nblk && cycles < 100 * nblk * K) begin
      @(negedge clk);
      in_valid = (code.size() > 0) && !(gaps && $urandom_range(0, 2) == 0);
      in_bit   = (code.size() > 0) ? code[0] : 1'b0;
      #1;
      cycles++;
      if (sc_en) begin
        checks++;
        if (scan.size() == 0 || data_out !== scan[0]) begin
          failures++;
          $display("FAIL scan bit %0d exp %0d (block %0d)", data_out, scan.size() ? scan[0] : 2, nack);
        end
        if (scan.size()) void'(scan.pop_front());
      end
      if (ack) begin
        checks++;
        if (sym !== c9_sym_e'(cases[nack])) begin
          failures++;
          $display("FAIL block %0d sym %0d exp %0d", nack, sym, cases[nack]);
        end
        nack++;
      end
      if (in_pop) begin
        if (!in_valid) begin failures++; $display("FAIL pop without data"); end
        else void'(code.pop_front());
      end
    end
    checks += 3;
    if (nack != nblk) begin failures++; $display("FAIL %0d of %0d blocks acknowledged", nack, nblk); end
    if (scan.size() != 0) begin failures++; $display("FAIL %0d scan bits missing", scan.size()); end
    if (code.size() != 0) begin failures++; $display("FAIL %0d stream bits unread", code.size()); end
    if (!gaps) begin
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL %0d cycles, expected sum(|C|+K) = %0d", cycles, exp_cycles);
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run_phase(300, 0);
    run_phase(600, 1);
    for (int c = 1; c <= 9; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL case %0d never exercised", c); end
    end
    $display("cases seen: %p", seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
