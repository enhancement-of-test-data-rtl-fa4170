// Workload testbench: synthetic test sets with the volumes of the six ISCAS'89
// benchmark test sets (s5378 23,754 bits ... s38584 199,104 bits), each
// decompressed through 9C-AFDER and through 9C-RLHC with the group size that
// gave the best RLHC result for that circuit (5, 6, 8, 8, 5, 5). The test
// cubes themselves are random with a high share of don't-cares, so the
// compression figures printed are those of the synthetic data. All twelve runs
// go in parallel, each on its own decoder instance; every scan bit is checked.
module tb_iscas_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  localparam int N = 12;
  logic done [N];
  int   chk [N], fl [N];

  tb_wl_runner #(.NAME("s5378"),  .NBITS(23754),  .RLHC(0))          r0  (.clk, .rst_n, .done(done[0]),  .checks(chk[0]),  .failures(fl[0]));
  tb_wl_runner #(.NAME("s9234"),  .NBITS(39273),  .RLHC(0))          r1  (.clk, .rst_n, .done(done[1]),  .checks(chk[1]),  .failures(fl[1]));
  tb_wl_runner #(.NAME("s13207"), .NBITS(165200), .RLHC(0))          r2  (.clk, .rst_n, .done(done[2]),  .checks(chk[2]),  .failures(fl[2]));
  tb_wl_runner #(.NAME("s15850"), .NBITS(76986),  .RLHC(0))          r3  (.clk, .rst_n, .done(done[3]),  .checks(chk[3]),  .failures(fl[3]));
  tb_wl_runner #(.NAME("s38417"), .NBITS(164736), .RLHC(0))          r4  (.clk, .rst_n, .done(done[4]),  .checks(chk[4]),  .failures(fl[4]));
  tb_wl_runner #(.NAME("s38584"), .NBITS(199104), .RLHC(0))          r5  (.clk, .rst_n, .done(done[5]),  .checks(chk[5]),  .failures(fl[5]));
  tb_wl_runner #(.NAME("s5378"),  .NBITS(23754),  .RLHC(1), .M_H(5)) r6  (.clk, .rst_n, .done(done[6]),  .checks(chk[6]),  .failures(fl[6]));
  tb_wl_runner #(.NAME("s9234"),  .NBITS(39273),  .RLHC(1), .M_H(6)) r7  (.clk, .rst_n, .done(done[7]),  .checks(chk[7]),  .failures(fl[7]));
  tb_wl_runner #(.NAME("s13207"), .NBITS(165200), .RLHC(1), .M_H(8)) r8  (.clk, .rst_n, .done(done[8]),  .checks(chk[8]),  .failures(fl[8]));
  tb_wl_runner #(.NAME("s15850"), .NBITS(76986),  .RLHC(1), .M_H(8)) r9  (.clk, .rst_n, .done(done[9]),  .checks(chk[9]),  .failures(fl[9]));
  tb_wl_runner #(.NAME("s38417"), .NBITS(164736), .RLHC(1), .M_H(5)) r10 (.clk, .rst_n, .done(done[10]), .checks(chk[10]), .failures(fl[10]));
  tb_wl_runner #(.NAME("s38584"), .NBITS(199104), .RLHC(1), .M_H(5)) r11 (.clk, .rst_n, .done(done[11]), .checks(chk[11]), .failures(fl[11]));

  initial begin
    repeat (5_000_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks = 0, failures = 0;
    bit all;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      foreach (done[i]) all &= done[i];
    end while (!all);
    foreach (chk[i]) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
