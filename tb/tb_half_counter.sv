// Half counter check: random INC pattern with Cnt_en toggling; Done must come
// on exactly every HALF-th counted bit since Cnt_en rose, and never while
// Cnt_en is low.
module tb_half_counter;
  localparam int unsigned HALF = 4;

  logic clk = 0, rst_n = 0, cnt_en = 0, inc = 0, done;
  logic [$clog2(HALF+1)-1:0] count;
  int   checks = 0, failures = 0, model = 0, dones = 0;

  half_counter #(.HALF(HALF)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if ($urandom_range(0, 40) == 0) cnt_en = !cnt_en;
      inc = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (done !== (cnt_en && inc && model == HALF - 1)) begin
        failures++;
        $display("FAIL cycle %0d done=%0d model=%0d", c, done, model);
      end
      checks++;
      if (count != model[$bits(count)-1:0]) begin
        failures++;
        $display("FAIL cycle %0d count=%0d model=%0d", c, count, model);
      end
      if (done) dones++;
      @(posedge clk);
      if (!cnt_en) model = 0;
      else if (inc) model = (model == HALF - 1) ? 0 : model + 1;
    end
    checks++;
    if (dones < 100) begin failures++; $display("FAIL too few Done pulses %0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
