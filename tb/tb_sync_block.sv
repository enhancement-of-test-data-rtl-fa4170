// Synchronization block check: random writes and reads against a queue model;
// checks every read bit, the full and empty flags and that both flags are
// reached.
module tb_sync_block;
  localparam int unsigned DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_bit = 0, wr_ready, rd_valid, rd_bit, rd_pop = 0, full, empty;
  int   checks = 0, failures = 0, n_full = 0, n_empty = 0;
  bit   model[$];

  sync_block #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 10000; c++) begin
      bias = (c / 500) % 2 ? 3 : 1;       // alternate filling and draining phases
      @(negedge clk);
      wr_valid = ($urandom_range(0, 3) < bias + 1);
      wr_bit   = bit'($urandom_range(0, 1));
      rd_pop   = ($urandom_range(0, 3) < 4 - bias) && !empty;
      #1;
      checks += 3;
      if (full  !== (model.size() == DEPTH)) begin failures++; $display("FAIL full %0d size %0d", full, model.size()); end
      if (empty !== (model.size() == 0))     begin failures++; $display("FAIL empty %0d size %0d", empty, model.size()); end
      if (rd_valid !== !empty)               begin failures++; $display("FAIL rd_valid"); end
      if (rd_pop) begin
        checks++;
        if (rd_bit !== model[0]) begin failures++; $display("FAIL data cycle %0d", c); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      if (rd_pop) void'(model.pop_front());
      if (wr_valid && model.size() < DEPTH + (rd_pop ? 1 : 0) && !(full)) model.push_back(wr_bit);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full %0d empty %0d never seen", n_full, n_empty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
