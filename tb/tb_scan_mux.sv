// Exhaustive check of the 3-to-1 scan MUX: every select code with both values
// of the mismatched-bit input.
module tb_scan_mux;
  import mdc_pkg::*;

  mux_sel_e sel;
  logic     u, y;
  int       checks = 0, failures = 0;

  scan_mux dut (.sel, .data_in_u(u), .data_out(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 2; b++) begin
        logic exp;
        sel = mux_sel_e'(s);
        u   = b[0];
        #1;
        exp = (s == 0) ? 1'b0 : (s == 1) ? 1'b1 : (s == 2) ? b[0] : 1'b0;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%0d u=%0d got %0d exp %0d", s, b, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
