// gfu_tb: exhaustive check of the g-function unit over all pairs of 7-bit
// inputs against sgn(a)sgn(b)min(|a|,|b|) with the magnitude clamped to 63.
module gfu_tb;
  import bp_ref_pkg::*;
  logic signed [6:0] a, b, c;
  int checks = 0, failures = 0;

  gfu #(.W(7)) dut (.a, .b, .c);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -64; x < 64; x++) begin
      for (int y = -64; y < 64; y++) begin
        a = 7'(x); b = 7'(y);
        #1;
        checks++;
        if (int'(c) != ref_g(x, y)) begin
          failures++;
          if (failures < 10) $display("FAIL g(%0d,%0d)=%0d expected %0d", x, y, c, ref_g(x, y));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
