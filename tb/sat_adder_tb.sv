// sat_adder_tb: exhaustive check of the saturating LLR adder over all pairs
// of 7-bit inputs against the integer sum clamped to +/-63.
module sat_adder_tb;
  import bp_ref_pkg::*;
  logic signed [6:0] a, b, s;
  int checks = 0, failures = 0, sat_hits = 0;

  sat_adder #(.W(7)) dut (.a, .b, .s);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -63; x < 64; x++) begin
      for (int y = -63; y < 64; y++) begin
        a = 7'(x); b = 7'(y);
        #1;
        checks++;
        if (ref_abs(x + y) > MAXV) sat_hits++;
        if (int'(s) != ref_sat(x + y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d=%0d expected %0d", x, y, s, ref_sat(x + y));
        end
      end
    end
    checks++;
    if (sat_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
