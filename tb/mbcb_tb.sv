// mbcb_tb: random check of the merged basic computational block in both
// modes. Polar mode is compared with the four BCB update equations, LDPC
// mode with two 3-input check-node messages and the three variable-node sums.
module mbcb_tb;
  import bp_pkg::*;
  import bp_ref_pkg::*;

  mode_e s;
  logic signed [6:0] l_in_odd, l_in_even, r_in_top, r_in_bot;
  logic signed [6:0] l_out_top, l_out_bot, r_out_odd, r_out_even;
  logic signed [6:0] q0, q1, q2, q3, r_x, r_y;
  int checks = 0, failures = 0;

  mbcb #(.W(7)) dut (.*);

  function automatic int rnd();
    return int'($urandom_range(126)) - 63;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int lo, le, rt, rb, a0, a1, a2, a3;
      lo = rnd(); le = rnd(); rt = rnd(); rb = rnd();
      a0 = rnd(); a1 = rnd(); a2 = rnd(); a3 = rnd();
      if (t % 7 == 0) begin lo = 63; le = 60; rb = 50; end  // drive the adders into saturation
      l_in_odd = 7'(lo); l_in_even = 7'(le); r_in_top = 7'(rt); r_in_bot = 7'(rb);
      q0 = 7'(a0); q1 = 7'(a1); q2 = 7'(a2); q3 = 7'(a3);
      s = (t % 2 == 0) ? MODE_POLAR : MODE_LDPC;
      #1;
      if (s == MODE_POLAR) begin
        chk("L(i,j)",       l_out_top,  ref_g(lo, ref_sat(le + rb)));
        chk("L(i,j+N/2)",   l_out_bot,  ref_sat(ref_g(rt, lo) + le));
        chk("R(i+1,2j-1)",  r_out_odd,  ref_g(rt, ref_sat(le + rb)));
        chk("R(i+1,2j)",    r_out_even, ref_sat(ref_g(rt, lo) + rb));
      end else begin
        chk("r excl q0", r_x, ref_g(ref_g(a1, a2), a3));
        chk("r excl q1", r_y, ref_g(ref_g(a0, a2), a3));
        chk("q_a",       l_out_top, ref_sat(rt + le));
        chk("q_b",       r_out_odd, ref_sat(rt + lo));
        chk("Q",         l_out_bot, ref_sat(ref_sat(rt + le) + lo));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
