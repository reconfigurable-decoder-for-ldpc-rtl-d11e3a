// mbcb_pair_tb: random check of a pair of MBCBs. In LDPC mode the four
// outputs must be the min-sum check-node messages (each excludes its own
// edge); in polar mode each member must act as an independent BCB.
module mbcb_pair_tb;
  import bp_pkg::*;
  import bp_ref_pkg::*;

  mode_e s;
  logic signed [6:0] p_l_in_odd [2], p_l_in_even [2], p_r_in_top [2], p_r_in_bot [2];
  logic signed [6:0] p_l_out_top [2], p_l_out_bot [2], p_r_out_odd [2], p_r_out_even [2];
  logic signed [6:0] q [4], r [4];
  int checks = 0, failures = 0;

  mbcb_pair #(.W(7)) dut (.*);

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
      int qv[4], lo[2], le[2], rt[2], rb[2];
      for (int k = 0; k < 4; k++) begin qv[k] = rnd(); q[k] = 7'(qv[k]); end
      for (int m = 0; m < 2; m++) begin
        lo[m] = rnd(); le[m] = rnd(); rt[m] = rnd(); rb[m] = rnd();
        p_l_in_odd[m] = 7'(lo[m]); p_l_in_even[m] = 7'(le[m]);
        p_r_in_top[m] = 7'(rt[m]); p_r_in_bot[m]  = 7'(rb[m]);
      end
      s = (t % 2 == 0) ? MODE_LDPC : MODE_POLAR;
      #1;
      if (s == MODE_LDPC) begin
        for (int k = 0; k < 4; k++) begin
          int sgn, mn;
          sgn = 0; mn = MAXV;
          for (int k2 = 0; k2 < 4; k2++) if (k2 != k) begin
            if (qv[k2] < 0) sgn ^= 1;
            if (ref_abs(qv[k2]) < mn) mn = ref_abs(qv[k2]);
          end
          chk($sformatf("r[%0d]", k), r[k], sgn ? -mn : mn);
        end
        for (int m = 0; m < 2; m++)
          chk("Q", p_l_out_bot[m], ref_sat(ref_sat(rt[m] + le[m]) + lo[m]));
      end else begin
        for (int m = 0; m < 2; m++) begin
          chk("L(i,j)",      p_l_out_top[m],  ref_g(lo[m], ref_sat(le[m] + rb[m])));
          chk("R(i+1,2j)",   p_r_out_even[m], ref_sat(ref_g(rt[m], lo[m]) + rb[m]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
