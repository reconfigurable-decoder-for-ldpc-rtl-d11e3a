// bp_ctrl_tb: checks the step sequence of the schedule controller. For each
// frame it records the (pass, stage) of every active cycle and compares it
// with the expected list (LDPC: 10 single-cycle iterations; polar: 10 x
// (L stages 2,1,0 then R stages 0,1,2) and a closing L pass), checks that
// done follows exactly 10 or 63 cycles after the start cycle, that a start
// in the done cycle is taken and that a start while busy is ignored.
module bp_ctrl_tb;
  import bp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode_in = MODE_POLAR;
  logic load, active, done, busy;
  mode_e mode;
  pass_e pass;
  logic [1:0] stage;
  int checks = 0, failures = 0, cycle = 0;
  int back_to_back = 0, ignored_starts = 0;

  bp_ctrl #(.ITER_LDPC(10), .ITER_POLAR(10), .LOGN(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one frame whose start is already being driven; returns in the done cycle.
  task automatic run_frame(input mode_e m, input bit poke_busy);
    int steps = 0, c0, exp_steps;
    int exp_pass[$], exp_stage[$];
    exp_steps = (m == MODE_LDPC) ? 10 : 63;
    if (m == MODE_LDPC) begin
      for (int i = 0; i < 10; i++) begin exp_pass.push_back(PASS_L); exp_stage.push_back(0); end
    end else begin
      for (int it = 0; it <= 10; it++) begin
        for (int s = 2; s >= 0; s--) begin exp_pass.push_back(PASS_L); exp_stage.push_back(s); end
        if (it < 10)
          for (int s = 0; s <= 2; s++) begin exp_pass.push_back(PASS_R); exp_stage.push_back(s); end
      end
    end
    c0 = cycle;
    chk("load in start cycle", load, 1);
    do begin
      if (active) begin
        chk("mode", mode, m);
        if (steps < exp_pass.size()) begin
          chk($sformatf("pass step %0d", steps), pass, exp_pass[steps]);
          if (m == MODE_POLAR) chk($sformatf("stage step %0d", steps), stage, exp_stage[steps]);
        end
        steps++;
      end
      @(negedge clk);
      start = 0;
      if (poke_busy && steps == 3) begin
        start = 1; mode_in = (m == MODE_LDPC) ? MODE_POLAR : MODE_LDPC;
        ignored_starts++;
        #1;
        chk("start ignored while busy", load, 0);
      end
    end while (!done);
    chk("steps", steps, exp_steps);
    chk("latency", cycle - c0, exp_steps);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle", busy, 0);
    start = 1; mode_in = MODE_LDPC; #1;
    run_frame(MODE_LDPC, 1);
    // start again in the done cycle
    start = 1; mode_in = MODE_POLAR; back_to_back++; #1;
    run_frame(MODE_POLAR, 0);
    start = 1; mode_in = MODE_POLAR; back_to_back++; #1;
    run_frame(MODE_POLAR, 1);
    @(negedge clk);
    start = 0;
    repeat (3) @(negedge clk);
    chk("idle after frames", busy, 0);
    chk("no done when idle", done, 0);
    start = 1; mode_in = MODE_LDPC; #1;
    run_frame(MODE_LDPC, 0);
    @(negedge clk); start = 0;
    checks++;
    if (back_to_back == 0 || ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
