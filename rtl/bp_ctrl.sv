// bp_ctrl: schedule controller of the reconfigurable decoder.
//
// A frame starts with a one-cycle start pulse, sampled while the decoder is
// idle (or in the cycle done is high); the mode input is captured then. The
// first step of the schedule executes in the start cycle itself, so a frame
// occupies the datapath for exactly as many cycles as it has steps:
//   LDPC:  ITER_LDPC steps, one full flooding iteration per clock (all check
//          nodes, then all variable nodes and the a posteriori LLRs).
//   polar: ITER_POLAR iterations of 2*LOGN steps, first a right-to-left pass
//          updating the L messages of stages LOGN..1, then a left-to-right
//          pass updating the R messages of stages 1..LOGN, followed by one
//          more right-to-left pass so the decision sees fresh L messages:
//          ITER_POLAR*2*LOGN + LOGN steps.
// With the default ten iterations and LOGN = 3 this gives 10 and 63 clocks,
// the latencies the source reports; the order of the steps inside a polar
// iteration and the closing pass are this implementation's reading of that
// figure. done is a registered one-cycle pulse in the cycle after the last
// step; the result is valid in that cycle and until the next start.
//
// Outputs describe the step executing in the current cycle: active, mode,
// pass (L or R) and stage (0-based, stage index s means the BCB column
// between node stages s+1 and s+2). Assertions at the end check that done
// never rises while a frame is running and that every step is in range.
module bp_ctrl
  import bp_pkg::*;
#(
  parameter int ITER_LDPC  = ITER_DEFAULT,
  parameter int ITER_POLAR = ITER_DEFAULT,
  parameter int LOGN       = POLAR_LOGN
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  mode_e                   mode_in,
  output logic                    load,     // start accepted this cycle
  output logic                    active,   // a step executes this cycle
  output mode_e                   mode,     // mode of the current frame
  output pass_e                   pass,
  output logic [$clog2(LOGN)-1:0] stage,
  output logic                    done,
  output logic                    busy
);
  localparam int IW = $clog2(((ITER_LDPC > ITER_POLAR) ? ITER_LDPC : ITER_POLAR) + 1);
  localparam int PW = $clog2(2 * LOGN);

  logic          busy_q;
  mode_e         mode_q;
  logic [IW-1:0] iter_q, iter;
  logic [PW-1:0] phase_q, phase;
  logic          last;

  always_comb begin
    load   = start && !busy_q;
    active = load || busy_q;
    mode   = load ? mode_in : mode_q;
    iter   = load ? '0 : iter_q;
    phase  = load ? '0 : phase_q;
    if (phase < PW'(LOGN)) begin
      pass  = PASS_L;
      stage = $clog2(LOGN)'(LOGN - 1 - int'(phase));
    end else begin
      pass  = PASS_R;
      stage = $clog2(LOGN)'(int'(phase) - LOGN);
    end
    if (mode == MODE_LDPC) begin
      pass  = PASS_L;
      stage = '0;
      last  = (iter == IW'(ITER_LDPC - 1));
    end else begin
      last  = (iter == IW'(ITER_POLAR)) && (phase == PW'(LOGN - 1));
    end
    busy = busy_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      mode_q  <= MODE_POLAR;
      iter_q  <= '0;
      phase_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= active && last;
      if (load) mode_q <= mode_in;
      if (active) begin
        if (last) begin
          busy_q  <= 1'b0;
          iter_q  <= '0;
          phase_q <= '0;
        end else begin
          busy_q <= 1'b1;
          if (mode == MODE_LDPC) begin
            iter_q <= iter + 1'b1;
          end else if (phase == PW'(2 * LOGN - 1)) begin
            iter_q  <= iter + 1'b1;
            phase_q <= '0;
          end else begin
            iter_q  <= iter;
            phase_q <= phase + 1'b1;
          end
        end
      end
    end
  end

  // Handshake rules: done only ends a frame, and a step is always in range.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy_q)
    else $error("done raised while a frame is still running");
  a_stage_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  active |-> (int'(stage) < LOGN))
    else $error("stage out of range");
  a_ldpc_pass: assert property (@(posedge clk) disable iff (!rst_n)
                                (active && mode == MODE_LDPC) |-> (pass == PASS_L && stage == '0))
    else $error("LDPC step with a polar pass");
endmodule
