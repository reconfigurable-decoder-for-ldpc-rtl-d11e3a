// mbcb_pair: two merged basic computational blocks that together form one
// degree-4 LDPC check node and two variable nodes, or two polar BCBs.
//
// In LDPC mode the eight GFUs of the pair compute the four check-to-variable
// messages of the check node (each message is the min-sum of the other three
// inputs, two chained GFUs per message). The first MBCB receives q0..q3 in
// order and produces the messages of edges 0 and 1; the second receives them
// rotated by two (q2, q3, q0, q1) and produces the messages of edges 2 and 3.
// The adders of MBCB m form variable node m of the pair. In polar mode the two
// MBCBs are independent BCBs and the q inputs are ignored.
//
// The pairing of two MBCBs into one check node follows the source design; the
// rotation used to share one MBCB circuit between both halves is this
// implementation's choice. Ports p_* carry the per-MBCB polar/variable-node
// signals as two-entry arrays indexed by member. Purely combinational.
//
// Inside the decoder this unit lies on a path that looks like a
// combinational loop (an MBCB's polar wiring feeding its LDPC outputs, which
// feed another MBCB's LDPC inputs). The two halves are selected by the same
// mode bit, so the loop is never closed; see reconfig_bp_decoder.
module mbcb_pair
  import bp_pkg::*;
#(
  parameter int W = LLR_W
) (
  input  mode_e               s,
  input  logic signed [W-1:0] p_l_in_odd   [2],
  input  logic signed [W-1:0] p_l_in_even  [2],
  input  logic signed [W-1:0] p_r_in_top   [2],
  input  logic signed [W-1:0] p_r_in_bot   [2],
  output logic signed [W-1:0] p_l_out_top  [2],
  output logic signed [W-1:0] p_l_out_bot  [2],
  output logic signed [W-1:0] p_r_out_odd  [2],
  output logic signed [W-1:0] p_r_out_even [2],
  input  logic signed [W-1:0] q            [LDPC_DC],  // variable-to-check inputs
  output logic signed [W-1:0] r            [LDPC_DC]   // check-to-variable outputs
);
  for (genvar m = 0; m < 2; m++) begin : g_m
    mbcb #(.W(W)) u_mbcb (
      .s          (s),
      .l_in_odd   (p_l_in_odd[m]),
      .l_in_even  (p_l_in_even[m]),
      .r_in_top   (p_r_in_top[m]),
      .r_in_bot   (p_r_in_bot[m]),
      .l_out_top  (p_l_out_top[m]),
      .l_out_bot  (p_l_out_bot[m]),
      .r_out_odd  (p_r_out_odd[m]),
      .r_out_even (p_r_out_even[m]),
      .q0         (q[(2*m + 0) % LDPC_DC]),
      .q1         (q[(2*m + 1) % LDPC_DC]),
      .q2         (q[(2*m + 2) % LDPC_DC]),
      .q3         (q[(2*m + 3) % LDPC_DC]),
      .r_x        (r[2*m]),
      .r_y        (r[2*m + 1])
    );
  end
endmodule
