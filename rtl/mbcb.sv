// mbcb: merged basic computational block (MBCB), the unit the decoder is
// built from. It holds four g-function units (GFU) and four adders, and a
// mode input s selects between two sets of internal connections.
//
// Polar mode (s = MODE_POLAR) is one basic computational block of the polar
// factor graph. Node (i,j) and (i,j+N/2) of stage i are joined to nodes
// (i+1,2j-1) and (i+1,2j) of stage i+1, and the four outputs follow Eq. (3)
// of the min-sum polar BP decoder:
//   l_out_top  = L(i,j)       = g(L(i+1,2j-1), L(i+1,2j) + R(i,j+N/2))
//   l_out_bot  = L(i,j+N/2)   = g(R(i,j), L(i+1,2j-1)) + L(i+1,2j)
//   r_out_odd  = R(i+1,2j-1)  = g(R(i,j), L(i+1,2j) + R(i,j+N/2))
//   r_out_even = R(i+1,2j)    = g(R(i,j), L(i+1,2j-1)) + R(i,j+N/2)
// GFU1 and GFU2 work as "Type II" (adder then GFU), GFU3 and GFU4 with adders
// 3 and 4 as "Type I" (GFU then adder); each output has its own GFU/adder
// pair, as in the source's parallel BCB.
//
// LDPC mode (s = MODE_LDPC): the GFUs form two 3-input check units (two
// chained GFUs each) that give two check-to-variable messages of one
// degree-4 check node from its four variable-to-check inputs q0..q3:
//   r_x = g(q2, g(q3, q1))   (the message towards q0's edge)
//   r_y = g(g(q0, q2), q3)   (the message towards q1's edge)
// Three of the adders form one variable node of column weight 2; r_a and r_b
// are the check-to-variable messages of its two edges. Its inputs reuse the
// polar input ports and its outputs reuse polar output ports:
//   r_in_top = L(c) (channel LLR), l_in_odd = r_a, l_in_even = r_b
//   l_out_top = q_a = L(c) + r_b, r_out_odd = q_b = L(c) + r_a,
//   l_out_bot = L(Q) = q_a + r_a  (a posteriori LLR, Eq. (8))
// Adder 4 is unused in LDPC mode. This gives the 9 inputs (four polar, four
// LDPC, s) and 6 outputs of the source's MBCB. Which q feeds which GFU of a
// check unit, and which ports carry the variable-node signals, are this
// implementation's choices. Purely combinational.
//
// Inside the decoder this unit lies on a path that looks like a
// combinational loop (an MBCB's polar wiring feeding its LDPC outputs, which
// feed another MBCB's LDPC inputs). The two halves are selected by the same
// mode bit, so the loop is never closed; see reconfig_bp_decoder.
module mbcb
  import bp_pkg::*;
#(
  parameter int W = LLR_W
) (
  input  mode_e               s,
  // polar ports (shared with the variable node in LDPC mode)
  input  logic signed [W-1:0] l_in_odd,    // L(i+1,2j-1)   | r_a
  input  logic signed [W-1:0] l_in_even,   // L(i+1,2j)     | r_b
  input  logic signed [W-1:0] r_in_top,    // R(i,j)        | L(c)
  input  logic signed [W-1:0] r_in_bot,    // R(i,j+N/2)    | unused
  output logic signed [W-1:0] l_out_top,   // L(i,j)        | q_a
  output logic signed [W-1:0] l_out_bot,   // L(i,j+N/2)    | L(Q)
  output logic signed [W-1:0] r_out_odd,   // R(i+1,2j-1)   | q_b
  output logic signed [W-1:0] r_out_even,  // R(i+1,2j)     | unused
  // LDPC check-node ports
  input  logic signed [W-1:0] q0,
  input  logic signed [W-1:0] q1,
  input  logic signed [W-1:0] q2,
  input  logic signed [W-1:0] q3,
  output logic signed [W-1:0] r_x,
  output logic signed [W-1:0] r_y
);
  logic                ldpc;
  logic signed [W-1:0] g1_a, g1_b, g1_c;
  logic signed [W-1:0] g2_a, g2_b, g2_c;
  logic signed [W-1:0] g3_a, g3_b, g3_c;
  logic signed [W-1:0] g4_a, g4_b, g4_c;
  logic signed [W-1:0] a1_a, a1_b, a1_s;
  logic signed [W-1:0] a2_a, a2_b, a2_s;
  logic signed [W-1:0] a3_a, a3_b, a3_s;
  logic signed [W-1:0] a4_s;

  assign ldpc = (s == MODE_LDPC);

  // Connection switches.
  always_comb begin
    // adders 1 and 2: Type II pre-adders (polar) / q_a, q_b (LDPC)
    a1_a = ldpc ? r_in_top : l_in_even;
    a1_b = ldpc ? l_in_even : r_in_bot;
    a2_a = ldpc ? r_in_top : l_in_even;
    a2_b = ldpc ? l_in_odd  : r_in_bot;
    // GFU inputs
    g1_a = ldpc ? q2   : l_in_odd;
    g1_b = ldpc ? g2_c : a1_s;
    g2_a = ldpc ? q3   : r_in_top;
    g2_b = ldpc ? q1   : a2_s;
    g3_a = ldpc ? q0   : r_in_top;
    g3_b = ldpc ? q2   : l_in_odd;
    g4_a = ldpc ? g3_c : r_in_top;
    g4_b = ldpc ? q3   : l_in_odd;
    // adder 3: Type I post-adder (polar) / L(Q) (LDPC)
    a3_a = ldpc ? a1_s    : g3_c;
    a3_b = ldpc ? l_in_odd : l_in_even;
  end

  gfu #(.W(W)) u_gfu1 (.a(g1_a), .b(g1_b), .c(g1_c));
  gfu #(.W(W)) u_gfu2 (.a(g2_a), .b(g2_b), .c(g2_c));
  gfu #(.W(W)) u_gfu3 (.a(g3_a), .b(g3_b), .c(g3_c));
  gfu #(.W(W)) u_gfu4 (.a(g4_a), .b(g4_b), .c(g4_c));

  sat_adder #(.W(W)) u_add1 (.a(a1_a), .b(a1_b),     .s(a1_s));
  sat_adder #(.W(W)) u_add2 (.a(a2_a), .b(a2_b),     .s(a2_s));
  sat_adder #(.W(W)) u_add3 (.a(a3_a), .b(a3_b),     .s(a3_s));
  sat_adder #(.W(W)) u_add4 (.a(g4_c), .b(r_in_bot), .s(a4_s));

  always_comb begin
    l_out_top  = ldpc ? a1_s : g1_c;
    r_out_odd  = ldpc ? a2_s : g2_c;
    l_out_bot  = a3_s;
    r_out_even = a4_s;
    r_x        = g1_c;
    r_y        = g4_c;
  end
endmodule
