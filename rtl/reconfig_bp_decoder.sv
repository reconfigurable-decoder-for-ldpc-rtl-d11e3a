// reconfig_bp_decoder: one min-sum belief-propagation decoder that
// decodes either an N=8 polar code or the regular (12,6) LDPC code of
// bp_pkg::H, with the same 12 merged basic computational blocks (MBCBs), i.e.
// 48 g-function units and 48 adders, selected by the mode input.
//
// Polar mode: the MBCBs are the 3 x 4 basic computational blocks of the
// polar factor graph; MBCB 4*s + j joins nodes (s+1, j+1), (s+1, j+5) to
// (s+2, 2j+1), (s+2, 2j+2). All MBCBs compute every cycle from the message
// memory, and the controller lets one stage write its L outputs (right-to-
// left pass) or its R outputs (left-to-right pass) per clock. Channel LLRs
// enter at the rightmost node stage; the leftmost R messages carry the
// frozen-bit prior (+max for a frozen bit, 0 for an information bit). Left
// node j holds u[bitrev(j)], so u and x are both in natural order at the
// ports. The decision for u[k] is 0 for a frozen bit and the sign of the
// leftmost L message otherwise.
//
// LDPC mode: MBCB pair p is check node p (its eight GFUs) and MBCB v is
// variable node v (three of its adders). The memory holds the 24 variable-
// to-check messages and the 12 channel LLRs. In one clock the check nodes
// turn the stored messages into check-to-variable messages, the variable
// nodes turn those into new variable-to-check messages and a posteriori
// LLRs, and the new messages are written back: one flooding iteration per
// clock. The decision for bit v is the sign of its a posteriori LLR.
//
// Interface: pulse start for one cycle with mode, llr_in (LDPC: 12 LLRs;
// polar: llr_in[0..7] = x[0..7]) and frozen (polar, indexed by u) valid.
// The frame is decoded in 10 (LDPC) or 63 (polar) clocks with the default
// ten iterations, counting the start cycle; done pulses in the following
// cycle, and bits_out (LDPC: c[0..11]; polar: u[0..7], upper bits zero)
// holds the result from then until the next frame completes. A new start
// is accepted in the done cycle, so frames can follow back to back. LLRs
// are 7-bit two's complement with two fractional bits; an input of -16.0 is
// clamped to -15.75.
//
// The MBCB merging, its resource counts, the fixed-point format, the codes
// and the latencies follow the source design. The memory organisation, the
// message schedule, the port map of the variable node onto the MBCB and the
// handshake are this implementation's choices.
//
// The MBCB input switches make a structural path from an MBCB's adder
// inputs through a GFU back to an adder input of another MBCB. The path is
// never closed: it exists only in polar mode on one side and LDPC mode on
// the other, and both ends are switched by the same mode signal.
module reconfig_bp_decoder
  import bp_pkg::*;
#(
  parameter int W          = LLR_W,
  parameter int ITER_LDPC  = ITER_DEFAULT,
  parameter int ITER_POLAR = ITER_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  mode_e               mode_in,
  input  logic signed [W-1:0] llr_in [LDPC_M],
  input  logic [POLAR_N-1:0]  frozen,
  output logic [LDPC_M-1:0]   bits_out,
  output logic                done,
  output logic                busy
);
  localparam int N     = POLAR_N;
  localparam int NB    = NUM_MBCB;
  localparam int WORDS = POLAR_WORDS;
  localparam int SW    = $clog2(POLAR_LOGN);
  localparam logic signed [W-1:0] LLR_MAX = W'((1 << (W-1)) - 1);

  // ---------------------------------------------------------------- control
  logic  load, active;
  mode_e mode;
  pass_e pass;
  logic [SW-1:0] stage;
  logic  ldpc;

  bp_ctrl #(
    .ITER_LDPC (ITER_LDPC),
    .ITER_POLAR(ITER_POLAR),
    .LOGN      (POLAR_LOGN)
  ) u_ctrl (
    .clk, .rst_n, .start, .mode_in,
    .load, .active, .mode, .pass, .stage, .done, .busy
  );

  assign ldpc = (mode == MODE_LDPC);

  // ------------------------------------------------------- frame loading
  logic signed [W-1:0] llr_c  [LDPC_M];
  logic signed [W-1:0] init_l [WORDS];
  logic signed [W-1:0] init_r [WORDS];
  logic [N-1:0]        frozen_q;

  always_comb begin
    for (int i = 0; i < LDPC_M; i++)
      llr_c[i] = (llr_in[i] < -LLR_MAX) ? -LLR_MAX : llr_in[i];
    for (int w = 0; w < WORDS; w++) begin
      init_l[w] = '0;
      init_r[w] = '0;
    end
    if (ldpc) begin
      for (int e = 0; e < LDPC_EDGES; e++) init_l[e] = llr_c[edge_col(e / LDPC_DC, e % LDPC_DC)];
      for (int i = 0; i < LDPC_M; i++)     init_r[i] = llr_c[i];
    end else begin
      for (int j = 0; j < N; j++) begin
        init_l[POLAR_LOGN * N + j] = llr_c[j];
        init_r[j]                  = frozen[bitrev(j)] ? LLR_MAX : '0;
      end
    end
  end

  // ---------------------------------------------------------------- memory
  logic [WORDS-1:0]    we_l, we_r;
  logic signed [W-1:0] wd_l [WORDS];
  logic signed [W-1:0] wd_r [WORDS];
  logic signed [W-1:0] rd_l [WORDS];
  logic signed [W-1:0] rd_r [WORDS];

  msg_mem #(.W(W), .WORDS(WORDS)) u_mem (
    .clk, .rst_n, .load,
    .init_l, .init_r, .we_l, .wd_l, .we_r, .wd_r, .rd_l, .rd_r
  );

  // ------------------------------------------------------------- datapath
  logic signed [W-1:0] m_l_in_odd   [NB];
  logic signed [W-1:0] m_l_in_even  [NB];
  logic signed [W-1:0] m_r_in_top   [NB];
  logic signed [W-1:0] m_r_in_bot   [NB];
  logic signed [W-1:0] m_l_out_top  [NB];
  logic signed [W-1:0] m_l_out_bot  [NB];
  logic signed [W-1:0] m_r_out_odd  [NB];
  logic signed [W-1:0] m_r_out_even [NB];
  logic signed [W-1:0] cn_q         [LDPC_EDGES];  // variable-to-check, from memory
  logic signed [W-1:0] cn_r         [LDPC_EDGES];  // check-to-variable, from the GFUs

  for (genvar b = 0; b < NB; b++) begin : g_in
    localparam int S = b / (N / 2);
    localparam int J = b % (N / 2);
    always_comb begin
      m_r_in_bot[b] = rd_r[S * N + J + N / 2];
      if (ldpc) begin
        m_l_in_odd[b]  = cn_r[vn_edge(b, 0)];
        m_l_in_even[b] = cn_r[vn_edge(b, 1)];
        m_r_in_top[b]  = rd_r[b];
      end else begin
        m_l_in_odd[b]  = rd_l[(S + 1) * N + 2 * J];
        m_l_in_even[b] = rd_l[(S + 1) * N + 2 * J + 1];
        m_r_in_top[b]  = rd_r[S * N + J];
      end
    end
  end

  for (genvar e = 0; e < LDPC_EDGES; e++) begin : g_q
    assign cn_q[e] = rd_l[e];
  end

  for (genvar p = 0; p < LDPC_CHK; p++) begin : g_pair
    mbcb_pair #(.W(W)) u_pair (
      .s            (mode),
      .p_l_in_odd   (m_l_in_odd  [2*p +: 2]),
      .p_l_in_even  (m_l_in_even [2*p +: 2]),
      .p_r_in_top   (m_r_in_top  [2*p +: 2]),
      .p_r_in_bot   (m_r_in_bot  [2*p +: 2]),
      .p_l_out_top  (m_l_out_top [2*p +: 2]),
      .p_l_out_bot  (m_l_out_bot [2*p +: 2]),
      .p_r_out_odd  (m_r_out_odd [2*p +: 2]),
      .p_r_out_even (m_r_out_even[2*p +: 2]),
      .q            (cn_q[LDPC_DC*p +: LDPC_DC]),
      .r            (cn_r[LDPC_DC*p +: LDPC_DC])
    );
  end

  // ------------------------------------------------------------ write-back
  for (genvar w = 0; w < WORDS; w++) begin : g_wb
    localparam int SWD = w / N;   // node stage of the word (0-based)
    localparam int NW  = w % N;   // node within the stage
    // L bank: polar L written by BCB stage SWD; LDPC variable-to-check message
    if (SWD < POLAR_LOGN) begin : g_l
      localparam int BL = SWD * (N / 2) + NW % (N / 2);
      logic signed [W-1:0] pol_l;
      assign pol_l = (NW < N / 2) ? m_l_out_top[BL] : m_l_out_bot[BL];
      if (w < LDPC_EDGES) begin : g_e
        localparam int COL = edge_col(w / LDPC_DC, w % LDPC_DC);
        localparam int SL  = edge_slot(w);
        assign wd_l[w] = !ldpc ? pol_l : (SL == 0) ? m_l_out_top[COL] : m_r_out_odd[COL];
        assign we_l[w] = active && (ldpc || (pass == PASS_L && stage == SW'(SWD)));
      end else begin : g_p
        assign wd_l[w] = pol_l;
        assign we_l[w] = active && !ldpc && pass == PASS_L && stage == SW'(SWD);
      end
    end else begin : g_lc
      assign wd_l[w] = '0;
      assign we_l[w] = 1'b0;
    end
    // R bank: polar R written by BCB stage SWD-1
    if (SWD >= 1) begin : g_r
      localparam int BR = (SWD - 1) * (N / 2) + NW / 2;
      assign wd_r[w] = (NW % 2 == 0) ? m_r_out_odd[BR] : m_r_out_even[BR];
      assign we_r[w] = active && !ldpc && pass == PASS_R && stage == SW'(SWD - 1);
    end else begin : g_rc
      assign wd_r[w] = '0;
      assign we_r[w] = 1'b0;
    end
  end

  // -------------------------------------------------------------- decision
  logic [LDPC_M-1:0] dec;

  always_comb begin
    dec = '0;
    if (ldpc) begin
      for (int v = 0; v < LDPC_M; v++) dec[v] = m_l_out_bot[v][W-1];
    end else begin
      for (int k = 0; k < N; k++) dec[k] = !frozen_q[k] && wd_l[bitrev(k)][W-1];
    end
  end

  // The register samples the decision in every step; the value of the last
  // step is the one left standing when done rises.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frozen_q    <= '0;
      bits_out    <= '0;
    end else begin
      if (load) frozen_q <= frozen;
      if (active && (ldpc || (pass == PASS_L && stage == '0))) bits_out <= dec;
    end
  end
endmodule
