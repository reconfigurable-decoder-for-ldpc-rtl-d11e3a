// reconfig_bp_decoder_tb: end-to-end test of the reconfigurable decoder at
// its default parameters (N = 8 polar code, (12,6) LDPC code, 10 iterations).
//
// Frames of both codes are generated here: polar codewords x = u B F^(x)3 (B: bit reversal) with
// information bits on u[3], u[5], u[6], u[7] (the other four frozen to 0; a
// quarter of the frames use a random frozen set instead), and
// LDPC codewords drawn from the null space of H found by enumeration. Each
// frame is sent as LLRs of +/-2.0 with approximately Gaussian noise, some
// without noise and some with inputs at the negative limit. The decoded bits
// are compared with the integer reference decoders of bp_ref_pkg, noiseless
// frames must decode to the codeword sent, and the cycles from start to done
// must be 10 (LDPC) or 63 (polar). Mechanisms counted, each of which must
// occur: both modes, a switch between modes, a frame started in the done
// cycle of the previous one, a channel error corrected in each mode, a
// clamped input LLR and a frame with the inputs changing after the start.
module reconfig_bp_decoder_tb;
  import bp_pkg::*;
  import bp_ref_pkg::*;

  localparam int FRAMES = 400;

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode_in = MODE_POLAR;
  logic signed [6:0] llr_in [12];
  logic [7:0]  frozen = 8'b0001_0111;
  logic [11:0] bits_out;
  logic done, busy;

  reconfig_bp_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_polar = 0, n_ldpc = 0, n_switch = 0, n_b2b = 0;
  int n_corr_polar = 0, n_corr_ldpc = 0, n_clamp = 0, n_scramble = 0;
  logic [11:0] codebook [$];

  always @(posedge clk) cycle++;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x = u B F^(x)3, B the bit-reversal permutation (Arikan's generator).
  function automatic logic [7:0] polar_encode(input logic [7:0] u);
    logic [7:0] x;
    for (int i = 0; i < 8; i++) x[i] = u[bitrev(i)];
    for (int len = 1; len < 8; len *= 2)
      for (int i = 0; i < 8; i++)
        if ((i / len) % 2 == 0) x[i] = x[i] ^ x[i + len];
    return x;
  endfunction

  function automatic int noise(input int level);
    int s = 0;
    for (int k = 0; k < 4; k++) s += int'($urandom_range(2 * level)) - level;
    return s;
  endfunction

  initial begin : main
    logic [11:0] sent, exp_bits, hard;
    logic [7:0]  u;
    int llr[12];
    int c0, lat, lvl;
    mode_e m, prev_m;
    bit b2b, noiseless, std_set;
    logic [7:0] frozen_f;

    // LDPC code book: all words with zero syndrome.
    for (int w = 0; w < 4096; w++) begin
      logic ok;
      ok = 1'b1;
      for (int j = 0; j < 6; j++) if (^(12'(w) & {<<{H[j]}})) ok = 1'b0;
      if (ok) codebook.push_back(12'(w));
    end
    checks++;
    if (codebook.size() < 64) failures++;

    for (int i = 0; i < 12; i++) llr_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    prev_m = MODE_POLAR;
    b2b = 0;

    for (int f = 0; f < FRAMES; f++) begin
      m = ($urandom_range(2) == 0) ? MODE_POLAR : MODE_LDPC;
      if (f < 2) m = (f == 0) ? MODE_POLAR : MODE_LDPC;
      noiseless = (f % 5 == 0);
      lvl = (f % 3 == 0) ? 6 : 4;
      // a quarter of the polar frames use a random frozen set
      std_set = (f % 4 != 2);
      frozen = std_set ? 8'b0001_0111 : 8'($urandom());
      if (m == MODE_POLAR) begin
        u = 8'($urandom()) & ~frozen;
        sent = {4'b0, u};
        hard = {4'b0, polar_encode(u)};
      end else begin
        sent = codebook[$urandom_range(codebook.size() - 1)];
        hard = sent;
      end
      for (int i = 0; i < 12; i++) begin
        llr[i] = (hard[i] ? -8 : 8) + (noiseless ? 0 : noise(lvl));
        if (f % 17 == 3 && i == 2) llr[i] = hard[i] ? -64 : 63;
        if (llr[i] > 63) llr[i] = 63;
        if (llr[i] < -64) llr[i] = -64;
        if (llr[i] == -64) n_clamp++;
        llr_in[i] = 7'(llr[i]);
      end
      frozen_f = frozen;
      exp_bits = (m == MODE_POLAR) ? {4'b0, ref_polar(llr[0:7], frozen_f, 10)} : ref_ldpc(llr, 10);

      // start (possibly in the done cycle of the previous frame)
      mode_in = m;
      start = 1;
      if (b2b) n_b2b++;
      if (f > 0 && m != prev_m) n_switch++;
      c0 = cycle;
      @(negedge clk);
      start = 0;
      if (f % 4 == 1) begin
        // inputs are sampled only at the start
        for (int i = 0; i < 12; i++) llr_in[i] = 7'($urandom());
        frozen = ~frozen;
        n_scramble++;
      end
      while (!done) @(negedge clk);
      frozen = frozen_f;
      lat = cycle - c0;
      chk($sformatf("latency frame %0d", f), lat, (m == MODE_LDPC) ? 10 : 63);
      chk($sformatf("bits frame %0d", f), int'(bits_out), int'(exp_bits));
      if (noiseless && (std_set || m == MODE_LDPC)) chk($sformatf("noiseless frame %0d", f), int'(bits_out), int'(sent));
      if (m == MODE_POLAR) n_polar++; else n_ldpc++;
      // a corrected channel error: hard decisions wrong, decoder right
      begin
        int errs;
        errs = 0;
        for (int i = 0; i < ((m == MODE_POLAR) ? 8 : 12); i++) if ((llr[i] < 0) != hard[i]) errs++;
        if (std_set && errs > 0 && bits_out == sent) begin
          if (m == MODE_POLAR) n_corr_polar++; else n_corr_ldpc++;
        end
      end
      prev_m = m;
      b2b = ($urandom_range(1) == 0);
      if (!b2b) begin
        int gap;
        gap = $urandom_range(3);
        for (int g = 0; g <= gap; g++) begin
          @(negedge clk);
          chk("result held", int'(bits_out), int'(exp_bits));
          chk("idle", int'(busy), 0);
        end
      end
    end

    $display("frames: polar %0d ldpc %0d, mode switches %0d, back-to-back %0d",
             n_polar, n_ldpc, n_switch, n_b2b);
    $display("corrected: polar %0d ldpc %0d, clamped inputs %0d, scrambled after start %0d",
             n_corr_polar, n_corr_ldpc, n_clamp, n_scramble);
    checks += 6;
    if (n_polar == 0 || n_ldpc == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_corr_polar == 0) failures++;
    if (n_corr_ldpc == 0) failures++;
    if (n_clamp == 0 || n_scramble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
