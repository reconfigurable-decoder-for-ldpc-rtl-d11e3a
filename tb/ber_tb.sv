// ber_tb: bit error rate of the decoder on an AWGN channel with BPSK, for
// both codes at several Eb/N0 points (code rate 0.5, ten iterations).
//
// Noise is Gaussian (Box-Muller from $urandom). The channel LLR 2y/sigma^2
// is quantised to the decoder's 7-bit format (two fractional bits, rounded,
// clamped). Every frame is also decoded by the integer reference of
// bp_ref_pkg and must match bit for bit. Polar frames count errors on the
// four information bits u4, u6, u7, u8 (1-based); LDPC frames on all twelve
// code bits. Checks besides the per-frame match: the BER must fall as Eb/N0
// rises, and at the highest point the decoded BER must be below the BER of
// hard decisions on the channel LLRs.
module ber_tb;
  import bp_pkg::*;
  import bp_ref_pkg::*;

  localparam int FRAMES_PER_POINT = 2000;
  localparam int NPTS = 3;
  localparam real EBN0_DB [NPTS] = '{1.0, 3.0, 5.0};
  localparam logic [7:0] FROZEN = 8'b0001_0111;

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode_in = MODE_POLAR;
  logic signed [6:0] llr_in [12];
  logic [7:0]  frozen = FROZEN;
  logic [11:0] bits_out;
  logic done, busy;

  reconfig_bp_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real ber [2][NPTS];
  real raw [2][NPTS];
  logic [11:0] codebook [$];

  initial begin
    repeat (2 * NPTS * FRAMES_PER_POINT * 70 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = real'($urandom()) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic logic [7:0] polar_encode(input logic [7:0] u);
    logic [7:0] x;
    for (int i = 0; i < 8; i++) x[i] = u[bitrev(i)];
    for (int len = 1; len < 8; len *= 2)
      for (int i = 0; i < 8; i++)
        if ((i / len) % 2 == 0) x[i] = x[i] ^ x[i + len];
    return x;
  endfunction

  initial begin : main
    for (int w = 0; w < 4096; w++) begin
      logic ok;
      ok = 1'b1;
      for (int j = 0; j < 6; j++) if (^(12'(w) & {<<{H[j]}})) ok = 1'b0;
      if (ok) codebook.push_back(12'(w));
    end
    for (int i = 0; i < 12; i++) llr_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int md = 0; md < 2; md++) begin
      for (int p = 0; p < NPTS; p++) begin
        real sigma2, sigma;
        int errs, raw_errs, nbits, nbits_raw;
        sigma2 = 1.0 / (2.0 * 0.5 * (10.0 ** (EBN0_DB[p] / 10.0)));
        sigma  = $sqrt(sigma2);
        errs = 0; raw_errs = 0; nbits = 0; nbits_raw = 0;
        for (int f = 0; f < FRAMES_PER_POINT; f++) begin
          logic [11:0] sent, hard, exp_bits, info_mask;
          int llr[12], n;
          if (md == 0) begin
            logic [7:0] u;
            u = 8'($urandom()) & ~FROZEN;
            sent = {4'b0, u};
            hard = {4'b0, polar_encode(u)};
            info_mask = {4'b0, ~FROZEN};
            n = 8;
          end else begin
            sent = codebook[$urandom_range(codebook.size() - 1)];
            hard = sent;
            info_mask = 12'hFFF;
            n = 12;
          end
          for (int i = 0; i < 12; i++) begin
            real y, l;
            y = (hard[i] ? -1.0 : 1.0) + sigma * gauss();
            l = 2.0 * y / sigma2 * 4.0;
            llr[i] = (i < n) ? int'(l) : 0;   // int'() rounds to nearest
            if (llr[i] > 63) llr[i] = 63;
            if (llr[i] < -63) llr[i] = -63;
            llr_in[i] = 7'(llr[i]);
            if (i < n) begin
              nbits_raw++;
              if ((llr[i] < 0) != hard[i]) raw_errs++;
            end
          end
          exp_bits = (md == 0) ? {4'b0, ref_polar(llr[0:7], FROZEN, 10)} : ref_ldpc(llr, 10);
          mode_in = (md == 0) ? MODE_POLAR : MODE_LDPC;
          start = 1;
          @(negedge clk);
          start = 0;
          while (!done) @(negedge clk);
          checks++;
          if (bits_out != exp_bits) begin
            failures++;
            if (failures < 10) $display("FAIL frame: got %h expected %h", bits_out, exp_bits);
          end
          errs += $countones((bits_out ^ sent) & info_mask);
          nbits += $countones(info_mask);
        end
        ber[md][p] = real'(errs) / real'(nbits);
        raw[md][p] = real'(raw_errs) / real'(nbits_raw);
        $display("%s Eb/N0 = %.1f dB: BER %.4e (%0d/%0d), channel hard decisions %.4e",
                 (md == 0) ? "polar" : "ldpc ", EBN0_DB[p], ber[md][p], errs, nbits, raw[md][p]);
      end
      for (int p = 1; p < NPTS; p++) begin
        checks++;
        if (!(ber[md][p] < ber[md][p-1])) failures++;
      end
      checks++;
      if (!(ber[md][NPTS-1] < raw[md][NPTS-1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
