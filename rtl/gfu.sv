// gfu: g-function unit, the min-sum kernel shared by polar and LDPC decoding.
//
// c = sgn(a) * sgn(b) * min(|a|, |b|). An XOR combines the two sign bits and
// a comparator (CMP) selects the smaller magnitude, as in the source design.
// Inputs and output are W-bit two's complement LLRs; the magnitudes are
// formed here from the two's complement values (the source draws them as
// separate sign and magnitude wires). A magnitude is clamped to 2^(W-1)-1 so
// the result stays in the symmetric range even for an input of -2^(W-1).
// Purely combinational.
//
// Inside the decoder this unit lies on a path that looks like a
// combinational loop (an MBCB's polar wiring feeding its LDPC outputs, which
// feed another MBCB's LDPC inputs). The two halves are selected by the same
// mode bit, so the loop is never closed; see reconfig_bp_decoder.
module gfu #(
  parameter int W = bp_pkg::LLR_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] c
);
  localparam logic [W-1:0] MAG_MAX = {1'b0, {(W-1){1'b1}}};

  logic         sgn;
  logic [W-1:0] abs_a, abs_b, mag;

  always_comb begin
    sgn   = a[W-1] ^ b[W-1];
    abs_a = a[W-1] ? W'(-a) : W'(a);
    abs_b = b[W-1] ? W'(-b) : W'(b);
    mag   = (abs_a < abs_b) ? abs_a : abs_b;
    if (mag > MAG_MAX) mag = MAG_MAX;
    c     = sgn ? -signed'(mag) : signed'(mag);
  end
endmodule
