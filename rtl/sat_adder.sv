// sat_adder: LLR adder used in the variable-node and polar BCB datapaths.
//
// s = clamp(a + b, -(2^(W-1)-1), 2^(W-1)-1). The sum is formed with one extra
// bit and then saturated to the symmetric fixed-point range, so a message
// never wraps around. The source design names the adder but not its overflow
// behaviour; saturation is this implementation's choice. Combinational.
module sat_adder #(
  parameter int W = bp_pkg::LLR_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] s
);
  localparam logic signed [W:0] MAXV = (W+1)'((1 << (W-1)) - 1);

  logic signed [W:0] sum;

  always_comb begin
    sum = (W+1)'(a) + (W+1)'(b);
    if (sum > MAXV)       s = W'(MAXV);
    else if (sum < -MAXV) s = W'(-MAXV);
    else                  s = W'(sum);
  end
endmodule
