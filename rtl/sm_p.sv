// SM-P module: scalar multiplication of a GF(2^m) element by one bit b_i,
// with its parity prediction.
//
//   y  = b_i * A  (m AND gates)
//   py = b_i * P(A)  (k AND gates)
// When b_i = 0 the output and its parity are both zero; when b_i = 1 the
// encoded operand passes unchanged. Purely combinational.
module sm_p #(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8
) (
  input  logic         b,
  input  logic [M-1:0] a,
  input  logic [K-1:0] pa,
  output logic [M-1:0] y,
  output logic [K-1:0] py
);

  assign y  = a  & {M{b}};
  assign py = pa & {K{b}};

endmodule
