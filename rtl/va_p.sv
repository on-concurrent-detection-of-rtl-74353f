// VA-P module: vector addition of two GF(2^m) elements with parity
// prediction.
//
//   s  = x + y        (m XOR gates)
//   ps = P(x) + P(y)  (k XOR gates)
// Parity is linear over GF(2), so the predicted parity of the sum is the sum
// of the operand parities. Purely combinational.
module va_p #(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8
) (
  input  logic [M-1:0] x,
  input  logic [K-1:0] px,
  input  logic [M-1:0] y,
  input  logic [K-1:0] py,
  output logic [M-1:0] s,
  output logic [K-1:0] ps
);

  assign s  = x  ^ y;
  assign ps = px ^ py;

endmodule
