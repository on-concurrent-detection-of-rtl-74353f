// alpha-Mul-P module: the alpha-Mul module together with its parity
// prediction circuit, operating on an encoded operand E(A) = (A, P(A)).
//
// y = alpha*a mod F and py = predicted k-bit parity of y, derived from pa.
// Purely combinational; one instance forms one round of the bit-serial
// multiplier or one row of the bit-parallel multiplier.
module alpha_mul_p #(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter logic [M-1:0] F = M'('hC9),
  parameter pb_ced_pkg::part_e PART = pb_ced_pkg::PART_HORIZONTAL   // parity partitioning
) (
  input  logic [M-1:0] a,
  input  logic [K-1:0] pa,
  output logic [M-1:0] y,
  output logic [K-1:0] py
);

  alpha_mul #(.M(M), .K(K), .F(F)) u_mul (.a(a), .y(y));
  alpha_mul_ppc #(.M(M), .K(K), .F(F), .PART(PART)) u_ppc (.a(a), .pa(pa), .py(py));

endmodule
