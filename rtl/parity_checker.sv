// Multiple-bit parity checker.
//
// A parity generator computes the actual k-bit parity of the observed vector
// z; each bit is compared (XOR) with the predicted parity pz, and the k
// comparison results are ORed into err. err = 1 means at least one part of
// the encoded word (m data bits plus k parity bits) has odd error weight.
// The generated parity is also brought out as p_gen so that a multiplier can
// reuse the generator, e.g. to encode its input operand.
//
// Gate count: m two-input XOR (trees plus comparators) and k-1 OR gates.
// Purely combinational.
module parity_checker #(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter pb_ced_pkg::part_e PART = pb_ced_pkg::PART_HORIZONTAL   // parity partitioning
) (
  input  logic [M-1:0] z,
  input  logic [K-1:0] pz,
  output logic [K-1:0] p_gen,
  output logic         err
);

  parity_gen #(.M(M), .K(K), .PART(PART)) u_gen (.z(z), .p(p_gen));

  assign err = |(p_gen ^ pz);

endmodule
