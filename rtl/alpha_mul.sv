// alpha-Mul module: multiplies a GF(2^m) element by the basis root alpha.
//
// With A = sum a_i alpha^i, alpha*A mod F(alpha) has coordinates
//   a'_0 = a_{m-1} f_0,   a'_i = a_{i-1} + a_{m-1} f_i   (1 <= i <= m-1).
// The module is built as k part slices, one per parity part A_j, each slice
// shifting its own bits up by one, taking the top bit of the part below
// (zero for part 0) and folding in a_{m-1} wherever f_i = 1. F is a
// parameter, so a coefficient f_i = 0 costs no gate: the whole module uses
// w-2 two-input XOR gates for a polynomial of Hamming weight w (f_0 is a
// wire and x^m is implicit).
//
// Interface: a (m bits, bit i = coefficient of alpha^i) in, y = alpha*a out.
// Purely combinational. The structure follows the scheme; the bit ordering
// of the vectors (LSB = alpha^0) is this design's convention.
module alpha_mul
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,             // field degree m
  parameter int unsigned K = 8,               // number of parity parts k
  parameter logic [M-1:0] F = M'('hC9)         // F(x) - x^m, default x^7+x^6+x^3+1
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  for (genvar j = 0; j < int'(K); j++) begin : g_part
    localparam int S = part_start(j, M, K);
    localparam int E = part_end(j, M, K);
    for (genvar i = S; i <= E; i++) begin : g_bit
      logic shifted;
      if (i == 0) begin : g_lsb
        assign shifted = 1'b0;
      end else begin : g_mid
        assign shifted = a[i-1];
      end
      if (F[i]) begin : g_red
        assign y[i] = shifted ^ a[M-1];
      end else begin : g_wire
        assign y[i] = shifted;
      end
    end
  end

endmodule
