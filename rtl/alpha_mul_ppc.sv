// Parity prediction circuit (PPC) of the alpha-Mul module.
//
// For part j, spanning bits s_j .. e_j of the input A, the parity of the
// same part of A' = alpha*A is predicted without looking at A':
//   P(A'_j) = a_{s_j - 1} + P(A_j) + a_{e_j} + a_{m-1} * P_Fj
// where a_{-1} = 0 and P_Fj is the parity of part j of F(x) - x^m. The shift
// pushes a_{e_j} out of the part and a_{s_j - 1} in from the part below; the
// reduction adds a_{m-1} to every position where F has a one. P_Fj is a
// constant, so the AND gate vanishes and, when P_Fj = 0, so does its XOR.
// For k dividing m this is the scheme's own formula; for unequal part
// lengths the same derivation is applied to each part's actual bounds.
//
// With the vertical (interleaved) partitioning, part j = bits j, j+k, ..,
// the shift moves all of part j-1 into part j, so
//   P(A'_j) = P(A_{(j-1) mod k}) + a_{m-1} * P_Fj      (+ a_{m-1} for j = m mod k)
// the extra term removing a_{m-1}, which leaves the field instead of moving
// to position m. For k dividing m that is the scheme's Lemma 3 (j = 0 gets
// a_{m-1} * (P_F0 + 1)); at most one XOR per part.
//
// The predicted parity is built from the incoming parity vector pa, not
// recomputed from a, so an error already carried in a or pa is passed on
// rather than silently repaired.
//
// Interface: a (m data bits) and pa (k parity bits) in, py (k bits) out.
// Purely combinational.
module alpha_mul_ppc
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter logic [M-1:0] F = M'('hC9),
  parameter part_e       PART = PART_HORIZONTAL
) (
  input  logic [M-1:0] a,
  input  logic [K-1:0] pa,
  output logic [K-1:0] py
);

  localparam int W = MAX_M;

  if (M > MAX_M || K > M || K == 0) begin : g_bad_cfg
    $error("alpha_mul_ppc: need 1 <= K <= M <= %0d", MAX_M);
  end

  for (genvar j = 0; j < int'(K); j++) begin : g_part
    localparam logic PF = f_part_parity(W'(F), j, M, K, PART);
    logic red;      // contribution of the reduction by F
    assign red = PF ? a[M-1] : 1'b0;
    if (PART == PART_VERTICAL) begin : g_vert
      localparam int JP = (j + int'(K) - 1) % int'(K);   // part shifted into j
      if (j == int'(M % K)) begin : g_drop
        assign py[j] = pa[JP] ^ a[M-1] ^ red;
      end else begin : g_keep
        assign py[j] = pa[JP] ^ red;
      end
    end else begin : g_horiz
      localparam int S = part_start(j, M, K);
      localparam int E = part_end(j, M, K);
      logic in_low;   // bit entering the part from below
      if (j == 0) begin : g_first
        assign in_low = 1'b0;
      end else begin : g_next
        assign in_low = a[S-1];
      end
      assign py[j] = in_low ^ pa[j] ^ a[E] ^ red;
    end
  end

endmodule
