// Multiple-bit parity generator: the actual k-bit parity of an m-bit vector.
//
// Bit j of p is the XOR of the bits of part j, an XOR tree of l_j - 1
// two-input gates: bits part_start(j) .. part_end(j) for the horizontal
// partitioning, bits j, j+k, j+2k, .. for the vertical one. Purely
// combinational.
module parity_gen
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter part_e       PART = PART_HORIZONTAL
) (
  input  logic [M-1:0] z,
  output logic [K-1:0] p
);

  for (genvar j = 0; j < int'(K); j++) begin : g_part
    if (PART == PART_VERTICAL) begin : g_vert
      localparam logic [MAX_M-1:0] MASK = part_mask(j, M, K, PART);
      assign p[j] = ^(z & MASK[M-1:0]);
    end else begin : g_horiz
      localparam int S = part_start(j, M, K);
      localparam int L = part_len(j, M, K);
      assign p[j] = ^z[S +: L];
    end
  end

endmodule
