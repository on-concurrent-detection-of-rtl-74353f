// Shared definitions for the multiple-parity concurrent error detection (CED)
// polynomial basis multipliers over GF(2^m).
//
// An m-bit field element A = (a_0 .. a_{m-1}) is cut into k parts
// A_0 .. A_{k-1}, each carrying one parity bit, so an encoded operand E(A) is
// the m data bits plus a k-bit parity vector P(A). Two partitionings exist:
//   PART_HORIZONTAL (the main one): k consecutive runs of bits. When k does
//     not divide m, the first (m mod k) parts hold floor(m/k)+1 bits and the
//     others floor(m/k) bits.
//   PART_VERTICAL (the alternative): interleaved, part j = bits j, j+k, j+2k..
//
// The functions below give the bits of each part and the parity of each part
// of the reduction polynomial F(x) - x^m. They are evaluated at elaboration
// time only. MAX_M bounds the field size that the helper
// functions accept; the largest standard binary field (m = 571) fits.
package pb_ced_pkg;

  localparam int MAX_M = 1024;

  // Where a fault is injected in one round (bit-serial) or one row (bit-parallel):
  // at the output of the alpha-Mul-P, SM-P or VA-P module.
  typedef enum logic {
    PART_HORIZONTAL = 1'b0,
    PART_VERTICAL   = 1'b1
  } part_e;

  typedef enum logic [1:0] {
    LOC_NONE  = 2'd0,
    LOC_ALPHA = 2'd1,
    LOC_SM    = 2'd2,
    LOC_VA    = 2'd3
  } fi_loc_e;

  // Length of part j: floor(m/k)+1 for j < m mod k, floor(m/k) otherwise.
  function automatic int part_len(input int j, input int m, input int k);
    return (j < (m % k)) ? (m / k) + 1 : (m / k);
  endfunction

  // Index of the first bit of part j.
  function automatic int part_start(input int j, input int m, input int k);
    int r;
    r = m % k;
    if (j < r) return j * (m / k + 1);
    return r * (m / k + 1) + (j - r) * (m / k);
  endfunction

  // Index of the last bit of part j.
  function automatic int part_end(input int j, input int m, input int k);
    return part_start(j, m, k) + part_len(j, m, k) - 1;
  endfunction

  // Bit mask of part j (bit i set when a_i belongs to part j).
  function automatic logic [MAX_M-1:0] part_mask(input int j, input int m, input int k,
                                                 input part_e part);
    logic [MAX_M-1:0] r;
    r = '0;
    for (int i = 0; i < m; i++) begin
      if (part == PART_VERTICAL) begin
        if (i % k == j) r[i] = 1'b1;
      end else if (i >= part_start(j, m, k) && i <= part_end(j, m, k)) begin
        r[i] = 1'b1;
      end
    end
    return r;
  endfunction

  // Parity P_Fj of part j of F(x) - x^m (f holds f_0 .. f_{m-1}).
  function automatic logic f_part_parity(input logic [MAX_M-1:0] f, input int j,
                                         input int m, input int k, input part_e part);
    return ^(f & part_mask(j, m, k, part));
  endfunction

endpackage
