// Complete bit-parallel polynomial basis multiplier with concurrent error
// detection (CED) by multiple parity bits.
//
// A parity generator encodes operand A with its k-bit parity; the bit-parallel
// multiplier with parity prediction (parallel_mult_ppc) carries that parity
// through every row. Check points follow the scheme's reduced placement: one
// multiple-bit parity checker at the end of every row, i.e. before the
// accumulating input of each VA-P and after the final VA-P, m checkers in
// all. Any error vector reaches a checker without passing through an
// alpha-Mul-P module. row_err shows which checkers fire; error is their OR.
//
// Interface: a, b in; c = a*b mod F out, with error. Fault injection inputs as
// in parallel_mult_ppc (tie fi_loc to LOC_NONE in normal use). Purely
// combinational: product and error settle after the propagation delay, with
// no clock.
module ced_parallel_mult
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter logic [M-1:0] F = M'('hC9),
  parameter pb_ced_pkg::part_e PART = pb_ced_pkg::PART_HORIZONTAL   // parity partitioning
) (
  input  logic [M-1:0]         a,
  input  logic [M-1:0]         b,
  input  logic [$clog2(M)-1:0] fi_row,
  input  fi_loc_e              fi_loc,
  input  logic [M+K-1:0]       fi_en,
  input  logic [M+K-1:0]       fi_val,
  output logic [M-1:0]         c,
  output logic                 error,
  output logic [M-1:0]         row_err
);

  logic [K-1:0] pa;
  logic [M-1:0] s  [M];
  logic [K-1:0] ps [M];

  parity_gen #(.M(M), .K(K), .PART(PART)) u_pgen (.z(a), .p(pa));

  parallel_mult_ppc #(.M(M), .K(K), .F(F), .PART(PART)) u_mult (
    .a(a), .pa(pa), .b(b), .fi_row(fi_row), .fi_loc(fi_loc),
    .fi_en(fi_en), .fi_val(fi_val), .s(s), .ps(ps));

  for (genvar i = 0; i < int'(M); i++) begin : g_chk
    logic [K-1:0] p_gen;
    parity_checker #(.M(M), .K(K), .PART(PART)) u_chk (
      .z(s[i]), .pz(ps[i]), .p_gen(p_gen), .err(row_err[i]));
  end

  assign c     = s[M-1];
  assign error = |row_err;

endmodule
