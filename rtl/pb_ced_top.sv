// Top level: the two multiple-parity CED polynomial basis multipliers for
// GF(2^m), side by side, each with its own ports.
//
//   ser_*  bit-serial multiplier (ced_serial_mult): clocked, m rounds per
//          product, one checker on the accumulator, error flag valid with
//          ser_done.
//   par_*  bit-parallel multiplier (ced_parallel_mult): combinational, one
//          checker per row, error valid after the propagation delay.
// Both default to m = 163, k = 8 parity bits and
// F(x) = x^163 + x^7 + x^6 + x^3 + 1, for which every part of F has even
// parity. PART selects consecutive (horizontal, default) or interleaved
// (vertical) parity parts for both. The fault injection inputs exist for
// test; tie the *_fi_loc inputs to LOC_NONE in normal use.
module pb_ced_top
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter logic [M-1:0] F = M'('hC9),
  parameter pb_ced_pkg::part_e PART = pb_ced_pkg::PART_HORIZONTAL   // parity partitioning
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // bit-serial multiplier
  input  logic                 ser_load,
  input  logic [M-1:0]         ser_a,
  input  logic [M-1:0]         ser_b,
  input  fi_loc_e              ser_fi_loc,
  input  logic [M+K-1:0]       ser_fi_en,
  input  logic [M+K-1:0]       ser_fi_val,
  output logic [M-1:0]         ser_c,
  output logic                 ser_busy,
  output logic                 ser_done,
  output logic                 ser_error,
  output logic                 ser_err_now,
  output logic [$clog2(M+1)-1:0] ser_round,
  // bit-parallel multiplier
  input  logic [M-1:0]         par_a,
  input  logic [M-1:0]         par_b,
  input  logic [$clog2(M)-1:0] par_fi_row,
  input  fi_loc_e              par_fi_loc,
  input  logic [M+K-1:0]       par_fi_en,
  input  logic [M+K-1:0]       par_fi_val,
  output logic [M-1:0]         par_c,
  output logic                 par_error,
  output logic [M-1:0]         par_row_err
);

  ced_serial_mult #(.M(M), .K(K), .F(F), .PART(PART)) u_serial (
    .clk(clk), .rst_n(rst_n), .load(ser_load), .a(ser_a), .b(ser_b),
    .fi_loc(ser_fi_loc), .fi_en(ser_fi_en), .fi_val(ser_fi_val),
    .c(ser_c), .busy(ser_busy), .done(ser_done), .error(ser_error),
    .err_now(ser_err_now), .round(ser_round));

  ced_parallel_mult #(.M(M), .K(K), .F(F), .PART(PART)) u_parallel (
    .a(par_a), .b(par_b), .fi_row(par_fi_row), .fi_loc(par_fi_loc),
    .fi_en(par_fi_en), .fi_val(par_fi_val), .c(par_c), .error(par_error),
    .row_err(par_row_err));

endmodule
