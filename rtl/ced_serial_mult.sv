// Complete bit-serial polynomial basis multiplier with concurrent error
// detection (CED) by multiple parity bits.
//
// Two parts: the bit-serial multiplier with parity prediction
// (serial_mult_ppc) and one multiple-bit parity checker at location L3, on
// the output of register C. The checker's parity generator is shared: in the
// load cycle its input is the operand a, and its output P(a) becomes the
// parity of register D, so encoding the operand costs neither a second
// generator nor an extra clock cycle. In every later cycle the generator
// sees register C and the checker compares P(C) with the predicted parity
// carried along with C, i.e. once per round.
//
// A mismatch sets a sticky flag that a load clears. error = flag OR the
// current comparison, so in the done cycle error covers every round of the
// multiplication, the last included. err_now is the unregistered comparison and round the number of rounds
// completed so far.
//
// Timing: assert load for one cycle with a and b; done rises m cycles after
// the load cycle (m rounds, the same count as without CED) and c and error
// hold until the next load. The checker position (L3 only) follows the
// scheme's choice of check points; the sticky flag and handshake are this
// design's.
module ced_serial_mult
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter logic [M-1:0] F = M'('hC9),
  parameter pb_ced_pkg::part_e PART = pb_ced_pkg::PART_HORIZONTAL   // parity partitioning
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  input  fi_loc_e        fi_loc,
  input  logic [M+K-1:0] fi_en,
  input  logic [M+K-1:0] fi_val,
  output logic [M-1:0]   c,
  output logic           busy,
  output logic           done,
  output logic           error,
  output logic           err_now,
  output logic [$clog2(M+1)-1:0] round
);

  logic [M-1:0] c_q, chk_z;
  logic [K-1:0] pc_q, p_gen;
  logic         chk_en, chk_err, flag_q;

  serial_mult_ppc #(.M(M), .K(K), .F(F), .PART(PART)) u_mult (
    .clk(clk), .rst_n(rst_n), .load(load), .a(a), .pa(p_gen), .b(b),
    .fi_loc(fi_loc), .fi_en(fi_en), .fi_val(fi_val),
    .c(c_q), .pc(pc_q), .busy(busy), .done(done), .chk_en(chk_en), .round(round));

  // shared parity generator input: operand during load, register C otherwise
  assign chk_z = load ? a : c_q;

  parity_checker #(.M(M), .K(K), .PART(PART)) u_chk (
    .z(chk_z), .pz(pc_q), .p_gen(p_gen), .err(chk_err));

  assign err_now = chk_en & chk_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       flag_q <= 1'b0;
    else if (load)    flag_q <= 1'b0;
    else if (err_now) flag_q <= 1'b1;
  end

  assign c     = c_q;
  assign error = flag_q | err_now;

endmodule
