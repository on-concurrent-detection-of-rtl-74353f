// Bit-serial polynomial basis multiplier with parity prediction.
//
// Computes C = A*B mod F(x) as C = sum_i b_i * A^(i), A^(0) = A,
// A^(i) = alpha*A^(i-1), least significant bit of B first, one round per
// clock. Every datapath word travels encoded, m data bits plus a k-bit
// parity vector:
//   register D  : A^(i) and its parity, updated by an alpha-Mul-P module
//   register C  : partial product and its predicted parity, updated by
//                 SM-P (b_i * D) followed by VA-P (C + b_i * D)
//   register B  : shift register supplying b_i
// The three module outputs inside a round are the check locations L1
// (alpha-Mul-P), L2 (SM-P) and L3 (VA-P). A fault injection multiplexer sits
// at each of them (fi_loc selects which one, fi_en/fi_val give the stuck-at
// mask and values over {parity, data}); it is transparent when fi_loc is
// LOC_NONE or no round is running.
//
// Timing: load (one cycle, with a, its k-bit parity pa and b) initialises
// D = (a, pa), C = (0, 0), B = b. The next m clock edges perform rounds
// 0 .. m-1; the edge that performs round m-1 enters the done state, where
// c/pc hold the product and its predicted parity until the next load. A load
// is accepted in any state and restarts the multiplier. chk_en marks cycles
// in which (c, pc) is a consistent encoded word that a checker may test
// (every cycle after the load cycle); it is low in a load cycle because the
// checker's parity generator then encodes the new operand.
// The number of rounds and the register set follow the scheme; the
// load/done handshake and reset behaviour are this design's choice.
module serial_mult_ppc
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
  input  logic [K-1:0]   pa,
  input  logic [M-1:0]   b,
  input  fi_loc_e        fi_loc,
  input  logic [M+K-1:0] fi_en,
  input  logic [M+K-1:0] fi_val,
  output logic [M-1:0]   c,
  output logic [K-1:0]   pc,
  output logic           busy,
  output logic           done,
  output logic           chk_en,
  output logic [$clog2(M+1)-1:0] round
);

  localparam int unsigned W  = M + K;
  localparam int unsigned CW = $clog2(M + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e        state_q;
  logic [M-1:0]  d_q, c_q, b_q;
  logic [K-1:0]  pd_q, pc_q;
  logic [CW-1:0] cnt_q;

  // one round of the datapath
  logic [M-1:0] d_nx, sm_y, va_s;
  logic [K-1:0] pd_nx, sm_py, va_ps;
  logic [W-1:0] d_f, sm_f, va_f;

  alpha_mul_p #(.M(M), .K(K), .F(F), .PART(PART)) u_alpha (
    .a(d_q), .pa(pd_q), .y(d_nx), .py(pd_nx));

  logic [W-1:0] en_alpha, en_sm, en_va;
  always_comb begin
    en_alpha = (state_q == S_RUN && fi_loc == LOC_ALPHA) ? fi_en : '0;
    en_sm    = (state_q == S_RUN && fi_loc == LOC_SM)    ? fi_en : '0;
    en_va    = (state_q == S_RUN && fi_loc == LOC_VA)    ? fi_en : '0;
  end

  fault_inj #(.W(W)) u_fi_l1 (.d({pd_nx, d_nx}), .en(en_alpha), .val(fi_val), .q(d_f));

  sm_p #(.M(M), .K(K)) u_sm (
    .b(b_q[0]), .a(d_q), .pa(pd_q), .y(sm_y), .py(sm_py));

  fault_inj #(.W(W)) u_fi_l2 (.d({sm_py, sm_y}), .en(en_sm), .val(fi_val), .q(sm_f));

  va_p #(.M(M), .K(K)) u_va (
    .x(c_q), .px(pc_q), .y(sm_f[M-1:0]), .py(sm_f[W-1:M]), .s(va_s), .ps(va_ps));

  fault_inj #(.W(W)) u_fi_l3 (.d({va_ps, va_s}), .en(en_va), .val(fi_val), .q(va_f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      d_q     <= '0;
      pd_q    <= '0;
      c_q     <= '0;
      pc_q    <= '0;
      b_q     <= '0;
      cnt_q   <= '0;
    end else if (load) begin
      state_q <= S_RUN;
      d_q     <= a;
      pd_q    <= pa;
      c_q     <= '0;
      pc_q    <= '0;
      b_q     <= b;
      cnt_q   <= '0;
    end else if (state_q == S_RUN) begin
      // a running multiplication never counts past its last round
      a_round_range: assert (cnt_q < CW'(M));
      d_q     <= d_f[M-1:0];
      pd_q    <= d_f[W-1:M];
      c_q     <= va_f[M-1:0];
      pc_q    <= va_f[W-1:M];
      b_q     <= b_q >> 1;
      cnt_q   <= cnt_q + 1'b1;
      if (cnt_q == CW'(M - 1)) state_q <= S_DONE;
    end
  end

  assign c      = c_q;
  assign pc     = pc_q;
  assign busy   = (state_q == S_RUN);
  assign done   = (state_q == S_DONE);
  assign chk_en = (state_q != S_IDLE) && !load;
  assign round  = cnt_q;

endmodule
