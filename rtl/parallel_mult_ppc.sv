// Bit-parallel polynomial basis multiplier with parity prediction.
//
// The bit-serial rounds unrolled into m rows of combinational logic. Row i
// holds the encoded A^(i) (row 0: the operand, rows i >= 1: an alpha-Mul-P
// module on row i-1), an SM-P module forming b_i * A^(i), and, for i >= 1, a
// VA-P module adding it to the partial sum of row i-1. The partial sums
// s[i] = sum_{t<=i} b_t A^(t) and their predicted parities ps[i] are all
// brought out, so that a checker can test the end of every row; s[m-1] is
// the product. In total m-1 alpha-Mul-P, m SM-P and m-1 VA-P modules.
//
// Fault injection: fi_loc selects the alpha-Mul-P, SM-P or VA-P output of
// row fi_row, where the stuck-at mask fi_en / values fi_val are applied over
// {parity, data}. For row 0 the VA location is the row's partial sum (the
// SM-P output) and the alpha location is the encoded operand itself.
// Purely combinational; no clock.
module parallel_mult_ppc
  import pb_ced_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter int unsigned K = 8,
  parameter logic [M-1:0] F = M'('hC9),
  parameter pb_ced_pkg::part_e PART = pb_ced_pkg::PART_HORIZONTAL   // parity partitioning
) (
  input  logic [M-1:0]           a,
  input  logic [K-1:0]           pa,
  input  logic [M-1:0]           b,
  input  logic [$clog2(M)-1:0]   fi_row,
  input  fi_loc_e                fi_loc,
  input  logic [M+K-1:0]         fi_en,
  input  logic [M+K-1:0]         fi_val,
  output logic [M-1:0]           s  [M],
  output logic [K-1:0]           ps [M]
);

  localparam int unsigned W  = M + K;
  localparam int unsigned RW = $clog2(M);

  logic [W-1:0] ar [M];   // encoded A^(i) after fault injection, {parity, data}

  for (genvar i = 0; i < int'(M); i++) begin : g_row
    logic         sel;
    logic [W-1:0] en_a, en_s, en_v;
    logic [W-1:0] a_raw, sm_raw, sm_f, va_raw, va_f;
    logic [M-1:0] sm_y;
    logic [K-1:0] sm_py;

    assign sel  = (fi_row == RW'(i));
    assign en_a = (sel && fi_loc == LOC_ALPHA) ? fi_en : '0;
    assign en_s = (sel && fi_loc == LOC_SM)    ? fi_en : '0;
    assign en_v = (sel && fi_loc == LOC_VA)    ? fi_en : '0;

    if (i == 0) begin : g_first
      assign a_raw = {pa, a};
    end else begin : g_alpha
      logic [M-1:0] y;
      logic [K-1:0] py;
      alpha_mul_p #(.M(M), .K(K), .F(F), .PART(PART)) u_alpha (
        .a(ar[i-1][M-1:0]), .pa(ar[i-1][W-1:M]), .y(y), .py(py));
      assign a_raw = {py, y};
    end
    fault_inj #(.W(W)) u_fi_a (.d(a_raw), .en(en_a), .val(fi_val), .q(ar[i]));

    sm_p #(.M(M), .K(K)) u_sm (
      .b(b[i]), .a(ar[i][M-1:0]), .pa(ar[i][W-1:M]), .y(sm_y), .py(sm_py));
    assign sm_raw = {sm_py, sm_y};
    fault_inj #(.W(W)) u_fi_s (.d(sm_raw), .en(en_s), .val(fi_val), .q(sm_f));

    if (i == 0) begin : g_nosum
      assign va_raw = sm_f;
    end else begin : g_sum
      logic [M-1:0] sv;
      logic [K-1:0] psv;
      va_p #(.M(M), .K(K)) u_va (
        .x(s[i-1]), .px(ps[i-1]), .y(sm_f[M-1:0]), .py(sm_f[W-1:M]), .s(sv), .ps(psv));
      assign va_raw = {psv, sv};
    end
    fault_inj #(.W(W)) u_fi_v (.d(va_raw), .en(en_v), .val(fi_val), .q(va_f));

    assign s[i]  = va_f[M-1:0];
    assign ps[i] = va_f[W-1:M];
  end

endmodule
