// qdi_dct_mvm: quasi-delay-insensitive (QDI) 4x4 DCT matrix-vector multiplier,
// bit-skewed datapath with completely loop-unrolled accumulators.
//
// It computes Y = M * X for the 4-point DCT matrix
//        | a  a  a  a |
//    M = | c  f -f -c |      a ~ 0.354, c ~ 0.462, f ~ 0.191 (see dr_pkg)
//        | a -a -a  a |
//        | f -c  c -f |
// iteratively: the elements x0..x3 of one input vector arrive one per token on
// channel x, each is multiplied by the three coefficients, and four
// accumulators add the signed products. After the fourth element the four
// results leave together on channel y.
//
// Datapath, left to right:
//   x -> three hard-wired CSA multipliers (a, c, f; not skewed)
//     -> entry slack buffers (skew the carry-save pairs)
//     -> three bit-skewed merging adders (products x*a, x*c, x*f)
//     -> four loop-unrolled accumulators (split, buffer, three Add/Sub)
//     -> exit slack buffers (de-skew) -> y
// Product a*x feeds the accumulators of y0 and y2; c*x and f*x both feed those
// of y1 and y3, whose splits pick c or f per iteration. Every channel is
// dual-rail with a four-phase handshake; everything behind the input channel is
// made of one-bit PCHB cells, so each bit runs its own handshake and the words
// flow diagonally through the adders.
//
// Ports: x is X_W dual-rail bits of one two's-complement input element,
// scaled as an integer; x_le is its enable (1: send the next token, 0: reset
// the rails). y[k] is output element k, W dual-rail bits in two's complement
// with 14 fraction bits (y[k] = round-free sum of x_j * coef * 2^14, modulo
// 2^W); y_en is the right environment's enable for all 4*W output bits.
// Clocked emulation: one cell-stage per clock (see qdi_pchb).
// The block structure, coefficients, 22-bit width and buffer rule are the
// published design's; the 8-bit input, the clocked emulation and the shared
// output enable are this implementation's choices.
module qdi_dct_mvm
  import dr_pkg::*;
#(
  parameter int unsigned X_W = X_W_DEF,
  parameter int unsigned W   = W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dr_t [X_W-1:0]     x,
  output logic              x_le,
  output dr_t [3:0][W-1:0]  y,
  input  logic              y_en
);

  // Products: 0 = a*x, 1 = c*x, 2 = f*x.
  logic [2:0]   m_xle;
  dr_t  [W-1:0] m_s [3], m_c [3];
  logic [W-1:0] eb_s_le [3], eb_c_le [3];
  dr_t  [W-1:0] eb_s [3], eb_c [3];
  logic [W-1:0] ma_le [3];
  dr_t  [W-1:0] prod [3];
  logic [W-1:0] prod_rh [3], prod_rl [3];
  logic [W-1:0] acc_le [4];
  dr_t  [W-1:0] acc_y [4];
  logic [W-1:0] xb_le [4];

  // x is forked to the three multipliers: its enable is their C-element.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            x_le <= 1'b1;
    else if (&m_xle)       x_le <= 1'b1;
    else if (~|m_xle)      x_le <= 1'b0;
  end

  for (genvar m = 0; m < 3; m++) begin : g_prod
    localparam coef_terms_t T = (m == 0) ? COEF_A : (m == 1) ? COEF_C : COEF_F;
    localparam logic [4:0]  N = (m == 0) ? NEG_A  : (m == 1) ? NEG_C  : NEG_F;

    qdi_csa_mult #(.X_W(X_W), .W(W), .TERMS(T), .NEG(N)) u_csa (
      .clk, .rst_n, .x, .x_le(m_xle[m]), .s(m_s[m]), .c(m_c[m]),
      .s_re_hi(eb_s_le[m]), .s_re_lo(~eb_s_le[m]), .c_re_hi(eb_c_le[m]), .c_re_lo(~eb_c_le[m])
    );

    qdi_skew_buf #(.W(W), .ENTRY(1'b1)) u_eb_s (
      .clk, .rst_n, .d(m_s[m]), .le_o(eb_s_le[m]), .q(eb_s[m]),
      .re_hi(ma_le[m]), .re_lo(~ma_le[m])
    );
    qdi_skew_buf #(.W(W), .ENTRY(1'b1)) u_eb_c (
      .clk, .rst_n, .d(m_c[m]), .le_o(eb_c_le[m]), .q(eb_c[m]),
      .re_hi(ma_le[m]), .re_lo(~ma_le[m])
    );

    qdi_addsub #(.W(W), .SUB(1'b0)) u_ma (
      .clk, .rst_n, .a(eb_s[m]), .b(eb_c[m]), .le_o(ma_le[m]), .s(prod[m]),
      .re_hi(prod_rh[m]), .re_lo(prod_rl[m])
    );
  end

  // Product forks: a*x -> y0, y2; c*x and f*x -> y1, y3.
  assign prod_rh[0] = acc_le[0] & acc_le[2];
  assign prod_rl[0] = ~acc_le[0] & ~acc_le[2];
  assign prod_rh[1] = acc_le[1] & acc_le[3];
  assign prod_rl[1] = ~acc_le[1] & ~acc_le[3];
  assign prod_rh[2] = acc_le[1] & acc_le[3];
  assign prod_rl[2] = ~acc_le[1] & ~acc_le[3];

  // Row signs for positions 1..3 (OPS bit k = subtract at Add/Sub k+1):
  //   y0: + + +   y1: + - -   y2: - - +   y3: - + -
  // y1 takes c,f,f,c (q = f at positions 1,2); y3 takes f,c,c,f (q = f at 0,3).
  qdi_acc_unroll #(.W(W), .TWO_IN(1'b0), .SELQ(4'b0000), .OPS(3'b000)) u_acc0 (
    .clk, .rst_n, .p(prod[0]), .q(prod[0]), .le_o(acc_le[0]), .y(acc_y[0]),
    .re_hi(xb_le[0]), .re_lo(~xb_le[0])
  );
  qdi_acc_unroll #(.W(W), .TWO_IN(1'b1), .SELQ(4'b0110), .OPS(3'b110)) u_acc1 (
    .clk, .rst_n, .p(prod[1]), .q(prod[2]), .le_o(acc_le[1]), .y(acc_y[1]),
    .re_hi(xb_le[1]), .re_lo(~xb_le[1])
  );
  qdi_acc_unroll #(.W(W), .TWO_IN(1'b0), .SELQ(4'b0000), .OPS(3'b011)) u_acc2 (
    .clk, .rst_n, .p(prod[0]), .q(prod[0]), .le_o(acc_le[2]), .y(acc_y[2]),
    .re_hi(xb_le[2]), .re_lo(~xb_le[2])
  );
  qdi_acc_unroll #(.W(W), .TWO_IN(1'b1), .SELQ(4'b1001), .OPS(3'b101)) u_acc3 (
    .clk, .rst_n, .p(prod[1]), .q(prod[2]), .le_o(acc_le[3]), .y(acc_y[3]),
    .re_hi(xb_le[3]), .re_lo(~xb_le[3])
  );

  for (genvar k = 0; k < 4; k++) begin : g_out
    qdi_skew_buf #(.W(W), .ENTRY(1'b0)) u_xb (
      .clk, .rst_n, .d(acc_y[k]), .le_o(xb_le[k]), .q(y[k]),
      .re_hi({W{y_en}}), .re_lo({W{!y_en}})
    );
  end

endmodule
