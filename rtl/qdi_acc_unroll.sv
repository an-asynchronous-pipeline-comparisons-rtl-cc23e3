// qdi_acc_unroll: completely loop-unrolled accumulator (ACC) for one element of
// the output vector, y = +-p0 +-p1 +-p2 +-p3 with the first sign positive.
//
// Instead of a loop that feeds a running sum back through slack buffers, the
// four products of one output element are routed by a split to four positions
// and summed by a linear chain of three bit-skewed adder/subtractors:
//   position 0 -> buffer B -> Add/Sub 1 (a)
//   position 1 ------------> Add/Sub 1 (b)   -> Add/Sub 2 (a)
//   position 2 ------------> Add/Sub 2 (b)   -> Add/Sub 3 (a)
//   position 3 ------------> Add/Sub 3 (b)   -> y
// OPS[k] selects subtraction in Add/Sub k+1; the signs are the row of the DCT
// matrix this accumulator computes. With no loop there is no feedback path, and
// up to four output elements can be in flight in the chain at once.
//
// Interface: per bit, inputs p[i] (and q[i] when TWO_IN, see qdi_split4) with
// enable le_o[i]; output y[i] acknowledged through re_hi[i] / re_lo[i]. The
// output word leaves bit-skewed, bit 0 first.
// The structure (split, one buffer on position 0, three Add/Sub blocks) follows
// the published loop-unrolled ACC; the per-position fixed operations and the
// two-input split are this implementation's.
module qdi_acc_unroll
  import dr_pkg::*;
#(
  parameter int unsigned W      = W_DEF,
  parameter bit          TWO_IN = 1'b0,
  parameter logic [3:0]  SELQ   = 4'b0000,
  parameter logic [2:0]  OPS    = 3'b000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_t [W-1:0]   p,
  input  dr_t [W-1:0]   q,
  output logic [W-1:0]  le_o,
  output dr_t [W-1:0]   y,
  input  logic [W-1:0]  re_hi,
  input  logic [W-1:0]  re_lo
);

  dr_t  [3:0][W-1:0] o;
  logic [3:0][W-1:0] o_rh, o_rl;
  dr_t  [W-1:0]      b0;          // position 0 after the buffer
  logic [W-1:0]      b0_le;
  dr_t  [W-1:0]      sum [3];
  logic [W-1:0]      add_le [3];

  qdi_split4 #(.W(W), .TWO_IN(TWO_IN), .SELQ(SELQ)) u_split (
    .clk, .rst_n, .p, .q, .le_o, .o, .re_hi(o_rh), .re_lo(o_rl)
  );

  // Receivers of the four split outputs.
  assign o_rh[0] = b0_le;
  assign o_rl[0] = ~b0_le;
  for (genvar k = 1; k < 4; k++) begin : g_orcv
    assign o_rh[k] = add_le[k-1];
    assign o_rl[k] = ~add_le[k-1];
  end

  // Buffer B on position 0.
  for (genvar i = 0; i < int'(W); i++) begin : g_buf
    dr_t [0:0] fv, rv;
    logic ev_u, pc_u;
    assign fv[0] = o[0][i];
    qdi_pchb #(.NO(1)) u_buf (
      .clk, .rst_n, .lv(dr_valid(o[0][i])), .ln(!dr_valid(o[0][i])), .f(fv),
      .re_hi(add_le[0][i]), .re_lo(!add_le[0][i]), .r(rv), .le(b0_le[i]),
      .ev(ev_u), .pc(pc_u)
    );
    assign b0[i] = rv[0];
  end

  for (genvar k = 0; k < 3; k++) begin : g_add
    logic [W-1:0] rh, rl;
    if (k == 2) begin : g_last
      assign rh = re_hi;
      assign rl = re_lo;
    end else begin : g_mid
      assign rh = add_le[k+1];
      assign rl = ~add_le[k+1];
    end
    qdi_addsub #(.W(W), .SUB(OPS[k])) u_as (
      .clk, .rst_n, .a((k == 0) ? b0 : sum[(k == 0) ? 0 : k-1]), .b(o[k+1]),
      .le_o(add_le[k]), .s(sum[k]), .re_hi(rh), .re_lo(rl)
    );
  end

  assign y = sum[2];

endmodule
