// qdi_addsub: bit-skewed ripple-carry adder / subtractor of one-bit dual-rail
// cells. It serves as the merging adder (MA) that turns a carry-save pair into a
// binary product, and as each Add/Sub block of the loop-unrolled accumulator.
//
// Cell i is a PCHB cell that joins a[i], b[i] and the carry from cell i-1, and
// forks its sum to the output channel s[i] and its carry to cell i+1. The carry
// therefore travels diagonally: cell i fires one cell-stage after cell i-1, and
// a word leaves skewed, bit 0 first. Consecutive words overlap, since cell 0
// can accept the next word as soon as it has handed on its carry. The
// subtractor (SUB = 1) adds the complement of b with a carry-in of 1 into cell
// 0; swapping the two rails of a dual-rail bit inverts it, so this costs no
// extra cell. The operation is fixed at build time. The carry out of the top
// bit is dropped: results are two's complement modulo 2^W.
//
// Interface: per bit, inputs a[i] and b[i] share the enable le_o[i]; output
// s[i] is acknowledged through re_hi[i] / re_lo[i].
// The bit-level cells, the diagonal carry and the add/subtract function follow
// the published design; the fixed operation and the dropped carry out are this
// implementation's choices.
module qdi_addsub
  import dr_pkg::*;
#(
  parameter int unsigned W   = W_DEF,
  parameter bit          SUB = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_t [W-1:0]   a,
  input  dr_t [W-1:0]   b,
  output logic [W-1:0]  le_o,
  output dr_t [W-1:0]   s,
  input  logic [W-1:0]  re_hi,
  input  logic [W-1:0]  re_lo
);

  dr_t [1:0]   rq [W];   // per cell: [0] sum, [1] carry to the next cell
  logic [W-1:0] le_c;    // per cell enable

  for (genvar i = 0; i < int'(W); i++) begin : g_bit
    logic ci, av, bv, lv, ln, rh, rl, ev_u, pc_u;
    dr_t [1:0] fv;

    always_comb begin
      av = dr_bit(a[i]);
      bv = dr_bit(b[i]) ^ SUB;
      lv = dr_valid(a[i]) && dr_valid(b[i]);
      ln = !dr_valid(a[i]) && !dr_valid(b[i]);
      if (i == 0) begin
        ci = SUB;
      end else begin
        ci = dr_bit(rq[i-1][1]);
        lv = lv && dr_valid(rq[i-1][1]);
        ln = ln && !dr_valid(rq[i-1][1]);
      end
      fv[0] = dr_enc(av ^ bv ^ ci);
      fv[1] = dr_enc((av & bv) | (av & ci) | (bv & ci));
    end

    if (i == int'(W) - 1) begin : g_top
      assign rh = re_hi[i];
      assign rl = re_lo[i];
    end else begin : g_mid
      assign rh = re_hi[i] && le_c[i+1];
      assign rl = re_lo[i] && !le_c[i+1];
    end

    qdi_pchb #(.NO(2)) u_cell (
      .clk, .rst_n, .lv, .ln, .f(fv), .re_hi(rh), .re_lo(rl),
      .r(rq[i]), .le(le_c[i]), .ev(ev_u), .pc(pc_u)
    );
    assign le_o[i] = le_c[i];
    assign s[i]    = rq[i][0];
  end

endmodule
