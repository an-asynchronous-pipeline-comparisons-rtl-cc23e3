// qdi_split4: the split at the input of the loop-unrolled accumulator.
//
// An accumulator receives one product per iteration of the matrix-vector
// product, four per output element. The split sends the token of iteration j
// (j = 0, 1, 2, 3, 0, ...) to output position j, so the four products of one
// output element land on the four inputs of the unrolled adder chain. It works
// bit by bit: each bit is a PCHB cell that writes only the selected output
// channel and takes its enable from that channel's receiver alone.
//
// Rows 1 and 3 of the DCT matrix use the coefficients c and f in the orders
// c,f,f,c and f,c,c,f. With TWO_IN = 1 the cell joins two product bits, p and
// q, on every token and forwards q to the positions whose bit is set in SELQ,
// p to the others; this consumes both products each iteration and avoids a
// conditional read.
//
// The iteration index is the select (Sel) token stream of the published
// design. Here each bit cell keeps it as a local two-bit counter that advances
// when the cell precharges, which gives the same sequence 0,1,2,3 on every
// bit without a separate Sel channel; the counters reset to 0.
//
// Interface: per bit, inputs p[i] (and q[i]) with enable le_o[i]; outputs
// o[k][i] for k = 0..3, each acknowledged through re_hi[k][i] / re_lo[k][i].
module qdi_split4
  import dr_pkg::*;
#(
  parameter int unsigned W      = W_DEF,
  parameter bit          TWO_IN = 1'b0,
  parameter logic [3:0]  SELQ   = 4'b0000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  dr_t [W-1:0]         p,
  input  dr_t [W-1:0]         q,
  output logic [W-1:0]        le_o,
  output dr_t [3:0][W-1:0]    o,
  input  logic [3:0][W-1:0]   re_hi,
  input  logic [3:0][W-1:0]   re_lo
);

  for (genvar i = 0; i < int'(W); i++) begin : g_bit
    logic [1:0] j;
    logic       lv, ln, vsel, ev_u, pc;
    dr_t [3:0]  fv, rv;

    always_comb begin
      lv = dr_valid(p[i]) && (!TWO_IN || dr_valid(q[i]));
      ln = !dr_valid(p[i]) && (!TWO_IN || !dr_valid(q[i]));
      vsel = (TWO_IN && SELQ[j]) ? dr_bit(q[i]) : dr_bit(p[i]);
      fv = '0;
      fv[j] = dr_enc(vsel);
    end

    qdi_pchb #(.NO(4)) u_cell (
      .clk, .rst_n, .lv, .ln, .f(fv), .re_hi(re_hi[j][i]), .re_lo(re_lo[j][i]),
      .r(rv), .le(le_o[i]), .ev(ev_u), .pc
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  j <= 2'd0;
      else if (pc) j <= j + 2'd1;
    end

    for (genvar k = 0; k < 4; k++) begin : g_o
      assign o[k][i] = rv[k];
    end
  end

endmodule
