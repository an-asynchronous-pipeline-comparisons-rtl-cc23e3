// qdi_skew_buf: slack-matching buffers (the "B" blocks) at the edge of the
// bit-skewed region.
//
// In a bit-skewed datapath bit i of a word is computed i cell-stages after bit
// 0, so a word that arrives with all bits together must have its high bits held
// back (ENTRY = 1), and a word that leaves the skewed region must have its low
// bits held back (ENTRY = 0). Because a buffer cell cycles faster than a logic
// cell (10 against 14 gate delays), half as many buffers as skewed stages are
// enough: bit i gets floor(i/2) one-bit buffers on entry and floor((W-1-i)/2) on
// exit. Each buffer is a one-bit PCHB cell that copies its input.
//
// Interface: per bit, an input channel d[i] with enable le_o[i] and an output
// channel q[i] whose receivers answer on re_hi[i] / re_lo[i]. A bit whose chain
// is empty is a plain wire and then needs a single receiver (le_o = re_hi).
// The buffer counts follow the published rule; the placement at the word edges
// follows the published block diagram.
module qdi_skew_buf
  import dr_pkg::*;
#(
  parameter int unsigned W     = W_DEF,
  parameter bit          ENTRY = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_t [W-1:0]   d,
  output logic [W-1:0]  le_o,
  output dr_t [W-1:0]   q,
  input  logic [W-1:0]  re_hi,
  input  logic [W-1:0]  re_lo
);

  for (genvar i = 0; i < int'(W); i++) begin : g_bit
    localparam int D = ENTRY ? (i / 2) : ((int'(W) - 1 - i) / 2);
    if (D == 0) begin : g_wire
      assign q[i]    = d[i];
      assign le_o[i] = re_hi[i];
    end else begin : g_chain
      dr_t  st [D+1];
      logic le [D+1];
      assign st[0] = d[i];
      for (genvar k = 0; k < D; k++) begin : g_stage
        logic rh, rl, ev_u, pc_u;
        dr_t [0:0] fv, rv;
        assign fv[0] = st[k];
        if (k == D - 1) begin : g_end
          assign rh = re_hi[i];
          assign rl = re_lo[i];
        end else begin : g_mid
          assign rh = le[k+1];
          assign rl = !le[k+1];
        end
        qdi_pchb #(.NO(1)) u_buf (
          .clk, .rst_n, .lv(dr_valid(st[k])), .ln(!dr_valid(st[k])), .f(fv),
          .re_hi(rh), .re_lo(rl), .r(rv), .le(le[k]), .ev(ev_u), .pc(pc_u)
        );
        assign st[k+1] = rv[0];
      end
      assign q[i]    = st[D];
      assign le_o[i] = le[0];
    end
  end

endmodule
