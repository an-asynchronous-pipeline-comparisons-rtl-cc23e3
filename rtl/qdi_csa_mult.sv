// qdi_csa_mult: hard-wired constant multiplier built as a carry-save array (CSA)
// of one-bit dual-rail PCHB cells.
//
// The product x*K, with K one of the DCT coefficients a, c or f scaled by 2^14,
// is the signed sum of the input shifted to each term position of K (4 or 5
// terms). Rows of full-adder cells add the terms three at a time and pass no
// carry sideways, so the array is not skewed: row 0 reduces terms 0..2 to a
// sum and a carry vector, and each further row folds in one more term. The
// result leaves as a redundant (sum, carry) pair that the merging adder turns
// into a binary number. Arithmetic is two's complement modulo 2^W.
// A subtracted term (NEG) enters as the bitwise complement of the shifted x,
// which on dual-rail wires is only a swap of the two rails; the +1 that
// completes each negation is a constant 1 in the empty least significant bit
// of one row's shifted carry vector, so a coefficient may have at most one
// subtracted term per row.
//
// Cells: cell (g, i) of row g joins the sum bit i and the carry into bit i of
// row g-1 with bit i of its own term, and forks its sum to cell (g+1, i) and
// its carry to cell (g+1, i+1). A term bit is an x bit (or the sign bit, for
// positions above the input) or a constant below the shift; a row-0 cell whose
// three term bits are all constant still joins x[0] so that it produces one
// token per input. The x bits are carried from row to row by one-bit copy
// cells, so that a later row can add its own term without holding the input
// channel. Each copy cell forks to the next copy cell and to every cell of the
// next row that reads that bit.
//
// Interface: `x` is one dual-rail channel of X_W bits with enable `x_le` (the
// C-element of the enables of every cell that reads it). The outputs `s` and
// `c` (carry vector at its weight; c[0] is a constant token sent by cell 0 of
// the last row) are per-bit channels whose receivers report through
// s_re_hi/s_re_lo and c_re_hi/c_re_lo (AND and NOR of their enables).
// Each row is one cell-stage, so a token takes NTERMS-2 stages through the
// array. The term positions and signs follow the published coefficients and
// the one-bit cells the published cell size; the row order, the copy cells
// and the placement of the negation constants are this implementation's.
module qdi_csa_mult
  import dr_pkg::*;
#(
  parameter int unsigned X_W   = X_W_DEF,
  parameter int unsigned W     = W_DEF,
  parameter coef_terms_t TERMS = COEF_A,
  parameter logic [4:0]  NEG   = NEG_A
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_t [X_W-1:0] x,
  output logic          x_le,
  output dr_t [W-1:0]   s,
  output dr_t [W-1:0]   c,
  input  logic [W-1:0]  s_re_hi,
  input  logic [W-1:0]  s_re_lo,
  input  logic [W-1:0]  c_re_hi,
  input  logic [W-1:0]  c_re_lo
);

  localparam int NTERMS = coef_nterms(TERMS);
  localparam int NROWS  = NTERMS - 2;
  localparam int NNEG   = coef_nneg(TERMS, NEG);

  if (NNEG > NROWS) begin : g_bad_neg
    $error("qdi_csa_mult: more subtracted terms than CSA rows");
  end

  // x bit read by term k at bit position i; -1 when the bit is a constant.
  function automatic int xsrc(input int k, input int i);
    int idx;
    idx = i - TERMS[k];
    if (idx < 0) return -1;
    return (idx > int'(X_W) - 1) ? int'(X_W) - 1 : idx;
  endfunction

  // Row 0 cell i has no x bit among its three terms.
  function automatic bit row0_const(input int i);
    return xsrc(0, i) < 0 && xsrc(1, i) < 0 && xsrc(2, i) < 0;
  endfunction

  // Cell (g, i) reads x bit k of the x version it sees.
  function automatic bit uses_x(input int g, input int i, input int k);
    if (g == 0)
      return xsrc(0, i) == k || xsrc(1, i) == k || xsrc(2, i) == k ||
             (row0_const(i) && k == 0);
    return xsrc(g + 2, i) == k;
  endfunction

  // Per cell: [0] sum bit i, [1] carry into bit i+1, [2] constant c[0]
  // (last row, cell 0 only).
  dr_t  [2:0]     rq   [NROWS][W];
  logic [W-1:0]   le_c [NROWS];
  // x copies: xv_in[g] is the x version row g reads.
  dr_t  [X_W-1:0] xv_in [NROWS];
  logic [X_W-1:0] le_cp [NROWS];   // enable of copy cells feeding row g (g >= 1)
  logic [X_W-1:0] x_rh, x_rl;

  assign xv_in[0] = x;

  // Enables seen by the x version of row g: AND / NOR over its readers.
  function automatic logic [1:0] rcv_x(input int g, input int k, input logic [W-1:0] le_row,
                                       input logic le_next_copy, input bit has_copy);
    logic hi, lo;
    hi = 1'b1;
    lo = 1'b1;
    for (int i = 0; i < int'(W); i++)
      if (uses_x(g, i, k)) begin
        hi &= le_row[i];
        lo &= !le_row[i];
      end
    if (has_copy) begin
      hi &= le_next_copy;
      lo &= !le_next_copy;
    end
    return {hi, lo};
  endfunction

  for (genvar g = 0; g < NROWS; g++) begin : g_row
    // Copy cells that carry x from row g-1 to row g.
    if (g > 0) begin : g_copy
      for (genvar k = 0; k < int'(X_W); k++) begin : g_cp
        logic [1:0] rr;
        logic ev_u, pc_u;
        dr_t [0:0] fv, rv;
        assign fv[0] = xv_in[g-1][k];
        assign rr = rcv_x(g, k, le_c[g], (g + 1 < NROWS) ? le_cp[(g + 1 < NROWS) ? g + 1 : g][k] : 1'b0,
                          g + 1 < NROWS);
        qdi_pchb #(.NO(1)) u_cp (
          .clk, .rst_n, .lv(dr_valid(xv_in[g-1][k])), .ln(!dr_valid(xv_in[g-1][k])),
          .f(fv), .re_hi(rr[1]), .re_lo(rr[0]), .r(rv), .le(le_cp[g][k]), .ev(ev_u), .pc(pc_u)
        );
        assign xv_in[g][k] = rv[0];
      end
    end else begin : g_nocopy
      assign le_cp[0] = '1;
    end

    for (genvar i = 0; i < int'(W); i++) begin : g_cell
      localparam bit LAST = (g == NROWS - 1);
      logic lv, ln, rh, rl, ev_u, pc_u;
      logic av, bv, dv;
      dr_t [2:0] fv;

      always_comb begin
        lv = 1'b1;
        ln = 1'b1;
        if (g == 0) begin
          // Three term bits.
          logic [2:0] tb;
          for (int t = 0; t < 3; t++) begin
            if (xsrc(t, i) < 0) begin
              tb[t] = NEG[t];
            end else begin
              tb[t] = dr_bit(x[xsrc(t, i)]) ^ NEG[t];
              lv &= dr_valid(x[xsrc(t, i)]);
              ln &= !dr_valid(x[xsrc(t, i)]);
            end
          end
          if (row0_const(i)) begin
            lv &= dr_valid(x[0]);
            ln &= !dr_valid(x[0]);
          end
          av = tb[0];
          bv = tb[1];
          dv = tb[2];
        end else begin
          av = dr_bit(rq[g-1][i][0]);
          lv &= dr_valid(rq[g-1][i][0]);
          ln &= !dr_valid(rq[g-1][i][0]);
          if (i == 0) begin
            bv = (g - 1 < NNEG);
          end else begin
            bv = dr_bit(rq[g-1][i-1][1]);
            lv &= dr_valid(rq[g-1][i-1][1]);
            ln &= !dr_valid(rq[g-1][i-1][1]);
          end
          if (xsrc(g + 2, i) < 0) begin
            dv = NEG[g+2];
          end else begin
            dv = dr_bit(xv_in[g][xsrc(g + 2, i)]) ^ NEG[g+2];
            lv &= dr_valid(xv_in[g][xsrc(g + 2, i)]);
            ln &= !dr_valid(xv_in[g][xsrc(g + 2, i)]);
          end
        end
        fv[0] = dr_enc(av ^ bv ^ dv);
        fv[1] = dr_enc((av & bv) | (av & dv) | (bv & dv));
        fv[2] = (LAST && i == 0) ? dr_enc(g < NNEG) : '0;
      end

      // Receivers: sum -> (g+1, i) or s[i]; carry -> (g+1, i+1) or c[i+1];
      // last row cell 0 also sends c[0].
      always_comb begin
        if (!LAST) begin
          rh = le_c[(g + 1 < NROWS) ? g + 1 : g][i];
          rl = !le_c[(g + 1 < NROWS) ? g + 1 : g][i];
          if (i < int'(W) - 1) begin
            rh &= le_c[(g + 1 < NROWS) ? g + 1 : g][(i < int'(W) - 1) ? i + 1 : i];
            rl &= !le_c[(g + 1 < NROWS) ? g + 1 : g][(i < int'(W) - 1) ? i + 1 : i];
          end
        end else begin
          rh = s_re_hi[i];
          rl = s_re_lo[i];
          if (i < int'(W) - 1) begin
            rh &= c_re_hi[(i < int'(W) - 1) ? i + 1 : i];
            rl &= c_re_lo[(i < int'(W) - 1) ? i + 1 : i];
          end
          if (i == 0) begin
            rh &= c_re_hi[0];
            rl &= c_re_lo[0];
          end
        end
      end

      qdi_pchb #(.NO(3)) u_cell (
        .clk, .rst_n, .lv, .ln, .f(fv), .re_hi(rh), .re_lo(rl),
        .r(rq[g][i]), .le(le_c[g][i]), .ev(ev_u), .pc(pc_u)
      );

      if (LAST) begin : g_out
        assign s[i] = rq[g][i][0];
        if (i == 0) begin : g_c0
          assign c[0] = rq[g][0][2];
        end else begin : g_ci
          assign c[i] = rq[g][i-1][1];
        end
      end
    end
  end

  // Enables of the input x bits, then one C-element for the word channel.
  for (genvar k = 0; k < int'(X_W); k++) begin : g_xr
    logic [1:0] rr;
    assign rr = rcv_x(0, k, le_c[0], le_cp[(NROWS > 1) ? 1 : 0][k], NROWS > 1);
    assign x_rh[k] = rr[1];
    assign x_rl[k] = rr[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      x_le <= 1'b1;
    else if (&x_rh)  x_le <= 1'b1;
    else if (&x_rl)  x_le <= 1'b0;
  end

endmodule
