// tb_qdi_acc_unroll: self-checking test of the loop-unrolled accumulator in the
// four configurations the multiplier uses (rows y0..y3 of the DCT matrix:
// input selection and add/subtract signs). Each instance receives 4*NV random
// 22-bit products on p (and q) through jittered per-bit senders and must return
// NV sums v0 +- v1 +- v2 +- v3 modulo 2^22, where v_j is the product of
// iteration j. It also checks that the chain overlaps output elements: the
// first Add/Sub must start on the low bits of one element while the last
// Add/Sub is still on the top bit of an earlier one.
module tb_qdi_acc_unroll;
  import dr_pkg::*;
  localparam int W = 22, NV = 12, NTOK = 4 * NV;
  localparam logic [3:0] SELQ_C [4] = '{4'b0000, 4'b0110, 4'b0000, 4'b1001};
  localparam logic [2:0] OPS_C  [4] = '{3'b000, 3'b110, 3'b011, 3'b101};
  localparam bit         TWO_C  [4] = '{1'b0, 1'b1, 1'b0, 1'b1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] pv [NTOK], qv [NTOK];
  int checks = 0, failures = 0;
  int overlap = 0;

  for (genvar u = 0; u < 4; u++) begin : g_u
    dr_t  [W-1:0] p, q, y;
    logic [W-1:0] le_o, en;
    logic [W-1:0] got [NV];
    logic dp, dq, dn;
    int errs;
    tb_dr_src #(.N(W), .NTOK(NTOK)) u_sp (.clk, .rst_n, .vals(pv), .d(p), .le(le_o), .done(dp));
    tb_dr_src #(.N(W), .NTOK(NTOK)) u_sq (.clk, .rst_n, .vals(qv), .d(q), .le(le_o), .done(dq));
    qdi_acc_unroll #(.W(W), .TWO_IN(TWO_C[u]), .SELQ(SELQ_C[u]), .OPS(OPS_C[u])) dut (
      .clk, .rst_n, .p, .q, .le_o, .y, .re_hi(en), .re_lo(~en));
    tb_dr_snk #(.N(W), .NTOK(NV)) u_snk (
      .clk, .rst_n, .d(y), .en, .got, .done(dn), .errors(errs));
  end

  always @(posedge clk)
    if (rst_n && dr_valid(g_u[0].dut.sum[0][0]) && dr_valid(g_u[0].dut.sum[2][W-1])) overlap++;

  function automatic logic [W-1:0] expect_y(int u, int v);
    logic [W-1:0] acc, t;
    for (int j = 0; j < 4; j++) begin
      t = SELQ_C[u][j] ? qv[4*v+j] : pv[4*v+j];
      if (j == 0)              acc = t;
      else if (OPS_C[u][j-1])  acc = acc - t;
      else                     acc = acc + t;
    end
    return acc;
  endfunction

  initial begin
    for (int t = 0; t < NTOK; t++) begin
      pv[t] = W'({$urandom, $urandom});
      qv[t] = W'({$urandom, $urandom});
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g_u[0].dn && g_u[1].dn && g_u[2].dn && g_u[3].dn);
    @(posedge clk);
    for (int u = 0; u < 4; u++)
      for (int v = 0; v < NV; v++) begin
        logic [W-1:0] g;
        g = (u == 0) ? g_u[0].got[v] : (u == 1) ? g_u[1].got[v] : (u == 2) ? g_u[2].got[v] : g_u[3].got[v];
        checks++;
        if (g !== expect_y(u, v)) begin
          failures++; $display("FAIL row %0d element %0d: got %h exp %h", u, v, g, expect_y(u, v));
        end
      end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no overlap of elements"); end
    checks++;
    if (g_u[0].errs + g_u[1].errs + g_u[2].errs + g_u[3].errs != 0) begin failures++; $display("FAIL protocol"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
