// tb_qdi_split4: self-checking test of the accumulator input split.
// Instance 0 has two inputs (TWO_IN = 1) and selects q at positions 1 and 2,
// as for row 1 of the DCT matrix; instance 1 has one input. NTOK random words
// per input go in through jittered per-bit senders; token t must leave on
// output t mod 4, carrying q[t] where the position selects q and p[t]
// otherwise, and no output may receive more than its share.
module tb_qdi_split4;
  import dr_pkg::*;
  localparam int W = 22, NTOK = 40, NPOS = NTOK / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] pv [NTOK], qv [NTOK];
  int checks = 0, failures = 0;

  for (genvar u = 0; u < 2; u++) begin : g_u
    dr_t  [W-1:0] p, q;
    logic [W-1:0] le_o;
    dr_t  [3:0][W-1:0] o;
    logic [3:0][W-1:0] en;
    logic [W-1:0] got [4][NPOS];
    logic [3:0] dn;
    int errs [4];
    logic dp, dq;
    tb_dr_src #(.N(W), .NTOK(NTOK)) u_sp (.clk, .rst_n, .vals(pv), .d(p), .le(le_o), .done(dp));
    tb_dr_src #(.N(W), .NTOK(NTOK)) u_sq (.clk, .rst_n, .vals(qv), .d(q), .le(le_o), .done(dq));
    qdi_split4 #(.W(W), .TWO_IN(u == 0), .SELQ(4'b0110)) dut (
      .clk, .rst_n, .p, .q, .le_o, .o, .re_hi(en), .re_lo(~en));
    for (genvar k = 0; k < 4; k++) begin : g_k
      tb_dr_snk #(.N(W), .NTOK(NPOS)) u_snk (
        .clk, .rst_n, .d(o[k]), .en(en[k]), .got(got[k]), .done(dn[k]), .errors(errs[k]));
    end
  end

  initial begin
    for (int t = 0; t < NTOK; t++) begin
      pv[t] = W'({$urandom, $urandom});
      qv[t] = W'({$urandom, $urandom});
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait ((&g_u[0].dn) && (&g_u[1].dn) && g_u[0].dp && g_u[1].dp);
    repeat (20) @(posedge clk);
    for (int t = 0; t < NTOK; t++) begin
      logic [W-1:0] e0, e1;
      e0 = (t % 4 == 1 || t % 4 == 2) ? qv[t] : pv[t];
      e1 = pv[t];
      checks += 2;
      if (g_u[0].got[t % 4][t / 4] !== e0) begin failures++; $display("FAIL two-input token %0d", t); end
      if (g_u[1].got[t % 4][t / 4] !== e1) begin failures++; $display("FAIL one-input token %0d", t); end
    end
    // No stray token: every output is neutral and ready again.
    for (int u = 0; u < 2; u++)
      for (int k = 0; k < 4; k++) begin
        checks++;
        if ((u == 0 ? g_u[0].o[k] : g_u[1].o[k]) != '0) begin
          failures++; $display("FAIL extra token on output %0d", k);
        end
      end
    checks++;
    if (g_u[0].errs.sum() + g_u[1].errs.sum() != 0) begin failures++; $display("FAIL protocol"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
