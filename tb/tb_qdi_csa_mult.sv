// tb_qdi_csa_mult: self-checking test of the three hard-wired carry-save
// multipliers. Every 8-bit input value (-128..127) is sent once, in a shuffled
// order, to multipliers for a, c and f; the sum of each (sum, carry) output
// pair must equal x * 5792, x * 7568 and x * 3135 modulo 2^22. The multiplier
// with five terms must also hold more than one token at once (its CSA rows
// are pipeline stages), which is counted and checked. The outputs are
// collected by per-bit receivers with random delays, so the bits of one
// product are acknowledged at different times.
module tb_qdi_csa_mult;
  import dr_pkg::*;
  localparam int X_W = 8, W = 22, NTOK = 256;
  localparam int KV [3] = '{5792, 7568, 3135};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [X_W-1:0] xv [NTOK];
  int checks = 0, failures = 0, overlap = 0;

  for (genvar m = 0; m < 3; m++) begin : g_m
    localparam coef_terms_t T = (m == 0) ? COEF_A : (m == 1) ? COEF_C : COEF_F;
    localparam logic [4:0]  NG = (m == 0) ? NEG_A  : (m == 1) ? NEG_C  : NEG_F;
    dr_t [X_W-1:0] x;
    logic x_le, ds, dn;
    dr_t [W-1:0] s, c;
    logic [2*W-1:0] en;
    logic [2*W-1:0] got [NTOK];
    int errs;
    tb_dr_src #(.N(X_W), .NTOK(NTOK), .JITTER(1'b0)) u_src (
      .clk, .rst_n, .vals(xv), .d(x), .le({X_W{x_le}}), .done(ds));
    qdi_csa_mult #(.X_W(X_W), .W(W), .TERMS(T), .NEG(NG)) dut (
      .clk, .rst_n, .x, .x_le, .s, .c, .s_re_hi(en[W-1:0]), .s_re_lo(~en[W-1:0]),
      .c_re_hi(en[2*W-1:W]), .c_re_lo(~en[2*W-1:W]));
    tb_dr_snk #(.N(2*W), .NTOK(NTOK)) u_snk (
      .clk, .rst_n, .d({c, s}), .en, .got, .done(dn), .errors(errs));
  end

  // Two CSA rows of the a-multiplier holding tokens at the same time.
  always @(posedge clk)
    if (rst_n && dr_valid(g_m[0].dut.rq[0][15][0]) && dr_valid(g_m[0].dut.rq[2][15][0])) overlap++;

  initial begin
    for (int k = 0; k < NTOK; k++) xv[k] = X_W'(k);
    for (int k = NTOK - 1; k > 0; k--) begin
      int j = $urandom_range(0, k);
      logic [X_W-1:0] t = xv[k];
      xv[k] = xv[j]; xv[j] = t;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g_m[0].dn && g_m[1].dn && g_m[2].dn);
    @(posedge clk);
    for (int m = 0; m < 3; m++)
      for (int k = 0; k < NTOK; k++) begin
        logic [2*W-1:0] g;
        logic [W-1:0] expv, sum;
        g = (m == 0) ? g_m[0].got[k] : (m == 1) ? g_m[1].got[k] : g_m[2].got[k];
        expv = W'(int'($signed(xv[k])) * KV[m]);
        sum  = g[W-1:0] + g[2*W-1:W];
        checks++;
        if (sum !== expv) begin
          failures++;
          $display("FAIL coef %0d x=%0d: got %h exp %h", m, $signed(xv[k]), sum, expv);
        end
      end
    checks++;
    if (g_m[0].errs + g_m[1].errs + g_m[2].errs != 0) begin failures++; $display("FAIL protocol"); end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no pipelining in CSA rows"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
