// tb_qdi_skew_buf: self-checking test of the entry and exit slack buffers at
// the default width (22 bits). Random words pass through an entry instance
// and an exit instance with jittered receivers and must come out unchanged.
// The buffer counts are checked through latency: with unjittered senders every
// bit enters on the same clock, and each buffer adds one clock, so bit i of
// the first word must come out floor(i/2) clocks after it went in on entry and
// floor((W-1-i)/2) clocks after on exit.
module tb_qdi_skew_buf;
  import dr_pkg::*;
  localparam int W = 22, NTOK = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] vals [NTOK];
  int checks = 0, failures = 0, cyc = 0;

  for (genvar u = 0; u < 2; u++) begin : g_u
    dr_t  [W-1:0] d, q;
    logic [W-1:0] le_o, en;
    logic [W-1:0] got [NTOK];
    logic ds, dn;
    int errs;
    int t_in [W], t_out [W];
    tb_dr_src #(.N(W), .NTOK(NTOK), .JITTER(1'b0)) u_src (
      .clk, .rst_n, .vals, .d, .le(le_o), .done(ds));
    qdi_skew_buf #(.W(W), .ENTRY(u == 0)) dut (
      .clk, .rst_n, .d, .le_o, .q, .re_hi(en), .re_lo(~en));
    tb_dr_snk #(.N(W), .NTOK(NTOK)) u_snk (
      .clk, .rst_n, .d(q), .en, .got, .done(dn), .errors(errs));
    always @(posedge clk) if (rst_n)
      for (int i = 0; i < W; i++) begin
        if (t_in[i] < 0 && dr_valid(d[i]))  t_in[i] = cyc;
        if (t_out[i] < 0 && dr_valid(q[i])) t_out[i] = cyc;
      end
    initial for (int i = 0; i < W; i++) begin t_in[i] = -1; t_out[i] = -1; end
  end

  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    for (int k = 0; k < NTOK; k++) vals[k] = W'({$urandom, $urandom});
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g_u[0].dn && g_u[1].dn);
    @(posedge clk);
    for (int k = 0; k < NTOK; k++) begin
      checks += 2;
      if (g_u[0].got[k] !== vals[k]) begin failures++; $display("FAIL entry word %0d", k); end
      if (g_u[1].got[k] !== vals[k]) begin failures++; $display("FAIL exit word %0d", k); end
    end
    for (int i = 0; i < W; i++) begin
      checks += 2;
      if (g_u[0].t_out[i] - g_u[0].t_in[i] != i / 2) begin
        failures++; $display("FAIL entry bit %0d delay %0d", i, g_u[0].t_out[i] - g_u[0].t_in[i]);
      end
      if (g_u[1].t_out[i] - g_u[1].t_in[i] != (W - 1 - i) / 2) begin
        failures++; $display("FAIL exit bit %0d delay %0d", i, g_u[1].t_out[i] - g_u[1].t_in[i]);
      end
    end
    checks++;
    if (g_u[0].errs + g_u[1].errs != 0) begin failures++; $display("FAIL protocol"); end
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
