// tb_qdi_addsub: self-checking test of the bit-skewed adder/subtractor.
// Two instances at the default width (22 bits), one adding and one
// subtracting, receive NTOK random word pairs through per-bit four-phase
// senders with random jitter; per-bit receivers collect the results, which are
// compared with a+b and a-b modulo 2^W. The diagonal carry is checked too:
// the top output bit of the first word must appear at least W-1 clocks after
// bit 0, since each cell waits for the carry of the one below it.
module tb_qdi_addsub;
  import dr_pkg::*;
  localparam int W = 22, NTOK = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] av [NTOK], bv [NTOK];
  int checks = 0, failures = 0;

  for (genvar u = 0; u < 2; u++) begin : g_u
    dr_t  [W-1:0] a, b, s;
    logic [W-1:0] le_o, en;
    logic [W-1:0] got [NTOK];
    logic da, db, dn;
    int   errs;
    tb_dr_src #(.N(W), .NTOK(NTOK)) u_sa (.clk, .rst_n, .vals(av), .d(a), .le(le_o), .done(da));
    tb_dr_src #(.N(W), .NTOK(NTOK)) u_sb (.clk, .rst_n, .vals(bv), .d(b), .le(le_o), .done(db));
    qdi_addsub #(.W(W), .SUB(u == 1)) dut (
      .clk, .rst_n, .a, .b, .le_o, .s, .re_hi(en), .re_lo(~en)
    );
    tb_dr_snk #(.N(W), .NTOK(NTOK)) u_snk (.clk, .rst_n, .d(s), .en, .got, .done(dn), .errors(errs));
    // First appearance of output bit 0 and bit W-1.
    int t0 = -1, tw = -1, cyc = 0;
    always @(posedge clk) if (rst_n) begin
      cyc++;
      if (t0 < 0 && dr_valid(s[0]))   t0 = cyc;
      if (tw < 0 && dr_valid(s[W-1])) tw = cyc;
    end
  end

  initial begin
    for (int k = 0; k < NTOK; k++) begin
      av[k] = (k == 0) ? '1 : W'({$urandom, $urandom});
      bv[k] = (k == 0) ? W'(1) : (k == 1) ? '0 : W'({$urandom, $urandom});
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g_u[0].dn && g_u[1].dn);
    @(posedge clk);
    for (int k = 0; k < NTOK; k++) begin
      checks += 2;
      if (g_u[0].got[k] !== W'(av[k] + bv[k])) begin
        failures++; $display("FAIL add %0d: %h+%h got %h", k, av[k], bv[k], g_u[0].got[k]);
      end
      if (g_u[1].got[k] !== W'(av[k] - bv[k])) begin
        failures++; $display("FAIL sub %0d: %h-%h got %h", k, av[k], bv[k], g_u[1].got[k]);
      end
    end
    checks += 2;
    if (g_u[0].errs + g_u[1].errs != 0) begin failures++; $display("FAIL protocol"); end
    if (g_u[0].tw - g_u[0].t0 < W - 1) begin
      failures++; $display("FAIL skew: bit0 at %0d, bit%0d at %0d", g_u[0].t0, W-1, g_u[0].tw);
    end
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
