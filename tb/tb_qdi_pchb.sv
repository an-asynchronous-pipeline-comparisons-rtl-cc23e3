// tb_qdi_pchb: self-checking test of the PCHB cell.
// The cell is given two one-bit input channels (a join) and two output
// channels to two independent receivers (a fork), with F = {a AND b, a XOR b}.
// Random tokens are sent with jittered per-bit senders and receivers; the
// receivers' values are compared with F, and the four-phase rules are watched
// every clock: the outputs change only from neutral to valid and back, the
// enable le falls only while inputs and outputs are both valid, and it rises
// only while both are neutral.
module tb_qdi_pchb;
  import dr_pkg::*;
  localparam int NTOK = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] vin [NTOK];
  logic [1:0] got [NTOK];
  dr_t  [1:0] l, r, fv;
  logic [1:0] en;
  logic       le, ev, pc, ds, dn, lv, ln;
  int         errs, checks = 0, failures = 0, bad_hs = 0;

  tb_dr_src #(.N(2), .NTOK(NTOK)) u_src (.clk, .rst_n, .vals(vin), .d(l), .le({le, le}), .done(ds));

  assign lv = dr_valid(l[0]) && dr_valid(l[1]);
  assign ln = !dr_valid(l[0]) && !dr_valid(l[1]);
  assign fv[0] = dr_enc(dr_bit(l[0]) & dr_bit(l[1]));
  assign fv[1] = dr_enc(dr_bit(l[0]) ^ dr_bit(l[1]));

  qdi_pchb #(.NO(2)) dut (
    .clk, .rst_n, .lv, .ln, .f(fv), .re_hi(&en), .re_lo(~|en), .r, .le, .ev, .pc
  );

  tb_dr_snk #(.N(2), .NTOK(NTOK)) u_snk (.clk, .rst_n, .d(r), .en, .got, .done(dn), .errors(errs));

  // Handshake rules.
  logic le_q;
  dr_t [1:0] r_q;
  logic lv_q, ln_q, ov_q, on_q;
  always @(posedge clk) if (rst_n) begin
    if (le_q && !le && !(lv_q && ov_q)) bad_hs++;
    if (!le_q && le && !(ln_q && on_q)) bad_hs++;
    for (int i = 0; i < 2; i++)
      if (dr_valid(r_q[i]) && dr_valid(r[i]) && r_q[i] != r[i]) bad_hs++;
    le_q <= le; r_q <= r; lv_q <= lv; ln_q <= ln;
    ov_q <= dr_valid(r[0]) || dr_valid(r[1]);
    on_q <= !dr_valid(r[0]) && !dr_valid(r[1]);
  end

  initial begin
    le_q = 1'b1; r_q = '0; lv_q = 0; ln_q = 1; ov_q = 0; on_q = 1;
    for (int k = 0; k < NTOK; k++) vin[k] = 2'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (dn);
    @(posedge clk);
    for (int k = 0; k < NTOK; k++) begin
      checks++;
      if (got[k] !== {vin[k][0] ^ vin[k][1], vin[k][0] & vin[k][1]}) begin
        failures++; $display("FAIL token %0d: in %b got %b", k, vin[k], got[k]);
      end
    end
    checks++; if (errs != 0)   begin failures++; $display("FAIL protocol at receiver"); end
    checks++; if (bad_hs != 0) begin failures++; $display("FAIL handshake rules %0d", bad_hs); end
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
