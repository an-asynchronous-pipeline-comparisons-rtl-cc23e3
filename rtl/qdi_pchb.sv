// qdi_pchb: one pre-charged half buffer (PCHB) cell, the unit every part of the
// multiplier is built from.
//
// The cell holds NO dual-rail output bits. Its parent computes the cell's
// function F combinationally from the input rails and presents it on `f`,
// together with the left completion signals `lv` (every input channel holds a
// token) and `ln` (every input channel is neutral). The right completion is
// taken from the cell's own outputs. The cell follows the PCHB four-phase rules:
//   evaluate   R := F(L)   when le = 1, the receivers are enabled (re_hi) and lv;
//   precharge  R := null   when le = 0 and the receivers have disabled (re_lo);
//   le falls when inputs and outputs are both valid, and rises again when both
//   are neutral (a C-element on left and right completion).
// `le` is the active-high enable (inverted acknowledge) returned to every sender.
// With several receivers, re_hi is the AND of their enables and re_lo the NOR;
// together they act as the C-element a fork needs. A cell may write only some of
// its outputs in one token (a split); the right completion is then "any output
// valid", which equals "all valid" for a cell that writes all of them.
//
// Timing: this is a clocked emulation of the self-timed cell. Every rule is
// evaluated once per clock from registered state, so a token crosses one cell in
// one clock and a lone cell completes a full four-phase cycle in about four.
// `ev` and `pc` pulse for one clock when the cell evaluates or precharges.
// The PCHB template is the published design's; the clocked emulation, the reset
// state (outputs neutral, le = 1) and the asynchronous active-low reset are this
// implementation's.
module qdi_pchb
  import dr_pkg::*;
#(
  parameter int unsigned NO = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lv,
  input  logic             ln,
  input  dr_t [NO-1:0]     f,
  input  logic             re_hi,
  input  logic             re_lo,
  output dr_t [NO-1:0]     r,
  output logic             le,
  output logic             ev,
  output logic             pc
);

  logic ov;  // some output holds a token
  always_comb begin
    ov = 1'b0;
    for (int i = 0; i < int'(NO); i++) ov |= dr_valid(r[i]);
  end

  assign ev = le && re_hi && lv && !ov;
  assign pc = !le && re_lo && ov;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r  <= '0;
      le <= 1'b1;
    end else begin
      if (ev)      r <= f;
      else if (pc) r <= '0;
      if (lv && ov)       le <= 1'b0;
      else if (ln && !ov) le <= 1'b1;
    end
  end

  // A dual-rail output never drives both rails.
  for (genvar i = 0; i < int'(NO); i++) begin : g_chk
    a_rails : assert property (@(posedge clk) disable iff (!rst_n) !(r[i].t && r[i].f));
  end
  // A token is only replaced by the neutral state, never by another token.
  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n)
                                    ov |=> (r == $past(r)) || !ov);

endmodule
