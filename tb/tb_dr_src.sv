// tb_dr_src: testbench sender for N dual-rail bits, each with its own
// four-phase handshake. Bit i sends bit i of vals[0], vals[1], ... in turn: it
// raises its rail when its enable le[i] is high, and returns to neutral when
// le[i] has fallen. A word-level channel is driven by tying every le[i] to the
// one enable. With JITTER set, each bit waits a random 0..3 clocks before each
// change, so the bits drift apart as in a skewed datapath. `done` rises when
// every bit has sent NTOK tokens.
module tb_dr_src
  import dr_pkg::*;
#(
  parameter int N      = 8,
  parameter int NTOK   = 4,
  parameter bit JITTER = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  vals [NTOK],
  output dr_t  [N-1:0]  d,
  input  logic [N-1:0]  le,
  output logic          done
);
  int idx  [N];
  int wait_c [N];
  logic [N-1:0] fin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d[i]      <= '0;
        idx[i]    <= 0;
        wait_c[i] <= 0;
      end else if (wait_c[i] > 0) begin
        wait_c[i] <= wait_c[i] - 1;
      end else if (idx[i] < NTOK) begin
        if (!dr_valid(d[i]) && le[i]) begin
          d[i] <= dr_enc(vals[idx[i]][i]);
          wait_c[i] <= JITTER ? int'($urandom_range(0, 3)) : 0;
        end else if (dr_valid(d[i]) && !le[i]) begin
          d[i]      <= '0;
          idx[i]    <= idx[i] + 1;
          wait_c[i] <= JITTER ? int'($urandom_range(0, 3)) : 0;
        end
      end
    end
    assign fin[i] = (idx[i] >= NTOK);
  end
  assign done = &fin;
endmodule
