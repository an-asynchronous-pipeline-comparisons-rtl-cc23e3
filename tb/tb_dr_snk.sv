// tb_dr_snk: testbench receiver for N dual-rail bits, each with its own
// four-phase handshake. Bit i records each token it sees into got[k][i]
// (k = 0, 1, ...), drops its enable en[i], and raises it again once the bit is
// neutral. With JITTER set, each bit waits a random 0..5 clocks before each
// enable change, which stalls the sender now and then. `done` rises when every
// bit has received NTOK tokens. A token that changes value while held counts
// as a protocol error in `errors`.
module tb_dr_snk
  import dr_pkg::*;
#(
  parameter int N      = 8,
  parameter int NTOK   = 4,
  parameter bit JITTER = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_t  [N-1:0]  d,
  output logic [N-1:0]  en,
  output logic [N-1:0]  got [NTOK],
  output logic          done,
  output int            errors
);
  int idx    [N];
  int wait_c [N];
  logic [N-1:0] fin;
  int err_bit [N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        en[i]      <= 1'b1;
        idx[i]     <= 0;
        wait_c[i]  <= 0;
        err_bit[i] <= 0;
        for (int k = 0; k < NTOK; k++) got[k][i] <= 1'b0;
      end else begin
        if (d[i].t && d[i].f) err_bit[i] <= err_bit[i] + 1;
        if (!en[i] && dr_valid(d[i]) && idx[i] < NTOK && d[i].t != got[idx[i]][i])
          err_bit[i] <= err_bit[i] + 1;
        if (wait_c[i] > 0) begin
          wait_c[i] <= wait_c[i] - 1;
        end else if (en[i] && dr_valid(d[i]) && idx[i] < NTOK) begin
          got[idx[i]][i] <= dr_bit(d[i]);
          en[i]          <= 1'b0;
          wait_c[i]      <= JITTER ? int'($urandom_range(0, 5)) : 0;
        end else if (!en[i] && !dr_valid(d[i])) begin
          en[i]     <= 1'b1;
          idx[i]    <= idx[i] + 1;
          wait_c[i] <= JITTER ? int'($urandom_range(0, 5)) : 0;
        end
      end
    end
    assign fin[i] = (idx[i] >= NTOK);
  end
  assign done = &fin;
  always_comb begin
    errors = 0;
    for (int i = 0; i < N; i++) errors += err_bit[i];
  end
endmodule
