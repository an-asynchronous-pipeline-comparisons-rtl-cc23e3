// tb_qdi_dct_mvm: end-to-end test of the QDI DCT matrix-vector multiplier at
// its default sizes (8-bit x, 22-bit results).
//
// A four-phase dual-rail sender streams the elements of NVEC input vectors
// (a few fixed corner vectors, then random ones, half of them small-valued as
// DCT inputs usually are). A receiver with a randomly slow enable collects the
// output vectors and compares every element with an integer model of
// Y = M * X computed here from the coefficient values 5792, 7568 and 3135
// (a, c, f times 2^14), modulo 2^22.
// It also counts that each mechanism of the design happened: overlap of
// elements in flight (a new element enters while the merging adder still works
// on an earlier one), output back-pressure, a skewed word (low bits of a
// product present before its top bit), the split reaching all four positions.
// A watchdog ends the run with a failure if the pipeline stalls.
module tb_qdi_dct_mvm;
  import dr_pkg::*;

  localparam int X_W  = 8;
  localparam int W    = 22;
  localparam int NVEC = 60;
  localparam int KA = 5792, KC = 7568, KF = 3135;

  logic clk = 1'b0, rst_n = 1'b0;
  dr_t [X_W-1:0]    x;
  logic             x_le;
  dr_t [3:0][W-1:0] y;
  logic             y_en;

  int checks = 0, failures = 0;
  int sent_elems = 0, got_vecs = 0;
  int n_overlap = 0, n_backpressure = 0, n_skew = 0;
  logic [3:0] split_seen = '0;
  int cycles = 0, t_last_in = -1, t_first_out = -1;

  qdi_dct_mvm dut (.clk, .rst_n, .x, .x_le, .y, .y_en);

  always #5 clk = ~clk;

  logic signed [X_W-1:0] xs [NVEC][4];

  function automatic logic [W-1:0] ref_y(input int v, input int k);
    int acc;
    int sa [4][4] = '{'{ KA, KA, KA, KA}, '{ KC, KF, -KF, -KC},
                      '{ KA,-KA,-KA, KA}, '{ KF,-KC,  KC, -KF}};
    acc = 0;
    for (int j = 0; j < 4; j++) acc += sa[k][j] * int'(xs[v][j]);
    return W'(acc);
  endfunction

  // Input vectors.
  initial begin
    for (int v = 0; v < NVEC; v++)
      for (int j = 0; j < 4; j++) begin
        if (v == 0)      xs[v][j] = 8'sd0;
        else if (v == 1) xs[v][j] = 8'sd127;
        else if (v == 2) xs[v][j] = -8'sd128;
        else if (v == 3) xs[v][j] = (j[0]) ? -8'sd128 : 8'sd127;
        else if (v[0])   xs[v][j] = X_W'($signed($urandom_range(0, 15)) - 8);
        else             xs[v][j] = X_W'($urandom);
      end
  end

  // Sender: four-phase, dual-rail.
  initial begin
    x = '0;
    wait (rst_n);
    for (int v = 0; v < NVEC; v++)
      for (int j = 0; j < 4; j++) begin
        do @(posedge clk); while (!x_le);
        for (int i = 0; i < X_W; i++) x[i] <= dr_enc(xs[v][j][i]);
        sent_elems++;
        if (v == 0 && j == 3) t_last_in = cycles;
        do @(posedge clk); while (x_le);
        x <= '0;
      end
  end

  // Receiver: four-phase, with random extra delay before each enable change.
  logic all_v, all_n;
  always_comb begin
    all_v = 1'b1; all_n = 1'b1;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < W; i++) begin
        all_v &= dr_valid(y[k][i]);
        all_n &= !dr_valid(y[k][i]);
      end
  end

  initial begin
    y_en = 1'b1;
    wait (rst_n);
    for (int v = 0; v < NVEC; v++) begin
      do @(posedge clk); while (!all_v);
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 20)) begin
        @(posedge clk);
        n_backpressure++;
      end
      for (int k = 0; k < 4; k++) begin
        logic [W-1:0] got;
        for (int i = 0; i < W; i++) got[i] = dr_bit(y[k][i]);
        checks++;
        if (got !== ref_y(v, k)) begin
          failures++;
          $display("FAIL vec %0d y%0d: got %h exp %h", v, k, got, ref_y(v, k));
        end
      end
      if (v == 0) t_first_out = cycles;
      got_vecs++;
      y_en <= 1'b0;
      do @(posedge clk); while (!all_n);
      y_en <= 1'b1;
    end
  end

  // Mechanism monitors.
  always @(posedge clk) if (rst_n) begin
    logic lo, hi;
    cycles++;
    // x carries a new element while the merging adder still works on the top
    // bit of an earlier one.
    if (dr_valid(x[0]) && dr_valid(dut.prod[0][W-1])) n_overlap++;
    lo = dr_valid(dut.prod[0][0]);
    hi = dr_valid(dut.prod[0][W-1]);
    if (lo && !hi) n_skew++;
    split_seen[dut.u_acc1.u_split.g_bit[0].j] <= 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (got_vecs == NVEC);
    @(posedge clk);
    $display("cycles=%0d vectors=%0d cycles/vector=%0d latency(last x of vector 0 to its y)=%0d",
             cycles, NVEC, cycles / NVEC, t_first_out - t_last_in);
    $display("overlap=%0d backpressure=%0d skew=%0d split_seen=%b",
             n_overlap, n_backpressure, n_skew, split_seen);
    checks++; if (n_overlap == 0)      begin failures++; $display("FAIL no overlap"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no backpressure"); end
    checks++; if (n_skew == 0)         begin failures++; $display("FAIL no skew seen"); end
    checks++; if (split_seen != 4'hf)  begin failures++; $display("FAIL split positions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d vectors", got_vecs, NVEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
