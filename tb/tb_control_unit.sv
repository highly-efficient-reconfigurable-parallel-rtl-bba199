// tb_control_unit: the control unit at its defaults (16 cores of 32 x 32, step 8 halved
// every 8 iterations, at most 256 solves) against behavioural cores kept in the testbench.
// Batch 1: the solve must wait for load_idle; the first labels disagree at random
// overlap positions, and every dual step (core, node, sign and size) is compared with the
// list worked out from the labels; the second labels agree, so the batch must end
// converged after 2 solves, with the write-back bytes equal to the labels, core by core,
// eight per byte, lowest node in bit 0, and a clear of the cores. Batch 2: one overlap
// position never agrees; the unit must stop after 256 solves, unconverged, and the step
// sizes seen must follow 8, 4, 2, 1 over the iterations.
module tb_control_unit;
  import bk_pkg::*;
  localparam int NC = 16, W = 32, H = 32, N = W * H, IW = $clog2(N);
  localparam int LAST = (H - 1) * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic solve_req, load_idle, core_clear, core_start, wb_valid, wb_ready, busy, done, converged;
  logic [NC-1:0] core_idle, core_done, adj_valid;
  logic [N-1:0] core_labels [NC];
  logic [IW-1:0] adj_idx [NC];
  logic signed [TR_W-1:0] adj_delta [NC];
  logic [7:0] wb_data;
  logic [15:0] iterations;
  logic [31:0] n_adjust;

  control_unit dut (.clk, .rst_n, .solve_req, .load_idle, .core_idle, .core_done, .core_labels,
                    .core_clear, .core_start, .adj_valid, .adj_idx, .adj_delta, .wb_data,
                    .wb_valid, .wb_ready, .busy, .done, .converged, .iterations, .n_adjust);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural cores: busy for a random time after each start, then done for one cycle
  int solves = 0;
  int remain [NC];
  always @(posedge clk) begin
    if (core_start) begin
      solves++;
      check(&core_idle, "start while a core is busy");
    end
    for (int c = 0; c < NC; c++) begin
      core_done[c] <= 1'b0;
      if (core_start) begin
        remain[c]    <= 3 + int'($urandom % 40);
        core_idle[c] <= 1'b0;
      end else if (!core_idle[c]) begin
        if (remain[c] == 0) begin
          core_done[c] <= 1'b1;
          core_idle[c] <= 1'b1;
        end else remain[c] <= remain[c] - 1;
      end
    end
  end

  // record adjustments: key = core*N + node, value = delta
  int adj_seen[int];
  int adj_count = 0;
  int step_of_iter[int];
  always @(posedge clk)
    for (int c = 0; c < NC; c++)
      if (adj_valid[c]) begin
        adj_count++;
        adj_seen[c * N + int'(adj_idx[c])] = int'(adj_delta[c]);
        step_of_iter[int'(iterations)] = (adj_delta[c] < 0) ? -int'(adj_delta[c]) : int'(adj_delta[c]);
        check(core_idle[c], "adjustment sent to a busy core");
      end

  initial begin
    core_idle = '1;
    core_done = '0;
  end

  int clears = 0;
  always @(posedge clk) if (core_clear) clears++;

  initial begin
    int nb, expect_n;
    int exp_adj[int];
    bit ok;
    solve_req = 0; load_idle = 0; wb_ready = 1;
    for (int c = 0; c < NC; c++) core_labels[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- batch 1
    for (int c = 0; c < NC; c++) core_labels[c] = {32{$urandom}};
    expect_n = 0;
    for (int b = 0; b + 1 < NC; b++)
      for (int p = 0; p < W; p++) begin
        bit a, bb;
        a  = core_labels[b][LAST + p];
        bb = core_labels[b + 1][p];
        if (a != bb) begin
          exp_adj[b * N + LAST + p]  = a ? -8 : 8;
          exp_adj[(b + 1) * N + p]   = a ? 8 : -8;
          expect_n += 2;
        end
      end
    solve_req <= 1; @(posedge clk); solve_req <= 0;
    repeat (20) @(posedge clk);
    check(solves == 0, "solve started before the load was idle");
    load_idle <= 1;
    wait (solves == 1);
    // wait for the exchange to finish (second start)
    wait (solves == 2);
    check(adj_count == expect_n, $sformatf("%0d adjustments, expected %0d", adj_count, expect_n));
    ok = (adj_seen.num() == exp_adj.num());
    foreach (exp_adj[k]) if (!adj_seen.exists(k) || adj_seen[k] != exp_adj[k]) ok = 0;
    check(ok, "adjustments differ from the expected list");
    // second solve: make the copies agree
    for (int b = 0; b + 1 < NC; b++)
      for (int p = 0; p < W; p++) core_labels[b + 1][p] = core_labels[b][LAST + p];
    nb = 0;
    while (!done) begin
      @(negedge clk);
      if (wb_valid && wb_ready) begin
        check(wb_data === core_labels[nb / (N / 8)][(nb % (N / 8)) * 8 +: 8],
              $sformatf("write-back byte %0d wrong", nb));
        nb++;
      end
    end
    check(nb == NC * N / 8, $sformatf("%0d write-back bytes", nb));
    repeat (2) @(posedge clk);
    check(converged && iterations == 2, $sformatf("batch 1: converged=%0d iterations=%0d", converged, iterations));
    check(clears == 1, "cores not cleared after write-back");
    check(n_adjust == 32'(expect_n / 2), "n_adjust wrong");

    // ---------------- batch 2: position 5 of boundary 3 never agrees
    step_of_iter.delete();
    solve_req <= 1; @(posedge clk); solve_req <= 0;
    fork
      forever begin
        @(posedge clk);
        core_labels[4][5]        = ~core_labels[3][LAST + 5];
      end
    join_none
    wait (done);
    @(posedge clk);
    check(!converged && iterations == 256, $sformatf("batch 2: converged=%0d iterations=%0d", converged, iterations));
    for (int it = 1; it <= 256; it++) begin
      int want;
      want = (it <= 8) ? 8 : (it <= 16) ? 4 : (it <= 24) ? 2 : 1;
      check(step_of_iter.exists(it) && step_of_iter[it] == want,
            $sformatf("iteration %0d: step %0d, expected %0d", it, step_of_iter.exists(it) ? step_of_iter[it] : -1, want));
    end
    check(!busy, "busy after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
