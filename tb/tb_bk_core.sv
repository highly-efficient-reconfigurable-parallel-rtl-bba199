// tb_bk_core: self-checking test of one graph-cut core at its default 32 x 32 size.
//
// Random grid graphs are loaded through the command port, solved, and the labels are
// compared bit by bit with the source side found by an independent Edmonds-Karp solver
// (graph_ref_pkg); the cut energy of the labels must equal the maximum flow. Then
// terminal adjustments are applied through the adj port, the core re-solves from its
// kept residual graph and is compared with a fresh reference solve of the changed graph.
// A clear followed by a new graph, and an arc between non-neighbours (arc_err), are
// also exercised.
module tb_bk_core;
  import bk_pkg::*;
  import graph_ref_pkg::*;

  localparam int W = 32, H = 32, N = W * H, IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cmd_t cmd;
  logic cmd_valid, cmd_ready, clear, start, adj_valid, idle, done, arc_err;
  logic [IW-1:0] adj_idx;
  logic signed [TR_W-1:0] adj_delta;
  logic [N-1:0] labels;
  logic [31:0] n_aug;

  int checks = 0, failures = 0;

  bk_core dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .clear, .start, .adj_valid,
               .adj_idx, .adj_delta, .idle, .done, .labels, .n_aug, .arc_err);

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(cmd_t c);
    // valid stays high between back-to-back commands; the caller drops it
    cmd <= c; cmd_valid <= 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
  endtask

  task automatic load(ref_graph g);
    cmd_t c;
    for (int i = 0; i < N; i++) begin
      c = '0; c.op = CMD_NODE; c.i = GID_W'(i);
      c.a = CAP_W'(g.cs[i]); c.b = CAP_W'(g.ct[i]);
      send(c);
    end
    for (int i = 0; i < N; i++)
      for (int d = 0; d < 4; d += 2) begin
        int j = g.nb(i, d);
        if (j >= 0) begin
          c = '0; c.op = CMD_ARC; c.i = GID_W'(i); c.j = GID_W'(j);
          c.a = CAP_W'(g.cap[d * N + i]); c.b = CAP_W'(g.cap[(d ^ 1) * N + j]);
          send(c);
        end
      end
    cmd_valid <= 0;
  endtask

  task automatic solve_and_compare(ref_graph g, string tag);
    longint flow;
    bit x[];
    int mism = 0;
    int cyc = 0;
    start <= 1; @(posedge clk); start <= 0;
    while (!done) begin @(posedge clk); cyc++; end
    flow = g.mincut();
    x = new[N];
    for (int i = 0; i < N; i++) begin
      x[i] = labels[i];
      if (labels[i] !== g.src[i]) mism++;
    end
    check(mism == 0, $sformatf("%s: %0d labels differ from reference", tag, mism));
    check(g.energy(x) == flow, $sformatf("%s: cut %0d != max flow %0d", tag, g.energy(x), flow));
    $display("%s: flow=%0d solve cycles=%0d augmentations=%0d", tag, flow, cyc, n_aug);
    @(posedge clk);
  endtask

  task automatic random_graph(ref_graph g, int tmax, int amax);
    for (int i = 0; i < N; i++) begin
      g.cs[i] = ($urandom % 3 == 0) ? 0 : $urandom % tmax;
      g.ct[i] = ($urandom % 3 == 0) ? 0 : $urandom % tmax;
      for (int d = 0; d < 4; d++) g.cap[d * N + i] = (g.nb(i, d) >= 0) ? $urandom % amax : 0;
    end
  endtask

  initial begin
    ref_graph g;
    cmd = '0; cmd_valid = 0; clear = 0; start = 0; adj_valid = 0; adj_idx = '0; adj_delta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idle);
    @(posedge clk);

    for (int t = 0; t < 3; t++) begin
      g = new(W, H);
      random_graph(g, (t == 2) ? 3000 : 40, (t == 2) ? 2000 : 25);
      if (t > 0) begin
        clear <= 1; @(posedge clk); clear <= 0;
        @(posedge clk);
        while (!idle) @(posedge clk);
      end
      load(g);
      solve_and_compare(g, $sformatf("graph %0d", t));
      // dual-style adjustments, then incremental re-solve
      for (int r = 0; r < 3; r++) begin
        for (int k = 0; k < 40; k++) begin
          int idx, dl;
          idx = $urandom % N;
          dl = int'($urandom % 21) - 10;
          adj_idx <= IW'(idx); adj_delta <= TR_W'(dl); adj_valid <= 1;
          @(posedge clk);
          if (dl > 0) g.cs[idx] += dl; else g.ct[idx] -= dl;
        end
        adj_valid <= 0;
        solve_and_compare(g, $sformatf("graph %0d adjust %0d", t, r));
      end
    end

    // an arc between nodes that are not neighbours is refused
    check(!arc_err, "arc_err set without cause");
    begin
      cmd_t c = '0;
      c.op = CMD_ARC; c.i = 0; c.j = 5; c.a = 1; c.b = 1;
      send(c);
      cmd_valid <= 0;
      @(posedge clk);
      check(arc_err, "arc_err not set for a non-neighbour arc");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
