// tb_bk_parallel_engine: end-to-end test of the parallel graph-cut engine at reduced size (4 cores of 8 x 8 nodes).
//
// The testbench plays the host. It makes a random grid graph of NC*(H-1)+1 rows by W
// columns with even weights, cuts it into NC sub-graphs of W x H nodes whose boundary
// rows overlap, halving the weights of overlap nodes and of the arcs inside overlap
// rows, and streams the sub-graphs as packets: each node and each right/down arc of
// each core, delta coded against the previous packet of the same kind for that core
// when every difference fits in a signed byte, interleaved core by core. After the batch
// it requests a solve, collects the written-back labels and checks them against an
// independent Edmonds-Karp solve of the whole graph (graph_ref_pkg): when the engine
// reports convergence the two copies of every overlap node must agree and the cut of the
// joined labelling must equal the maximum flow. Batches (run back to back): 3.
// Each mechanism must occur at least once: compressed and plain packets, a bus stall on a
// full FIFO, a dual exchange step, a re-solve after an exchange, convergence. The load is
// also timed: the bus must be busy for at least 90% of the cycles while it streams,
// since graph building in the cores keeps pace with the bus.
module tb_bk_parallel_engine;
  import bk_pkg::*;
  import graph_ref_pkg::*;

  localparam int NC = 4, W = 8, H = 8, N = W * H;
  localparam int ROWS = NC * (H - 1) + 1, GN = ROWS * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  bus_data;
  logic        bus_valid, bus_ready, solve_req;
  logic [7:0]  wb_data;
  logic        wb_valid, wb_ready;
  logic        busy, done, converged, arc_err;
  logic [15:0] iterations;
  logic [31:0] n_pkt_compressed, n_pkt_plain, n_bus_stall, n_adjust, n_aug;

  bk_parallel_engine #(.N_CORES(4), .GRID_W(8), .GRID_H(8), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .bus_data, .bus_valid, .bus_ready, .solve_req,
    .wb_data, .wb_valid, .wb_ready, .busy, .done, .converged, .iterations,
    .n_pkt_compressed, .n_pkt_plain, .n_bus_stall, .n_adjust, .n_aug, .arc_err
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5_000_000) @(posedge clk);
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

  // ---------------- host side: split, encode, stream
  byte unsigned stream[$];
  int  ref_node[NC], ref_cs[NC], ref_ct[NC], ref_arc[NC], ref_cap[NC], ref_rev[NC];

  function automatic bit fits(int d);
    return d >= -128 && d <= 127;
  endfunction

  function automatic void put_node(int c, int id, int cs, int ct);
    int dcs = cs - ref_cs[c], dct = ct - ref_ct[c];
    if (id == ref_node[c] + 1 && fits(dcs) && fits(dct)) begin
      stream.push_back(8'h40); stream.push_back(8'(dcs)); stream.push_back(8'(dct));
    end else begin
      stream.push_back({2'b00, 6'(id >> 8)}); stream.push_back(8'(id));
      stream.push_back(8'(cs >> 8)); stream.push_back(8'(cs));
      stream.push_back(8'(ct >> 8)); stream.push_back(8'(ct));
    end
    ref_node[c] = id; ref_cs[c] = cs; ref_ct[c] = ct;
  endfunction

  function automatic void put_arc(int c, int i, int j, int dir, int cap, int rev);
    int di = i - ref_arc[c], dc = cap - ref_cap[c], dr = rev - ref_rev[c];
    if (fits(di) && fits(dc) && fits(dr)) begin
      stream.push_back({6'b110000, 2'(dir)}); stream.push_back(8'(di));
      stream.push_back(8'(dc)); stream.push_back(8'(dr));
    end else begin
      stream.push_back({2'b10, 6'(i >> 8)}); stream.push_back(8'(i));
      stream.push_back({2'b00, 6'(j >> 8)}); stream.push_back(8'(j));
      stream.push_back(8'(cap >> 8)); stream.push_back(8'(cap));
      stream.push_back(8'(rev >> 8)); stream.push_back(8'(rev));
    end
    ref_arc[c] = i; ref_cap[c] = cap; ref_rev[c] = rev;
  endfunction

  function automatic bit shared_row(int gr);
    return gr > 0 && gr < ROWS - 1 && (gr % (H - 1)) == 0;
  endfunction

  function automatic void encode(ref_graph g);
    int gi, cs, ct;
    stream.delete();
    for (int c = 0; c < NC; c++) begin
      ref_node[c] = 16383; ref_cs[c] = 0; ref_ct[c] = 0;
      ref_arc[c] = 0; ref_cap[c] = 0; ref_rev[c] = 0;
    end
    // nodes: record l of every core, then record l+1 ...
    for (int l = 0; l < N; l++)
      for (int c = 0; c < NC; c++) begin
        gi = c * (H - 1) * W + l;
        cs = g.cs[gi]; ct = g.ct[gi];
        if (shared_row(gi / W)) begin cs /= 2; ct /= 2; end
        put_node(c, l, cs, ct);
      end
    // arcs: right then down of each local node
    for (int l = 0; l < N; l++)
      for (int d = 0; d < 4; d += 2)
        for (int c = 0; c < NC; c++) begin
          int lr, lc, lj, gj, cap, rev;
          lr = l / W;
          lc = l % W;
          if ((d == 0 && lc == W - 1) || (d == 2 && lr == H - 1)) continue;
          lj = (d == 0) ? l + 1 : l + W;
          gi = c * (H - 1) * W + l;
          gj = c * (H - 1) * W + lj;
          cap = g.cap[d * GN + gi]; rev = g.cap[(d ^ 1) * GN + gj];
          if (d == 0 && shared_row(gi / W)) begin cap /= 2; rev /= 2; end
          put_arc(c, l, lj, d, cap, rev);
        end
  endfunction

  // smooth random field with occasional jumps, even values
  function automatic void make_graph(ref_graph g, int seed_scale);
    int base_s = 200, base_t = 200, a = 60;
    for (int i = 0; i < GN; i++) begin
      if ($urandom % 8 == 0) begin base_s = $urandom % 600; base_t = $urandom % 600; end
      base_s += int'($urandom % 41) - 20; if (base_s < 0) base_s = 0; if (base_s > 1000) base_s = 1000;
      base_t += int'($urandom % 41) - 20; if (base_t < 0) base_t = 0; if (base_t > 1000) base_t = 1000;
      g.cs[i] = 2 * ((base_s * seed_scale) / 2);
      g.ct[i] = 2 * ((base_t * seed_scale) / 2);
      for (int d = 0; d < 4; d++) begin
        a += int'($urandom % 9) - 4; if (a < 0) a = 0; if (a > 300) a = 300;
        g.cap[d * GN + i] = (g.nb(i, d) >= 0) ? 2 * (a / 2) : 0;
      end
    end
  endfunction

  // ---------------- test
  int n_batches_conv = 0, n_resolve = 0;
  ref_graph g;

  initial begin
    longint flow, en;
    bit x[];
    bit lab[NC][N];
    int nb, mism, gi;
    longint t0, t1, t_done, bytes;

    bus_valid = 0; bus_data = 0; solve_req = 0; wb_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int bt = 0; bt < 3; bt++) begin
      g = new(W, ROWS);
      make_graph(g, 1 + bt);
      encode(g);
      bytes = stream.size();
      // stream the batch
      t0 = cyc;
      for (int k = 0; k < stream.size(); k++) begin
        bus_data <= stream[k]; bus_valid <= 1;
        @(posedge clk);
        while (!bus_ready) @(posedge clk);
      end
      bus_valid <= 0;
      t1 = cyc;
      solve_req <= 1; @(posedge clk); solve_req <= 0;
      // collect labels
      nb = 0;
      while (!done) begin
        @(posedge clk);
        if (wb_valid && wb_ready) begin
          for (int b = 0; b < 8; b++) lab[nb / (N / 8)][(nb % (N / 8)) * 8 + b] = wb_data[b];
          nb++;
        end
      end
      t_done = cyc;
      check(nb == NC * N / 8, $sformatf("batch %0d: %0d write-back bytes, expected %0d", bt, nb, NC * N / 8));
      check(!arc_err, "arc error flagged");
      $display("batch %0d: %0d bytes in %0d cycles; solve+exchange+write-back %0d cycles; iterations=%0d converged=%0d",
               bt, bytes, t1 - t0, t_done - t1, iterations, converged);
      if (bt == 0)
        check((t1 - t0) * 9 <= bytes * 10 + 10 * N,
              $sformatf("bus not kept busy during load: %0d bytes in %0d cycles", bytes, t1 - t0));
      if (iterations > 1) n_resolve++;
      // reference
      flow = g.mincut();
      check(g.energy(g.src) == flow, "reference cut differs from reference flow");
      x = new[GN];
      mism = 0;
      for (int c = 0; c < NC; c++)
        for (int l = 0; l < N; l++) begin
          gi = c * (H - 1) * W + l;
          if (c > 0 && l < W) begin
            if (lab[c][l] !== x[gi]) mism++;
          end else x[gi] = lab[c][l];
        end
      en = g.energy(x);
      $display("batch %0d: reference max flow %0d, engine cut %0d, overlap disagreements %0d",
               bt, flow, en, mism);
      if (converged) begin
        n_batches_conv++;
        check(mism == 0, "converged but overlap copies disagree");
        check(en == flow, $sformatf("batch %0d: cut %0d != max flow %0d", bt, en, flow));
      end
      check(en >= flow, "cut below the maximum flow");
      repeat (5) @(posedge clk);
    end

    $display("events: compressed=%0d plain=%0d bus_stall=%0d dual_steps=%0d resolves=%0d converged_batches=%0d augmentations=%0d",
             n_pkt_compressed, n_pkt_plain, n_bus_stall, n_adjust, n_resolve, n_batches_conv, n_aug);
    check(n_pkt_compressed > 0, "no compressed packet");
    check(n_pkt_plain > 0, "no uncompressed packet");
    check(n_bus_stall > 0, "no bus stall");
    check(n_adjust > 0, "no dual exchange step");
    check(n_resolve > 0, "no re-solve after an exchange");
    check(n_batches_conv > 0, "no batch converged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
