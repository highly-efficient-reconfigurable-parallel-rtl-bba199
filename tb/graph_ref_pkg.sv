// graph_ref_pkg: software reference for the testbenches.
//
// ref_graph holds a W x H 4-connected grid graph with source weights cs, sink weights ct
// and arc capacities cap[d*n + i] (arc from node i in direction d: 0 right, 1 left,
// 2 down, 3 up). mincut() computes the maximum flow with the textbook Edmonds-Karp
// method, keeping separate residuals for the source arcs, the sink arcs and the grid
// arcs, and returns the flow value; src[] is then the set of nodes reachable from the
// source in the final residual graph (the smallest minimum-cut source side, which is
// unique). energy() returns the cut cost of any labelling (1 = source side).
package graph_ref_pkg;

  class ref_graph;
    int W, H, n;
    int cs[], ct[], cap[];
    bit src[];

    function new(int w, int h);
      W = w; H = h; n = w * h;
      cs = new[n]; ct = new[n]; cap = new[4 * n]; src = new[n];
      foreach (cs[i]) begin cs[i] = 0; ct[i] = 0; src[i] = 0; end
      foreach (cap[i]) cap[i] = 0;
    endfunction

    function int nb(int i, int d);  // neighbour or -1
      int r = i / W, c = i % W;
      case (d)
        0: return (c == W - 1) ? -1 : i + 1;
        1: return (c == 0)     ? -1 : i - 1;
        2: return (r == H - 1) ? -1 : i + W;
        default: return (r == 0) ? -1 : i - W;
      endcase
    endfunction

    function longint mincut();
      int rs[], rt[], r[], pn[], pdir[], qq[];
      bit seen[];
      longint flow = 0;
      int qh, qt, e, b, v, w;
      rs = new[n]; rt = new[n]; r = new[4 * n]; pn = new[n]; pdir = new[n];
      qq = new[n]; seen = new[n];
      foreach (rs[i]) begin rs[i] = cs[i]; rt[i] = ct[i]; end
      foreach (r[i]) r[i] = cap[i];
      forever begin
        foreach (seen[i]) seen[i] = 0;
        qh = 0; qt = 0; e = -1;
        foreach (rs[i]) if (rs[i] > 0) begin seen[i] = 1; pn[i] = -1; qq[qt++] = i; end
        while (qh < qt && e < 0) begin
          v = qq[qh++];
          if (rt[v] > 0) e = v;
          else for (int d = 0; d < 4; d++) begin
            w = nb(v, d);
            if (w >= 0 && r[d * n + v] > 0 && !seen[w]) begin
              seen[w] = 1; pn[w] = v; pdir[w] = d; qq[qt++] = w;
            end
          end
        end
        if (e < 0) break;
        b = rt[e];
        v = e;
        while (pn[v] >= 0) begin
          if (r[pdir[v] * n + pn[v]] < b) b = r[pdir[v] * n + pn[v]];
          v = pn[v];
        end
        if (rs[v] < b) b = rs[v];
        rt[e] -= b;
        v = e;
        while (pn[v] >= 0) begin
          r[pdir[v] * n + pn[v]] -= b;
          r[(pdir[v] ^ 1) * n + v] += b;
          v = pn[v];
        end
        rs[v] -= b;
        flow += b;
      end
      foreach (src[i]) src[i] = seen[i];
      return flow;
    endfunction

    function longint energy(bit x[]);
      longint en = 0;
      for (int i = 0; i < n; i++) begin
        en += x[i] ? ct[i] : cs[i];
        for (int d = 0; d < 4; d++) begin
          int j = nb(i, d);
          if (j >= 0 && x[i] && !x[j]) en += cap[d * n + i];
        end
      end
      return en;
    endfunction
  endclass

endpackage
