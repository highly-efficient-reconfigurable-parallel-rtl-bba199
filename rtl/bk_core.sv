// bk_core: one graph-cut core. It builds a grid sub-graph from commands and computes its
// minimum s-t cut with breadth-first augmenting-path search.
//
// Graph storage. The sub-graph is a GRID_W x GRID_H 4-connected grid (1K nodes by
// default, as in the document). Per node the core keeps a signed terminal residual
// tr = (source weight - sink weight), positive meaning spare capacity from the source,
// negative spare capacity to the sink, plus the residual capacity of its four outgoing
// arcs rc[dir][node]. A node command sets tr; an arc command sets both arc directions.
// Four arcs per node matches the document's 16K nodes / 64K edges for 16 cores.
//
// Solving. Nodes are taken in index order as roots; each node with tr > 0 that is not
// yet visited seeds a breadth-first search over arcs with residual capacity, one arc
// per cycle. When the search reaches a node with tr < 0, the path is traced back twice
// through the parent-direction array: once to find the bottleneck, once to push it
// (tr of both ends and the arcs on the path are updated, reverse arcs gain the same
// amount). The tree of that root is then unmarked and searched again. A tree whose search
// ends without reaching a sink is left marked: no later augmentation starts, ends or
// passes inside it, so it can never reach a sink again and is not searched again. When
// the last root is done the marked set is exactly the set of nodes reachable from the
// source in the residual graph, which is the source side of the minimum cut; it is
// copied to labels (1 = source side).
// The document's cores run the BK algorithm, which grows a source and a sink search tree
// and reuses them between augmentations; this core keeps only source trees and rebuilds
// the current tree after each augmentation. It computes the same minimum cut.
//
// Dual updates. Between solves the control unit may add a signed amount to the tr of
// any node (adj_*), which is how the dual variables of the overlap nodes enter the
// sub-graph. The residual graph is kept, so the next solve continues from the flow
// already found and only fixes what the change disturbed.
//
// Interface and timing. After reset, and after a clear pulse, the core spends N cycles
// zeroing its graph (idle low). While idle it accepts one command per cycle (cmd_ready)
// and one adjustment per cycle. A start pulse while idle starts a solve; done pulses for
// one cycle when labels are valid, and the core is idle again. arc_err is set sticky by
// an arc whose end points are not grid neighbours; such an arc is ignored.
module bk_core
  import bk_pkg::*;
#(
  parameter int unsigned GRID_W = 32,
  parameter int unsigned GRID_H = 32,
  localparam int unsigned N     = GRID_W * GRID_H,
  localparam int unsigned IW    = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // graph building
  input  cmd_t                   cmd,
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  // control
  input  logic                   clear,
  input  logic                   start,
  input  logic                   adj_valid,
  input  logic [IW-1:0]          adj_idx,
  input  logic signed [TR_W-1:0] adj_delta,
  output logic                   idle,
  output logic                   done,
  output logic [N-1:0]           labels,
  output logic [31:0]            n_aug,
  output logic                   arc_err
);
  typedef enum logic [2:0] {
    S_CLR, S_IDLE, S_SCAN, S_POP, S_EXP, S_AUG1, S_AUG2, S_UNV
  } state_e;

  state_e state;

  logic signed [TR_W-1:0] tr  [N];
  logic [RC_W-1:0]        rc  [4][N];
  logic [1:0]             par [N];
  logic [IW-1:0]          q   [N];
  logic [N-1:0]           vis;

  logic [IW:0]   scan, head, tail, qroot, uptr;
  logic [IW-1:0] u, cur, root, endn;
  logic [1:0]    d;
  logic [TR_W-1:0] bott;

  // ---- grid helpers
  function automatic logic nbr_ok(logic [IW-1:0] n, logic [1:0] dir);
    case (dir_e'(dir))
      DIR_R:   return (32'(n) % GRID_W) != GRID_W - 1;
      DIR_L:   return (32'(n) % GRID_W) != 0;
      DIR_D:   return (32'(n) / GRID_W) != GRID_H - 1;
      default: return (32'(n) / GRID_W) != 0;
    endcase
  endfunction

  function automatic logic [IW-1:0] nbr(logic [IW-1:0] n, logic [1:0] dir);
    case (dir_e'(dir))
      DIR_R:   return n + 1'b1;
      DIR_L:   return n - 1'b1;
      DIR_D:   return n + IW'(GRID_W);
      default: return n - IW'(GRID_W);
    endcase
  endfunction

  // ---- arc command decoding
  logic [IW-1:0] ci, cj;
  logic [1:0]    cdir;
  logic          cok;
  always_comb begin
    ci   = cmd.i[IW-1:0];
    cj   = cmd.j[IW-1:0];
    cdir = 2'd0;
    cok  = 1'b0;
    if (32'(cmd.i) < N && 32'(cmd.j) < N) begin
      for (int k = 0; k < 4; k++) begin
        if (nbr_ok(ci, 2'(k)) && nbr(ci, 2'(k)) == cj) begin
          cdir = 2'(k);
          cok  = 1'b1;
        end
      end
    end
  end

  // ---- search-step signals
  logic [IW-1:0] v_exp;
  logic          ok_exp;
  assign v_exp  = nbr(u, d);
  assign ok_exp = nbr_ok(u, d) && (rc[d][u] != '0) && !vis[v_exp];

  logic [1:0]    pd;          // parent direction of cur
  logic [IW-1:0] pu;          // parent of cur
  assign pd = par[cur];
  assign pu = nbr(cur, pd ^ 2'd1);

  logic [TR_W-1:0] rc_path, tr_root, b_fin;
  assign rc_path = TR_W'(rc[pd][pu]);
  assign tr_root = TR_W'(tr[root]);
  assign b_fin   = (tr_root < bott) ? tr_root : bott;

  assign idle      = (state == S_IDLE);
  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLR;
      scan    <= '0;
      head    <= '0;
      tail    <= '0;
      qroot   <= '0;
      uptr    <= '0;
      u       <= '0;
      cur     <= '0;
      root    <= '0;
      endn    <= '0;
      d       <= '0;
      bott    <= '0;
      vis     <= '0;
      labels  <= '0;
      done    <= 1'b0;
      n_aug   <= '0;
      arc_err <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_CLR: begin
          tr[scan[IW-1:0]] <= '0;
          for (int k = 0; k < 4; k++) rc[k][scan[IW-1:0]] <= '0;
          if (scan == (IW+1)'(N - 1)) begin
            scan  <= '0;
            state <= S_IDLE;
          end else begin
            scan <= scan + 1'b1;
          end
        end

        S_IDLE: begin
          if (clear) begin
            scan    <= '0;
            arc_err <= 1'b0;
            state   <= S_CLR;
          end else if (start) begin
            vis   <= '0;
            head  <= '0;
            tail  <= '0;
            scan  <= '0;
            state <= S_SCAN;
          end else begin
            if (cmd_valid) begin
              if (cmd.op == CMD_NODE) begin
                if (32'(cmd.i) < N)
                  tr[ci] <= $signed(TR_W'(cmd.a)) - $signed(TR_W'(cmd.b));
              end else if (cok) begin
                rc[cdir][ci]        <= RC_W'(cmd.a);
                rc[cdir ^ 2'd1][cj] <= RC_W'(cmd.b);
              end else begin
                arc_err <= 1'b1;
              end
            end
            if (adj_valid) tr[adj_idx] <= tr[adj_idx] + adj_delta;
          end
        end

        S_SCAN: begin
          if (head != tail) begin
            state <= S_POP;
          end else if (scan == (IW+1)'(N)) begin
            labels <= vis;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            if (!vis[scan[IW-1:0]] && tr[scan[IW-1:0]] > 0) begin
              vis[scan[IW-1:0]] <= 1'b1;
              q[tail[IW-1:0]]   <= scan[IW-1:0];
              qroot             <= tail;
              root              <= scan[IW-1:0];
              tail              <= tail + 1'b1;
            end
            scan <= scan + 1'b1;
          end
        end

        S_POP: begin
          u     <= q[head[IW-1:0]];
          head  <= head + 1'b1;
          d     <= '0;
          state <= S_EXP;
        end

        S_EXP: begin
          if (ok_exp && tr[v_exp] < 0) begin
            vis[v_exp] <= 1'b1;
            par[v_exp] <= d;
            endn       <= v_exp;
            cur        <= v_exp;
            bott       <= TR_W'(-tr[v_exp]);
            state      <= S_AUG1;
          end else begin
            if (ok_exp) begin
              vis[v_exp]      <= 1'b1;
              par[v_exp]      <= d;
              q[tail[IW-1:0]] <= v_exp;
              tail            <= tail + 1'b1;
            end
            if (d == 2'd3) state <= S_SCAN;
            d <= d + 1'b1;
          end
        end

        // walk from the sink end to the root, taking the minimum residual
        S_AUG1: begin
          if (cur == root) begin
            bott     <= b_fin;
            tr[endn] <= tr[endn] + $signed(b_fin);
            cur      <= endn;
            state    <= S_AUG2;
          end else begin
            if (rc_path < bott) bott <= rc_path;
            cur <= pu;
          end
        end

        // walk again, pushing the bottleneck along the path
        S_AUG2: begin
          if (cur == root) begin
            tr[root]   <= tr[root] - $signed(bott);
            vis[endn]  <= 1'b0;
            n_aug      <= n_aug + 1'b1;
            uptr       <= qroot;
            state      <= S_UNV;
          end else begin
            rc[pd][pu]         <= rc[pd][pu] - RC_W'(bott);
            rc[pd ^ 2'd1][cur] <= rc[pd ^ 2'd1][cur] + RC_W'(bott);
            cur                <= pu;
          end
        end

        // unmark the tree just used, then search again from the same root
        S_UNV: begin
          if (uptr == tail) begin
            head  <= qroot;
            tail  <= qroot;
            scan  <= {1'b0, root};
            state <= S_SCAN;
          end else begin
            vis[q[uptr[IW-1:0]]] <= 1'b0;
            uptr <= uptr + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_solve_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                      start |-> state == S_IDLE || state == S_CLR);
endmodule
