// bk_parallel_engine: minimum s-t graph cut of a grid graph on N_CORES parallel cores.
//
// A batch is a grid graph of N_CORES * (GRID_H - 1) + 1 rows by GRID_W columns, cut by
// the host into N_CORES sub-graphs of GRID_W x GRID_H nodes (16 x 1K nodes by default)
// whose boundary rows overlap by one row. The host streams the sub-graphs over a byte-wide
// data bus as node and arc packets, delta compressed where the weight differences fit in
// a byte, interleaved so that consecutive packets belong to successive cores. Then:
//   load    load_arbiter hands packet k to the FIFO of core k mod N_CORES; per core a
//           delta_decoder expands the packets and the bk_core writes them into its graph
//           memory at once, so graph building runs on all cores while the bus streams;
//   solve   control_unit starts all cores; each computes the minimum cut of its sub-graph;
//   agree   control_unit compares the two copies of every overlap node and nudges the
//           dual variables of those that disagree into the cores' terminal weights; the
//           cores re-solve from their kept flow until all copies agree (or MAX_ITER);
//   write   the 1-bit labels of all cores are sent back on wb_*, core by core.
// The organisation (cores on a shared bus, per-core FIFOs behind a round-robin arbiter,
// delta compression, overlap agreement run by a control unit, label-only write-back)
// follows the document; the packet format, bus width, row-wise split and the iteration
// bound are this design's choices (see the sub-modules).
//
// Ports: bus_* byte stream in (valid/ready); solve_req pulse after the last byte of a
// batch; wb_* byte stream out; done pulses at the end of a batch with converged and
// iterations. The counters report, since reset, the packets decoded with and without
// compression, the cycles the bus was held by a full FIFO, the dual steps sent and the
// augmenting paths pushed by all cores; arc_err is set by an arc between non-neighbours.
module bk_parallel_engine
  import bk_pkg::*;
#(
  parameter int unsigned N_CORES  = 16,
  parameter int unsigned GRID_W   = 32,
  parameter int unsigned GRID_H   = 32,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned MAX_ITER = 256,
  parameter int unsigned STEP     = 8,
  parameter int unsigned HALVE    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  bus_data,
  input  logic        bus_valid,
  output logic        bus_ready,
  input  logic        solve_req,
  output logic [7:0]  wb_data,
  output logic        wb_valid,
  input  logic        wb_ready,
  output logic        busy,
  output logic        done,
  output logic        converged,
  output logic [15:0] iterations,
  output logic [31:0] n_pkt_compressed,
  output logic [31:0] n_pkt_plain,
  output logic [31:0] n_bus_stall,
  output logic [31:0] n_adjust,
  output logic [31:0] n_aug,
  output logic        arc_err
);
  localparam int unsigned N  = GRID_W * GRID_H;
  localparam int unsigned IW = $clog2(N);

  // arbiter -> FIFOs
  logic [7:0]         arb_data;
  logic [N_CORES-1:0] arb_valid, arb_ready;
  logic               stall, pkt_boundary;

  // FIFOs -> decoders
  logic [7:0]         f_data  [N_CORES];
  logic [N_CORES-1:0] f_valid, f_ready, f_empty;

  // decoders -> cores
  cmd_t               d_cmd   [N_CORES];
  logic [N_CORES-1:0] d_cmp, d_valid, d_ready, d_idle;

  // cores <-> control
  logic [N_CORES-1:0]     c_idle, c_done, c_err;
  logic [N-1:0]           c_labels [N_CORES];
  logic [31:0]            c_aug    [N_CORES];
  logic                   core_clear, core_start;
  logic [N_CORES-1:0]     adj_valid;
  logic [IW-1:0]          adj_idx   [N_CORES];
  logic signed [TR_W-1:0] adj_delta [N_CORES];

  load_arbiter #(.N_CORES(N_CORES)) u_arb (
    .clk, .rst_n,
    .in_data(bus_data), .in_valid(bus_valid), .in_ready(bus_ready),
    .out_data(arb_data), .out_valid(arb_valid), .out_ready(arb_ready),
    .stall, .pkt_boundary
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    core_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_data(arb_data), .in_valid(arb_valid[c]), .in_ready(arb_ready[c]),
      .out_data(f_data[c]), .out_valid(f_valid[c]), .out_ready(f_ready[c]),
      .empty(f_empty[c])
    );

    delta_decoder #(.GRID_W(GRID_W)) u_dec (
      .clk, .rst_n, .clear(core_clear),
      .in_data(f_data[c]), .in_valid(f_valid[c]), .in_ready(f_ready[c]),
      .out_cmd(d_cmd[c]), .out_compressed(d_cmp[c]), .out_valid(d_valid[c]),
      .out_ready(d_ready[c]), .idle(d_idle[c])
    );

    bk_core #(.GRID_W(GRID_W), .GRID_H(GRID_H)) u_core (
      .clk, .rst_n,
      .cmd(d_cmd[c]), .cmd_valid(d_valid[c]), .cmd_ready(d_ready[c]),
      .clear(core_clear), .start(core_start),
      .adj_valid(adj_valid[c]), .adj_idx(adj_idx[c]), .adj_delta(adj_delta[c]),
      .idle(c_idle[c]), .done(c_done[c]), .labels(c_labels[c]),
      .n_aug(c_aug[c]), .arc_err(c_err[c])
    );
  end

  control_unit #(
    .N_CORES(N_CORES), .GRID_W(GRID_W), .GRID_H(GRID_H),
    .MAX_ITER(MAX_ITER), .STEP(STEP), .HALVE(HALVE)
  ) u_ctrl (
    .clk, .rst_n,
    .solve_req,
    .load_idle(pkt_boundary && (&f_empty) && (&d_idle)),
    .core_idle(c_idle), .core_done(c_done), .core_labels(c_labels),
    .core_clear, .core_start,
    .adj_valid, .adj_idx, .adj_delta,
    .wb_data, .wb_valid, .wb_ready,
    .busy, .done, .converged, .iterations, .n_adjust
  );

  // ---- event counters
  logic [N_CORES-1:0] acc_cmp, acc_plain;
  assign acc_cmp   = d_valid & d_ready & d_cmp;
  assign acc_plain = d_valid & d_ready & ~d_cmp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_pkt_compressed <= '0;
      n_pkt_plain      <= '0;
      n_bus_stall      <= '0;
    end else begin
      n_pkt_compressed <= n_pkt_compressed + 32'($countones(acc_cmp));
      n_pkt_plain      <= n_pkt_plain + 32'($countones(acc_plain));
      if (stall) n_bus_stall <= n_bus_stall + 1'b1;
    end
  end

  always_comb begin
    n_aug = '0;
    for (int c = 0; c < N_CORES; c++) n_aug = n_aug + c_aug[c];
  end
  assign arc_err = |c_err;
endmodule
