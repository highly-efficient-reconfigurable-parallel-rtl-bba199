// control_unit: sequencing and on-chip message exchange of the parallel engine.
//
// The cores hold N_CORES sub-graphs cut from one grid along rows: the last row of core
// b and the first row of core b+1 are the same GRID_W graph nodes (the overlap). The host
// has already given each copy half of the shared weights. For each shared node a dual
// variable lambda is added to the energy of one copy and subtracted from the other; when
// both copies choose the same label for every shared node, the joined labelling is a
// minimum cut of the whole graph. This unit runs that iteration:
//   1. start all cores and wait until every one has reported done;
//   2. exchange: for every overlap position compare the two copies' labels; where they
//      differ, move lambda by the current step toward agreement. The step starts at STEP
//      and is halved after every HALVE solves until it reaches 1; a fixed integer step
//      tends to leave a few overlap nodes flipping back and forth, while the shrinking
//      step lets them settle. Lambda is not stored: the change is
//      sent straight into the two copies' terminal residuals (core b: -STEP if its copy
//      is on the source side, +STEP otherwise; core b+1 the opposite). Bottom rows are
//      sent in one pass of GRID_W cycles and top rows in a second, so that each core
//      receives at most one adjustment per cycle;
//   3. if no position differed the batch has converged; otherwise repeat from 1 until
//      MAX_ITER solves have been made (converged then stays low);
//   4. write back: send every core's labels, core 0 first, node 0 first, eight labels
//      per byte with the lowest node in bit 0; then clear the cores for the next batch.
// The splitting into overlapping sub-graphs, the dual variables as extra terminal
// weights, label agreement as the convergence test and the 1-bit label write-back follow
// the document. Row-wise 1-D splitting, the step schedule, MAX_ITER and the byte order
// of the write-back are this design's choices.
//
// Interface: solve_req (pulse) asks for a solve once the batch is loaded; the unit waits
// for load_idle (no packet in flight) and idle cores first. wb_* is a valid/ready byte
// stream. done pulses after the last write-back byte, with converged and iterations
// (solves made) valid from then until the next solve_req. n_adjust counts every lambda
// step sent since reset.
module control_unit
  import bk_pkg::*;
#(
  parameter int unsigned N_CORES  = 16,
  parameter int unsigned GRID_W   = 32,
  parameter int unsigned GRID_H   = 32,
  parameter int unsigned MAX_ITER = 256,
  parameter int unsigned STEP     = 8,
  parameter int unsigned HALVE    = 8,
  localparam int unsigned N       = GRID_W * GRID_H,
  localparam int unsigned IW      = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   solve_req,
  input  logic                   load_idle,
  input  logic [N_CORES-1:0]     core_idle,
  input  logic [N_CORES-1:0]     core_done,
  input  logic [N-1:0]           core_labels [N_CORES],
  output logic                   core_clear,
  output logic                   core_start,
  output logic [N_CORES-1:0]     adj_valid,
  output logic [IW-1:0]          adj_idx   [N_CORES],
  output logic signed [TR_W-1:0] adj_delta [N_CORES],
  output logic [7:0]             wb_data,
  output logic                   wb_valid,
  input  logic                   wb_ready,
  output logic                   busy,
  output logic                   done,
  output logic                   converged,
  output logic [15:0]            iterations,
  output logic [31:0]            n_adjust
);
  localparam int unsigned CW  = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  localparam int unsigned BPC = N / 8;                 // write-back bytes per core
  localparam int unsigned BW  = (BPC > 1) ? $clog2(BPC) : 1;
  localparam int unsigned PW  = $clog2(GRID_W + 1);
  localparam int unsigned LAST_ROW = (GRID_H - 1) * GRID_W;

  typedef enum logic [2:0] {
    C_IDLE, C_WAITLOAD, C_SOLVE, C_EXA, C_EXB, C_WB, C_CLR
  } cstate_e;

  cstate_e          state;
  logic [N_CORES-1:0] got_done;
  logic [TR_W-1:0]  step;
  logic [PW-1:0]    p;
  logic             mism;
  logic [CW-1:0]    wb_core;
  logic [BW-1:0]    wb_byte;

  // label pair of overlap position p on boundary b (b between core b and core b+1)
  logic [N_CORES-1:0] lab_a, lab_b, differ;
  always_comb begin
    lab_a  = '0;
    lab_b  = '0;
    differ = '0;
    for (int b = 0; b + 1 < N_CORES; b++) begin
      lab_a[b]  = core_labels[b][LAST_ROW + 32'(p)];
      lab_b[b]  = core_labels[b + 1][32'(p)];
      differ[b] = lab_a[b] ^ lab_b[b];
    end
  end

  // adjustments: phase A updates the bottom row of core b, phase B the top row of core b+1
  always_comb begin
    for (int c = 0; c < N_CORES; c++) begin
      adj_valid[c] = 1'b0;
      adj_idx[c]   = '0;
      adj_delta[c] = '0;
      if (state == C_EXA && c + 1 < N_CORES && differ[c]) begin
        adj_valid[c] = 1'b1;
        adj_idx[c]   = IW'(LAST_ROW + 32'(p));
        adj_delta[c] = lab_a[c] ? -step : step;
      end
      if (state == C_EXB && c > 0 && differ[c - 1]) begin
        adj_valid[c] = 1'b1;
        adj_idx[c]   = IW'(p);
        adj_delta[c] = lab_a[c - 1] ? step : -step;
      end
    end
  end

  assign wb_valid = (state == C_WB);
  assign wb_data  = core_labels[wb_core][8 * 32'(wb_byte) +: 8];
  assign busy     = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      got_done   <= '0;
      step       <= '0;
      p          <= '0;
      mism       <= 1'b0;
      wb_core    <= '0;
      wb_byte    <= '0;
      core_clear <= 1'b0;
      core_start <= 1'b0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
      n_adjust   <= '0;
    end else begin
      core_clear <= 1'b0;
      core_start <= 1'b0;
      done       <= 1'b0;
      case (state)
        C_IDLE: if (solve_req) begin
          converged  <= 1'b0;
          iterations <= '0;
          state      <= C_WAITLOAD;
        end

        C_WAITLOAD: if (load_idle && &core_idle) begin
          step       <= TR_W'(STEP);
          core_start <= 1'b1;
          got_done   <= '0;
          iterations <= 16'd1;
          state      <= C_SOLVE;
        end

        C_SOLVE: begin
          if (&(got_done | core_done)) begin
            p     <= '0;
            mism  <= 1'b0;
            state <= C_EXA;
          end else begin
            got_done <= got_done | core_done;
          end
        end

        C_EXA: begin
          if (|differ) begin
            mism     <= 1'b1;
            n_adjust <= n_adjust + 32'($countones(differ));
          end
          if (p == PW'(GRID_W - 1)) begin
            p     <= '0;
            state <= C_EXB;
          end else begin
            p <= p + 1'b1;
          end
        end

        C_EXB: begin
          if (p == PW'(GRID_W - 1)) begin
            p <= '0;
            if (!mism || N_CORES == 1) begin
              converged <= 1'b1;
              wb_core   <= '0;
              wb_byte   <= '0;
              state     <= C_WB;
            end else if (32'(iterations) >= MAX_ITER) begin
              wb_core <= '0;
              wb_byte <= '0;
              state   <= C_WB;
            end else begin
              iterations <= iterations + 1'b1;
              if (32'(iterations) % HALVE == 0 && step > 1) step <= step >> 1;
              core_start <= 1'b1;
              got_done   <= '0;
              state      <= C_SOLVE;
            end
          end else begin
            p <= p + 1'b1;
          end
        end

        C_WB: if (wb_ready) begin
          if (wb_byte == BW'(BPC - 1)) begin
            wb_byte <= '0;
            if (wb_core == CW'(N_CORES - 1)) state <= C_CLR;
            else wb_core <= wb_core + 1'b1;
          end else begin
            wb_byte <= wb_byte + 1'b1;
          end
        end

        C_CLR: begin
          core_clear <= 1'b1;
          done       <= 1'b1;
          state      <= C_IDLE;
        end

        default: state <= C_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 core_start |-> &core_idle);
endmodule
