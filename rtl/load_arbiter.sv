// load_arbiter: round-robin distribution of the graph stream to the core FIFOs.
//
// The host sorts the graph so that consecutive packets on the shared data bus belong
// to successive cores: packet k goes to core (k / PKTS_PER_TURN) mod N_CORES. The
// arbiter forwards the byte stream to one FIFO at a time, reads the packet kind from
// the first byte of each packet to know its length (6, 3, 8 or 4 bytes), and moves to
// the next core after PKTS_PER_TURN whole packets. Sending each core a small piece in
// turn lets all cores start building their sub-graphs after only a few bytes, which
// hides the bus transfer time behind the graph-building time. Round-robin distribution
// follows the document; the packet granularity of one packet per turn is this design's
// choice.
//
// Interface: byte stream in (valid/ready); N_CORES byte streams out sharing out_data,
// with one valid and one ready per core. A byte is passed through combinationally to
// the selected core in the cycle the FIFO accepts it. When the selected FIFO is full the
// bus is held (stall is high); the arbiter never skips a core, which keeps the order the
// host relies on. pkt_boundary is high when no packet is half way through.
module load_arbiter
  import bk_pkg::*;
#(
  parameter int unsigned N_CORES       = 16,
  parameter int unsigned PKTS_PER_TURN = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         in_data,
  input  logic               in_valid,
  output logic               in_ready,
  output logic [7:0]         out_data,
  output logic [N_CORES-1:0] out_valid,
  input  logic [N_CORES-1:0] out_ready,
  output logic               stall,
  output logic               pkt_boundary
);
  localparam int unsigned CW = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  localparam int unsigned PW = (PKTS_PER_TURN > 1) ? $clog2(PKTS_PER_TURN) : 1;

  logic [CW-1:0] cur;        // core being served
  logic [3:0]    left;       // bytes still to come in the current packet (0: at header)
  logic [PW-1:0] npkt;       // packets already sent to cur in this turn

  assign out_data = in_data;
  always_comb begin
    out_valid      = '0;
    out_valid[cur] = in_valid;
  end
  assign in_ready     = out_ready[cur];
  assign stall        = in_valid && !out_ready[cur];
  assign pkt_boundary = (left == 4'd0);

  wire        xfer    = in_valid && in_ready;
  wire [3:0]  hdr_len = 4'(pkt_len(pkt_kind_e'(in_data[7:6])));
  // last byte of a packet: either the header of a 1-byte packet (none exist) or left==1
  wire        last    = (left == 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= '0;
      left <= '0;
      npkt <= '0;
    end else if (xfer) begin
      if (left == 4'd0) begin
        left <= hdr_len - 4'd1;
      end else begin
        left <= left - 4'd1;
        if (last) begin
          if (npkt == PW'(PKTS_PER_TURN - 1)) begin
            npkt <= '0;
            cur  <= (cur == CW'(N_CORES - 1)) ? '0 : cur + 1'b1;
          end else begin
            npkt <= npkt + 1'b1;
          end
        end
      end
    end
  end

  a_one_hot_valid: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_valid));
endmodule
