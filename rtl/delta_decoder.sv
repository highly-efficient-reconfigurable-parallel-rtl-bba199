// delta_decoder: expands the compressed graph packets of one core into build commands.
//
// To cut bus traffic the host sends the weights of a node or arc as the difference to
// the weights of the previous node or arc of the same core whenever that difference fits
// in one signed byte, and in full otherwise. This decoder keeps the last node id, the
// last two terminal weights, the last arc source index and the last two arc capacities
// as references, adds the received deltas to them (modulo 2^16) and emits one cmd_t per
// packet. Delta coding with 1-byte deltas, the four packet kinds and their 6/3/8/4-byte
// sizes follow the document; the field layout (see bk_pkg) is this design's own, as is
// the rule that a compressed node takes the id after the previous node's.
//
// Interface: byte stream in (valid/ready), cmd stream out (valid/ready). The packet is
// gathered one byte per cycle; once its last byte is in, the command is presented in the
// next cycle and held until accepted, while no new byte is taken. Every packet, whether
// compressed or not, updates the references. out_compressed marks a command that came
// from a compressed packet. idle is high between packets with nothing pending. A clear
// pulse, given between batches when no packet is in flight, returns the references to
// their reset values (node id -1, everything else 0), so each batch is coded on its own.
module delta_decoder
  import bk_pkg::*;
#(
  parameter int unsigned GRID_W = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output cmd_t       out_cmd,
  output logic       out_compressed,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       idle
);
  logic [7:0]       pkt [8];
  logic [3:0]       cnt;
  logic             full;      // whole packet gathered, command being presented

  logic [GID_W-1:0] ref_node;
  logic [CAP_W-1:0] ref_cs, ref_ct;
  logic [GID_W-1:0] ref_arc;
  logic [CAP_W-1:0] ref_cap, ref_rev;

  pkt_kind_e kind_now;
  assign kind_now = (cnt == 4'd0) ? pkt_kind_e'(in_data[7:6]) : pkt_kind_e'(pkt[0][7:6]);

  assign in_ready  = !full;
  assign out_valid = full;
  assign idle      = !full && (cnt == 4'd0);

  function automatic logic [CAP_W-1:0] add_delta(logic [CAP_W-1:0] base, logic [7:0] d);
    return base + {{(CAP_W-8){d[7]}}, d};
  endfunction

  // Assemble the command from the gathered packet.
  cmd_t      cmd;
  logic      cmp;
  logic [GID_W-1:0] ai;
  always_comb begin
    cmd = '0;
    cmp = 1'b0;
    ai  = ref_arc + {{(GID_W-8){pkt[1][7]}}, pkt[1]};
    case (pkt_kind_e'(pkt[0][7:6]))
      PK_NODE_U: begin
        cmd.op = CMD_NODE;
        cmd.i  = {pkt[0][5:0], pkt[1]};
        cmd.a  = {pkt[2], pkt[3]};
        cmd.b  = {pkt[4], pkt[5]};
      end
      PK_NODE_C: begin
        cmp    = 1'b1;
        cmd.op = CMD_NODE;
        cmd.i  = ref_node + 1'b1;
        cmd.a  = add_delta(ref_cs, pkt[1]);
        cmd.b  = add_delta(ref_ct, pkt[2]);
      end
      PK_ARC_U: begin
        cmd.op = CMD_ARC;
        cmd.i  = {pkt[0][5:0], pkt[1]};
        cmd.j  = {pkt[2][5:0], pkt[3]};
        cmd.a  = {pkt[4], pkt[5]};
        cmd.b  = {pkt[6], pkt[7]};
      end
      default: begin
        cmp    = 1'b1;
        cmd.op = CMD_ARC;
        cmd.i  = ai;
        case (dir_e'(pkt[0][1:0]))
          DIR_R:   cmd.j = ai + 1'b1;
          DIR_L:   cmd.j = ai - 1'b1;
          DIR_D:   cmd.j = ai + GID_W'(GRID_W);
          default: cmd.j = ai - GID_W'(GRID_W);
        endcase
        cmd.a  = add_delta(ref_cap, pkt[2]);
        cmd.b  = add_delta(ref_rev, pkt[3]);
      end
    endcase
  end

  assign out_cmd        = cmd;
  assign out_compressed = cmp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      full     <= 1'b0;
      ref_node <= '1;          // so that a first compressed node is node 0
      ref_cs   <= '0;
      ref_ct   <= '0;
      ref_arc  <= '0;
      ref_cap  <= '0;
      ref_rev  <= '0;
    end else if (clear) begin
      ref_node <= '1;
      ref_cs   <= '0;
      ref_ct   <= '0;
      ref_arc  <= '0;
      ref_cap  <= '0;
      ref_rev  <= '0;
    end else if (full) begin
      if (out_ready) begin
        full <= 1'b0;
        cnt  <= '0;
        if (cmd.op == CMD_NODE) begin
          ref_node <= cmd.i;
          ref_cs   <= cmd.a;
          ref_ct   <= cmd.b;
        end else begin
          ref_arc  <= cmd.i;
          ref_cap  <= cmd.a;
          ref_rev  <= cmd.b;
        end
      end
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (cnt == 4'(pkt_len(kind_now) - 1)) full <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!full && in_valid) pkt[cnt[2:0]] <= in_data;
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_cmd));
endmodule
