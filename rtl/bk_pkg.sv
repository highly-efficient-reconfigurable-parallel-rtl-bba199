// bk_pkg: types and constants shared by the parallel graph-cut engine.
//
// The engine receives a graph as a byte stream of packets. Each packet either sets the
// two terminal weights of one node (the add_tweights call of the usual BK software
// interface) or the two capacities of one grid arc (add_edge). A packet is sent either
// uncompressed, with full 16-bit weights, or delta compressed, with every weight given
// as a signed 1-byte difference to the previous packet of the same kind for the same core.
//
// Packet formats (byte 0 first; bits [7:6] of byte 0 give the kind):
//   NODE_U  6 bytes: {2'b00, id[13:8]}, id[7:0], cs[15:8], cs[7:0], ct[15:8], ct[7:0]
//   NODE_C  3 bytes: {2'b01, 6'b0}, dcs, dct            id = previous node id + 1
//   ARC_U   8 bytes: {2'b10, i[13:8]}, i[7:0], {2'b00, j[13:8]}, j[7:0],
//                    cap[15:8], cap[7:0], rev[15:8], rev[7:0]
//   ARC_C   4 bytes: {2'b11, 4'b0, dir[1:0]}, di, dcap, drev
//                    i = previous arc i + di, j = grid neighbour of i in direction dir
// The byte counts 6/3 and 8/4 are those of the document's Table I; the field layout
// inside them is this design's own.
//
// Arc directions on a W-wide grid: 0 = +1 (right), 1 = -1 (left), 2 = +W (down),
// 3 = -W (up). The reverse of direction d is d ^ 1.
package bk_pkg;

  localparam int unsigned CAP_W = 16;        // weight width on the bus
  localparam int unsigned RC_W  = CAP_W + 1; // residual arc capacity (cap + rev fits)
  localparam int unsigned TR_W  = 24;        // signed terminal residual (cs - ct + dual terms)
  localparam int unsigned GID_W = 14;        // node index field in packets

  typedef enum logic [1:0] {
    PK_NODE_U = 2'b00,
    PK_NODE_C = 2'b01,
    PK_ARC_U  = 2'b10,
    PK_ARC_C  = 2'b11
  } pkt_kind_e;

  typedef enum logic [1:0] {
    DIR_R = 2'd0,
    DIR_L = 2'd1,
    DIR_D = 2'd2,
    DIR_U = 2'd3
  } dir_e;

  typedef enum logic {
    CMD_NODE = 1'b0,
    CMD_ARC  = 1'b1
  } cmd_op_e;

  // One decoded graph-building command.
  // CMD_NODE: node i gets source weight a and sink weight b.
  // CMD_ARC : arc i->j gets capacity a, arc j->i gets capacity b.
  typedef struct packed {
    cmd_op_e          op;
    logic [GID_W-1:0] i;
    logic [GID_W-1:0] j;
    logic [CAP_W-1:0] a;
    logic [CAP_W-1:0] b;
  } cmd_t;

  // Total length in bytes of a packet, from its kind.
  function automatic int unsigned pkt_len(pkt_kind_e k);
    case (k)
      PK_NODE_U: return 6;
      PK_NODE_C: return 3;
      PK_ARC_U:  return 8;
      default:   return 4;
    endcase
  endfunction

endpackage
