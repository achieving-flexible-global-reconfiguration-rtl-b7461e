// rrnet_pkg: types and constants shared by the reconfigurable-ring network.
//
// A ring flit carries a whole single-flit packet: a header with source,
// destination and generation time stamp (used by the oldest-first ejection
// arbiter), and a 64-bit payload, the channel width of the mesh. The same
// flit format carries the probe messages that rebuild the routing tables
// after a reconfiguration: a probe names its sender and counts its hops.
// Node numbers are row * N + column, row 0 at the top, column 0 at the left.
// Widths of node ids and time stamps are this design's choice and cover
// meshes up to 16 x 16.
package rrnet_pkg;

  localparam int unsigned NODE_W = 8;   // node id, up to 256 nodes
  localparam int unsigned TS_W   = 16;  // generation time stamp, wraps
  localparam int unsigned DATA_W = 64;  // channel width of the NoC
  localparam int unsigned HOP_W  = 8;   // probe hop counter

  // Ring ports of a node: the horizontal and the vertical ring.
  typedef enum logic {RING_H = 1'b0, RING_V = 1'b1} ring_e;
  // Travel direction on a ring.
  typedef enum logic {DIR_CW = 1'b0, DIR_ACW = 1'b1} dir_e;

  // Packet as offered by a core or delivered by the mesh router.
  typedef struct packed {
    logic [NODE_W-1:0] src;
    logic [NODE_W-1:0] dst;
    logic [TS_W-1:0]   ts;
    logic [DATA_W-1:0] data;
  } pkt_t;

  // Flit in one ring link register.
  typedef struct packed {
    logic             valid;
    logic             probe;   // 1: routing-table probe, 0: data packet
    logic [HOP_W-1:0] hops;    // probe: hops travelled so far
    pkt_t             pkt;
  } ring_flit_t;

  // One routing-table entry (3 bits): reachable, which ring, which way.
  typedef struct packed {
    logic  reach;
    ring_e ring;
    dir_e  dir;
  } route_t;

  // Phases of the network-side reconfiguration (Step 2 of the process).
  typedef enum logic [1:0] {
    PH_RUN    = 2'd0,  // normal operation
    PH_DRAIN  = 2'd1,  // no ring injection, ring-first ejection
    PH_SWITCH = 2'd2,  // one cycle: load the new switch settings
    PH_UPDATE = 2'd3   // probes rebuild the routing tables
  } phase_e;

  // a is older than b for wrapping time stamps
  function automatic logic ts_older(input logic [TS_W-1:0] a, input logic [TS_W-1:0] b);
    logic [TS_W-1:0] diff;
    diff = a - b;
    return diff[TS_W-1];
  endfunction

endpackage
