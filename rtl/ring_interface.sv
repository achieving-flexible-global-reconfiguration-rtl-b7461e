// ring_interface: the interface between one node and its two rings.
//
// Every node sits on one horizontal and one vertical ring; each ring has a
// clockwise and an anticlockwise lane. The interface holds:
//  * one input register per lane (the ring "buffer"): a flit spends one
//    cycle per hop, and the rings have no flow control;
//  * the ejection taps: a data flit addressed to this node goes into the
//    ejection buffer of the ring it arrived on if that buffer is free,
//    otherwise it is deflected, i.e. passed on round the ring. When both
//    lanes of one ring bring a flit for this node in the same cycle, the
//    older one is taken (clockwise on a tie);
//  * the routing table and the injection logic: a packet from the core goes
//    onto a ring when the table says its destination is reachable and the
//    chosen output lane carries no passing flit in this cycle; otherwise it
//    goes to the mesh router. Ring injection is allowed only in normal
//    operation (phase PH_RUN);
//  * the 2x2 reconfiguration switch, one per direction: when sw_en is set
//    the outputs of the horizontal and vertical ring are exchanged;
//  * the ejection arbiter with its three packet buffers (router, H ring,
//    V ring).
// Routing-table rebuild: in the first cycle of PH_UPDATE (probe_start) the
// node sends a probe with its id on all four lane outputs; every interface
// passes probes on with the hop count incremented, records the sender in its
// table if the entry is still empty, and drops its own probe when it comes
// back. A clockwise probe received on ring X means the sender is reached by
// sending anticlockwise back along X, i.e. on injection ring X xor sw_en.
// The table is cleared in PH_SWITCH.
//
// Interface timing: ring_out is combinational from the input registers and
// the injection port, and feeds the neighbour's input register. The core's
// injection port is valid/ready: inj_ready is high when the packet goes to
// the ring or the router takes it in this cycle. The packet's time stamp is
// now_ts in the cycle it is accepted.
module ring_interface
  import rrnet_pkg::*;
#(
  parameter int unsigned N    = 8,  // mesh is N x N
  parameter int unsigned NODE = 0   // this node's id, row * N + column
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  phase_e               phase,
  input  logic                 probe_start,
  input  logic                 sw_en,
  input  logic [TS_W-1:0]      now_ts,
  // ring links, indexed [ring][direction]
  input  ring_flit_t [1:0][1:0] ring_in,
  output ring_flit_t [1:0][1:0] ring_out,
  // core injection
  input  logic                 inj_valid,
  input  logic [NODE_W-1:0]    inj_dst,
  input  logic [DATA_W-1:0]    inj_data,
  output logic                 inj_ready,
  // packets the rings cannot take, to the mesh router
  output logic                 rtr_inj_valid,
  output pkt_t                 rtr_inj_pkt,
  input  logic                 rtr_inj_ready,
  // packets ejected by the mesh router at this node
  input  logic                 rtr_ej_valid,
  input  pkt_t                 rtr_ej_pkt,
  output logic                 rtr_ej_ready,
  // ejection link to the core
  output logic                 ej_valid,
  output pkt_t                 ej_pkt,
  input  logic                 ej_ready,
  // events
  output logic                 ev_ring_inj,   // a packet entered a ring
  output logic                 ev_ring_ej,    // a ring packet was ejected into a buffer
  output logic                 ev_deflect,    // a ring packet for this node was deflected
  output logic                 ring_busy      // a data flit sits in an input register
);
  localparam logic [NODE_W-1:0] ME = NODE_W'(NODE);

  ring_flit_t [1:0][1:0] in_q;       // [ring][dir]
  ring_flit_t [1:0][1:0] pre_sw;     // flits leaving, by ring before the switch
  ring_flit_t [1:0][1:0] post_sw;    // by physical output ring

  // ejection buffers
  logic h_free, v_free;
  logic [1:0] ej_take;               // per ring: a flit is ejected
  pkt_t [1:0] ej_take_pkt;
  logic [1:0][1:0] taken;            // [ring][dir] flit leaves the ring here

  // routing table
  logic   [3:0]              tw_en;
  logic   [3:0][NODE_W-1:0]  tw_node;
  route_t [3:0]              tw_route;
  route_t                    route;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_q <= '0;
    else        in_q <= ring_in;
  end

  // ---- ejection and probe handling on the arriving flits ----
  always_comb begin
    taken       = '0;
    ej_take     = '0;
    ej_take_pkt = '0;
    tw_en       = '0;
    tw_node     = '0;
    tw_route    = '0;
    for (int r = 0; r < 2; r++) begin
      logic free;
      logic [1:0] want;
      free = (r == 0) ? h_free : v_free;
      for (int d = 0; d < 2; d++) begin
        want[d] = in_q[r][d].valid && !in_q[r][d].probe && (in_q[r][d].pkt.dst == ME);
        // probes: record the sender, drop the own probe
        if (in_q[r][d].valid && in_q[r][d].probe) begin
          if (in_q[r][d].pkt.src == ME) begin
            taken[r][d] = 1'b1;
          end else begin
            tw_en[r*2+d]          = 1'b1;
            tw_node[r*2+d]        = in_q[r][d].pkt.src;
            tw_route[r*2+d].reach = 1'b1;
            tw_route[r*2+d].ring  = ring_e'(r[0] ^ sw_en);
            tw_route[r*2+d].dir   = (d == 0) ? DIR_ACW : DIR_CW;
          end
        end
      end
      if (free) begin
        if (want[0] && want[1]) begin
          if (ts_older(in_q[r][1].pkt.ts, in_q[r][0].pkt.ts)) taken[r][1] = 1'b1;
          else                                                taken[r][0] = 1'b1;
        end else begin
          taken[r][0] = taken[r][0] || want[0];
          taken[r][1] = taken[r][1] || want[1];
        end
      end
      ej_take[r]     = (want[0] && taken[r][0]) || (want[1] && taken[r][1]);
      ej_take_pkt[r] = (want[1] && taken[r][1]) ? in_q[r][1].pkt : in_q[r][0].pkt;
    end
  end

  routing_table #(.M(N*N), .NWR(4)) u_tbl (
    .clk, .rst_n,
    .clear(phase == PH_SWITCH),
    .wr_en(tw_en), .wr_node(tw_node), .wr_route(tw_route),
    .rd_node(inj_dst), .rd_route(route)
  );

  // ---- passing flits (before the switch they keep their arrival ring) ----
  ring_flit_t [1:0][1:0] pass;       // by physical output ring
  always_comb begin
    for (int r = 0; r < 2; r++)
      for (int d = 0; d < 2; d++) begin
        pre_sw[r][d] = '0;
        if (in_q[r][d].valid && !taken[r][d]) begin
          pre_sw[r][d] = in_q[r][d];
          if (in_q[r][d].probe) pre_sw[r][d].hops = in_q[r][d].hops + 1'b1;
        end
      end
  end

  for (genvar d = 0; d < 2; d++) begin : g_sw
    ring_flit_t oh, ov;
    reconfig_switch u_sw (
      .sw_en(sw_en), .in_h(pre_sw[0][d]), .in_v(pre_sw[1][d]),
      .out_h(oh), .out_v(ov)
    );
    assign pass[0][d] = oh;
    assign pass[1][d] = ov;
  end

  // ---- injection ----
  logic  out_ring;                   // physical output ring for the packet
  logic  ring_ok;
  pkt_t  new_pkt;

  always_comb begin
    new_pkt.src  = ME;
    new_pkt.dst  = inj_dst;
    new_pkt.ts   = now_ts;
    new_pkt.data = inj_data;
    out_ring     = route.ring ^ sw_en;
    ring_ok      = inj_valid && route.reach && (phase == PH_RUN)
                   && !pass[out_ring][route.dir].valid;
  end

  always_comb begin
    post_sw = pass;
    if (ring_ok) begin
      post_sw[out_ring][route.dir].valid = 1'b1;
      post_sw[out_ring][route.dir].probe = 1'b0;
      post_sw[out_ring][route.dir].hops  = '0;
      post_sw[out_ring][route.dir].pkt   = new_pkt;
    end
    if (probe_start) begin
      for (int r = 0; r < 2; r++)
        for (int d = 0; d < 2; d++) begin
          post_sw[r][d].valid   = 1'b1;
          post_sw[r][d].probe   = 1'b1;
          post_sw[r][d].hops    = HOP_W'(1);
          post_sw[r][d].pkt     = '0;
          post_sw[r][d].pkt.src = ME;
        end
    end
  end

  assign ring_out      = post_sw;
  assign rtr_inj_valid = inj_valid && !ring_ok;
  assign rtr_inj_pkt   = new_pkt;
  assign inj_ready     = ring_ok || rtr_inj_ready;

  // ---- ejection buffers and arbiter ----
  ejection_arbiter u_ej (
    .clk, .rst_n,
    .drain(phase == PH_DRAIN),
    .rtr_valid(rtr_ej_valid), .rtr_pkt(rtr_ej_pkt), .rtr_ready(rtr_ej_ready),
    .ring_h_valid(ej_take[0]), .ring_h_pkt(ej_take_pkt[0]), .ring_h_free(h_free),
    .ring_v_valid(ej_take[1]), .ring_v_pkt(ej_take_pkt[1]), .ring_v_free(v_free),
    .ej_valid, .ej_pkt, .ej_ready
  );

  // ---- events ----
  always_comb begin
    ev_ring_inj = ring_ok;
    ev_ring_ej  = |ej_take;
    ev_deflect  = 1'b0;
    ring_busy   = 1'b0;
    for (int r = 0; r < 2; r++)
      for (int d = 0; d < 2; d++) begin
        if (in_q[r][d].valid && !in_q[r][d].probe) ring_busy = 1'b1;
        if (in_q[r][d].valid && !in_q[r][d].probe && in_q[r][d].pkt.dst == ME && !taken[r][d])
          ev_deflect = 1'b1;
      end
  end

  // probes are only sent into empty rings
  a_probe_empty: assert property (@(posedge clk) disable iff (!rst_n) probe_start |-> !ring_busy);
endmodule
