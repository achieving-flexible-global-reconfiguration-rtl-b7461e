// rrnet_top: ring side of a hybrid NoC that adds reconfigurable rings to a
// router-based N x N mesh.
//
// Rows 2i, 2i+1 share horizontal ring i and columns 2j, 2j+1 share vertical
// ring j. At run time one horizontal and one vertical ring are combined at
// each granted reconfiguration point, so that each combined ring links
// 4(N-1) nodes at one cycle per hop. Which rings are combined follows the
// traffic: the flow monitor counts, per interval, the packets from every
// horizontal ring to every vertical ring; at the end of the interval the
// allocator matches rings greedily by traffic volume (2R^2 cycles, R = N/2),
// and the controller drains the rings, sets the switches and rebuilds the
// routing tables with probes (8N-7 cycles), unless the match is unchanged.
//
// The mesh routers are not part of this module. A packet that the rings
// cannot carry leaves on rtr_inj_* and must be delivered by the mesh to
// rtr_ej_* at its destination; the per-node ring interface decides, per
// packet, between ring and mesh. All node ports are arrays indexed by node
// id row * N + column and follow the valid/ready rules of ring_interface.
// Packet time stamps come from a free-running cycle counter.
module rrnet_top
  import rrnet_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned INTERVAL = 1000,
  parameter int unsigned F_W      = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // cores
  input  logic [N*N-1:0]                inj_valid,
  input  logic [N*N-1:0][NODE_W-1:0]    inj_dst,
  input  logic [N*N-1:0][DATA_W-1:0]    inj_data,
  output logic [N*N-1:0]                inj_ready,
  output logic [N*N-1:0]                ej_valid,
  output pkt_t [N*N-1:0]                ej_pkt,
  input  logic [N*N-1:0]                ej_ready,
  // mesh routers
  output logic [N*N-1:0]                rtr_inj_valid,
  output pkt_t [N*N-1:0]                rtr_inj_pkt,
  input  logic [N*N-1:0]                rtr_inj_ready,
  input  logic [N*N-1:0]                rtr_ej_valid,
  input  pkt_t [N*N-1:0]                rtr_ej_pkt,
  output logic [N*N-1:0]                rtr_ej_ready,
  // status
  output phase_e                        phase,
  output logic [N/2-1:0][N/2-1:0]       grant,
  output logic                          ev_reconfig,
  output logic                          ev_reuse,
  output logic                          ev_abort,
  output logic [N*N-1:0]                ev_ring_inj,
  output logic [N*N-1:0]                ev_ring_ej,
  output logic [N*N-1:0]                ev_deflect
);
  localparam int unsigned R = N / 2;

  logic [TS_W-1:0]               now_q;
  logic                          snap, alloc_start, alloc_busy, alloc_done, probe_start;
  logic [R-1:0][R-1:0]           alloc_grant;
  logic [R-1:0][R-1:0][F_W-1:0]  f_snap;
  logic [N*N-1:0]                ring_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now_q <= '0;
    else        now_q <= now_q + 1'b1;
  end

  flow_monitor #(.N(N), .F_W(F_W)) u_mon (
    .clk, .rst_n,
    .inj_fire(inj_valid & inj_ready), .inj_dst(inj_dst),
    .snap, .f_snap
  );

  ring_allocator #(.R(R), .F_W(F_W)) u_alloc (
    .clk, .rst_n, .start(alloc_start), .f(f_snap),
    .busy(alloc_busy), .done(alloc_done), .grant(alloc_grant)
  );

  reconfig_ctrl #(.N(N), .INTERVAL(INTERVAL)) u_ctrl (
    .clk, .rst_n, .snap, .alloc_start,
    .alloc_done, .alloc_grant,
    .deflect_any(|ev_deflect),
    .phase, .probe_start, .grant,
    .ev_reconfig, .ev_reuse, .ev_abort
  );

  ring_network #(.N(N)) u_net (
    .clk, .rst_n, .phase, .probe_start, .grant, .now_ts(now_q),
    .inj_valid, .inj_dst, .inj_data, .inj_ready,
    .rtr_inj_valid, .rtr_inj_pkt, .rtr_inj_ready,
    .rtr_ej_valid, .rtr_ej_pkt, .rtr_ej_ready,
    .ej_valid, .ej_pkt, .ej_ready,
    .ev_ring_inj, .ev_ring_ej, .ev_deflect, .ring_busy
  );

  // the rings are empty when the switches change
  a_drained: assert property (@(posedge clk) disable iff (!rst_n)
                              (phase == PH_SWITCH) |-> !(|ring_busy));
  // the allocator is never restarted while it runs
  a_alloc: assert property (@(posedge clk) disable iff (!rst_n) alloc_start |-> !alloc_busy);
endmodule
