// ejection_arbiter: the three ejection buffers of a node and the arbiter
// that shares the node's single ejection link among them.
//
// One packet buffer takes packets from the mesh router, one from the
// horizontal ring and one from the vertical ring. Packets here are one flit,
// so a packet-size buffer is one entry. Each cycle the arbiter sends one
// buffered packet to the core. In normal operation it picks the oldest
// (smallest generation time stamp, compared modulo 2^TS_W); while the rings
// are being drained for a reconfiguration it switches to a fixed priority,
// horizontal ring, vertical ring, then router, so that ring packets leave
// the rings as fast as possible. Ties in age follow the same fixed order.
//
// A buffer accepts a packet only when it is empty at the start of the cycle
// (ring_h_free / ring_v_free / rtr_ready). A ring packet that finds its
// buffer full is deflected by the ring interface; a router packet waits in
// the router. The ejection link has a valid/ready handshake.
module ejection_arbiter
  import rrnet_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  drain,        // fixed-priority mode
  // from the mesh router
  input  logic  rtr_valid,
  input  pkt_t  rtr_pkt,
  output logic  rtr_ready,
  // from the rings
  input  logic  ring_h_valid,
  input  pkt_t  ring_h_pkt,
  output logic  ring_h_free,
  input  logic  ring_v_valid,
  input  pkt_t  ring_v_pkt,
  output logic  ring_v_free,
  // ejection link to the core
  output logic  ej_valid,
  output pkt_t  ej_pkt,
  input  logic  ej_ready
);
  // buffer index: 0 horizontal ring, 1 vertical ring, 2 router
  logic [2:0] v_q;
  pkt_t       b_q [3];
  logic [1:0] sel;
  logic       any;
  logic       found;

  always_comb begin
    any = |v_q;
    sel = 2'd0;
    found = 1'b0;
    if (drain) begin
      if      (v_q[0]) sel = 2'd0;
      else if (v_q[1]) sel = 2'd1;
      else             sel = 2'd2;
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (v_q[k] && (!found || ts_older(b_q[k].ts, b_q[sel].ts))) begin
          sel   = 2'(k);
          found = 1'b1;
        end
      end
    end
  end

  assign ej_valid    = any;
  assign ej_pkt      = b_q[sel];
  assign ring_h_free = !v_q[0];
  assign ring_v_free = !v_q[1];
  assign rtr_ready   = !v_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      for (int k = 0; k < 3; k++) b_q[k] <= '0;
    end else begin
      if (any && ej_ready) v_q[sel] <= 1'b0;
      if (ring_h_valid && !v_q[0]) begin v_q[0] <= 1'b1; b_q[0] <= ring_h_pkt; end
      if (ring_v_valid && !v_q[1]) begin v_q[1] <= 1'b1; b_q[1] <= ring_v_pkt; end
      if (rtr_valid    && !v_q[2]) begin v_q[2] <= 1'b1; b_q[2] <= rtr_pkt;    end
    end
  end

  a_no_overwrite_h: assert property (@(posedge clk) disable iff (!rst_n) ring_h_valid |-> ring_h_free);
  a_no_overwrite_v: assert property (@(posedge clk) disable iff (!rst_n) ring_v_valid |-> ring_v_free);
endmodule
