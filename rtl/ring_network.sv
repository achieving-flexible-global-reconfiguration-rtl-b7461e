// ring_network: N x N ring interfaces wired into N/2 horizontal and N/2
// vertical bidirectional rings.
//
// Horizontal ring i joins the nodes of rows 2i and 2i+1, vertical ring j the
// nodes of columns 2j and 2j+1; each ring has 2N nodes. Clockwise, a
// horizontal ring runs east along row 2i and west along row 2i+1, and a
// vertical ring runs north along column 2j and south along column 2j+1
// (row 0 is the top row). The anticlockwise lane runs every link the other
// way. Each hop is one cycle (the input register of the receiving
// interface).
//
// Reconfiguration point (i, j) is the 2 x 2 block of nodes where
// horizontal ring i crosses vertical ring j. When grant[i][j] is set, the
// four interfaces of that block exchange their horizontal and vertical
// outputs, which joins the two rings into one combined ring of 4(N-1) nodes
// (plus a 4-node loop inside the block), wherever the block lies: corner,
// border or centre. The grant matrix must hold exactly one point per row
// and per column so that every ring is combined once.
//
// Node ports are arrays indexed by node id row * N + column; see
// ring_interface for their timing.
module ring_network
  import rrnet_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  phase_e                        phase,
  input  logic                          probe_start,
  input  logic [N/2-1:0][N/2-1:0]       grant,
  input  logic [TS_W-1:0]               now_ts,
  input  logic [N*N-1:0]                inj_valid,
  input  logic [N*N-1:0][NODE_W-1:0]    inj_dst,
  input  logic [N*N-1:0][DATA_W-1:0]    inj_data,
  output logic [N*N-1:0]                inj_ready,
  output logic [N*N-1:0]                rtr_inj_valid,
  output pkt_t [N*N-1:0]                rtr_inj_pkt,
  input  logic [N*N-1:0]                rtr_inj_ready,
  input  logic [N*N-1:0]                rtr_ej_valid,
  input  pkt_t [N*N-1:0]                rtr_ej_pkt,
  output logic [N*N-1:0]                rtr_ej_ready,
  output logic [N*N-1:0]                ej_valid,
  output pkt_t [N*N-1:0]                ej_pkt,
  input  logic [N*N-1:0]                ej_ready,
  output logic [N*N-1:0]                ev_ring_inj,
  output logic [N*N-1:0]                ev_ring_ej,
  output logic [N*N-1:0]                ev_deflect,
  output logic [N*N-1:0]                ring_busy
);
  // clockwise successor and predecessor of node (r, c) on its H or V ring
  function automatic int unsigned cw_next(input int unsigned r, input int unsigned c,
                                          input int unsigned ring);
    if (ring == 0) begin
      if (r % 2 == 0) return (c < N - 1) ? r * N + c + 1 : (r + 1) * N + c;
      else            return (c > 0)     ? r * N + c - 1 : (r - 1) * N + c;
    end else begin
      if (c % 2 == 0) return (r > 0)     ? (r - 1) * N + c : r * N + c + 1;
      else            return (r < N - 1) ? (r + 1) * N + c : r * N + c - 1;
    end
  endfunction

  function automatic int unsigned cw_prev(input int unsigned r, input int unsigned c,
                                          input int unsigned ring);
    if (ring == 0) begin
      if (r % 2 == 0) return (c > 0)     ? r * N + c - 1 : (r + 1) * N + c;
      else            return (c < N - 1) ? r * N + c + 1 : (r - 1) * N + c;
    end else begin
      if (c % 2 == 0) return (r < N - 1) ? (r + 1) * N + c : r * N + c + 1;
      else            return (r > 0)     ? (r - 1) * N + c : r * N + c - 1;
    end
  endfunction

  ring_flit_t [N*N-1:0][1:0][1:0] rin, rout;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int unsigned ID = r * N + c;
      for (genvar k = 0; k < 2; k++) begin : g_link
        assign rin[ID][k][DIR_CW]  = rout[cw_prev(r, c, k)][k][DIR_CW];
        assign rin[ID][k][DIR_ACW] = rout[cw_next(r, c, k)][k][DIR_ACW];
      end
      ring_interface #(.N(N), .NODE(ID)) u_ri (
        .clk, .rst_n, .phase, .probe_start,
        .sw_en(grant[r/2][c/2]),
        .now_ts,
        .ring_in(rin[ID]), .ring_out(rout[ID]),
        .inj_valid(inj_valid[ID]), .inj_dst(inj_dst[ID]), .inj_data(inj_data[ID]),
        .inj_ready(inj_ready[ID]),
        .rtr_inj_valid(rtr_inj_valid[ID]), .rtr_inj_pkt(rtr_inj_pkt[ID]),
        .rtr_inj_ready(rtr_inj_ready[ID]),
        .rtr_ej_valid(rtr_ej_valid[ID]), .rtr_ej_pkt(rtr_ej_pkt[ID]),
        .rtr_ej_ready(rtr_ej_ready[ID]),
        .ej_valid(ej_valid[ID]), .ej_pkt(ej_pkt[ID]), .ej_ready(ej_ready[ID]),
        .ev_ring_inj(ev_ring_inj[ID]), .ev_ring_ej(ev_ring_ej[ID]),
        .ev_deflect(ev_deflect[ID]), .ring_busy(ring_busy[ID])
      );
    end
  end
endmodule
