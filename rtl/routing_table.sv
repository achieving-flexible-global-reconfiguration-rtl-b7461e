// routing_table: per-node ring routing table, 3 bits per destination.
//
// Entry d says whether node d can be reached over a ring from this node
// (reach), on which of the node's two rings to inject (ring: horizontal or
// vertical, counted before the reconfiguration switch) and in which
// direction (dir: clockwise or anticlockwise). With M nodes the table holds
// 3M bits.
//
// The table is rebuilt after every reconfiguration. `clear` resets every
// entry to 000. While probes circulate, up to NWR probe arrivals per cycle
// present an entry through the write ports; an entry is written only while
// it is still 000, so the first probe from a node wins. Because probes move
// one hop per cycle and all nodes send theirs in the same cycle, the first
// arrival is the one with the fewer hops, i.e. the shorter way round the
// combined ring. When two ports write the same entry in one cycle, the
// lower-numbered port wins. Lookup is combinational.
module routing_table
  import rrnet_pkg::*;
#(
  parameter int unsigned M   = 64,  // number of nodes
  parameter int unsigned NWR = 4    // probe write ports
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [NWR-1:0]               wr_en,
  input  logic [NWR-1:0][NODE_W-1:0]   wr_node,
  input  route_t [NWR-1:0]             wr_route,
  input  logic [NODE_W-1:0]            rd_node,
  output route_t                       rd_route
);
  localparam int unsigned IDX_W = (M > 1) ? $clog2(M) : 1;

  route_t tbl_q [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < M; e++) tbl_q[e] <= '0;
    end else if (clear) begin
      for (int e = 0; e < M; e++) tbl_q[e] <= '0;
    end else begin
      // highest port first so the lowest-numbered port's write lands last
      for (int p = NWR - 1; p >= 0; p--) begin
        if (wr_en[p] && (32'(wr_node[p]) < M) && !tbl_q[IDX_W'(wr_node[p])].reach)
          tbl_q[IDX_W'(wr_node[p])] <= wr_route[p];
      end
    end
  end

  always_comb begin
    if (32'(rd_node) < M) rd_route = tbl_q[IDX_W'(rd_node)];
    else                  rd_route = '0;
  end
endmodule
