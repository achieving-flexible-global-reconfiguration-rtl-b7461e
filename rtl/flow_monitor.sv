// flow_monitor: measures the traffic matrix f used by the allocator.
//
// f[i][j] counts the packets injected during the current interval by nodes
// of horizontal ring i (rows 2i, 2i+1) for nodes of vertical ring j
// (columns 2j, 2j+1), whichever network (ring or mesh) carries them. These
// are the N/2 x N/2 "double row-column" flow features. Every node can
// inject one packet per cycle, so each counter adds the number of matching
// injections of the cycle; counters saturate at 2^F_W - 1.
//
// At the end of an interval the controller pulses `snap`: the counts,
// including that cycle's injections, are copied to f_snap (held until the
// next snap) and the counters restart from zero.
module flow_monitor
  import rrnet_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned F_W = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N*N-1:0]                   inj_fire,  // a packet was injected
  input  logic [N*N-1:0][NODE_W-1:0]       inj_dst,
  input  logic                             snap,
  output logic [N/2-1:0][N/2-1:0][F_W-1:0] f_snap
);
  localparam int unsigned R   = N / 2;
  localparam int unsigned CNT = $clog2(2 * N + 1);

  logic [R-1:0][R-1:0][F_W-1:0] cnt_q, cnt_next;

  always_comb begin
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++) begin
        logic [CNT-1:0]   inc;
        logic [F_W:0]     sum;
        inc = '0;
        for (int k = 0; k < 2 * N; k++) begin
          int unsigned src, dcol;
          src  = (2 * i) * N + k;          // rows 2i and 2i+1 are consecutive ids
          dcol = 32'(inj_dst[src]) % N;
          if (inj_fire[src] && (dcol / 2 == j)) inc = inc + 1'b1;
        end
        sum = {1'b0, cnt_q[i][j]} + (F_W+1)'(inc);
        cnt_next[i][j] = sum[F_W] ? {F_W{1'b1}} : sum[F_W-1:0];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      f_snap <= '0;
    end else if (snap) begin
      cnt_q  <= '0;
      f_snap <= cnt_next;
    end else begin
      cnt_q  <= cnt_next;
    end
  end
endmodule
