// tb_ring_network: 6 x 6 ring network (3 horizontal, 3 vertical rings),
// driven through every one of the 6 ways to combine the rings, which puts
// reconfiguration points at corners, borders and the centre.
// For each grant the test
//  * loads the switches and rebuilds the routing tables with probes
//    (phase PH_SWITCH, then 4(N-1) cycles of PH_UPDATE);
//  * walks its own model of the links and switches to find every combined
//    ring and checks that each has 4(N-1) or 4 nodes;
//  * sends single packets between random node pairs: a pair the model says
//    is ring-connected must go on a ring and arrive exactly (shortest ring
//    distance + 1) cycles later, any other pair must go to the mesh;
//  * runs random bursts through the rings and a model mesh and checks every
//    packet arrives once, at the right node, and that deflections occur.
module tb_ring_network;
  import rrnet_pkg::*;
  localparam int unsigned N = 6, R = N / 2, NN = N * N, MESH_DELAY = 6;

  logic clk = 0, rst_n = 0;
  phase_e phase;
  logic probe_start;
  logic [R-1:0][R-1:0] grant;
  logic [TS_W-1:0] now_ts;
  logic [NN-1:0] inj_valid, inj_ready, rtr_inj_valid, rtr_inj_ready, rtr_ej_valid, rtr_ej_ready;
  logic [NN-1:0] ej_valid, ej_ready, ev_ring_inj, ev_ring_ej, ev_deflect, ring_busy;
  logic [NN-1:0][NODE_W-1:0] inj_dst;
  logic [NN-1:0][DATA_W-1:0] inj_data;
  pkt_t [NN-1:0] rtr_inj_pkt, rtr_ej_pkt, ej_pkt;

  ring_network #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ring = 0, n_mesh = 0, n_defl = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- reference model of the link graph ----------------
  function automatic int nxt(int n, int ring);    // clockwise successor
    int r, c;
    r = n / N; c = n % N;
    if (ring == 0) begin
      if (r % 2 == 0) return (c < N - 1) ? n + 1 : n + N;
      else            return (c > 0) ? n - 1 : n - N;
    end else begin
      if (c % 2 == 0) return (r > 0) ? n - N : n + 1;
      else            return (r < N - 1) ? n + N : n - 1;
    end
  endfunction
  function automatic int prv(int n, int ring);    // clockwise predecessor
    for (int m = 0; m < NN; m++) if (nxt(m, ring) == n) return m;
    return -1;
  endfunction
  function automatic bit swn(int n);
    return grant[(n / N) / 2][(n % N) / 2];
  endfunction

  int rdist[NN][NN];   // shortest ring distance, 0 = not connected

  task automatic build_model();
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) rdist[s][d] = 0;
    for (int s = 0; s < NN; s++)
      for (int y0 = 0; y0 < 2; y0++)
        for (int dir = 0; dir < 2; dir++) begin
          int n, y, h;
          n = s; y = y0; h = 0;
          do begin
            n = dir ? prv(n, y) : nxt(n, y);   // flit arrives at n on ring y
            h++;
            if (n != s && (rdist[s][n] == 0 || h < rdist[s][n])) rdist[s][n] = h;
            y = y ^ int'(swn(n));              // leaves n on the exchanged ring
          end while (!(n == s && y == y0) && h < 4 * NN);
          // the walk left s on ring y0; it closes when it leaves s there again
          checks++;
          if (!(h == 4 * (N - 1) || h == 4)) begin
            failures++;
            $display("ring through node %0d has %0d nodes", s, h);
          end
        end
  endtask

  // ---------------- drivers ----------------
  task automatic reconfigure(input logic [R-1:0][R-1:0] g);
    @(negedge clk);
    phase = PH_SWITCH;
    @(negedge clk);
    grant = g;
    phase = PH_UPDATE;
    probe_start = 1;
    @(negedge clk);
    probe_start = 0;
    repeat (4 * (N - 1) - 1) @(negedge clk);
    phase = PH_RUN;
  endtask

  // model mesh: packet reaches its destination MESH_DELAY cycles later
  pkt_t mq[NN][$];
  int   mt[NN][$];
  int   cyc = 0;
  // scoreboard: outstanding packet ids and their destinations
  int   exp_dst[int];

  always @(negedge clk) cyc++;

  // one cycle of the background machinery; called at each negedge
  task automatic service();
    #1;  // let the inputs set at this negedge settle
    // mesh accepts everything
    for (int s = 0; s < NN; s++)
      if (rtr_inj_valid[s]) begin
        mq[rtr_inj_pkt[s].dst].push_back(rtr_inj_pkt[s]);
        mt[rtr_inj_pkt[s].dst].push_back(cyc + MESH_DELAY);
      end
    // mesh delivery handshake resolved before the edge
    for (int d = 0; d < NN; d++) begin
      rtr_ej_valid[d] = (mq[d].size() > 0) && (mt[d][0] <= cyc);
      rtr_ej_pkt[d]   = (mq[d].size() > 0) ? mq[d][0] : '0;
    end
    #1;
    for (int d = 0; d < NN; d++)
      if (rtr_ej_valid[d] && rtr_ej_ready[d]) begin
        void'(mq[d].pop_front());
        void'(mt[d].pop_front());
      end
    // ejection to cores (always ready)
    for (int d = 0; d < NN; d++)
      if (ej_valid[d]) begin
        int id;
        id = int'(ej_pkt[d].data);
        checks++;
        if (!exp_dst.exists(id) || exp_dst[id] != d || int'(ej_pkt[d].dst) != d) begin
          failures++;
          if (failures < 10) $display("bad delivery id %0d at node %0d", id, d);
        end else exp_dst.delete(id);
      end
    n_defl += $countones(ev_deflect);
  endtask

  int next_id = 1;

  // single packet from s to d; returns after it has arrived
  task automatic single(input int s, input int d);
    int id, lat;
    time t0;
    bit on_ring;
    @(negedge clk);
    id = next_id++;
    inj_valid[s] = 1; inj_dst[s] = NODE_W'(d); inj_data[s] = DATA_W'(id);
    exp_dst[id] = d;
    #1;
    on_ring = ev_ring_inj[s];
    checks++;
    if (!inj_ready[s]) begin failures++; $display("injection refused"); end
    checks++;
    if (on_ring != (rdist[s][d] != 0)) begin
      failures++;
      if (failures < 10) $display("%0d->%0d ring=%0b model distance %0d", s, d, on_ring, rdist[s][d]);
    end
    if (on_ring) n_ring++; else n_mesh++;
    t0 = $time;
    service();
    @(negedge clk);
    inj_valid[s] = 0;
    lat = 1;
    service();
    while (exp_dst.exists(id) && lat < 200) begin
      @(negedge clk);
      lat = int'(($time - t0 + 5) / 10);
      service();
    end
    if (on_ring) begin
      checks++;
      if (lat != rdist[s][d] + 1) begin
        failures++;
        if (failures < 10) $display("%0d->%0d latency %0d expected %0d", s, d, lat, rdist[s][d] + 1);
      end
    end
  endtask

  // random traffic for `len` cycles, then wait until everything arrived
  task automatic burst(input int len, input int pct);
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      for (int s = 0; s < NN; s++) begin
        inj_valid[s] = ($urandom_range(0, 99) < pct);
        inj_dst[s]   = NODE_W'((s + $urandom_range(1, NN - 1)) % NN);
        inj_data[s]  = DATA_W'(next_id);
        if (inj_valid[s]) begin exp_dst[next_id] = int'(inj_dst[s]); next_id++; end
      end
      #1;
      for (int s = 0; s < NN; s++)
        if (inj_valid[s]) begin
          checks++;
          if (!inj_ready[s]) begin failures++; $display("burst injection refused"); end
          if (ev_ring_inj[s]) n_ring++; else n_mesh++;
        end
      service();
    end
    @(negedge clk);
    inj_valid = '0;
    service();
    for (int c = 0; c < 300 && exp_dst.size() > 0; c++) begin
      @(negedge clk);
      service();
    end
    checks++;
    if (exp_dst.size() != 0) begin failures++; $display("%0d packets lost", exp_dst.size()); end
    for (int c = 0; c < 10; c++) begin @(negedge clk); service(); end
  endtask

  logic [R-1:0][R-1:0] perms[6];

  initial begin
    perms[0] = 9'b100_010_001; perms[1] = 9'b010_100_001; perms[2] = 9'b100_001_010;
    perms[3] = 9'b001_100_010; perms[4] = 9'b010_001_100; perms[5] = 9'b001_010_100;
    phase = PH_RUN; probe_start = 0; grant = '0; now_ts = '0;
    inj_valid = '0; inj_dst = '0; inj_data = '0;
    rtr_inj_ready = '1; rtr_ej_valid = '0; rtr_ej_pkt = '0; ej_ready = '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // before any reconfiguration every packet uses the mesh
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) rdist[s][d] = 0;
    for (int k = 0; k < 20; k++) single($urandom_range(0, NN - 1), ($urandom_range(1, NN - 1) + k) % NN);
    for (int p = 0; p < 6; p++) begin
      reconfigure(perms[p]);
      build_model();
      for (int k = 0; k < 150; k++) begin
        int s, d;
        s = $urandom_range(0, NN - 1);
        d = (s + $urandom_range(1, NN - 1)) % NN;
        single(s, d);
      end
      burst(60, 30);
    end
    $display("ring packets %0d, mesh packets %0d, deflections %0d", n_ring, n_mesh, n_defl);
    checks++;
    if (n_defl == 0 || n_ring == 0 || n_mesh == 0) begin failures++; $display("a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) now_ts <= now_ts + 1'b1;
endmodule
