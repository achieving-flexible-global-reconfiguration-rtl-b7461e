// tb_rrnet_patterns: synthetic traffic on the whole ring network, 4 x 4
// mesh (2 + 2 rings), 400-cycle reconfiguration interval, mesh modelled as
// a fixed delay. Five patterns, three intervals each, at 8% injection per
// node and cycle:
//   uniform      any node but the source
//   shuffle      destination = source id rotated left by one bit
//   transpose    (row, column) -> (column, row)
//   bit-reverse  destination = source id with its bits reversed
//   hotspot      uniform, plus 20% of the packets to 2 fixed hotspot nodes
// Nodes whose pattern maps them onto themselves stay idle.
// Checks: every packet reaches its destination exactly once; every
// allocation equals a reference allocation computed from the testbench's
// own count of the traffic; every pattern sends packets over the rings.
// Prints, per pattern, the share of packets carried by the rings and the
// mean latency from injection to ejection.
module tb_rrnet_patterns;
  import rrnet_pkg::*;
  localparam int unsigned N = 4, INTERVAL = 400;
  localparam int unsigned R = N / 2, NN = N * N, MESH_DELAY = 12, PCT = 8;

  logic clk = 0, rst_n = 0;
  logic [NN-1:0] inj_valid, inj_ready, ej_valid, ej_ready, rtr_inj_valid, rtr_inj_ready, rtr_ej_valid, rtr_ej_ready;
  logic [NN-1:0][NODE_W-1:0] inj_dst;
  logic [NN-1:0][DATA_W-1:0] inj_data;
  pkt_t [NN-1:0] ej_pkt, rtr_inj_pkt, rtr_ej_pkt;
  phase_e phase;
  logic [R-1:0][R-1:0] grant;
  logic ev_reconfig, ev_reuse, ev_abort;
  logic [NN-1:0] ev_ring_inj, ev_ring_ej, ev_deflect;

  rrnet_top #(.N(N), .INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- reference allocation ----------------
  function automatic void ref_alloc(input int fm[R][R], output bit gm[R][R]);
    bit rm[R], cm[R];
    int req[R];
    for (int i = 0; i < R; i++) begin rm[i] = 0; cm[i] = 0; for (int j = 0; j < R; j++) gm[i][j] = 0; end
    for (int it = 0; it < R; it++) begin
      for (int i = 0; i < R; i++) begin
        req[i] = -1;
        if (!rm[i])
          for (int j = 0; j < R; j++)
            if (!cm[j] && (req[i] < 0 || fm[i][j] > fm[i][req[i]])) req[i] = j;
      end
      for (int j = 0; j < R; j++) begin
        int win;
        win = -1;
        for (int i = 0; i < R; i++)
          if (req[i] == j && (win < 0 || fm[i][j] > fm[win][j])) win = i;
        if (win >= 0) begin gm[win][j] = 1; rm[win] = 1; cm[j] = 1; end
      end
    end
  endfunction

  // ---------------- state ----------------
  int   f_cnt[R][R], f_last[R][R];
  pkt_t mq[NN][$];
  int   mt[NN][$];
  int   exp_dst[int];
  int   cyc = 0, next_id = 1;
  int   blocked = -1;
  // mechanism counters
  int   n_ring_inj = 0, n_mesh = 0, n_ring_ej = 0, n_defl = 0, n_drain_ej = 0;
  int   n_probe = 0, n_reconf = 0, n_reuse = 0, n_abort = 0, n_alloc = 0;
  int   outcome;            // of the last allocation: 1 reconfig, 2 reuse, 3 abort
  int   step2_len = 0, in_step2 = 0;

  // one clock cycle of traffic and bookkeeping, from a negedge to the next
  task automatic cycle_step(input bit traffic);
    // new injections (a refused one is retried with the same packet)
    for (int s = 0; s < NN; s++) begin
      if (!inj_valid[s] && traffic && $urandom_range(0, 99) < PCT) begin
        int d;
        d = pattern_dst(s);
        if (d < 0) continue;
        inj_valid[s] = 1;
        inj_dst[s]   = NODE_W'(d);
        inj_data[s]  = DATA_W'(next_id);
        exp_dst[next_id] = d;
        t_inj[next_id]   = cyc;
        next_id++;
      end
    end
    for (int d = 0; d < NN; d++) begin
      rtr_ej_valid[d] = (mq[d].size() > 0) && (mt[d][0] <= cyc);
      rtr_ej_pkt[d]   = (mq[d].size() > 0) ? mq[d][0] : '0;
      ej_ready[d]     = (d != blocked);
    end
    #1;
    // sample the handshakes that complete at the coming edge
    for (int s = 0; s < NN; s++) begin
      if (inj_valid[s] && inj_ready[s]) begin
        int i, j;
        i = (s / N) / 2;
        j = (int'(inj_dst[s]) % N) / 2;
        f_cnt[i][j]++;
        if (ev_ring_inj[s]) n_ring_inj++; else n_mesh++;
      end
      if (rtr_inj_valid[s] && rtr_inj_ready[s]) begin
        mq[rtr_inj_pkt[s].dst].push_back(rtr_inj_pkt[s]);
        mt[rtr_inj_pkt[s].dst].push_back(cyc + MESH_DELAY);
      end
    end
    for (int d = 0; d < NN; d++) begin
      if (rtr_ej_valid[d] && rtr_ej_ready[d]) begin
        void'(mq[d].pop_front());
        void'(mt[d].pop_front());
      end
      if (ej_valid[d] && ej_ready[d]) begin
        int id;
        id = int'(ej_pkt[d].data);
        checks++;
        if (!exp_dst.exists(id) || exp_dst[id] != d || int'(ej_pkt[d].dst) != d) begin
          failures++;
          if (failures < 10) $display("bad delivery of packet %0d at node %0d", id, d);
        end else begin
          lat_sum += cyc - t_inj[id];
          n_lat++;
          exp_dst.delete(id);
          t_inj.delete(id);
        end
        if (phase == PH_DRAIN) n_drain_ej++;
      end
    end
    n_ring_ej += $countones(ev_ring_ej);
    n_defl    += $countones(ev_deflect);
    if (dut.probe_start) n_probe++;
    // interval bookkeeping: the monitor's snapshot includes this cycle
    if (dut.snap) begin
      f_last = f_cnt;
      for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) f_cnt[i][j] = 0;
    end
    if (dut.alloc_done) begin
      bit gm[R][R];
      n_alloc++;
      ref_alloc(f_last, gm);
      for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) begin
        checks++;
        if (dut.alloc_grant[i][j] != gm[i][j]) begin
          failures++;
          $display("allocation %0d: grant[%0d][%0d]=%0b reference %0b", n_alloc, i, j, dut.alloc_grant[i][j], gm[i][j]);
        end
      end
    end
    if (ev_reuse) begin n_reuse++; outcome = 2; end
    if (ev_abort) begin n_abort++; outcome = 3; end
    if (ev_reconfig) begin n_reconf++; outcome = 1; end
    // length of step 2 (drain, switch, update)
    if (phase != PH_RUN) begin in_step2 = 1; step2_len++; end
    else if (in_step2) begin
      in_step2 = 0;
      if (outcome == 1) begin
        checks++;
        if (step2_len != 8 * N - 7) begin failures++; $display("step 2 took %0d cycles", step2_len); end
      end
      step2_len = 0;
    end
    @(negedge clk);
    cyc++;
    for (int s = 0; s < NN; s++)
      if (inj_valid[s] && inj_ready_q[s]) inj_valid[s] = 0;
  endtask

  // inj_ready as seen at the last edge
  logic [NN-1:0] inj_ready_q;
  always @(posedge clk) inj_ready_q <= inj_ready;

  localparam int unsigned LOG_NN = $clog2(NN);
  localparam int unsigned NPAT = 5;
  int cur_pat = 0;
  int t_inj[int];
  longint lat_sum = 0;
  int n_lat = 0;

  function automatic int pattern_dst(input int s);
    int d, r, c;
    r = s / N; c = s % N;
    case (cur_pat)
      0: d = $urandom_range(0, NN - 1);
      1: d = ((s << 1) | (s >> (LOG_NN - 1))) & (NN - 1);
      2: d = c * N + r;
      3: begin
        d = 0;
        for (int b = 0; b < LOG_NN; b++) if (s[b]) d |= 1 << (LOG_NN - 1 - b);
      end
      default: d = ($urandom_range(0, 9) < 2) ? (($urandom_range(0, 1) == 1) ? 5 : 10) : $urandom_range(0, NN - 1);
    endcase
    if (d == s) d = (cur_pat == 0 || cur_pat == 4) ? (d + 1) % NN : -1;
    return d;
  endfunction

  string pname[NPAT] = '{"uniform", "shuffle", "transpose", "bit-reverse", "hotspot"};

  initial begin
    for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) f_cnt[i][j] = 0;
    inj_valid = '0; inj_dst = '0; inj_data = '0;
    ej_ready = '1; rtr_inj_ready = '1; rtr_ej_valid = '0; rtr_ej_pkt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPAT; p++) begin
      int ri0, mi0, ls0, nl0, rc0;
      cur_pat = p;
      ri0 = n_ring_inj; mi0 = n_mesh; rc0 = n_reconf;
      lat_sum = 0; n_lat = 0;
      repeat (3 * INTERVAL) cycle_step(1);
      $display("%-12s ring share %0d%% (%0d of %0d), mean latency %0d.%0d cycles, reconfigurations %0d",
               pname[p], (n_ring_inj - ri0) * 100 / (n_ring_inj - ri0 + n_mesh - mi0),
               n_ring_inj - ri0, n_ring_inj - ri0 + n_mesh - mi0,
               int'(lat_sum / n_lat), int'((lat_sum * 10 / n_lat) % 10), n_reconf - rc0);
      checks++;
      if (n_ring_inj == ri0) begin failures++; $display("%s: no packet used the rings", pname[p]); end
    end
    for (int c = 0; c < 400 && exp_dst.size() > 0; c++) cycle_step(0);
    checks++;
    if (exp_dst.size() != 0) begin failures++; $display("%0d packets not delivered", exp_dst.size()); end
    checks++;
    if (n_reconf == 0) begin failures++; $display("no reconfiguration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
