// tb_rrnet_top: end-to-end test of the ring network on a 4 x 4 mesh
// (2 + 2 rings) with a 400-cycle reconfiguration interval.
// tb_rrnet_top_full runs the same test at the default size.
//
// Cores inject packets whose destinations follow a traffic pattern per
// interval: 90% of the packets from horizontal ring i go to vertical ring
// P[i], the rest anywhere (30% in interval 2). With
// A[i] = (i+1) mod R and B[i] = i: A model mesh (fixed delay) carries what the rings
// do not take. Five intervals:
//   0  pattern A: rings uncombined, all traffic on the mesh; reconfigure to A
//   1  pattern A again: allocation unchanged, rings reused
//   2  pattern B, and one core stops accepting ejected packets around the
//      interval end, so ring packets for it are deflected while draining:
//      the reconfiguration is abandoned
//   3  pattern B: reconfigure to B (a reconfiguration can also be
//      abandoned when packets happen to collide while draining)
//   4  pattern A: reconfigure back to A
// Checks: every packet reaches its destination exactly once; every
// allocation equals a reference allocation computed from the testbench's
// own count of the interval's traffic; each reconfiguration takes 8N-7
// cycles; the expected outcome (reconfigure / reuse / abort) per interval;
// and each mechanism happened: ring injection, mesh fallback, ring
// ejection, deflection, ejection while draining, probes, reconfiguration,
// reuse and abandonment.
module tb_rrnet_top;
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
    repeat (20000) @(posedge clk);
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
  int   pat[R];
  int   rnd_share = 1;      // tenths of the traffic sent anywhere
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
        int i, d;
        i = (s / N) / 2;
        if ($urandom_range(0, 9) >= rnd_share) d = $urandom_range(0, N - 1) * N + 2 * pat[i] + $urandom_range(0, 1);
        else                           d = $urandom_range(0, NN - 1);
        if (d == s) d = (d + N) % NN;
        inj_valid[s] = 1;
        inj_dst[s]   = NODE_W'(d);
        inj_data[s]  = DATA_W'(next_id);
        exp_dst[next_id] = d;
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
        end else exp_dst.delete(id);
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

  task automatic run_interval(input int shift, input int block_node, input int exp_outcome);
    for (int i = 0; i < R; i++) pat[i] = (i + shift) % R;
    rnd_share = (block_node >= 0) ? 3 : 1;
    outcome = 0;
    // run until this interval's snapshot
    while (!dut.snap) begin
      blocked = (block_node >= 0 && int'(dut.u_ctrl.iv_q) > INTERVAL * 6 / 10) ? block_node : -1;
      cycle_step(1);
    end
    // keep traffic flowing while the allocation and step 2 run
    for (int c = 0; c < 2 * R * R + 8 * N + 30; c++) begin
      blocked = (block_node >= 0 && c < 2 * R * R + 8 * N) ? block_node : -1;
      cycle_step(1);
    end
    blocked = -1;
    // a reconfiguration may also be abandoned, or find the grant already in
    // place after an earlier abandonment, when packets happen to be
    // deflected while draining
    checks++;
    if (exp_outcome == 1 ? (outcome == 0) : (outcome != exp_outcome)) begin
      failures++;
      $display("interval outcome %0d, expected %0d", outcome, exp_outcome);
    end
  endtask

  logic [R-1:0][R-1:0] grant_a;

  initial begin
    for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) f_cnt[i][j] = 0;
    inj_valid = '0; inj_dst = '0; inj_data = '0;
    ej_ready = '1; rtr_inj_ready = '1; rtr_ej_valid = '0; rtr_ej_pkt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run_interval(1, -1, 1);            // A: first reconfiguration
    grant_a = grant;
    run_interval(1, -1, 2);            // A again: reuse
    checks++;
    if (grant != grant_a) begin failures++; $display("grant changed on reuse"); end
    run_interval(0, NN / 2 + 2, 3);    // B with a stalled core: abort
    checks++;
    if (grant != grant_a) begin failures++; $display("grant changed after abort"); end
    run_interval(0, -1, 1);            // B: reconfigure
    run_interval(1, -1, 1);            // A: reconfigure
    // drain everything
    for (int c = 0; c < 400 && exp_dst.size() > 0; c++) cycle_step(0);
    checks++;
    if (exp_dst.size() != 0) begin failures++; $display("%0d packets not delivered", exp_dst.size()); end
    $display("ring injections %0d, mesh injections %0d, ring ejections %0d, deflections %0d",
             n_ring_inj, n_mesh, n_ring_ej, n_defl);
    $display("ejections while draining %0d, probe rounds %0d, allocations %0d, reconfigurations %0d, reuses %0d, aborts %0d",
             n_drain_ej, n_probe, n_alloc, n_reconf, n_reuse, n_abort);
    checks++; if (n_ring_inj == 0) begin failures++; $display("no ring injection"); end
    checks++; if (n_mesh == 0)     begin failures++; $display("no mesh fallback"); end
    checks++; if (n_ring_ej == 0)  begin failures++; $display("no ring ejection"); end
    checks++; if (n_defl == 0)     begin failures++; $display("no deflection"); end
    checks++; if (n_drain_ej == 0) begin failures++; $display("no ejection while draining"); end
    checks++; if (n_probe != n_reconf) begin failures++; $display("probe rounds != reconfigurations"); end
    checks++; if (n_reconf == 0)   begin failures++; $display("reconfigurations %0d", n_reconf); end
    checks++; if (n_reuse == 0)    begin failures++; $display("no reuse"); end
    checks++; if (n_abort == 0)    begin failures++; $display("no abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
