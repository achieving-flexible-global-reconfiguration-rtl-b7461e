// tb_reconfig_ctrl: drives the controller with a model allocator and
// checks the interval period, the allocator start, the phase sequence and
// its lengths (drain 4(N-1), switch 1, update 4(N-1): 8N-7 cycles), the
// probe pulse, the reuse of an unchanged grant and the abandonment of a
// reconfiguration when a packet is deflected while draining.
module tb_reconfig_ctrl;
  import rrnet_pkg::*;
  localparam int unsigned N = 4, R = 2, INTERVAL = 100, WIN = 4 * (N - 1);
  logic clk = 0, rst_n = 0;
  logic snap, alloc_start, alloc_done, deflect_any, probe_start;
  logic ev_reconfig, ev_reuse, ev_abort;
  logic [R-1:0][R-1:0] alloc_grant, grant;
  phase_e phase;
  int checks = 0, failures = 0;

  reconfig_ctrl #(.N(N), .INTERVAL(INTERVAL)) dut (.clk, .rst_n, .snap, .alloc_start, .alloc_done,
    .alloc_grant, .deflect_any, .phase, .probe_start, .grant, .ev_reconfig, .ev_reuse, .ev_abort);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  // one interval: wait for snap, answer the start with `g` after 8 cycles
  task automatic interval(input logic [R-1:0][R-1:0] g, input bit defl, input int exp_kind);
    int t_snap, n_drain, n_sw, n_upd, n_probe, probe_at, reconf, reuse, abort_n;
    logic [R-1:0][R-1:0] old;
    old = grant;
    while (!snap) @(negedge clk);
    @(negedge clk);
    expect_eq(int'(alloc_start), 1, "alloc_start after snap");
    repeat (7) @(negedge clk);
    alloc_grant = g; alloc_done = 1;
    #1;
    reuse = ev_reuse;
    @(negedge clk);
    alloc_done = 0;
    n_drain = 0; n_sw = 0; n_upd = 0; n_probe = 0; probe_at = -1; reconf = 0; abort_n = 0;
    for (int c = 0; c < 60; c++) begin
      if (phase == PH_DRAIN) begin
        n_drain++;
        deflect_any = defl && (n_drain == 3);
      end else deflect_any = 0;
      #1;
      if (phase == PH_SWITCH) n_sw++;
      if (phase == PH_UPDATE) begin
        if (probe_start) begin n_probe++; probe_at = n_upd; end
        n_upd++;
      end
      reconf += ev_reconfig;
      abort_n += ev_abort;
      @(negedge clk);
    end
    deflect_any = 0;
    if (exp_kind == 0) begin           // reuse
      expect_eq(reuse, 1, "reuse event");
      expect_eq(n_drain + n_sw + n_upd, 0, "no reconfiguration on reuse");
      expect_eq(int'(grant == old), 1, "grant kept on reuse");
    end else if (exp_kind == 1) begin  // reconfigure
      expect_eq(reuse, 0, "no reuse");
      expect_eq(n_drain, WIN, "drain cycles");
      expect_eq(n_sw, 1, "switch cycles");
      expect_eq(n_upd, WIN, "update cycles");
      expect_eq(n_drain + n_sw + n_upd, 8 * N - 7, "step 2 = 8N-7");
      expect_eq(n_probe, 1, "one probe pulse");
      expect_eq(probe_at, 0, "probe in first update cycle");
      expect_eq(reconf, 1, "reconfig event");
      expect_eq(int'(grant == g), 1, "new grant loaded");
    end else begin                     // abort
      expect_eq(n_drain, WIN, "drain cycles before abort");
      expect_eq(n_sw + n_upd, 0, "no switch after deflection");
      expect_eq(abort_n, 1, "abort event");
      expect_eq(int'(grant == old), 1, "grant kept after abort");
    end
  endtask

  initial begin
    int t0, t1;
    alloc_done = 0; alloc_grant = '0; deflect_any = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // interval period
    while (!snap) @(negedge clk);
    t0 = $time;
    @(negedge clk);
    while (!snap) @(negedge clk);
    t1 = $time;
    expect_eq((t1 - t0) / 10, INTERVAL, "interval period");
    @(negedge clk);
    interval(4'b1001, 0, 1);   // diagonal grant: reconfigure
    interval(4'b1001, 0, 0);   // same grant: reuse
    interval(4'b0110, 1, 2);   // deflection while draining: abort
    interval(4'b0110, 0, 1);   // then reconfigure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
