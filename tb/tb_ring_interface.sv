// tb_ring_interface: one ring interface (node 5 of a 4 x 4 mesh) driven
// directly on its ring links. Checks: pass-through with the switch off and
// exchanged outputs with it on; ejection of a flit for this node; the older
// of two simultaneous flits ejected and the other deflected; probe handling
// (forwarded with one more hop, sender recorded in the routing table with
// the reverse direction, own probe dropped); the four probes sent on
// probe_start; injection onto the ring and direction the table names, and
// to the router when that output is busy, the table has no entry or the
// phase is not PH_RUN.
module tb_ring_interface;
  import rrnet_pkg::*;
  localparam int unsigned N = 4, ME = 5;
  logic clk = 0, rst_n = 0, probe_start = 0, sw_en = 0;
  phase_e phase = PH_RUN;
  logic [TS_W-1:0] now_ts = '0;
  ring_flit_t [1:0][1:0] ring_in, ring_out;
  logic inj_valid = 0, inj_ready, rtr_inj_valid, rtr_inj_ready = 1, rtr_ej_valid = 0, rtr_ej_ready;
  logic ej_valid, ej_ready = 1, ev_ring_inj, ev_ring_ej, ev_deflect, ring_busy;
  logic [NODE_W-1:0] inj_dst = '0;
  logic [DATA_W-1:0] inj_data = '0;
  pkt_t rtr_inj_pkt, rtr_ej_pkt = '0, ej_pkt;
  int checks = 0, failures = 0;

  ring_interface #(.N(N), .NODE(ME)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ring_flit_t data_flit(int dst, int ts, int tag);
    ring_flit_t f;
    f = '0;
    f.valid = 1; f.pkt.dst = NODE_W'(dst); f.pkt.ts = TS_W'(ts); f.pkt.data = DATA_W'(tag);
    return f;
  endfunction
  function automatic ring_flit_t probe_flit(int src, int hops);
    ring_flit_t f;
    f = '0;
    f.valid = 1; f.probe = 1; f.pkt.src = NODE_W'(src); f.hops = HOP_W'(hops);
    return f;
  endfunction

  // present `f` on the links for one cycle; outputs are checked one cycle later
  task automatic drive(input ring_flit_t [1:0][1:0] f);
    @(negedge clk);
    ring_in = f;
    @(negedge clk);
    ring_in = '0;
    #1;
  endtask

  initial begin
    ring_flit_t [1:0][1:0] f;
    ring_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // pass-through, switch off then on
    for (int s = 0; s < 2; s++) begin
      sw_en = s[0];
      f = '0;
      f[RING_H][DIR_CW]  = data_flit(9, 1, 11);
      f[RING_V][DIR_CW]  = data_flit(3, 1, 22);
      f[RING_H][DIR_ACW] = data_flit(7, 1, 33);
      drive(f);
      chk(ring_out[s ? RING_V : RING_H][DIR_CW].pkt.data == 11, "H cw passes");
      chk(ring_out[s ? RING_H : RING_V][DIR_CW].pkt.data == 22, "V cw passes");
      chk(ring_out[s ? RING_V : RING_H][DIR_ACW].pkt.data == 33, "H acw passes");
      chk(!ring_out[s ? RING_H : RING_V][DIR_ACW].valid, "V acw idle");
    end
    sw_en = 0;

    // ejection of a flit for this node
    f = '0;
    f[RING_V][DIR_ACW] = data_flit(ME, 7, 44);
    drive(f);
    chk(ev_ring_ej && !ev_deflect, "eject event");
    chk(!ring_out[RING_V][DIR_ACW].valid, "ejected flit leaves the ring");
    @(negedge clk); #1;
    chk(ej_valid && ej_pkt.data == 44, "ejected packet delivered");
    @(negedge clk);

    // two flits for this node on the same ring: older one ejected
    f = '0;
    f[RING_H][DIR_CW]  = data_flit(ME, 20, 55);
    f[RING_H][DIR_ACW] = data_flit(ME, 10, 66);
    drive(f);
    chk(ev_deflect, "deflection flagged");
    chk(ring_out[RING_H][DIR_CW].valid && ring_out[RING_H][DIR_CW].pkt.data == 55, "younger deflected");
    chk(!ring_out[RING_H][DIR_ACW].valid, "older ejected");
    @(negedge clk); #1;
    chk(ej_valid && ej_pkt.data == 66, "older delivered");
    @(negedge clk);

    // routing table rebuild with the switch on
    sw_en = 1;
    @(negedge clk);
    phase = PH_SWITCH;
    @(negedge clk);
    phase = PH_UPDATE;
    probe_start = 1;
    #1;
    for (int r = 0; r < 2; r++) for (int d = 0; d < 2; d++)
      chk(ring_out[r][d].valid && ring_out[r][d].probe && ring_out[r][d].pkt.src == ME
          && ring_out[r][d].hops == 1, "own probes sent");
    @(negedge clk);
    probe_start = 0;
    // probe from 9 arrives clockwise on H (3 hops), from 2 anticlockwise on V,
    // own probe returns on V clockwise
    f = '0;
    f[RING_H][DIR_CW]  = probe_flit(9, 3);
    f[RING_V][DIR_ACW] = probe_flit(2, 1);
    f[RING_V][DIR_CW]  = probe_flit(ME, 12);
    ring_in = f;
    @(negedge clk);
    ring_in = '0;
    #1;
    chk(ring_out[RING_V][DIR_CW].probe && ring_out[RING_V][DIR_CW].hops == 4 && ring_out[RING_V][DIR_CW].pkt.src == 9,
        "probe forwarded through the switch with one more hop");
    chk(!ring_out[RING_H][DIR_CW].valid, "own probe dropped");
    // later, slower probe from 9 must not overwrite the entry
    f = '0;
    f[RING_V][DIR_ACW] = probe_flit(9, 9);
    ring_in = f;
    @(negedge clk);
    ring_in = '0;
    @(negedge clk);   // the slow probe passes on in this cycle
    phase = PH_RUN;
    #1;
    // 9 came clockwise on H with the switch on: send anticlockwise on ring H^1 = V
    inj_valid = 1; inj_dst = 9; inj_data = 77;
    #1;
    chk(ev_ring_inj && inj_ready, "injected to ring");
    chk(ring_out[RING_H][DIR_ACW].valid && ring_out[RING_H][DIR_ACW].pkt.data == 77
        && ring_out[RING_H][DIR_ACW].pkt.src == ME, "physical output H (lane V through switch), anticlockwise");
    chk(!rtr_inj_valid, "not to router");
    // 2 came anticlockwise on V: send clockwise, lane V^1 = H, physical V
    inj_dst = 2;
    #1;
    chk(ring_out[RING_V][DIR_CW].valid && ring_out[RING_V][DIR_CW].pkt.dst == 2, "clockwise, physical V");
    // busy output: a passing flit occupies physical V cw -> router
    @(negedge clk);
    f = '0;
    f[RING_H][DIR_CW] = data_flit(14, 3, 88);   // switch on: leaves on V cw
    ring_in = f;
    @(negedge clk);
    ring_in = '0;
    #1;
    chk(rtr_inj_valid && !ev_ring_inj && rtr_inj_pkt.dst == 2, "busy ring output: to router");
    chk(ring_out[RING_V][DIR_CW].pkt.data == 88, "passing flit keeps its slot");
    // unknown destination -> router
    @(negedge clk);
    inj_dst = 12;
    #1;
    chk(rtr_inj_valid && !ev_ring_inj, "no route: to router");
    // draining: no ring injection
    inj_dst = 9;
    phase = PH_DRAIN;
    #1;
    chk(rtr_inj_valid && !ev_ring_inj, "drain: to router");
    rtr_inj_ready = 0;
    #1;
    chk(!inj_ready, "router full and ring closed: core stalls");
    @(negedge clk);
    inj_valid = 0; rtr_inj_ready = 1; phase = PH_RUN;
    // router ejection path
    rtr_ej_valid = 1; rtr_ej_pkt = '0; rtr_ej_pkt.data = 99;
    #1;
    chk(rtr_ej_ready, "router ejection buffer free");
    @(negedge clk);
    rtr_ej_valid = 0;
    #1;
    chk(ej_valid && ej_pkt.data == 99, "router packet ejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
