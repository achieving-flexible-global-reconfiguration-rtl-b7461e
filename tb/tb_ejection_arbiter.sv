// tb_ejection_arbiter: fills the three ejection buffers with packets of
// random age and checks the ejection order: oldest first in normal mode,
// horizontal ring, vertical ring, router while draining. Also checks that
// a full buffer refuses new packets and that the ejection handshake holds
// a packet while ej_ready is low.
module tb_ejection_arbiter;
  import rrnet_pkg::*;
  logic clk = 0, rst_n = 0, drain = 0;
  logic rtr_valid, rtr_ready, h_valid, h_free, v_valid, v_free, ej_valid, ej_ready;
  pkt_t rtr_pkt, h_pkt, v_pkt, ej_pkt;
  int checks = 0, failures = 0;

  ejection_arbiter dut (.clk, .rst_n, .drain, .rtr_valid, .rtr_pkt, .rtr_ready,
    .ring_h_valid(h_valid), .ring_h_pkt(h_pkt), .ring_h_free(h_free),
    .ring_v_valid(v_valid), .ring_v_pkt(v_pkt), .ring_v_free(v_free),
    .ej_valid, .ej_pkt, .ej_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_t mk(input int tag, input int ts);
    pkt_t p;
    p = '0;
    p.data = DATA_W'(tag);
    p.ts   = TS_W'(ts);
    return p;
  endfunction

  initial begin
    rtr_valid = 0; h_valid = 0; v_valid = 0; ej_ready = 0;
    rtr_pkt = '0; h_pkt = '0; v_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int ts[3];
      int order[3];
      int base;
      drain = (n % 3 == 0);
      base  = $urandom_range(0, 65535);   // exercises time-stamp wrap
      for (int k = 0; k < 3; k++) ts[k] = (base + $urandom_range(0, 300)) % 65536;
      @(negedge clk);
      h_valid = 1; h_pkt = mk(0, ts[0]);
      v_valid = 1; v_pkt = mk(1, ts[1]);
      rtr_valid = 1; rtr_pkt = mk(2, ts[2]);
      @(negedge clk);
      // buffers full now: free flags low
      checks++;
      if (h_free || v_free || rtr_ready) begin failures++; $display("buffers not full"); end
      h_valid = 0; v_valid = 0; rtr_valid = 0;
      // expected order
      // expected order: repeatedly the oldest remaining, lowest index on a tie
      begin
        bit used[3];
        for (int k = 0; k < 3; k++) used[k] = 0;
        for (int pos = 0; pos < 3; pos++) begin
          int pick;
          pick = -1;
          for (int k = 0; k < 3; k++)
            if (!used[k]) begin
              if (pick < 0) pick = k;
              else if (!drain && ((ts[k] - ts[pick] + 65536) % 65536) >= 32768) pick = k;
            end
          order[pos] = pick;
          used[pick] = 1;
        end
      end
      // hold ready low for a cycle: same packet stays
      @(negedge clk);
      checks++;
      if (!ej_valid || int'(ej_pkt.data) != order[0]) begin failures++; $display("hold failed"); end
      for (int k = 0; k < 3; k++) begin
        ej_ready = 1;
        #1;
        checks++;
        if (!ej_valid || int'(ej_pkt.data) != order[k]) begin
          failures++;
          if (failures < 8) $display("n=%0d drain=%0b pos %0d got %0d exp %0d ts=%0d,%0d,%0d", n, drain, k, ej_pkt.data, order[k], ts[0], ts[1], ts[2]);
        end
        @(negedge clk);
      end
      ej_ready = 0;
      checks++;
      if (ej_valid) begin failures++; $display("not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
