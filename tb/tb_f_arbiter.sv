// tb_f_arbiter: checks the F arbiter against a reference "largest enabled
// f, first one on a tie" and checks that the grant appears exactly R cycles
// after start (one comparator hop per cycle).
module tb_f_arbiter;
  localparam int unsigned R = 6, F_W = 8;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [R-1:0][F_W-1:0] f;
  logic [R-1:0] en, g;
  int checks = 0, failures = 0;

  f_arbiter #(.R(R), .F_W(F_W)) dut (.clk, .rst_n, .start, .f, .en, .done, .g);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f = '0; en = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [R-1:0] exp_g;
      int best;
      int lat;
      @(negedge clk);
      for (int k = 0; k < R; k++) begin
        f[k]  = F_W'($urandom_range(0, (n % 2) ? 5 : 200));
        en[k] = ($urandom_range(0, 3) != 0);
      end
      if (n % 50 == 0) en = '0;
      best = -1;
      for (int k = 0; k < R; k++)
        if (en[k] && (best < 0 || f[k] > f[best])) best = k;
      exp_g = '0;
      if (best >= 0) exp_g[best] = 1'b1;
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 3 * R) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != R) begin
        failures++;
        $display("latency %0d, expected %0d", lat, R);
      end
      checks++;
      if (g !== exp_g) begin
        failures++;
        if (failures < 5) $display("grant %b expected %b", g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
