// tb_flow_monitor: random injections on a 4 x 4 mesh; the snapshot taken
// at each interval end must equal the reference count of packets from
// horizontal ring i (rows 2i, 2i+1) to vertical ring j (columns 2j, 2j+1).
module tb_flow_monitor;
  import rrnet_pkg::*;
  localparam int unsigned N = 4, R = 2, F_W = 16;
  logic clk = 0, rst_n = 0, snap = 0;
  logic [N*N-1:0] fire;
  logic [N*N-1:0][NODE_W-1:0] dst;
  logic [R-1:0][R-1:0][F_W-1:0] f_snap;
  int ref_f[R][R];
  int checks = 0, failures = 0;

  flow_monitor #(.N(N), .F_W(F_W)) dut (.clk, .rst_n, .inj_fire(fire), .inj_dst(dst), .snap, .f_snap);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fire = '0; dst = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 30; iv++) begin
      for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) ref_f[i][j] = 0;
      for (int cyc = 0; cyc < 50; cyc++) begin
        for (int s = 0; s < N * N; s++) begin
          fire[s] = ($urandom_range(0, 99) < (iv % 2 ? 80 : 20));
          dst[s]  = NODE_W'($urandom_range(0, N * N - 1));
          if (fire[s]) ref_f[(s / N) / 2][(int'(dst[s]) % N) / 2]++;
        end
        snap = (cyc == 49);
        @(negedge clk);
      end
      snap = 0; fire = '0;
      for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) begin
        checks++;
        if (int'(f_snap[i][j]) != ref_f[i][j]) begin
          failures++;
          if (failures < 8) $display("iv %0d f[%0d][%0d]=%0d expected %0d", iv, i, j, f_snap[i][j], ref_f[i][j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
