// tb_ring_allocator: checks the allocator against a software model of the
// iterative two-stage allocation (largest f per unmatched row, then largest
// requesting f per column, R iterations, first index on ties), including
// the worked 3 x 3 example with f = {1 8 9; 3 2 5; 6 7 4} whose result is
// points (0,2), (2,1), (1,0). The grant must appear 2R^2 cycles after start.
module tb_ring_allocator;
  localparam int unsigned F_W = 16;
  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  function automatic void ref_alloc(input int r, input int fm[4][4], output bit gm[4][4]);
    bit rm[4], cm[4];
    int req[4];
    for (int i = 0; i < 4; i++) begin rm[i] = 0; cm[i] = 0; for (int j = 0; j < 4; j++) gm[i][j] = 0; end
    for (int it = 0; it < r; it++) begin
      for (int i = 0; i < r; i++) begin
        req[i] = -1;
        if (!rm[i])
          for (int j = 0; j < r; j++)
            if (!cm[j] && (req[i] < 0 || fm[i][j] > fm[i][req[i]])) req[i] = j;
      end
      for (int j = 0; j < r; j++) begin
        int win;
        win = -1;
        for (int i = 0; i < r; i++)
          if (req[i] == j && (win < 0 || fm[i][j] > fm[win][j])) win = i;
        if (win >= 0) begin gm[win][j] = 1; rm[win] = 1; cm[j] = 1; end
      end
    end
  endfunction

  logic clk = 0;
  always #5 clk = ~clk;

  // R = 3 (worked example) and R = 4 (8 x 8 mesh)
  logic rst_n = 0;
  logic s3 = 0, s4 = 0;
  logic b3, b4, d3, d4;
  logic [2:0][2:0][F_W-1:0] f3;
  logic [3:0][3:0][F_W-1:0] f4;
  logic [2:0][2:0] g3;
  logic [3:0][3:0] g4;

  ring_allocator #(.R(3), .F_W(F_W)) dut3 (.clk, .rst_n, .start(s3), .f(f3), .busy(b3), .done(d3), .grant(g3));
  ring_allocator #(.R(4), .F_W(F_W)) dut4 (.clk, .rst_n, .start(s4), .f(f4), .busy(b4), .done(d4), .grant(g4));

  task automatic run3(input int fm[4][4]);
    bit gm[4][4];
    int lat;
    ref_alloc(3, fm, gm);
    @(negedge clk);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) f3[i][j] = F_W'(fm[i][j]);
    s3 = 1;
    @(negedge clk);
    s3 = 0;
    lat = 1;
    while (!d3 && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2 * 3 * 3) begin failures++; $display("R=3 latency %0d", lat); end
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      checks++;
      if (g3[i][j] !== gm[i][j]) begin failures++; $display("R=3 grant[%0d][%0d]=%0b exp %0b", i, j, g3[i][j], gm[i][j]); end
    end
  endtask

  task automatic run4(input int fm[4][4]);
    bit gm[4][4];
    int lat;
    ref_alloc(4, fm, gm);
    @(negedge clk);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) f4[i][j] = F_W'(fm[i][j]);
    s4 = 1;
    @(negedge clk);
    s4 = 0;
    lat = 1;
    while (!d4 && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 32) begin failures++; $display("R=4 latency %0d", lat); end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      checks++;
      if (g4[i][j] !== gm[i][j]) begin failures++; if (failures < 10) $display("R=4 grant[%0d][%0d]=%0b exp %0b", i, j, g4[i][j], gm[i][j]); end
    end
  endtask

  initial begin
    int fm[4][4];
    f3 = '0; f4 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked example
    fm = '{'{1, 8, 9, 0}, '{3, 2, 5, 0}, '{6, 7, 4, 0}, '{0, 0, 0, 0}};
    run3(fm);
    checks++;
    if (!(g3[0][2] && g3[2][1] && g3[1][0])) begin failures++; $display("worked example wrong"); end
    // random matrices, small values force ties
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        fm[i][j] = $urandom_range(0, (n % 3 == 0) ? 3 : 60000);
      if (n < 150) run3(fm);
      else         run4(fm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
