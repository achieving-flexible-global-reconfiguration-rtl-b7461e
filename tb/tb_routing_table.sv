// tb_routing_table: checks clear, first-write-wins, port priority on a
// same-cycle collision and lookup against a reference array.
module tb_routing_table;
  import rrnet_pkg::*;
  localparam int unsigned M = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [3:0] wr_en;
  logic [3:0][NODE_W-1:0] wr_node;
  route_t [3:0] wr_route;
  logic [NODE_W-1:0] rd_node;
  route_t rd_route;
  route_t ref_t [M];
  int checks = 0, failures = 0;

  routing_table #(.M(M), .NWR(4)) dut (.clk, .rst_n, .clear, .wr_en, .wr_node, .wr_route, .rd_node, .rd_route);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int e = 0; e < M; e++) begin
      rd_node = NODE_W'(e);
      #1;
      checks++;
      if (rd_route !== ref_t[e]) begin
        failures++;
        if (failures < 8) $display("entry %0d = %b expected %b", e, rd_route, ref_t[e]);
      end
    end
  endtask

  initial begin
    wr_en = '0; wr_node = '0; wr_route = '0; rd_node = '0;
    for (int e = 0; e < M; e++) ref_t[e] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // clear
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int e = 0; e < M; e++) ref_t[e] = '0;
      check_all();
      for (int cyc = 0; cyc < 12; cyc++) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          wr_en[p]    = 1'($urandom);
          wr_node[p]  = NODE_W'($urandom_range(0, M - 1));
          wr_route[p] = route_t'({1'b1, 2'($urandom)});
        end
        // reference: lowest port first, only into empty entries
        for (int p = 0; p < 4; p++)
          if (wr_en[p] && !ref_t[wr_node[p]].reach) begin
            bit earlier;
            earlier = 0;
            ref_t[wr_node[p]] = wr_route[p];
          end
        @(posedge clk); #1;
        wr_en = '0;
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
