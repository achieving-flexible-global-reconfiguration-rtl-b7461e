// ring_allocator: iterative two-stage allocator that chooses which
// horizontal ring is combined with which vertical ring.
//
// f[i][j] is the traffic volume from the nodes of horizontal ring i to the
// nodes of vertical ring j. The allocator grants a set of reconfiguration
// points (i, j) so that every horizontal ring and every vertical ring is in
// exactly one granted point, preferring points with large f (a greedy,
// separable approximation of the maximum-weight matching).
//
// Structure: R row F arbiters form the first stage and R column F arbiters
// the second. Each iteration, every unmatched row requests the unmatched
// column with the largest f; each column grants the requesting row with the
// largest f; granted rows and columns are then marked matched and drop out.
// R iterations match every row and column, because each iteration matches
// at least one pair. Each F arbiter moves its comparison one point per
// cycle, so a stage takes R cycles, an iteration 2R cycles and the whole
// allocation 2R^2 cycles (32 cycles for an 8 x 8 mesh, R = 4). The
// allocator always runs all R iterations.
//
// Interface: pulse `start` while idle, with f held stable until `done`.
// `done` is high for one cycle, 2R^2 cycles after start; `grant` is valid in
// that cycle (grant[i][j] = 1 combines horizontal ring i and vertical ring j).
module ring_allocator #(
  parameter int unsigned R   = 4,
  parameter int unsigned F_W = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [R-1:0][R-1:0][F_W-1:0] f,
  output logic                        busy,
  output logic                        done,
  output logic [R-1:0][R-1:0]         grant
);
  localparam int unsigned IT_W = (R > 1) ? $clog2(R) : 1;

  logic              busy_q;
  logic [IT_W-1:0]   iter_q;
  logic [R-1:0]      row_m_q, col_m_q;      // matched rows / columns
  logic [R-1:0][R-1:0] acc_q;               // grants of earlier iterations
  logic [R-1:0][R-1:0] req_q;               // stage-1 result, held for stage 2

  // stage 1: row arbiters
  logic [R-1:0]        row_done;
  logic [R-1:0][R-1:0] row_g;               // row_g[i][j]
  // stage 2: column arbiters
  logic [R-1:0]        col_done;
  logic [R-1:0][R-1:0] col_g;               // col_g[j][i]

  logic                 s1_start, s1_done, s2_done, last_iter;
  logic [R-1:0][R-1:0]  new_g;              // this iteration's grants, [i][j]
  logic [R-1:0]         new_rows, new_cols;
  logic [R-1:0]         row_m_eff, col_m_eff;
  logic [R-1:0][R-1:0]  req_eff;

  assign s1_done   = row_done[0];
  assign s2_done   = col_done[0];
  assign last_iter = (iter_q == IT_W'(R - 1));

  always_comb begin
    new_g    = '0;
    new_rows = '0;
    new_cols = '0;
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++) begin
        new_g[i][j] = s2_done && col_g[j][i];
        new_rows[i] = new_rows[i] | new_g[i][j];
        new_cols[j] = new_cols[j] | new_g[i][j];
      end
  end

  // A new iteration starts in the cycle the previous one ends, so the
  // matched sets seen by its first cells include the grants of that cycle.
  assign s1_start  = (start && !busy_q) || (busy_q && s2_done && !last_iter);
  assign row_m_eff = (start && !busy_q) ? '0 : (row_m_q | new_rows);
  assign col_m_eff = (start && !busy_q) ? '0 : (col_m_q | new_cols);
  assign req_eff   = s1_done ? row_g : req_q;

  for (genvar i = 0; i < R; i++) begin : g_row
    logic [R-1:0] en;
    for (genvar j = 0; j < R; j++) begin : g_en
      assign en[j] = !row_m_eff[i] && !col_m_eff[j];
    end
    f_arbiter #(.R(R), .F_W(F_W)) u_arb (
      .clk, .rst_n, .start(s1_start), .f(f[i]), .en(en),
      .done(row_done[i]), .g(row_g[i])
    );
  end

  for (genvar j = 0; j < R; j++) begin : g_col
    logic [R-1:0]          en;
    logic [R-1:0][F_W-1:0] fc;
    for (genvar i = 0; i < R; i++) begin : g_en
      assign en[i] = req_eff[i][j];
      assign fc[i] = f[i][j];
    end
    f_arbiter #(.R(R), .F_W(F_W)) u_arb (
      .clk, .rst_n, .start(s1_done), .f(fc), .en(en),
      .done(col_done[j]), .g(col_g[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      iter_q  <= '0;
      row_m_q <= '0;
      col_m_q <= '0;
      acc_q   <= '0;
      req_q   <= '0;
    end else begin
      if (s1_done) req_q <= row_g;
      if (start && !busy_q) begin
        busy_q  <= 1'b1;
        iter_q  <= '0;
        row_m_q <= '0;
        col_m_q <= '0;
        acc_q   <= '0;
      end else if (busy_q && s2_done) begin
        row_m_q <= row_m_q | new_rows;
        col_m_q <= col_m_q | new_cols;
        acc_q   <= acc_q | new_g;
        iter_q  <= iter_q + 1'b1;
        if (last_iter) busy_q <= 1'b0;
      end
    end
  end

  assign busy  = busy_q;
  assign done  = busy_q && s2_done && last_iter;
  assign grant = acc_q | new_g;

  // every row and column is in exactly one granted point at the end
  for (genvar k = 0; k < R; k++) begin : g_chk
    logic [R-1:0] colk, rowk;
    for (genvar m = 0; m < R; m++) begin : g_bits
      assign rowk[m] = grant[k][m];
      assign colk[m] = grant[m][k];
    end
    a_row: assert property (@(posedge clk) disable iff (!rst_n) done |-> $onehot(rowk));
    a_col: assert property (@(posedge clk) disable iff (!rst_n) done |-> $onehot(colk));
  end
endmodule
