// f_arbiter: R:1 "F arbiter" that grants the enabled point with the
// largest traffic volume f.
//
// The arbiter is a chain of R f_comparator cells, one per point of a row (or
// column) of the reconfiguration-point grid. The comparators are distributed
// over the points, and the chain value moves one point per clock cycle, as
// the allocator's timing analysis assumes (one cycle per row or column hop).
// A wave is started by `start`; cell k evaluates k cycles later and stores
// its d bit. When the wave has passed all cells, `done` is high for one
// cycle and g is one-hot: a point's grant is its d bit with every later d
// bit clear (a later, larger f removes the grant of the earlier points).
// g is all zero when no point is enabled. f and en must be held stable
// while the wave runs.
//
// Timing: start in cycle t, done and g valid in cycle t + R.
module f_arbiter #(
  parameter int unsigned R   = 4,
  parameter int unsigned F_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [R-1:0][F_W-1:0] f,
  input  logic [R-1:0]        en,
  output logic                done,
  output logic [R-1:0]        g
);
  logic [R-1:0]          tok_q;   // wave has passed cell k
  logic [R-1:0]          d_q;
  logic [R-1:0][F_W-1:0] c_q;
  logic [R-1:0]          cv_q;

  logic [R-1:0]          fire, d_w, cv_w;
  logic [R-1:0][F_W-1:0] c_w;

  for (genvar k = 0; k < R; k++) begin : g_cell
    logic [F_W-1:0] c_in;
    logic           cv_in;
    if (k == 0) begin : g_first
      assign fire[k] = start;
      assign c_in    = '0;
      assign cv_in   = 1'b0;
    end else begin : g_next
      assign fire[k] = tok_q[k-1];
      assign c_in    = c_q[k-1];
      assign cv_in   = cv_q[k-1];
    end
    f_comparator #(.F_W(F_W)) u_cmp (
      .f(f[k]), .en(en[k]), .c_in(c_in), .c_valid_in(cv_in),
      .d(d_w[k]), .c_out(c_w[k]), .c_valid_out(cv_w[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q <= '0;
      d_q   <= '0;
      c_q   <= '0;
      cv_q  <= '0;
    end else begin
      tok_q <= fire;
      for (int k = 0; k < R; k++) begin
        if (fire[k]) begin
          d_q[k]  <= d_w[k];
          c_q[k]  <= c_w[k];
          cv_q[k] <= cv_w[k];
        end
      end
    end
  end

  assign done = tok_q[R-1];

  always_comb begin
    logic later;
    later = 1'b0;
    g     = '0;
    for (int k = R - 1; k >= 0; k--) begin
      g[k]  = done && d_q[k] && !later;
      later = later || d_q[k];
    end
  end

  // at most one grant
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(g));
endmodule
