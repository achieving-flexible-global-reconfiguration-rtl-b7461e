// reconfig_ctrl: times the reconfiguration intervals and sequences a
// reconfiguration of the rings.
//
// Every INTERVAL cycles it pulses `snap` (the flow monitor latches the
// interval's traffic matrix) and one cycle later starts the allocator. The
// allocator runs while packets keep flowing (step 1). When it is done, a
// grant equal to the current one means the combined rings are reused and
// nothing changes. Otherwise the network is reconfigured (step 2):
//   PH_DRAIN  4(N-1) cycles: no packet may enter a ring, ejection gives the
//             rings priority, and the packets on the rings reach their
//             destinations. If any ring packet is deflected in this window
//             the reconfiguration is abandoned: the old grant stays and the
//             rings go back to normal operation.
//   PH_SWITCH 1 cycle: the routing tables are cleared and the new grant,
//             i.e. the new switch settings, is loaded at the end of the cycle.
//   PH_UPDATE 4(N-1) cycles: probes rebuild the routing tables; probe_start
//             is high in the first cycle.
// Step 2 thus takes 8N-7 cycles. After reset the grant is all zero (plain,
// uncombined rings) and the routing tables are empty, so packets use the
// mesh until the first reconfiguration. Event pulses report each outcome.
module reconfig_ctrl
  import rrnet_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned INTERVAL = 1000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      snap,
  output logic                      alloc_start,
  input  logic                      alloc_done,
  input  logic [N/2-1:0][N/2-1:0]   alloc_grant,
  input  logic                      deflect_any,
  output phase_e                    phase,
  output logic                      probe_start,
  output logic [N/2-1:0][N/2-1:0]   grant,
  output logic                      ev_reconfig,  // new grant loaded
  output logic                      ev_reuse,     // allocation equal to the current grant
  output logic                      ev_abort      // deflection while draining
);
  localparam int unsigned R     = N / 2;
  localparam int unsigned WIN   = 4 * (N - 1);
  localparam int unsigned IV_W  = $clog2(INTERVAL);
  localparam int unsigned WIN_W = $clog2(WIN + 1);

  logic [IV_W-1:0]      iv_q;
  logic                 start_q;
  phase_e               ph_q;
  logic [WIN_W-1:0]     win_q;
  logic                 defl_q;
  logic [R-1:0][R-1:0]  grant_q, pend_q;

  assign snap        = (iv_q == IV_W'(INTERVAL - 1));
  assign alloc_start = start_q;
  assign phase       = ph_q;
  assign grant       = grant_q;
  assign probe_start = (ph_q == PH_UPDATE) && (win_q == '0);

  always_comb begin
    ev_reconfig = (ph_q == PH_SWITCH);
    ev_reuse    = alloc_done && (ph_q == PH_RUN) && (alloc_grant == grant_q);
    ev_abort    = (ph_q == PH_DRAIN) && (win_q == WIN_W'(WIN - 1)) && (defl_q || deflect_any);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv_q    <= '0;
      start_q <= 1'b0;
      ph_q    <= PH_RUN;
      win_q   <= '0;
      defl_q  <= 1'b0;
      grant_q <= '0;
      pend_q  <= '0;
    end else begin
      iv_q    <= snap ? '0 : iv_q + 1'b1;
      start_q <= snap;
      unique case (ph_q)
        PH_RUN: begin
          if (alloc_done && (alloc_grant != grant_q)) begin
            pend_q <= alloc_grant;
            ph_q   <= PH_DRAIN;
            win_q  <= '0;
            defl_q <= 1'b0;
          end
        end
        PH_DRAIN: begin
          defl_q <= defl_q || deflect_any;
          if (win_q == WIN_W'(WIN - 1)) begin
            win_q <= '0;
            ph_q  <= (defl_q || deflect_any) ? PH_RUN : PH_SWITCH;
          end else begin
            win_q <= win_q + 1'b1;
          end
        end
        PH_SWITCH: begin
          grant_q <= pend_q;
          ph_q    <= PH_UPDATE;
          win_q   <= '0;
        end
        PH_UPDATE: begin
          if (win_q == WIN_W'(WIN - 1)) begin
            win_q <= '0;
            ph_q  <= PH_RUN;
          end else begin
            win_q <= win_q + 1'b1;
          end
        end
        default: ph_q <= PH_RUN;
      endcase
    end
  end
endmodule
