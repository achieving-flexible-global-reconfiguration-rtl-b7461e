// reconfig_switch: the 2x2 reconfiguration switch of a ring interface, for
// one ring direction.
//
// When the node lies in a granted reconfiguration point (sw_en = 1), the
// outputs of the horizontal and the vertical ring are exchanged: traffic
// arriving on the horizontal ring leaves on the vertical ring and the other
// way round. Enabling the switches of the four nodes of a point joins the
// point's horizontal and vertical ring into one combined ring. With sw_en =
// 0 each ring passes straight through. Purely combinational.
module reconfig_switch
  import rrnet_pkg::*;
(
  input  logic       sw_en,
  input  ring_flit_t in_h,   // flit heading out on the horizontal ring
  input  ring_flit_t in_v,   // flit heading out on the vertical ring
  output ring_flit_t out_h,  // horizontal ring output link
  output ring_flit_t out_v   // vertical ring output link
);
  always_comb begin
    if (sw_en) begin
      out_h = in_v;
      out_v = in_h;
    end else begin
      out_h = in_h;
      out_v = in_v;
    end
  end
endmodule
