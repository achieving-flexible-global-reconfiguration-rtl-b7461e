// tb_reconfig_switch: with the switch off each ring passes straight
// through; with it on the horizontal and vertical outputs are exchanged.
module tb_reconfig_switch;
  import rrnet_pkg::*;
  logic sw_en;
  ring_flit_t in_h, in_v, out_h, out_v;
  int checks = 0, failures = 0;

  reconfig_switch dut (.sw_en, .in_h, .in_v, .out_h, .out_v);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      sw_en = 1'($urandom);
      in_h  = {$urandom, $urandom, $urandom, $urandom};
      in_v  = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks += 2;
      if (out_h !== (sw_en ? in_v : in_h)) failures++;
      if (out_v !== (sw_en ? in_h : in_v)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
