// tb_f_comparator: random self-check of one F-arbiter comparator cell
// against the rule d = en & (no candidate yet | f > c),
// c_next = d ? f : c, c_valid_next = c_valid | en.
module tb_f_comparator;
  localparam int unsigned F_W = 8;
  logic [F_W-1:0] f, c_in, c_out;
  logic en, cv_in, d, cv_out;
  int checks = 0, failures = 0;

  f_comparator #(.F_W(F_W)) dut (.f, .en, .c_in, .c_valid_in(cv_in), .d, .c_out, .c_valid_out(cv_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic exp_d;
      f     = F_W'($urandom_range(0, 20));
      c_in  = F_W'($urandom_range(0, 20));
      en    = 1'($urandom);
      cv_in = 1'($urandom);
      #1;
      exp_d = en && (!cv_in || (int'(f) > int'(c_in)));
      checks++;
      if (d !== exp_d || c_out !== (exp_d ? f : c_in) || cv_out !== (cv_in | en)) begin
        failures++;
        if (failures < 5) $display("mismatch f=%0d c=%0d en=%0b cv=%0b d=%0b c_out=%0d", f, c_in, en, cv_in, d, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
