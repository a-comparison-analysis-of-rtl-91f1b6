// tb_hub_adder: checks the HUB adder against the real sum of the two HUB
// values (rounded to nearest HUB number, modulo 1) and the integer model.
module tb_hub_adder;
  import hub_ref_pkg::*;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  hub_adder dut (.a_i(a), .b_i(b), .s_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sr, err;
    for (int i = 0; i < 2000; i++) begin
      a = (i == 0) ? 32'h0 : (i == 1) ? 32'hFFFF_FFFF : $urandom;
      b = (i == 0) ? 32'h0 : (i == 1) ? 32'hFFFF_FFFF : $urandom;
      #1;
      checks++;
      if (s !== add_ref(a, b)) begin
        failures++;
        $display("FAIL add %h + %h got %h exp %h", a, b, s, add_ref(a, b));
      end
      sr = hub_real(a) + hub_real(b);
      if (sr >= 1.0) sr = sr - 1.0;
      err = (hub_real(s) - sr) * 4294967296.0;
      checks++;
      if ((err > 0.51 || err < -0.51) && !(sr > 0.9999999 || sr < 0.0000001)) begin
        failures++;
        $display("FAIL add real %h + %h err=%f", a, b, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
