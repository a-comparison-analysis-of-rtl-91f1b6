// tb_hub_bernoulli_map: checks the HUB Bernoulli map against the integer
// model and the real map (error within 1 ulp), and that iterating it from
// x0 ~ 0.71 settles in the fixed point 0xFFFFFFFF (1 - 2^-33) within 32
// iterations, as reported for the plain map.
module tb_hub_bernoulli_map;
  import hub_ref_pkg::*;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  hub_bernoulli_map dut (.x_i(x), .x_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, yr, err;
    int n;
    for (int i = 0; i < 2000; i++) begin
      x = (i < 4) ? 32'(i) << 30 : $urandom;
      #1;
      checks++;
      if (y !== bern_ref(x)) begin
        failures++;
        $display("FAIL bern x=%h got %h exp %h", x, y, bern_ref(x));
      end
      xr  = hub_real(x);
      yr  = (xr < 0.5) ? 2.0 * xr : 2.0 * xr - 1.0;
      err = (hub_real(y) - yr) * 4294967296.0;
      checks++;
      if (err > 1.0 || err < -1.0) begin
        failures++;
        $display("FAIL bern real x=%h err=%f", x, err);
      end
    end
    // degradation: orbit from 0.71 collapses to a single value
    x = 32'hB5C2_8F5C;
    n = 0;
    while (x != 32'hFFFF_FFFF && n < 100) begin
      #1; x = y; n++;
    end
    checks++;
    if (x != 32'hFFFF_FFFF || n > 32) begin
      failures++;
      $display("FAIL bern orbit did not settle: n=%0d x=%h", n, x);
    end
    #1;
    checks++;
    if (y != 32'hFFFF_FFFF) begin
      failures++;
      $display("FAIL 0xFFFFFFFF is not a fixed point");
    end
    $display("bernoulli orbit from ~0.71 fixed after %0d iterations", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
