// tb_hub_tent_map: checks the HUB tent map against an integer model and
// against the real-valued tent map (error within 1.5 ulp, 2.6 ulp on the
// 1 - x branch), for corner and
// random operands, and checks that mu stays in (1, 2).
module tb_hub_tent_map;
  import hub_ref_pkg::*;
  logic [31:0] x, m, y;
  int checks = 0, failures = 0;

  hub_tent_map dut (.x_i(x), .mu_i(m), .x_o(y));

  task automatic check_one(input logic [31:0] xi, input logic [31:0] mi);
    real xr, mur, yr, err;
    x = xi; m = mi;
    #1;
    checks++;
    if (y !== tent_ref(xi, mi)) begin
      failures++;
      $display("FAIL tent x=%h mu=%h got %h exp %h", xi, mi, y, tent_ref(xi, mi));
    end
    xr  = hub_real(xi);
    mur = 1.0 + hub_real(mi);
    yr  = (xr < 0.5) ? mur * xr : mur * (1.0 - xr);
    err = (hub_real(y) - yr) * 4294967296.0;
    // the lower branch rounds once (1.5 ulp); the upper one also carries the
    // +1 ulp of (1 + 1/2 ulp) - x, scaled by mu (2.6 ulp)
    if (yr < 0.999999) begin
      checks++;
      if (err > ((xr < 0.5) ? 1.5 : 2.6) || err < -1.5) begin
        failures++;
        $display("FAIL tent real x=%h mu=%h err=%f ulp", xi, mi, err);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0000_0000, 32'h0000_0000);
    check_one(32'h7FFF_FFFF, 32'hFFFF_FFFF);
    check_one(32'h8000_0000, 32'hFFFF_FFFF);
    check_one(32'h8000_0000, 32'h0000_0000);
    check_one(32'hFFFF_FFFF, 32'hC000_0000);
    check_one(32'hB5C2_8F5C, 32'hC000_0000);   // x0 ~ 0.71, mu ~ 1.75
    check_one(32'h1999_9999, 32'hF333_3333);   // x0 ~ 0.1, mu ~ 1.95
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
