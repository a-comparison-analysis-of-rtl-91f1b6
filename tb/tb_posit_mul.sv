// tb_posit_mul: checks the posit<32,2> multiplier against a real-number
// reference (exact products of the decoded reals, rounded once to the
// nearest posit) for special values, the sine-map constants and random words.
module tb_posit_mul;
  import posit_ref_pkg::*;
  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  posit_mul dut (.a_i(a), .b_i(b), .p_o(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp_p);
    a = x; b = y; #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 20) $display("FAIL mul %h * %h = %h exp %h (%g * %g)", x, y, p, exp_p, p2r(x), p2r(y));
    end
  endtask

  initial begin
    logic [31:0] x, y;
    check(32'h4000_0000, 32'h4000_0000, 32'h4000_0000);        // 1 * 1
    check(32'h4000_0000, 32'h4800_0000, 32'h4800_0000);        // 1 * 2
    check(32'h3800_0000, 32'h4800_0000, 32'h4000_0000);        // 0.5 * 2
    check(32'h0, 32'h4C90_FDAA, 32'h0);                        // 0 * pi
    check(32'h8000_0000, 32'h4000_0000, 32'h8000_0000);        // NaR
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF, 32'h7FFF_FFFF);        // maxpos saturates
    check(32'h0000_0001, 32'h0000_0001, 32'h0000_0001);        // minpos saturates
    check(32'hC000_0000, 32'h4800_0000, 32'hB800_0000);        // -1 * 2 = -2
    check(32'h4C90_FDAA, 32'h322F_9837, r2p(p2r(32'h4C90_FDAA) * p2r(32'h322F_9837)));
    for (int i = 0; i < 5000; i++) begin
      x = $urandom; y = $urandom;
      if (i % 2 == 0) begin x = {x[31], 3'b011, x[27:0]}; y = {1'b0, 3'b011, y[27:0]}; end
      if (x == 32'h8000_0000 || y == 32'h8000_0000) continue;
      check(x, y, r2p(p2r(x) * p2r(y)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
