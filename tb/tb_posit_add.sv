// tb_posit_add: checks the posit<32,2> adder against a real-number reference
// (sum of the decoded reals, rounded once to the nearest posit) for special
// values, cancellations, the sine-map constants and random words.
module tb_posit_add;
  import posit_ref_pkg::*;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  posit_add dut (.a_i(a), .b_i(b), .s_o(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp_s);
    a = x; b = y; #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 20) $display("FAIL add %h + %h = %h exp %h (%g + %g)", x, y, s, exp_s, p2r(x), p2r(y));
    end
  endtask

  initial begin
    logic [31:0] x, y;
    check(32'h4000_0000, 32'h4000_0000, 32'h4800_0000);        // 1 + 1 = 2
    check(32'h4800_0000, 32'hC000_0000, 32'h4000_0000);        // 2 - 1 = 1
    check(32'h4C90_FDAA, 32'hB36F_0256, 32'h0);                // pi - pi = 0
    check(32'h0, 32'h4C90_FDAA, 32'h4C90_FDAA);                // 0 + pi
    check(32'h8000_0000, 32'h4000_0000, 32'h8000_0000);        // NaR
    check(32'h3800_0000, 32'h3800_0000, 32'h4000_0000);        // 0.5 + 0.5
    for (int i = 0; i < 5000; i++) begin
      x = $urandom; y = $urandom;
      if (i % 2 == 0) begin
        x = {x[31], 3'b011, x[27:0]};
        y = {y[31], 3'b011, y[27:0]};
        if (i % 4 == 0) y = {~x[31:8] + 24'(i % 3), y[7:0]};   // near cancellation
      end
      if (x == 32'h8000_0000 || y == 32'h8000_0000) continue;
      check(x, y, r2p(p2r(x) + p2r(y)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
