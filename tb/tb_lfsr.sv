// tb_lfsr: checks the LFSR sequence against the polynomial
// x^32 + x^22 + x^2 + x + 1, that it holds while step_i is low, and that it
// does not return to its seed or reach zero within 200000 steps.
module tb_lfsr;
  import sine_ref_pkg::*;
  logic clk = 1'b0, rst_n, step;
  logic [31:0] q, exp_q;
  int checks = 0, failures = 0;

  lfsr dut (.clk(clk), .rst_n(rst_n), .step_i(step), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int back_to_seed;
    rst_n = 1'b0; step = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    exp_q = 32'hACE1_2468;
    checks++; if (q !== exp_q) begin failures++; $display("FAIL seed %h", q); end
    back_to_seed = 0;
    for (int i = 0; i < 200000; i++) begin
      step = (i % 7 != 3);
      @(posedge clk); #1;
      if (step) exp_q = lfsr_step(exp_q);
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d got %h exp %h", i, q, exp_q);
      end
      if (q == 32'hACE1_2468 || q == 0) back_to_seed++;
    end
    checks++;
    if (back_to_seed != 0) begin failures++; $display("FAIL short period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
