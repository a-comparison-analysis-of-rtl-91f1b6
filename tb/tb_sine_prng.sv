// tb_sine_prng: runs the complete sine-map generator with eta = 0.962 and
// compares every output with a reference built from the real-number sine
// map, the LFSR polynomial and the perturbation/mask rule.  It also checks
// one output every 9 cycles, that the fed-back state stays a positive posit
// below one, and that the mask changed the five MSBs at least once.
module tb_sine_prng;
  import posit_ref_pkg::*;
  import sine_ref_pkg::*;
  localparam int N_ITER = 3000;
  logic clk = 1'b0, rst_n, valid;
  logic [31:0] x0, eta, out;
  int checks = 0, failures = 0;
  int cycle = 0;

  sine_prng dut (.clk(clk), .rst_n(rst_n), .x0_i(x0), .eta_i(eta), .out_o(out), .valid_o(valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (N_ITER * 9 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] xs, v, lf, o_prev, o_exp, low;
    int n, last, masked, ones;
    x0 = r2p(0.1); eta = r2p(0.962);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    xs = x0; lf = 32'hACE1_2468; o_prev = 0;
    n = 0; last = cycle; masked = 0; ones = 0;
    while (n < N_ITER) begin
      @(posedge clk); #1;
      if (valid) begin
        v     = sine_map_ref(xs, eta);
        low   = (v ^ lf) & 32'h07FF_FFFF;
        o_exp = ((v & 32'hF800_0000) ^ ((o_prev ^ v) << 27)) | low;
        xs    = (v & 32'hF800_0000) | low;
        lf    = lfsr_step(lf);
        if ((o_exp ^ xs) != 0) masked++;
        o_prev = o_exp;
        checks++;
        if (out !== o_exp) begin
          failures++;
          if (failures < 10) $display("FAIL iter %0d got %h exp %h", n, out, o_exp);
        end
        checks++;
        if (n > 0 && cycle - last != 9) begin
          failures++;
          $display("FAIL iteration took %0d cycles", cycle - last);
        end
        checks++;
        if (!(p2r(dut.x_q) > 0.0 && p2r(dut.x_q) < 1.0)) begin
          failures++;
          $display("FAIL state left (0,1): %h", dut.x_q);
        end
        ones += $countones(out);
        last = cycle;
        n++;
      end
    end
    checks++;
    if (masked == 0) begin failures++; $display("FAIL MSB mask never applied"); end
    $display("%0d outputs, %0d with masked MSBs, ones fraction %f", n, masked, real'(ones) / (32.0 * n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
