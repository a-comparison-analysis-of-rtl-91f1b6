// tb_chaos_prng_top: end-to-end test of both generators at their default
// sizes.  Two runs: x0 ~ 0.71 (Bi-HUB) / x0 = 0.1, eta = 0.962 (sine), then an
// all-zero Bi-HUB initial condition.  Every output of both generators is
// compared with the reference models, and the mechanisms are counted:
//   init_mux      first Bi-HUB iteration taken from x0, the rest from feedback
//   mu_coupled    tent parameter taken from the Bernoulli output (in [1.75, 2))
//   zero_x0       all-zero initial condition that does not annul the orbit
//   mbt_changed   modified bit transformation altering the tent output
//   adder_wrap    HUB adder wrapping past 1
//   tent_upper    tent map 1 - x branch taken
//   lfsr_pert     LFSR flipping perturbed sine bits
//   msb_mask      five output MSBs changed by the mask
// A mechanism that never happens counts as a failure.
module tb_chaos_prng_top;
  import hub_ref_pkg::*;
  import posit_ref_pkg::*;
  import sine_ref_pkg::*;
  localparam int N_BI   = 20000;
  localparam int N_SINE = 2000;

  logic clk = 1'b0, rst_n;
  logic [31:0] bi_x0, bi_x, sine_x0, sine_eta, sine_out;
  logic bi_valid, sine_valid;
  int checks = 0, failures = 0;
  int n_init_mux = 0, n_mu = 0, n_zero = 0, n_mbt = 0, n_wrap = 0, n_upper = 0;
  int n_lfsr = 0, n_mask = 0;

  chaos_prng_top dut (
    .clk(clk), .rst_n(rst_n),
    .bi_x0_i(bi_x0), .bi_x_o(bi_x), .bi_valid_o(bi_valid),
    .sine_x0_i(sine_x0), .sine_eta_i(sine_eta), .sine_out_o(sine_out), .sine_valid_o(sine_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2 * (N_SINE * 9 + N_BI * 2) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [31:0] x0_bi, input int n_bi, input int n_sine);
    logic [63:0] bst;
    logic [31:0] bb, bt, bm, bs, xs, v, lf, o_prev, o_exp, low;
    int nb, ns, nonzero, cyc;
    bi_x0 = x0_bi; sine_x0 = r2p(0.1); sine_eta = r2p(0.962);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    bst = '0; nb = 0; ns = 0; nonzero = 0; cyc = 0;
    xs = sine_x0; lf = 32'hACE1_2468; o_prev = 0;
    while (nb < n_bi || ns < n_sine) begin
      @(posedge clk); #1;
      // Bi-HUB model, one step per clock
      bs = (cyc == 0) ? x0_bi : bst[31:0];        // initial-condition MUX
      bt = bst[63:32];
      bb = bern_ref(bt);
      bm = 32'hE000_0000 + (bb % 32'h2000_0000);
      if (cyc == 0) n_init_mux++;
      if (cyc == 1 && bs != x0_bi) n_init_mux++;
      if (1.0 + hub_real(bm) >= 1.75 && 1.0 + hub_real(bm) < 2.0) n_mu++;
      if (bs[31]) n_upper++;
      if (mbt_ref(bt) != bt) n_mbt++;
      if (64'(mbt_ref(bt)) + 64'(bb) + 1 >= 64'h1_0000_0000) n_wrap++;
      bst = step_ref(bst, x0_bi, cyc == 0);
      cyc++;
      if (bi_valid && nb < n_bi) begin
        check(bi_x === bst[31:0], $sformatf("bi iter %0d got %h exp %h", nb, bi_x, bst[31:0]));
        if (bi_x != 0) nonzero++;
        nb++;
      end
      if (sine_valid && ns < n_sine) begin
        v     = sine_map_ref(xs, sine_eta);
        low   = (v ^ lf) & 32'h07FF_FFFF;
        o_exp = ((v & 32'hF800_0000) ^ ((o_prev ^ v) << 27)) | low;
        if (((v ^ lf) & 32'h07FF_FFFF) != (v & 32'h07FF_FFFF)) n_lfsr++;
        if ((o_exp ^ v) & 32'hF800_0000) n_mask++;
        xs    = (v & 32'hF800_0000) | low;
        lf    = lfsr_step(lf);
        o_prev = o_exp;
        check(sine_out === o_exp, $sformatf("sine iter %0d got %h exp %h", ns, sine_out, o_exp));
        ns++;
      end
    end
    if (x0_bi == 0 && nonzero == n_bi) n_zero++;
  endtask

  initial begin
    run(32'hB5C2_8F5C, N_BI, N_SINE);
    run(32'h0000_0000, N_BI / 10, N_SINE / 10);
    $display("mechanisms: init_mux=%0d mu_coupled=%0d zero_x0=%0d mbt_changed=%0d adder_wrap=%0d tent_upper=%0d lfsr_pert=%0d msb_mask=%0d",
             n_init_mux, n_mu, n_zero, n_mbt, n_wrap, n_upper, n_lfsr, n_mask);
    check(n_init_mux > 0, "init_mux never happened");
    check(n_mu > 0,       "mu_coupled never happened");
    check(n_zero > 0,     "zero_x0 never happened");
    check(n_mbt > 0,      "mbt_changed never happened");
    check(n_wrap > 0,     "adder_wrap never happened");
    check(n_upper > 0,    "tent_upper never happened");
    check(n_lfsr > 0,     "lfsr_pert never happened");
    check(n_mask > 0,     "msb_mask never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
