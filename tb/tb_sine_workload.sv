// tb_sine_workload: the evaluation runs of the posit sine-map system with
// eta = 0.962 and x0 = 0.1, using the monobit frequency test on sequences of
// 10^6 bits (32-bit words concatenated; a sequence passes when
// |sum(2b-1)|/sqrt(n) < 2.5758, i.e. p-value >= 0.01).
//  1. The complete perturbed generator, 100 sequences: at least 96 pass.
//  2. The bare sine map without perturbation, N_BARE sequences: it fails
//     (fewer than half pass), since its sign and regime bits barely move.
module tb_sine_workload;
  import posit_ref_pkg::*;
  localparam int N_SEQ    = 100;
  localparam int N_BARE   = 10;
  localparam int SEQ_BITS = 1_000_000;

  logic clk = 1'b0, rst_n, valid, start, busy, done;
  logic [31:0] x0, eta, out, bx, by;
  int checks = 0, failures = 0;

  sine_prng       dut    (.clk(clk), .rst_n(rst_n), .x0_i(x0), .eta_i(eta), .out_o(out), .valid_o(valid));
  sugeno_sine_map u_bare (.clk(clk), .rst_n(rst_n), .start_i(start), .x_i(bx), .eta_i(eta),
                          .y_o(by), .busy_o(busy), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat ((N_SEQ + N_BARE) * (SEQ_BITS / 32 + 1) * 9 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accumulate one word into the running frequency test
  task automatic add_word(input logic [31:0] w, inout longint s, inout int nbits,
                          inout int seq, inout int pass);
    real stat;
    for (int i = 0; i < 32; i++) begin
      s += w[i] ? 1 : -1;
      nbits++;
      if (nbits == SEQ_BITS) begin
        stat = ((s < 0) ? -real'(s) : real'(s)) / $sqrt(real'(SEQ_BITS));
        if (stat < 2.5758) pass++;
        s = 0; nbits = 0; seq++;
      end
    end
  endtask

  initial begin
    longint s;
    int nbits, seq, pass, bare_pass, bare_seq;
    x0 = r2p(0.1); eta = r2p(0.962);
    start = 1'b0; bx = x0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1. complete scheme
    s = 0; nbits = 0; seq = 0; pass = 0;
    while (seq < N_SEQ) begin
      @(posedge clk); #1;
      if (valid) add_word(out, s, nbits, seq, pass);
    end
    // 2. bare sine map, iterated on its own output
    s = 0; nbits = 0; bare_seq = 0; bare_pass = 0;
    while (bare_seq < N_BARE) begin
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      while (!done) begin @(posedge clk); #1; end
      add_word(by, s, nbits, bare_seq, bare_pass);
      bx = by;
    end
    checks++;
    if (pass < 96) begin
      failures++;
      $display("FAIL perturbed generator passed %0d/%0d", pass, N_SEQ);
    end
    checks++;
    if (bare_pass * 2 >= N_BARE) begin
      failures++;
      $display("FAIL bare sine map passed %0d/%0d, expected to fail", bare_pass, N_BARE);
    end
    $display("frequency test: perturbed %0d/%0d, bare sine map %0d/%0d", pass, N_SEQ, bare_pass, N_BARE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
