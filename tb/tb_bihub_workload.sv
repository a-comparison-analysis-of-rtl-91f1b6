// tb_bihub_workload: the evaluation runs of the Bi-HUB generator at full size.
//  1. Period search over 10^6 iterations from x0 ~ 0.71: the coupled
//     generator's 64-bit loop state must not repeat (no period within the
//     sample).
//  2. The stand-alone HUB tent map with mu ~ 1.75 from the same x0 does fall
//     into a cycle within 10^6 iterations; its period and transient are
//     printed.
//  3. The monobit frequency test on 100 sequences of 10^6 bits (32-bit
//     outputs concatenated): a sequence passes when |sum(2b-1)|/sqrt(n) is
//     below 2.5758 (p-value >= 0.01); at least 96 of 100 must pass.
module tb_bihub_workload;
  import hub_ref_pkg::*;
  localparam int N_PERIOD   = 1_000_000;
  localparam int N_SEQ      = 100;
  localparam int SEQ_BITS   = 1_000_000;

  logic clk = 1'b0, rst_n, valid;
  logic [31:0] x0, x;
  logic [31:0] tx, tmu, ty;
  int checks = 0, failures = 0;

  bicoupled_prng dut (.clk(clk), .rst_n(rst_n), .x0_i(x0), .x_o(x), .valid_o(valid));
  hub_tent_map   u_tent (.x_i(tx), .mu_i(tmu), .x_o(ty));

  always #5 clk = ~clk;

  initial begin
    repeat (2 * (N_SEQ * SEQ_BITS / 32 + N_PERIOD) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [logic [31:0]];
    bit state_seen [logic [63:0]];
    int n, repeats, pass, bits_in_seq, seq, first_rep;
    longint s;
    real stat;
    // 2. stand-alone tent map
    tx = 32'hB5C2_8F5C; tmu = 32'hC000_0000;   // x0 ~ 0.71, mu ~ 1.75
    first_rep = -1;
    n = 0;
    while (n < N_PERIOD && first_rep < 0) begin
      #1;
      if (seen.exists(tx)) first_rep = n;
      else begin
        seen[tx] = n;
        tx = ty;
        n++;
      end
    end
    checks++;
    if (first_rep < 0) begin
      failures++;
      $display("FAIL stand-alone tent map showed no period in %0d iterations", N_PERIOD);
    end else
      $display("tent map alone: period %0d, transient %0d", first_rep - seen[tx], seen[tx]);
    seen.delete();

    // 1 and 3. coupled generator
    x0 = 32'hB5C2_8F5C;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0; repeats = 0; pass = 0; bits_in_seq = 0; seq = 0; s = 0;
    while (seq < N_SEQ || n < N_PERIOD) begin
      @(posedge clk); #1;
      if (valid) begin
        // period search on the generator's 64-bit loop state
        if (n < N_PERIOD) begin
          if (state_seen.exists({dut.t_q, dut.x_q})) repeats++;
          else state_seen[{dut.t_q, dut.x_q}] = 1'b1;
        end
        n++;
        for (int i = 0; i < 32 && seq < N_SEQ; i++) begin
          s += x[i] ? 1 : -1;
          bits_in_seq++;
          if (bits_in_seq == SEQ_BITS) begin
            stat = ((s < 0) ? -real'(s) : real'(s)) / $sqrt(real'(SEQ_BITS));
            if (stat < 2.5758) pass++;
            s = 0; bits_in_seq = 0; seq++;
          end
        end
      end
    end
    checks++;
    if (repeats != 0) begin
      failures++;
      $display("FAIL coupled generator state repeated %0d times within %0d iterations", repeats, N_PERIOD);
    end
    checks++;
    if (pass < 96) begin
      failures++;
      $display("FAIL frequency test passed by %0d/%0d sequences", pass, N_SEQ);
    end
    $display("Bi-HUB: %0d iterations, no repeat: %0d; frequency test %0d/%0d", N_PERIOD, repeats == 0, pass, N_SEQ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
