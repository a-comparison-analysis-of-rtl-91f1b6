// tb_bicoupled_prng: runs the Bi-HUB generator from two initial conditions
// and compares every output with the arithmetic reference model.  It also
// checks the timing (one new value every second cycle, the first two clock
// edges after reset), that an all-zero initial condition does not annul the
// chaos (HUB's implicit half ulp keeps the orbit moving), and that the 64-bit
// loop state does not repeat within the first 2*N_ITER cycles (no short
// period).
module tb_bicoupled_prng;
  import hub_ref_pkg::*;
  localparam int N_ITER = 20000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] x0, x;
  logic        valid;
  int checks = 0, failures = 0;
  int cycle = 0;

  bicoupled_prng dut (.clk(clk), .rst_n(rst_n), .x0_i(x0), .x_o(x), .valid_o(valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] init, input int n_iter, input bit check_period);
    logic [63:0] st;
    bit first;
    bit seen [logic [63:0]];
    int last_cycle, start_cycle, n, zeros, repeats;
    rst_n = 1'b0;
    x0 = init;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    start_cycle = cycle;
    st = '0;
    first = 1'b1;
    n = 0; zeros = 0; repeats = 0;
    last_cycle = -1;
    while (n < n_iter) begin
      @(posedge clk);
      #1;
      st = step_ref(st, init, first);
      first = 1'b0;
      if (check_period) begin
        if (seen.exists(st)) repeats++;
        seen[st] = 1'b1;
      end
      if (valid) begin
        checks++;
        if (x !== st[31:0]) begin
          failures++;
          if (failures < 10) $display("FAIL iter %0d got %h exp %h", n, x, st[31:0]);
        end
        checks++;
        if (n == 0 && cycle - start_cycle != 2) begin
          failures++;
          $display("FAIL first output after %0d cycles, expected 2", cycle - start_cycle);
        end else if (n > 0 && cycle - last_cycle != 2) begin
          failures++;
          $display("FAIL outputs %0d cycles apart, expected 2", cycle - last_cycle);
        end
        last_cycle = cycle;
        if (x == 0) zeros++;
        n++;
      end
    end
    checks++;
    if (zeros > 1) begin
      failures++;
      $display("FAIL %0d zero outputs from x0=%h", zeros, init);
    end
    if (check_period) begin
      checks++;
      if (repeats != 0) begin
        failures++;
        $display("FAIL loop state repeated %0d times within %0d iterations", repeats, n_iter);
      end
    end
    $display("x0=%h: %0d iterations, last %h, %0d zero outputs", init, n_iter, x, zeros);
  endtask

  initial begin
    run(32'hB5C2_8F5C, N_ITER, 1'b1);   // x0 ~ 0.71
    run(32'h0000_0000, 2000, 1'b0);     // all-zero initial condition
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
