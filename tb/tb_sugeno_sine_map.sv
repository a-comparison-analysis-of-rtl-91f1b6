// tb_sugeno_sine_map: checks the posit sine map against the real-number
// reference run in the same operation order, checks that it approximates
// eta * sin(pi x) (the fuzzy approximation equals eta * 4x(1-x), within 0.06
// of the sine), and that each result arrives 8 cycles after its start.
module tb_sugeno_sine_map;
  import posit_ref_pkg::*;
  import sine_ref_pkg::*;
  logic clk = 1'b0, rst_n, start, busy, done;
  logic [31:0] x, eta, y;
  int checks = 0, failures = 0;
  int cycle = 0;

  sugeno_sine_map dut (.clk(clk), .rst_n(rst_n), .start_i(start), .x_i(x),
                       .eta_i(eta), .y_o(y), .busy_o(busy), .done_o(done));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real xr, input real er);
    int t0;
    real yr, sr;
    x = r2p(xr); eta = r2p(er);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    t0 = cycle;
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (cycle - t0 != 7) begin
      failures++;
      $display("FAIL latency %0d cycles after the start cycle", cycle - t0 + 1);
    end
    checks++;
    if (y !== sine_map_ref(x, eta)) begin
      failures++;
      $display("FAIL x=%h eta=%h got %h exp %h", x, eta, y, sine_map_ref(x, eta));
    end
    yr = p2r(y);
    sr = p2r(eta) * $sin(3.141592653589793 * p2r(x));
    checks++;
    if (yr - sr > 0.06 || sr - yr > 0.06) begin
      failures++;
      $display("FAIL approximation x=%f y=%f sine=%f", p2r(x), yr, sr);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; x = 0; eta = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    one(0.0, 0.962);
    one(1.0, 0.962);
    one(0.5, 1.0);
    one(0.1, 0.97);
    for (int i = 0; i < 300; i++) one(real'($urandom) / 4294967296.0, 0.87 + 0.13 * real'($urandom % 1000) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
