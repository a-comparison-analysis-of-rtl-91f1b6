// tb_modified_bt: checks the modified bit transformation against an
// arithmetic model and checks that it is a bijection on sample pairs
// (applying the inverse recovers the input).
module tb_modified_bt;
  import hub_ref_pkg::*;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  modified_bt dut (.x_i(x), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] back;
    x = 32'h0000_0001; #1;
    checks++; if (y !== 32'h8000_8000) begin failures++; $display("FAIL b0 -> %h", y); end
    x = 32'h0001_0000; #1;
    checks++; if (y !== 32'h0001_0000) begin failures++; $display("FAIL b16 -> %h", y); end
    x = 32'h0000_8000; #1;
    checks++; if (y !== 32'h0001_0001) begin failures++; $display("FAIL b15 -> %h", y); end
    for (int i = 0; i < 2000; i++) begin
      x = $urandom; #1;
      checks++;
      if (y !== mbt_ref(x)) begin
        failures++;
        $display("FAIL mbt x=%h got %h exp %h", x, y, mbt_ref(x));
      end
      // invert: low half reversed back, high half XOR reversed low half
      back = {y[31:16] ^ y[15:0], {<<{y[15:0]}}};
      checks++;
      if (back !== x) begin failures++; $display("FAIL mbt not invertible x=%h", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
