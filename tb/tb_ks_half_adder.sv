// tb_ks_half_adder: exhaustive self-check of the one-bit half adder.
// All four input pairs are applied; p and g are compared with the
// arithmetic sum a + b (p = its low bit, g = its carry).
module tb_ks_half_adder;
  logic a, b, p, g;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  ks_half_adder dut (.a(a), .b(b), .p(p), .g(g));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] s;
      {a, b} = v[1:0];
      #1;
      s = 2'(a) + 2'(b);
      checks++;
      if ({g, p} !== s) begin
        failures++;
        $display("FAIL a=%0b b=%0b: got g=%0b p=%0b, want %02b", a, b, g, p, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
