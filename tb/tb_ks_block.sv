// tb_ks_block: exhaustive self-check of the Kogge-Stone adder cell.
// The default 2-bit cell and a 4-bit cell are driven with every a, b and
// cin; {cout, sum} must equal the integer a + b + cin.
module tb_ks_block;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2, s2;
  logic [3:0] a4, b4, s4;
  logic       ci2, ci4, co2, co4;

  ks_block                dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  ks_block #(.BLOCK_W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a2, b2, ci2} = v[4:0];
      #1;
      checks++;
      if ({co2, s2} !== 3'(a2) + 3'(b2) + 3'(ci2)) begin
        failures++;
        $display("FAIL W=2 %0d+%0d+%0d -> cout=%0b sum=%0d", a2, b2, ci2, co2, s2);
      end
    end
    for (int v = 0; v < 512; v++) begin
      {a4, b4, ci4} = v[8:0];
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d -> cout=%0b sum=%0d", a4, b4, ci4, co4, s4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
