// tb_ks_preprocess: self-check of the propagate/generate stage.
// The default 2-bit instance is driven exhaustively, an 8-bit instance with
// random operands; every bit's p and g are compared with a ^ b and a & b
// worked out bit by bit in the testbench.
module tb_ks_preprocess;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2, p2, g2;
  logic [7:0] a8, b8, p8, g8;

  ks_preprocess dut2 (.a(a2), .b(b2), .p(p2), .g(g2));
  ks_preprocess #(.W(8)) dut8 (.a(a8), .b(b8), .p(p8), .g(g8));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8();
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (p8[i] !== (a8[i] != b8[i]) || g8[i] !== (a8[i] && b8[i])) begin
        failures++;
        $display("FAIL W=8 bit %0d a=%h b=%h p=%h g=%h", i, a8, b8, p8, g8);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a2, b2} = v[3:0];
      #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (p2[i] !== (a2[i] != b2[i]) || g2[i] !== (a2[i] && b2[i])) begin
          failures++;
          $display("FAIL W=2 bit %0d a=%b b=%b p=%b g=%b", i, a2, b2, p2, g2);
        end
      end
    end
    for (int n = 0; n < 300; n++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      #1;
      check8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
