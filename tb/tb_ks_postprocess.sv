// tb_ks_postprocess: self-check of the sum stage.
// The default 2-bit instance is driven exhaustively and an 8-bit instance
// randomly; each sum bit must equal p[i] ^ c[i], computed in the testbench.
module tb_ks_postprocess;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] p2, c2, s2;
  logic [7:0] p8, c8, s8;

  ks_postprocess dut2 (.p(p2), .c(c2), .s(s2));
  ks_postprocess #(.W(8)) dut8 (.p(p8), .c(c8), .s(s8));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {p2, c2} = v[3:0];
      #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (s2[i] !== (p2[i] != c2[i])) begin
          failures++;
          $display("FAIL W=2 p=%b c=%b s=%b", p2, c2, s2);
        end
      end
    end
    for (int n = 0; n < 300; n++) begin
      p8 = 8'($urandom);
      c8 = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (s8[i] !== (p8[i] != c8[i])) begin
          failures++;
          $display("FAIL W=8 p=%h c=%h s=%h", p8, c8, s8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
