// tb_ks_carry_network: self-check of the Kogge-Stone prefix carry stage.
// The reference is a bit-serial ripple recurrence c[i+1] = g[i] | p[i]&c[i]
// computed in the testbench. The default 2-bit network and the 4-bit network
// (two prefix stages) are driven exhaustively over p, g and cin; 8- and
// 16-bit networks (three and four stages) with random inputs.
module tb_ks_carry_network;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  p2, g2, c2;
  logic [3:0]  p4, g4, c4;
  logic [7:0]  p8, g8, c8;
  logic [15:0] p16, g16, c16;
  logic        ci2, ci4, ci8, ci16, co2, co4, co8, co16;

  ks_carry_network          dut2  (.p(p2),  .g(g2),  .cin(ci2),  .c(c2),  .cout(co2));
  ks_carry_network #(.W(4))  dut4  (.p(p4),  .g(g4),  .cin(ci4),  .c(c4),  .cout(co4));
  ks_carry_network #(.W(8))  dut8  (.p(p8),  .g(g8),  .cin(ci8),  .c(c8),  .cout(co8));
  ks_carry_network #(.W(16)) dut16 (.p(p16), .g(g16), .cin(ci16), .c(c16), .cout(co16));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ripple reference: returns {cout, carries into bits W-1..0}.
  function automatic logic [16:0] ripple(int w, logic [15:0] p, logic [15:0] g, logic cin);
    logic [16:0] r = '0;
    logic c = cin;
    for (int i = 0; i < w; i++) begin
      r[i] = c;
      c = g[i] | (p[i] & c);
    end
    r[w] = c;
    return r;
  endfunction

  task automatic cmp(int w, logic [16:0] got, logic [16:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL W=%0d got=%h want=%h", w, got, want);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      {p2, g2, ci2} = v[4:0];
      #1;
      cmp(2, 17'({co2, c2}), ripple(2, 16'(p2), 16'(g2), ci2));
    end
    for (int v = 0; v < 512; v++) begin
      {p4, g4, ci4} = v[8:0];
      #1;
      cmp(4, 17'({co4, c4}), ripple(4, 16'(p4), 16'(g4), ci4));
    end
    for (int n = 0; n < 2000; n++) begin
      p8 = 8'($urandom);  g8 = 8'($urandom);  ci8 = 1'($urandom);
      // Half the time, long propagate runs: p high, g sparse.
      p16 = 16'($urandom); g16 = 16'($urandom); ci16 = 1'($urandom);
      if (n[0]) begin
        p8 = p8 | 8'($urandom);   g8 = g8 & 8'($urandom) & 8'($urandom);
        p16 = p16 | 16'($urandom); g16 = g16 & 16'($urandom) & 16'($urandom);
      end
      #1;
      cmp(8,  17'({co8, c8}),   ripple(8,  16'(p8), 16'(g8), ci8));
      cmp(16, 17'({co16, c16}), ripple(16, p16, g16, ci16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
