// tb_mks_adder: end-to-end self-check of the chained Kogge-Stone adder at
// the four word sizes it is evaluated at: 8, 16 (the default), 32 and 64
// bits (64 being the default), all built from 2-bit cells.
//
// One 64-bit operand pair drives every instance; each instance sees its low
// WIDTH bits and must return {cout, sum} equal to the integer sum of those
// bits, worked out with 65-bit arithmetic in the testbench. The 8-bit adder
// is checked over all 65536 operand pairs; the others get directed vectors
// (the two example additions of the evaluation, all-ones patterns that make
// a carry ripple from the first cell to the last) and random pairs.
//
// Mechanisms counted on the 16-bit instance, each of which must occur:
//   generate   - a cell produces a carry-out from its own operand bits
//   chain      - a carry enters a cell from the cell below it
//   full_chain - a carry made in cell 0 ripples through every other cell
//                and out of the adder
//   overflow   - cout = 1
module tb_mks_adder;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b;
  logic [7:0]  s8;
  logic [15:0] s16;
  logic [31:0] s32;
  logic [63:0] s64;
  logic        co8, co16, co32, co64;

  mks_adder #(.WIDTH(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .sum(s8),  .cout(co8));
  mks_adder #(.WIDTH(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .sum(s16), .cout(co16));
  mks_adder #(.WIDTH(32)) dut32 (.a(a[31:0]), .b(b[31:0]), .sum(s32), .cout(co32));
  mks_adder               dut64 (.a(a),       .b(b),       .sum(s64), .cout(co64));

  int n_generate = 0, n_chain = 0, n_full_chain = 0, n_overflow = 0;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [64:0] ref_sum(int w, logic [63:0] x, logic [63:0] y);
    logic [63:0] m = (w == 64) ? '1 : ((64'd1 << w) - 64'd1);
    return 65'(x & m) + 65'(y & m);
  endfunction

  task automatic cmp(int w, logic [64:0] got);
    logic [64:0] want = ref_sum(w, a, b);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h got=%h want=%h", w, a, b, got, want);
    end
  endtask

  // Carry into bit position k of the 16-bit adder, from the reference.
  function automatic logic carry_into(int k);
    logic [63:0] m = (64'd1 << k) - 64'd1;
    logic [64:0] t = 65'(a & m) + 65'(b & m);
    return t[k];
  endfunction

  task automatic count16();
    logic [15:0] p = a[15:0] ^ b[15:0];
    logic [15:0] g = a[15:0] & b[15:0];
    bit gen = 0, chn = 0;
    for (int k = 0; k < 8; k++) begin
      // cell k generates on its own: cout of the cell with cin forced to 0
      if (g[2*k+1] | (p[2*k+1] & g[2*k])) gen = 1;
      if (k > 0 && carry_into(2*k)) chn = 1;
    end
    if (gen) n_generate++;
    if (chn) n_chain++;
    if (co16) n_overflow++;
    if (carry_into(2) && p[15:2] == '1) n_full_chain++;
  endtask

  task automatic apply(logic [63:0] x, logic [63:0] y, bit all_sizes = 1);
    a = x;
    b = y;
    #1;
    cmp(8, 65'({co8, s8}));
    if (all_sizes) begin
      cmp(16, 65'({co16, s16}));
      cmp(32, 65'({co32, s32}));
      cmp(64, {co64, s64});
      count16();
    end
  endtask

  initial begin
    // Example additions from the evaluation: 42 + 168 = 210 (8 bit) and
    // 0x3555 + 0x3555 = 0x6AAA (16 bit).
    apply(64'd42, 64'd168);
    checks++;
    if (s8 !== 8'd210 || co8 !== 1'b0) begin
      failures++;
      $display("FAIL 8-bit example: %0d cout=%0b", s8, co8);
    end
    apply(64'h3555, 64'h3555);
    checks++;
    if (s16 !== 16'h6AAA || co16 !== 1'b0) begin
      failures++;
      $display("FAIL 16-bit example: %h cout=%0b", s16, co16);
    end
    // Carry made in the first cell ripples all the way out.
    apply('1, 64'd1);
    apply('1, '1);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAB);
    apply(64'h7FFF_FFFF_FFFF_FFFF, 64'd1);
    apply('0, '0);
    // Exhaustive 8-bit.
    for (int v = 0; v < 65536; v++) apply(64'(v[15:8]), 64'(v[7:0]), 0);
    // Random, with half the pairs biased toward long propagate runs.
    for (int n = 0; n < 20000; n++) begin
      automatic logic [63:0] x = {$urandom, $urandom};
      automatic logic [63:0] y = {$urandom, $urandom};
      if (n[0]) y = ~x ^ ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
      apply(x, y);
    end

    $display("mechanisms: generate=%0d chain=%0d full_chain=%0d overflow=%0d",
             n_generate, n_chain, n_full_chain, n_overflow);
    checks++; if (n_generate == 0)   begin failures++; $display("FAIL no in-cell generate"); end
    checks++; if (n_chain == 0)      begin failures++; $display("FAIL no inter-cell carry"); end
    checks++; if (n_full_chain == 0) begin failures++; $display("FAIL no full-length ripple"); end
    checks++; if (n_overflow == 0)   begin failures++; $display("FAIL no carry-out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
