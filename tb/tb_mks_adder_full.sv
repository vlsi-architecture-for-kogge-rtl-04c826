// tb_mks_adder_full: the adder at its default size (64 bits, 32 chained 2-bit cells),
// taken through the evaluation's example addition, the carry-ripple corner
// cases and 50000 random additions, each compared with the integer sum.
module tb_mks_adder_full;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b, sum;
  logic        cout;

  mks_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] x, logic [63:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if ({cout, sum} !== 65'(x) + 65'(y)) begin
      failures++;
      $display("FAIL %h + %h -> cout=%0b sum=%h", x, y, cout, sum);
    end
  endtask

  initial begin
    apply(64'h3555, 64'h3555);
    checks++;
    if (sum !== 64'h6AAA) begin failures++; $display("FAIL example sum %h", sum); end
    apply(64'd42, 64'd168);
    checks++;
    if (sum !== 64'd210) begin failures++; $display("FAIL example sum %0d", sum); end
    apply('1, 64'd1);
    apply('1, '1);
    apply('0, '0);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    for (int n = 0; n < 50000; n++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
