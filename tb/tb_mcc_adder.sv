// tb_mcc_adder: self-checking test of mcc_adder at its default width (77 bits). Random operands including long carry chains; sum, carry-out and the P/G/K terms are compared with plain arithmetic and bitwise operators.
module tb_mcc_adder;
  logic clk = 1'b0;
  int unsigned checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask
  localparam int unsigned W = 77;
  logic [W-1:0] x, y, sum, p, g, k;
  logic cin, cout;
  mcc_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout), .p(p), .g(g), .k(k));
  initial begin
    logic [W:0] ref_s;
    for (int i = 0; i < 100000; i++) begin
      x = {$urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom};
      if (i % 4 == 1) y = ~x;                 // full propagate chain
      if (i % 4 == 2) y = (~x) ^ (W'(1) << $urandom_range(0, W-1));
      cin = 1'($urandom);
      @(negedge clk);
      ref_s = (W+1)'(x) + (W+1)'(y) + (W+1)'(cin);
      chk({cout, sum} == ref_s, "sum");
      chk(p == (x ^ y) && g == (x & y) && k == ~(x | y), "pgk");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
