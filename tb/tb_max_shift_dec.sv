// tb_max_shift_dec: self-checking test of max_shift_dec. Sweeps ExpBase over -100..500 and checks that M has its single 1 at position 77 - ExpBase exactly when 1 <= ExpBase <= 76 and is zero otherwise (ExpBase 77 needs no marker: the LZD never counts past 76).
module tb_max_shift_dec;
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
  import fma_pkg::*;
  exp_t exp_base;
  logic [76:0] m;
  max_shift_dec dut (.exp_base(exp_base), .m(m));
  initial begin
    logic [76:0] expect_m;
    for (int e = -100; e <= 500; e++) begin
      exp_base = exp_t'(e);
      @(negedge clk);
      expect_m = '0;
      if (e >= 1 && e <= 76) expect_m[77 - e] = 1'b1;
      chk(m == expect_m, $sformatf("exp_base=%0d", e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
