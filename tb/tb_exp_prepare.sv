// tb_exp_prepare: self-checking test of exp_prepare. Random effective exponents; the alignment shift (clamped to 0..127), the C-dominant flag and the window base exponent are compared with integer arithmetic on the exponent definitions.
module tb_exp_prepare;
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
  logic [7:0] ea, eb, ec;
  logic c_nonzero, c_dom;
  logic [6:0] shamt;
  exp_t exp_base;
  exp_prepare dut (.ea(ea), .eb(eb), .ec(ec), .c_nonzero(c_nonzero), .shamt(shamt), .c_dom(c_dom), .exp_base(exp_base));
  initial begin
    int d, es, ebase;
    for (int i = 0; i < 200000; i++) begin
      ea = 8'($urandom_range(1, 254)); eb = 8'($urandom_range(1, 254)); ec = 8'($urandom_range(1, 254));
      c_nonzero = 1'($urandom);
      @(negedge clk);
      // product LSB weight 2^(ea+eb-300), addend LSB 2^(ec-150); the addend's
      // unshifted LSB is 50 bits above the product LSB
      d = (int'(ea) + int'(eb) - 300) - (int'(ec) - 150) + 50;
      es = (d < 0) ? 0 : (d > 127 ? 127 : d);
      ebase = (c_nonzero && d < 0) ? int'(ec) + 1 : int'(ea) + int'(eb) - 99;
      chk(int'(shamt) == es, $sformatf("shamt %0d vs %0d", shamt, es));
      chk(c_dom == (c_nonzero && d < 0), "c_dom");
      chk(int'(exp_base) == ebase, "exp_base");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
