// tb_round_logic: self-checking test of round_logic. Random normalized windows (normal and denormal), sticky bits and exponents, including ties, all-ones significands and the overflow boundary; the packed result is compared with rounding done on the integer value of the window.
module tb_round_logic;
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
  logic sign, sticky_in, inexact, overflow;
  logic [76:0] norm;
  exp_t exp_top;
  fp32_t result;
  round_logic dut (.sign(sign), .norm(norm), .sticky_in(sticky_in), .exp_top(exp_top),
                   .result(result), .inexact(inexact), .overflow(overflow));
  initial begin
    logic [24:0] s;
    logic [52:0] rem;
    logic up, tie, above;
    int e;
    logic [31:0] expect_r;
    for (int i = 0; i < 200000; i++) begin
      norm = {$urandom, $urandom, $urandom};
      sticky_in = 1'($urandom);
      sign = 1'($urandom);
      case (i % 6)
        0: norm[76] = 1'b0;                                 // denormal
        1: begin norm[76:53] = '1; end                      // all ones
        2: begin norm[52:0] = 53'h10000000000000; end       // exact tie
        3: norm[76] = 1'b1;
        default: ;
      endcase
      exp_top = norm[76] ? exp_t'($urandom_range(1, 256)) : exp_t'(1);
      if (i % 10 == 0) exp_top = norm[76] ? exp_t'(254) : exp_t'(1);
      @(negedge clk);
      s = {1'b0, norm[76:53]};
      rem = norm[52:0];
      tie = (rem == 53'h10000000000000) && !sticky_in;
      above = (rem > 53'h10000000000000) || (rem == 53'h10000000000000 && sticky_in);
      up = above || (tie && s[0]);
      s = s + 25'(up);
      e = int'(exp_top);
      if (s[24]) begin s = s >> 1; e++; end
      if (!s[23]) e = 0;                                    // stays denormal
      if (e >= 255) expect_r = {sign, 8'hFF, 23'h0};
      else expect_r = {sign, 8'(e), s[22:0]};
      chk(result == expect_r, $sformatf("norm=%h st=%b e=%0d got=%h exp=%h", norm, sticky_in, exp_top, result, expect_r));
      chk(inexact == ((rem != 0) || sticky_in), "inexact");
      chk(overflow == (e >= 255), "overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
