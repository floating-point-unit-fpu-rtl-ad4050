// tb_special_select: self-checking test of special_select. Operand triples drawn mostly from special encodings (zeros, infinities, NaNs) with random signs are classified here, and the selected output is compared with the IEEE-754 rules for a*b+c written out case by case.
module tb_special_select;
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
  fp_class_t ca, cb, cc;
  logic sign_p, tiny, dp_zero;
  fp32_t c, rounded, result;
  out_sel_e sel;
  special_select dut (.ca(ca), .cb(cb), .cc(cc), .sign_p(sign_p), .c(c), .tiny(tiny),
                      .dp_zero(dp_zero), .rounded(rounded), .sel(sel), .result(result));

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return {1'($urandom), 31'h0};
      1: return {1'($urandom), 31'h7F800000};
      2: return {1'($urandom), 8'hFF, 23'($urandom) | 23'h1};
      default: return {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)};
    endcase
  endfunction

  function automatic fp_class_t cls(input logic [31:0] w);
    cls.is_zero = (w[30:0] == 0);
    cls.is_denorm = 1'b0;
    cls.is_inf = (w[30:0] == 31'h7F800000);
    cls.is_nan = (w[30:23] == 8'hFF) && (w[22:0] != 0);
    cls.is_snan = cls.is_nan && !w[22];
  endfunction

  initial begin
    logic [31:0] wa, wb, wc, e;
    logic pinf, pzero;
    for (int i = 0; i < 100000; i++) begin
      wa = pick(); wb = pick(); wc = pick();
      ca = cls(wa); cb = cls(wb); cc = cls(wc);
      c = wc;
      sign_p = wa[31] ^ wb[31];
      tiny = 1'($urandom) & cc.is_zero;
      dp_zero = 1'($urandom_range(0, 3) == 0);
      rounded = {$urandom};
      @(negedge clk);
      pinf = ca.is_inf || cb.is_inf;
      pzero = ca.is_zero || cb.is_zero;
      if (ca.is_nan || cb.is_nan || cc.is_nan) e = 32'h7FC00000;
      else if (pinf && pzero) e = 32'h7FC00000;
      else if (pinf && cc.is_inf && sign_p != wc[31]) e = 32'h7FC00000;
      else if (pinf) e = {sign_p, 31'h7F800000};
      else if (cc.is_inf) e = {wc[31], 31'h7F800000};
      else if (pzero && cc.is_zero) e = {sign_p & wc[31], 31'h0};
      else if (pzero) e = wc;
      else if (tiny) e = {sign_p, 31'h0};
      else if (dp_zero) e = 32'h0;
      else e = rounded;
      chk(result == e, $sformatf("a=%h b=%h c=%h got=%h exp=%h", wa, wb, wc, result, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
