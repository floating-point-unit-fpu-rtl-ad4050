// tb_fp_classify: self-checking test of fp_classify. Random bit patterns and the special encodings are applied; the class flags, significand and effective exponent are compared with values derived directly from the IEEE-754 field definitions.
module tb_fp_classify;
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
  fp32_t x;
  logic [SIG_W-1:0] sig;
  logic [EXP_W-1:0] eff_exp;
  fp_class_t cls;
  fp_classify dut (.x(x), .sig(sig), .eff_exp(eff_exp), .cls(cls));
  initial begin
    logic [31:0] w;
    logic e0, e1, f0;
    for (int i = 0; i < 200000; i++) begin
      w = $urandom;
      case (i % 6)
        0: w[30:23] = 8'h00;
        1: w[30:23] = 8'hFF;
        2: w[22:0] = '0;
        3: w[30:0] = (i % 12 == 3) ? 31'h0 : 31'h7F800000;
        default: ;
      endcase
      x = w;
      @(negedge clk);
      e0 = (w[30:23] == 0); e1 = (w[30:23] == 255); f0 = (w[22:0] == 0);
      chk(cls.is_zero == (w[30:0] == 0), "zero");
      chk(cls.is_denorm == (e0 && !f0), "denorm");
      chk(cls.is_inf == (w[30:0] == 31'h7F800000), "inf");
      chk(cls.is_nan == (e1 && !f0), "nan");
      chk(cls.is_snan == (e1 && !f0 && !w[22]), "snan");
      chk(sig == (e0 ? {1'b0, w[22:0]} : {1'b1, w[22:0]}), "sig");
      chk(eff_exp == (e0 ? 8'd1 : w[30:23]), "eff_exp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
