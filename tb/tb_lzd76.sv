// tb_lzd76: self-checking test of lzd76. Inputs with the leading one at every position and random bits below it, plus zero; the count is compared with a scan.
module tb_lzd76;
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
  logic [75:0] b;
  logic [6:0] p;
  logic v;
  lzd76 dut (.b(b), .p(p), .v(v));
  initial begin
    int lz;
    for (int i = 0; i < 100000; i++) begin
      b = {$urandom, $urandom, $urandom};
      b = b >> (i % 77);
      if (i % 77 != 76) b[75 - (i % 77)] = 1'b1;
      @(negedge clk);
      lz = 76;
      for (int j = 0; j < 76; j++) if (b[j]) lz = 75 - j;
      chk(v == (b != 0), "v");
      if (b != 0) chk(int'(p) == lz, $sformatf("p=%0d lz=%0d", p, lz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
