// tb_norm_shifter: self-checking test of norm_shifter. Random 77-bit inputs and every shift amount 0..127, compared with a single shift operator.
module tb_norm_shifter;
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
  logic [76:0] din, dout;
  logic [6:0] shamt;
  norm_shifter dut (.din(din), .shamt(shamt), .dout(dout));
  initial begin
    for (int i = 0; i < 100000; i++) begin
      din = {$urandom, $urandom, $urandom};
      shamt = 7'(i);
      @(negedge clk);
      chk(dout == (din << shamt), $sformatf("shamt=%0d", shamt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
