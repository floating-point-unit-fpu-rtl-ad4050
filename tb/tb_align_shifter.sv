// tb_align_shifter: self-checking test of align_shifter. Random significands and every shift amount; the 77-bit window and the sticky bit are compared with a 256-bit model of the field shifted in one step.
module tb_align_shifter;
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
  logic [23:0] sig;
  logic [6:0] shamt;
  logic [76:0] win;
  logic sticky;
  align_shifter dut (.sig(sig), .shamt(shamt), .win(win), .sticky(sticky));
  initial begin
    logic [255:0] full, below;
    for (int i = 0; i < 100000; i++) begin
      sig = $urandom;
      if (i % 3 == 0) sig = sig & (24'hFFFFFF << $urandom_range(0, 23));
      if (i % 3 == 1) sig = sig | 24'h800000;
      shamt = 7'(i);
      @(negedge clk);
      // field bit j (0..98) holds full bit j+128 after the shift
      full  = (256'(sig) << (74 + 128)) >> shamt;
      below = full & ((256'(1) << (128 + 22)) - 1);
      chk(win == full[128+98 -: 77], $sformatf("win shamt=%0d", shamt));
      chk(sticky == (below != 0), $sformatf("sticky shamt=%0d sig=%h", shamt, sig));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
