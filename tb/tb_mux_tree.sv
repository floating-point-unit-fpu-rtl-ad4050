// tb_mux_tree: self-checking test of mux_tree at its default size (8:1 of
// 32-bit words) and as a 5:1 tree with an incomplete last level. Random
// words and every select value; the output is compared with direct indexing.
module tb_mux_tree;
  logic clk = 1'b0;
  int unsigned checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  logic [31:0] din [8];
  logic [2:0]  sel;
  logic [31:0] dout;
  logic [7:0]  din5 [5];
  logic [7:0]  dout5;
  mux_tree dut (.din(din), .sel(sel), .dout(dout));
  mux_tree #(.N(5), .W(8)) dut5 (.din(din5), .sel(sel), .dout(dout5));

  initial begin
    for (int i = 0; i < 40000; i++) begin
      foreach (din[j]) din[j] = $urandom;
      foreach (din5[j]) din5[j] = 8'($urandom);
      sel = 3'(i);
      @(negedge clk);
      chk(dout == din[sel], $sformatf("sel=%0d", sel));
      chk(dout5 == ((sel < 5) ? din5[sel] : 8'h00), $sformatf("5:1 sel=%0d", sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
