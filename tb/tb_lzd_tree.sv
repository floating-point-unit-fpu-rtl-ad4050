// tb_lzd_tree: self-checking test of lzd_tree at its default size (16 inputs) and at 2, 4 and 8 inputs, all exhaustively: the count must equal the number of leading zeros found by a scan, and v must be 0 only for an all-zero input.
module tb_lzd_tree;
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
  logic [15:0] b;
  logic [3:0] p;
  logic v;
  lzd_tree dut (.b(b), .p(p), .v(v));
  logic [1:0] p8; logic [0:0] p2; logic [2:0] p8b;
  logic v2, v4, v8;
  lzd_tree #(.N(2)) dut2 (.b(b[1:0]), .p(p2), .v(v2));
  lzd_tree #(.N(4)) dut4 (.b(b[3:0]), .p(p8), .v(v4));
  lzd_tree #(.N(8)) dut8 (.b(b[7:0]), .p(p8b), .v(v8));

  function automatic int lzc(input logic [15:0] x, input int n);
    int r = n;
    for (int j = 0; j < n; j++) if (x[j]) r = n - 1 - j;
    return r;
  endfunction
  initial begin
    int lz;
    for (int i = 0; i < 65536; i++) begin
      b = 16'(i);
      @(negedge clk);
      lz = 16;
      for (int j = 0; j < 16; j++) if (b[j]) lz = 15 - j;
      chk(v == (b != 0), "v");
      if (b != 0) chk(int'(p) == lz, $sformatf("b=%h p=%0d lz=%0d", b, p, lz));
      if (i < 256) begin
        chk(v2 == (b[1:0] != 0) && v4 == (b[3:0] != 0) && v8 == (b[7:0] != 0), "v small");
        if (b[1:0] != 0) chk(int'(p2) == lzc(b, 2), "p2");
        if (b[3:0] != 0) chk(int'(p8) == lzc(b, 4), "p4");
        if (b[7:0] != 0) chk(int'(p8b) == lzc(b, 8), "p8");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
