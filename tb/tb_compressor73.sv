// tb_compressor73: self-checking test of one (7:3) counter row at its
// default width. Every one of the 128 combinations of seven input bits is
// applied at each bit position in turn, then random rows; the check is that
// s + c1 + c2 equals the sum of the seven rows modulo 2^W, and, for the
// exhaustive part, that the three outputs at one position give the exact
// count of ones.
module tb_compressor73;
  logic clk = 1'b0;
  int unsigned checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  localparam int unsigned W = 64;
  logic [6:0][W-1:0] x;
  logic [W-1:0]      s, c1, c2, ref_sum;
  compressor73 dut (.x(x), .s(s), .c1(c1), .c2(c2));

  initial begin
    // exhaustive counts at every position
    for (int pos = 0; pos < W; pos++) begin
      for (int v = 0; v < 128; v++) begin
        for (int r = 0; r < 7; r++) begin
          x[r] = '0;
          x[r][pos] = v[r];
        end
        @(negedge clk);
        ref_sum = '0;
        for (int r = 0; r < 7; r++) ref_sum += x[r];
        chk(s + c1 + c2 == ref_sum, $sformatf("pos %0d v %0h: sum", pos, v));
        if (pos < W - 2)
          chk(int'(s[pos]) + 2 * int'(c1[pos+1]) + 4 * int'(c2[pos+2]) == $countones(v[6:0]),
              $sformatf("pos %0d v %0h: count", pos, v));
      end
    end
    // random rows
    for (int i = 0; i < 50000; i++) begin
      for (int r = 0; r < 7; r++) x[r] = {$urandom, $urandom};
      @(negedge clk);
      ref_sum = '0;
      for (int r = 0; r < 7; r++) ref_sum += x[r];
      chk(s + c1 + c2 == ref_sum, $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
