// tb_lza_anticipate: self-checking test of lza_anticipate. Random operand pairs for addition and for subtraction in both orders, with and without a sticky digit below the window, are turned into P/G/K terms; the leading one of the edge vector must sit at the leading one of the true result or one position above it. With a limit M, the leading one must be no lower than M's position.
module tb_lza_anticipate;
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
  localparam int unsigned W = 77;
  logic [W-1:0] p, g, k, m, v;
  logic sub, neg, sticky;
  lza_anticipate dut (.p(p), .g(g), .k(k), .sub(sub), .neg(neg), .sticky(sticky), .m(m), .v(v));

  function automatic int msb(input logic [W-1:0] x);
    int r = -1;
    for (int i = 0; i < int'(W); i++) if (x[i]) r = i;
    return r;
  endfunction

  initial begin
    logic [W-1:0] x, y, yp, res, a1, a2;
    logic [W+1:0] ext;
    int mv, mr, mpos;
    for (int i = 0; i < 200000; i++) begin
      x = {$urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom};
      x = x >> $urandom_range(1, 60);
      // y close to x so that subtraction cancels many leading bits
      if (i % 3 == 0) y = x ^ (W'($urandom) >> $urandom_range(0, 31));
      else y = y >> $urandom_range(1, 60);
      sub = 1'(i % 4 != 0);
      sticky = sub & 1'($urandom);
      if (!sub) begin
        neg = 1'b0; yp = y; res = x + y;
      end else begin
        // result = larger - smaller - sticky, with x the minuend of the adder
        a1 = (x > y) ? x : y; a2 = (x > y) ? y : x;
        if (a1 == a2 || (a1 - a2) < W'(2)) begin a1 = a1 + W'(4); end
        neg = 1'($urandom);
        if (!neg) begin x = a1; y = a2; end else begin x = a2; y = a1; end
        yp = ~y;
        res = (neg ? (y - x) : (x - y)) - W'(sticky);
      end
      p = x ^ yp; g = x & yp; k = ~(x | yp);
      m = '0;
      mpos = -1;
      if (i % 5 == 0) begin mpos = $urandom_range(0, W - 1); m[mpos] = 1'b1; end
      @(negedge clk);
      mv = msb(v);
      mr = msb(res);
      if (mpos < 0)
        chk(mv == mr || mv == mr + 1, $sformatf("sub=%0b neg=%0b st=%0b mv=%0d mr=%0d", sub, neg, sticky, mv, mr));
      else
        chk(mv == ((mpos > mr + 1) ? mpos : ((mv == mr || mv == mr + 1) ? mv : -2)) && mv >= mpos,
            $sformatf("limit mv=%0d mr=%0d mpos=%0d", mv, mr, mpos));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
