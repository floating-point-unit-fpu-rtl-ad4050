// tb_booth_mul: self-checking test of booth_mul at its default width (32 bits). Random and corner operands; the product is compared with the simulator's own multiplication.
module tb_booth_mul;
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
  localparam int unsigned W = 32;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  booth_mul dut (.a(a), .b(b), .p(p));
  initial begin
    logic [W-1:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h5555_5555, 32'hAAAA_AAAA};
    foreach (corner[i]) foreach (corner[j]) begin
      a = corner[i]; b = corner[j];
      @(negedge clk);
      chk(p == 64'(a) * 64'(b), $sformatf("%h*%h=%h", a, b, p));
    end
    for (int i = 0; i < 200000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 4 == 1) a = a >> $urandom_range(0, 31);
      if (i % 4 == 2) b = b >> $urandom_range(0, 31);
      @(negedge clk);
      chk(p == 64'(a) * 64'(b), $sformatf("%h*%h=%h", a, b, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
