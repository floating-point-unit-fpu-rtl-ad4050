// tb_code_decoder: self-checking test of code_decoder. A full 7-bit decoder
// (128 outputs, one instance per code) and a few 8-bit and 23-bit outputs
// are driven with every 7- and 8-bit input and random 23-bit inputs; each
// output must be 1 exactly when the input equals its code, so the 7-bit row
// must be one-hot at the input value.
module tb_code_decoder;
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

  logic [6:0]   x7;
  logic [127:0] row7;
  for (genvar c = 0; c < 128; c++) begin : g_row
    code_decoder #(.N(7), .CODE(7'(c))) u_d (.x(x7), .hit(row7[c]));
  end

  logic [7:0]  x8;
  logic        z8, o8, m8;
  code_decoder #(.N(8), .CODE(8'h00)) u_z8 (.x(x8), .hit(z8));
  code_decoder #(.N(8), .CODE(8'hFF)) u_o8 (.x(x8), .hit(o8));
  code_decoder #(.N(8), .CODE(8'h5A)) u_m8 (.x(x8), .hit(m8));

  logic [22:0] x23;
  logic        z23, m23;
  code_decoder #(.N(23), .CODE(23'h0))      u_z23 (.x(x23), .hit(z23));
  code_decoder #(.N(23), .CODE(23'h2A5F31)) u_m23 (.x(x23), .hit(m23));

  initial begin
    x8 = '0; x23 = '0;
    for (int v = 0; v < 128; v++) begin
      x7 = 7'(v);
      @(negedge clk);
      chk(row7 == (128'(1) << v), $sformatf("7-bit row at %0d: %h", v, row7));
    end
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      @(negedge clk);
      chk(z8 == (v == 0),     $sformatf("8-bit zero at %0d", v));
      chk(o8 == (v == 255),   $sformatf("8-bit ones at %0d", v));
      chk(m8 == (v == 'h5A),  $sformatf("8-bit 5A at %0d", v));
    end
    for (int i = 0; i < 20000; i++) begin
      case (i % 4)
        0: x23 = 23'($urandom);
        1: x23 = 23'(1) << $urandom_range(0, 22);
        2: x23 = 23'h2A5F31 ^ (23'(1) << $urandom_range(0, 22));
        default: x23 = (i % 8 == 3) ? 23'h0 : 23'h2A5F31;
      endcase
      @(negedge clk);
      chk(z23 == (x23 == 23'h0),      $sformatf("23-bit zero at %h", x23));
      chk(m23 == (x23 == 23'h2A5F31), $sformatf("23-bit code at %h", x23));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
