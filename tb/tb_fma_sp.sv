// tb_fma_sp: end-to-end self-checking test of the single-precision FMA.
//
// Applies one operand triple per clock cycle to the combinational unit and
// compares result with an exact reference model (fma_ref_pkg). Stimulus mixes
// fully random bit patterns, operands with related exponents (so C cancels
// much of A*B), denormals, near-exact cancellation built from the reference
// itself, overflow and special values. It also counts how often each
// mechanism of the datapath fires (C-dominant alignment, sticky addend, the
// reverse subtractor, the anticipator's 1-bit correction, the exponent limit
// stopping normalization, rounding up, overflow, NaN/inf/zero paths) and
// counts a failure for any mechanism that never fired.
module tb_fma_sp;
  import fma_ref_pkg::*;

  localparam int unsigned N_VEC = 2000000;

  logic        clk = 1'b0;
  logic [31:0] a, b, c, result, expect_v;
  logic        inexact, overflow;
  int unsigned checks = 0, failures = 0, cycles = 0;

  fma_sp dut (.a(a), .b(b), .c(c), .result(result), .inexact(inexact), .overflow(overflow));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (N_VEC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int unsigned n_cdom, n_csticky, n_neg, n_corr, n_mlimit, n_denorm_out,
               n_roundup, n_ovf, n_nan, n_inf, n_addend, n_zero, n_tiny, n_bigcancel;

  function automatic logic [31:0] rnd_special();
    case (int'($urandom_range(0, 9)))
      0: return 32'h0000_0000;
      1: return 32'h8000_0000;
      2: return 32'h7F80_0000;
      3: return 32'hFF80_0000;
      4: return 32'h7FC0_0001;
      5: return 32'h7F80_0001;
      6: return {1'($urandom), 8'h00, 23'($urandom)};
      7: return {1'($urandom), 8'hFE, 23'($urandom)};
      8: return 32'h0000_0001;
      default: return {1'($urandom), 8'h01, 23'($urandom)};
    endcase
  endfunction

  function automatic logic [31:0] rnd_exp(input int lo, input int hi);
    int e = $urandom_range(hi - lo) + lo;
    if (e < 0) e = 0;
    if (e > 254) e = 254;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] tc);
    a = ta; b = tb_; c = tc;
    @(negedge clk);
    expect_v = fma_ref(a, b, c);
    checks++;
    if (result !== expect_v) begin
      failures++;
      if (failures <= 20)
        $display("MISMATCH a=%h b=%h c=%h got=%h exp=%h", a, b, c, result, expect_v);
    end
    if (dut.sel == fma_pkg::SEL_ROUNDED) begin
      if (dut.c_dom) n_cdom++;
      if (!dut.c_dom && dut.c_sticky) n_csticky++;
      if (dut.neg) n_neg++;
      if (dut.corr) n_corr++;
      if (dut.m_dec != '0 && (dut.exp_base - fma_pkg::exp_t'(dut.lshift)) == 1) n_mlimit++;
      if (result[30:23] == 0 && result[22:0] != 0) n_denorm_out++;
      if (dut.u_round.round_up) n_roundup++;
      if (dut.overflow) n_ovf++;
      if (dut.lshift > 30 && dut.sub) n_bigcancel++;
    end
    if (dut.sel == fma_pkg::SEL_QNAN) n_nan++;
    if (dut.sel == fma_pkg::SEL_INF) n_inf++;
    if (dut.sel == fma_pkg::SEL_ADDEND) n_addend++;
    if (dut.sel == fma_pkg::SEL_ZERO) n_zero++;
    if (dut.sel == fma_pkg::SEL_ZERO && dut.tiny) n_tiny++;
  endtask

  task automatic need(input string name, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("MECHANISM NEVER SEEN: %s", name);
    end else
      $display("mechanism %-28s seen %0d times", name, n);
  endtask

  initial begin
    logic [31:0] ta, tb_, tc, pr;
    int          e1, e2;
    a = '0; b = '0; c = '0;
    @(negedge clk);
    // directed cases
    apply(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);   // 1*1+1 = 2
    apply(32'h4040_0000, 32'h4000_0000, 32'hC0C0_0000);   // 3*2-6 = +0
    apply(32'h3F80_0001, 32'h3F7F_FFFF, 32'hBF80_0000);   // tiny residual
    apply(32'h7F7F_FFFF, 32'h4000_0000, 32'h0000_0000);   // overflow
    apply(32'h0000_0001, 32'h3F00_0000, 32'h0000_0000);   // half min denormal -> 0 (tie to even)
    apply(32'h0000_0003, 32'h3F00_0000, 32'h8000_0000);   // 1.5 min denormal -> 2
    apply(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);   // normal -> denormal
    apply(32'h1000_0000, 32'h1000_0000, 32'h0000_0000);   // tiny product, C = 0
    apply(32'h1000_0000, 32'h9000_0000, 32'h0000_0001);   // tiny product vs min denormal
    for (int i = 0; i < int'(N_VEC); i++) begin
      case (int'($urandom_range(0, 7)))
        0: begin ta = $urandom; tb_ = $urandom; tc = $urandom; end
        1, 2: begin   // related exponents: strong cancellation
          ta = rnd_exp(40, 200); tb_ = rnd_exp(40, 200);
          e1 = int'(ta[30:23]) + int'(tb_[30:23]) - 127;
          tc = rnd_exp(e1 - 3, e1 + 3);
        end
        3: begin      // C far above or far below the product
          ta = rnd_exp(60, 190); tb_ = rnd_exp(60, 190);
          e1 = int'(ta[30:23]) + int'(tb_[30:23]) - 127;
          e2 = ($urandom_range(0, 1) != 0) ? e1 + int'($urandom_range(20, 60))
                                             : e1 - int'($urandom_range(20, 80));
          tc = rnd_exp(e2, e2);
        end
        4: begin      // denormal / underflow region
          ta = rnd_exp(0, 100); tb_ = rnd_exp(0, 60);
          tc = ($urandom_range(0, 2) == 0) ? 32'(0) : rnd_exp(0, 8);
        end
        5: begin      // near-exact cancellation of the rounded product
          ta = rnd_exp(30, 220); tb_ = rnd_exp(30, 220);
          pr = fma_ref(ta, tb_, 32'h0);
          tc = {~pr[31], pr[30:0]};
          if ($urandom_range(0, 1) != 0) tc = tc + 32'($urandom_range(0, 3)) - 32'd1;
        end
        6: begin      // overflow region
          ta = rnd_exp(180, 254); tb_ = rnd_exp(180, 254); tc = rnd_exp(200, 254);
        end
        default: begin
          ta = rnd_special(); tb_ = rnd_special(); tc = rnd_special();
          if ($urandom_range(0, 1) != 0) tb_ = $urandom;
        end
      endcase
      apply(ta, tb_, tc);
    end
    need("C dominant (product sticky)", n_cdom);
    need("addend partly sticky", n_csticky);
    need("reverse subtraction (C>AB)", n_neg);
    need("LZA 1-bit correction", n_corr);
    need("exponent limit (M) stop", n_mlimit);
    need("denormal result", n_denorm_out);
    need("round up", n_roundup);
    need("overflow to infinity", n_ovf);
    need("massive cancellation", n_bigcancel);
    need("NaN output", n_nan);
    need("infinity output", n_inf);
    need("addend passed through", n_addend);
    need("signed zero output", n_zero);
    need("tiny product underflow", n_tiny);
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
