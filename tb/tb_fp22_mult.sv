// tb_fp22_mult: self-checking test of the 22-bit floating point multiplier.
//
// Directed cases with exact expected words (products needing no shift, a left
// shift, and the right shift of -1 x -1; rounding on and off; overflow and
// underflow with the limiter on and off; fixed point mode with MSP/LSP
// selection by SSEL and ASEL), a latency check (three clock edges, one
// product per clock) and 400 random products of normalized operands compared
// with the exact real product: normalized and within half an LSB.
module tb_fp22_mult;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  fp22_t a_in, b_in, pout;
  logic ena_n = 1'b0, enb_n = 1'b0;
  logic lmt_n = 1'b0, rnd = 1'b1, an = 1'b1, ssel = 1'b0, asel = 1'b0;
  logic [1:0] flags;

  fp22_mult dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp22_t mk(input logic [15:0] f, input int e);
    fp22_t r;
    r.frac = f;
    r.exp  = 6'(e);
    return r;
  endfunction

  task automatic run(input fp22_t a, input fp22_t b, input logic l_n,
                     input logic r, input logic n, input logic s);
    @(negedge clk);
    a_in = a; b_in = b; lmt_n = l_n; rnd = r; an = n; ssel = s;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic expect_eq(input string what, input fp22_t want);
    checks++;
    if (pout !== want) begin
      failures++;
      $display("%s: got %h want %h", what, pout, want);
    end
  endtask

  initial begin
    fp22_t a, b, p;
    real ex;
    a_in = FP_ZERO; b_in = FP_ZERO;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    run(mk(16'h4000, 0), mk(16'h4000, 0), 0, 1, 1, 0);
    expect_eq("0.5*0.5 (left shift)", mk(16'h4000, -1));
    run(mk(16'h6000, 2), mk(16'h6000, 3), 0, 1, 1, 0);
    expect_eq("0.75*0.75 (no shift)", mk(16'h4800, 5));
    run(mk(16'h8000, 0), mk(16'h8000, 0), 0, 1, 1, 0);
    expect_eq("-1*-1 (right shift)", mk(16'h4000, 1));
    run(mk(16'h6000, 0), mk(16'hA000, 0), 0, 1, 1, 0);
    expect_eq("0.75*-0.75", mk(16'hB800, 0));
    // 0x6001 * 0x6001 = 0x2400C001: fraction 0x4801, bit 14 (half LSB) set
    run(mk(16'h6001, 0), mk(16'h6001, 0), 0, 1, 1, 0);
    expect_eq("rounded", mk(16'h4802, 0));
    run(mk(16'h6001, 0), mk(16'h6001, 0), 0, 0, 1, 0);
    expect_eq("truncated", mk(16'h4801, 0));
    run(mk(16'h7FFF, 31), mk(16'h7FFF, 31), 0, 1, 1, 0);
    expect_eq("overflow limited", mk(16'h7FFF, 31));
    checks++; if (flags != 2'b10) begin failures++; $display("ovf flag %b", flags); end
    run(mk(16'h7FFF, 31), mk(16'h8000, 31), 0, 1, 1, 0);
    expect_eq("negative overflow limited", mk(16'h8000, 31));
    run(mk(16'h4000, 20), mk(16'h4000, 20), 1, 1, 1, 0);
    expect_eq("overflow wraps", mk(16'h4000, -25));
    run(mk(16'h4000, -20), mk(16'h4000, -20), 0, 1, 1, 0);
    expect_eq("underflow limited", FP_ZERO);
    checks++; if (flags != 2'b01) begin failures++; $display("unf flag %b", flags); end
    run(mk(16'h4000, -20), FP_ZERO, 0, 1, 1, 0);
    expect_eq("times zero", FP_ZERO);
    // fixed point mode
    run(mk(16'h4000, 1), mk(16'h4000, 2), 0, 0, 0, 0);
    expect_eq("fixed MSP", mk(16'h1000, 3));
    run(mk(16'h0003, 0), mk(16'h0005, 0), 0, 0, 0, 1);
    expect_eq("fixed LSP", mk(16'h000F, 0));
    asel = 1'b1;
    #1;
    expect_eq("fixed MSP via ASEL", mk(16'h0000, 0));
    asel = 1'b0;

    // latency
    @(negedge clk);
    a_in = mk(16'h4000, 0); b_in = mk(16'h4000, 0); lmt_n = 0; rnd = 1; an = 1; ssel = 0;
    @(negedge clk);
    a_in = mk(16'h4000, 4); b_in = mk(16'h4000, 0);
    @(negedge clk);
    a_in = FP_ZERO;
    checks++;
    if (pout == mk(16'h4000, -1)) begin failures++; $display("product too early"); end
    @(negedge clk);
    expect_eq("latency 3, first", mk(16'h4000, -1));
    @(negedge clk);
    expect_eq("latency 3, second", mk(16'h4000, 3));

    for (int i = 0; i < 400; i++) begin
      a = mk(16'($urandom_range(16384, 32767)), $urandom_range(0, 20) - 10);
      b = mk(16'($urandom_range(16384, 32767)), $urandom_range(0, 20) - 10);
      if ($urandom_range(0, 1)) a.frac = ~a.frac;
      if ($urandom_range(0, 1)) b.frac = ~b.frac;
      run(a, b, 0, 1, 1, 0);
      p = pout;
      ex = fp2r(a) * fp2r(b);
      checks++;
      if (!is_norm(p) || rabs(fp2r(p) - ex) > 2.0 ** (real'(p.exp) - 16.0) * 1.001) begin
        failures++;
        if (failures < 10)
          $display("random %0d: %h.%h * %h.%h = %h.%h, want %g", i, a.frac, a.exp,
                   b.frac, b.exp, p.frac, p.exp, ex);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
