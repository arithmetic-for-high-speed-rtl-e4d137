// tb_fp22_adder: self-checking test of the 22-bit floating point adder.
//
// Directed cases with exact expected words (addition with word growth,
// rounding on and off, cancellation to true zero, subtraction both ways,
// scaling, overflow and underflow with the limiter on and off, the three
// conversions, the accumulator path), a latency check (result after exactly
// three clock edges, one operation per clock), and 400 random additions and
// subtractions of normalized operands compared with the exact real result:
// the output must be normalized and within the error of the truncating
// alignment (one LSB of the larger operand) plus half an LSB of the result.
module tb_fp22_adder;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  fp22_t a_in, b_in, dout;
  logic lda_n = 1'b0, ldb_n = 1'b0, ldi_n = 1'b0, acc = 1'b0;
  add_op_e op = OP_ADD;
  logic rnd = 1'b1, sca = 1'b0, lmt = 1'b1;
  add_flags_t flags;

  fp22_adder dut (.*);

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

  // issue one operation, wait for its result
  task automatic run(input fp22_t a, input fp22_t b, input add_op_e o,
                     input logic r, input logic s, input logic l);
    @(negedge clk);
    a_in = a; b_in = b; op = o; rnd = r; sca = s; lmt = l; acc = 1'b0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic expect_eq(input string what, input fp22_t want);
    checks++;
    if (dout !== want) begin
      failures++;
      $display("%s: got %h want %h", what, dout, want);
    end
  endtask

  task automatic expect_flag(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: flag %b want %b", what, got, want);
    end
  endtask

  initial begin
    fp22_t a, b, p;
    real   ex, lsb;
    a_in = FP_ZERO; b_in = FP_ZERO;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    run(mk(16'h4000, 0), mk(16'h4000, 0), OP_ADD, 1, 0, 1);
    expect_eq("0.5+0.5", mk(16'h4000, 1));
    run(mk(16'h6000, 0), mk(16'hA000, 0), OP_ADD, 1, 0, 1);
    expect_eq("0.75-0.75", FP_ZERO);
    expect_flag("zero flag", flags.zero, 1'b1);
    run(mk(16'h6001, 0), mk(16'h6000, 0), OP_ADD, 1, 0, 1);
    expect_eq("growth, rounded", mk(16'h6001, 1));
    run(mk(16'h6001, 0), mk(16'h6000, 0), OP_ADD, 0, 0, 1);
    expect_eq("growth, truncated", mk(16'h6000, 1));
    run(mk(16'h6000, 0), mk(16'h4000, 0), OP_SUB, 1, 0, 1);
    expect_eq("0.75-0.5", mk(16'h4000, -1));
    run(mk(16'h4000, 0), mk(16'h6000, 0), OP_RSUB, 1, 0, 1);
    expect_eq("rsub", mk(16'h4000, -1));
    run(mk(16'h4000, 3), mk(16'h4000, -1), OP_ADD, 1, 0, 1);
    expect_eq("4+0.25", mk(16'h4400, 3));
    run(mk(16'h4000, 0), mk(16'h4000, 0), OP_ADD, 1, 1, 1);
    expect_eq("scaled", mk(16'h4000, 0));
    run(mk(16'h7FFF, 31), mk(16'h7FFF, 31), OP_ADD, 1, 0, 1);
    expect_eq("overflow limited", mk(16'h7FFF, 31));
    expect_flag("ovf flag", flags.ovf, 1'b1);
    run(mk(16'h8000, 31), mk(16'h8000, 31), OP_ADD, 1, 0, 1);
    expect_eq("negative overflow limited", mk(16'h8000, 31));
    run(mk(16'h7FFF, 31), mk(16'h7FFF, 31), OP_ADD, 1, 0, 0);
    expect_eq("overflow wraps", mk(16'h7FFF, -32));
    run(mk(16'h4000, -32), mk(16'hA000, -32), OP_ADD, 1, 0, 1);
    expect_eq("underflow limited", FP_ZERO);
    expect_flag("unf flag", flags.unf, 1'b1);
    run(mk(16'h4000, -32), mk(16'hA000, -32), OP_ADD, 1, 0, 0);
    expect_eq("underflow unnormalized", mk(16'hE000, -32));
    run(mk(16'h0100, 9), FP_ZERO, OP_FIX2FLT, 1, 0, 1);
    expect_eq("fix to float", mk(16'h4000, -6));
    run(mk(16'h0100, 3), FP_ZERO, OP_NORM, 1, 0, 1);
    expect_eq("normalize", mk(16'h4000, -3));
    run(mk(16'h4000, -2), FP_ZERO, OP_FLT2FIX, 1, 0, 1);
    expect_eq("float to fix", mk(16'h1000, 0));
    run(mk(16'h4000, 2), FP_ZERO, OP_FLT2FIX, 1, 0, 1);
    expect_eq("float to fix overflow", mk(16'h7FFF, 0));

    // latency: one operation per clock, result after exactly three edges
    @(negedge clk);
    a_in = mk(16'h4000, 0); b_in = mk(16'h4000, 0); op = OP_ADD; rnd = 1; sca = 0; lmt = 1;
    @(negedge clk);
    a_in = mk(16'h4000, 2); b_in = mk(16'h4000, 2);
    @(negedge clk);
    a_in = FP_ZERO; b_in = FP_ZERO;
    checks++;
    if (dout == mk(16'h4000, 1)) begin failures++; $display("result too early"); end
    @(negedge clk);
    expect_eq("latency 3, first", mk(16'h4000, 1));
    @(negedge clk);
    expect_eq("latency 3, second", mk(16'h4000, 3));

    // accumulator path: 1 + 1 issued, then two clocks later A <- result, +1
    @(negedge clk);
    a_in = mk(16'h4000, 1); b_in = mk(16'h4000, 1); op = OP_ADD; acc = 0;
    @(negedge clk);
    a_in = FP_ZERO; b_in = FP_ZERO;
    @(negedge clk);
    acc = 1; b_in = mk(16'h4000, 1);
    @(negedge clk);
    acc = 0; b_in = FP_ZERO;
    repeat (2) @(negedge clk);
    expect_eq("accumulate 1+1+1", mk(16'h6000, 2));

    // random normalized operands
    for (int i = 0; i < 400; i++) begin
      a = mk(16'($urandom_range(16384, 32767)), $urandom_range(0, 20) - 10);
      b = mk(16'($urandom_range(16384, 32767)), $urandom_range(0, 20) - 10);
      if ($urandom_range(0, 1)) a.frac = ~a.frac;
      if ($urandom_range(0, 1)) b.frac = ~b.frac;
      if (i % 2 == 0) begin
        run(a, b, OP_ADD, 1, 0, 1);
        ex = fp2r(a) + fp2r(b);
      end else begin
        run(a, b, OP_SUB, 1, 0, 1);
        ex = fp2r(a) - fp2r(b);
      end
      p = dout;
      // truncation during alignment costs up to one LSB of the larger
      // operand, rounding half an LSB of the result
      lsb = 2.0 ** (real'((a.exp > b.exp) ? a.exp : b.exp) - 15.0) * 1.5
            + 2.0 ** (real'(p.exp) - 16.0);
      checks++;
      if (!is_norm(p) || rabs(fp2r(p) - ex) > lsb) begin
        failures++;
        if (failures < 10)
          $display("random %0d: %h.%h %s %h.%h = %h.%h (%g), want %g", i,
                   a.frac, a.exp, (i % 2) ? "-" : "+", b.frac, b.exp, p.frac, p.exp, fp2r(p), ex);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
