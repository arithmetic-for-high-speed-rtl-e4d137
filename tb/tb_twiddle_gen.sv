// tb_twiddle_gen: checks the twiddle factors of the counter and sine-cosine
// ROM.
//
// Two generators run side by side: the last stage of a 4096-point transform
// (every ROM entry reachable) and stage 2 of a 64-point transform. For each
// clock of two frames (the second without a sync pulse, so the counter must
// wrap by itself) and both directions, each of the three twiddles is compared
// with exp(-+j*2*pi*q*K/4^s) computed in real arithmetic, where K is the
// digit-reversed upper part of the frame time; the error must be below
// 2^-15 and every twiddle must be normalized.
module tb_twiddle_gen;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst = 1'b1, sync = 1'b0, inverse = 1'b0;
  cplx_t wa [1:3], wb [1:3];

  twiddle_gen #(.LOG4N(6), .STAGE(6)) dut_a (.clk, .rst, .sync, .inverse, .w(wa));
  twiddle_gen #(.LOG4N(3), .STAGE(2)) dut_b (.clk, .rst, .sync, .inverse, .w(wb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // K: the top (s-1) base-4 digits of t (t has L-1 digits), least
  // significant digit of K = most significant digit of t
  function automatic int kval(input int t, input int l, input int s);
    int k = 0, digits [8];
    for (int d = 0; d < l - 1; d++) digits[d] = (t >> (2 * d)) & 3;
    for (int i = 0; i < s - 1; i++) k += digits[l - 2 - i] * (4 ** i);
    return k;
  endfunction

  task automatic check(input cplx_t w, input int q, input int k, input int s, input bit inv);
    real ang, er, ei;
    ang = 2.0 * PI * real'(q * k) / real'(4 ** s);
    er = $cos(ang);
    ei = inv ? $sin(ang) : -$sin(ang);
    checks++;
    if (rabs(fp2r(w.re) - er) > 3.1e-5 || rabs(fp2r(w.im) - ei) > 3.1e-5 ||
        !is_norm(w.re) || !is_norm(w.im)) begin
      failures++;
      if (failures < 10)
        $display("s=%0d q=%0d K=%0d inv=%0b: %f %f want %f %f", s, q, k, inv,
                 fp2r(w.re), fp2r(w.im), er, ei);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int dir = 0; dir < 2; dir++) begin
      for (int frame = 0; frame < 2; frame++) begin
        for (int t = 0; t < 1024; t++) begin
          @(negedge clk);
          inverse = dir[0];
          sync = (t == 0 && frame == 0);
          #1;
          for (int q = 1; q <= 3; q++) begin
            check(wa[q], q, kval(t, 6, 6), 6, dir[0]);
            check(wb[q], q, kval(t % 16, 3, 2), 2, dir[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
