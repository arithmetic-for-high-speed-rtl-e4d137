// tb_cplx_mult: checks the complex multiplier made of four fp22 multipliers
// and two fp22 adders. 500 random products of normalized complex numbers,
// one per clock, are compared with the real-arithmetic product six clocks
// after they were applied (the latency of a multiplier plus an adder). The
// tolerance is 2^-13 of the largest operand-product magnitude.
module tb_cplx_mult;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  localparam int LAT = LAT_MUL + LAT_ADD;
  localparam int NV  = 500;

  logic clk = 1'b0, rst = 1'b1;
  cplx_t x, w, y;
  logic ovf;

  cplx_mult dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real er [NV], ei [NV], sc [NV];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp22_t rnd_fp();
    return r2fp((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0);
  endfunction

  initial begin
    x = '0; w = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV + LAT; i++) begin
      @(negedge clk);
      if (i < NV) begin
        x.re = rnd_fp(); x.im = rnd_fp(); w.re = rnd_fp(); w.im = rnd_fp();
        er[i] = fp2r(x.re) * fp2r(w.re) - fp2r(x.im) * fp2r(w.im);
        ei[i] = fp2r(x.re) * fp2r(w.im) + fp2r(x.im) * fp2r(w.re);
        sc[i] = (rabs(fp2r(x.re)) + rabs(fp2r(x.im))) * (rabs(fp2r(w.re)) + rabs(fp2r(w.im)));
      end
      if (i >= LAT) begin
        int j;
        j = i - LAT;
        checks++;
        if (rabs(fp2r(y.re) - er[j]) > sc[j] / 8192.0 || rabs(fp2r(y.im) - ei[j]) > sc[j] / 8192.0) begin
          failures++;
          if (failures < 10)
            $display("%0d: %f %f want %f %f", j, fp2r(y.re), fp2r(y.im), er[j], ei[j]);
        end
      end
    end
    checks++;
    if (ovf) begin failures++; $display("unexpected overflow flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
