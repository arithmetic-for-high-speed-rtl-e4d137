// tb_fft_ce: checks one computational element, stage 2 of a 64-point
// transform.
//
// Random complex words are fed on the four lanes, one set per clock, for
// two frames with a sync pulse at the start of the first; the first frame is
// a forward and the second an inverse transform. Each output set is compared
// with the value computed in real arithmetic,
// y_k = sum_q x_q * w_q * exp(-+j*2*pi*q*k/4), w_0 = 1,
// w_q = exp(-+j*2*pi*q*K(t)/16), K(t) = most significant base-4 digit of t,
// exactly 12 clocks (the element's latency) after the inputs were applied,
// with a tolerance of 2^-12 of the sum of input magnitudes. `sync_out` and
// `inverse_out` must follow their inputs by the same 12 clocks.
module tb_fft_ce;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  localparam int  L   = 3;
  localparam int  S   = 2;
  localparam int  Q   = 16;
  localparam int  LAT = 12;
  localparam int  NV  = 2 * Q;
  localparam real PI  = 3.14159265358979323846;

  logic  clk = 1'b0, rst = 1'b1, sync_in = 1'b0, inverse = 1'b0;
  cplx_t x [4], y [4];
  logic  sync_out, inverse_out, ovf;

  fft_ce #(.LOG4N(L), .STAGE(S)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real yr [NV][4], yi [NV][4], sc [NV];
  bit  sy [NV], iv [NV];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr [4], xi [4], ang, sg, wr, wi, pr, pi_;
    int  t, k;
    for (int l = 0; l < 4; l++) x[l] = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV + LAT + 1; i++) begin
      @(negedge clk);
      if (i < NV) begin
        t = i % Q;
        sync_in = (i == 0);
        inverse = (i >= Q);
        sy[i] = sync_in;
        iv[i] = inverse;
        sg = inverse ? 1.0 : -1.0;
        k = t / 4;    // K(t) for stage 2: top digit of t
        sc[i] = 0.0;
        for (int l = 0; l < 4; l++) begin
          x[l].re = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 100.0);
          x[l].im = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 100.0);
          // apply twiddle
          ang = sg * 2.0 * PI * real'(l * k) / 16.0;
          wr = $cos(ang); wi = $sin(ang);
          xr[l] = fp2r(x[l].re) * wr - fp2r(x[l].im) * wi;
          xi[l] = fp2r(x[l].re) * wi + fp2r(x[l].im) * wr;
          sc[i] += rabs(fp2r(x[l].re)) + rabs(fp2r(x[l].im));
        end
        for (int m = 0; m < 4; m++) begin
          pr = 0.0; pi_ = 0.0;
          for (int l = 0; l < 4; l++) begin
            ang = sg * 2.0 * PI * real'(l * m) / 4.0;
            pr  += xr[l] * $cos(ang) - xi[l] * $sin(ang);
            pi_ += xr[l] * $sin(ang) + xi[l] * $cos(ang);
          end
          yr[i][m] = pr; yi[i][m] = pi_;
        end
      end else begin
        sync_in = 1'b0;
      end
      if (i >= LAT && i - LAT < NV) begin
        int j;
        j = i - LAT;
        checks++;
        if (sync_out != sy[j] || inverse_out != iv[j]) begin
          failures++;
          $display("%0d: sync/inverse out %b%b want %b%b", j, sync_out, inverse_out, sy[j], iv[j]);
        end
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (rabs(fp2r(y[m].re) - yr[j][m]) > sc[j] / 4096.0 ||
              rabs(fp2r(y[m].im) - yi[j][m]) > sc[j] / 4096.0) begin
            failures++;
            if (failures < 10)
              $display("set %0d lane %0d: %f %f want %f %f", j, m, fp2r(y[m].re),
                       fp2r(y[m].im), yr[j][m], yi[j][m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
