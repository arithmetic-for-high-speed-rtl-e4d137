// tb_fft_pipeline: end-to-end test of the radix-4 pipeline FFT at 64 points
// (LOG4N = 3, the size of the worked data-flow example: CE, DC(4), CE, DC(1),
// CE).
//
// Five frames stream back to back: forward, forward, inverse, forward with
// large exponents that overflow and are limited, forward. Each output sample
// is compared with a direct DFT computed in real arithmetic from the same
// fp22 inputs (forward: exp(-j2pi nk/N), inverse: exp(+j2pi nk/N), unscaled),
// to a tolerance of 1/200 of the largest output magnitude in the frame. The
// overflow frame checks instead that `ovf` is raised and that every output
// is either a normalized value or a limited full-scale value. The test also
// checks the pipeline latency (frame marker in to frame marker out) and the
// throughput (one output frame every N/4 clocks, four words per clock), and
// counts that each mechanism happened: forward and inverse frames, a change
// of direction, every commutator state of both delay commutators, limiting.
module tb_fft_pipeline;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  localparam int L   = 3;
  localparam int N   = 4 ** L;
  localparam int Q   = N / 4;
  localparam int NF  = 5;
  localparam int LAT = L * 12 + (4 ** (L - 1) - 1);
  localparam int OVF_FRAME = 3;

  logic  clk = 1'b0, rst = 1'b1, sync_in = 1'b0, inverse = 1'b0;
  cplx_t din [4], dout [4];
  logic  sync_out, ovf;

  fft_pipeline #(.LOG4N(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real xr [NF][N], xi [NF][N];
  bit  inv_f [NF];

  // mechanism counters
  int n_fwd = 0, n_inv = 0, n_switch = 0, n_ovf = 0, n_limited = 0;
  int dc_seen [2][4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev(input int t);
    int r = 0;
    for (int d = 0; d < L - 1; d++) r = r * 4 + ((t >> (2 * d)) & 3);
    return r;
  endfunction

  // stimulus
  int t_sync_in;
  initial begin
    for (int f = 0; f < NF; f++) begin
      inv_f[f] = (f == 2);
      for (int n = 0; n < N; n++) begin
        fp22_t a, b;
        a = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        b = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        if (f == OVF_FRAME) begin
          // large same-sign values: sums exceed the exponent range
          a.frac = 16'sh7000; a.exp = 6'sd30;
          if (n % 2 == 1) b.exp = 6'sd30;
        end
        xr[f][n] = fp2r(a);
        xi[f][n] = fp2r(b);
      end
    end
    for (int l = 0; l < 4; l++) din[l] = '{re: FP_ZERO, im: FP_ZERO};
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int t = 0; t < Q; t++) begin
        sync_in <= (t == 0);
        inverse <= inv_f[f];
        if (f == 0 && t == 0) t_sync_in = cyc;
        for (int l = 0; l < 4; l++) begin
          din[l].re <= r2fp(xr[f][t + l * Q]);
          din[l].im <= r2fp(xi[f][t + l * Q]);
        end
        @(posedge clk);
      end
    end
    sync_in <= 1'b0;
    for (int l = 0; l < 4; l++) din[l] <= '{re: FP_ZERO, im: FP_ZERO};
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // observe commutator states
  always @(posedge clk) if (!rst) begin
    dc_seen[0][dut.g_stage[0].g_dc.dc_count]++;
    dc_seen[1][dut.g_stage[1].g_dc.dc_count]++;
  end

  // output checking
  real yr [N], yi [N];
  int  last_sync;
  initial begin
    int f, first;
    f = 0;
    first = 1;
    last_sync = 0;
    @(negedge rst);
    while (f < NF) begin
      @(posedge clk);
      if (sync_out) begin
        // throughput: one frame of N points every N/4 clocks
        if (!first) begin
          checks++;
          if (cyc - last_sync != Q) begin
            failures++;
            $display("output frames %0d clocks apart, expected %0d", cyc - last_sync, Q);
          end
        end
        last_sync = cyc;
        if (first) begin
          checks++;
          if (cyc - t_sync_in != LAT + 1) begin
            failures++;
            $display("latency %0d, expected %0d", cyc - t_sync_in - 1, LAT);
          end
          first = 0;
        end
        for (int t = 0; t < Q; t++) begin
          if (t > 0) @(posedge clk);
          for (int l = 0; l < 4; l++) begin
            yr[rev(t) + l * Q] = fp2r(dout[l].re);
            yi[rev(t) + l * Q] = fp2r(dout[l].im);
            if (f == OVF_FRAME) begin
              checks++;
              if (!is_norm(dout[l].re) || !is_norm(dout[l].im)) begin
                failures++;
                $display("frame %0d: unnormalized output %h %h", f, dout[l].re, dout[l].im);
              end
              if (dout[l].re.exp == 6'sd31 && (dout[l].re.frac == 16'sh7FFF || dout[l].re.frac == 16'sh8000))
                n_limited++;
            end
          end
          if (ovf) n_ovf++;
        end
        if (f != OVF_FRAME) check_frame(f);
        if (f > 0 && inv_f[f] != inv_f[f-1]) n_switch++;
        if (inv_f[f]) n_inv++; else n_fwd++;
        f++;
      end
    end
    // mechanisms
    checks++; if (n_fwd == 0)    begin failures++; $display("no forward frame"); end
    checks++; if (n_inv == 0)    begin failures++; $display("no inverse frame"); end
    checks++; if (n_switch == 0) begin failures++; $display("no direction change"); end
    checks++; if (n_ovf == 0)    begin failures++; $display("overflow never flagged"); end
    checks++; if (n_limited == 0) begin failures++; $display("no limited output"); end
    for (int d = 0; d < 2; d++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (dc_seen[d][c] == 0) begin failures++; $display("DC%0d state %0d unused", d, c); end
      end
    $display("frames: fwd=%0d inv=%0d switches=%0d ovf_cycles=%0d limited=%0d",
             n_fwd, n_inv, n_switch, n_ovf, n_limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_frame(input int f);
    real mx, er, ei, ang, sgn, tol, maxerr;
    mx = 0.0;
    maxerr = 0.0;
    sgn = inv_f[f] ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = sgn * 2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
        sr += xr[f][n] * $cos(ang) - xi[f][n] * $sin(ang);
        si += xr[f][n] * $sin(ang) + xi[f][n] * $cos(ang);
      end
      er = sr; ei = si;
      if (rabs(er) > mx) mx = rabs(er);
      if (rabs(ei) > mx) mx = rabs(ei);
      xr_ref[k] = er; xi_ref[k] = ei;
    end
    tol = mx / 200.0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (rabs(yr[k] - xr_ref[k]) > maxerr) maxerr = rabs(yr[k] - xr_ref[k]);
      if (rabs(yi[k] - xi_ref[k]) > maxerr) maxerr = rabs(yi[k] - xi_ref[k]);
      if (rabs(yr[k] - xr_ref[k]) > tol || rabs(yi[k] - xi_ref[k]) > tol) begin
        failures++;
        if (failures < 10)
          $display("frame %0d X[%0d] = %f %f, expected %f %f", f, k, yr[k], yi[k], xr_ref[k], xi_ref[k]);
      end
    end
    $display("frame %0d (%s): max |X| %f, max error %f", f, inv_f[f] ? "inverse" : "forward", mx, maxerr);
  endtask

  real xr_ref [N], xi_ref [N];

endmodule
