// tb_fft_full: the 4096-point pipeline FFT at its default size.
//
// Streams two frames back to back through fft_pipeline with all parameters at
// their defaults: a forward transform and then an inverse transform of random
// complex data in [-1, 1]. Every one of the 2 x 4096 outputs is compared with
// a direct DFT computed in real arithmetic from the same fp22 inputs, to a
// tolerance of 1/200 of the largest output magnitude of the frame. It also
// checks the latency (1095 clocks from the first input word to the first
// output word of a frame), the throughput (output frames 1024 clocks apart)
// and that every commutator state of all five delay
// commutators occurred.
module tb_fft_full;
  import fp22_pkg::*;
  import fp22_tb_pkg::*;

  localparam int L   = 6;
  localparam int N   = 4 ** L;
  localparam int Q   = N / 4;
  localparam int NF  = 2;
  localparam int LAT = L * 12 + (4 ** (L - 1) - 1);
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0, rst = 1'b1, sync_in = 1'b0, inverse = 1'b0;
  cplx_t din [4], dout [4];
  logic  sync_out, ovf;

  fft_pipeline dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real xr [NF][N], xi [NF][N];
  bit  inv_f [NF];
  real ctab [N], stab [N];
  int  dc_seen [5][4];
  int  cyc = 0;
  int  t_sync_in;

  always @(posedge clk) cyc <= cyc + 1;

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

  initial begin
    for (int n = 0; n < N; n++) begin
      ctab[n] = $cos(2.0 * PI * real'(n) / real'(N));
      stab[n] = $sin(2.0 * PI * real'(n) / real'(N));
    end
    for (int f = 0; f < NF; f++) begin
      inv_f[f] = (f == 1);
      for (int n = 0; n < N; n++) begin
        xr[f][n] = fp2r(r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0));
        xi[f][n] = fp2r(r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0));
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

  always @(posedge clk) if (!rst) begin
    dc_seen[0][dut.g_stage[0].g_dc.dc_count]++;
    dc_seen[1][dut.g_stage[1].g_dc.dc_count]++;
    dc_seen[2][dut.g_stage[2].g_dc.dc_count]++;
    dc_seen[3][dut.g_stage[3].g_dc.dc_count]++;
    dc_seen[4][dut.g_stage[4].g_dc.dc_count]++;
  end

  real yr [N], yi [N];
  int  last_sync;
  initial begin
    int f;
    bit first;
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
          end
        end
        check_frame(f);
        f++;
      end
    end
    for (int d = 0; d < 5; d++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (dc_seen[d][c] == 0) begin failures++; $display("DC%0d state %0d unused", d, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_frame(input int f);
    real mx, tol, maxerr, sr, si, sgn;
    real rr [N], ri [N];
    int  idx;
    mx = 0.0;
    maxerr = 0.0;
    sgn = inv_f[f] ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      idx = 0;
      for (int n = 0; n < N; n++) begin
        // exp(sgn*j*2*pi*n*k/N) = ctab[idx] + j*sgn*stab[idx], idx = n*k mod N
        sr += xr[f][n] * ctab[idx] - xi[f][n] * sgn * stab[idx];
        si += xr[f][n] * sgn * stab[idx] + xi[f][n] * ctab[idx];
        idx = (idx + k) % N;
      end
      rr[k] = sr; ri[k] = si;
      if (rabs(sr) > mx) mx = rabs(sr);
      if (rabs(si) > mx) mx = rabs(si);
    end
    tol = mx / 200.0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (rabs(yr[k] - rr[k]) > maxerr) maxerr = rabs(yr[k] - rr[k]);
      if (rabs(yi[k] - ri[k]) > maxerr) maxerr = rabs(yi[k] - ri[k]);
      if (rabs(yr[k] - rr[k]) > tol || rabs(yi[k] - ri[k]) > tol) begin
        failures++;
        if (failures < 10)
          $display("frame %0d X[%0d] = %f %f, expected %f %f", f, k, yr[k], yi[k], rr[k], ri[k]);
      end
    end
    $display("frame %0d (%s): max |X| %f, max error %f", f, inv_f[f] ? "inverse" : "forward", mx, maxerr);
  endtask

endmodule
