// fft_pipeline: radix-4 pipeline FFT / inverse FFT in 22-bit floating point.
//
// Four complex samples enter per clock and four transformed samples leave per
// clock, so at a 10 MHz clock the unit sustains 40 Msample/s. The pipeline is
// a chain of LOG4N computational elements (fft_ce: twiddle multiplication and
// radix-4 butterfly) separated by LOG4N-1 delay commutators (dc_stage) with
// X = 4^(LOG4N-2), ..., 4, 1; the default LOG4N = 6 gives the 4096-point
// processor CE-DC(256)-CE-DC(64)-CE-DC(16)-CE-DC(4)-CE-DC(1)-CE.
//
// Data order. Input: during the t-th clock of a frame (t = 0 .. N/4-1) lane k
// carries sample x[t + k*N/4]; `sync_in` is high with t = 0 of the first
// frame, and frames follow back to back (further sync pulses must fall on
// frame boundaries). Output: `sync_out` marks the first clock of an output
// frame; during its t-th clock lane k carries X[rev(t) + k*N/4], where rev()
// reverses the order of the LOG4N-1 base-4 digits of t (digit-reversed order
// within each lane). Stage s combines the samples whose base-4 index digit
// LOG4N-s differs (decimation in time with twiddles ahead of each butterfly),
// and the delay commutator after it swaps the lane digit with the time digit
// of weight X.
//
// Latency from a frame's first input clock to its first output clock is
// LOG4N*12 + (4^(LOG4N-1) - 1) clocks (1095 for 4096 points). `inverse`
// selects the inverse transform (conjugate twiddles and butterfly) with no
// 1/N scaling; it is sampled with each input word and travels down the
// pipeline with the data, so it may change at any frame boundary. `ovf` reports an exponent
// overflow in any arithmetic unit.
//
// The arrangement of elements, the element and commutator contents and the
// 22-bit arithmetic follow the source; the framing signals, the output order
// and the flag gathering are this design's.
module fft_pipeline
  import fp22_pkg::*;
#(
  parameter int LOG4N    = 6,     // transform length N = 4^LOG4N, 2 .. 6
  parameter int DC_MAX_X = 256    // longest delay X of one commutator chip
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  sync_in,
  input  logic  inverse,
  input  cplx_t din  [4],
  output cplx_t dout [4],
  output logic  sync_out,
  output logic  ovf
);

  initial begin
    assert (LOG4N >= 2 && LOG4N <= 6) else $error("fft_pipeline: LOG4N must be 2..6");
    assert ((1 << (2 * (LOG4N - 2))) <= DC_MAX_X) else $error("fft_pipeline: DC_MAX_X too small");
  end

  cplx_t ce_in  [LOG4N][4];
  cplx_t ce_out [LOG4N][4];
  logic  ce_sin  [LOG4N];
  logic  ce_sout [LOG4N];
  logic  ce_ovf  [LOG4N];
  logic  ce_iin  [LOG4N];
  logic  ce_iout [LOG4N];

  assign ce_in[0] = din;
  assign ce_sin[0] = sync_in;
  assign ce_iin[0] = inverse;

  for (genvar s = 0; s < LOG4N; s++) begin : g_stage
    fft_ce #(.LOG4N(LOG4N), .STAGE(s + 1)) u_ce (
      .clk, .rst, .sync_in(ce_sin[s]), .inverse(ce_iin[s]),
      .x(ce_in[s]), .y(ce_out[s]), .sync_out(ce_sout[s]),
      .inverse_out(ce_iout[s]), .ovf(ce_ovf[s])
    );
    if (s < LOG4N - 1) begin : g_dc
      logic [1:0] dc_count;
      dc_stage #(.MAX_X(DC_MAX_X)) u_dc (
        .clk, .rst, .x_code(3'(LOG4N - 2 - s)), .sync_in(ce_sout[s]),
        .inverse_in(ce_iout[s]), .din(ce_out[s]), .dout(ce_in[s + 1]),
        .sync_out(ce_sin[s + 1]), .inverse_out(ce_iin[s + 1]),
        .count(dc_count)
      );
    end
  end

  assign dout     = ce_out[LOG4N-1];
  assign sync_out = ce_sout[LOG4N-1];

  always_comb begin
    ovf = 1'b0;
    for (int s = 0; s < LOG4N; s++) ovf = ovf | ce_ovf[s];
  end

endmodule
