// twiddle_gen: counter and sine/cosine ROM of one computational element.
//
// For stage s (1-based) of an N = 4^LOG4N point transform the element at time
// t of a frame (t = 0 .. N/4-1, counted from the `sync` pulse that marks the
// first sample of a frame) multiplies input lane q (q = 1, 2, 3) by
//     W = exp(-+ j*2*pi * q*K(t) / 4^s),
// where K(t) is the number formed by the upper s-1 base-4 digits of t read in
// reverse order (digit LOG4N-2 of t is the least significant digit of K). Lane
// 0 is never multiplied; in stage 1 K is 0, so every twiddle is 1. The sign of
// the exponent is negative for the forward transform and positive when
// `inverse` is set.
//
// The angle is looked up as an index into a 4096-step circle,
// idx = q*K*4^(6-s), which makes the same table serve every transform size up
// to 4096 points. Only the first quadrant is stored: twiddle_cos.hex holds
// cos(2*pi*i/4096) for i = 0 .. 1024 as fp22 numbers, rounded to nearest, with
// entry 1024 the true zero; sines and the other quadrants come from symmetry
// and exact negation.
//
// Interface and timing: the counter restarts at 0 in the cycle `sync` is high
// and otherwise counts modulo N/4 each clock. The three twiddles are
// combinational outputs that belong to the data at the element's input in the
// same cycle. The source gives this block only as a counter with a sine-cosine
// ROM; the index arithmetic and the quarter-wave table are this design's.
module twiddle_gen
  import fp22_pkg::*;
#(
  parameter int LOG4N = 6,   // log4 of the transform length
  parameter int STAGE = 2    // 1 .. LOG4N
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  sync,
  input  logic  inverse,
  output cplx_t w [1:3]
);

  localparam int TW = (LOG4N > 1) ? 2 * (LOG4N - 1) : 1;   // counter width

  initial begin
    assert (LOG4N >= 1 && LOG4N <= 6) else $error("twiddle_gen: LOG4N must be 1..6");
    assert (STAGE >= 1 && STAGE <= LOG4N) else $error("twiddle_gen: bad STAGE");
  end

  fp22_t cos_rom [0:1024];
  initial $readmemh("rtl/twiddle_cos.hex", cos_rom);

  logic [TW-1:0] cnt;
  logic [TW-1:0] t_now;

  assign t_now = sync ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= t_now + 1'b1;
  end

  // K(t): upper STAGE-1 digits of t, digit-reversed
  logic [11:0] k_val;
  always_comb begin
    k_val = '0;
    for (int i = 0; i < STAGE - 1; i++) begin
      k_val[2*i +: 2] = t_now[2*(LOG4N-2-i) +: 2];
    end
  end

  function automatic cplx_t lookup(input logic [11:0] idx, input logic inv);
    fp22_t c0, c1, cs, sn;
    logic [10:0] r, rc;
    r  = {1'b0, idx[9:0]};
    rc = 11'd1024 - r;
    c0 = cos_rom[r];
    c1 = cos_rom[rc];
    case (idx[11:10])
      2'd0: begin cs = c0;         sn = c1;         end
      2'd1: begin cs = fp_neg(c1); sn = c0;         end
      2'd2: begin cs = fp_neg(c0); sn = fp_neg(c1); end
      default: begin cs = c1;      sn = fp_neg(c0); end
    endcase
    lookup.re = cs;
    lookup.im = inv ? sn : fp_neg(sn);
  endfunction

  always_comb begin
    for (int q = 1; q <= 3; q++) begin
      w[q] = lookup(12'((q * int'(k_val)) << (2 * (6 - STAGE))), inverse);
    end
  end

endmodule
