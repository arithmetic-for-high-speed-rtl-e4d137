// fp22_pkg: shared types, constants and helper functions for the 22-bit
// floating point arithmetic of the radix-4 pipeline FFT.
//
// Number format: a 16-bit two's complement fraction S (bits 21:6) and a 6-bit
// two's complement exponent E (bits 5:0); the value is S * 2^E with S read as a
// fraction in [-1, 1). A normalized non-zero number has -1 <= S < -0.5 or
// 0.5 <= S < 1, i.e. the sign bit differs from the bit below it. The 16/6 split
// and the two's complement encodings follow the source; the placement of the
// fraction in the upper bits and the encoding of "true zero" as fraction 0 with
// the most negative exponent (-32) are this design's choices.
//
// The helpers are pure functions used by the adder, the multiplier and the
// twiddle ROM: leading-sign-bit counting, negation that keeps a number
// normalized, and the final limiter shared by both arithmetic units.
package fp22_pkg;

  localparam int FRAC_W = 16;
  localparam int EXP_W  = 6;
  localparam int FP_W   = FRAC_W + EXP_W;
  localparam int EXP_MAX = 31;
  localparam int EXP_MIN = -32;

  // Pipeline depth, in clocks from input register to output register load,
  // of both arithmetic units (input, pipeline and output registers).
  localparam int LAT_ADD = 3;
  localparam int LAT_MUL = 3;

  typedef struct packed {
    logic signed [FRAC_W-1:0] frac;
    logic signed [EXP_W-1:0]  exp;
  } fp22_t;

  typedef struct packed {
    fp22_t re;
    fp22_t im;
  } cplx_t;

  // Adder instruction (I2-0). The encoding is this design's choice.
  typedef enum logic [2:0] {
    OP_ADD     = 3'd0,  // A + B
    OP_SUB     = 3'd1,  // A - B
    OP_RSUB    = 3'd2,  // B - A
    OP_FIX2FLT = 3'd3,  // fraction of A read as a fixed point number, normalized
    OP_NORM    = 3'd4,  // normalize A
    OP_FLT2FIX = 3'd5   // A converted to a fixed point fraction with exponent 0
  } add_op_e;

  // Flags of the adder: zero, negative, exponent overflow, exponent underflow.
  typedef struct packed {
    logic zero;
    logic neg;
    logic ovf;
    logic unf;
  } add_flags_t;

  localparam fp22_t FP_ZERO = '{frac: 16'sd0, exp: -6'sd32};

  // Number of left shifts that make the sign bit differ from the next bit
  // (0 .. 15). A zero fraction returns 0; callers treat zero separately.
  function automatic int unsigned lead_shift(input logic signed [15:0] f);
    int unsigned n;
    n = 0;
    for (int i = 14; i >= 0; i--) begin
      if (f[i] == f[15]) n++;
      else break;
    end
    if (n > 15) n = 15;
    return n;
  endfunction

  // Final conditioning shared by the adder and the multiplier: -0.5 fix-up,
  // true zero,
  // exponent overflow and underflow. With the limiter on, overflow gives the
  // full-scale value of the same sign and underflow gives true zero. With it
  // off, an overflowing exponent wraps in two's complement and an underflowing
  // number is left unnormalized at the smallest exponent.
  function automatic fp22_t fp_limit(input logic signed [15:0] f_in,
                                     input int e_in, input logic lmt,
                                     output logic ovf, output logic unf);
    fp22_t r;
    int sh;
    logic signed [15:0] f;
    int e;
    ovf = 1'b0;
    unf = 1'b0;
    f = f_in;
    e = e_in;
    // rounding a negative number upward can leave exactly -0.5, which is
    // rewritten as -1 with the exponent one lower
    if (f == 16'shC000) begin
      f = 16'sh8000;
      e = e - 1;
    end
    if (f == 16'sd0) begin
      r = FP_ZERO;
    end else if (e > EXP_MAX) begin
      ovf = 1'b1;
      if (lmt) begin
        r.frac = f[15] ? 16'sh8000 : 16'sh7FFF;
        r.exp  = 6'sd31;
      end else begin
        r.frac = f;
        r.exp  = 6'(e);
      end
    end else if (e < EXP_MIN) begin
      unf = 1'b1;
      if (lmt) begin
        r = FP_ZERO;
      end else begin
        sh = EXP_MIN - e;
        if (sh > 15) sh = 15;
        r.frac = f >>> sh;
        r.exp  = -6'sd32;
      end
    end else begin
      r.frac = f;
      r.exp  = 6'(e);
    end
    return r;
  endfunction

  // Negation that keeps the result normalized: -0.5 is rewritten as -1 with
  // the exponent one lower, and -(-1) as +0.5 with the exponent one higher.
  function automatic fp22_t fp_neg(input fp22_t a);
    fp22_t r;
    if (a.frac == 16'sd0) r = FP_ZERO;
    else if (a.frac == 16'sh4000) begin
      r.frac = 16'sh8000;
      r.exp  = a.exp - 6'sd1;
    end else if (a.frac == 16'sh8000) begin
      r.frac = 16'sh4000;
      r.exp  = a.exp + 6'sd1;
    end else begin
      r.frac = -a.frac;
      r.exp  = a.exp;
    end
    return r;
  endfunction

endpackage
