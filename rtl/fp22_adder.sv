// fp22_adder: single-chip 22-bit floating point adder.
//
// Adds, subtracts, accumulates and converts between fixed and floating point
// numbers in the 16-bit-fraction / 6-bit-exponent format of fp22_pkg. The
// datapath follows the source's block diagram section by section:
//   input section   - A and B input registers (load enables ldA_n / ldB_n),
//                     an accumulator multiplexer in front of the A register,
//                     and an instruction register (I2-0, RND, SCA, LMT).
//   denormalize     - exponent compare; the operand with the smaller exponent
//                     is shifted right by the exponent difference, bits that
//                     fall below the other operand's LSB are truncated.
//   ALU             - 17-bit sum (or difference: the subtrahend is inverted
//                     and a carry-in of one is added).
//   pipeline regs   - 17-bit fraction, exponent and control.
//   renormalize     - a 17-bit result is shifted right one place (rounded at
//                     the 17th bit by adding 1/2 LSB when RND is set); a
//                     16-bit result is shifted left until its sign bit differs
//                     from the next bit, with no rounding. SCA divides by two
//                     (exponent minus one).
//   limit           - after rounding: overflow to full scale of the same sign,
//                     underflow to true zero (LMT set); otherwise wrap / leave
//                     unnormalized.
//   output regs     - result and four flags (zero, negative, overflow,
//                     underflow).
// Timing: operands and instruction are captured at one clock edge; the result
// appears on `dout` after the third edge (latency LAT_ADD = 3), one operation
// per clock. The accumulator path feeds the limiter output (the result that is
// loaded into the output register at the same edge) into the A register, so an
// ACC operation issued two clocks after another one adds to that one's result.
//
// This design's own choices: the instruction encoding (add_op_e); the
// load-enables are active low and all act as register enables (the source
// draws a transparent latch ahead of the A path, built here as the register
// enable to avoid a latch); control bits travel down the pipeline with their
// operation; the output enable and flow-through pins are not modelled (the
// output is always driven and the pipeline always registered); float-to-fixed
// conversion truncates.
module fp22_adder
  import fp22_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  fp22_t       a_in,     // DI port, operand A
  input  fp22_t       b_in,     // operand B
  input  logic        lda_n,    // load A register (active low)
  input  logic        ldb_n,    // load B register (active low)
  input  logic        ldi_n,    // load instruction register (active low)
  input  logic        acc,      // A register takes the accumulator path
  input  add_op_e     op,       // I2-0
  input  logic        rnd,      // round enable
  input  logic        sca,      // scale result by 1/2
  input  logic        lmt,      // limiter enable
  output fp22_t       dout,
  output add_flags_t  flags
);

  // ---------------- input section ----------------
  fp22_t    ra, rb;
  add_op_e  r_op;
  logic     r_rnd, r_sca, r_lmt;
  fp22_t    lim_res;            // limiter output, also the accumulator path

  always_ff @(posedge clk) begin
    if (rst) begin
      ra    <= FP_ZERO;
      rb    <= FP_ZERO;
      r_op  <= OP_ADD;
      r_rnd <= 1'b0;
      r_sca <= 1'b0;
      r_lmt <= 1'b0;
    end else begin
      if (!lda_n) ra <= acc ? lim_res : a_in;
      if (!ldb_n) rb <= b_in;
      if (!ldi_n) begin
        r_op  <= op;
        r_rnd <= rnd;
        r_sca <= sca;
        r_lmt <= lmt;
      end
    end
  end

  // ---------------- denormalize + ALU ----------------
  logic signed [16:0] alu_sum;
  logic signed [8:0]  alu_exp;
  logic               alu_nonorm;   // float-to-fixed: skip renormalization
  logic               alu_ovf;      // float-to-fixed overflow

  always_comb begin
    logic signed [6:0]  diff;
    logic signed [15:0] big_f, small_f, x_f, y_f;
    logic signed [5:0]  big_e;
    logic               a_big;
    int                 sh;
    diff       = 7'(ra.exp) - 7'(rb.exp);
    a_big      = (diff >= 0);
    big_f      = a_big ? ra.frac : rb.frac;
    small_f    = a_big ? rb.frac : ra.frac;
    big_e      = a_big ? ra.exp : rb.exp;
    sh         = a_big ? int'(diff) : -int'(diff);
    if (sh > 16) sh = 16;
    small_f    = small_f >>> sh;
    // x_f / y_f: aligned A and B
    x_f        = a_big ? big_f : small_f;
    y_f        = a_big ? small_f : big_f;
    alu_nonorm = 1'b0;
    alu_ovf    = 1'b0;
    alu_exp    = 9'(big_e);
    case (r_op)
      OP_SUB:     alu_sum = 17'(x_f) + 17'(~y_f) + 17'sd1;
      OP_RSUB:    alu_sum = 17'(y_f) + 17'(~x_f) + 17'sd1;
      OP_FIX2FLT: begin
        alu_sum = 17'(ra.frac);
        alu_exp = 9'sd0;
      end
      OP_NORM: begin
        alu_sum = 17'(ra.frac);
        alu_exp = 9'(ra.exp);
      end
      OP_FLT2FIX: begin
        alu_nonorm = 1'b1;
        alu_exp    = 9'sd0;
        if (ra.exp > 0) begin
          alu_ovf = (ra.frac != 16'sd0);
          alu_sum = 17'(ra.frac);
        end else begin
          sh = -int'(ra.exp);
          if (sh > 16) sh = 16;
          alu_sum = 17'(ra.frac >>> sh);
        end
      end
      default:    alu_sum = 17'(x_f) + 17'(y_f);
    endcase
  end

  // ---------------- pipeline registers ----------------
  logic signed [16:0] p_sum;
  logic signed [8:0]  p_exp;
  logic               p_nonorm, p_ovf, p_rnd, p_sca, p_lmt;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_sum    <= '0;
      p_exp    <= 9'(EXP_MIN);
      p_nonorm <= 1'b0;
      p_ovf    <= 1'b0;
      p_rnd    <= 1'b0;
      p_sca    <= 1'b0;
      p_lmt    <= 1'b0;
    end else begin
      p_sum    <= alu_sum;
      p_exp    <= alu_exp;
      p_nonorm <= alu_nonorm;
      p_ovf    <= alu_ovf;
      p_rnd    <= r_rnd;
      p_sca    <= r_sca;
      p_lmt    <= r_lmt;
    end
  end

  // ---------------- renormalize, round, scale, limit ----------------
  add_flags_t lim_flags;

  always_comb begin
    logic signed [17:0] s18;
    logic signed [15:0] f;
    int                 e;
    logic               ovf, unf;
    e = int'(p_exp);
    s18 = '0;
    if (p_nonorm) begin
      // fixed point result: no renormalization
      f = p_sum[15:0];
      if (p_sca) f = f >>> 1;
      ovf = p_ovf;
      unf = 1'b0;
      if (p_ovf && p_lmt) f = p_sum[15] ? 16'sh8000 : 16'sh7FFF;
      lim_res = '{frac: f, exp: 6'sd0};
    end else begin
      if (p_sum[16] != p_sum[15]) begin
        // 17-bit result: one right shift, rounded at the 17th bit
        s18 = 18'(p_sum) + (p_rnd ? 18'sd1 : 18'sd0);
        // bit 0 of s18 is the rounded-away half LSB
        if (s18[17] != s18[16]) begin
          // rounding carried into a new bit: 1.0 -> 0.5 * 2
          f = 16'sh4000;
          e = e + 2;
        end else begin
          f = s18[16:1];
          e = e + 1;
        end
      end else begin
        // 16-bit result: left normalize, no rounding
        f = p_sum[15:0];
        if (f != 16'sd0) begin
          e = e - int'(lead_shift(f));
          f = f <<< lead_shift(f);
        end
      end
      if (p_sca) e = e - 1;
      lim_res = fp_limit(f, e, p_lmt, ovf, unf);
    end
    lim_flags.zero = (lim_res.frac == 16'sd0);
    lim_flags.neg  = lim_res.frac[15];
    lim_flags.ovf  = ovf;
    lim_flags.unf  = unf;
  end

  // ---------------- output registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      dout  <= FP_ZERO;
      flags <= '0;
    end else begin
      dout  <= lim_res;
      flags <= lim_flags;
    end
  end

endmodule
