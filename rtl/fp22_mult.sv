// fp22_mult: single-chip 22-bit floating point multiplier.
//
// A 16x16-bit two's complement fraction multiplier and a 6-bit exponent adder,
// followed by a very small normalizer. When both operands are normalized the
// 32-bit product needs at most one shift: none, one place left (product
// magnitude below 1/2) or one place right (only for -1 x -1), so the
// normalizer is a 3-position multiplexer, and the exponent is adjusted by
// -1, 0 or +1 to match. The result is then rounded (1/2 LSB added, then
// truncated) and passed through the same limiter as the adder.
//
// With AN low the normalizer is defeated and the chip is a 16-bit two's
// complement fixed point multiplier: the full 32-bit product is kept and
// either its most or its least significant half is put on the output,
// selected by SSEL xor ASEL (ASEL is not registered). RND then adds 1/2 LSB
// of the most significant half.
//
// Timing: operands (enables ena_n / enb_n) and the control word {LMT_n, RND,
// AN, SSEL} are registered at one edge; the product and exponent sum are
// registered at the next; renormalized, rounded and limited results are
// registered at the third (latency LAT_MUL = 3). One product per clock.
//
// Follows the source: the format, the 3-position normalizer, round-then-limit,
// fixed point mode, MSP/LSP select, the two-stage control register, two flags.
// This design's choices: the flags are exponent overflow and underflow; in
// fixed point mode the exponent output is the wrapped sum of the exponents;
// the third input of the B multiplexer (a feedback register), the output
// enable and the flow-through pin are not modelled.
module fp22_mult
  import fp22_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  fp22_t        a_in,
  input  fp22_t        b_in,
  input  logic         ena_n,   // load A register (active low)
  input  logic         enb_n,   // load B register (active low)
  input  logic         lmt_n,   // limiter enable (active low)
  input  logic         rnd,     // round enable
  input  logic         an,      // normalizer enable (floating point mode)
  input  logic         ssel,    // 0: most significant half, 1: least
  input  logic         asel,    // asynchronous inversion of SSEL
  output fp22_t        pout,
  output logic [1:0]   flags    // {overflow, underflow}
);

  fp22_t       ra, rb;
  logic [3:0]  ctl1, ctl2;      // {lmt_n, rnd, an, ssel}

  always_ff @(posedge clk) begin
    if (rst) begin
      ra   <= FP_ZERO;
      rb   <= FP_ZERO;
      ctl1 <= 4'b1000;
      ctl2 <= 4'b1000;
    end else begin
      if (!ena_n) ra <= a_in;
      if (!enb_n) rb <= b_in;
      ctl1 <= {lmt_n, rnd, an, ssel};
      ctl2 <= ctl1;
    end
  end

  // ---------------- multiply / exponent add ----------------
  logic signed [31:0] p_prod;
  logic signed [6:0]  p_esum;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_prod <= '0;
      p_esum <= '0;
    end else begin
      p_prod <= 32'(ra.frac) * 32'(rb.frac);
      p_esum <= 7'(ra.exp) + 7'(rb.exp);
    end
  end

  // ---------------- renormalize, round, limit ----------------
  logic [31:0] n_word;
  fp22_t       n_res;
  logic [1:0]  n_flags;

  always_comb begin
    logic signed [15:0] f;
    logic               rbit;
    int                 e;
    logic               ovf, unf;
    logic [31:0]        fx;
    e       = int'(p_esum);
    f       = '0;
    rbit    = 1'b0;
    ovf     = 1'b0;
    unf     = 1'b0;
    fx      = '0;
    n_word  = '0;
    n_res   = FP_ZERO;
    if (ctl2[1]) begin
      // floating point: 3-position normalizer
      if (p_prod[31] != p_prod[30]) begin
        f    = p_prod[31:16];
        rbit = p_prod[15];
        e    = e + 1;
      end else if (p_prod[30] != p_prod[29]) begin
        f    = p_prod[30:15];
        rbit = p_prod[14];
      end else begin
        f    = p_prod[29:14];
        rbit = p_prod[13];
        e    = e - 1;
      end
      if (ctl2[2] && rbit) begin
        if (f == 16'sh7FFF) begin
          f = 16'sh4000;
          e = e + 1;
        end else begin
          f = f + 16'sd1;
        end
      end
      n_res  = fp_limit(f, e, !ctl2[3], ovf, unf);
      n_word = {n_res.frac, 16'h0000};
    end else begin
      // fixed point: whole product, optional rounding of the upper half
      fx = p_prod;
      if (ctl2[2]) fx = fx + 32'h0000_8000;
      n_word    = fx;
      n_res.exp = p_esum[5:0];
      ovf       = (p_esum > 7'sd31) || (p_esum < -7'sd32);
    end
    n_flags = {ovf, unf};
  end

  logic [31:0] o_word;
  logic [5:0]  o_exp;
  logic        o_ssel;

  always_ff @(posedge clk) begin
    if (rst) begin
      o_word <= '0;
      o_exp  <= 6'h20;
      o_ssel <= 1'b0;
      flags  <= '0;
    end else begin
      o_word <= n_word;
      o_exp  <= n_res.exp;
      o_ssel <= ctl2[0];
      flags  <= n_flags;
    end
  end

  // MSP / LSP select after the output register
  always_comb begin
    pout.frac = (o_ssel ^ asel) ? o_word[15:0] : o_word[31:16];
    pout.exp  = o_exp;
  end

endmodule
