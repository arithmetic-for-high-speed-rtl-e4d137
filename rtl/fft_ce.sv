// fft_ce: computational element (CE) of the radix-4 pipeline FFT.
//
// Each clock the element takes four complex words, one per lane, multiplies
// lanes 1..3 by twiddle factors from its counter and sine-cosine ROM
// (twiddle_gen) and computes a 4-point DFT of the result:
//   a = x0 + x2   b = x0 - x2   c = x1 + x3   d = x1 - x3
//   y0 = a + c    y2 = a - c    y1 = b -+ j*d   y3 = b +- j*d
// (upper signs for the forward transform, lower for the inverse). The
// multiplications by j cost nothing: they swap real and imaginary parts and
// choose between an adder and a subtractor. All arithmetic is done with
// fp22_mult and fp22_adder units: 12 multipliers and 6 adders in the three
// complex multipliers, 16 adders in the two butterfly layers.
//
// Timing: lane 0, which has no multiplier, is delayed by the six clocks of a
// complex multiplication so the four lanes stay aligned. Total latency is
// LAT_CE = LAT_MUL + 3*LAT_ADD = 12 clocks; `sync_out` and `inverse_out` are
// `sync_in` and `inverse` delayed by the same amount. `inverse` is also
// delayed to the second butterfly layer, so the direction travels with the
// data and may change at any frame boundary.
//
// From the source: three multipliers ahead of a two-layer adder/subtractor
// butterfly, a counter with a sine-cosine ROM, the 22-bit floating point
// units. This design's choices: the pairing of lanes in the butterfly layers,
// the pipeline balancing, rounding and limiting always enabled.
module fft_ce
  import fp22_pkg::*;
#(
  parameter int LOG4N = 6,
  parameter int STAGE = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  sync_in,
  input  logic  inverse,
  input  cplx_t x [4],
  output cplx_t y [4],
  output logic  sync_out,
  output logic  inverse_out,  // `inverse` delayed with the data
  output logic  ovf        // overflow flag of any unit, for off-chip handling
);

  localparam int LAT_CM = LAT_MUL + LAT_ADD;
  localparam int LAT_CE = LAT_CM + 2 * LAT_ADD;

  // ---------------- twiddle multiplication ----------------
  cplx_t w [1:3];
  cplx_t xm [4];

  twiddle_gen #(.LOG4N(LOG4N), .STAGE(STAGE)) u_tw (
    .clk, .rst, .sync(sync_in), .inverse, .w
  );

  cplx_t lane0_dly [LAT_CM];
  always_ff @(posedge clk) begin
    lane0_dly[0] <= x[0];
    for (int i = 1; i < LAT_CM; i++) lane0_dly[i] <= lane0_dly[i-1];
  end
  assign xm[0] = lane0_dly[LAT_CM-1];

  logic cm_ovf [1:3];
  for (genvar q = 1; q < 4; q++) begin : g_cm
    cplx_mult u_cm (.clk, .rst, .x(x[q]), .w(w[q]), .y(xm[q]), .ovf(cm_ovf[q]));
  end

  // ---------------- control delay ----------------
  logic [LAT_CE-1:0] sync_dly;
  logic [LAT_CE-1:0] inv_dly;
  always_ff @(posedge clk) begin
    if (rst) begin
      sync_dly <= '0;
      inv_dly  <= '0;
    end else begin
      sync_dly <= {sync_dly[LAT_CE-2:0], sync_in};
      inv_dly  <= {inv_dly[LAT_CE-2:0], inverse};
    end
  end
  assign sync_out    = sync_dly[LAT_CE-1];
  assign inverse_out = inv_dly[LAT_CE-1];
  // direction of the data now entering the second butterfly layer
  logic inv_l2;
  assign inv_l2 = inv_dly[LAT_CM + LAT_ADD - 1];

  // ---------------- butterfly layer 1 ----------------
  // real adders 0..7: a.re a.im b.re b.im c.re c.im d.re d.im
  fp22_t   l1_a [8], l1_b [8], l1_y [8];
  add_op_e l1_op [8];
  always_comb begin
    l1_a[0] = xm[0].re; l1_b[0] = xm[2].re; l1_op[0] = OP_ADD;
    l1_a[1] = xm[0].im; l1_b[1] = xm[2].im; l1_op[1] = OP_ADD;
    l1_a[2] = xm[0].re; l1_b[2] = xm[2].re; l1_op[2] = OP_SUB;
    l1_a[3] = xm[0].im; l1_b[3] = xm[2].im; l1_op[3] = OP_SUB;
    l1_a[4] = xm[1].re; l1_b[4] = xm[3].re; l1_op[4] = OP_ADD;
    l1_a[5] = xm[1].im; l1_b[5] = xm[3].im; l1_op[5] = OP_ADD;
    l1_a[6] = xm[1].re; l1_b[6] = xm[3].re; l1_op[6] = OP_SUB;
    l1_a[7] = xm[1].im; l1_b[7] = xm[3].im; l1_op[7] = OP_SUB;
  end

  // ---------------- butterfly layer 2 ----------------
  // real adders 0..7: y0.re y0.im y1.re y1.im y2.re y2.im y3.re y3.im
  fp22_t   l2_a [8], l2_b [8], l2_y [8];
  add_op_e l2_op [8];
  always_comb begin
    // y0 = a + c, y2 = a - c
    l2_a[0] = l1_y[0]; l2_b[0] = l1_y[4]; l2_op[0] = OP_ADD;
    l2_a[1] = l1_y[1]; l2_b[1] = l1_y[5]; l2_op[1] = OP_ADD;
    l2_a[4] = l1_y[0]; l2_b[4] = l1_y[4]; l2_op[4] = OP_SUB;
    l2_a[5] = l1_y[1]; l2_b[5] = l1_y[5]; l2_op[5] = OP_SUB;
    // y1 = b - j d (forward): re = b.re + d.im, im = b.im - d.re
    l2_a[2] = l1_y[2]; l2_b[2] = l1_y[7]; l2_op[2] = inv_l2 ? OP_SUB : OP_ADD;
    l2_a[3] = l1_y[3]; l2_b[3] = l1_y[6]; l2_op[3] = inv_l2 ? OP_ADD : OP_SUB;
    // y3 = b + j d (forward): re = b.re - d.im, im = b.im + d.re
    l2_a[6] = l1_y[2]; l2_b[6] = l1_y[7]; l2_op[6] = inv_l2 ? OP_ADD : OP_SUB;
    l2_a[7] = l1_y[3]; l2_b[7] = l1_y[6]; l2_op[7] = inv_l2 ? OP_SUB : OP_ADD;
  end

  add_flags_t fl1 [8], fl2 [8];
  for (genvar i = 0; i < 8; i++) begin : g_bf
    fp22_adder u_l1 (
      .clk, .rst, .a_in(l1_a[i]), .b_in(l1_b[i]),
      .lda_n(1'b0), .ldb_n(1'b0), .ldi_n(1'b0), .acc(1'b0),
      .op(l1_op[i]), .rnd(1'b1), .sca(1'b0), .lmt(1'b1),
      .dout(l1_y[i]), .flags(fl1[i])
    );
    fp22_adder u_l2 (
      .clk, .rst, .a_in(l2_a[i]), .b_in(l2_b[i]),
      .lda_n(1'b0), .ldb_n(1'b0), .ldi_n(1'b0), .acc(1'b0),
      .op(l2_op[i]), .rnd(1'b1), .sca(1'b0), .lmt(1'b1),
      .dout(l2_y[i]), .flags(fl2[i])
    );
  end

  always_comb begin
    ovf = cm_ovf[1] | cm_ovf[2] | cm_ovf[3];
    for (int i = 0; i < 8; i++) ovf = ovf | fl1[i].ovf | fl2[i].ovf;
    for (int k = 0; k < 4; k++) begin
      y[k].re = l2_y[2*k];
      y[k].im = l2_y[2*k+1];
    end
  end

endmodule
