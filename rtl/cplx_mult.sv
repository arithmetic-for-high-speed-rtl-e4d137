// cplx_mult: complex multiplication built from the 22-bit floating point chips.
//
//   y.re = x.re*w.re - x.im*w.im
//   y.im = x.re*w.im + x.im*w.re
//
// Four fp22_mult units form the partial products in parallel; one fp22_adder
// subtracts and one adds them. Both units run with rounding and the limiter
// on; `ovf` gathers their exponent overflow flags. Timing: x and w are captured at one clock edge and y is valid
// LAT_MUL + LAT_ADD = 6 clocks later; one product per clock. The source shows
// each multiplier of the computational element as a single box; splitting it
// into four real multiplications and two additions is this design's choice.
module cplx_mult
  import fp22_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  cplx_t x,
  input  cplx_t w,
  output cplx_t y,
  output logic  ovf     // exponent overflow flag of any of the six units
);

  fp22_t pa [4];
  fp22_t pb [4];
  fp22_t pp [4];

  always_comb begin
    pa[0] = x.re; pb[0] = w.re;   // re*re
    pa[1] = x.im; pb[1] = w.im;   // im*im
    pa[2] = x.re; pb[2] = w.im;   // re*im
    pa[3] = x.im; pb[3] = w.re;   // im*re
  end

  logic [1:0] fl [4];
  for (genvar i = 0; i < 4; i++) begin : g_mul
    fp22_mult u_mul (
      .clk, .rst,
      .a_in(pa[i]), .b_in(pb[i]),
      .ena_n(1'b0), .enb_n(1'b0),
      .lmt_n(1'b0), .rnd(1'b1), .an(1'b1), .ssel(1'b0), .asel(1'b0),
      .pout(pp[i]), .flags(fl[i])
    );
  end

  add_flags_t fl_re, fl_im;

  fp22_adder u_re (
    .clk, .rst, .a_in(pp[0]), .b_in(pp[1]),
    .lda_n(1'b0), .ldb_n(1'b0), .ldi_n(1'b0), .acc(1'b0),
    .op(OP_SUB), .rnd(1'b1), .sca(1'b0), .lmt(1'b1),
    .dout(y.re), .flags(fl_re)
  );

  fp22_adder u_im (
    .clk, .rst, .a_in(pp[2]), .b_in(pp[3]),
    .lda_n(1'b0), .ldb_n(1'b0), .ldi_n(1'b0), .acc(1'b0),
    .op(OP_ADD), .rnd(1'b1), .sca(1'b0), .lmt(1'b1),
    .dout(y.im), .flags(fl_im)
  );

  assign ovf = fl[0][1] | fl[1][1] | fl[2][1] | fl[3][1] | fl_re.ovf | fl_im.ovf;

endmodule
