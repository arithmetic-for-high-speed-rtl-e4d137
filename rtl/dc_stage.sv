// dc_stage: delay commutator DC(X) for complex 22-bit floating point words.
//
// A complex word is 44 bits, so one stage is eleven dc_chip slices side by
// side, slice c carrying bits 4c+3 .. 4c of all four lanes; all slices get
// the same DELAY LENGTH and COUNT SELECT code (`x_code`, X = 4^x_code) and the
// same CTR RESET. The stage holds CTR RESET until the `sync_in` pulse that
// marks the first word of the first frame and then lets the counters run,
// so the commutator counter is 0 for the first X words of every frame.
//
// Interface and timing: four complex words in and out per clock. Data, the
// frame marker (`sync_out`) and the transform direction (`inverse_out`) leave
// 3X clocks after they enter. Frames must
// follow each other without gaps once the stage has started; a reset restarts
// the alignment. The eleven-chip slicing follows the source; the alignment
// logic is this design's.
module dc_stage
  import fp22_pkg::*;
#(
  parameter int MAX_X = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  x_code,
  input  logic        sync_in,
  input  logic        inverse_in,
  input  cplx_t       din  [4],
  output cplx_t       dout [4],
  output logic        sync_out,
  output logic        inverse_out,
  output logic [1:0]  count        // commutator state of slice 0
);

  localparam int WORD  = 2 * FP_W;        // 44 bits
  localparam int NCHIP = WORD / 4;        // 11 slices

  logic running, ctr_reset;
  always_ff @(posedge clk) begin
    if (rst)          running <= 1'b0;
    else if (sync_in) running <= 1'b1;
  end
  assign ctr_reset = rst | (~running & ~sync_in);

  logic [WORD-1:0] win [4], wout [4];
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      win[l]  = din[l];
      dout[l] = wout[l];
    end
  end

  logic [1:0] cnt [NCHIP];
  assign count = cnt[0];

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    logic [3:0] s_in [4], s_out [4];
    for (genvar l = 0; l < 4; l++) begin : g_l
      assign s_in[l]          = win[l][4*c +: 4];
      assign wout[l][4*c +: 4] = s_out[l];
    end
    dc_chip #(.W(4), .MAX_X(MAX_X)) u_chip (
      .clk, .ctr_reset, .delay_length(x_code), .count_select(x_code),
      .din(s_in), .dout(s_out), .count(cnt[c])
    );
  end

  // frame marker and direction delayed by 3X (a resettable copy of the
  // data delay)
  localparam int SLEN  = 3 * MAX_X;
  localparam int NTAPS = $clog2(MAX_X) / 2 + 1;
  logic [SLEN-1:0][1:0] sdly;
  always_ff @(posedge clk) begin
    if (rst) sdly <= '0;
    else     sdly <= {sdly[SLEN-2:0], {inverse_in, sync_in}};
  end
  always_comb begin
    int k;
    k = (int'(x_code) < NTAPS) ? int'(x_code) : NTAPS - 1;
    {inverse_out, sync_out} = sdly[3 * (1 << (2 * k)) - 1];
  end

endmodule
