// tapped_sr: programmable-length shift register of the delay commutator chip.
//
// A chain of MULT*MAX_X words of W bits, shifted every clock, with one tap per
// programmable delay: MULT*1, MULT*4, MULT*16, ..., MULT*MAX_X words. `code`
// selects the tap (code k gives a delay of MULT*4^k clocks; codes beyond the
// longest tap select the longest). With the default MAX_X = 256 the three
// lengths used by the chip are 256, 512 and 768 words with 5 taps each, the
// "shift register with taps and 5:1 multiplexer" of the source.
module tapped_sr #(
  parameter int W     = 4,
  parameter int MULT  = 1,     // 1, 2 or 3
  parameter int MAX_X = 256    // longest base delay, a power of 4
) (
  input  logic         clk,
  input  logic [2:0]   code,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int LEN   = MULT * MAX_X;
  localparam int NTAPS = $clog2(MAX_X) / 2 + 1;

  logic [LEN-1:0][W-1:0] sr;

  always_ff @(posedge clk) begin
    sr <= {sr[LEN-2:0], din};
  end

  always_comb begin
    int k;
    k = (int'(code) < NTAPS) ? int'(code) : NTAPS - 1;
    dout = sr[MULT * (1 << (2 * k)) - 1];
  end

endmodule
