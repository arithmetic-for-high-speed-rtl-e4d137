// dc_chip: delay commutator circuit, a 4-bit slice of a radix-4 delay
// commutator DC(X).
//
// Four 4-bit data streams enter. Stream 0 passes straight on; streams 1, 2, 3
// are delayed by X, 2X and 3X words in tapped shift registers (256, 512 and
// 768 words long, taps at X = 1, 4, 16, 64, 256 chosen by DELAY LENGTH). Four
// 4:1 multiplexers then commutate the streams: while the 2-bit commutator
// counter holds c, output j takes delayed input (c - j) mod 4. The counter
// advances once every X clocks: a divide-by-4096 prescaler has taps at its
// even stages (periods 1, 4, 16, 64, 256, 1024) and COUNT SELECT picks one
// through an 8:1 multiplexer (codes 6 and 7 stop the counter). Finally outputs
// 0, 1, 2 pass through 768-, 512- and 256-word tapped shift registers set to
// delays 3X, 2X and X, and output 3 leaves directly.
//
// A frame of 4 parallel streams in which stream i carries consecutive samples
// i*16X + t therefore leaves with output j carrying samples whose base-4 digit
// at weight X equals j: the reordering between two radix-4 stages. The data
// path latency is 3X clocks, after which four words that belong to one
// butterfly appear together.
//
// CTR RESET clears and holds the 2-bit counter; held, the switch is frozen in
// a fixed permutation and the chip acts as plain fixed delays (for cascading
// chips in longer transforms). In this design CTR RESET also clears the
// prescaler so a stage can be aligned to the first word of a frame (the
// source draws it to the 2-bit counter only). The commutation pattern, the
// behaviour of the unused DELAY LENGTH codes (5..7 select 256) and of COUNT
// SELECT codes 6 and 7 are this design's choices; everything else follows the
// source. MAX_X may be lowered (a power of 4) to shorten the registers.
module dc_chip #(
  parameter int W     = 4,     // slice width in bits
  parameter int MAX_X = 256    // longest programmable X
) (
  input  logic         clk,
  input  logic         ctr_reset,      // clear and hold the commutator counter
  input  logic [2:0]   delay_length,   // X = 4^delay_length
  input  logic [2:0]   count_select,   // counter advances every 4^count_select clocks
  input  logic [W-1:0] din  [4],
  output logic [W-1:0] dout [4],
  output logic [1:0]   count           // commutator state, for observation
);

  // ---------------- programmable rate counter ----------------
  logic [11:0] presc;       // divide-by-4096 counter
  logic        tick;

  always_comb begin
    case (count_select)
      3'd0: tick = 1'b1;
      3'd1: tick = &presc[1:0];
      3'd2: tick = &presc[3:0];
      3'd3: tick = &presc[5:0];
      3'd4: tick = &presc[7:0];
      3'd5: tick = &presc[9:0];
      default: tick = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ctr_reset) begin
      presc <= '0;
      count <= '0;
    end else begin
      presc <= presc + 12'd1;
      if (tick) count <= count + 2'd1;
    end
  end

  // ---------------- input delays 0, X, 2X, 3X ----------------
  logic [W-1:0] d_in [4];
  assign d_in[0] = din[0];
  for (genvar i = 1; i < 4; i++) begin : g_in
    tapped_sr #(.W(W), .MULT(i), .MAX_X(MAX_X)) u_sr (
      .clk, .code(delay_length), .din(din[i]), .dout(d_in[i])
    );
  end

  // ---------------- 4x4 commutator switch ----------------
  logic [W-1:0] sw [4];
  always_comb begin
    for (int j = 0; j < 4; j++) sw[j] = d_in[2'(count - 2'(j))];
  end

  // ---------------- output delays 3X, 2X, X, 0 ----------------
  for (genvar j = 0; j < 3; j++) begin : g_out
    tapped_sr #(.W(W), .MULT(3 - j), .MAX_X(MAX_X)) u_sr (
      .clk, .code(delay_length), .din(sw[j]), .dout(dout[j])
    );
  end
  assign dout[3] = sw[3];

endmodule
