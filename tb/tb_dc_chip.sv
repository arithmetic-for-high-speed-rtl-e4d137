// tb_dc_chip: checks the delay commutator chip with labelled data.
//
// Each word carries its own position label, as in the worked 64-point data
// flow example: in a frame of 4X clocks, lane i at clock t carries label
// t + 4X*i (plus 16X per frame, modulo 256). After the chip, lane j must carry
// label X*j + (u mod X) + 4X*(u div X) at clock u of the output frame, which
// begins 3X clocks after the input frame. This is checked for X = 1, 4 and 16
// over four frames each, with CTR RESET released at the first word. Then
// CTR RESET is held: the commutator counter must stay at 0 and lane 0 must
// come out of output 0 unchanged after 3X clocks (fixed-delay mode).
module tb_dc_chip;

  localparam int W = 8;

  logic         clk = 1'b0, ctr_reset = 1'b1;
  logic [2:0]   delay_length = 3'd0, count_select = 3'd0;
  logic [W-1:0] din [4], dout [4];
  logic [1:0]   count;

  dc_chip #(.W(W), .MAX_X(256)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, fl, u, lbl;
    for (int l = 0; l < 4; l++) din[l] = '0;
    for (int code = 0; code < 3; code++) begin
      x  = 4 ** code;
      fl = 4 * x;
      @(negedge clk);
      ctr_reset = 1'b1;
      delay_length = 3'(code);
      count_select = 3'(code);
      repeat (5) @(negedge clk);
      for (int c = 0; c < 4 * fl + 3 * x; c++) begin
        // drive input for clock c
        ctr_reset = 1'b0;
        for (int l = 0; l < 4; l++)
          din[l] = W'((c % fl) + fl * l + 4 * fl * (c / fl));
        #1;
        // commutator counter: advances every X clocks
        checks++;
        if (count != 2'((c / x) % 4)) begin
          failures++;
          $display("X=%0d clock %0d: count %0d", x, c, count);
        end
        // output for clock c belongs to output clock u = c - 3X
        if (c >= 3 * x && c - 3 * x < 4 * fl) begin
          u = c - 3 * x;
          for (int j = 0; j < 4; j++) begin
            lbl = x * j + ((u % fl) % x) + 4 * x * ((u % fl) / x) + 4 * fl * (u / fl);
            checks++;
            if (dout[j] != W'(lbl)) begin
              failures++;
              if (failures < 20)
                $display("X=%0d out clock %0d lane %0d: label %0d want %0d", x, u, j, dout[j], W'(lbl));
            end
          end
        end
        @(negedge clk);
      end
    end
    // fixed-delay mode
    ctr_reset = 1'b1;
    delay_length = 3'd1;
    count_select = 3'd1;
    for (int c = 0; c < 64; c++) begin
      din[0] = W'(c);
      din[1] = W'(100 + c);
      #1;
      // the counter is cleared at the first edge with CTR RESET high
      if (c >= 1) begin
        checks++;
        if (count != 2'd0) begin failures++; $display("counter not held"); end
      end
      if (c >= 13) begin
        checks++;
        if (dout[0] != W'(c - 12)) begin
          failures++;
          $display("fixed mode: out0 %0d want %0d", dout[0], c - 12);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
