// tb_dc_stage: checks a full-word delay commutator stage DC(X).
//
// Random 44-bit complex words stream through eleven ganged chip slices for
// X = 4 and X = 16. Some clocks of unrelated data come first; the stage must
// wait for `sync_in` before it starts commutating. Within each frame of 4X
// clocks, output lane j at output clock u must carry the word that entered on
// lane (u div X) at clock X*j + (u mod X); output frames start 3X clocks after
// input frames. `sync_out` and `inverse_out` must be `sync_in` and
// `inverse_in` delayed by 3X.
module tb_dc_stage;
  import fp22_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, sync_in = 1'b0, inverse_in = 1'b0;
  logic [2:0] x_code = 3'd1;
  cplx_t din [4], dout [4];
  logic  sync_out, inverse_out;
  logic [1:0] count;

  dc_stage #(.MAX_X(256)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int NFR = 3;
  cplx_t mem [NFR][4][64];
  bit    sy [1024], iv [1024];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rword();
    return cplx_t'({$urandom, $urandom});
  endfunction

  initial begin
    int x, fl, u, f, i, t;
    cplx_t want;
    for (int l = 0; l < 4; l++) din[l] = '0;
    for (int code = 1; code <= 2; code++) begin
      x  = 4 ** code;
      fl = 4 * x;
      @(negedge clk);
      rst = 1'b1;
      x_code = 3'(code);
      repeat (3) @(negedge clk);
      rst = 1'b0;
      // unrelated words before the first frame
      for (int c = 0; c < 7; c++) begin
        for (int l = 0; l < 4; l++) din[l] = rword();
        @(negedge clk);
      end
      for (int c = 0; c < NFR * fl + 3 * x; c++) begin
        f = c / fl;
        sync_in = (c % fl == 0) && (c < NFR * fl);
        inverse_in = (f == 1);
        sy[c] = sync_in;
        iv[c] = inverse_in;
        for (int l = 0; l < 4; l++) begin
          din[l] = rword();
          if (c < NFR * fl) mem[f][l][c % fl] = din[l];
        end
        #1;
        if (c >= 3 * x) begin
          u = c - 3 * x;
          checks++;
          if (sync_out != sy[u] || inverse_out != iv[u]) begin
            failures++;
            $display("X=%0d clock %0d: sync/inverse %b%b want %b%b", x, u, sync_out, inverse_out, sy[u], iv[u]);
          end
          f = u / fl;
          i = (u % fl) / x;
          for (int j = 0; j < 4; j++) begin
            t = x * j + (u % x);
            want = mem[f][i][t];
            checks++;
            if (dout[j] != want) begin
              failures++;
              if (failures < 10)
                $display("X=%0d out clock %0d lane %0d: %h want %h", x, u, j, dout[j], want);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
