// Testbench of the skew-parallel 3-to-8 converter, mod 13, at its full rate:
// a new word every clock. Row t of word w is driven t clocks after row 0; the
// four output digits of word w are read on dout[k] w + 3 + k clocks later and
// must satisfy sum z_k*8^k = 9*y2 + 3*y1 + y0 (mod 13). All 27 words, then
// random words.
module tb_bc13_skew;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  sd_t  din [3];
  sd_t  dout [4];
  int   checks = 0, failures = 0;
  localparam int NW = 27 + 300;
  int   yv [NW][3];      // digits y2, y1, y0 of each word
  int   acc [NW];

  bc13_skew dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int w = 0; w < NW; w++) begin
      for (int t = 0; t < 3; t++)
        yv[w][t] = (w < 27) ? ((w / (t == 0 ? 9 : t == 1 ? 3 : 1)) % 3) - 1 : int'($urandom_range(0, 2)) - 1;
      acc[w] = 0;
    end
    din = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // clock c: row t carries word c - t; digit k of word c - 3 - k is on dout[k]
    for (int c = 0; c < NW + 8; c++) begin
      for (int t = 0; t < 3; t++)
        din[t] <= (c - t >= 0 && c - t < NW) ? val_sd(cval_t'(yv[c - t][t])) : sd_t'('0);
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) begin
        int w, p;
        w = c - 2 - k;
        p = 1;
        for (int i = 0; i < k; i++) p *= 8;
        if (w >= 0 && w < NW) acc[w] += int'(sd_val(dout[k])) * p;
      end
    end
    for (int w = 0; w < NW; w++) begin
      int want;
      want = 9 * yv[w][0] + 3 * yv[w][1] + yv[w][2];
      checks++;
      if ((((acc[w] - want) % 13) + 13) % 13 != 0) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d want %0d", w, acc[w], want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
