// Testbench of the skew-parallel 2-to-3 converter, mod 13, at its full rate:
// a new word every clock. Bit t of word w (t = 0 for the MSB) is driven t
// clocks after bit 0; the three output digits of word w are read on dout[k]
// w + 4 + k clocks later. Since every cell is exact and the three -1 offsets
// weigh -13, the digits must give sum y_k*3^k = x - 13 exactly (so x mod 13
// as well). All 16 words, then random words.
module tb_bc13_skew23;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic din [4];
  sd_t  dout [3];
  int   checks = 0, failures = 0;
  localparam int NW = 16 + 400;
  int   xv [NW];
  int   acc [NW];

  bc13_skew23 dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int w = 0; w < NW; w++) begin
      xv[w]  = (w < 16) ? w : int'($urandom_range(0, 15));
      acc[w] = 0;
    end
    din = '{default: 1'b0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // clock c: row t carries bit 3-t of word c - t; digit k of word c - 4 - k
    // is on dout[k] after the next edge
    for (int c = 0; c < NW + 10; c++) begin
      for (int t = 0; t < 4; t++)
        din[t] <= (c - t >= 0 && c - t < NW) ? xv[c - t][3 - t] : 1'b0;
      @(posedge clk);
      #1;
      for (int k = 0; k < 3; k++) begin
        int w, p;
        w = c - 3 - k;
        p = 1;
        for (int i = 0; i < k; i++) p *= 3;
        if (w >= 0 && w < NW) begin
          checks++;
          if (dout[k].pos && dout[k].neg) begin failures++; $display("both wires set"); end
          acc[w] += int'(sd_val(dout[k])) * p;
        end
      end
    end
    for (int w = 0; w < NW; w++) begin
      checks++;
      if (acc[w] != xv[w] - 13) begin
        failures++;
        if (failures < 10) $display("word %0d: x=%0d got %0d", w, xv[w], acc[w]);
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
