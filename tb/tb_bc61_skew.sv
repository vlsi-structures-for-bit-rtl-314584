// Testbench of the skew-parallel 2-to-3 converter, mod 61, at its full rate:
// a new word every clock. Every word of six digits in {0,1,2} (729 words,
// each digit given as two binary streams), then random words. Row t of word w
// is driven t clocks after row 0; the five signed digits of word w are read
// on dout[k] w + 6 + k clocks later and must satisfy
// sum z_k*3^k = sum u_i*2^i (mod 61).
module tb_bc61_skew;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dd_t  din [6];
  sd_t  dout [5];
  int   checks = 0, failures = 0;
  localparam int NW = 729 + 200;
  int   u [NW][6];       // digit of weight 2^(5-t) on row t
  int   acc [NW];

  bc61_skew dut (.*);
  always #5 clk = ~clk;

  function automatic dd_t enc(int v, bit pick);
    dd_t d;
    d.a = (v >= 1) && (v == 2 || pick);
    d.b = (v == 2) || (v == 1 && !pick);
    return d;
  endfunction

  initial begin
    int dv;
    dv = 1;
    for (int w = 0; w < NW; w++) begin
      dv = 1;
      for (int t = 5; t >= 0; t--) begin
        u[w][t] = (w < 729) ? (w / dv) % 3 : int'($urandom_range(0, 2));
        dv *= 3;
      end
      acc[w] = 0;
    end
    din = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < NW + 12; c++) begin
      for (int t = 0; t < 6; t++)
        din[t] <= (c - t >= 0 && c - t < NW) ? enc(u[c - t][t], 1'($urandom_range(0, 1))) : dd_t'('0);
      @(posedge clk);
      #1;
      for (int k = 0; k < 5; k++) begin
        int w, p;
        w = c - 5 - k;
        p = 1;
        for (int i = 0; i < k; i++) p *= 3;
        if (w >= 0 && w < NW) acc[w] += int'(sd_val(dout[k])) * p;
      end
    end
    for (int w = 0; w < NW; w++) begin
      int want;
      want = 0;
      for (int t = 0; t < 6; t++) want = want * 2 + u[w][t];
      checks++;
      if ((((acc[w] - want) % 61) + 61) % 61 != 0) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d want %0d", w, acc[w], want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
