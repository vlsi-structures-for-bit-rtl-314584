// Testbench of the ten-way cyclic-shift unit of the 3-BF, mod 61. Random
// five-digit signed words are captured and started at the generator's pace
// (capture of the next word overlapping the output of the previous one).
// Each of the ten output streams is decoded from its five digits and must
// equal 3^r times the word (mod 61); out_first and out_valid must frame the
// five digits.
module tb_cs_ring_all;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, cap = 1'b0, start = 1'b0;
  sd5_t word = '0;
  sd_t  rot [10];
  logic out_first, out_valid;
  int   checks = 0, failures = 0;
  int   q [$];

  cs_ring_all dut (.*);
  always #5 clk = ~clk;

  function automatic int md61(int v);
    return ((v % 61) + 61) % 61;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      int v, p;
      sd5_t w;
      v = 0;
      p = 1;
      for (int k = 0; k < 5; k++) begin
        w[k] = val_sd(cval_t'(int'($urandom_range(0, 2)) - 1));
        v += int'(sd_val(w[k])) * p;
        p *= 3;
      end
      q.push_back(md61(v));
      // six-clock period: capture at clock 0, start at clock 5
      for (int c = 0; c < 6; c++) begin
        cap   <= (c == 0);
        word  <= w;
        start <= (c == 5);
        @(posedge clk);
      end
    end
    cap   <= 1'b0;
    start <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("words missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    @(posedge clk);
    if (rst_n && out_first) begin
      int acc [10];
      int y, p;
      y = q.pop_front();
      for (int r = 0; r < 10; r++) acc[r] = 0;
      p = 1;
      for (int d = 0; d < 6; d++) begin
        if (d > 0) @(posedge clk);
        checks++;
        if (out_valid != (d < 5)) begin failures++; $display("out_valid wrong at %0d", d); end
        if (d < 5) for (int r = 0; r < 10; r++) acc[r] += int'(sd_val(rot[r])) * p;
        p *= 3;
      end
      p = 1;
      for (int r = 0; r < 10; r++) begin
        checks++;
        if (md61(acc[r]) != md61(y * p)) begin failures++; $display("r=%0d got %0d want %0d", r, md61(acc[r]), md61(y * p)); end
        p = (p * 3) % 61;
      end
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
