// Testbench of the bit duplication and cyclic shift block, mod 61. Sends all
// 64 six-bit words, back to back, MSB first; at prod_valid each of the six
// products, read as sum (a_p + b_p)*2^p, must equal 2^i * x (mod 61), and the
// products must stay unchanged for the six clocks of the word period.
module tb_bdcs61;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, x_bit = 1'b0, x_first = 1'b0;
  dd6_t prod [6];
  logic prod_valid;
  int   checks = 0, failures = 0, cyc = 0;
  int   xq [$];
  int   tq [$];

  bdcs61 dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int val(dd6_t w);
    int v = 0;
    for (int p = 5; p >= 0; p--) v = v * 2 + int'(w[p].a) + int'(w[p].b);
    return v;
  endfunction

  initial forever begin
    @(posedge clk);
    if (rst_n && prod_valid) begin
      int x, t;
      x = xq.pop_front();
      t = tq.pop_front();
      checks++;
      if (cyc - t != 6) begin failures++; $display("latency %0d", cyc - t); end
      for (int h = 0; h < 6; h++) begin
        if (h > 0) @(posedge clk);
        for (int i = 0; i < 6; i++) begin
          checks++;
          if ((val(prod[i]) - (x << i)) % 61 != 0) begin
            failures++;
            $display("x=%0d i=%0d got %0d", x, i, val(prod[i]));
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int x = 0; x < 64; x++) begin
      xq.push_back(x);
      tq.push_back(cyc + 1);
      for (int i = 5; i >= 0; i--) begin
        x_bit   <= x[i];
        x_first <= (i == 5);
        @(posedge clk);
      end
    end
    x_first <= 1'b0;
    repeat (14) @(posedge clk);
    checks++;
    if (xq.size() != 0) begin failures++; $display("words missing"); end
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
