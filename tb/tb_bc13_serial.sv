// Testbench of the serial 2-to-3 converter, mod 13. Sends all sixteen 4-bit
// words (twice, in order and reversed) back to back, with no gap between
// words, and checks that the three signed digits that leave 4..6 clocks after
// each word's MSB satisfy d0 + 3*d1 + 9*d2 = x (mod 13), that d_valid frames
// exactly those three clocks and that a random stream converts likewise.
module tb_bc13_serial;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, x_bit = 1'b0, x_first = 1'b0;
  sd_t  d_out;
  logic d_first, d_valid;
  int   checks = 0, failures = 0, cyc = 0;
  int   xq [$];
  int   tq [$];

  bc13_serial dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic send(int x);
    xq.push_back(x);
    tq.push_back(cyc + 1);
    for (int i = 3; i >= 0; i--) begin
      x_bit   <= x[i];
      x_first <= (i == 3);
      @(posedge clk);
    end
  endtask

  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && d_first) begin
        int v, w, x, t;
        x = xq.pop_front();
        t = tq.pop_front();
        checks++;
        if (cyc - t != 4) begin failures++; $display("latency %0d", cyc - t); end
        v = 0;
        w = 1;
        for (int k = 0; k < 4; k++) begin
          if (k > 0) @(posedge clk);
          checks++;
          if (d_valid != (k < 3)) begin failures++; $display("d_valid wrong at digit %0d", k); end
          if (k < 3) v += int'(sd_val(d_out)) * w;
          w *= 3;
        end
        checks++;
        if ((((v - x) % 13) + 13) % 13 != 0) begin failures++; $display("x=%0d got %0d", x, v); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int x = 0; x < 16; x++) send(x);
    for (int x = 15; x >= 0; x--) send(x);
    for (int n = 0; n < 100; n++) send(int'($urandom_range(0, 15)));
    x_first <= 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (xq.size() != 0) begin failures++; $display("%0d words missing", xq.size()); end
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
