// Testbench of the split bit duplication block with its GR2 and GR3
// crossbars, mod 61. Sends all 64 six-bit words, back to back, MSB first.
// During each six-clock word period the slot selections change every clock:
// first the settings the NTT routing uses for n = 0..59 (a_i = n*i mod 6),
// then random settings in which the slots of one branch share a mod 2. Each
// slot must hold, bit for bit, the two-row word of 2^a * x of the flat
// scheme: x rotated left by a places, plus the a wrapped bits at bits 1..a.
// Also checks the latency (prod_valid six clocks after x_first).
module tb_bdcs61_split;
  import bsmm_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0, x_bit = 1'b0, x_first = 1'b0;
  logic [2:0] gr6_sel [6] = '{default: '0};
  dd6_t       slot [6];
  logic       prod_valid;
  int         checks = 0, failures = 0, cyc = 0, nset = 0;
  int         xq [$];
  int         tq [$];

  bdcs61_split dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic dd6_t expect_word(int x, int a);
    dd6_t w;
    for (int p = 0; p < 6; p++) begin
      w[p].a = x[(p - a + 6) % 6];
      w[p].b = (p >= 1 && p <= a) ? x[5 - a + p] : 1'b0;
    end
    return w;
  endfunction

  task automatic pick_sel();
    if (nset < 60) begin
      for (int i = 0; i < 6; i++) gr6_sel[i] = 3'((nset * i) % 6);
    end else begin
      int par [2];
      par[0] = $urandom_range(0, 1);
      par[1] = $urandom_range(0, 1);
      for (int i = 0; i < 6; i++) gr6_sel[i] = 3'(2 * $urandom_range(0, 2) + par[i % 2]);
    end
    nset++;
  endtask

  // sampled half a clock into each cycle, so selections can change per clock
  initial forever begin
    @(negedge clk);
    if (rst_n && prod_valid) begin
      int x, t;
      x = xq.pop_front();
      t = tq.pop_front();
      checks++;
      if (cyc - t != 6) begin failures++; $display("latency %0d", cyc - t); end
      for (int h = 0; h < 6; h++) begin
        if (h > 0) @(negedge clk);
        pick_sel();
        #1;
        for (int i = 0; i < 6; i++) begin
          checks++;
          if (slot[i] != expect_word(x, int'(gr6_sel[i]))) begin
            failures++;
            $display("x=%0d h=%0d slot %0d a=%0d got %h", x, h, i, gr6_sel[i], slot[i]);
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
