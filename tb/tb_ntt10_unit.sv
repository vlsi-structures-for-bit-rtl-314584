// Testbench of the split ten-output cyclic-shift unit, mod 61. Random
// five-digit signed words are captured and started at the generator's pace
// (a word every six clocks, capture overlapping the previous output). Each
// word gets its own output selections: first those of the NTT routing,
// r_e = (floor(n*i/6) + n*e) mod 10 for n = 0..59 and i = 0..5, then random
// ones in which outputs p and p + 5 share r mod 5. Every output stream is
// decoded from its five digits and must equal 3^r_e times the word (mod 61);
// out_first and out_valid must frame the five digits.
module tb_ntt10_unit;
  import bsmm_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0, cap = 1'b0, start = 1'b0;
  sd5_t       word = '0;
  logic [3:0] sel [10] = '{default: '0};
  sd_t        X [10];
  logic       out_first, out_valid;
  int         checks = 0, failures = 0;
  int         q [$];
  int         sq [$];

  ntt10_unit dut (.*);
  always #5 clk = ~clk;

  function automatic int md61(int v);
    return ((v % 61) + 61) % 61;
  endfunction

  function automatic int pow3(int r);
    int p = 1;
    for (int i = 0; i < r; i++) p = (p * 3) % 61;
    return p;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      int v, p;
      sd5_t w;
      int r [10];
      v = 0;
      p = 1;
      for (int k = 0; k < 5; k++) begin
        w[k] = val_sd(cval_t'(int'($urandom_range(0, 2)) - 1));
        v += int'(sd_val(w[k])) * p;
        p *= 3;
      end
      if (n < 360) begin
        for (int e = 0; e < 10; e++) r[e] = ((((n / 6) * (n % 6)) / 6) + (n / 6) * e) % 10;
      end else begin
        for (int e = 0; e < 5; e++) begin
          r[e]     = $urandom_range(0, 9);
          r[e + 5] = (r[e] % 5) + 5 * $urandom_range(0, 1);
        end
      end
      q.push_back(md61(v));
      // six-clock period: capture at clock 0, start (and new selections) at clock 5
      for (int c = 0; c < 6; c++) begin
        cap   <= (c == 0);
        word  <= w;
        start <= (c == 5);
        if (c == 5) begin
          for (int e = 0; e < 10; e++) begin
            sel[e] <= 4'(r[e]);
            sq.push_back(r[e]);
          end
        end
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
      int r [10];
      int y, p;
      y = q.pop_front();
      for (int e = 0; e < 10; e++) begin
        acc[e] = 0;
        r[e]   = sq.pop_front();
      end
      p = 1;
      for (int d = 0; d < 6; d++) begin
        if (d > 0) @(posedge clk);
        checks++;
        if (out_valid != (d < 5)) begin failures++; $display("out_valid wrong at %0d", d); end
        if (d < 5) for (int e = 0; e < 10; e++) acc[e] += int'(sd_val(X[e])) * p;
        p *= 3;
      end
      for (int e = 0; e < 10; e++) begin
        checks++;
        if (md61(acc[e]) != md61(y * pow3(r[e]))) begin
          failures++;
          $display("e=%0d r=%0d got %0d want %0d", e, r[e], md61(acc[e]), md61(y * pow3(r[e])));
        end
      end
    end
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
