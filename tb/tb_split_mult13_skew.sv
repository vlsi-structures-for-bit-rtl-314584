// Self-checking testbench of the mod-13 split multiplier built with the
// skew-parallel 2-to-3 converter in front (BC23_SKEW = 1); the stimulus and
// checks are those of the serial-converter form.
// Feeds every x in 0..15 with every e1 in 0..3 and e2 in 0..2, words back to
// back every 4 clocks, then a random stream. Each result is decoded from its
// four signed basis-8 digits and compared with x*3^e2*8^e1 mod 13 computed
// here with ordinary integer arithmetic. Also checks the latency (14 clocks)
// and that results leave one word every 4 clocks.
module tb_split_mult13_skew;
  import bsmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_bit = 1'b0, x_first = 1'b0;
  logic [1:0] e1 = '0, e2 = '0;
  sd_t  r_out;
  logic r_first, r_valid;
  int   checks = 0, failures = 0;
  int   exp_q [$];
  int   tin_q [$];
  int   cyc = 0;

  split_mult13 #(.BC23_SKEW(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int powmod(int b, int e, int m);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % m;
    return r;
  endfunction

  task automatic send(int x, int a1, int a2);
    exp_q.push_back((x * powmod(3, a2, 13) * powmod(8, a1, 13)) % 13);
    for (int i = 3; i >= 0; i--) begin
      x_bit   <= x[i];
      x_first <= (i == 3);
      if (i == 3) begin
        e1 <= 2'(a1);
        e2 <= 2'(a2);
        tin_q.push_back(cyc + 1);  // the DUT samples x_first at the next edge
      end
      @(posedge clk);
    end
  endtask

  // collect results
  int last_out = -1;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && r_first) begin
        int v, w, tin, e;
        v = 0;
        w = 1;
        for (int k = 0; k < 4; k++) begin
          if (k > 0) @(posedge clk);
          if (!r_valid) begin failures++; $display("r_valid low in word"); end
          v += int'(sd_val(r_out)) * w;
          w *= 8;
        end
        v = ((v % 13) + 13) % 13;
        e = exp_q.pop_front();
        tin = tin_q.pop_front();
        checks++;
        if (v !== e) begin
          failures++;
          $display("mismatch: got %0d expected %0d", v, e);
        end
        checks++;
        if (cyc - 3 - tin != 14) begin
          failures++;
          $display("latency %0d, expected 14", cyc - 3 - tin);
        end
        if (last_out >= 0) begin
          checks++;
          if (cyc - last_out != 4) begin
            failures++;
            $display("output spacing %0d, expected 4", cyc - last_out);
          end
        end
        last_out = cyc;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int x = 0; x < 16; x++)
      for (int a1 = 0; a1 < 4; a1++)
        for (int a2 = 0; a2 < 3; a2++)
          send(x, a1, a2);
    for (int n = 0; n < 200; n++)
      send(int'($urandom_range(0, 12)), int'($urandom_range(0, 3)), int'($urandom_range(0, 2)));
    x_first <= 1'b0;
    x_bit   <= 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
