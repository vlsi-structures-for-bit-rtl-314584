// Testbench of four mod-13 split multipliers sharing one 3-to-8 converter.
// Lane l starts its words on clock phase l (mod 4), so in every clock one
// lane starts a word and the shared converter is fully busy. First all four
// lanes run back to back with every x in 0..15 and every exponent pair
// (spread over the lanes), then random words with lanes randomly idle. Each
// lane's results are decoded from four signed basis-8 digits and compared
// with x*3^e2*8^e1 mod 13; the latency (14 clocks) and r_valid are checked
// per lane. Also counts clocks in which all four lanes were busy at once.
module tb_split_mult13_x4;
  import bsmm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] x_bit = '0, x_first = '0;
  logic [1:0] e1 [4] = '{default: '0};
  logic [1:0] e2 [4] = '{default: '0};
  sd_t        r_out [4];
  logic [3:0] r_first, r_valid;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         exp_q [4][$];
  int         tin_q [4][$];
  int         n_full = 0;

  split_mult13_x4 dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int powmod(int b, int e, int m);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % m;
    return r;
  endfunction

  // per-lane output collection
  int acc [4], dig [4], w8 [4];
  initial begin
    for (int l = 0; l < 4; l++) dig[l] = -1;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (r_valid == 4'hf) n_full++;
        for (int l = 0; l < 4; l++) begin
          if (r_first[l]) begin
            int tin;
            tin = tin_q[l].pop_front();
            checks++;
            if (cyc - tin != 14) begin failures++; $display("lane %0d latency %0d", l, cyc - tin); end
            dig[l] = 0;
            acc[l] = 0;
            w8[l]  = 1;
          end
          if (dig[l] >= 0) begin
            checks++;
            if (!r_valid[l]) begin failures++; $display("lane %0d r_valid low in word", l); end
            acc[l] += int'(sd_val(r_out[l])) * w8[l];
            w8[l]  *= 8;
            dig[l]++;
            if (dig[l] == 4) begin
              int e, v;
              e = exp_q[l].pop_front();
              v = ((acc[l] % 13) + 13) % 13;
              checks++;
              if (v != e) begin failures++; $display("lane %0d got %0d expected %0d", l, v, e); end
              dig[l] = -1;
            end
          end
        end
      end
    end
  end

  // drive: lane l's word occupies clocks with (c - l) mod 4 = 0..3
  int xw [4], busy [4];
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int l = 0; l < 4; l++) busy[l] = 0;
    for (int c = 0; c < 4 * 60 + 4 * 200 + 8; c++) begin
      int l, word;
      l = c % 4;
      word = c / 4;
      // lane l may start a word in this clock
      if (word < 60 + 200) begin
        int a1, a2, go;
        if (word < 48) begin
          // 16 x values x 12 exponent pairs = 192 words, 48 per lane
          int idx;
          idx = word * 4 + l;
          xw[l] = idx % 16;
          a1    = (idx / 16) % 4;
          a2    = (idx / 64) % 3;
          go    = 1;
        end else begin
          xw[l] = $urandom_range(0, 15);
          a1    = $urandom_range(0, 3);
          a2    = $urandom_range(0, 2);
          go    = (word < 60) ? 1 : int'($urandom_range(0, 3) != 0);
        end
        busy[l] = go;
        if (go) begin
          exp_q[l].push_back((xw[l] * powmod(3, a2, 13) * powmod(8, a1, 13)) % 13);
          tin_q[l].push_back(cyc + 1);
          e1[l] <= 2'(a1);
          e2[l] <= 2'(a2);
        end
      end else begin
        busy[l] = 0;
      end
      for (int k = 0; k < 4; k++) begin
        int pos;
        pos = (c - k + 4) % 4;
        x_bit[k]   <= busy[k] ? xw[k][3 - pos] : 1'b0;
        x_first[k] <= busy[k] && (pos == 0);
      end
      @(posedge clk);
    end
    x_first <= '0;
    x_bit   <= '0;
    repeat (30) @(posedge clk);
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (exp_q[l].size() != 0) begin failures++; $display("lane %0d: %0d results missing", l, exp_q[l].size()); end
    end
    $display("clocks with all four lanes delivering: %0d", n_full);
    checks++;
    if (n_full == 0) begin failures++; $display("lanes never all busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
