// End-to-end testbench of the top level, both structures running at once at
// their full sizes (the design has no size parameters).
// GF(13) side: every x in 0..15 with every e1 (0..3) and e2 (0..2), then
// random words, back to back every 4 clocks; results decoded from the four
// signed basis-8 digits and compared with x*3^e2*8^e1 mod 13, latency 14.
// GF(61) side: one full 60-point frame, a second frame cut short, words in
// all-products mode, every word compared on all sixty outputs with
// x*2^(n*k mod 60) mod 61, latency 23.
// Mechanisms counted, each must occur: every exponent pair of the split
// multiplier, back-to-back words on both sides, crossbar broadcast (n sharing
// a factor with 6 or 10), crossbar permutation (n coprime to 60), the
// all-products mode switch, frame restart and the wrap of n from 59 to 0.
// Four-lane GF(13) side: the lanes start one clock apart and then each sends
// a word every 4 clocks, so the shared 3-to-8 converter takes a new word on
// every clock; every lane's result is checked like the single multiplier,
// and the clocks with all four lanes producing output are counted.
module tb_bsmm_top;
  import bsmm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       m13_x_bit = 1'b0, m13_x_first = 1'b0;
  logic [1:0] m13_e1 = '0, m13_e2 = '0;
  sd_t        m13_r;
  logic       m13_r_first, m13_r_valid;
  logic [3:0] m13x4_x_bit = '0, m13x4_x_first = '0;
  logic [1:0] m13x4_e1 [4] = '{default: '0};
  logic [1:0] m13x4_e2 [4] = '{default: '0};
  sd_t        m13x4_r [4];
  logic [3:0] m13x4_r_first, m13x4_r_valid;
  logic       m61_x_bit = 1'b0, m61_x_first = 1'b0, m61_frame = 1'b0, m61_mode_all = 1'b0;
  sd_t        m61_X [60];
  logic       m61_X_first, m61_X_valid;
  logic [5:0] m61_n;
  logic       m61_mode;

  int checks = 0, failures = 0;
  int cyc = 0;

  bsmm_top dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int powmod(int b, int e, int m);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % m;
    return r;
  endfunction

  // ------------------------------------------------------------ GF(13) side
  typedef struct { int v; int t; } e13_t;
  e13_t q13 [$];
  bit   pair_seen [4][3];
  int   b2b13 = 0;

  task automatic send13(int x, int a1, int a2);
    e13_t w;
    w.v = (x * powmod(3, a2, 13) * powmod(8, a1, 13)) % 13;
    w.t = cyc + 1;
    q13.push_back(w);
    pair_seen[a1][a2] = 1'b1;
    for (int i = 3; i >= 0; i--) begin
      m13_x_bit   <= x[i];
      m13_x_first <= (i == 3);
      if (i == 3) begin
        m13_e1 <= 2'(a1);
        m13_e2 <= 2'(a2);
      end
      @(posedge clk);
    end
  endtask

  int last13 = -1;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && m13_r_first) begin
        int v, w, t0;
        e13_t ex;
        t0 = cyc;
        v = 0;
        w = 1;
        for (int k = 0; k < 4; k++) begin
          if (k > 0) @(posedge clk);
          v += int'(sd_val(m13_r)) * w;
          w *= 8;
        end
        v = ((v % 13) + 13) % 13;
        ex = q13.pop_front();
        checks++;
        if (v != ex.v) begin failures++; $display("GF(13): got %0d want %0d", v, ex.v); end
        checks++;
        if (t0 - ex.t != 14) begin failures++; $display("GF(13): latency %0d", t0 - ex.t); end
        if (last13 >= 0 && t0 - last13 == 4) b2b13++;
        last13 = t0;
      end
    end
  end

  // ------------------------------------------------------------ four lanes
  e13_t q4 [4][$];
  int   n_all4 = 0;

  task automatic run4(int nwords);
    int xs [4];
    for (int s = 0; s < nwords * 4 + 3; s++) begin
      for (int l = 0; l < 4; l++) begin
        int ph;
        ph = s - l;
        if (ph >= 0 && ph < nwords * 4) begin
          if (ph % 4 == 0) begin
            e13_t w;
            int a1, a2;
            xs[l] = int'($urandom_range(0, 15));
            a1 = int'($urandom_range(0, 3));
            a2 = int'($urandom_range(0, 2));
            w.v = (xs[l] * powmod(3, a2, 13) * powmod(8, a1, 13)) % 13;
            w.t = cyc + 1;
            q4[l].push_back(w);
            m13x4_e1[l] <= 2'(a1);
            m13x4_e2[l] <= 2'(a2);
          end
          m13x4_x_bit[l]   <= xs[l][3 - ph % 4];
          m13x4_x_first[l] <= (ph % 4 == 0);
        end else begin
          m13x4_x_first[l] <= 1'b0;
        end
      end
      @(posedge clk);
    end
  endtask

  int acc4 [4], wt4 [4], cnt4 [4], t04 [4];
  initial begin
    for (int l = 0; l < 4; l++) cnt4[l] = 0;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (m13x4_r_valid == 4'hf) n_all4++;
        for (int l = 0; l < 4; l++) begin
          if (m13x4_r_first[l]) begin
            acc4[l] = int'(sd_val(m13x4_r[l]));
            wt4[l]  = 8;
            cnt4[l] = 1;
            t04[l]  = cyc;
          end else if (cnt4[l] > 0 && m13x4_r_valid[l]) begin
            acc4[l] += int'(sd_val(m13x4_r[l])) * wt4[l];
            wt4[l]  *= 8;
            cnt4[l]++;
          end
          if (cnt4[l] == 4) begin
            e13_t ex;
            int v;
            cnt4[l] = 0;
            v = ((acc4[l] % 13) + 13) % 13;
            ex = q4[l].pop_front();
            checks++;
            if (v != ex.v) begin failures++; $display("lane %0d: got %0d want %0d", l, v, ex.v); end
            checks++;
            if (t04[l] - ex.t != 14) begin failures++; $display("lane %0d: latency %0d", l, t04[l] - ex.t); end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ GF(61) side
  typedef struct { int x; int n; bit mode; int t; } w61_t;
  w61_t q61 [$];
  int   n_model = 0;
  int   n_bcast = 0, n_perm = 0, n_mode = 0, n_frame = 0, n_wrap = 0, b2b61 = 0;

  task automatic send61(int x, bit fr, bit md);
    w61_t w;
    if (fr) begin
      n_model = 0;
      n_frame++;
    end
    w.x = x; w.n = n_model; w.mode = md; w.t = cyc + 1;
    q61.push_back(w);
    if (n_model == 59) n_wrap++;
    n_model = (n_model + 1) % 60;
    for (int i = 5; i >= 0; i--) begin
      m61_x_bit    <= x[i];
      m61_x_first  <= (i == 5);
      m61_frame    <= fr && (i == 5);
      m61_mode_all <= md && (i == 5);
      @(posedge clk);
    end
  endtask

  int last61 = -1;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && m61_X_first) begin
        int v [60];
        int w, ne, t0;
        w61_t ex;
        t0 = cyc;
        for (int k = 0; k < 60; k++) v[k] = 0;
        w = 1;
        for (int d = 0; d < 5; d++) begin
          if (d > 0) @(posedge clk);
          for (int k = 0; k < 60; k++) v[k] += int'(sd_val(m61_X[k])) * w;
          w *= 3;
        end
        ex = q61.pop_front();
        ne = ex.mode ? 1 : ex.n;
        for (int k = 0; k < 60; k++) begin
          int got, want;
          got  = ((v[k] % 61) + 61) % 61;
          want = (ex.x * powmod(2, (ne * k) % 60, 61)) % 61;
          checks++;
          if (got != want) begin
            failures++;
            if (failures < 10) $display("GF(61): n=%0d k=%0d got %0d want %0d", ex.n, k, got, want);
          end
        end
        checks++;
        if (m61_n != 6'(ex.n) || m61_mode != ex.mode) begin failures++; $display("GF(61): n_out wrong"); end
        checks++;
        if (t0 - ex.t != 23) begin failures++; $display("GF(61): latency %0d", t0 - ex.t); end
        if (last61 >= 0 && t0 - last61 == 6) b2b61++;
        last61 = t0;
        if (ex.mode) n_mode++;
        else if ((ex.n % 2 == 0) || (ex.n % 3 == 0) || (ex.n % 5 == 0)) n_bcast++;
        else n_perm++;
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  bit done13 = 1'b0, done61 = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      begin
        for (int x = 0; x < 16; x++)
          for (int a1 = 0; a1 < 4; a1++)
            for (int a2 = 0; a2 < 3; a2++) send13(x, a1, a2);
        for (int n = 0; n < 100; n++)
          send13(int'($urandom_range(0, 12)), int'($urandom_range(0, 3)), int'($urandom_range(0, 2)));
        m13_x_first <= 1'b0;
        done13 = 1'b1;
      end
      begin
        for (int n = 0; n < 60; n++) send61(int'($urandom_range(0, 60)), n == 0, 1'b0);
        for (int n = 0; n < 9; n++)  send61(int'($urandom_range(0, 60)), n == 0, n > 5);
        send61(60, 1'b0, 1'b0);
        send61(33, 1'b1, 1'b0);
        m61_x_first <= 1'b0;
        m61_frame   <= 1'b0;
        done61 = 1'b1;
      end
      run4(150);
    join
    repeat (40) @(posedge clk);
    checks++; if (q13.size() != 0) begin failures++; $display("GF(13): %0d results missing", q13.size()); end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (q4[l].size() != 0) begin failures++; $display("lane %0d: %0d results missing", l, q4[l].size()); end
    end
    checks++; if (q61.size() != 0) begin failures++; $display("GF(61): %0d words missing", q61.size()); end
    for (int a1 = 0; a1 < 4; a1++)
      for (int a2 = 0; a2 < 3; a2++) begin
        checks++;
        if (!pair_seen[a1][a2]) begin failures++; $display("exponent pair %0d,%0d not used", a1, a2); end
      end
    $display("GF(13): back-to-back results %0d", b2b13);
    $display("GF(61): back-to-back %0d, broadcast %0d, permutation %0d, all-products %0d, frames %0d, wraps %0d",
             b2b61, n_bcast, n_perm, n_mode, n_frame, n_wrap);
    $display("four lanes: clocks with all lanes producing output %0d", n_all4);
    checks++; if (n_all4 < 400) begin failures++; $display("shared converter never fully loaded"); end
    checks++; if (b2b13 == 0)   begin failures++; $display("no back-to-back GF(13) words"); end
    checks++; if (b2b61 == 0)   begin failures++; $display("no back-to-back GF(61) words"); end
    checks++; if (n_bcast == 0) begin failures++; $display("no crossbar broadcast"); end
    checks++; if (n_perm == 0)  begin failures++; $display("no crossbar permutation"); end
    checks++; if (n_mode == 0)  begin failures++; $display("no all-products word"); end
    checks++; if (n_frame < 3)  begin failures++; $display("no frame restart"); end
    checks++; if (n_wrap == 0)  begin failures++; $display("n never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
