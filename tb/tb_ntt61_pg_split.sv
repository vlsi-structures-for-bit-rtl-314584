// Self-checking testbench of the 60-point NTT product generator, mod 61, built
// in split form (SPLIT = 1: GR2/GR3 product stage and GR5/GR2 shift units);
// the stimulus and checks are those of the flat form.
// Sends two full frames of 60 random words (n = 0..59), back to back every
// six clocks, then a few all-products words and a frame cut short by a new
// frame. Every one of the sixty outputs of every word is decoded from its
// five signed base-3 digits and compared with x*2^(n*k mod 60) mod 61
// computed here by repeated doubling. Also checks the latency (23 clocks from
// x_first to X_first), the output spacing (6 clocks) and n_out, and counts
// words whose crossbars had to broadcast (n sharing a factor with 6 or 10),
// all-products words and frame restarts; each must occur.
module tb_ntt61_pg_split;
  import bsmm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       x_bit = 1'b0, x_first = 1'b0, frame = 1'b0, mode_all = 1'b0;
  sd_t        X [60];
  logic       X_first, X_valid;
  logic [5:0] n_out;
  logic       mode_out;
  int         checks = 0, failures = 0;
  int         cyc = 0;

  typedef struct { int x; int n; bit mode; int t; } word_t;
  word_t q [$];
  int    n_model = 0;
  int    n_bcast = 0, n_mode = 0, n_frame = 0, n_wrap = 0;

  ntt61_pg #(.SPLIT(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int pow2(int j);
    int r = 1;
    for (int i = 0; i < j; i++) r = (r * 2) % 61;
    return r;
  endfunction

  task automatic send(int x, bit fr, bit md);
    word_t w;
    if (fr) n_model = 0;
    w.x = x; w.n = n_model; w.mode = md; w.t = cyc + 1;
    q.push_back(w);
    if (n_model == 59) n_wrap++;
    n_model = (n_model + 1) % 60;
    for (int i = 5; i >= 0; i--) begin
      x_bit    <= x[i];
      x_first  <= (i == 5);
      frame    <= fr && (i == 5);
      mode_all <= md && (i == 5);
      @(posedge clk);
    end
  endtask

  int last_out = -1;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && X_first) begin
        int v [60];
        int w, ne, t0;
        word_t ex;
        t0 = cyc;
        for (int k = 0; k < 60; k++) v[k] = 0;
        w = 1;
        for (int d = 0; d < 5; d++) begin
          if (d > 0) @(posedge clk);
          checks++;
          if (!X_valid) begin failures++; $display("X_valid low in word"); end
          for (int k = 0; k < 60; k++) v[k] += int'(sd_val(X[k])) * w;
          w *= 3;
        end
        ex = q.pop_front();
        ne = ex.mode ? 1 : ex.n;
        for (int k = 0; k < 60; k++) begin
          int got, want;
          got  = ((v[k] % 61) + 61) % 61;
          want = (ex.x * pow2((ne * k) % 60)) % 61;
          checks++;
          if (got != want) begin
            failures++;
            if (failures < 10) $display("n=%0d k=%0d x=%0d: got %0d want %0d", ex.n, k, ex.x, got, want);
          end
        end
        checks++;
        if (n_out != 6'(ex.n) || mode_out != ex.mode) begin
          failures++;
          $display("n_out %0d mode %0d, expected %0d %0d", n_out, mode_out, ex.n, ex.mode);
        end
        checks++;
        if (t0 - ex.t != 23) begin
          failures++;
          $display("latency %0d, expected 23", t0 - ex.t);
        end
        if (last_out >= 0) begin
          checks++;
          if (t0 - last_out != 6) begin failures++; $display("spacing %0d", t0 - last_out); end
        end
        last_out = t0;
        if (ex.mode) n_mode++;
        else if ((ex.n % 2 == 0) || (ex.n % 3 == 0) || (ex.n % 5 == 0)) n_bcast++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      for (int n = 0; n < 60; n++) send(int'($urandom_range(0, 60)), n == 0, 1'b0);
      n_frame++;
    end
    for (int n = 0; n < 8; n++) send(int'($urandom_range(0, 60)), 1'b0, 1'b1);
    send(60, 1'b1, 1'b0);
    for (int n = 0; n < 7; n++) send(int'($urandom_range(0, 60)), 1'b0, n[0]);
    send(1, 1'b1, 1'b0);
    n_frame++;
    x_first  <= 1'b0;
    frame    <= 1'b0;
    mode_all <= 1'b0;
    x_bit    <= 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words missing", q.size()); end
    $display("broadcast words %0d, all-products words %0d, frames %0d, n wraps %0d",
             n_bcast, n_mode, n_frame, n_wrap);
    checks++; if (n_bcast == 0) begin failures++; $display("no broadcast word"); end
    checks++; if (n_mode == 0)  begin failures++; $display("no all-products word"); end
    checks++; if (n_frame < 3)  begin failures++; $display("frame restart missing"); end
    checks++; if (n_wrap == 0)  begin failures++; $display("n never wrapped"); end
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
