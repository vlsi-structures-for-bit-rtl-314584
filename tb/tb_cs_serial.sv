// Testbench of the digit-serial cyclic shifter. Two instances as used in the
// GF(13) multiplier: J = 3 (basis 3, MSD-first output) and J = 4 (basis 8,
// LSD-first output). Random signed-digit words and exponents, words back to
// back; the output word is decoded and must equal basis^e times the input
// word modulo 13 (3^3 = 8^4 = 1 mod 13). Also checks the latency (J clocks),
// the framing and that the tag travels with its word.
module tb_cs_serial;
  import bsmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // J = 3 instance
  sd_t        a_in = '0, a_out;
  logic       a_f = 1'b0, a_of, a_ov;
  logic [1:0] a_e = '0, a_tag = '0, a_tago;
  cs_serial #(.J(3), .EW(2), .TW(2), .OUT_MSD_FIRST(1'b1)) u3 (
    .clk, .rst_n, .d_in(a_in), .in_first(a_f), .e(a_e), .tag_in(a_tag),
    .d_out(a_out), .out_first(a_of), .out_valid(a_ov), .tag_out(a_tago));
  // J = 4 instance
  sd_t        b_in = '0, b_out;
  logic       b_f = 1'b0, b_of, b_ov;
  logic [1:0] b_e = '0;
  logic [0:0] b_tag = '0, b_tago;
  cs_serial #(.J(4), .EW(2), .TW(1), .OUT_MSD_FIRST(1'b0)) u4 (
    .clk, .rst_n, .d_in(b_in), .in_first(b_f), .e(b_e), .tag_in(b_tag),
    .d_out(b_out), .out_first(b_of), .out_valid(b_ov), .tag_out(b_tago));

  typedef struct { int v; int tag; int t; } exp_t;
  exp_t qa [$], qb [$];

  function automatic sd_t rnd_digit();
    int r = int'($urandom_range(0, 2)) - 1;
    return val_sd(cval_t'(r));
  endfunction

  function automatic int md13(int v);
    return ((v % 13) + 13) % 13;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 150; n++) begin
      // one 4-clock slot: a J=4 word and a J=3 word (plus one idle clock)
      sd_t da [3], db [4];
      int  ea, eb, va, vb, w, tg;
      ea = int'($urandom_range(0, 2));
      eb = int'($urandom_range(0, 3));
      tg = int'($urandom_range(0, 3));
      va = 0; vb = 0;
      w = 1;
      for (int k = 0; k < 3; k++) begin da[k] = rnd_digit(); va += int'(sd_val(da[k])) * w; w *= 3; end
      w = 1;
      for (int k = 0; k < 4; k++) begin db[k] = rnd_digit(); vb += int'(sd_val(db[k])) * w; w *= 8; end
      w = 1;
      for (int k = 0; k < ea; k++) w *= 3;
      qa.push_back('{v: md13(va * w), tag: tg, t: cyc + 1});
      w = 1;
      for (int k = 0; k < eb; k++) w *= 8;
      qb.push_back('{v: md13(vb * w), tag: tg & 1, t: cyc + 1});
      for (int k = 0; k < 4; k++) begin
        a_in  <= (k < 3) ? da[k] : sd_t'('0);
        a_f   <= (k == 0);
        a_e   <= 2'(ea);
        a_tag <= 2'(tg);
        b_in  <= db[k];
        b_f   <= (k == 0);
        b_e   <= 2'(eb);
        b_tag <= 1'(tg);
        @(posedge clk);
      end
    end
    a_f <= 1'b0;
    b_f <= 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("words missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // J = 3 output: MSD first
  initial forever begin
    @(posedge clk);
    if (a_of) begin
      exp_t ex;
      int v, t0, tg;
      ex = qa.pop_front();
      t0 = cyc;
      tg = int'(a_tago);
      v = 0;
      for (int k = 0; k < 3; k++) begin
        if (k > 0) @(posedge clk);
        checks++;
        if (!a_ov) begin failures++; $display("J=3 out_valid low"); end
        v = v * 3 + int'(sd_val(a_out));
      end
      checks++;
      if (md13(v) != ex.v || tg != ex.tag) begin failures++; $display("J=3 got %0d want %0d", md13(v), ex.v); end
      checks++;
      if (t0 - ex.t != 3) begin failures++; $display("J=3 latency %0d", t0 - ex.t); end
    end
  end

  // J = 4 output: LSD first
  initial forever begin
    @(posedge clk);
    if (b_of) begin
      exp_t ex;
      int v, w, t0;
      ex = qb.pop_front();
      t0 = cyc;
      v = 0;
      w = 1;
      checks++;
      if (int'(b_tago) != ex.tag) begin failures++; $display("J=4 tag"); end
      for (int k = 0; k < 4; k++) begin
        if (k > 0) @(posedge clk);
        v += int'(sd_val(b_out)) * w;
        w *= 8;
      end
      checks++;
      if (md13(v) != ex.v) begin failures++; $display("J=4 got %0d want %0d", md13(v), ex.v); end
      checks++;
      if (t0 - ex.t != 4) begin failures++; $display("J=4 latency %0d", t0 - ex.t); end
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
