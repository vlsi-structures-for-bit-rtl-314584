// Testbench of the crossbar controller. Words are announced with cap and
// their output later with start, as the generator does (16 clocks apart,
// a word every 6 clocks). For the word in each position the routing is
// checked as a property, not against the controller's own formula: slot i
// must hold 2^a with 0 <= a < 6, and output e of unit i must take the rotation
// r with a + 6r = n*(i + 6e) (mod 60), n being the word's index (1 in
// all-products mode). Also checks n counting, wrap and frame restart.
module tb_ntt_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cap = 1'b0, frame = 1'b0, mode_all = 1'b0, start = 1'b0;
  logic [2:0] gr6_sel [6];
  logic [3:0] gr10_sel [6][10];
  logic [5:0] n_out;
  logic       mode_out;
  int         checks = 0, failures = 0, cyc = 0;

  ntt_ctrl dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  typedef struct { int n; bit mode; int a [6]; } w_t;
  w_t q [$];
  int n_model = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 140; w++) begin
      bit fr, md;
      w_t x;
      fr = (w == 0) || (w == 100);
      md = (w >= 125 && w < 130);
      if (fr) n_model = 0;
      x.n = n_model; x.mode = md;
      n_model = (n_model + 1) % 60;
      cap <= 1'b1; frame <= fr; mode_all <= md;
      @(posedge clk);
      cap <= 1'b0; frame <= 1'b0; mode_all <= 1'b0;
      #1;
      for (int i = 0; i < 6; i++) begin
        int ne;
        ne = md ? 1 : x.n;
        x.a[i] = int'(gr6_sel[i]);
        checks++;
        if (x.a[i] > 5 || (x.a[i] - ne * i) % 6 != 0) begin failures++; $display("gr6 n=%0d i=%0d", x.n, i); end
      end
      q.push_back(x);
      repeat (5) @(posedge clk);
    end
    repeat (30) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("words not started"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // start each word 16 clocks after its cap
  logic [15:0] capd = '0;
  always_ff @(posedge clk) begin
    capd  <= {capd[14:0], cap};
    start <= capd[15];
  end

  initial forever begin
    @(posedge clk);
    if (start) begin
      w_t x;
      int ne;
      @(posedge clk);
      #1;
      x = q.pop_front();
      ne = x.mode ? 1 : x.n;
      checks++;
      if (int'(n_out) != x.n || mode_out != x.mode) begin failures++; $display("n_out %0d want %0d", n_out, x.n); end
      for (int i = 0; i < 6; i++)
        for (int e = 0; e < 10; e++) begin
          int r;
          r = int'(gr10_sel[i][e]);
          checks++;
          if (r > 9 || ((x.a[i] + 6 * r - ne * (i + 6 * e)) % 60) != 0) begin
            failures++;
            if (failures < 10) $display("gr10 n=%0d i=%0d e=%0d r=%0d", x.n, i, e, r);
          end
        end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
