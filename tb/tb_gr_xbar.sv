// Testbench of the GRn crossbar: GR6 with 12-bit lanes and GR10 with 2-bit
// lanes, random inputs and random selections (including broadcast); every
// output must carry the input its selection names.
module tb_gr_xbar;
  int checks = 0, failures = 0;
  logic [11:0] i6 [6], o6 [6];
  logic [2:0]  s6 [6];
  logic [1:0]  i10 [10], o10 [10];
  logic [3:0]  s10 [10];

  gr_xbar #(.N(6), .W(12)) u6 (.din(i6), .sel(s6), .dout(o6));
  gr_xbar #(.N(10), .W(2)) u10 (.din(i10), .sel(s10), .dout(o10));

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 6; i++) begin i6[i] = 12'($urandom); s6[i] = 3'($urandom_range(0, 5)); end
      for (int i = 0; i < 10; i++) begin i10[i] = 2'($urandom); s10[i] = 4'($urandom_range(0, 9)); end
      #1;
      for (int o = 0; o < 6; o++) begin
        checks++;
        if (o6[o] != i6[s6[o]]) begin failures++; $display("GR6 out %0d", o); end
      end
      for (int o = 0; o < 10; o++) begin
        checks++;
        if (o10[o] != i10[s10[o]]) begin failures++; $display("GR10 out %0d", o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
