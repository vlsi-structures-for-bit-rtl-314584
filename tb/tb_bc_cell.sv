// Testbench of the basis-converter cell. Four cells of the design are built
// with their real parameters and driven with every input pair of their input
// sets; each answer is checked against the cell rule
// alpha*s_i + c_i + k = s_o + beta*c_o (mod m, or exactly where the cell is
// modulus independent) and against its output sets. A pair outside the sets
// must be flagged invalid.
module tb_bc_cell;
  import bsmm_pkg::*;
  int checks = 0, failures = 0;

  cval_t s1, c1, so1, co1; logic v1;   // 3-to-8 cell B, mod 13
  cval_t s2, c2, so2, co2; logic v2;   // 3-to-8 cell E, offset -3
  cval_t s3, c3, so3, co3; logic v3;   // mod-61 cell A, offset -1 (exact)
  cval_t s4, c4, so4, co4; logic v4;   // 3-to-8 cell A, no state, no carry

  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(6), .S_SET('{-6, -5, -4, -1, 0, 1, 0, 0}), .NC(2), .C_SET('{0, 2, 0, 0, 0, 0, 0, 0}))
    u1 (.s_i(s1), .c_i(c1), .s_o(so1), .c_o(co1), .valid(v1));
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(-3), .HAS_S(1'b1),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}), .NC(4), .C_SET('{0, 1, 2, 3, 0, 0, 0, 0}))
    u2 (.s_i(s2), .c_i(c2), .s_o(so2), .c_o(co2), .valid(v2));
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(61), .K(-1), .HAS_S(1'b1),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}), .NC(3), .C_SET('{-1, 0, 1, 0, 0, 0, 0, 0}))
    u3 (.s_i(s3), .c_i(c3), .s_o(so3), .c_o(co3), .valid(v3));
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(0), .HAS_S(1'b0),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}), .NC(0), .C_SET('{0, 0, 0, 0, 0, 0, 0, 0}))
    u4 (.s_i(s4), .c_i(c4), .s_o(so4), .c_o(co4), .valid(v4));

  function automatic bit congruent(int a, int b, int m);
    return ((a - b) % m) == 0;
  endfunction

  function automatic bit in_set(int v, int set [$]);
    foreach (set[i]) if (set[i] == v) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    s4 = 0; c4 = 0;
    // cell B: s_i in {-1,0,1}, c_i in {-1,0,1}
    for (int s = -1; s <= 1; s++)
      for (int c = -1; c <= 1; c++) begin
        s1 = cval_t'(s); c1 = cval_t'(c); #1;
        checks++;
        if (!v1 || !congruent(3*s + c, int'(so1) + 8*int'(co1), 13)
            || !in_set(int'(so1), '{-6, -5, -4, -1, 0, 1}) || !in_set(int'(co1), '{0, 2})) begin
          failures++; $display("cell B s=%0d c=%0d -> %0d %0d", s, c, so1, co1);
        end
      end
    // cell E: s_i in {-1,0,1}, c_i in {0..3}, offset -3
    for (int s = -1; s <= 1; s++)
      for (int c = 0; c <= 3; c++) begin
        s2 = cval_t'(s); c2 = cval_t'(c); #1;
        checks++;
        if (!v2 || !congruent(3*s + c - 3, int'(so2) + 8*int'(co2), 13)
            || !in_set(int'(so2), '{-1, 0, 1}) || !in_set(int'(co2), '{0, 1, 2, 3})) begin
          failures++; $display("cell E s=%0d c=%0d -> %0d %0d", s, c, so2, co2);
        end
      end
    // mod-61 cell A: s_i in {-1,0,1}, c_i in {0,1,2}, offset -1, exact
    for (int s = -1; s <= 1; s++)
      for (int c = 0; c <= 2; c++) begin
        s3 = cval_t'(s); c3 = cval_t'(c); #1;
        checks++;
        if (!v3 || (2*s + c - 1 != int'(so3) + 3*int'(co3))
            || !in_set(int'(so3), '{-1, 0, 1}) || !in_set(int'(co3), '{-1, 0, 1})) begin
          failures++; $display("cell A61 s=%0d c=%0d -> %0d %0d", s, c, so3, co3);
        end
      end
    // cell A of the 3-to-8 converter passes its carry on; 2 is outside its set
    for (int c = -1; c <= 1; c++) begin
      c4 = cval_t'(c); #1;
      checks++;
      if (!v4 || int'(so4) != c || co4 != 0) begin failures++; $display("cell A c=%0d", c); end
    end
    c4 = 2; #1;
    checks++;
    if (v4) begin failures++; $display("out-of-set input not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
