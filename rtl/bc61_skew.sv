// Skew-parallel 2-to-3 basis converter, mod 61 (modulus independent cells).
//
// Converts a word of six digits u5..u0 in {0, 1, 2} (basis 2, weights
// 2^5..2^0, each digit the sum of two binary streams, Z = [1; 1]) into five
// signed digits z0..z4 in {-1, 0, 1} of basis 3 (weights 3^0..3^4), so that
// sum z_k*3^k = sum u_i*2^i (mod 61). Each cell obeys
//     2*s_i + c_i + k = s_o + 3*c_o
// exactly, with states and carries in {-1, 0, 1}:
//   type A (column 3^0): c_i in {0, 1, 2}, takes the input digit directly;
//   type B: c_i in {-1, 0, 1};
//   type C: first cell of a column, no state input, s_o = c_i + k.
// Column 3^0 holds C, A, A, A, A, A for rows 2^5..2^0; every one of them
// except the one of row 2^1 carries the offset -1, which keeps the column
// inside {-1, 0, 1}. Their total weight is -(32 + 16 + 8 + 4 + 1) = -61, so
// the offsets vanish modulo 61. Column k >= 1 starts two clocks after column
// k-1, with a C cell followed by B cells: 5, 4, 3 and 2 cells for columns
// 3^1..3^4 (20 cells in all). The carry out of the last cell of column 3^4
// is always zero and is dropped (an assertion watches it).
//
// Interface (skew parallel): row t (t = 0 for 2^5 .. 5 for 2^0) of a word is
// presented on din[t] t clocks after row 0; a new word may enter every clock.
// With row 0 in cycle w, digit z_k is on dout[k] in cycle w + 6 + k.
module bc61_skew
  import bsmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dd_t  din  [6],
  output sd_t  dout [5]
);

  localparam int NCOL = 5;
  localparam int NMAX = 6;
  // cells per column
  function automatic int ncell(int k);
    return 6 - k;
  endfunction

  cval_t s_q [NCOL][NMAX];
  cval_t c_q [NCOL][NMAX];
  cval_t s_d [NCOL][NMAX];
  cval_t c_d [NCOL][NMAX];
  logic  v   [NCOL][NMAX];

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    for (genvar i = 0; i < NMAX; i++) begin : g_cell
      if (i < ncell(k)) begin : g_used
        cval_t cin;
        if (k == 0) begin : g_in
          assign cin = dd_val(din[i]);
        end else begin : g_carry
          assign cin = c_q[k-1][i+1];
        end
        if (i == 0) begin : g_c
          // type C: column head; in column 3^0 it takes {0,1,2} with offset -1
          bc_cell #(.ALPHA(2), .BETA(3), .MOD(61), .K((k == 0) ? -1 : 0), .HAS_S(1'b0),
                    .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
                    .NC(0), .C_SET('{0, 0, 0, 0, 0, 0, 0, 0}))
            u_cell (.s_i(cval_t'(0)), .c_i(cin), .s_o(s_d[k][i]), .c_o(c_d[k][i]),
                    .valid(v[k][i]));
        end else begin : g_ab
          // type A in column 3^0 (offset -1 except on row 2^1), type B elsewhere
          bc_cell #(.ALPHA(2), .BETA(3), .MOD(61),
                    .K((k == 0 && i != 4) ? -1 : 0), .HAS_S(1'b1),
                    .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
                    .NC(3), .C_SET('{-1, 0, 1, 0, 0, 0, 0, 0}))
            u_cell (.s_i(s_q[k][i-1]), .c_i(cin), .s_o(s_d[k][i]), .c_o(c_d[k][i]),
                    .valid(v[k][i]));
        end
      end else begin : g_none
        assign s_d[k][i] = '0;
        assign c_d[k][i] = '0;
        assign v[k][i]   = 1'b1;
      end
    end
    assign dout[k] = val_sd(s_q[k][ncell(k)-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NCOL; k++)
        for (int i = 0; i < NMAX; i++) begin
          s_q[k][i] <= '0;
          c_q[k][i] <= '0;
        end
    end else begin
      for (int k = 0; k < NCOL; k++)
        for (int i = 0; i < NMAX; i++) begin
          s_q[k][i] <= s_d[k][i];
          c_q[k][i] <= c_d[k][i];
        end
    end
  end

  logic all_valid;
  always_comb begin
    all_valid = 1'b1;
    for (int k = 0; k < NCOL; k++)
      for (int i = 0; i < NMAX; i++) all_valid &= v[k][i];
  end

  always_ff @(posedge clk) if (rst_n) begin
    assert (all_valid) else $error("bc61_skew: cell input outside its set");
    assert (c_q[NCOL-1][ncell(NCOL-1)-1] == '0) else $error("bc61_skew: carry out of the top column");
  end

endmodule
