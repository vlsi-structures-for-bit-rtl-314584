// Skew-parallel 2-to-3 basis converter, mod 13 (modulus independent cells).
//
// Converts a 4-bit binary word x3..x0 (weights 2^3..2^0) into three signed
// digits y0, y1, y2 in {-1, 0, 1} of weights 3^0, 3^1, 3^2, with
// y0 + 3*y1 + 9*y2 = x (mod 13). It is the unfolded form of bc13_serial:
// eight registered cells, each obeying 2*s_i + c_i = s_o + 3*c_o exactly,
//   type A: no state input, c_i in {0, 1}, s_o = c_i, no carry output
//   type B: s_i in {0, 1}, c_i in {0, 1}, s_o in {0, 1, 2}, c_o in {0, 1}
//   type C: s_i in {0, 1, 2}, c_i in {0, 1}, s_o in {0, 1, 2}, c_o in {0, 1}
// arranged as
//   column 3^0: A, B, C, C  (rows 2^3, 2^2, 2^1, 2^0)
//   column 3^1: A, B, C     (fed by the carries of B, C, C above)
//   column 3^2: A           (fed by the carry of the last C of column 3^1)
// The carry of the B cell of column 3^1 has no cell to go to; it is always
// zero (an assertion watches it). Each column's final state in {0, 1, 2} is
// read with an offset of -1, which is the signed-digit coding itself
// (2 -> +1, 0 -> -1); the offsets weigh -(1 + 3 + 9) = -13 and cancel.
//
// Interface (skew parallel): input row t (t = 0 for x3 .. 3 for x0) is
// presented on din[t] t clocks after row 0; a new word may enter every clock.
// With row 0 in cycle w, digit y_k is on dout[k] in cycle w + 4 + k. A
// bit-serial word, MSB first, may therefore drive all four rows from one
// wire, which gives the timing of bc13_serial. Cell types, their placement
// and the offsets follow the converter as designed for this modulus; the
// signed-integer coding inside the cells is this design's own choice.
module bc13_skew23
  import bsmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic din  [4],
  output sd_t  dout [3]
);

  localparam int S01  [8] = '{0, 1, 0, 0, 0, 0, 0, 0};
  localparam int S012 [8] = '{0, 1, 2, 0, 0, 0, 0, 0};
  localparam int NONE [8] = '{0, 0, 0, 0, 0, 0, 0, 0};

  // cell outputs (_d) and their registers (_q); cell name = column, row
  cval_t s00_d, s01_d, c01_d, s02_d, c02_d, s03_d, c03_d;
  cval_t s00_q, s01_q, c01_q, s02_q, c02_q, s03_q, c03_q;
  cval_t s10_d, s11_d, c11_d, s12_d, c12_d;
  cval_t s10_q, s11_q, c11_q, s12_q, c12_q;
  cval_t s20_d, s20_q;
  cval_t unused_c00, unused_c10, unused_c20;
  logic  [7:0] v;

  // column 3^0
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b0),
            .NS(2), .S_SET(S01), .NC(0), .C_SET(NONE))
    u_a00 (.s_i(cval_t'(0)), .c_i(cval_t'(din[0])), .s_o(s00_d), .c_o(unused_c00), .valid(v[0]));
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET(S012), .NC(2), .C_SET(S01))
    u_b01 (.s_i(s00_q), .c_i(cval_t'(din[1])), .s_o(s01_d), .c_o(c01_d), .valid(v[1]));
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET(S012), .NC(2), .C_SET(S01))
    u_c02 (.s_i(s01_q), .c_i(cval_t'(din[2])), .s_o(s02_d), .c_o(c02_d), .valid(v[2]));
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET(S012), .NC(2), .C_SET(S01))
    u_c03 (.s_i(s02_q), .c_i(cval_t'(din[3])), .s_o(s03_d), .c_o(c03_d), .valid(v[3]));

  // column 3^1
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b0),
            .NS(2), .S_SET(S01), .NC(0), .C_SET(NONE))
    u_a10 (.s_i(cval_t'(0)), .c_i(c01_q), .s_o(s10_d), .c_o(unused_c10), .valid(v[4]));
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET(S012), .NC(2), .C_SET(S01))
    u_b11 (.s_i(s10_q), .c_i(c02_q), .s_o(s11_d), .c_o(c11_d), .valid(v[5]));
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET(S012), .NC(2), .C_SET(S01))
    u_c12 (.s_i(s11_q), .c_i(c03_q), .s_o(s12_d), .c_o(c12_d), .valid(v[6]));

  // column 3^2
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b0),
            .NS(2), .S_SET(S01), .NC(0), .C_SET(NONE))
    u_a20 (.s_i(cval_t'(0)), .c_i(c12_q), .s_o(s20_d), .c_o(unused_c20), .valid(v[7]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s00_q <= '0; s01_q <= '0; c01_q <= '0; s02_q <= '0; c02_q <= '0;
      s03_q <= '0; c03_q <= '0; s10_q <= '0; s11_q <= '0; c11_q <= '0;
      s12_q <= '0; c12_q <= '0; s20_q <= '0;
    end else begin
      s00_q <= s00_d; s01_q <= s01_d; c01_q <= c01_d; s02_q <= s02_d; c02_q <= c02_d;
      s03_q <= s03_d; c03_q <= c03_d; s10_q <= s10_d; s11_q <= s11_d; c11_q <= c11_d;
      s12_q <= s12_d; c12_q <= c12_d; s20_q <= s20_d;
    end
  end

  // final states, offset -1
  assign dout[0] = val_sd(s03_q - cval_t'(1));
  assign dout[1] = val_sd(s12_q - cval_t'(1));
  assign dout[2] = val_sd(s20_q - cval_t'(1));

  always_ff @(posedge clk) if (rst_n) begin
    assert (&v) else $error("bc13_skew23: cell input outside its set");
    assert (c11_q == cval_t'(0)) else $error("bc13_skew23: dropped carry not zero");
  end

endmodule
