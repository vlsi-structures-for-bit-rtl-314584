// Skew-parallel 3-to-8 basis converter, mod 13 (modulus dependent).
//
// Converts a word of three signed digits y2, y1, y0 in {-1, 0, 1} (basis 3,
// weights 3^2, 3^1, 3^0) into four signed digits z0..z3 in {-1, 0, 1} of basis
// 8 (weights 8^0..8^3), so that sum z_k*8^k = sum y_i*3^i (mod 13).
// Seven registered cells, each obeying 3*s_i + c_i + k = s_o + 8*c_o (mod 13):
//   column 8^0:  A (s_o = c_i), B (s_o in {-6,-5,-4,-1,0,1}, c_o in {0,2}),
//                C (c_o in {0,1,2,3})
//   column 8^1:  D (offset -1), E (offset -3)
//   column 8^2:  F (offset -1, c_o in {0,2})
//   column 8^3:  D (offset -1)
// The states flow down a column, the carries diagonally to the next column
// one clock later. The cell offsets add up to 8*(-1*3 - 3) - 64 - 512 =
// -624 = -48*13, so they cancel modulo 13 and cost no logic.
//
// Interface (skew parallel): row t of a word (t = 0 for y2, 1 for y1, 2 for
// y0) is presented on din[t] t clocks after row 0. A new word may enter every
// clock. With row 0 in cycle w, output digit z_k is on dout[k] in cycle
// w + 3 + k. A digit-serial stream, MSD first, may therefore drive all three
// rows at once, and then the digits leave LSD first on consecutive clocks.
// Cell set and offsets follow the converter as designed for this modulus; the
// signed-integer coding inside the cells is this design's own choice.
module bc13_skew
  import bsmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sd_t  din  [3],
  output sd_t  dout [4]
);

  cval_t sa_d, sb_d, cb_d, sc_d, cc_d, sd_d, se_d, ce_d, sf_d, cf_d, sg_d;
  cval_t sa_q, sb_q, cb_q, sc_q, cc_q, sd_q, se_q, ce_q, sf_q, cf_q, sg_q;
  cval_t unused_ca, unused_cd, unused_cg;
  logic  [6:0] v;

  // column 8^0
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(0), .HAS_S(1'b0),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
            .NC(0), .C_SET('{0, 0, 0, 0, 0, 0, 0, 0}))
    u_a (.s_i(cval_t'(0)), .c_i(sd_val(din[0])), .s_o(sa_d), .c_o(unused_ca), .valid(v[0]));
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(6), .S_SET('{-6, -5, -4, -1, 0, 1, 0, 0}),
            .NC(2), .C_SET('{0, 2, 0, 0, 0, 0, 0, 0}))
    u_b (.s_i(sa_q), .c_i(sd_val(din[1])), .s_o(sb_d), .c_o(cb_d), .valid(v[1]));
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
            .NC(4), .C_SET('{0, 1, 2, 3, 0, 0, 0, 0}))
    u_c (.s_i(sb_q), .c_i(sd_val(din[2])), .s_o(sc_d), .c_o(cc_d), .valid(v[2]));

  // column 8^1
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(-1), .HAS_S(1'b0),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
            .NC(0), .C_SET('{0, 0, 0, 0, 0, 0, 0, 0}))
    u_d (.s_i(cval_t'(0)), .c_i(cb_q), .s_o(sd_d), .c_o(unused_cd), .valid(v[3]));
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(-3), .HAS_S(1'b1),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
            .NC(4), .C_SET('{0, 1, 2, 3, 0, 0, 0, 0}))
    u_e (.s_i(sd_q), .c_i(cc_q), .s_o(se_d), .c_o(ce_d), .valid(v[4]));

  // column 8^2
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(-1), .HAS_S(1'b0),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
            .NC(2), .C_SET('{0, 2, 0, 0, 0, 0, 0, 0}))
    u_f (.s_i(cval_t'(0)), .c_i(ce_q), .s_o(sf_d), .c_o(cf_d), .valid(v[5]));

  // column 8^3
  bc_cell #(.ALPHA(3), .BETA(8), .MOD(13), .K(-1), .HAS_S(1'b0),
            .NS(3), .S_SET('{-1, 0, 1, 0, 0, 0, 0, 0}),
            .NC(0), .C_SET('{0, 0, 0, 0, 0, 0, 0, 0}))
    u_g (.s_i(cval_t'(0)), .c_i(cf_q), .s_o(sg_d), .c_o(unused_cg), .valid(v[6]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sa_q <= '0; sb_q <= '0; cb_q <= '0; sc_q <= '0; cc_q <= '0;
      sd_q <= '0; se_q <= '0; ce_q <= '0; sf_q <= '0; cf_q <= '0; sg_q <= '0;
    end else begin
      sa_q <= sa_d; sb_q <= sb_d; cb_q <= cb_d; sc_q <= sc_d; cc_q <= cc_d;
      sd_q <= sd_d; se_q <= se_d; ce_q <= ce_d; sf_q <= sf_d; cf_q <= cf_d;
      sg_q <= sg_d;
    end
  end

  assign dout[0] = val_sd(sc_q);
  assign dout[1] = val_sd(se_q);
  assign dout[2] = val_sd(sf_q);
  assign dout[3] = val_sd(sg_q);

  // Digits in {-1,0,1} on every row keep every cell inside its design sets.
  always_ff @(posedge clk) if (rst_n) assert (&v) else $error("bc13_skew: cell input outside its set");

endmodule
