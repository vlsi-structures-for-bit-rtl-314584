// Serial 2-to-3 basis converter, mod 13.
//
// Converts a 4-bit binary word x (weights 2^3..2^0, MSB first, one bit per
// clock, no gap between words) into three signed digits y0, y1, y2 in
// {-1, 0, 1} of weights 3^0, 3^1, 3^2, so that y0 + 3*y1 + 9*y2 = x (mod 13).
// It is the serial form of the skew-parallel converter: one cell per output
// column. Columns 0 and 1 are type-C cells (2*s + c = s' + 3*c', s in
// {0,1,2}, c in {0,1}) whose state feeds back into themselves; the feedback is
// broken at the start of each word, one clock later for each column, so the
// next word enters with no inter-word delay. Column 2 is a type-A cell that
// only takes the last carry of column 1. Every column's final state
// s in {0,1,2} is read with an offset of -1; the three offsets add up to
// -(1 + 3 + 9) = -13 = 0 (mod 13), so they vanish from the result. The offset
// costs no logic: it is the coding of the output digit (s = 2 gives the +1
// wire, s = 0 the -1 wire).
//
// Timing: with x_first high on the MSB in cycle w, the digits leave LSD first
// on d_out in cycles w+4, w+5, w+6, marked by d_valid, with d_first in cycle
// w+4; cycle w+7 is idle. That is the 3-BF with j = 3, j' = 4.
// The word framing signals (x_first, d_first) are this design's own choice.
module bc13_serial
  import bsmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic x_bit,
  input  logic x_first,
  output sd_t  d_out,
  output logic d_first,
  output logic d_valid
);

  cval_t s0_q, c0_q, s1_q, c1_q, s2_q;
  cval_t s0_d, c0_d, s1_d, c1_d, s2_d, c2_unused;
  logic  v0, v1, v2;
  logic [3:0] first_q;   // x_first delayed by 1..4 cycles
  logic [1:0] phase_q;   // output digit index
  logic       busy_q;

  // column 3^0: type-C cell, feedback broken on the first bit of a word
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET('{0, 1, 2, 0, 0, 0, 0, 0}),
            .NC(2), .C_SET('{0, 1, 0, 0, 0, 0, 0, 0}))
    u_col0 (.s_i(x_first ? cval_t'(0) : s0_q), .c_i(cval_t'(x_bit)),
            .s_o(s0_d), .c_o(c0_d), .valid(v0));

  // column 3^1: type-C cell, one clock behind column 0
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b1),
            .NS(3), .S_SET('{0, 1, 2, 0, 0, 0, 0, 0}),
            .NC(2), .C_SET('{0, 1, 0, 0, 0, 0, 0, 0}))
    u_col1 (.s_i(first_q[0] ? cval_t'(0) : s1_q), .c_i(c0_q),
            .s_o(s1_d), .c_o(c1_d), .valid(v1));

  // column 3^2: type-A cell, no state input and no carry output
  bc_cell #(.ALPHA(2), .BETA(3), .MOD(13), .K(0), .HAS_S(1'b0),
            .NS(2), .S_SET('{0, 1, 0, 0, 0, 0, 0, 0}),
            .NC(0), .C_SET('{0, 0, 0, 0, 0, 0, 0, 0}))
    u_col2 (.s_i(cval_t'(0)), .c_i(c1_q),
            .s_o(s2_d), .c_o(c2_unused), .valid(v2));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s0_q <= '0; c0_q <= '0; s1_q <= '0; c1_q <= '0; s2_q <= '0;
      first_q <= '0;
      phase_q <= '0;
      busy_q  <= 1'b0;
    end else begin
      s0_q <= s0_d; c0_q <= c0_d;
      s1_q <= s1_d; c1_q <= c1_d;
      s2_q <= s2_d;
      first_q <= {first_q[2:0], x_first};
      if (first_q[3]) begin
        phase_q <= 2'd1;
        busy_q  <= 1'b1;
      end else if (busy_q) begin
        phase_q <= phase_q + 2'd1;
        busy_q  <= (phase_q != 2'd2);
      end
    end
  end

  // final column state with its -1 offset
  function automatic sd_t off_digit(cval_t s);
    return val_sd(s - cval_t'(1));
  endfunction

  always_comb begin
    d_first = first_q[3];
    d_valid = first_q[3] || (busy_q && phase_q != 2'd3);
    unique case (first_q[3] ? 2'd0 : phase_q)
      2'd0:    d_out = off_digit(s0_q);
      2'd1:    d_out = off_digit(s1_q);
      2'd2:    d_out = off_digit(s2_q);
      default: d_out = '0;
    endcase
    if (!d_valid) d_out = '0;
  end

  // Every cell input stays inside the sets the cells were designed for.
  assert property (@(posedge clk) disable iff (!rst_n) v0 && v1 && v2);

endmodule
