// Top level: the bit-serial modular multiplier structures side by side.
//
//   m13_*  : split multiplier over GF(13), r = x * 3^e2 * 8^e1 (mod 13),
//            4-bit words MSB first every 4 clocks, result as four signed
//            basis-8 digits LSD first, 14 clocks later (split_mult13).
//   m13x4_*: four independent GF(13) split multipliers with the same word
//            format and latency, sharing one 3-to-8 converter; at most one
//            lane may start a word on any clock (split_mult13_x4).
//   m61_*  : product generator of a 60-point NTT over GF(61), 6-bit words MSB
//            first every 6 clocks, sixty products x[n]*2^(n*k) as five signed
//            basis-3 digits LSD first, 23 clocks later (ntt61_pg).
// They share only the clock and the synchronous, active-low reset.
module bsmm_top
  import bsmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // GF(13) split multiplier
  input  logic       m13_x_bit,
  input  logic       m13_x_first,
  input  logic [1:0] m13_e1,
  input  logic [1:0] m13_e2,
  output sd_t        m13_r,
  output logic       m13_r_first,
  output logic       m13_r_valid,
  // four GF(13) split multipliers sharing one 3-to-8 converter
  input  logic [3:0] m13x4_x_bit,
  input  logic [3:0] m13x4_x_first,
  input  logic [1:0] m13x4_e1 [4],
  input  logic [1:0] m13x4_e2 [4],
  output sd_t        m13x4_r [4],
  output logic [3:0] m13x4_r_first,
  output logic [3:0] m13x4_r_valid,
  // GF(61) NTT product generator
  input  logic       m61_x_bit,
  input  logic       m61_x_first,
  input  logic       m61_frame,
  input  logic       m61_mode_all,
  output sd_t        m61_X [60],
  output logic       m61_X_first,
  output logic       m61_X_valid,
  output logic [5:0] m61_n,
  output logic       m61_mode
);

  split_mult13 u_m13 (
    .clk, .rst_n,
    .x_bit(m13_x_bit), .x_first(m13_x_first), .e1(m13_e1), .e2(m13_e2),
    .r_out(m13_r), .r_first(m13_r_first), .r_valid(m13_r_valid)
  );

  split_mult13_x4 u_m13x4 (
    .clk, .rst_n,
    .x_bit(m13x4_x_bit), .x_first(m13x4_x_first), .e1(m13x4_e1), .e2(m13x4_e2),
    .r_out(m13x4_r), .r_first(m13x4_r_first), .r_valid(m13x4_r_valid)
  );

  ntt61_pg u_m61 (
    .clk, .rst_n,
    .x_bit(m61_x_bit), .x_first(m61_x_first), .frame(m61_frame), .mode_all(m61_mode_all),
    .X(m61_X), .X_first(m61_X_first), .X_valid(m61_X_valid),
    .n_out(m61_n), .mode_out(m61_mode)
  );

endmodule
