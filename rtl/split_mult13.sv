// Bit-serial split multiplier over GF(13): r = x * 3^e2 * 8^e1 (mod 13).
//
// A fixed multiplication by q = 2^e (mod 13) is split into two cyclic-shift
// stages of small order, using 2 as generator, g2 = 2^4 = 3 (order 3) and
// g1 = 2^3 = 8 (order 4), with e = 3*e1 + 4*e2 (mod 12). Neither stage needs
// an adder: multiplying a number held in basis b by b^e is a rotation of its
// digits once b^J = 1 (mod 13) for the word length J. The chain is
//   x (4-bit binary, MSB first, one word every 4 clocks)
//   -> serial 2-to-3 converter    : 3 signed digits, basis 3, Z = [1; -1]
//   -> cyclic shift by e2 (J = 3) : y = x * 3^e2
//   -> skew-parallel 3-to-8 conv. : 4 signed digits, basis 8, Z = [1; -1]
//   -> cyclic shift by e1 (J = 4) : r = y * 8^e1
// The word period is 4 clocks throughout (j' = 4), against 12 clocks for a
// single cyclic-shift multiplier over the whole order 12 of 2 mod 13.
//
// With BC23_SKEW = 1 the first converter is the unfolded, skew-parallel
// array (bc13_skew23) fed from the one serial input wire, instead of the
// serial converter; digits and timing are the same.
//
// Interface: x_first marks the MSB of each input word; e1 (0..3) and e2
// (0..2) are sampled with it. The result leaves on r_out as four signed
// digits, LSD first (weights 8^0..8^3), r_first on the first of them, 14
// clocks after x_first. Words may follow each other every 4 clocks. The
// exponent framing and the digit orders between the stages are this design's
// own choices.
module split_mult13
  import bsmm_pkg::*;
#(
  parameter bit BC23_SKEW = 1'b0   // 1: skew-parallel 2-to-3 converter in front
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_bit,
  input  logic       x_first,
  input  logic [1:0] e1,
  input  logic [1:0] e2,
  output sd_t        r_out,
  output logic       r_first,
  output logic       r_valid
);

  logic [1:0] e1_q, e2_q;
  sd_t        a_d;              // basis-3 digits, LSD first
  logic       a_first, a_valid;
  sd_t        y_d;              // y = x*3^e2, MSD first
  logic       y_first, y_valid;
  logic [1:0] y_e1;
  sd_t        z_dout [4];       // basis-8 digits, skewed
  logic [2:0] zf_q;             // y_first delayed
  logic [1:0] ze1_q [3];
  logic [1:0] zph_q;
  logic       zbusy_q;
  sd_t        z_d;              // basis-8 digits, LSD first
  logic       z_first;
  logic       r_unused_tag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e1_q <= '0;
      e2_q <= '0;
    end else if (x_first) begin
      e1_q <= e1;
      e2_q <= e2;
    end
  end

  if (!BC23_SKEW) begin : g_bc23_serial
    bc13_serial u_bc23 (
      .clk, .rst_n, .x_bit, .x_first,
      .d_out(a_d), .d_first(a_first), .d_valid(a_valid)
    );
  end else begin : g_bc23_skew
    // a serial word, MSB first, is the skewed form of its four rows
    logic       row_in [4];
    sd_t        a_dout [3];
    logic [5:0] xf_q;              // x_first delayed 1..6 clocks
    assign row_in = '{default: x_bit};
    bc13_skew23 u_bc23 (.clk, .rst_n, .din(row_in), .dout(a_dout));
    always_ff @(posedge clk) begin
      if (!rst_n) xf_q <= '0;
      else        xf_q <= {xf_q[4:0], x_first};
    end
    // digit k of the word leaves column k 4 + k clocks after its MSB
    assign a_first = xf_q[3];
    assign a_valid = |xf_q[5:3];
    assign a_d     = xf_q[3] ? a_dout[0] : xf_q[4] ? a_dout[1] : xf_q[5] ? a_dout[2] : sd_t'('0);
  end

  cs_serial #(.J(3), .EW(2), .TW(2), .OUT_MSD_FIRST(1'b1)) u_cs3 (
    .clk, .rst_n, .d_in(a_d), .in_first(a_first), .e(e2_q), .tag_in(e1_q),
    .d_out(y_d), .out_first(y_first), .out_valid(y_valid), .tag_out(y_e1)
  );

  // A digit-serial word, MSD first, is already in skew-parallel form.
  bc13_skew u_bc38 (
    .clk, .rst_n, .din('{y_d, y_d, y_d}), .dout(z_dout)
  );

  // The converter's columns finish on consecutive clocks: read them in turn.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zf_q    <= '0;
      ze1_q   <= '{default: '0};
      zph_q   <= '0;
      zbusy_q <= 1'b0;
    end else begin
      zf_q     <= {zf_q[1:0], y_first};
      ze1_q[0] <= y_e1;
      ze1_q[1] <= ze1_q[0];
      ze1_q[2] <= ze1_q[1];
      if (zf_q[2]) begin
        zph_q   <= 2'd1;
        zbusy_q <= 1'b1;
      end else if (zbusy_q) begin
        zph_q   <= zph_q + 2'd1;
        zbusy_q <= (zph_q != 2'd3);
      end
    end
  end

  assign z_first = zf_q[2];
  assign z_d     = z_dout[z_first ? 2'd0 : zph_q];

  cs_serial #(.J(4), .EW(2), .TW(1), .OUT_MSD_FIRST(1'b0)) u_cs8 (
    .clk, .rst_n, .d_in(z_d), .in_first(z_first), .e(ze1_q[2]), .tag_in(1'b0),
    .d_out(r_out), .out_first(r_first), .out_valid(r_valid), .tag_out(r_unused_tag)
  );

  // Input rule: words are at least 4 clocks apart (the word period j' = 4).
  logic [2:0] xf_hist_q;
  always_ff @(posedge clk) begin
    if (!rst_n) xf_hist_q <= '0;
    else        xf_hist_q <= {xf_hist_q[1:0], x_first};
  end
  always_ff @(posedge clk) if (rst_n) begin
    assert (!(x_first && (|xf_hist_q))) else $error("split_mult13: words closer than 4 clocks");
    // every stage's first digit lies inside its valid window
    assert (!a_first || a_valid) else $error("split_mult13: converter framing broken");
    assert (!y_first || y_valid) else $error("split_mult13: shifter framing broken");
  end

endmodule
