// Digit-serial cyclic shifter: multiplication by basis^e without arithmetic.
//
// A word of J signed digits in a two-row basis flow of basis b, where
// b^J = 1 (mod m), is multiplied by b^e by moving every digit e places up
// within its own row, the most significant digits wrapping round to the
// least significant end (a cyclic shift with no row permutation). Digit k of
// the product is digit (k - e) mod J of the input. Both rows move together,
// so a digit keeps its {-1, 0, 1} value.
//
// Interface: J digits arrive LSD first on consecutive clocks, the first one
// marked by in_first; e and an opaque tag are sampled with it. The cycle
// after the last digit the product starts to leave on d_out, J digits on
// consecutive clocks, LSD first or, with OUT_MSD_FIRST, MSD first, with
// out_first on the first one and the tag beside it. Latency from in_first to
// out_first is J cycles; a new word may start every J cycles or later.
// The word buffer, the framing and the output digit order are this design's
// own choices.
module cs_serial
  import bsmm_pkg::*;
#(
  parameter int J  = 3,            // digits per row
  parameter int EW = 2,            // width of the exponent e
  parameter int TW = 1,            // width of the tag carried along
  parameter bit OUT_MSD_FIRST = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sd_t           d_in,
  input  logic          in_first,
  input  logic [EW-1:0] e,
  input  logic [TW-1:0] tag_in,
  output sd_t           d_out,
  output logic          out_first,
  output logic          out_valid,
  output logic [TW-1:0] tag_out
);

  localparam int CW = $clog2(J + 1);

  sd_t             buf_q [J];
  logic [CW-1:0]   icnt_q;        // digits received of the current word
  logic            icoll_q;       // collecting a word
  logic [EW-1:0]   e_q;
  logic [TW-1:0]   tag_q;
  sd_t             obuf_q [J];    // product, in leaving order
  logic [CW-1:0]   ocnt_q;        // digits still to leave
  logic            ofirst_q;

  logic [CW-1:0]   widx;          // index of the digit arriving now
  logic            last_in;       // the arriving digit completes a word
  logic [EW-1:0]   e_now;
  sd_t             word [J];      // the complete input word
  sd_t             prod [J];      // rotated word, LSD first

  always_comb begin
    widx    = in_first ? '0 : icnt_q;
    last_in = (in_first || icoll_q) && (widx == CW'(J - 1));
    e_now   = in_first ? e : e_q;
    for (int k = 0; k < J; k++) word[k] = buf_q[k];
    word[J-1] = d_in;
    for (int k = 0; k < J; k++) prod[k] = word[(k + J - (int'(e_now) % J)) % J];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < J; k++) begin
        buf_q[k]  <= '0;
        obuf_q[k] <= '0;
      end
      icnt_q   <= '0;
      icoll_q  <= 1'b0;
      e_q      <= '0;
      tag_q    <= '0;
      ocnt_q   <= '0;
      ofirst_q <= 1'b0;
      tag_out  <= '0;
    end else begin
      if (in_first) begin
        e_q   <= e;
        tag_q <= tag_in;
      end
      if (in_first || icoll_q) begin
        for (int k = 0; k < J; k++)
          if (widx == CW'(k)) buf_q[k] <= d_in;
        icnt_q      <= widx + CW'(1);
        icoll_q     <= !last_in;
      end
      ofirst_q <= last_in;
      if (last_in) begin
        for (int k = 0; k < J; k++)
          obuf_q[k] <= OUT_MSD_FIRST ? prod[J-1-k] : prod[k];
        ocnt_q  <= CW'(J);
        tag_out <= in_first ? tag_in : tag_q;
      end else if (ocnt_q != '0) begin
        for (int k = 0; k < J - 1; k++) obuf_q[k] <= obuf_q[k+1];
        obuf_q[J-1] <= '0;
        ocnt_q      <= ocnt_q - CW'(1);
      end
    end
  end

  assign d_out     = (ocnt_q != '0) ? obuf_q[0] : '0;
  assign out_valid = (ocnt_q != '0);
  assign out_first = ofirst_q;

endmodule
