// Ten-output cyclic-shift unit of the NTT product generator, mod 61, in split
// form: rotations by 3^0..3^4, a GR5 crossbar, sign units and GR2 crossbars.
//
// It does what one cs_ring_all unit with its GR10 crossbar does: output e
// (e = 0..9) carries y * 3^r_e for the rotation r_e chosen by sel[e]. The
// ten powers of 3 are split as 3^r = 3^(r mod 5) * (-1)^(r div 5), since
// 3^5 = -1 (mod 61):
//   1. the captured word is offered times 3^0..3^4 (rotations of the
//      ten-position ring of cs_ring_all, of which only the first five are
//      taken);
//   2. a GR5 crossbar gives output pair p (outputs p and p + 5) the rotation
//      r_p mod 5;
//   3. a sign unit offers that word times (-1)^0 and (-1)^1; negation of a
//      signed-digit word is the swap of its two rows;
//   4. a GR2 crossbar per pair gives each of the two outputs its sign.
// Outputs p and p + 5 must share r mod 5. In the NTT routing
// r_e = (floor(n*i/6) + n*e) mod 10, so r_(p+5) - r_p = 5n (mod 10) and they
// do; an assertion checks it.
//
// Interface and timing are those of cs_ring_all (cap, start, five digit
// clocks LSD first, out_first, out_valid), with the GR10 selections sel[e] as
// input and the ten selected products on X[e]. The decomposition follows the
// published construction; the mapping of the GR10 selections onto the GR5
// and GR2 settings is this design's own.
module ntt10_unit
  import bsmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sd5_t       word,
  input  logic       cap,
  input  logic       start,
  input  logic [3:0] sel [10],
  output sd_t        X [10],
  output logic       out_first,
  output logic       out_valid
);

  // ---- 3^0 .. 3^4 ----------------------------------------------------------------
  sd_t rot [10];
  cs_ring_all u_ring (.clk, .rst_n, .word, .cap, .start, .rot, .out_first, .out_valid);

  // ---- GR5 -----------------------------------------------------------------------
  logic [1:0] gr5_in  [5];
  logic [1:0] gr5_out [5];
  logic [2:0] sel5    [5];
  for (genvar r = 0; r < 5; r++) begin : g_gr5
    assign gr5_in[r] = rot[r];
    assign sel5[r]   = 3'(sel[r] % 4'd5);
  end
  gr_xbar #(.N(5), .W(2)) u_gr5 (.din(gr5_in), .sel(sel5), .dout(gr5_out));

  // ---- sign units and GR2 ---------------------------------------------------------
  for (genvar p = 0; p < 5; p++) begin : g_pair
    sd_t        w;
    logic [1:0] sgn   [2];
    logic [1:0] o     [2];
    logic       sel2  [2];
    assign w      = sd_t'(gr5_out[p]);
    assign sgn[0] = w;                        // times (-1)^0
    assign sgn[1] = {w.pos, w.neg};           // times (-1)^1: rows swapped
    assign sel2[0] = (sel[p] >= 4'd5);
    assign sel2[1] = (sel[p + 5] >= 4'd5);
    gr_xbar #(.N(2), .W(2)) u_gr2 (.din(sgn), .sel(sel2), .dout(o));
    assign X[p]     = sd_t'(o[0]);
    assign X[p + 5] = sd_t'(o[1]);
  end

  always_ff @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++)
      assert (sel[p] % 4'd5 == sel[p + 5] % 4'd5)
        else $error("ntt10_unit: outputs %0d and %0d need different rotations", p, p + 5);
  end

endmodule
