// Split bit duplication and cyclic shift (BDCS) block with its crossbars,
// mod 61: the GR6 stage of the NTT product generator built from smaller parts.
//
// Every small power 2^a, a = 0..5, is split as 2^a = 2^a0 * 4^a1 with
// a0 in {0, 1} and a1 in {0, 1, 2}. A BDCS block for 2^0 and 2^1 (bdcs61 with
// two products) feeds a GR2 crossbar; each of its two outputs drives a BDCS
// stage for 4^0, 4^1 and 4^2, followed by a GR3 crossbar. The six GR3 outputs
// are the six converter slots, slot i = g + 2j for output j of branch g.
//
// A BDCS stage by 4^a1 works on a word held as two binary rows (a, b):
//     a' = a rotated left by 2*a1 places
//     b' = the 2*a1 bits of a that wrapped round, placed at bits 1..2*a1,
//          plus b shifted left by 2*a1 places (no wrap)
// The rows stay two only because b, coming from the 2^1 product, holds at
// most bit 1: it neither wraps nor meets a duplicated bit. Assertions watch
// both. The result is bit for bit the two-row word of the flat bdcs61 block.
//
// The crossbar settings follow from the GR6 selections of the flat form
// (gr6_sel[i] = a for slot i): branch g's GR2 takes 2^(a mod 2) of slot g,
// and GR3 output j of branch g takes 4^(a div 2) of slot g + 2j. This needs
// all slots of a branch to have the same a mod 2, which holds for the NTT
// routing (a_i = n*i mod 6 has the parity of n*g); an assertion checks it.
//
// Interface and timing are those of bdcs61 followed by the GR6 crossbar: the
// slot words are valid from the clock after the last input bit for six
// clocks, prod_valid high on the first. The split into 2^0/2^1 and 4^0..4^2
// stages with GR2 and GR3 follows the published construction; deriving their
// settings from the GR6 selections is this design's own choice.
module bdcs61_split
  import bsmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_bit,
  input  logic       x_first,
  input  logic [2:0] gr6_sel [6],
  output dd6_t       slot [6],
  output logic       prod_valid
);

  // ---- 2^0 and 2^1 -----------------------------------------------------------
  dd6_t p2 [2];
  bdcs61 #(.NP(2)) u_bdcs2 (.clk, .rst_n, .x_bit, .x_first, .prod(p2), .prod_valid);

  // ---- GR2 -------------------------------------------------------------------
  logic [11:0] gr2_in  [2];
  logic [11:0] gr2_out [2];
  logic        sel2    [2];
  for (genvar g = 0; g < 2; g++) begin : g_gr2
    assign gr2_in[g] = p2[g];
    assign sel2[g]   = gr6_sel[g][0];
  end
  gr_xbar #(.N(2), .W(12)) u_gr2 (.din(gr2_in), .sel(sel2), .dout(gr2_out));

  // ---- 4^0, 4^1, 4^2 and GR3, per branch --------------------------------------
  for (genvar g = 0; g < 2; g++) begin : g_branch
    dd6_t        w;
    logic [11:0] q   [3];
    logic [11:0] o   [3];
    logic [1:0]  sel3 [3];
    assign w = dd6_t'(gr2_out[g]);

    for (genvar k = 0; k < 3; k++) begin : g_pow4
      dd6_t r;
      always_comb begin
        for (int p = 0; p < 6; p++) begin
          r[p].a = w[(p - 2 * k + 6) % 6].a;
          r[p].b = ((p >= 1 && p <= 2 * k) ? w[p + 5 - 2 * k].a : 1'b0)
                 | ((p >= 2 * k) ? w[p - 2 * k].b : 1'b0);
        end
      end
      assign q[k] = r;
    end

    for (genvar j = 0; j < 3; j++) begin : g_sel
      assign sel3[j] = gr6_sel[g + 2 * j][2:1];
      assign slot[g + 2 * j] = dd6_t'(o[j]);
    end
    gr_xbar #(.N(3), .W(12)) u_gr3 (.din(q), .sel(sel3), .dout(o));

    // the second row of the branch word must not wrap or meet a duplicated bit
    always_ff @(posedge clk) if (rst_n) begin
      assert (w[0].b == 1'b0 && w[5].b == 1'b0 && w[4].b == 1'b0 && w[3].b == 1'b0
              && w[2].b == 1'b0)
        else $error("bdcs61_split: second row outside bit 1");
    end
  end

  // the slots of one branch share the GR2 choice
  always_ff @(posedge clk) if (rst_n) begin
    for (int i = 2; i < 6; i++)
      assert (gr6_sel[i][0] == gr6_sel[i % 2][0])
        else $error("bdcs61_split: slot %0d needs another 2^0/2^1 choice", i);
  end

endmodule
