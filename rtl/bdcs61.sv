// Bit duplication and cyclic shift (BDCS) block, mod 61.
//
// Produces the six small powers 2^i * x (i = 0..5) of a 6-bit input word
// x = x5..x0 without an adder. Since 2^6 = 64 = 3 = 2 + 1 (mod 61), a bit
// pushed out of the top of the word by a left shift re-enters both at the
// bottom (cyclic shift) and one place higher. Product i is therefore kept as
// two binary words whose sum it is (a digit of value {0,1,2}, rows Z = [1; 1]):
//     a = x rotated left by i places
//     b = the i bits x5..x(6-i) that wrapped round, placed at bits i..1
// e.g. 2^2*x = (x3 x2 x1 x0 x5 x4) + (0 0 0 x5 x4 0). The addition is left to
// the basis converter that follows.
//
// Interface: x arrives bit-serially, MSB first, with x_first on x5; words may
// follow each other with no gap (j = j' = 6). The clock after the LSD the six
// products appear on prod[i] (digit p of weight 2^p) and stay there for six
// clocks; prod_valid is high for the first of them. NP (default 6) sets how
// many of the products are brought out; NP = 2 gives the small 2^0/2^1
// block of the split form (bdcs61_split). The word buffer and
// framing are this design's own choices; the products are those of the
// bit-duplication scheme.
module bdcs61
  import bsmm_pkg::*;
#(
  parameter int NP = 6    // products 2^0..2^(NP-1) that are brought out
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_bit,
  input  logic x_first,
  output dd6_t prod [NP],
  output logic prod_valid
);

  logic [4:0] sh_q;     // incoming bits
  logic [2:0] cnt_q;    // bits received of the current word
  logic       coll_q;
  logic [5:0] x_q;      // captured word
  logic       last;
  logic [2:0] idx;

  assign idx  = x_first ? 3'd0 : cnt_q;
  assign last = (x_first || coll_q) && (idx == 3'd5);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh_q       <= '0;
      cnt_q      <= '0;
      coll_q     <= 1'b0;
      x_q        <= '0;
      prod_valid <= 1'b0;
    end else begin
      prod_valid <= last;
      if (x_first || coll_q) begin
        sh_q   <= {sh_q[3:0], x_bit};
        cnt_q  <= idx + 3'd1;
        coll_q <= !last;
      end
      if (last) x_q <= {sh_q[4:0], x_bit};
    end
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      for (int p = 0; p < 6; p++) begin
        prod[i][p].a = x_q[(p - i + 6) % 6];
        prod[i][p].b = (p >= 1 && p <= i) ? x_q[5 - i + p] : 1'b0;
      end
    end
  end

endmodule
