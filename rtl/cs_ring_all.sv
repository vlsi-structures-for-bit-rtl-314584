// Cyclic-shift unit of the 3-BF, mod 61: all ten products by 3^r at once.
//
// A number y is held as five signed digits z0..z4 (weights 3^0..3^4, rows
// Z = [1; -1]). The two rows form one ring of ten bit positions of weight
// 3^0..3^9, because 3^5 = 243 = -1 (mod 61) and 3^10 = 1: position p < 5 is
// the +1 wire of digit p, position p + 5 its -1 wire. Multiplying by 3^r moves
// every bit r places round the ring (a cyclic shift with row permutation), so
// the ten products y*3^r, r = 0..9, are only wiring of one register.
//
// Interface: `cap` loads a word from `word` into the capture register;
// `start` moves the captured word to the output register. The products then
// leave digit-serially, LSD first, on rot[r], five clocks long, out_first on
// the first digit and out_valid on all five. Capture and output are double
// buffered so a word can be captured while the previous one is sent; the
// word period is six clocks (j = 5, j' = 6). Buffering is this design's own
// choice.
module cs_ring_all
  import bsmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sd5_t word,
  input  logic cap,
  input  logic start,
  output sd_t  rot [10],
  output logic out_first,
  output logic out_valid
);

  sd5_t       cap_q;
  logic [9:0] ring_q;   // bit p has weight 3^p
  logic [2:0] dcnt_q;   // digit being sent
  logic       busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cap_q     <= '0;
      ring_q    <= '0;
      dcnt_q    <= '0;
      busy_q    <= 1'b0;
      out_first <= 1'b0;
    end else begin
      if (cap) cap_q <= word;
      out_first <= start;
      if (start) begin
        for (int p = 0; p < 5; p++) begin
          ring_q[p]     <= cap_q[p].pos;
          ring_q[p + 5] <= cap_q[p].neg;
        end
        dcnt_q <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        dcnt_q <= dcnt_q + 3'd1;
        busy_q <= (dcnt_q != 3'd4);
      end
    end
  end

  assign out_valid = busy_q;

  always_comb begin
    for (int r = 0; r < 10; r++) begin
      rot[r].pos = ring_q[(int'(dcnt_q) - r + 10) % 10];
      rot[r].neg = ring_q[(int'(dcnt_q) + 5 - r + 10) % 10];
      if (!busy_q) rot[r] = '0;
    end
  end

endmodule
