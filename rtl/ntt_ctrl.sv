// Crossbar controller of the 60-point NTT product generator, mod 61.
//
// Output k = i + 6e (i = 0..5, e = 0..9) of the generator must carry
// x[n] * 2^(n*k mod 60). The generator holds, after the GR6 crossbar, the
// product x*2^a_i in converter slot i, and its cyclic-shift unit i offers
// x*2^a_i*3^r = x*2^(a_i + 6r) for r = 0..9 (3 = 2^6 mod 61). With
// j = n*k mod 60 = n*i + 6*n*e (mod 60) this gives
//     GR6  slot i takes product   a_i = (n*i) mod 6
//     GR10 of unit i, output e, takes rotation r = (floor(n*i/6) + n*e) mod 10.
// In all-products mode the word is treated as n = 1, which routes product
// x*2^k straight to output k (no reordering).
//
// Interface: `cap` marks the clock a new input word is held by the BDCS
// block; `frame` (sampled with it) restarts the count at n = 0, otherwise n
// counts 0..59 and wraps. `mode_all` is sampled with it too. gr6_sel follows
// the word held at the BDCS block. Words then take a fixed time to reach the
// cyclic-shift units; `start` marks the clock their output begins to be
// loaded and moves the word's n and mode into the output registers, from
// which gr10_sel and n_out are derived. A four-entry queue links the two
// ends. The controller is this design's own: only the crossbars' purpose is
// given.
module ntt_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cap,
  input  logic       frame,
  input  logic       mode_all,
  input  logic       start,
  output logic [2:0] gr6_sel  [6],
  output logic [3:0] gr10_sel [6][10],
  output logic [5:0] n_out,
  output logic       mode_out
);

  typedef struct packed {
    logic [5:0] n;
    logic       mode;
  } tag_t;

  logic [5:0] n_next_q;
  tag_t       hold_q, out_q;
  tag_t       fifo_q [4];
  logic [1:0] wr_q, rd_q;
  logic [2:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_next_q <= '0;
      hold_q   <= '0;
      out_q    <= '0;
      fifo_q   <= '{default: '0};
      wr_q     <= '0;
      rd_q     <= '0;
      cnt_q    <= '0;
    end else begin
      if (cap) begin
        hold_q.n    <= frame ? 6'd0 : n_next_q;
        hold_q.mode <= mode_all;
        n_next_q    <= frame ? 6'd1 : ((n_next_q == 6'd59) ? 6'd0 : n_next_q + 6'd1);
        fifo_q[wr_q].n    <= frame ? 6'd0 : n_next_q;
        fifo_q[wr_q].mode <= mode_all;
        wr_q <= wr_q + 2'd1;
      end
      if (start) begin
        out_q <= fifo_q[rd_q];
        rd_q  <= rd_q + 2'd1;
      end
      cnt_q <= cnt_q + 3'(cap) - 3'(start);
    end
  end

  function automatic int n_eff(tag_t t);
    return t.mode ? 1 : int'(t.n);
  endfunction

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      gr6_sel[i] = 3'((n_eff(hold_q) * i) % 6);
      for (int e = 0; e < 10; e++)
        gr10_sel[i][e] = 4'(((n_eff(out_q) * i) / 6 + n_eff(out_q) * e) % 10);
    end
  end

  assign n_out    = out_q.n;
  assign mode_out = out_q.mode;

  always_ff @(posedge clk) if (rst_n) begin
    assert (!(start && cnt_q == 3'd0 && !cap)) else $error("ntt_ctrl: start without a word in flight");
    assert (!(cap && !start && cnt_q == 3'd4)) else $error("ntt_ctrl: more than four words in flight");
  end

endmodule
