// Product generator of a 60-point number-theoretic transform over GF(61).
//
// For every input word x[n] it delivers all sixty kernel products
//     X[n,k] = x[n] * 2^(n*k)  (mod 61),  k = 0..59,
// the generator g = 2 having order 60 mod 61. The multiplication by 2^j is
// split into 2^a * 3^r with j = a + 6r, because 2^6 = 3 (mod 61) and 3 has
// order 10:
//   1. BDCS block: the six small powers 2^a*x, a = 0..5, by bit duplication
//      and cyclic shifting of the binary word (2-BF, Z = [1; 1]).
//   2. GR6 crossbar: chooses for each of the six converter slots the power
//      the current n needs.
//   3. One skew-parallel 2-to-3 basis converter converts the six slots, one
//      per clock, into the 3-BF (five signed digits, rows Z = [1; -1]).
//   4. Six cyclic-shift units: each offers its word times 3^0..3^9 by
//      rotating a ten-position ring.
//   5. Six GR10 crossbars: output e of unit i becomes X[n, i + 6e].
// The crossbars reconfigure for every word (ntt_ctrl). In all-products mode
// they stay in the order that gives output k = x*2^k.
// With SPLIT = 1 stages 1-2 and 4-5 are built from smaller parts instead:
// 2^a = 2^(a mod 2) * 4^(a div 2) with GR2 and GR3 crossbars (bdcs61_split),
// and 3^r = 3^(r mod 5) * (-1)^(r div 5) with GR5 and GR2 crossbars
// (ntt10_unit). The function, interface and timing do not change; the flat
// form (SPLIT = 0) is the default.
//
// Interface: x enters bit-serially, MSB first, x_first on the MSB, a word
// every six clocks or later. frame (with x_first) marks n = 0; mode_all (with
// x_first) selects all-products mode. 23 clocks after x_first the sixty
// products leave digit-serially on X[k], five signed digits LSD first (digit
// p weight 3^p on the +1 wire, -3^p on the -1 wire), X_first on the first
// digit, X_valid on all five, with n_out and mode_out naming the word. The
// product values and the summation that follows them are not part of this
// block. Pipelining, skew registers and framing are this design's own choice.
module ntt61_pg
  import bsmm_pkg::*;
#(
  parameter bit SPLIT = 1'b0   // 1: product and shift stages in split form
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_bit,
  input  logic       x_first,
  input  logic       frame,
  input  logic       mode_all,
  output sd_t        X [60],
  output logic       X_first,
  output logic       X_valid,
  output logic [5:0] n_out,
  output logic       mode_out
);

  // ---- stage 1: bit duplication and cyclic shifts -------------------------
  logic cap;
  logic frame_q, mode_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame_q <= 1'b0;
      mode_q  <= 1'b0;
    end else if (x_first) begin
      frame_q <= frame;
      mode_q  <= mode_all;
    end
  end


  // ---- control ---------------------------------------------------------------
  logic [2:0] gr6_sel  [6];
  logic [3:0] gr10_sel [6][10];
  logic       start;

  ntt_ctrl u_ctrl (
    .clk, .rst_n, .cap, .frame(frame_q), .mode_all(mode_q), .start,
    .gr6_sel, .gr10_sel, .n_out, .mode_out
  );

  // ---- stages 1 and 2: products 2^0..2^5 and GR6 ------------------------------
  logic [11:0] gr6_out [6];
  if (!SPLIT) begin : g_flat12
    dd6_t        prod   [6];
    logic [11:0] gr6_in [6];
    bdcs61 u_bdcs (.clk, .rst_n, .x_bit, .x_first, .prod, .prod_valid(cap));
    for (genvar i = 0; i < 6; i++) begin : g_gr6
      assign gr6_in[i] = prod[i];
    end
    gr_xbar #(.N(6), .W(12)) u_gr6 (.din(gr6_in), .sel(gr6_sel), .dout(gr6_out));
  end else begin : g_split12
    dd6_t slot [6];
    bdcs61_split u_bdcs (.clk, .rst_n, .x_bit, .x_first, .gr6_sel, .slot, .prod_valid(cap));
    for (genvar i = 0; i < 6; i++) begin : g_slot
      assign gr6_out[i] = slot[i];
    end
  end

  // ---- slot sequencing and skew ---------------------------------------------
  logic [2:0] slot_q;
  logic       sbusy_q;
  logic       slot_v;
  logic [2:0] slot_idx;
  dd6_t       bus;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_q  <= '0;
      sbusy_q <= 1'b0;
    end else if (cap) begin
      slot_q  <= 3'd1;
      sbusy_q <= 1'b1;
    end else if (sbusy_q) begin
      slot_q  <= slot_q + 3'd1;
      sbusy_q <= (slot_q != 3'd5);
    end
  end

  assign slot_v   = cap || sbusy_q;
  assign slot_idx = cap ? 3'd0 : slot_q;
  assign bus      = slot_v ? dd6_t'(gr6_out[slot_idx]) : '0;

  // row t (weight 2^(5-t)) is delayed t clocks
  dd_t skew_q [6][5];
  dd_t bc_in  [6];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      skew_q <= '{default: '0};
    end else begin
      for (int t = 1; t < 6; t++) begin
        skew_q[t][0] <= bus[5 - t];
        for (int d = 1; d < t; d++) skew_q[t][d] <= skew_q[t][d-1];
      end
    end
  end
  always_comb begin
    bc_in[0] = bus[5];
    for (int t = 1; t < 6; t++) bc_in[t] = skew_q[t][t-1];
  end

  // ---- stage 3: skew-parallel 2-to-3 basis converter -------------------------
  sd_t bc_out [5];
  bc61_skew u_bc (.clk, .rst_n, .din(bc_in), .dout(bc_out));

  // column k is ready k clocks after column 0: delay it 4-k clocks
  sd_t  dsk_q [5][4];
  sd5_t yword;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dsk_q <= '{default: '0};
    end else begin
      for (int k = 0; k < 4; k++) begin
        dsk_q[k][0] <= bc_out[k];
        for (int d = 1; d < 4 - k; d++) dsk_q[k][d] <= dsk_q[k][d-1];
      end
    end
  end
  always_comb begin
    for (int k = 0; k < 4; k++) yword[k] = dsk_q[k][3-k];
    yword[4] = bc_out[4];
  end

  // slot tag travels with the word: 10 clocks from bus to yword
  typedef struct packed {
    logic       v;
    logic [2:0] idx;
  } stag_t;
  stag_t tag_q [10];
  logic  start_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_q   <= '{default: '0};
      start_q <= 1'b0;
    end else begin
      tag_q[0] <= '{v: slot_v, idx: slot_idx};
      for (int d = 1; d < 10; d++) tag_q[d] <= tag_q[d-1];
      start_q <= tag_q[9].v && (tag_q[9].idx == 3'd5);
    end
  end
  assign start = start_q;

  // ---- stages 4 and 5: cyclic-shift units and GR10 ---------------------------
  logic [5:0] u_first, u_valid;
  for (genvar i = 0; i < 6; i++) begin : g_unit
    logic ucap;
    assign ucap = tag_q[9].v && tag_q[9].idx == 3'(i);
    if (!SPLIT) begin : g_flat45
      sd_t        rot [10];
      logic [1:0] rot_b [10];
      logic [1:0] sel_o [10];
      cs_ring_all u_cs (
        .clk, .rst_n, .word(yword), .cap(ucap), .start,
        .rot, .out_first(u_first[i]), .out_valid(u_valid[i])
      );
      for (genvar r = 0; r < 10; r++) begin : g_r
        assign rot_b[r] = rot[r];
      end
      gr_xbar #(.N(10), .W(2)) u_gr10 (.din(rot_b), .sel(gr10_sel[i]), .dout(sel_o));
      for (genvar e = 0; e < 10; e++) begin : g_out
        assign X[i + 6 * e] = sd_t'(sel_o[e]);
      end
    end else begin : g_split45
      sd_t xo [10];
      ntt10_unit u_ntt10 (
        .clk, .rst_n, .word(yword), .cap(ucap), .start, .sel(gr10_sel[i]),
        .X(xo), .out_first(u_first[i]), .out_valid(u_valid[i])
      );
      for (genvar e = 0; e < 10; e++) begin : g_out
        assign X[i + 6 * e] = xo[e];
      end
    end
  end

  assign X_first = u_first[0];
  assign X_valid = u_valid[0];

  // all six units run in step
  always_ff @(posedge clk) if (rst_n) begin
    assert (u_first == {6{u_first[0]}} && u_valid == {6{u_valid[0]}})
      else $error("ntt61_pg: cyclic-shift units out of step");
  end

endmodule
