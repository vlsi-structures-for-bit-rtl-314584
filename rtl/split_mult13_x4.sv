// Four independent bit-serial split multipliers over GF(13) sharing one
// skew-parallel 3-to-8 basis converter: r_l = x_l * 3^e2_l * 8^e1_l (mod 13)
// for lanes l = 0..3.
//
// Each lane is the chain of split_mult13 (serial 2-to-3 converter, cyclic
// shift by e2 with J = 3, 3-to-8 conversion, cyclic shift by e1 with J = 4),
// except that the 3-to-8 converter is shared. The converter takes a new word
// every clock, while a lane produces one word every 4 clocks; a lane's word,
// sent MSD first, uses input row t of the converter t clocks after its first
// digit. Two words therefore only meet if they start in the same clock, so
// the lanes share the converter without losing throughput as long as no two
// lanes start a word in the same clock. Row t of the converter is driven by
// the lane that is sending its digit t; each lane reads output column k of
// the converter 3 + k clocks after its word entered, as split_mult13 does.
//
// Interface: per lane, x_first[l] marks the MSB of a 4-bit word on x_bit[l]
// (MSB first, a word every 4 clocks or later); e1[l] (0..3) and e2[l] (0..2)
// are sampled with it. At most one lane may raise x_first in any clock (an
// assertion checks it); four lanes started on four different clock phases
// keep the converter fully busy. Each result leaves on r_out[l] as four
// signed basis-8 digits, LSD first, r_first[l] on the first, 14 clocks after
// x_first[l]. Sharing the converter among four multipliers follows the
// published construction; the row multiplexing and the start rule are this
// design's own.
module split_mult13_x4
  import bsmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] x_bit,
  input  logic [3:0] x_first,
  input  logic [1:0] e1 [4],
  input  logic [1:0] e2 [4],
  output sd_t        r_out [4],
  output logic [3:0] r_first,
  output logic [3:0] r_valid
);

  sd_t        z_dout [4];      // shared converter outputs, column k
  sd_t        row_d  [4][3];   // lane l's contribution to converter row t

  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [1:0] e1_q, e2_q;
    sd_t        a_d;
    logic       a_first, a_valid;
    sd_t        y_d;
    logic       y_first, y_valid;
    logic [1:0] y_e1;
    logic [1:0] yidx_q;        // digit of the y word being sent
    logic [1:0] yidx;
    logic [2:0] zf_q;
    logic [1:0] ze1_q [3];
    logic [1:0] zph_q;
    logic       zbusy_q;
    sd_t        z_d;
    logic       z_first;
    logic       r_unused_tag;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        e1_q <= '0;
        e2_q <= '0;
      end else if (x_first[l]) begin
        e1_q <= e1[l];
        e2_q <= e2[l];
      end
    end

    bc13_serial u_bc23 (
      .clk, .rst_n, .x_bit(x_bit[l]), .x_first(x_first[l]),
      .d_out(a_d), .d_first(a_first), .d_valid(a_valid)
    );

    cs_serial #(.J(3), .EW(2), .TW(2), .OUT_MSD_FIRST(1'b1)) u_cs3 (
      .clk, .rst_n, .d_in(a_d), .in_first(a_first), .e(e2_q), .tag_in(e1_q),
      .d_out(y_d), .out_first(y_first), .out_valid(y_valid), .tag_out(y_e1)
    );

    // digit t of the y word (MSD first) drives converter row t
    assign yidx = y_first ? 2'd0 : yidx_q;
    always_ff @(posedge clk) begin
      if (!rst_n) yidx_q <= '0;
      else if (y_valid) yidx_q <= yidx + 2'd1;
    end
    for (genvar t = 0; t < 3; t++) begin : g_row
      assign row_d[l][t] = (y_valid && yidx == 2'(t)) ? y_d : sd_t'('0);
    end

    // read the shared converter's columns in turn
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
      .d_out(r_out[l]), .out_first(r_first[l]), .out_valid(r_valid[l]), .tag_out(r_unused_tag)
    );

    // per-lane word spacing and framing
    logic [2:0] xf_hist_q;
    always_ff @(posedge clk) begin
      if (!rst_n) xf_hist_q <= '0;
      else        xf_hist_q <= {xf_hist_q[1:0], x_first[l]};
    end
    always_ff @(posedge clk) if (rst_n) begin
      assert (!(x_first[l] && (|xf_hist_q))) else $error("split_mult13_x4: lane %0d words closer than 4 clocks", l);
      assert (!a_first || a_valid) else $error("split_mult13_x4: lane %0d converter framing broken", l);
    end
  end

  // ---- shared skew-parallel 3-to-8 converter --------------------------------
  sd_t bc_in [3];
  always_comb begin
    for (int t = 0; t < 3; t++) begin
      bc_in[t] = '0;
      for (int l = 0; l < 4; l++) bc_in[t] = bc_in[t] | row_d[l][t];
    end
  end
  bc13_skew u_bc38 (.clk, .rst_n, .din(bc_in), .dout(z_dout));

  // one word start per clock across the lanes, so no two lanes share a row
  always_ff @(posedge clk) if (rst_n) begin
    assert ((x_first & (x_first - 4'd1)) == 4'd0)
      else $error("split_mult13_x4: two lanes started a word in the same clock");
  end

endmodule
