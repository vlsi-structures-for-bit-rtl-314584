// Dynamic crossbar matrix GRn.
//
// n inputs and n outputs of W bits; output o carries input sel[o]. Several
// outputs may take the same input, so the matrix can also broadcast. The
// selections are set by a controller once per data word. Combinational.
// The mux-per-output structure is this design's own choice; only the
// function is given for the crossbars.
module gr_xbar #(
  parameter int N  = 6,
  parameter int W  = 2,
  parameter int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  din  [N],
  input  logic [SW-1:0] sel  [N],
  output logic [W-1:0]  dout [N]
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      dout[o] = '0;
      for (int i = 0; i < N; i++)
        if (sel[o] == SW'(i)) dout[o] = din[i];
    end
  end

endmodule
