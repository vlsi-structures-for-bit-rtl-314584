// Basis-converter cell: one node of a systolic basis converter.
//
// The cell maps an input state s_i and an input carry c_i onto an output state
// s_o and an output carry c_o such that
//     ALPHA*s_i + c_i + K  ==  s_o + BETA*c_o   (mod MOD)
// with s_o taken from the set S_SET and c_o from the set C_SET. This is the
// cell rule of the converter (K is the cell offset, zero for a plain cell).
// The cell is a small look-up table: its contents are found at elaboration by
// searching the two sets, first for an exact integer solution and, failing
// that, for one modulo MOD. A cell without a state input (HAS_S = 0) ignores
// s_i; a cell without a carry output (NC = 0) returns c_o = 0. An input pair
// outside the sets the cell was designed for has no entry: `valid` is then
// low and both outputs are 0.
//
// Sets are given as arrays of up to eight entries of which the first NS (NC)
// are used. The search order decides between solutions of equal standing;
// the sets of this design admit only one. The cell is purely combinational;
// the arrays that use it register its outputs.
module bc_cell
  import bsmm_pkg::*;
#(
  parameter int ALPHA = 2,
  parameter int BETA  = 3,
  parameter int MOD   = 13,
  parameter int K     = 0,
  parameter bit HAS_S = 1'b1,
  parameter int NS    = 3,
  parameter int S_SET [8] = '{0, 1, 2, 0, 0, 0, 0, 0},
  parameter int NC    = 2,
  parameter int C_SET [8] = '{0, 1, 0, 0, 0, 0, 0, 0}
) (
  input  cval_t s_i,
  input  cval_t c_i,
  output cval_t s_o,
  output cval_t c_o,
  output logic  valid
);

  localparam int NCE = (NC == 0) ? 1 : NC;

  function automatic int modm(int v);
    int r;
    r = v % MOD;
    return (r < 0) ? r + MOD : r;
  endfunction

  int v;

  always_comb begin
    v     = (HAS_S ? ALPHA * int'(s_i) : 0) + int'(c_i) + K;
    valid = 1'b0;
    s_o   = '0;
    c_o   = '0;
    // exact solutions first
    for (int a = 0; a < NS; a++) begin
      for (int b = 0; b < NCE; b++) begin
        if (!valid && (S_SET[a] + BETA * ((NC == 0) ? 0 : C_SET[b]) == v)) begin
          valid = 1'b1;
          s_o   = cval_t'(S_SET[a]);
          c_o   = cval_t'(((NC == 0) ? 0 : C_SET[b]));
        end
      end
    end
    // then solutions modulo MOD
    for (int a = 0; a < NS; a++) begin
      for (int b = 0; b < NCE; b++) begin
        if (!valid && (modm(S_SET[a] + BETA * ((NC == 0) ? 0 : C_SET[b]) - v) == 0)) begin
          valid = 1'b1;
          s_o   = cval_t'(S_SET[a]);
          c_o   = cval_t'(((NC == 0) ? 0 : C_SET[b]));
        end
      end
    end
  end

endmodule
