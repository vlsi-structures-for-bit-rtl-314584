// Shared types and constants for the bit-serial modular multipliers.
//
// A digit of a two-row basis flow (d = 2) travels on two wires. Two codings
// are used in this design:
//   sd_t  : rows weighted Z = [1; -1]; the digit value is pos - neg, so it
//           holds {-1, 0, 1}. Encoders below never emit pos = neg = 1, but
//           decoders accept it as 0.
//   dd_t  : rows weighted Z = [1; 1]; the digit value is a + b, {0, 1, 2}.
//           This is the output coding of the bit duplication stage.
// Basis-converter cells work on small signed integers (cval_t); the wire
// coding of their sets is a choice of this implementation.
package bsmm_pkg;

  typedef struct packed {
    logic neg;  // row of weight -1
    logic pos;  // row of weight +1
  } sd_t;

  typedef struct packed {
    logic b;    // second binary stream, weight 1
    logic a;    // first binary stream, weight 1
  } dd_t;

  // A word of the 2-BF after bit duplication: digit p has weight 2^p.
  typedef dd_t [5:0] dd6_t;
  // A word of the 3-BF, mod 61: digit p has weight 3^p, its -1 row 3^(p+5).
  typedef sd_t [4:0] sd5_t;

  // Signed value carried between basis-converter cells.
  typedef logic signed [7:0] cval_t;

  function automatic cval_t sd_val(sd_t d);
    return cval_t'(d.pos) - cval_t'(d.neg);
  endfunction

  function automatic sd_t val_sd(cval_t v);
    sd_t d;
    d.pos = (v > 0);
    d.neg = (v < 0);
    return d;
  endfunction

  function automatic cval_t dd_val(dd_t d);
    return cval_t'(d.a) + cval_t'(d.b);
  endfunction

endpackage
