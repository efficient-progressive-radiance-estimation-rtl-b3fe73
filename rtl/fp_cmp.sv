// fp_cmp: combinational IEEE 754 single-precision comparator, le = (a <= b).
//
// Used by the PREU to decide whether a photon lies inside the radius of a
// hit-point (D^2 <= R^2).  It has no pipeline stage, as in the engine's unit
// table.  NaN operands compare false and -0 equals +0; denormals count as
// zero (this design's choice, matching the other units).
module fp_cmp
  import fp32_pkg::*;
(
    input  fp32_t a,
    input  fp32_t b,
    output logic  le
);

  always_comb le = fp_le_f(a, b);

endmodule
