// norm_sensor: normalization sensor of the most significant arithmetic chip.
//
// Looks at the three most significant digits d2 (top), d1, d0 of a number,
// forms the estimate E = 256*d2 + 16*d1 + d0 and reports whether the number
// is normalized for radix 16, 4 and 2. The document says only that the three
// most significant digits are examined; the criterion is this design's own:
// taking the top digit as weight 1/16, the number is radix-r normalized when
// |E|/4096 >= 1/(2r), i.e. one more shift by r would bring the magnitude to
// at least one half. Combinational.
module norm_sensor
  import cascade_pkg::*;
(
  input  digit6_t d2,
  input  digit6_t d1,
  input  digit6_t d0,
  output logic    n16,
  output logic    n4,
  output logic    n2
);

  int e, m;

  always_comb begin
    e   = 256 * dval(d2) + 16 * dval(d1) + dval(d0);
    m   = (e < 0) ? -e : e;
    n16 = (m * 16 >= 2048);
    n4  = (m * 4 >= 2048);
    n2  = (m * 2 >= 2048);
  end

endmodule
