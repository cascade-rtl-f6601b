// arith_unit: the arithmetic unit of one arithmetic chip, a row of sixteen
// radix-16 digit slices (digit 15 is the most significant).
//
// The three transfer chains (doubler, multiplier, adder) run from slice i to
// slice i+1 inside the chip; at the chip edges they become the transfer
// ports to the neighbouring chips, so chips can be abutted into any width
// while an addition still takes the same constant time.
// Besides the sum the unit detects:
//   zero   : all sixteen result digits are zero (the document places a zero
//            detecting ROM at every digit position);
//   sdv_ok : this chip does not prevent the whole result from being a single
//            digit value. On the least significant chip (lsd=1) digits 2..15
//            must be zero and 16*s1 + s0 must lie in -10..10 (the small single
//            digit value ROM of the document); on other chips every digit must
//            be zero. The open-drain sdv bus is the AND of all chips' sdv_ok.
//   sdv_val: that single-digit value, meaningful on the least significant chip.
// Combinational.
module arith_unit
  import cascade_pkg::*;
#(
  parameter int ND = DIGITS_PER_CHIP
) (
  input  digit6_t           q,
  input  digit6_t [ND-1:0]  a,
  input  digit6_t [ND-1:0]  b,
  input  logic    [ND-1:0]  double_sel,
  input  logic              mul_mode,
  input  logic              sub,
  input  logic              lsd,
  input  logic signed [1:0] dbl_in,
  output logic signed [1:0] dbl_out,
  input  logic signed [3:0] ml_in,
  output logic signed [3:0] ml_out,
  input  logic signed [1:0] ol_in,
  output logic signed [1:0] ol_out,
  output digit6_t [ND-1:0]  s,
  output logic              zero,
  output logic              sdv_ok,
  output logic signed [4:0] sdv_val
);

  logic signed [1:0] dbl_c [ND+1];
  logic signed [3:0] ml_c  [ND+1];
  logic signed [1:0] ol_c  [ND+1];

  assign dbl_c[0] = dbl_in;
  assign ml_c[0]  = ml_in;
  assign ol_c[0]  = ol_in;

  for (genvar i = 0; i < ND; i++) begin : g_slice
    digit_slice u_slice (
      .q         (q),
      .b         (b[i]),
      .a         (a[i]),
      .double_sel(double_sel[i]),
      .mul_mode  (mul_mode),
      .sub       (sub),
      .dbl_in    (dbl_c[i]),
      .dbl_out   (dbl_c[i+1]),
      .ml_in     (ml_c[i]),
      .ml_out    (ml_c[i+1]),
      .ol_in     (ol_c[i]),
      .ol_out    (ol_c[i+1]),
      .s         (s[i])
    );
  end

  assign dbl_out = dbl_c[ND];
  assign ml_out  = ml_c[ND];
  assign ol_out  = ol_c[ND];

  logic [ND-1:0] dz;
  int            low2;

  always_comb begin
    for (int i = 0; i < ND; i++) dz[i] = (dval(s[i]) == 0);
    zero = &dz;
    low2 = 16 * dval(s[1]) + dval(s[0]);
    if (lsd) sdv_ok = (&dz[ND-1:2]) && (low2 >= -10) && (low2 <= 10);
    else     sdv_ok = zero;
    sdv_val = 5'(low2);
  end

endmodule
