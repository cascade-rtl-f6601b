// digit_slice: one radix-16 signed-digit position of the arithmetic unit.
//
// Computes, without any carry propagation beyond one neighbour,
//     s = a +/- M      (add/subtract mode)
//     s = a +/- q*M    (multiply mode; divide and square-root recurrences)
// where M is either the column operand b or, for square-root extraction, the
// doubled operand 2b. All digits are in <20.10> (-10..10). The datapath follows
// the slice of the document, top to bottom:
//   adder d0/d1   : 2b = 16*dt + dw (dt in -1..1, dw in -9..9); d1 adds the
//                   doubler transfer from the right neighbour.
//   Single/Double : selects b or the doubled digit.
//   elementary multiplier and adder m0 : q*M (-100..100) = 16*T + pa + pb with
//                   T in <12.6> (-6..6) and pa, pb in <8.4> (-4..4).
//   adder m1      : pa + multiplier transfer from the right (-10..9).
//   two multiplexors (Add/Mul): pass (pb, m1) in multiply mode, (0, M) else.
//   two conditional complementers (Add/Sub).
//   adder a0      : the two digits plus a (-24..24) = 16*t + w, t in <2.1>,
//                   w in <16.8>; adder a1 adds the transfer from the right.
// Purely combinational; transfers leave to the left (more significant)
// neighbour and enter from the right one. The way a product is split into
// the transfer and the two <8.4> digits, and the transfer selection rules,
// are this design's own choices within the digit sets the document prints.
// The doubler transfer out is forced to zero when the position is not
// doubled (a design choice: the newest root digit is never doubled).
module digit_slice
  import cascade_pkg::*;
(
  input  digit6_t           q,          // broadcast multiplier/quotient/root digit
  input  digit6_t           b,          // addend/subtrahend/multiplicand/divisor/root
  input  digit6_t           a,          // addend/partial product/partial remainder
  input  logic              double_sel, // 1: use 2b (square root)
  input  logic              mul_mode,   // 1: multiply path, 0: plain add/subtract
  input  logic              sub,        // 1: complement the operand before a0
  input  logic signed [1:0] dbl_in,     // doubler transfer from the right
  output logic signed [1:0] dbl_out,    // doubler transfer to the left
  input  logic signed [3:0] ml_in,      // multiplier transfer from the right
  output logic signed [3:0] ml_out,     // multiplier transfer to the left
  input  logic signed [1:0] ol_in,      // adder transfer from the right
  output logic signed [1:0] ol_out,     // adder transfer to the left
  output digit6_t           s           // result digit
);

  logic signed [7:0] bv, av, qv;
  logic signed [7:0] two_b, dw, d1, mv;
  logic signed [1:0] dt;
  logic signed [7:0] prod, rem, pa, pb, m1;
  logic signed [3:0] tm;
  logic signed [7:0] lo_in, mid_in, sum0, w;
  logic signed [1:0] t0;

  always_comb begin
    bv = 8'(dval(b));
    av = 8'(dval(a));
    qv = 8'(dval(q));

    // doubler (d0, d1) and Single/Double multiplexor
    two_b = bv + bv;
    if (two_b > 8'sd9)       dt = 2'sd1;
    else if (two_b < -8'sd9) dt = -2'sd1;
    else                     dt = 2'sd0;
    dw      = two_b - 8'(16 * int'(dt));
    d1      = dw + 8'(dbl_in);
    mv      = double_sel ? d1 : bv;
    dbl_out = double_sel ? dt : 2'sd0;

    // elementary multiplier and m0
    prod = qv * mv;
    tm   = 4'((prod + 8'sd8) >>> 4);
    rem  = prod - 8'(16 * int'(tm));
    pa   = rem >>> 1;
    pb   = rem - pa;
    ml_out = tm;

    // m1
    m1 = pa + 8'(ml_in);

    // Add/Mul multiplexors and Add/Sub complementers
    lo_in  = mul_mode ? pb : 8'sd0;
    mid_in = mul_mode ? m1 : mv;
    if (sub) begin
      lo_in  = -lo_in;
      mid_in = -mid_in;
    end

    // a0 and a1
    sum0 = lo_in + mid_in + av;
    if (sum0 > 8'sd8)       t0 = 2'sd1;
    else if (sum0 < -8'sd8) t0 = -2'sd1;
    else                    t0 = 2'sd0;
    w      = sum0 - 8'(16 * int'(t0));
    ol_out = t0;
    s      = dmake(int'(w) + int'(ol_in));
  end

endmodule
