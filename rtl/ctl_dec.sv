// ctl_dec: instruction decoder of an arithmetic chip.
//
// The control chip broadcasts a 10-bit instruction word and a strobe to all
// arithmetic chips (widths from the document). This block splits the word
// into the opcode and register fields, derives the arithmetic unit's modes
// (multiply path, complement, doubling) and holds the broadcast digit: a
// SETMPD instruction carries a <31.10> digit code in its low five bits, which
// is converted to the six-signal form and kept for the following multiply,
// divide or root steps (the document's chip figure draws a code converter
// inside the decoder). The register fields leave as plain slices of the
// word. The bit layout is this design's own (see cascade_pkg).
// Timing: the decode is combinational; the digit register loads on the
// rising clock edge when strobe is high. 'en' is high for one strobed cycle.
module ctl_dec
  import cascade_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               strobe,
  input  logic [INSTR_W-1:0] instr,
  output iop_t               op,
  output logic               en,
  output logic [1:0]         f_hi,      // bits [5:4]
  output logic [1:0]         f_mid,     // bits [3:2]
  output logic [1:0]         f_lo,      // bits [1:0]
  output logic               shift_right,
  output logic               shift_half,
  output logic               au_mul,
  output logic               au_sub,
  output logic               au_dbl,
  output logic               au_write,  // result goes to register f_hi
  output digit6_t            mpd
);

  always_comb begin
    op          = iop_t'(instr[9:6]);
    en          = strobe;
    f_hi        = instr[5:4];
    f_mid       = instr[3:2];
    f_lo        = instr[1:0];
    shift_right = instr[1];
    shift_half  = instr[0];
    au_mul      = op inside {I_MULADD, I_MULSUB, I_ROOT};
    au_sub      = (op inside {I_SUB, I_MULSUB, I_ROOT}) || (op == I_STAU && instr[4]);
    au_dbl      = (op == I_ROOT);
    au_write    = op inside {I_ADD, I_SUB, I_MULADD, I_MULSUB, I_ROOT};
  end

  always_ff @(posedge clk) begin
    if (rst)                           mpd <= '0;
    else if (strobe && op == I_SETMPD) mpd <= lx(instr[4:0]);
  end

endmodule
