// cascade_pkg: types, constants and digit conversions shared by the Cascade
// variable-precision arithmetic system.
//
// Numbers are radix-16 redundant signed-digit integers whose digits take the
// 21 values -10..10 (digit set <20.10>). Inside the arithmetic chip a digit is
// carried as six signals, viewed as two radix-4 digits of the set <4.2>
// (values -2..2): value = 4*hi + lo. In digit memory a digit is stored as a
// five-bit code of the set <31.10>: code = value + 10. Both views follow the
// document; the exact bit assignment of the six signals (two 3-bit two's
// complement fields) is this design's own choice.
//
// The 10-bit instruction word broadcast by the control chip, its opcodes and
// the message codes of the external port are this design's own encodings:
// the document gives their widths and names, not their bit patterns.
package cascade_pkg;

  localparam int DIGITS_PER_CHIP = 16;   // digits per arithmetic chip (document)
  localparam int CODE_W          = 5;    // stored digit code width (document)
  localparam int INSTR_W         = 10;   // instruction word width (document)
  localparam int MSG_W           = 20;   // message port data width (document)

  // Six-signal digit: two radix-4 digits in <4.2>, value = 4*hi + lo.
  typedef struct packed {
    logic signed [2:0] hi;
    logic signed [2:0] lo;
  } digit6_t;

  typedef logic [CODE_W-1:0] dcode_t;    // <31.10> storage code

  // Transfer-digit sign code used on the sign chain.
  typedef enum logic [1:0] {
    SGN_ZERO = 2'b00,
    SGN_POS  = 2'b01,
    SGN_NEG  = 2'b11
  } sign_t;

  // Instruction opcodes (bits [9:6] of the instruction word).
  typedef enum logic [3:0] {
    I_NOP    = 4'h0,  // no operation
    I_LOAD   = 4'h1,  // [1:0] rd  <- digit memory bus
    I_STORE  = 4'h2,  // [1:0] rs  -> digit memory bus
    I_STAU   = 4'h3,  // arithmetic unit output -> memory bus; [3:2] ra, [1:0] rb, [4] sub
    I_ADD    = 4'h4,  // [5:4] rd <- ra[3:2] + rb[1:0]
    I_SUB    = 4'h5,  // [5:4] rd <- ra - rb
    I_MULADD = 4'h6,  // [5:4] rd <- ra + mpd * rb
    I_MULSUB = 4'h7,  // [5:4] rd <- ra - mpd * rb   (division recurrence)
    I_ROOT   = 4'h8,  // [5:4] rd <- ra - mpd * dbl(rb)  (square-root recurrence)
    I_SETMPD = 4'h9,  // [4:0] broadcast digit code (<31.10>)
    I_SHIFT  = 4'hA,  // [5:4] reg sp0, [3:2] reg sp1, [1] 1=right, [0] 1=half digit
    I_SHIFT1 = 4'hB,  // [5:4] reg on sp0 only, [1] 1=right, [0] 1=half digit
    I_CLR    = 4'hC,  // [1:0] rd <- 0
    I_SENSE  = 4'hD,  // [1:0] register watched by sign/lz/normalization sensors
    I_RDPCLR = 4'hE,  // clear root digit position register
    I_RDPINS = 4'hF   // [1:0] rd: store mpd at the insertion position, advance token
  } iop_t;

  // Message codes (first request cycle, bits [4:0]); bit 5 = return a
  // future, bit 6 = destroy the arguments afterwards.
  typedef enum logic [4:0] {
    M_CREATE  = 5'd0,
    M_DESTROY = 5'd1,
    M_RESTORE = 5'd2,
    M_SAVE    = 5'd3,
    M_ASSIM   = 5'd4,
    M_NEG     = 5'd5,
    M_ADD     = 5'd6,
    M_SUB     = 5'd7,
    M_MUL     = 5'd8,
    M_DIV     = 5'd9,
    M_SQRT    = 5'd10,
    M_REM     = 5'd11,
    M_COMPARE = 5'd12,
    M_SIGN    = 5'd13,
    M_DIGITS  = 5'd14,
    M_SETREG  = 5'd15,
    M_GETREG  = 5'd16,
    M_GC      = 5'd17
  } msg_t;

  function automatic int dval(input digit6_t d);
    return 4 * int'(d.hi) + int'(d.lo);
  endfunction

  // Split an integer in -10..10 into the two radix-4 fields.
  function automatic digit6_t dmake(input int v);
    int h;
    digit6_t d;
    h = (v + 2) >>> 2;           // floor((v+2)/4)
    if (h > 2)  h = 2;
    if (h < -2) h = -2;
    d.hi = 3'(h);
    d.lo = 3'(v - 4 * h);
    return d;
  endfunction

  // LX: storage code <31.10> to six-signal digit (codes above 20 are not
  // produced by this design and saturate to 10).
  function automatic digit6_t lx(input dcode_t c);
    int v;
    v = int'(c) - 10;
    if (v > 10) v = 10;
    return dmake(v);
  endfunction

  // XL: six-signal digit to storage code.
  function automatic dcode_t xl(input digit6_t d);
    return dcode_t'(dval(d) + 10);
  endfunction

  function automatic sign_t sign_of(input int v);
    if (v > 0)      return SGN_POS;
    else if (v < 0) return SGN_NEG;
    else            return SGN_ZERO;
  endfunction

endpackage
