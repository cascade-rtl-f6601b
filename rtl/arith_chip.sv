// arith_chip: one Cascade arithmetic chip, a 16-digit slice of the datapath.
//
// Holds four 16-digit registers (Reg 0..3, six signals per digit) and, around
// them, the blocks of the document's chip: two shift paths (sp0, sp1) that
// move a register left or right by a whole radix-16 digit or by a half
// (radix-4) digit, passing the digit that falls off the chip edge to the
// neighbouring chip; the sign computer / leading-zeros counter and the
// normalization sensor, watching a selected register; the root digit
// position register; the distribution box that routes registers to the two
// operand columns of the arithmetic unit and can put the unit's output
// straight onto the memory bus; the XL/LX converters between the six-signal
// digits and the 80-bit <31.10> digit memory word; and the instruction
// decoder.
//
// Interface: the memory bus is split into mem_rdata (from digit memory) and
// mem_wdata/mem_drive (to digit memory). Shift-path, transfer, sign and
// root-position ports come in left/right pairs; 'left' is the more
// significant neighbour. The document shares one two-wire +/-Ndp loop for
// the sign, normalization and root-position signals; here each has its own
// port (a design choice). Leading-zero counts go to the control chip on a
// port of their own rather than through a shift path.
// Timing: every register changes on the rising clock edge of a cycle in
// which strobe is high, acting on that cycle's instruction; outputs of the
// arithmetic unit, sensors and shift paths are combinational in the
// instruction and register contents. The document clocks registers from the
// strobe itself; here strobe is a clock enable.
module arith_chip
  import cascade_pkg::*;
#(
  parameter int ND = DIGITS_PER_CHIP
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 strobe,
  input  logic [INSTR_W-1:0]   instr,
  input  logic                 msd,        // this chip holds the most significant digits
  input  logic                 lsd,        // this chip holds the least significant digits
  // digit memory bus
  input  logic [ND*CODE_W-1:0] mem_rdata,
  output logic [ND*CODE_W-1:0] mem_wdata,
  output logic                 mem_drive,
  // shift paths
  input  digit6_t              sp0_l_in,
  output digit6_t              sp0_l_out,
  input  digit6_t              sp0_r_in,
  output digit6_t              sp0_r_out,
  input  digit6_t              sp1_l_in,
  output digit6_t              sp1_l_out,
  input  digit6_t              sp1_r_in,
  output digit6_t              sp1_r_out,
  // transfer digits: in from the right (less significant), out to the left
  input  logic signed [1:0]    dbl_in,
  output logic signed [1:0]    dbl_out,
  input  logic signed [3:0]    ml_in,
  output logic signed [3:0]    ml_out,
  input  logic signed [1:0]    ol_in,
  output logic signed [1:0]    ol_out,
  // sign chain, leading zeros, normalization
  input  sign_t                sign_in,
  output sign_t                sign_out,
  output logic [$clog2(ND+1)-1:0] lz,
  output logic [2:0]           norm,       // {n16, n4, n2}, most significant chip only
  // root digit position chain
  input  logic                 dp_in,
  output logic                 dp_out,
  input  logic                 rdp_r_in,
  output logic                 rdp_l_out,
  // single digit value detection (open-drain bus contribution)
  output logic                 sdv_ok,
  output logic signed [4:0]    sdv_val,
  output logic                 zero        // this chip's result digits are all zero
);

  iop_t    op;
  logic    en, shift_right, shift_half, au_mul, au_sub, au_dbl, au_write;
  logic [1:0] f_hi, f_mid, f_lo;
  digit6_t mpd;

  ctl_dec u_dec (
    .clk, .rst, .strobe, .instr, .op, .en, .f_hi, .f_mid, .f_lo,
    .shift_right, .shift_half, .au_mul, .au_sub, .au_dbl, .au_write, .mpd
  );

  digit6_t [ND-1:0] r [4];
  logic [1:0]       sense;

  // ---------------- root digit position register ----------------
  logic [ND-1:0] ins_pos, rdp_double;

  root_pos_reg #(.ND(ND)) u_rdp (
    .clk, .rst,
    .clr       (en && op == I_RDPCLR),
    .insert    (en && op == I_RDPINS),
    .dp_in, .dp_out, .rdp_r_in, .rdp_l_out,
    .ins_pos,
    .double_sel(rdp_double)
  );

  // ---------------- distribution box and arithmetic unit ----------------
  digit6_t [ND-1:0] au_a, au_b, au_s;

  assign au_a = r[f_mid];
  assign au_b = r[f_lo];

  arith_unit #(.ND(ND)) u_au (
    .q         (mpd),
    .a         (au_a),
    .b         (au_b),
    .double_sel(au_dbl ? rdp_double : '0),
    .mul_mode  (au_mul),
    .sub       (au_sub),
    .lsd,
    .dbl_in, .dbl_out, .ml_in, .ml_out, .ol_in, .ol_out,
    .s         (au_s),
    .zero,
    .sdv_ok,
    .sdv_val
  );

  // memory bus: XL on the way out (register or arithmetic unit output)
  always_comb begin
    mem_drive = (op == I_STORE) || (op == I_STAU);
    for (int i = 0; i < ND; i++)
      mem_wdata[i*CODE_W +: CODE_W] = xl((op == I_STAU) ? au_s[i] : r[f_lo][i]);
  end

  // ---------------- sensors ----------------
  logic n16, n4, n2;

  sign_lz #(.ND(ND)) u_slz (
    .d       (r[sense]),
    .sign_in,
    .sign_out,
    .lz
  );

  norm_sensor u_norm (
    .d2 (r[sense][ND-1]),
    .d1 (r[sense][ND-2]),
    .d0 (r[sense][ND-3]),
    .n16, .n4, .n2
  );

  assign norm = msd ? {n16, n4, n2} : 3'b000;

  // ---------------- shift paths ----------------
  // The digit leaving at each edge: a whole digit, or for a half-digit
  // shift one radix-4 field placed in the low field of the path.
  logic [1:0] s0_reg, s1_reg;
  logic       dual;

  assign dual   = (op == I_SHIFT);
  assign s0_reg = f_hi;
  assign s1_reg = f_mid;

  function automatic digit6_t edge_l(input digit6_t d, input logic half);
    return half ? '{hi: 3'sd0, lo: d.hi} : d;
  endfunction
  function automatic digit6_t edge_r(input digit6_t d, input logic half);
    return half ? '{hi: 3'sd0, lo: d.lo} : d;
  endfunction

  assign sp0_l_out = edge_l(r[s0_reg][ND-1], shift_half);
  assign sp0_r_out = edge_r(r[s0_reg][0],    shift_half);
  assign sp1_l_out = edge_l(r[s1_reg][ND-1], shift_half);
  assign sp1_r_out = edge_r(r[s1_reg][0],    shift_half);

  function automatic logic [ND*6-1:0] shifted(input digit6_t [ND-1:0] d,
                                              input logic right, input logic half,
                                              input digit6_t l_in, input digit6_t r_in);
    digit6_t [ND-1:0] n;
    for (int i = 0; i < ND; i++) begin
      if (!right && !half) n[i] = (i == 0) ? r_in : d[(i + ND - 1) % ND];
      else if (right && !half) n[i] = (i == ND - 1) ? l_in : d[(i + 1) % ND];
      else if (!right) begin              // half digit left: value * 4
        n[i].hi = d[i].lo;
        n[i].lo = (i == 0) ? r_in.lo : d[(i + ND - 1) % ND].hi;
      end else begin                      // half digit right: value / 4
        n[i].lo = d[i].hi;
        n[i].hi = (i == ND - 1) ? l_in.lo : d[(i + 1) % ND].lo;
      end
    end
    return n;
  endfunction

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) r[k] <= '0;
      sense <= '0;
    end else if (en) begin
      unique case (op)
        I_LOAD:  for (int i = 0; i < ND; i++) r[f_lo][i] <= lx(mem_rdata[i*CODE_W +: CODE_W]);
        I_CLR:   r[f_lo] <= '0;
        I_SENSE: sense <= f_lo;
        I_SHIFT, I_SHIFT1: begin
          if (dual)
            r[s1_reg] <= shifted(r[s1_reg], shift_right, shift_half, sp1_l_in, sp1_r_in);
          r[s0_reg] <= shifted(r[s0_reg], shift_right, shift_half, sp0_l_in, sp0_r_in);
        end
        I_RDPINS: for (int i = 0; i < ND; i++) if (ins_pos[i]) r[f_lo][i] <= mpd;
        default: if (au_write) r[f_hi] <= au_s;
      endcase
    end
  end

endmodule
