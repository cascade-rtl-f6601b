// control_chip: the Cascade control chip.
//
// Serves the external message port, manages variable-precision integer
// objects in management and digit memory, and sequences the arithmetic
// chips through the broadcast 10-bit instruction word and strobe.
//
// Memory organization (follows the document):
//   management memory, bottom up : handle table. A handle is the address of
//       an entry {G, F, descriptor pointer}; entries never move.
//   management memory, top down  : descriptors of four words
//       +0 LSW pointer, +1 MSW pointer, +2 {sign, number of digits},
//       +3 {G, handle pointer}.
//   digit memory, top down       : the digits of the numbers, in the same
//       order as their descriptors, so pointers never cross.
// F marks a destroyed number; G marks a handle whose storage the garbage
// collector has reclaimed (the document names both bits without defining
// them; these meanings are this design's choice). The most recently
// destroyed number is kept in a one-entry reuse register and its handle,
// descriptor and digit word are reused by the next allocation without
// garbage collection (document). The garbage collector compacts live
// descriptors and digit words towards the top, copying digit words through
// register 3 of the arithmetic chips; it runs on a GC message or when an
// allocation finds no space.
//
// Arithmetic (single precision: every number fits in one digit-memory word
// of 16*N digits, which is this design's restriction; the document also
// sequences multiple-precision operations over several words):
//   ADD/SUB : r2 <- r0 +/- r1 in one arithmetic-unit step.
//   NEG     : r2 <- r3(=0) - r0.
//   MUL     : for every multiplier digit, most significant first, shift the
//             multiplier r0 and the partial product r2 left one digit on the
//             two shift paths; the digit leaving r0 at the top enters the
//             control chip, is broadcast (SETMPD) and r2 <- r2 + q*r1.
//             Zero multiplier digits skip the arithmetic step.
//   COMPARE : sign of r0 - r1. SIGN/DIGITS read the descriptor.
//   CREATE/RESTORE shift digits into r2 through shift path 0 from the right;
//   SAVE/ASSIM shift them out to the right (least significant first); ASSIM
//   converts to 16-bit two's complement chunks on the way.
//   After every result the sign computer and leading-zero counts give the
//   sign and length stored in the descriptor.
// DIV, SQRT and REM are accepted with their operands and answer with the
// invalid handle 20'hFFFFF: the document leaves the quotient/root digit
// selection undesigned. The arithmetic chips do provide the steps those
// operations use (MULSUB, ROOT, half-digit shifts, normalization sensing).
//
// Message codes, the position of the future/destroy flags, the order of
// digits in transfers and the setup register layout are this design's
// choices (see cascade_pkg). Setup register: [4:0] log2 of installed digit
// memory words, [9:5] log2 of management memory words, and read-only flags
// [19] overflow, [18] out of memory, [17] unsupported operation. Writing it
// re-initialises memory management.
//
// The ends of the sp1 loop (from the least significant chip), of the dbl
// loop and the normalization report are inputs that no built sequence reads:
// they serve division and square root, which are not sequenced here.
//
// Timing: one state per clock; instruction, strobe and memory controls are
// combinational from the state. Both memories have a one-cycle read latency.
module control_chip
  import cascade_pkg::*;
#(
  parameter int N   = 4,    // arithmetic modules
  parameter int DAW = 20,   // digit memory address bits (one megaword)
  parameter int MAW = 20    // management memory address bits (one megaword)
) (
  input  logic               clk,
  input  logic               rst,
  // external message port
  input  logic               req,
  output logic               ack,
  input  logic [MSG_W-1:0]   msg_in,
  output logic [MSG_W-1:0]   msg_out,
  // management memory
  output logic               mm_ce,
  output logic               mm_we,
  output logic [MAW-1:0]     mm_addr,
  output logic [23:0]        mm_wdata,
  input  logic [23:0]        mm_rdata,
  // digit memory control (shared by all arithmetic modules)
  output logic               dm_ce,
  output logic               dm_we,
  output logic [DAW-1:0]     dm_addr,
  // arithmetic chip control
  output logic [INSTR_W-1:0] instr,
  output logic               strobe,
  // shift path 0 and 1 loops
  output digit6_t            sp0_to_ms,
  input  digit6_t            sp0_from_ms,
  output digit6_t            sp0_to_ls,
  input  digit6_t            sp0_from_ls,
  output digit6_t            sp1_to_ms,
  input  digit6_t            sp1_from_ms,
  output digit6_t            sp1_to_ls,
  input  digit6_t            sp1_from_ls,
  // transfer loops: into the least significant chip, out of the most significant
  output logic signed [1:0]  dbl_to_ls,
  input  logic signed [1:0]  dbl_from_ms,
  output logic signed [3:0]  ml_to_ls,
  input  logic signed [3:0]  ml_from_ms,
  output logic signed [1:0]  ol_to_ls,
  input  logic signed [1:0]  ol_from_ms,
  // sensing
  output sign_t              sign_to_ls,
  input  sign_t              sign_from_ms,
  input  logic [N*5-1:0]     lz_all,     // chip c count at [5c+4:5c], chip 0 most significant
  input  logic [2:0]         norm,
  output logic               dp_to_ms,
  output logic               rdp_to_ls,
  input  logic               sdv,
  // event pulses for observation
  output logic               ev_gc,
  output logic               ev_reuse,
  output logic               ev_future,
  output logic               ev_overflow,
  output logic               ev_mulskip,
  output logic               ev_sdv
);

  localparam int WD = 16 * N;            // digits per word
  localparam logic [MSG_W-1:0] BAD_HANDLE = '1;

  // ---------------- message port ----------------
  logic             rx_ready, rx_valid, tx_valid, tx_done;
  logic [MSG_W-1:0] rx_data, tx_data;

  msg_port u_port (
    .clk, .rst, .req, .ack, .msg_in, .msg_out,
    .rx_ready, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_done
  );

  // ---------------- state ----------------
  typedef enum logic [6:0] {
    S_IDLE, S_ARGS, S_DISPATCH,
    S_LD0, S_LD1, S_LD2, S_LD3,
    S_AL0, S_AL1, S_AL2, S_AL3, S_AL4,
    S_GC0, S_GC1, S_GC2, S_GC3, S_GC4, S_GC5, S_GC6, S_GC7, S_GC8, S_GC9,
    S_GC10, S_GC11, S_GC12,
    S_COMPUTE, S_ADD, S_SUB, S_NEGC, S_NEG,
    S_MCLR, S_MSH, S_MSET, S_MACC,
    S_CCLR, S_CSH,
    S_RCLR, S_RARG, S_RSH,
    S_FIN0, S_FIN1, S_FIN2, S_FIN3, S_FIN4, S_FIN5,
    S_POST, S_DES0, S_DES1, S_DES2,
    S_TX,
    S_CMP0, S_CMP1, S_CMP2,
    S_DSC0, S_DSC1, S_DSC2, S_DSC3,
    S_SV0, S_SV1, S_SV2,
    S_DONE
  } state_t;

  state_t st, ret_ld, ret_gc, ret_tx, ret_des;

  msg_t             mcode;
  logic             f_future, f_destroy;
  logic [MSG_W-1:0] arg [2];
  logic [1:0]       nargs, argi;

  // memory management
  logic [MAW:0]     handle_next, desc_next;   // one extra bit: sign of underflow
  logic [DAW:0]     dig_next;
  logic [9:0]       setup;
  logic             fl_overflow, fl_oom, fl_unsup;
  logic             reuse_valid;
  logic [MAW-1:0]   reuse_h;
  logic             gc_tried;

  // current operation
  logic [MAW-1:0]   ld_h;
  logic [1:0]       ld_reg;
  logic [MAW-1:0]   res_h, res_desc;
  logic [DAW-1:0]   res_word;
  logic [23:0]      tmp_w;
  logic [MSG_W-1:0] tx_val;
  logic [7:0]       cnt;        // digit / shift counter
  logic [2:0]       sub_cnt;    // digits within a transfer
  logic [MSG_W-1:0] xfer;       // transfer being assembled or taken apart
  logic [MSG_W-1:0] nxfer;      // transfers left
  logic [1:0]       des_i;
  digit6_t          qdig;
  logic signed [3:0] assim_c;
  logic             phase2;     // second result of DIGITS

  // GC
  logic [MAW-1:0]   gc_src, gc_dst, gc_h;
  logic [DAW-1:0]   gc_dw;

  // ---------------- helpers ----------------
  function automatic logic [5:0] nargs_of(input msg_t m);
    unique case (m)
      M_CREATE, M_ADD, M_SUB, M_MUL, M_DIV, M_COMPARE: return 2;
      M_DESTROY, M_RESTORE, M_SAVE, M_ASSIM, M_NEG, M_SQRT,
      M_SIGN, M_DIGITS, M_SETREG:                      return 1;
      default:                                         return 0;
    endcase
  endfunction

  // 32-bit two's complement value -> nine signed digits in -6..9 (digit k at [5k+4:5k] as code)
  function automatic logic [44:0] to_digits(input logic [31:0] v);
    logic signed [36:0] t;
    logic signed [36:0] d;
    logic [44:0]        r;
    t = 37'(signed'(v));
    for (int k = 0; k < 9; k++) begin
      d = t & 37'sd15;
      if (d > 9) d = d - 16;
      r[5*k +: 5] = 5'(d + 10);
      t = (t - d) >>> 4;
    end
    return r;
  endfunction

  logic [44:0] cdigits;
  assign cdigits = to_digits({arg[0][15:0], arg[1][15:0]});

  // total leading zeros from the most significant chip down
  logic [15:0] lz_total;
  always_comb begin
    logic stop;
    lz_total = '0;
    stop     = 1'b0;
    for (int c = 0; c < N; c++) begin
      if (!stop) begin
        lz_total = lz_total + 16'(lz_all[5*c +: 5]);
        if (lz_all[5*c +: 5] < 5'd16) stop = 1'b1;
      end
    end
  end

  logic [15:0] ndig;
  assign ndig = 16'(WD) - lz_total;

  function automatic logic [MSG_W-1:0] sign_word(input logic neg, input logic nz);
    return !nz ? '0 : (neg ? '1 : MSG_W'(1));
  endfunction

  logic [MAW:0] msize;
  logic [DAW:0] dsize;
  always_comb begin
    msize = (int'(setup[9:5]) >= MAW) ? (MAW+1)'(1) << MAW : (MAW+1)'(1) << setup[9:5];
    dsize = (int'(setup[4:0]) >= DAW) ? (DAW+1)'(1) << DAW : (DAW+1)'(1) << setup[4:0];
  end

  logic space_ok;
  assign space_ok = (desc_next > handle_next) && !dig_next[DAW] && (desc_next < msize);

  // ---------------- combinational outputs ----------------
  function automatic logic [9:0] ins(input iop_t o, input logic [5:0] f);
    return {o, f};
  endfunction

  always_comb begin
    rx_ready  = 1'b0;
    tx_valid  = 1'b0;
    tx_data   = tx_val;
    mm_ce     = 1'b0;
    mm_we     = 1'b0;
    mm_addr   = '0;
    mm_wdata  = '0;
    dm_ce     = 1'b0;
    dm_we     = 1'b0;
    dm_addr   = '0;
    instr     = ins(I_NOP, 6'd0);
    strobe    = 1'b0;
    sp0_to_ms = '0;
    sp0_to_ls = '0;
    sp1_to_ms = '0;
    sp1_to_ls = '0;
    dbl_to_ls = '0;
    ml_to_ls  = '0;
    ol_to_ls  = '0;
    sign_to_ls = SGN_ZERO;
    dp_to_ms  = 1'b1;
    rdp_to_ls = 1'b0;

    unique case (st)
      S_IDLE, S_ARGS, S_RARG: rx_ready = 1'b1;
      S_TX:  tx_valid = 1'b1;
      // operand load
      S_LD0: begin mm_ce = 1'b1; mm_addr = ld_h; end
      S_LD1: begin mm_ce = 1'b1; mm_addr = mm_rdata[MAW-1:0]; end
      S_LD2: begin dm_ce = 1'b1; dm_addr = mm_rdata[DAW-1:0]; end
      S_LD3: begin instr = ins(I_LOAD, {4'd0, ld_reg}); strobe = 1'b1; end
      // allocation by reuse
      S_AL1: begin mm_ce = 1'b1; mm_addr = reuse_h; end
      S_AL2: begin mm_ce = 1'b1; mm_addr = mm_rdata[MAW-1:0]; end
      // garbage collection
      S_GC1: begin mm_ce = 1'b1; mm_addr = gc_src + MAW'(3); end
      S_GC2: begin mm_ce = 1'b1; mm_addr = mm_rdata[MAW-1:0]; end
      S_GC3: if (mm_rdata[22]) begin
               mm_ce = 1'b1; mm_we = 1'b1; mm_addr = gc_h; mm_wdata = 24'hC0_0000;
             end else begin
               mm_ce = 1'b1; mm_addr = gc_src;
             end
      S_GC4: begin dm_ce = 1'b1; dm_addr = mm_rdata[DAW-1:0]; end
      S_GC5: begin instr = ins(I_LOAD, 6'd3); strobe = 1'b1; end
      S_GC6: begin
               instr = ins(I_STORE, 6'd3); strobe = 1'b1;
               dm_ce = 1'b1; dm_we = 1'b1; dm_addr = gc_dw;
             end
      S_GC7: begin mm_ce = 1'b1; mm_addr = gc_src + MAW'(2); end
      S_GC8: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = gc_dst; mm_wdata = 24'(gc_dw); end
      S_GC9: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = gc_dst + MAW'(1); mm_wdata = 24'(gc_dw); end
      S_GC10: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = gc_dst + MAW'(2); mm_wdata = tmp_w; end
      S_GC11: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = gc_dst + MAW'(3); mm_wdata = 24'(gc_h); end
      S_GC12: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = gc_h; mm_wdata = 24'(gc_dst); end
      // arithmetic
      S_ADD:  begin instr = ins(I_ADD, 6'b10_00_01); strobe = 1'b1; end
      S_SUB:  begin instr = ins(I_SUB, 6'b10_00_01); strobe = 1'b1; end
      S_NEGC: begin instr = ins(I_CLR, 6'd3); strobe = 1'b1; end
      S_NEG:  begin instr = ins(I_SUB, 6'b10_11_00); strobe = 1'b1; end
      S_MCLR, S_CCLR, S_RCLR: begin instr = ins(I_CLR, 6'd2); strobe = 1'b1; end
      S_MSH:  begin instr = ins(I_SHIFT, 6'b00_10_00); strobe = 1'b1; end
      S_MSET: begin instr = ins(I_SETMPD, {1'b0, xl(qdig)}); strobe = 1'b1; end
      S_MACC: begin instr = ins(I_MULADD, 6'b10_10_01); strobe = 1'b1; end
      S_CSH:  begin
                instr = ins(I_SHIFT1, 6'b10_00_00); strobe = 1'b1;
                sp0_to_ls = lx(cdigits[5*cnt[3:0] +: 5]);
              end
      S_RSH:  begin
                instr = ins(I_SHIFT1, 6'b10_00_00); strobe = 1'b1;
                sp0_to_ls = lx(xfer[19:15]);
              end
      // result
      S_FIN0: begin instr = ins(I_SENSE, 6'd2); strobe = 1'b1; end
      S_FIN1: begin
                instr = ins(I_STORE, 6'd2); strobe = 1'b1;
                dm_ce = 1'b1; dm_we = 1'b1; dm_addr = res_word;
                mm_ce = 1'b1; mm_we = 1'b1; mm_addr = res_desc; mm_wdata = 24'(res_word);
              end
      S_FIN2: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = res_desc + MAW'(1); mm_wdata = 24'(res_word); end
      S_FIN3: begin
                mm_ce = 1'b1; mm_we = 1'b1; mm_addr = res_desc + MAW'(2);
                mm_wdata = {sign_from_ms == SGN_NEG, 23'(ndig)};
              end
      S_FIN4: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = res_desc + MAW'(3); mm_wdata = 24'(res_h); end
      S_FIN5: begin mm_ce = 1'b1; mm_we = 1'b1; mm_addr = res_h; mm_wdata = 24'(res_desc); end
      // destroy
      S_DES0: begin mm_ce = 1'b1; mm_addr = arg[des_i[0]][MAW-1:0]; end
      S_DES2: begin
                mm_ce = 1'b1; mm_we = 1'b1; mm_addr = arg[des_i[0]][MAW-1:0];
                mm_wdata = tmp_w | 24'h40_0000;
              end
      // compare
      S_CMP0: begin instr = ins(I_SUB, 6'b10_00_01); strobe = 1'b1; end
      S_CMP1: begin instr = ins(I_SENSE, 6'd2); strobe = 1'b1; end
      // descriptor word 2 of arg 0
      S_DSC0: begin mm_ce = 1'b1; mm_addr = arg[0][MAW-1:0]; end
      S_DSC1: begin mm_ce = 1'b1; mm_addr = mm_rdata[MAW-1:0] + MAW'(2); end
      // save / assim: shift r0 right, digits leave at the least significant chip
      S_SV1:  begin instr = ins(I_SHIFT1, 6'b00_00_10); strobe = 1'b1; end
      default: ;
    endcase
  end

  // ---------------- sequencing ----------------
  logic [MSG_W-1:0] cmp_word;
  assign cmp_word = sign_word(sign_from_ms == SGN_NEG, sign_from_ms != SGN_ZERO);

  always_ff @(posedge clk) begin
    ev_gc       <= 1'b0;
    ev_reuse    <= 1'b0;
    ev_future   <= 1'b0;
    ev_overflow <= 1'b0;
    ev_mulskip  <= 1'b0;
    ev_sdv      <= 1'b0;
    if (rst) begin
      st          <= S_IDLE;
      setup       <= {5'(MAW), 5'(DAW)};
      handle_next <= '0;
      desc_next   <= ((MAW+1)'(1) << MAW) - (MAW+1)'(4);
      dig_next    <= ((DAW+1)'(1) << DAW) - (DAW+1)'(1);
      fl_overflow <= 1'b0;
      fl_oom      <= 1'b0;
      fl_unsup    <= 1'b0;
      reuse_valid <= 1'b0;
      argi        <= '0;
      nargs       <= '0;
      tx_val      <= '0;
      cnt         <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (rx_valid) begin
          mcode     <= msg_t'(rx_data[4:0]);
          f_future  <= rx_data[5];
          f_destroy <= rx_data[6];
          nargs     <= 2'(nargs_of(msg_t'(rx_data[4:0])));
          argi      <= '0;
          gc_tried  <= 1'b0;
          phase2    <= 1'b0;
          st        <= (nargs_of(msg_t'(rx_data[4:0])) == 0) ? S_DISPATCH : S_ARGS;
        end
        S_ARGS: if (rx_valid) begin
          arg[argi[0]] <= rx_data;
          argi         <= argi + 2'd1;
          if (argi + 2'd1 == nargs) st <= S_DISPATCH;
        end
        S_DISPATCH: begin
          unique case (mcode)
            M_ADD, M_SUB, M_MUL, M_COMPARE: begin
              ld_h <= arg[0][MAW-1:0]; ld_reg <= 2'd0; ret_ld <= S_LD0; st <= S_LD0;
              cnt  <= 8'd1;    // operands still to load after this one
            end
            M_NEG, M_SAVE, M_ASSIM: begin
              ld_h <= arg[0][MAW-1:0]; ld_reg <= 2'd0; st <= S_LD0; cnt <= 8'd0;
              ret_ld <= (mcode == M_NEG) ? S_AL0 : S_DSC0;
            end
            M_CREATE, M_RESTORE: st <= S_AL0;
            M_DESTROY: begin des_i <= 2'd0; ret_des <= S_DONE; st <= S_DES0; end
            M_SIGN, M_DIGITS: st <= S_DSC0;
            M_SETREG: begin
              setup       <= arg[0][9:0];
              handle_next <= '0;
              desc_next   <= ((MAW+1)'(1) << ((int'(arg[0][9:5]) >= MAW) ? MAW : int'(arg[0][9:5])))
                             - (MAW+1)'(4);
              dig_next    <= ((DAW+1)'(1) << ((int'(arg[0][4:0]) >= DAW) ? DAW : int'(arg[0][4:0])))
                             - (DAW+1)'(1);
              reuse_valid <= 1'b0;
              st          <= S_DONE;
            end
            M_GETREG: begin
              tx_val <= {fl_overflow, fl_oom, fl_unsup, 7'd0, setup};
              ret_tx <= S_DONE; st <= S_TX;
            end
            M_GC: begin ret_gc <= S_DONE; st <= S_GC0; end
            default: begin      // DIV, SQRT, REM and unknown codes
              fl_unsup <= 1'b1;
              tx_val   <= BAD_HANDLE;
              ret_tx   <= S_DONE; st <= S_TX;
            end
          endcase
        end

        // ---------- operand load: handle -> descriptor -> LSW -> register ----------
        S_LD0: st <= S_LD1;
        S_LD1: st <= S_LD2;
        S_LD2: st <= S_LD3;
        S_LD3: begin
          if (cnt != 0) begin
            cnt  <= cnt - 8'd1;
            ld_h <= arg[1][MAW-1:0]; ld_reg <= 2'd1; st <= S_LD0;
          end else if (ld_reg == 2'd1 && mcode == M_COMPARE) st <= S_CMP0;
          else if (ld_reg == 2'd1) st <= S_AL0;
          else st <= ret_ld;
        end

        // ---------- allocation ----------
        S_AL0: begin
          if (reuse_valid) begin
            res_h       <= reuse_h;
            reuse_valid <= 1'b0;
            ev_reuse    <= 1'b1;
            st          <= S_AL1;
          end else if (space_ok) begin
            res_h       <= handle_next[MAW-1:0];
            res_desc    <= desc_next[MAW-1:0];
            res_word    <= dig_next[DAW-1:0];
            handle_next <= handle_next + 1'b1;
            desc_next   <= desc_next - (MAW+1)'(4);
            dig_next    <= dig_next - 1'b1;
            st          <= S_AL3;
          end else if (!gc_tried) begin
            gc_tried <= 1'b1;
            ret_gc   <= S_AL0;
            st       <= S_GC0;
          end else begin
            fl_oom <= 1'b1;
            tx_val <= BAD_HANDLE;
            ret_tx <= S_DONE;
            st     <= S_TX;
          end
        end
        S_AL1: st <= S_AL2;
        S_AL2: begin res_desc <= mm_rdata[MAW-1:0]; st <= S_AL4; end
        S_AL4: begin res_word <= mm_rdata[DAW-1:0]; st <= S_AL3; end
        S_AL3: begin
          st <= S_COMPUTE;
          if (f_future && mcode != M_RESTORE) begin
            tx_val    <= MSG_W'(res_h);
            ev_future <= 1'b1;
            ret_tx    <= S_COMPUTE;
            st        <= S_TX;
          end
        end

        // ---------- operation ----------
        S_COMPUTE: begin
          unique case (mcode)
            M_ADD:    st <= S_ADD;
            M_SUB:    st <= S_SUB;
            M_NEG:    st <= S_NEGC;
            M_MUL:    begin cnt <= 8'(WD); st <= S_MCLR; end
            M_CREATE: begin cnt <= 8'd8; st <= S_CCLR; end
            default:  begin nxfer <= arg[0]; st <= S_RCLR; end   // RESTORE
          endcase
        end
        S_ADD, S_SUB, S_NEG: begin
          if (ol_from_ms != 0) begin fl_overflow <= 1'b1; ev_overflow <= 1'b1; end
          if (sdv) ev_sdv <= 1'b1;
          st <= S_FIN0;
        end
        S_NEGC: st <= S_NEG;
        S_MCLR: st <= S_MSH;
        S_MSH: begin
          qdig <= sp0_from_ms;
          if (dval(sp1_from_ms) != 0) begin fl_overflow <= 1'b1; ev_overflow <= 1'b1; end
          cnt <= cnt - 8'd1;
          if (dval(sp0_from_ms) != 0) st <= S_MSET;
          else begin
            ev_mulskip <= 1'b1;
            st <= (cnt == 8'd1) ? S_FIN0 : S_MSH;
          end
        end
        S_MSET: st <= S_MACC;
        S_MACC: begin
          if (ml_from_ms != 0 || ol_from_ms != 0) begin fl_overflow <= 1'b1; ev_overflow <= 1'b1; end
          st <= (cnt == 8'd0) ? S_FIN0 : S_MSH;
        end
        S_CCLR: st <= S_CSH;
        S_CSH: begin
          cnt <= cnt - 8'd1;
          if (cnt == 8'd0) st <= S_FIN0;
        end
        S_RCLR: st <= (nxfer == 0) ? S_FIN0 : S_RARG;
        S_RARG: if (rx_valid) begin
          xfer    <= rx_data;
          sub_cnt <= 3'd4;
          nxfer   <= nxfer - 1'b1;
          st      <= S_RSH;
        end
        S_RSH: begin
          if (dval(sp0_from_ms) != 0) begin fl_overflow <= 1'b1; ev_overflow <= 1'b1; end
          xfer    <= xfer << 5;
          sub_cnt <= sub_cnt - 3'd1;
          if (sub_cnt == 3'd1) st <= (nxfer == 0) ? S_FIN0 : S_RARG;
        end

        // ---------- store the result and its descriptor ----------
        S_FIN0: st <= S_FIN1;
        S_FIN1: st <= S_FIN2;
        S_FIN2: st <= S_FIN3;
        S_FIN3: st <= S_FIN4;
        S_FIN4: st <= S_FIN5;
        S_FIN5: st <= S_POST;
        S_POST: begin
          tx_val <= MSG_W'(res_h);
          if (f_destroy && mcode != M_CREATE && mcode != M_RESTORE) begin
            des_i   <= 2'd0;
            ret_des <= (f_future) ? S_DONE : S_TX;
            ret_tx  <= S_DONE;
            st      <= S_DES0;
          end else begin
            ret_tx <= S_DONE;
            st     <= f_future && mcode != M_RESTORE ? S_DONE : S_TX;
          end
        end

        // ---------- destroy arg[des_i] (and arg[1] for binary operations) ----------
        S_DES0: st <= S_DES1;
        S_DES1: begin tmp_w <= mm_rdata; st <= S_DES2; end
        S_DES2: begin
          reuse_valid <= 1'b1;
          reuse_h     <= arg[des_i[0]][MAW-1:0];
          if (des_i == 2'd0 && mcode inside {M_ADD, M_SUB, M_MUL, M_COMPARE}) begin
            des_i <= 2'd1; st <= S_DES0;
          end else st <= ret_des;
        end

        // ---------- compare ----------
        S_CMP0: st <= S_CMP1;
        S_CMP1: st <= S_CMP2;
        S_CMP2: begin
          tx_val <= cmp_word;
          if (f_destroy) begin des_i <= 2'd0; ret_des <= S_TX; ret_tx <= S_DONE; st <= S_DES0; end
          else begin ret_tx <= S_DONE; st <= S_TX; end
        end

        // ---------- descriptor word 2: SIGN, DIGITS, SAVE, ASSIM ----------
        S_DSC0: st <= S_DSC1;
        S_DSC1: st <= S_DSC2;
        S_DSC2: begin
          tmp_w <= mm_rdata;
          st    <= S_DSC3;
        end
        S_DSC3: begin
          unique case (mcode)
            M_SIGN: begin
              tx_val <= sign_word(tmp_w[23], tmp_w[22:0] != 0);
              ret_tx <= S_DONE; st <= S_TX;
            end
            M_DIGITS: begin
              tx_val <= MSG_W'({9'd0, tmp_w[22:16]});
              ret_tx <= S_DSC3; st <= S_TX;
              phase2 <= 1'b1;
              if (phase2) begin
                tx_val <= MSG_W'(tmp_w[15:0]);
                ret_tx <= S_DONE;
              end
            end
            default: begin    // SAVE, ASSIM: number of transfers first
              nxfer   <= MSG_W'((tmp_w[22:0] + 23'd3) >> 2) + ((mcode == M_ASSIM) ? MSG_W'(1) : '0);
              tx_val  <= MSG_W'((tmp_w[22:0] + 23'd3) >> 2) + ((mcode == M_ASSIM) ? MSG_W'(1) : '0);
              assim_c <= '0;
              ret_tx  <= S_SV0;
              st      <= S_TX;
            end
          endcase
        end
        S_SV0: begin
          if (nxfer == 0) st <= S_DONE;
          else begin
            nxfer   <= nxfer - 1'b1;
            sub_cnt <= 3'd0;
            xfer    <= '0;
            st      <= S_SV1;
          end
        end
        S_SV1: begin
          // digit sub_cnt of this transfer leaves the least significant chip
          xfer[5*sub_cnt[1:0] +: 5] <= xl(sp0_from_ls);
          sub_cnt <= sub_cnt + 3'd1;
          if (sub_cnt == 3'd3) st <= S_SV2;
        end
        S_SV2: begin
          if (mcode == M_ASSIM) begin
            logic signed [19:0] acc;
            acc = 20'(assim_c)
                + 20'(dval(lx(xfer[4:0])))
                + 20'(16   * dval(lx(xfer[9:5])))
                + 20'(256  * dval(lx(xfer[14:10])))
                + 20'(4096 * dval(lx(xfer[19:15])));
            tx_val  <= {{4{acc[15]}}, acc[15:0]};
            assim_c <= 4'(acc >>> 16);
          end else tx_val <= xfer;
          ret_tx <= S_SV0;
          st     <= S_TX;
        end

        // ---------- garbage collection ----------
        S_GC0: begin
          ev_gc  <= 1'b1;
          gc_src <= MAW'(msize - (MAW+1)'(4));
          gc_dst <= MAW'(msize - (MAW+1)'(4));
          gc_dw  <= DAW'(dsize - (DAW+1)'(1));
          st     <= (msize - (MAW+1)'(4) > desc_next) ? S_GC1 : ret_gc;
        end
        S_GC1: st <= S_GC2;
        S_GC2: begin gc_h <= mm_rdata[MAW-1:0]; st <= S_GC3; end
        S_GC3: begin
          if (mm_rdata[22]) begin
            // destroyed: drop it (entry rewritten as reclaimed)
            if (reuse_valid && reuse_h == gc_h) reuse_valid <= 1'b0;
            gc_src <= gc_src - MAW'(4);
            if ({1'b0, gc_src - MAW'(4)} <= desc_next) begin
              desc_next <= {1'b0, gc_dst};
              dig_next  <= {1'b0, gc_dw};
              st        <= ret_gc;
            end else st <= S_GC1;
          end else st <= S_GC4;
        end
        S_GC4: st <= S_GC5;
        S_GC5: st <= S_GC6;
        S_GC6: st <= S_GC7;
        S_GC7: st <= S_GC8;
        S_GC8: begin tmp_w <= mm_rdata; st <= S_GC9; end
        S_GC9: st <= S_GC10;
        S_GC10: st <= S_GC11;
        S_GC11: st <= S_GC12;
        S_GC12: begin
          gc_dst <= gc_dst - MAW'(4);
          gc_dw  <= gc_dw - 1'b1;
          gc_src <= gc_src - MAW'(4);
          if ({1'b0, gc_src - MAW'(4)} <= desc_next) begin
            desc_next <= {1'b0, gc_dst - MAW'(4)};
            dig_next  <= {1'b0, gc_dw} - 1'b1;
            st        <= ret_gc;
          end else st <= S_GC1;
        end

        S_TX: if (tx_done) st <= ret_tx;
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
