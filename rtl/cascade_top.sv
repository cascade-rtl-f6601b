// cascade_top: a complete Cascade system.
//
// One control module (control chip plus management memory) and N arithmetic
// modules (arithmetic chip plus a 16-digit, 80-bit wide digit memory), wired
// as in the document's system diagram:
//   - the control chip drives the address and controls of the management
//     memory and of every digit memory, and broadcasts the instruction word
//     and strobe to every arithmetic chip;
//   - chip 0 holds the most significant digits (msd), chip N-1 the least
//     significant (lsd);
//   - the two shift paths, the three transfer-digit paths and the sign /
//     root-position signals run chip to chip and close into loops through
//     the control chip at both ends;
//   - the single-digit-value line is the AND of every chip's contribution
//     (the open-drain bus of the document);
//   - the external world sees only the 20-bit request/acknowledge message
//     port. Event pulses from the control chip are brought out to observe
//     garbage collection, storage reuse, futures, overflow, skipped zero
//     multiplier digits and single-digit results.
// Each chip's per-chip zero flag and single-digit value outputs stay
// unconnected: the control chip only looks at the shared sdv line.
// Timing: one clock for all chips; the arithmetic chips act in cycles where
// the control chip raises strobe. Memories read with one cycle of latency.
// N is not fixed by the document (it scales the word width); 4 modules give
// 64-digit (about 256-bit) words. The memories default to the document's
// one megaword.
module cascade_top
  import cascade_pkg::*;
#(
  parameter int N   = 4,
  parameter int DAW = 20,
  parameter int MAW = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             req,
  output logic             ack,
  input  logic [MSG_W-1:0] msg_in,
  output logic [MSG_W-1:0] msg_out,
  output logic             ev_gc,
  output logic             ev_reuse,
  output logic             ev_future,
  output logic             ev_overflow,
  output logic             ev_mulskip,
  output logic             ev_sdv
);

  // management memory
  logic           mm_ce, mm_we;
  logic [MAW-1:0] mm_addr;
  logic [23:0]    mm_wdata, mm_rdata;

  sram_sp #(.AW(MAW), .DW(24)) u_mgmt_mem (
    .clk, .ce(mm_ce), .we(mm_we), .addr(mm_addr), .wdata(mm_wdata), .rdata(mm_rdata)
  );

  // control chip
  logic               dm_ce, dm_we;
  logic [DAW-1:0]     dm_addr;
  logic [INSTR_W-1:0] instr;
  logic               strobe;
  digit6_t            sp0_to_ms, sp0_to_ls, sp1_to_ms, sp1_to_ls;
  logic signed [1:0]  dbl_to_ls, ol_to_ls;
  logic signed [3:0]  ml_to_ls;
  sign_t              sign_to_ls;
  logic               dp_to_ms, rdp_to_ls;

  // chip chains: index c is chip c; signals named *_l are at the chip's
  // left (more significant) edge, *_r at its right edge
  digit6_t           sp0_l_in [N], sp0_l_out [N], sp0_r_in [N], sp0_r_out [N];
  digit6_t           sp1_l_in [N], sp1_l_out [N], sp1_r_in [N], sp1_r_out [N];
  logic signed [1:0] dbl_in [N], dbl_out [N], ol_in [N], ol_out [N];
  logic signed [3:0] ml_in [N], ml_out [N];
  sign_t             sign_in [N], sign_out [N];
  logic              dp_in [N], dp_out [N], rdp_r_in [N], rdp_l_out [N];
  logic [N-1:0]      sdv_ok;
  logic [N*5-1:0]    lz_all;
  logic [2:0]        norm [N];

  control_chip #(.N(N), .DAW(DAW), .MAW(MAW)) u_ctl (
    .clk, .rst, .req, .ack, .msg_in, .msg_out,
    .mm_ce, .mm_we, .mm_addr, .mm_wdata, .mm_rdata,
    .dm_ce, .dm_we, .dm_addr,
    .instr, .strobe,
    .sp0_to_ms, .sp0_from_ms(sp0_l_out[0]), .sp0_to_ls, .sp0_from_ls(sp0_r_out[N-1]),
    .sp1_to_ms, .sp1_from_ms(sp1_l_out[0]), .sp1_to_ls, .sp1_from_ls(sp1_r_out[N-1]),
    .dbl_to_ls, .dbl_from_ms(dbl_out[0]),
    .ml_to_ls,  .ml_from_ms(ml_out[0]),
    .ol_to_ls,  .ol_from_ms(ol_out[0]),
    .sign_to_ls, .sign_from_ms(sign_out[0]),
    .lz_all, .norm(norm[0]),
    .dp_to_ms, .rdp_to_ls,
    .sdv(&sdv_ok),
    .ev_gc, .ev_reuse, .ev_future, .ev_overflow, .ev_mulskip, .ev_sdv
  );

  for (genvar c = 0; c < N; c++) begin : g_mod
    logic [16*CODE_W-1:0] rdata, wdata;
    logic                 drive;
    logic signed [4:0]    sdv_val;
    logic                 zero;
    logic [4:0]           lz;

    // chain wiring
    if (c == 0) begin : g_ms
      assign sp0_l_in[c] = sp0_to_ms;
      assign sp1_l_in[c] = sp1_to_ms;
      assign dp_in[c]    = dp_to_ms;
    end else begin : g_mid_l
      assign sp0_l_in[c] = sp0_r_out[c-1];
      assign sp1_l_in[c] = sp1_r_out[c-1];
      assign dp_in[c]    = dp_out[c-1];
    end
    if (c == N - 1) begin : g_ls
      assign sp0_r_in[c] = sp0_to_ls;
      assign sp1_r_in[c] = sp1_to_ls;
      assign dbl_in[c]   = dbl_to_ls;
      assign ml_in[c]    = ml_to_ls;
      assign ol_in[c]    = ol_to_ls;
      assign sign_in[c]  = sign_to_ls;
      assign rdp_r_in[c] = rdp_to_ls;
    end else begin : g_mid_r
      assign sp0_r_in[c] = sp0_l_out[c+1];
      assign sp1_r_in[c] = sp1_l_out[c+1];
      assign dbl_in[c]   = dbl_out[c+1];
      assign ml_in[c]    = ml_out[c+1];
      assign ol_in[c]    = ol_out[c+1];
      assign sign_in[c]  = sign_out[c+1];
      assign rdp_r_in[c] = rdp_l_out[c+1];
    end

    sram_sp #(.AW(DAW), .DW(16*CODE_W)) u_digit_mem (
      .clk, .ce(dm_ce), .we(dm_we && drive), .addr(dm_addr), .wdata, .rdata
    );

    arith_chip u_chip (
      .clk, .rst, .strobe, .instr,
      .msd(c == 0), .lsd(c == N - 1),
      .mem_rdata(rdata), .mem_wdata(wdata), .mem_drive(drive),
      .sp0_l_in(sp0_l_in[c]), .sp0_l_out(sp0_l_out[c]),
      .sp0_r_in(sp0_r_in[c]), .sp0_r_out(sp0_r_out[c]),
      .sp1_l_in(sp1_l_in[c]), .sp1_l_out(sp1_l_out[c]),
      .sp1_r_in(sp1_r_in[c]), .sp1_r_out(sp1_r_out[c]),
      .dbl_in(dbl_in[c]), .dbl_out(dbl_out[c]),
      .ml_in(ml_in[c]),   .ml_out(ml_out[c]),
      .ol_in(ol_in[c]),   .ol_out(ol_out[c]),
      .sign_in(sign_in[c]), .sign_out(sign_out[c]),
      .lz, .norm(norm[c]),
      .dp_in(dp_in[c]), .dp_out(dp_out[c]),
      .rdp_r_in(rdp_r_in[c]), .rdp_l_out(rdp_l_out[c]),
      .sdv_ok(sdv_ok[c]), .sdv_val, .zero
    );

    assign lz_all[5*c +: 5] = lz;
  end

endmodule
