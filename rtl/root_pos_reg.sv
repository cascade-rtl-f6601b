// root_pos_reg: token-replicating root digit position register.
//
// One flip-flop per digit position. All are cleared at the start of a
// square-root extraction. The next root digit is stored at the position
// whose flip-flop is clear while the one immediately to its left is set
// (for the most significant position of a chip the left neighbour is
// dp_in, the least significant flip-flop of the chip to the left, or a 1
// from the control chip for the most significant chip). Each insertion sets
// that flip-flop, so the token moves one position right and the root
// accumulates in place, left to right (this follows the document).
// double_sel marks the positions whose digits the slices double: every set
// position except the most recent one, found as set with a clear right
// neighbour (rdp_r_in is the right chip's most significant flip-flop).
// Timing: clear and insert act on the rising clock edge when strobed.
module root_pos_reg #(
  parameter int ND = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          insert,
  input  logic          dp_in,
  output logic          dp_out,
  input  logic          rdp_r_in,
  output logic          rdp_l_out,
  output logic [ND-1:0] ins_pos,
  output logic [ND-1:0] double_sel
);

  logic [ND-1:0] f;

  always_comb begin
    for (int i = 0; i < ND; i++) begin
      ins_pos[i]    = !f[i] && ((i == ND - 1) ? dp_in : f[(i + 1) % ND]);
      double_sel[i] = f[i] && ((i == 0) ? rdp_r_in : f[(i + ND - 1) % ND]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr)  f <= '0;
    else if (insert) f <= f | ins_pos;
  end

  assign dp_out    = f[0];
  assign rdp_l_out = f[ND-1];

endmodule
