// sram_sp: single-port synchronous static RAM, used for the digit memory of
// each arithmetic module (80-bit words, 16 digits of five bits) and for the
// management memory of the control module (24-bit words).
//
// The document addresses up to one megaword of each; the depth is 2**AW.
// It describes the memories as fast static RAM driven by the control chip
// and gives no timing beyond a 25 ns cycle; here a write happens on the
// rising clock edge when ce and we are high, and a read returns the word on
// rdata one cycle after ce is high with we low (registered output).
module sram_sp #(
  parameter int AW = 20,
  parameter int DW = 80
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
