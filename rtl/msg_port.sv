// msg_port: the control chip's side of the external message port.
//
// A four-phase request/acknowledge handshake on a 20-bit data bus (document):
// for a REQUEST cycle the external agent puts its data on the bus and raises
// req; when the controller is ready (rx_ready) the port latches the data and
// presents it as rx_data with rx_valid for one clock; the port then raises
// ack and holds it until the agent lowers req, and drops it after that.
// For a Result cycle the controller offers tx_data with tx_valid; the port
// drives it onto msg_out while the agent holds req high, raises ack, and
// finishes when req falls. The direction of each cycle is set by the
// controller (the message protocols are fixed), so the same req/ack pair
// serves both; the document gives the request-side sequence, the result
// side mirrors it (design choice). Inputs are assumed synchronous to clk.
module msg_port
  import cascade_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             req,
  output logic             ack,
  input  logic [MSG_W-1:0] msg_in,
  output logic [MSG_W-1:0] msg_out,
  // controller side
  input  logic             rx_ready,
  output logic             rx_valid,
  output logic [MSG_W-1:0] rx_data,
  input  logic             tx_valid,
  input  logic [MSG_W-1:0] tx_data,
  output logic             tx_done
);

  typedef enum logic [1:0] {P_IDLE, P_ACK} pstate_t;
  pstate_t st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= P_IDLE;
      ack      <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      tx_done  <= 1'b0;
      msg_out  <= '0;
    end else begin
      rx_valid <= 1'b0;
      tx_done  <= 1'b0;
      unique case (st)
        P_IDLE: if (req) begin
          if (tx_valid) begin
            msg_out <= tx_data;
            ack     <= 1'b1;
            st      <= P_ACK;
            tx_done <= 1'b1;
          end else if (rx_ready) begin
            rx_data  <= msg_in;
            rx_valid <= 1'b1;
            ack      <= 1'b1;
            st       <= P_ACK;
          end
        end
        P_ACK: if (!req) begin
          ack <= 1'b0;
          st  <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  // ack may only rise while req is high
  a_ack_rise: assert property (@(posedge clk) disable iff (rst) $rose(ack) |-> $past(req));

endmodule
