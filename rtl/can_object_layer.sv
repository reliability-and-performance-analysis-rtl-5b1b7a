// can_object_layer: message filtering, message status and host handshake.
//
// Transmit side: a one-cycle `tx_start_i` with a message on `tx_msg_i`
// is accepted when no transmission is pending; the message is held in a
// register and `tx_pending_o` stays high until the transfer layer reports
// `tx_done`, which produces the one-cycle `sndok_o` pulse to the host.
// Requests while a message is pending are ignored.
//
// Receive side: a received frame (`rx_done` with `rx_msg`) passes the
// acceptance filter when the identifier bits selected by `acc_mask_i`
// (1 = compare) equal those of `acc_code_i`. An accepted message goes to a
// one-entry receive buffer and sets `rx_valid_o` until the host pulses
// `rx_ack_i`. An accepted message that arrives while the buffer is still
// full is dropped, sets `rx_overrun_o` (cleared by `rx_ack_i`) and pulses
// `ovl_req_o`, asking the transfer layer for an overload frame to delay the
// next frame. Filtering and status handling belong to the object layer in
// the design; the single buffer entry and the mask/code filter are this
// implementation's choice.
module can_object_layer
  import can_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            tx_start_i,
  input  can_msg_t        tx_msg_i,
  input  logic            rx_ack_i,
  input  logic [ID_W-1:0] acc_code_i,
  input  logic [ID_W-1:0] acc_mask_i,
  output logic            sndok_o,
  output logic            rx_valid_o,
  output logic            rx_overrun_o,
  output can_msg_t        rx_msg_o,
  // transfer layer
  output logic            tx_pending_o,
  output can_msg_t        tx_msg_o,
  input  logic            tx_done,
  input  logic            rx_done,
  input  can_msg_t        rx_msg,
  output logic            ovl_req_o
);

  logic accept;
  assign accept    = (((rx_msg.id ^ acc_code_i) & acc_mask_i) == '0);
  assign ovl_req_o = rx_done && accept && rx_valid_o && !rx_ack_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_pending_o <= 1'b0;
      tx_msg_o     <= '0;
      sndok_o      <= 1'b0;
      rx_valid_o   <= 1'b0;
      rx_overrun_o <= 1'b0;
      rx_msg_o     <= '0;
    end else begin
      sndok_o <= 1'b0;
      if (tx_done && tx_pending_o) begin
        tx_pending_o <= 1'b0;
        sndok_o      <= 1'b1;
      end else if (tx_start_i && !tx_pending_o) begin
        tx_pending_o <= 1'b1;
        tx_msg_o     <= tx_msg_i;
      end

      if (rx_ack_i) begin
        rx_valid_o   <= 1'b0;
        rx_overrun_o <= 1'b0;
      end
      if (rx_done && accept) begin
        if (rx_valid_o && !rx_ack_i) begin
          rx_overrun_o <= 1'b1;
        end else begin
          rx_msg_o   <= rx_msg;
          rx_valid_o <= 1'b1;
        end
      end
    end
  end

endmodule
