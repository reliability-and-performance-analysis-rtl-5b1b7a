// can_controller: one complete CAN 2.0A controller (the "plain" version).
//
// Connects the three layers of the controller: can_bit_timing (bit rate,
// synchronisation, triple sampling), can_protocol (transfer layer: framing,
// arbitration, stuffing, CRC, error detection, error and overload frames,
// fault confinement) and can_object_layer (acceptance filter, receive buffer
// and status, transmit handshake). The bus side is a single transmit line
// `out_o.tx` and a receive line `rx_i` (1 = recessive), as presented to an
// external CAN transceiver. Everything the controller drives is gathered in
// the `can_out_t` bundle so that redundant copies can be compared as a
// whole. All logic is synchronous to `clk`, reset is asynchronous, active low.
module can_controller
  import can_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 16_000_000,
  parameter int unsigned BITRATE       = 250_000,
  parameter int unsigned PASSIVE_LIMIT = 128,
  parameter int unsigned BUS_OFF_LIMIT = 256,
  parameter int unsigned RECOVERY_SEQ  = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx_i,
  input  logic            tx_start_i,
  input  can_msg_t        tx_msg_i,
  input  logic            rx_ack_i,
  input  logic [ID_W-1:0] acc_code_i,
  input  logic [ID_W-1:0] acc_mask_i,
  output can_out_t        out_o
);

  logic     sample, bit_v, tx_point, tx, hard_sync_en;
  logic     tx_pending, tx_done, rx_done, ovl_req;
  can_msg_t tx_msg, rx_msg;

  can_bit_timing #(.CLK_HZ(CLK_HZ), .BITRATE(BITRATE)) u_bt (
    .clk, .rst_n, .rx_i, .hard_sync_en, .tx_dominant(!tx),
    .sample_o(sample), .bit_o(bit_v), .tx_point_o(tx_point)
  );

  can_protocol #(
    .PASSIVE_LIMIT(PASSIVE_LIMIT), .BUS_OFF_LIMIT(BUS_OFF_LIMIT),
    .RECOVERY_SEQ(RECOVERY_SEQ)
  ) u_proto (
    .clk, .rst_n, .sample, .bit_i(bit_v), .tx_point, .tx_o(tx), .hard_sync_en,
    .tx_req(tx_pending), .tx_msg, .tx_done, .rx_done, .rx_msg, .ovl_req,
    .err_state(out_o.err_state), .tec(out_o.tec), .rec(out_o.rec),
    .err_evt(out_o.err_evt), .err_kind(out_o.err_kind),
    .arb_lost(out_o.arb_lost), .ovl_evt(out_o.ovl_evt)
  );

  can_object_layer u_obj (
    .clk, .rst_n, .tx_start_i, .tx_msg_i, .rx_ack_i, .acc_code_i, .acc_mask_i,
    .sndok_o(out_o.sndok), .rx_valid_o(out_o.rx_valid),
    .rx_overrun_o(out_o.rx_overrun), .rx_msg_o(out_o.rx_msg),
    .tx_pending_o(tx_pending), .tx_msg_o(tx_msg), .tx_done, .rx_done, .rx_msg,
    .ovl_req_o(ovl_req)
  );

  assign out_o.tx      = tx;
  assign out_o.tx_busy = tx_pending;

endmodule
