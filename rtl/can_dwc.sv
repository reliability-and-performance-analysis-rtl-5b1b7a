// can_dwc: duplex with comparison (DwC) of the CAN controller.
//
// Two identical can_controller replicas receive the same clock, reset, bus
// and host inputs; in a fault-free circuit their outputs are equal in every
// cycle. A can_out_cmp comparator raises `mismatch_o` (combinational, same
// cycle) as soon as an upset in either replica reaches its outputs. The
// pair cannot tell which replica is wrong, so it only reports; `out_o`
// always carries replica 0's bundle and the decision to disconnect the pair
// is taken one level up (can_ddwc). Both replicas keep the full controller,
// including its own CRC, stuffing and frame checks, which catch many bus
// disturbances before they reach the comparator.
module can_dwc
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
  output can_out_t        out_o,
  output logic            mismatch_o,
  output logic [3:0]      diff_o      // differing field groups (see can_out_cmp)
);

  can_out_t   rep_out [2];

  for (genvar r = 0; r < 2; r++) begin : g_rep
    can_controller #(
      .CLK_HZ(CLK_HZ), .BITRATE(BITRATE), .PASSIVE_LIMIT(PASSIVE_LIMIT),
      .BUS_OFF_LIMIT(BUS_OFF_LIMIT), .RECOVERY_SEQ(RECOVERY_SEQ)
    ) u_ctrl (
      .clk, .rst_n, .rx_i, .tx_start_i, .tx_msg_i, .rx_ack_i, .acc_code_i,
      .acc_mask_i, .out_o(rep_out[r])
    );
  end

  can_out_cmp u_cmp (
    .a(rep_out[0]), .b(rep_out[1]), .mismatch_o, .diff_o
  );

  assign out_o = rep_out[0];

endmodule
