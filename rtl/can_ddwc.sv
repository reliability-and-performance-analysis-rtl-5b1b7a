// can_ddwc: dual duplex with comparison (DDwC) CAN controller, the top level.
//
// Two can_dwc pairs (A, the primary, and B, the spare) run in lock step on
// the same inputs; four controller replicas in all. Each pair's comparator
// reports a mismatch between its two replicas. The selector drives the bus
// line and host outputs from pair A while A is healthy. A mismatch in A
// disconnects A for good (sticky `fail_o[0]`, cleared only by reset) and
// switches the outputs to pair B in the same cycle. If B also fails, no
// trusted copy remains: `fatal_o` is raised and the bus line is held
// recessive so that the faulty node cannot disturb the other nodes.
// A third comparator between the two pairs' outputs flags `pair_diff_o`
// when both pairs are internally consistent but disagree with each other
// (a common-mode fault that the pair comparators cannot see); this is
// reported only. `diag_o` tells which field groups differ at each comparator.
//
// Ports: the bus is `rx_i` / `tx_o` (1 = recessive) towards an external
// transceiver; the host side is the one of can_controller; `out_o` is the
// selected replica bundle. The structure (two duplex pairs and a comparator
// over them) follows the design; the switch-over policy (primary/spare,
// sticky disconnection, recessive bus on double failure) is this
// implementation's reading of it.
module can_ddwc
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
  output logic            tx_o,
  input  logic            tx_start_i,
  input  can_msg_t        tx_msg_i,
  input  logic            rx_ack_i,
  input  logic [ID_W-1:0] acc_code_i,
  input  logic [ID_W-1:0] acc_mask_i,
  output can_out_t        out_o,
  output logic [1:0]      fail_o,       // pair B, pair A disconnected
  output logic            active_o,     // 0: pair A drives, 1: pair B drives
  output logic            fatal_o,
  output logic            pair_diff_o,
  output logic [11:0]     diag_o        // differing field groups: {A vs B, pair B, pair A}
);

  can_out_t   pair_out [2];
  logic [1:0] mism;
  logic [1:0] bad;
  logic [3:0] diff_ab;
  logic [3:0] diff_p [2];
  logic       pair_neq;

  for (genvar p = 0; p < 2; p++) begin : g_pair
    can_dwc #(
      .CLK_HZ(CLK_HZ), .BITRATE(BITRATE), .PASSIVE_LIMIT(PASSIVE_LIMIT),
      .BUS_OFF_LIMIT(BUS_OFF_LIMIT), .RECOVERY_SEQ(RECOVERY_SEQ)
    ) u_pair (
      .clk, .rst_n, .rx_i, .tx_start_i, .tx_msg_i, .rx_ack_i, .acc_code_i,
      .acc_mask_i, .out_o(pair_out[p]), .mismatch_o(mism[p]),
      .diff_o(diff_p[p])
    );
  end

  can_out_cmp u_cmp_ab (
    .a(pair_out[0]), .b(pair_out[1]), .mismatch_o(pair_neq), .diff_o(diff_ab)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fail_o <= '0;
    else        fail_o <= fail_o | mism;
  end

  assign bad         = fail_o | mism;
  assign active_o    = bad[0];
  assign fatal_o     = &bad;
  assign pair_diff_o = pair_neq && (bad == 2'b00);

  always_comb begin
    out_o = bad[0] ? pair_out[1] : pair_out[0];
    if (fatal_o) out_o.tx = 1'b1;
  end

  assign tx_o   = out_o.tx;
  assign diag_o = {diff_ab, diff_p[1], diff_p[0]};

endmodule
