// can_fault_conf: fault confinement (error counters and node state).
//
// Keeps the transmit and receive error counters (TEC, REC) and derives the
// node state, so that a node that keeps causing errors removes itself from
// the bus instead of disturbing the other nodes:
//   * error found while transmitting: TEC += 8 (`tx_err`)
//   * error found while receiving:    REC += 1 (`rx_err`); REC += 8 more
//     when the bit after the node's own error flag is dominant (`rx_err8`)
//   * frame sent successfully:        TEC -= 1 (`tx_ok`)
//   * frame received successfully:    REC -= 1, or REC = 120 when above 127
// The node is error passive while a counter is >= PASSIVE_LIMIT and goes
// bus off when TEC reaches BUS_OFF_LIMIT. A bus-off node returns to error
// active, with both counters cleared, after RECOVERY_SEQ pulses of `rec11`
// (each one a run of 11 recessive bits counted by the main state machine).
// The limits are parameters; their defaults are the CAN standard's values.
// All inputs are one-cycle pulses; outputs are registered.
module can_fault_conf
  import can_pkg::*;
#(
  parameter int unsigned PASSIVE_LIMIT = 128,
  parameter int unsigned BUS_OFF_LIMIT = 256,
  parameter int unsigned RECOVERY_SEQ  = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_err,
  input  logic             rx_err,
  input  logic             rx_err8,
  input  logic             tx_ok,
  input  logic             rx_ok,
  input  logic             rec11,
  output logic [CNT_W-1:0] tec,
  output logic [CNT_W-1:0] rec,
  output err_state_e       state
);

  localparam int unsigned RW = $clog2(RECOVERY_SEQ + 1);

  logic [RW-1:0] rcv_cnt;

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [3:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {{(CNT_W-3){1'b0}}, b};
    return (s > (CNT_W+1)'(BUS_OFF_LIMIT)) ? CNT_W'(BUS_OFF_LIMIT) : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tec     <= '0;
      rec     <= '0;
      state   <= ERR_ACTIVE;
      rcv_cnt <= '0;
    end else if (state == BUS_OFF) begin
      if (rec11) begin
        if (rcv_cnt == RW'(RECOVERY_SEQ - 1)) begin
          rcv_cnt <= '0;
          tec     <= '0;
          rec     <= '0;
          state   <= ERR_ACTIVE;
        end else begin
          rcv_cnt <= rcv_cnt + 1'b1;
        end
      end
    end else begin
      logic [CNT_W-1:0] t, r;
      t = tec;
      r = rec;
      if (tx_err)                 t = sat_add(t, 8);
      else if (tx_ok && t != '0)  t = t - 1'b1;
      if (rx_err)                 r = sat_add(r, 1);
      if (rx_err8)                r = sat_add(r, 8);
      if (rx_ok) begin
        if (r >= CNT_W'(PASSIVE_LIMIT)) r = CNT_W'(120);
        else if (r != '0)              r = r - 1'b1;
      end
      tec <= t;
      rec <= r;
      if (t >= CNT_W'(BUS_OFF_LIMIT))
        state <= BUS_OFF;
      else if (t >= CNT_W'(PASSIVE_LIMIT) || r >= CNT_W'(PASSIVE_LIMIT))
        state <= ERR_PASSIVE;
      else
        state <= ERR_ACTIVE;
    end
  end

endmodule
