// can_protocol: CAN 2.0A transfer layer (main state machine).
//
// Works one bit at a time on the pulses of can_bit_timing: on `sample` it
// reads the voted bus bit, checks it and advances through the frame; on
// `tx_point` (start of the next bit) it latches the level to drive on `tx_o`.
// The frame fields are the standard CAN 2.0A ones: start of frame,
// 11-bit identifier and RTR (arbitration), IDE, r0 and DLC (control), 0..8
// data bytes, 15-bit CRC, CRC delimiter, ACK slot, ACK delimiter, seven bits
// of end of frame and three bits of intermission.
//
// Transmission: with `tx_req` high and the bus idle the node sends start of
// frame and becomes transmitter. Every bit it sends is read back. Sending
// recessive and reading dominant inside the arbitration field means a
// higher-priority frame: the node stops sending and carries on as a
// receiver of that frame. `tx_done` pulses once the frame has been sent and
// acknowledged; a failed or lost frame is retried automatically while
// `tx_req` stays high.
//
// Error detection: bit error (read-back differs), stuff error (six equal
// bits), form error (a fixed-form bit is dominant), CRC error (received CRC
// differs; signalled after the ACK delimiter) and ACK error (no node
// acknowledged). An error starts can_err_frame at the next bit and updates
// can_fault_conf. An overload frame (can_ovl_frame) is sent when the object
// layer reports a receive overflow (`ovl_req`, latched and acted on at the
// end of frame), when a receiver sees the last end-of-frame bit dominant,
// or on a dominant bit in the first two intermission bits.
//
// After reset, and after leaving bus off, the node first waits for 11
// recessive bits (bus integration). A bus-off node counts runs of 11
// recessive bits for its recovery.
//
// The order of states, the arbitration-loss path, the error detection
// mechanisms and the error/overload sequences follow the design's
// description; the passive-node exception for ACK errors, the handling of
// extended frames (form error) and the bus integration wait are taken from
// the CAN standard and are this implementation's choice.
module can_protocol
  import can_pkg::*;
#(
  parameter int unsigned PASSIVE_LIMIT = 128,
  parameter int unsigned BUS_OFF_LIMIT = 256,
  parameter int unsigned RECOVERY_SEQ  = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  // bit timing
  input  logic             sample,
  input  logic             bit_i,
  input  logic             tx_point,
  output logic             tx_o,
  output logic             hard_sync_en,
  // object layer
  input  logic             tx_req,
  input  can_msg_t         tx_msg,
  output logic             tx_done,
  output logic             rx_done,
  output can_msg_t         rx_msg,
  input  logic             ovl_req,
  // status
  output err_state_e       err_state,
  output logic [CNT_W-1:0] tec,
  output logic [CNT_W-1:0] rec,
  output logic             err_evt,
  output err_kind_e        err_kind,
  output logic             arb_lost,
  output logic             ovl_evt
);

  typedef enum logic [3:0] {
    S_SYNC, S_IDLE, S_ARB, S_CTRL, S_DATA, S_CRC, S_CRC_DEL, S_ACK,
    S_ACK_DEL, S_EOF, S_INTER, S_ERR, S_OVL, S_BUSOFF
  } state_e;

  state_e      st;
  logic [6:0]  cnt;          // bit position inside the current field
  logic        is_tx;        // this node is the transmitter of the frame
  logic        crc_ok;
  logic        ovl_pend;
  logic [3:0]  rec_run;      // consecutive recessive bits (integration, bus off)
  logic [6:0]  data_bits;    // number of data bits of the frame
  logic [14:0] rx_crc;
  can_msg_t    rx_q;

  // sub-units
  logic [14:0] crc;
  logic        crc_clear, crc_shift;
  logic        stf_next, stf_last, stf_err, stf_clear, stf_en;
  logic        ef_start, ef_tx, ef_busy, ef_done, ef_echo_dom;
  logic        of_start, of_tx, of_busy, of_done;
  logic        fc_tx_err, fc_rx_err, fc_tx_ok, fc_rx_ok, fc_rec11;

  // bit classification for the bit under sample
  logic stuffed, is_stuff_bit;
  assign stuffed      = (st inside {S_ARB, S_CTRL, S_DATA, S_CRC}) ||
                        (st == S_CRC_DEL && stf_next);
  assign is_stuff_bit = stuffed && stf_next;

  // value this node sends for the current field bit (before stuffing)
  logic field_bit;
  always_comb begin
    field_bit = 1'b1;
    unique case (st)
      S_ARB:  field_bit = (cnt < 7'd11) ? tx_msg.id[4'd10 - cnt[3:0]] : tx_msg.rtr;
      S_CTRL: field_bit = (cnt < 7'd2) ? 1'b0 : tx_msg.dlc[2'(3'd5 - cnt[2:0])];
      S_DATA: field_bit = tx_msg.data[6'd63 - cnt[5:0]];
      S_CRC:  field_bit = crc[4'd14 - cnt[3:0]];
      default: field_bit = 1'b1;
    endcase
  end

  // level to drive during the next bit
  logic next_tx;
  always_comb begin
    next_tx = 1'b1;
    if (st == S_ERR)                         next_tx = ef_tx;
    else if (st == S_OVL)                    next_tx = of_tx;
    else if (st == S_ACK)                    next_tx = is_tx ? 1'b1 : !crc_ok;
    else if (is_tx && is_stuff_bit)          next_tx = !stf_last;
    else if (is_tx && stuffed)               next_tx = field_bit;
    else                                     next_tx = 1'b1;
  end

  // data length in bits from DLC (values above 8 mean 8 bytes)
  function automatic logic [6:0] dlc_bits(logic [3:0] dlc, logic rtr);
    if (rtr)              return 7'd0;
    else if (dlc > 4'd8)  return 7'd64;
    else                  return {dlc, 3'b000};
  endfunction

  assign hard_sync_en = tx_o && (st inside {S_SYNC, S_IDLE, S_BUSOFF} ||
                                 (st == S_INTER && cnt == 7'd2));

  logic sof_now;
  assign stf_en    = stuffed || sof_now;
  assign stf_clear = (st == S_IDLE || st == S_INTER) && !sample;

  can_crc15 u_crc (
    .clk, .rst_n, .clear(crc_clear), .shift(crc_shift), .bit_i, .crc_o(crc)
  );

  can_bit_stuff u_stuff (
    .clk, .rst_n, .clear(stf_clear), .en(stf_en), .sample, .bit_i,
    .stuff_next(stf_next), .last_o(stf_last), .stuff_err(stf_err)
  );

  can_err_frame u_err (
    .clk, .rst_n, .start(ef_start), .passive(err_state == ERR_PASSIVE),
    .sample, .bit_i, .tx_o(ef_tx), .busy(ef_busy), .done(ef_done),
    .echo_dom(ef_echo_dom)
  );

  can_ovl_frame u_ovl (
    .clk, .rst_n, .start(of_start), .sample, .bit_i,
    .tx_o(of_tx), .busy(of_busy), .done(of_done)
  );

  can_fault_conf #(
    .PASSIVE_LIMIT(PASSIVE_LIMIT), .BUS_OFF_LIMIT(BUS_OFF_LIMIT),
    .RECOVERY_SEQ(RECOVERY_SEQ)
  ) u_fc (
    .clk, .rst_n, .tx_err(fc_tx_err), .rx_err(fc_rx_err), .rx_err8(ef_echo_dom),
    .tx_ok(fc_tx_ok), .rx_ok(fc_rx_ok), .rec11(fc_rec11),
    .tec, .rec, .state(err_state)
  );

  // ---------------------------------------------------------------------
  // per-bit decisions, evaluated on the sample pulse
  // ---------------------------------------------------------------------
  logic      err_now;
  err_kind_e err_k;
  logic      lost_now;
  logic      ovl_now;

  always_comb begin
    err_now  = 1'b0;
    err_k    = E_NONE;
    lost_now = 1'b0;
    ovl_now  = 1'b0;
    if (sample) begin
      if (stuffed && stf_err) begin
        err_now = 1'b1;  err_k = E_STUFF;
      end else if (is_tx && (stuffed || st inside {S_CRC_DEL, S_ACK_DEL, S_EOF})
                   && bit_i != tx_o) begin
        if (st == S_ARB && !is_stuff_bit && tx_o && !bit_i) lost_now = 1'b1;
        else begin err_now = 1'b1; err_k = E_BIT; end
      end else if (!is_stuff_bit) begin
        unique case (st)
          S_CTRL:    if (cnt == 7'd0 && bit_i) begin err_now = 1'b1; err_k = E_FORM; end
          S_CRC_DEL: if (!bit_i) begin err_now = 1'b1; err_k = E_FORM; end
          S_ACK:     if (is_tx && bit_i) begin err_now = 1'b1; err_k = E_ACK; end
          S_ACK_DEL: if (!bit_i) begin err_now = 1'b1; err_k = E_FORM; end
                     else if (!is_tx && !crc_ok) begin err_now = 1'b1; err_k = E_CRC; end
          S_EOF: if (!bit_i) begin
                   if (!is_tx && cnt == 7'd6) ovl_now = 1'b1;
                   else begin err_now = 1'b1; err_k = E_FORM; end
                 end
          S_INTER: if (!bit_i && cnt < 7'd2) ovl_now = 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign ef_start  = err_now;
  assign fc_tx_err = err_now && is_tx &&
                     !(err_k == E_ACK && err_state == ERR_PASSIVE);
  assign fc_rx_err = err_now && !is_tx;

  // SOF seen (in idle, or as the third intermission bit)
  assign sof_now = sample && !bit_i &&
                   (st == S_IDLE || (st == S_INTER && cnt == 7'd2));

  assign crc_clear = sof_now;
  assign crc_shift = sample && !is_stuff_bit && !err_now &&
                     (st inside {S_ARB, S_CTRL, S_DATA});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_SYNC;
      cnt       <= '0;
      is_tx     <= 1'b0;
      tx_o      <= 1'b1;
      crc_ok    <= 1'b0;
      ovl_pend  <= 1'b0;
      rec_run   <= '0;
      data_bits <= '0;
      rx_crc    <= '0;
      rx_q      <= '0;
      rx_msg    <= '0;
      tx_done   <= 1'b0;
      rx_done   <= 1'b0;
      err_evt   <= 1'b0;
      err_kind  <= E_NONE;
      arb_lost  <= 1'b0;
      ovl_evt   <= 1'b0;
      of_start  <= 1'b0;
      fc_tx_ok  <= 1'b0;
      fc_rx_ok  <= 1'b0;
      fc_rec11  <= 1'b0;
    end else begin
      tx_done  <= 1'b0;
      rx_done  <= 1'b0;
      err_evt  <= 1'b0;
      arb_lost <= 1'b0;
      ovl_evt  <= 1'b0;
      of_start <= 1'b0;
      fc_tx_ok <= 1'b0;
      fc_rx_ok <= 1'b0;
      fc_rec11 <= 1'b0;

      if (ovl_req) ovl_pend <= 1'b1;

      // drive the next bit
      if (tx_point) begin
        if (st == S_IDLE && tx_req && err_state != BUS_OFF) begin
          tx_o  <= 1'b0;            // start of frame
          is_tx <= 1'b1;
        end else begin
          tx_o <= next_tx;
        end
      end

      if (sample) begin
        if (err_now) begin
          st       <= S_ERR;
          cnt      <= '0;
          is_tx    <= 1'b0;
          err_evt  <= 1'b1;
          err_kind <= err_k;
        end else if (ovl_now) begin
          st       <= S_OVL;
          cnt      <= '0;
          of_start <= 1'b1;
          ovl_evt  <= 1'b1;
          ovl_pend <= 1'b0;
        end else begin
          if (lost_now) begin
            is_tx    <= 1'b0;
            arb_lost <= 1'b1;
          end
          if (!is_stuff_bit) begin
            cnt <= cnt + 1'b1;
            unique case (st)
              S_SYNC, S_BUSOFF: begin
                cnt <= '0;
                if (bit_i) rec_run <= (rec_run == 4'd10) ? 4'd0 : rec_run + 1'b1;
                else       rec_run <= '0;
                if (bit_i && rec_run == 4'd10) begin
                  if (st == S_SYNC) st <= S_IDLE;
                  else              fc_rec11 <= 1'b1;
                end
              end
              S_IDLE: begin
                cnt <= '0;
                if (!bit_i) begin
                  st   <= S_ARB;
                  rx_q <= '0;
                end else begin
                  is_tx <= 1'b0;
                end
              end
              S_ARB: begin
                if (cnt < 7'd11) rx_q.id[4'd10 - cnt[3:0]] <= bit_i;
                else             rx_q.rtr <= bit_i;
                if (cnt == 7'd11) begin st <= S_CTRL; cnt <= '0; end
              end
              S_CTRL: begin
                if (cnt >= 7'd2) rx_q.dlc[2'(3'd5 - cnt[2:0])] <= bit_i;
                if (cnt == 7'd5) begin
                  cnt       <= '0;
                  data_bits <= dlc_bits({rx_q.dlc[3:1], bit_i}, rx_q.rtr);
                  st        <= (dlc_bits({rx_q.dlc[3:1], bit_i}, rx_q.rtr) == 7'd0)
                               ? S_CRC : S_DATA;
                end
              end
              S_DATA: begin
                rx_q.data[6'd63 - cnt[5:0]] <= bit_i;
                if (cnt == data_bits - 7'd1) begin st <= S_CRC; cnt <= '0; end
              end
              S_CRC: begin
                rx_crc <= {rx_crc[13:0], bit_i};
                if (cnt == 7'd14) begin st <= S_CRC_DEL; cnt <= '0; end
              end
              S_CRC_DEL: begin
                crc_ok <= (rx_crc == crc);
                st     <= S_ACK;
                cnt    <= '0;
              end
              S_ACK:     begin st <= S_ACK_DEL; cnt <= '0; end
              S_ACK_DEL: begin st <= S_EOF;     cnt <= '0; end
              S_EOF: begin
                if (cnt == 7'd5 && !is_tx) begin
                  rx_done  <= 1'b1;
                  rx_msg   <= rx_q;
                  fc_rx_ok <= 1'b1;
                end
                if (cnt == 7'd6) begin
                  cnt <= '0;
                  if (is_tx) begin
                    tx_done  <= 1'b1;
                    fc_tx_ok <= 1'b1;
                    is_tx    <= 1'b0;
                  end
                  if (ovl_pend || ovl_req) begin
                    st       <= S_OVL;
                    of_start <= 1'b1;
                    ovl_evt  <= 1'b1;
                    ovl_pend <= 1'b0;
                  end else begin
                    st <= S_INTER;
                  end
                end
              end
              S_INTER: begin
                if (cnt == 7'd2) begin
                  cnt <= '0;
                  if (!bit_i) begin
                    st    <= S_ARB;      // another node's start of frame
                    rx_q  <= '0;
                    is_tx <= 1'b0;
                  end else begin
                    st <= S_IDLE;
                  end
                end
              end
              S_ERR, S_OVL: cnt <= '0;   // sequenced by the sub-units
              default: st <= S_SYNC;
            endcase
          end
        end
      end

      // end of error / overload frame, recovery from bus off
      if (st == S_ERR && ef_done) st <= (err_state == BUS_OFF) ? S_BUSOFF : S_INTER;
      if (st == S_OVL && of_done) st <= S_INTER;
      if (st == S_BUSOFF && err_state != BUS_OFF) st <= S_SYNC;
    end
  end

  // in a state where this node drives a fixed level, it never drives dominant
  // outside frame, ACK, error and overload bits
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st inside {S_SYNC, S_BUSOFF}) |-> tx_o)
    else $error("dominant bit driven while not participating");

  // the error and overload sequencers only run inside their own states
  assert property (@(posedge clk) disable iff (!rst_n) ef_busy |-> st == S_ERR)
    else $error("error frame running outside the error state");
  assert property (@(posedge clk) disable iff (!rst_n) of_busy |-> st == S_OVL)
    else $error("overload frame running outside the overload state");

endmodule
