// tb_can_ddwc: end-to-end test of the dual duplex CAN controller.
//
// The top level, at its default parameters (16 MHz, 250 kbit/s), shares a
// wired-AND bus with a plain controller (the peer). The testbench can also
// corrupt single bits on the top level's receive line only. The run goes
// through: frames in both directions (one full of stuff bits), simultaneous
// start with arbitration loss and retry, a receive overrun with overload
// frame, a corrupted bit seen only by the top level (CRC error, error frame,
// receive error count, retransmission by the peer), an emulated upset in
// pair A (switch-over to pair B with the frame on the bus intact), and an
// upset in pair B (both pairs disconnected, bus held recessive). Each of
// these mechanisms is counted, and one that never happened is a failure.
module tb_can_ddwc;
  import can_pkg::*;
  import can_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     start [2];
  can_msg_t msg   [2];
  logic     ack   [2];
  can_out_t out   [2];
  logic     tx_top;
  logic [1:0] fail;
  logic     active, fatal, pair_diff;
  logic [11:0] diag;
  logic     bus, rx_corrupt = 0;
  assign bus = tx_top & out[1].tx;

  can_ddwc dut (.clk, .rst_n, .rx_i(bus & !rx_corrupt), .tx_o(tx_top),
    .tx_start_i(start[0]), .tx_msg_i(msg[0]), .rx_ack_i(ack[0]),
    .acc_code_i('0), .acc_mask_i('0), .out_o(out[0]), .fail_o(fail),
    .active_o(active), .fatal_o(fatal), .pair_diff_o(pair_diff),
    .diag_o(diag));
  can_controller peer (.clk, .rst_n, .rx_i(bus), .tx_start_i(start[1]),
    .tx_msg_i(msg[1]), .rx_ack_i(ack[1]), .acc_code_i('0), .acc_mask_i('0),
    .out_o(out[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_tx = 0, n_rx = 0, n_stuff = 0, n_arb = 0, n_ovl = 0, n_err = 0;
  int n_crc = 0, n_switch = 0, n_fatal = 0;
  logic active_q = 0, fatal_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (out[0].sndok) n_tx++;
    if (out[1].sndok) n_rx++;
    if (dut.g_pair[0].u_pair.g_rep[0].u_ctrl.u_proto.sample &&
        dut.g_pair[0].u_pair.g_rep[0].u_ctrl.u_proto.is_stuff_bit) n_stuff++;
    if (out[0].arb_lost) n_arb++;
    if (out[0].ovl_evt || out[1].ovl_evt) n_ovl++;
    if (out[0].err_evt) n_err++;
    // CRC mismatch found by the top level as a receiver (ACK withheld)
    if (dut.g_pair[0].u_pair.g_rep[0].u_ctrl.u_proto.sample &&
        dut.g_pair[0].u_pair.g_rep[0].u_ctrl.u_proto.st == 4'd7 &&
        !dut.g_pair[0].u_pair.g_rep[0].u_ctrl.u_proto.crc_ok &&
        !dut.g_pair[0].u_pair.g_rep[0].u_ctrl.u_proto.is_tx) n_crc++;
    if (active && !active_q) n_switch++;
    if (fatal && !fatal_q) n_fatal++;
    active_q <= active;
    fatal_q  <= fatal;
  end

  // bus bits as sampled by the peer
  bit rec_en = 0;
  bit rec_q[$];
  always @(posedge clk)
    if (rec_en && peer.u_bt.sample_o) rec_q.push_back(peer.u_bt.bit_o);

  task automatic wait_bits(int n);
    repeat (n * 64) @(posedge clk);
  endtask

  task automatic send(int n, can_msg_t m);
    @(negedge clk); msg[n] = m; start[n] = 1;
    @(negedge clk); start[n] = 0;
  endtask

  task automatic wait_sndok(int n, output bit ok);
    ok = 0;
    for (int i = 0; i < 400 * 64 && !ok; i++) begin
      @(posedge clk);
      if (out[n].sndok) ok = 1;
    end
  endtask

  task automatic rx_ack(int n);
    @(negedge clk); ack[n] = 1; @(negedge clk); ack[n] = 0;
  endtask

  task automatic check_frame(can_msg_t m, string what);
    bitq_t ref_q = frame_tx(m.id, m.rtr, m.dlc, m.data);
    int s = -1, bad = 0;
    foreach (rec_q[i]) if (s < 0 && rec_q[i] == 1'b0) s = i;
    ref_q[ref_q.size() - 9] = 1'b0;
    if (s < 0 || rec_q.size() < s + ref_q.size()) bad = ref_q.size();
    else foreach (ref_q[i]) if (rec_q[s+i] != ref_q[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d bus bits differ", what, bad));
  endtask

  initial begin
    can_msg_t m, m2;
    bit ok;
    longint t0;
    for (int i = 0; i < 2; i++) begin start[i] = 0; msg[i] = '0; ack[i] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait_bits(14);

    // top level transmits; frame checked bit by bit on the bus
    m = '{id:11'h6A5, rtr:0, dlc:4'd8, data:64'h8899_AABB_CCDD_EEFF};
    rec_q.delete(); rec_en = 1;
    send(0, m);
    wait_sndok(0, ok);
    wait_bits(1); rec_en = 0;
    check(ok, "top level sndok");
    check_frame(m, "top level frame");
    check(out[1].rx_valid && out[1].rx_msg == m, "peer received");
    rx_ack(1);

    // peer transmits a frame needing many stuff bits
    m = '{id:11'h000, rtr:0, dlc:4'd8, data:64'h0};
    send(1, m);
    wait_sndok(1, ok);
    wait_bits(1);
    check(ok && out[0].rx_valid && out[0].rx_msg == m, "top level received stuffed frame");
    rx_ack(0);

    // simultaneous start: the peer (lower identifier) wins
    wait_bits(3);
    m  = '{id:11'h300, rtr:0, dlc:4'd1, data:64'h0100_0000_0000_0000};
    m2 = '{id:11'h2FF, rtr:0, dlc:4'd1, data:64'h0200_0000_0000_0000};
    fork send(0, m); send(1, m2); join
    wait_sndok(1, ok);
    check(ok && n_arb == 1, "arbitration lost by the top level");
    wait_sndok(0, ok);
    check(ok && out[1].rx_msg == m, "top level retried");
    check(out[0].rx_msg == m2, "top level received the winner");

    // overrun: the top level does not read, two more frames arrive
    m = '{id:11'h111, rtr:0, dlc:4'd1, data:64'h0300_0000_0000_0000};
    send(1, m);
    wait_sndok(1, ok);
    wait_bits(20);
    check(out[0].rx_overrun, "overrun at the top level");
    check(n_ovl > 0, "overload frame");
    rx_ack(0); rx_ack(1);

    // a bit corrupted on the top level's receive line only: CRC error
    wait_bits(3);
    m = '{id:11'h155, rtr:0, dlc:4'd2, data:64'hAAAA_0000_0000_0000};
    send(1, m);
    // SOF, 11 id, rtr, ide, r0, 4 dlc = 19 bits plus one stuff bit after
    // the five dominant bits rtr..dlc[2], then data 1010...: pull the third
    // data bit (a 1, bus bit 22) dominant for the top level only
    @(negedge bus);
    repeat (64 * 22 + 8) @(negedge clk);
    rx_corrupt = 1;
    repeat (48) @(negedge clk);
    rx_corrupt = 0;
    wait_sndok(1, ok);
    wait_bits(2);
    // the top level withholds its ACK; being the only receiver, the peer
    // then sees an ACK error and the top level a dominant ACK delimiter
    check(n_crc == 1, "CRC mismatch detected by the top level");
    check(n_err == 1, "error frame from the top level");
    check(peer.u_proto.u_fc.tec == 9'd7 || peer.u_proto.u_fc.tec == 9'd8 ||
          out[1].err_kind == E_ACK, "peer saw the missing acknowledgement");
    check(ok && out[0].rx_valid && out[0].rx_msg == m, "frame received after retransmission");
    check(out[0].rec == 9'd0, "REC back to zero after the good frame");
    check(fail == 2'b00 && !pair_diff, "bus errors do not disconnect a pair");
    rx_ack(0);

    // upset in pair A, replica 1: a pending data bit
    wait_bits(3);
    m = '{id:11'h0AA, rtr:0, dlc:4'd4, data:64'h1234_5678_0000_0000};
    rec_q.delete(); rec_en = 1;
    send(0, m);
    @(negedge clk);
    dut.g_pair[0].u_pair.g_rep[1].u_ctrl.u_obj.tx_msg_o.data[40] =
      !dut.g_pair[0].u_pair.g_rep[1].u_ctrl.u_obj.tx_msg_o.data[40];
    wait_sndok(0, ok);
    wait_bits(1); rec_en = 0;
    check(ok, "frame completed across the switch-over");
    check_frame(m, "frame after switch-over");
    check(fail == 2'b01 && active && !fatal, "pair A disconnected, pair B active");
    check(out[1].rx_msg == m, "peer received the correct data");
    rx_ack(1);

    // pair B keeps working
    m = '{id:11'h0AB, rtr:0, dlc:4'd1, data:64'h7700_0000_0000_0000};
    send(0, m);
    wait_sndok(0, ok);
    check(ok && out[1].rx_msg == m, "pair B transmits alone");
    rx_ack(1);

    // upset in pair B as well: no trusted copy, bus held recessive
    @(negedge clk);
    dut.g_pair[1].u_pair.g_rep[0].u_ctrl.u_proto.u_fc.tec[2] =
      !dut.g_pair[1].u_pair.g_rep[0].u_ctrl.u_proto.u_fc.tec[2];
    @(negedge clk);
    check(fatal && fail == 2'b11, "both pairs failed");
    m = '{id:11'h001, rtr:0, dlc:4'd0, data:'0};
    send(0, m);
    t0 = 0;
    for (int i = 0; i < 200 * 64; i++) begin
      @(posedge clk);
      if (!tx_top) t0++;
    end
    check(t0 == 0, "failed node never drives the bus");

    $display("mechanisms: tx=%0d rx=%0d stuff_bits=%0d arb_lost=%0d overload=%0d errors=%0d crc=%0d switch=%0d fatal=%0d",
             n_tx, n_rx, n_stuff, n_arb, n_ovl, n_err, n_crc, n_switch, n_fatal);
    check(n_tx > 0,     "mechanism: transmission");
    check(n_rx > 0,     "mechanism: reception");
    check(n_stuff > 0,  "mechanism: bit stuffing");
    check(n_arb > 0,    "mechanism: arbitration loss");
    check(n_ovl > 0,    "mechanism: overload frame");
    check(n_err > 0,    "mechanism: error frame");
    check(n_crc > 0,    "mechanism: CRC check");
    check(n_switch > 0, "mechanism: pair switch-over");
    check(n_fatal > 0,  "mechanism: double failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
