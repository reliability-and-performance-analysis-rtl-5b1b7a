// tb_can_controller: two plain controllers on one wired-AND bus.
//
// Node 0 and node 1 exchange frames. The bus bits sampled by node 0 are
// compared with frames built by can_ref_pkg (CRC by polynomial division,
// stuffing by a separate model); received messages are compared with what
// was sent. Covered: data frame with all 8 bytes, a frame that needs many
// stuff bits, a remote frame, simultaneous start with arbitration loss and
// automatic retry, acceptance filtering, receive overrun with an overload
// frame, a forced bit error with error frame and error counter update, and
// ACK errors on a lone node until it becomes error passive. The bit period
// is checked against 250 kbit/s at 16 MHz (64 clock cycles per bit).
module tb_can_controller;
  import can_pkg::*;
  import can_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n0 = 1'b0, rst_n1 = 1'b0;
  always #5 clk = ~clk;

  logic            start [2];
  can_msg_t        msg   [2];
  logic            ack   [2];
  logic [ID_W-1:0] code  [2];
  logic [ID_W-1:0] mask  [2];
  can_out_t        out   [2];
  logic            force_dom = 1'b0;
  logic            bus;

  assign bus = out[0].tx & out[1].tx & !force_dom;

  can_controller n0 (.clk, .rst_n(rst_n0), .rx_i(bus), .tx_start_i(start[0]),
    .tx_msg_i(msg[0]), .rx_ack_i(ack[0]), .acc_code_i(code[0]),
    .acc_mask_i(mask[0]), .out_o(out[0]));
  can_controller n1 (.clk, .rst_n(rst_n1), .rx_i(bus), .tx_start_i(start[1]),
    .tx_msg_i(msg[1]), .rx_ack_i(ack[1]), .acc_code_i(code[1]),
    .acc_mask_i(mask[1]), .out_o(out[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus bits as sampled by node 0
  bit   rec_en = 0;
  bit   rec_q[$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rec_en && n0.u_bt.sample_o) rec_q.push_back(n0.u_bt.bit_o);
  end

  // event counters
  int n_arb = 0, n_ovl = 0, n_err = 0, n_sndok0 = 0, n_sndok1 = 0;
  always @(posedge clk) begin
    if (out[0].arb_lost) n_arb++;
    if (out[0].ovl_evt || out[1].ovl_evt) n_ovl++;
    if (out[0].err_evt) n_err++;
    if (out[0].sndok) n_sndok0++;
    if (out[1].sndok) n_sndok1++;
  end

  task automatic wait_bits(int n);
    repeat (n * 64) @(posedge clk);
  endtask

  task automatic send(int n, can_msg_t m);
    @(negedge clk);
    msg[n] = m; start[n] = 1'b1;
    @(negedge clk);
    start[n] = 1'b0;
  endtask

  task automatic wait_sndok(int n, int max_bits, output bit ok);
    int base = (n == 0) ? n_sndok0 : n_sndok1;
    ok = 0;
    for (int i = 0; i < max_bits * 64; i++) begin
      @(posedge clk);
      if (((n == 0) ? n_sndok0 : n_sndok1) > base) begin ok = 1; break; end
    end
  endtask

  task automatic rx_ack(int n);
    @(negedge clk); ack[n] = 1'b1; @(negedge clk); ack[n] = 1'b0;
  endtask

  // compare the recorded bits, from the first dominant bit, with a frame
  task automatic check_frame(can_msg_t m, string what);
    bitq_t ref_q = frame_tx(m.id, m.rtr, m.dlc, m.data);
    int s = -1, ack_pos;
    foreach (rec_q[i]) if (s < 0 && rec_q[i] == 1'b0) s = i;
    ack_pos = ref_q.size() - 9;
    ref_q[ack_pos] = 1'b0;        // acknowledged by the other node
    check(s >= 0 && rec_q.size() >= s + ref_q.size(), {what, ": frame recorded"});
    if (s >= 0 && rec_q.size() >= s + ref_q.size()) begin
      int bad = 0;
      foreach (ref_q[i]) if (rec_q[s+i] != ref_q[i]) bad++;
      check(bad == 0, $sformatf("%s: %0d of %0d bus bits differ", what, bad, ref_q.size()));
    end
  endtask

  function automatic can_msg_t mk(bit [10:0] id, bit rtr, bit [3:0] dlc, bit [63:0] d);
    mk.id = id; mk.rtr = rtr; mk.dlc = dlc; mk.data = d;
  endfunction

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    can_msg_t m, m2;
    bit ok;
    longint t0;
    int nb;
    for (int i = 0; i < 2; i++) begin
      start[i] = 0; msg[i] = '0; ack[i] = 0; code[i] = '0; mask[i] = '0;
    end
    repeat (10) @(posedge clk);
    rst_n0 = 1'b1; rst_n1 = 1'b1;
    wait_bits(14);                        // bus integration

    // 1: node 0 sends 8 data bytes
    m = mk(11'h123, 1'b0, 4'd8, 64'hA55A_0F1E_C3D2_7788);
    rec_q.delete(); rec_en = 1;
    send(0, m);
    t0 = cyc;
    wait_sndok(0, 200, ok);
    rec_en = 0;
    check(ok, "frame 1 sndok");
    check_frame(m, "frame 1");
    nb = frame_tx(m.id, m.rtr, m.dlc, m.data).size();
    // from the request to sndok: at most one bit of waiting for the bit
    // boundary, then nb bits of 64 cycles each
    check((cyc - t0) >= longint'(nb - 1) * 64 && (cyc - t0) <= longint'(nb + 1) * 64,
          $sformatf("frame 1 took %0d cycles for %0d bits", cyc - t0, nb));
    check(out[1].rx_valid && out[1].rx_msg == m, "frame 1 received by node 1");
    rx_ack(1);

    // 2: node 1 sends a frame full of stuff bits, node 0 receives
    wait_bits(4);
    m = mk(11'h000, 1'b0, 4'd4, 64'h0000_0000_FFFF_FFFF);
    rec_q.delete(); rec_en = 1;
    send(1, m);
    wait_sndok(1, 200, ok);
    wait_bits(1);
    rec_en = 0;
    check(ok, "frame 2 sndok");
    check_frame(m, "frame 2 (stuffing)");
    check(frame_tx(m.id, m.rtr, m.dlc, m.data).size() > 10 + 19 + 32 + 15 + 3,
          "frame 2 carries stuff bits");
    check(out[0].rx_valid && out[0].rx_msg == '{id:11'h000, rtr:1'b0, dlc:4'd4,
          data:64'h0000_0000_0000_0000}, "frame 2 received by node 0 (4 bytes)");
    rx_ack(0);

    // 3: remote frame
    wait_bits(4);
    m = mk(11'h5A5, 1'b1, 4'd2, 64'h0);
    rec_q.delete(); rec_en = 1;
    send(0, m);
    wait_sndok(0, 200, ok);
    rec_en = 0;
    check(ok, "remote frame sndok");
    check_frame(m, "remote frame");
    check(out[1].rx_valid && out[1].rx_msg == m, "remote frame received");
    rx_ack(1);

    // 4: both start together, node 1 has the lower identifier and wins
    wait_bits(4);
    m  = mk(11'h100, 1'b0, 4'd1, 64'h1100_0000_0000_0000);
    m2 = mk(11'h0FF, 1'b0, 4'd1, 64'h2200_0000_0000_0000);
    fork send(0, m); send(1, m2); join
    wait_sndok(1, 200, ok);
    check(ok, "arbitration winner sent");
    check(n_arb == 1, "node 0 lost arbitration once");
    check(out[0].rx_valid && out[0].rx_msg == m2, "loser received the winner's frame");
    check(out[0].tx_busy, "loser still has its frame pending");
    rx_ack(0);
    wait_sndok(0, 200, ok);
    check(ok, "loser retried and sent");
    check(out[1].rx_valid && out[1].rx_msg == m, "winner received the retried frame");
    rx_ack(1);

    // 5: acceptance filter on node 1 rejects identifier 0x2xx
    wait_bits(4);
    code[1] = 11'h100; mask[1] = 11'h700;
    m = mk(11'h2AB, 1'b0, 4'd1, 64'h3300_0000_0000_0000);
    send(0, m);
    wait_sndok(0, 200, ok);
    wait_bits(2);
    check(ok && !out[1].rx_valid, "filtered frame acknowledged but not stored");
    m = mk(11'h1AB, 1'b0, 4'd1, 64'h4400_0000_0000_0000);
    send(0, m);
    wait_sndok(0, 200, ok);
    wait_bits(2);
    check(ok && out[1].rx_valid && out[1].rx_msg == m, "matching frame stored");
    code[1] = '0; mask[1] = '0;

    // 6: node 1 does not read; next frame overruns and causes an overload frame
    m2 = mk(11'h1AC, 1'b0, 4'd1, 64'h5500_0000_0000_0000);
    send(0, m2);
    wait_sndok(0, 200, ok);
    wait_bits(20);
    check(out[1].rx_overrun, "receive overrun flagged");
    check(out[1].rx_msg == m, "first message kept on overrun");
    check(n_ovl >= 1, "overload frame sent");
    rx_ack(1);
    check(!out[1].rx_valid && !out[1].rx_overrun, "status cleared by ack");

    // 7: force one dominant bit into node 0's data field: bit error
    wait_bits(4);
    m = mk(11'h3FF, 1'b0, 4'd1, 64'hFF00_0000_0000_0000);
    send(0, m);
    // SOF + 12 + 6 bits: data starts after 19 bus bits (no stuffing here)
    wait_bits(24);
    @(negedge clk); force_dom = 1'b1;
    wait_bits(1);
    @(negedge clk); force_dom = 1'b0;
    wait_bits(2);
    check(n_err == 1 && out[0].err_kind == E_BIT, "bit error detected");
    check(out[0].tec == 9'd8, $sformatf("TEC after tx error = %0d", out[0].tec));
    wait_bits(10);
    check(out[1].rec == 9'd1, $sformatf("REC of receiver = %0d", out[1].rec));
    wait_sndok(0, 300, ok);
    check(ok, "frame resent after error");
    check(out[0].tec == 9'd7, "TEC decremented after success");
    check(out[1].rx_valid && out[1].rx_msg == m, "resent frame received");
    rx_ack(1);

    // 8: node 1 off the bus: ACK errors until node 0 becomes error passive
    rst_n1 = 1'b0;
    m = mk(11'h010, 1'b0, 4'd0, 64'h0);
    send(0, m);
    for (int i = 0; i < 40 && out[0].err_state != ERR_PASSIVE; i++) wait_bits(40);
    check(out[0].err_state == ERR_PASSIVE, $sformatf("error passive, TEC=%0d", out[0].tec));
    check(out[0].err_kind == E_ACK, "ACK error reported");
    wait_bits(200);
    check(out[0].tec == 9'd135 || out[0].tec == 9'd128 || out[0].tec < 9'd136,
          $sformatf("passive ACK errors do not raise TEC (%0d)", out[0].tec));
    // node 1 back: the pending frame finally goes through
    rst_n1 = 1'b1;
    wait_sndok(0, 400, ok);
    check(ok, "frame acknowledged once node 1 is back");

    $display("events: arb_lost=%0d overload=%0d errors=%0d", n_arb, n_ovl, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
