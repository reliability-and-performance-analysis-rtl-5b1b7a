// tb_can_protocol: transfer layer driven bit by bit.
//
// The testbench plays the bit timing unit (a bit is 8 cycles: tx_point in
// cycle 0, sample in cycle 4) and the rest of the bus (bus = node tx AND
// testbench bit). Reference frames come from can_ref_pkg. Covered:
// transmission of a data frame bit-exact and its length in bits, reception
// of a frame with the node's ACK, CRC error, stuff error, form error in the
// CRC delimiter, ACK error, arbitration loss followed by reception, bus
// integration after reset, and an overload frame caused by a dominant bit
// in the intermission.
module tb_can_protocol;
  import can_pkg::*;
  import can_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sample = 0, tx_point = 0, tb_bit = 1;
  logic bus;
  logic tx, hard_sync_en, tx_req = 0, tx_done, rx_done, ovl_req = 0;
  logic err_evt, arb_lost, ovl_evt;
  can_msg_t tx_msg = '0, rx_msg;
  err_state_e err_state;
  err_kind_e err_kind;
  logic [CNT_W-1:0] tec, rec;
  always #5 clk = ~clk;
  assign bus = tx & tb_bit;

  can_protocol dut (.clk, .rst_n, .sample, .bit_i(bus), .tx_point, .tx_o(tx),
    .hard_sync_en, .tx_req, .tx_msg, .tx_done, .rx_done, .rx_msg, .ovl_req,
    .err_state, .tec, .rec, .err_evt, .err_kind, .arb_lost, .ovl_evt);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // events seen during the last run_bits call
  int  n_txdone, n_rxdone, n_err, n_lost, n_ovl;
  err_kind_e last_kind;
  bit  node_q[$];      // node's own tx level per bit
  bit  bus_q[$];       // bus level per bit

  // run n bits; the testbench drives drv[i] in bit i (1 beyond its end)
  task automatic run_bits(bitq_t drv, int n);
    n_txdone = 0; n_rxdone = 0; n_err = 0; n_lost = 0; n_ovl = 0;
    node_q.delete(); bus_q.delete();
    for (int i = 0; i < n; i++) begin
      @(negedge clk); tx_point = 1;
      @(negedge clk); tx_point = 0; tb_bit = (i < drv.size()) ? drv[i] : 1'b1;
      repeat (3) @(negedge clk);
      sample = 1;
      node_q.push_back(tx); bus_q.push_back(bus);
      @(negedge clk); sample = 0;
      for (int c = 0; c < 3; c++) begin
        if (tx_done) begin n_txdone++; tx_req = 0; end
        if (rx_done) n_rxdone++;
        if (err_evt) begin n_err++; last_kind = err_kind; end
        if (arb_lost) n_lost++;
        if (ovl_evt) n_ovl++;
        @(negedge clk);
      end
    end
  endtask

  function automatic bitq_t ones(int n);
    bitq_t q;
    repeat (n) q.push_back(1'b1);
    return q;
  endfunction

  function automatic int first_zero(bit q[$]);
    foreach (q[i]) if (q[i] == 1'b0) return i;
    return -1;
  endfunction

  initial begin
    can_msg_t m;
    bitq_t f, d;
    int s, ackp, bad;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // bus integration: a dominant bit restarts the 11-bit count
    d = ones(5); d.push_back(0);
    run_bits(d, 8);
    @(negedge clk); tx_req = 1; tx_msg = '{id:11'h7F0, rtr:0, dlc:4'd0, data:'0};
    run_bits(ones(0), 8);
    check(first_zero(node_q) < 0, "no transmission before 11 recessive bits");
    tx_req = 0;
    run_bits(ones(0), 6);
    tx_req = 0;

    // 1: transmit a data frame, testbench acknowledges
    m = '{id:11'h245, rtr:0, dlc:4'd3, data:64'hDEAD_BE00_0000_0000};
    f = frame_tx(m.id, m.rtr, m.dlc, m.data);
    ackp = f.size() - 9;
    @(negedge clk); tx_req = 1; tx_msg = m;
    d = ones(ackp + 1); d[ackp] = 0;       // first bit is SOF: aligned below
    // the node starts in the first bit; tb drives ACK at ackp
    run_bits(d, f.size() + 4);
    tx_req = 0;
    s = first_zero(node_q);
    bad = 0;
    for (int i = 0; i < f.size(); i++) if (s < 0 || node_q[s+i] != f[i]) bad++;
    check(s == 0, $sformatf("SOF in the first bit (at %0d)", s));
    check(bad == 0, $sformatf("transmitted frame: %0d bits differ", bad));
    check(n_txdone == 1 && n_err == 0, "tx_done, no error");
    // tx_done comes with the last EOF bit: frame length in bits
    check(bus_q.size() >= f.size() && tec == 0, "frame length and TEC");

    // 2: receive a frame; node acknowledges in the ACK slot
    m = '{id:11'h0A1, rtr:0, dlc:4'd8, data:64'h0123_4567_89AB_CDEF};
    f = frame_stuffed(m.id, m.rtr, m.dlc, m.data);
    run_bits(ones(3), 3);
    d = f; repeat (10) d.push_back(1'b1);
    run_bits(d, d.size() + 3);
    check(n_rxdone == 1 && rx_msg == m, "frame received");
    check(node_q[f.size() + 1] == 1'b0, "node sends ACK");
    check(n_err == 0 && rec == 0, "no receive error");

    // 3: CRC error: wrong CRC, no ACK from the node, error after ACK delimiter
    f = frame_stuffed(m.id, m.rtr, m.dlc, m.data, 15'h0010);
    d = f; repeat (30) d.push_back(1'b1);
    run_bits(d, d.size());
    check(n_err == 1 && last_kind == E_CRC, "CRC error detected");
    check(node_q[f.size() + 1] == 1'b1, "no ACK for a bad CRC");
    check(node_q[f.size() + 3] == 1'b0, "error flag right after the ACK delimiter");
    check(rec == 9'd1, $sformatf("REC = %0d", rec));
    check(n_rxdone == 0, "bad frame not delivered");

    // 4: stuff error: six dominant bits after SOF
    d = '{0, 0, 0, 0, 0, 0, 0};
    repeat (30) d.push_back(1'b1);
    run_bits(d, d.size());
    check(n_err == 1 && last_kind == E_STUFF, "stuff error detected");
    check(node_q.size() > 13 && node_q[5] == 1 && node_q[6] == 0 && node_q[11] == 0 && node_q[12] == 1,
          "active error flag of six bits");

    // 5: form error: dominant CRC delimiter
    m = '{id:11'h333, rtr:0, dlc:4'd1, data:64'hAA00_0000_0000_0000};
    f = frame_stuffed(m.id, m.rtr, m.dlc, m.data);
    d = f; d.push_back(1'b0); repeat (30) d.push_back(1'b1);
    run_bits(d, d.size());
    check(n_err == 1 && last_kind == E_FORM, "form error in CRC delimiter");

    // 6: ACK error: node transmits, nobody acknowledges
    m = '{id:11'h111, rtr:0, dlc:4'd0, data:'0};
    f = frame_tx(m.id, m.rtr, m.dlc, m.data);
    @(negedge clk); tx_req = 1; tx_msg = m;
    run_bits(ones(0), f.size() - 8);
    tx_req = 0;
    check(n_err == 1 && last_kind == E_ACK, "ACK error detected");
    check(tec == 9'd8, $sformatf("TEC after ACK error = %0d", tec));
    run_bits(ones(0), 30);
    run_bits(ones(0), 20);
    check(first_zero(node_q) < 0, "no restart without a request");

    // 7: arbitration: node sends 0x400, testbench sends 0x200 (wins)
    m = '{id:11'h200, rtr:0, dlc:4'd1, data:64'h5500_0000_0000_0000};
    f = frame_stuffed(m.id, m.rtr, m.dlc, m.data);
    @(negedge clk); tx_req = 1; tx_msg = '{id:11'h400, rtr:0, dlc:4'd1, data:'0};
    d = f; repeat (10) d.push_back(1'b1);
    d[f.size() + 1] = 1'b1;
    run_bits(d, d.size() + 3);
    check(n_lost == 1, "arbitration lost");
    check(node_q[1] == 1'b1 && bus_q[1] == 1'b0, "lost on the first differing bit");
    check(n_rxdone == 1 && rx_msg == m, "winner's frame received");
    check(n_err == 0, "no error on arbitration loss");
    tx_req = 0;
    // the lost frame is retried by the node after the intermission
    run_bits(ones(0), 6);
    // 8: overload: dominant bit in the first intermission bit after a frame
    m = '{id:11'h0F0, rtr:0, dlc:4'd0, data:'0};
    f = frame_stuffed(m.id, m.rtr, m.dlc, m.data);
    run_bits(ones(20), 20);
    d = f; repeat (10) d.push_back(1'b1);
    d.push_back(1'b0);                     // first intermission bit
    repeat (20) d.push_back(1'b1);
    run_bits(d, d.size());
    check(n_ovl == 1, "overload frame on dominant intermission bit");
    check(node_q[f.size() + 11] == 1'b0 && node_q[f.size() + 16] == 1'b0 &&
          node_q[f.size() + 17] == 1'b1, "overload flag of six bits");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
