// tb_can_seu_campaign: random single-upset campaign, DDwC against plain.
//
// Two independent buses run side by side: the dual duplex top level with a
// peer node, and a plain controller with its own peer. In every trial both
// buses are reset, the node under test sends one frame, and during that
// frame one register bit is inverted: in one random replica of the DDwC
// node, and at the same place in the plain node. Registers hit: pending
// message, receive shift register, CRC, bit position, bit-timing counters,
// error counter, stuff run length, the driven bus level and the
// transmitter flag.
//
// The campaign runs three rounds: one, two and three upsets per frame, at
// independent random times and in different registers (each in a random
// replica). Outcome per trial and node: intact (the peer received the
// frame once, unchanged, with no error on the bus), wrong (the peer
// accepted a message other than the one sent) or lost (anything else).
// Required of the DDwC node: with one upset every frame is intact and at
// most one pair is disconnected; with more, each trial ends intact or in
// the fail-silent state (both pairs disconnected, bus released), and the
// peer never accepts wrong data. The plain node's outcomes are reported
// for comparison, and some of its single-upset trials must go wrong or be
// lost, to show that the upsets matter.
module tb_can_seu_campaign;
  import can_pkg::*;

  localparam int TRIALS = 150;  // per round

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // bus 0: DDwC node + peer 0; bus 1: plain node + peer 1
  logic     start;
  can_msg_t msg;
  can_out_t out_d, out_p, out_q0, out_q1;
  logic     tx_d;
  logic [1:0] fail;
  logic     active, fatal, pdiff;
  logic [11:0] diag;
  logic     bus0, bus1;
  assign bus0 = tx_d & out_q0.tx;
  assign bus1 = out_p.tx & out_q1.tx;

  can_ddwc dut (.clk, .rst_n, .rx_i(bus0), .tx_o(tx_d), .tx_start_i(start),
    .tx_msg_i(msg), .rx_ack_i(1'b0), .acc_code_i('0), .acc_mask_i('0),
    .out_o(out_d), .fail_o(fail), .active_o(active), .fatal_o(fatal),
    .pair_diff_o(pdiff), .diag_o(diag));
  can_controller peer0 (.clk, .rst_n, .rx_i(bus0), .tx_start_i(1'b0),
    .tx_msg_i('0), .rx_ack_i(1'b0), .acc_code_i('0), .acc_mask_i('0), .out_o(out_q0));

  can_controller plain (.clk, .rst_n, .rx_i(bus1), .tx_start_i(start),
    .tx_msg_i(msg), .rx_ack_i(1'b0), .acc_code_i('0), .acc_mask_i('0), .out_o(out_p));
  can_controller peer1 (.clk, .rst_n, .rx_i(bus1), .tx_start_i(1'b0),
    .tx_msg_i('0), .rx_ack_i(1'b0), .acc_code_i('0), .acc_mask_i('0), .out_o(out_q1));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3 * TRIALS * 17_000 + 100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // invert bit k of register r inside one controller instance
  `define FLIP_IN(C) \
    case (r) \
      0: C.u_obj.tx_msg_o[k % 80]       = !C.u_obj.tx_msg_o[k % 80]; \
      1: C.u_proto.rx_q[k % 80]         = !C.u_proto.rx_q[k % 80]; \
      2: C.u_proto.u_crc.crc_o[k % 15]  = !C.u_proto.u_crc.crc_o[k % 15]; \
      3: C.u_proto.cnt[k % 7]           = !C.u_proto.cnt[k % 7]; \
      4: C.u_bt.tq_idx[k % 4]           = !C.u_bt.tq_idx[k % 4]; \
      5: C.u_bt.presc[k % 2]            = !C.u_bt.presc[k % 2]; \
      6: C.u_proto.u_fc.tec[k % 9]      = !C.u_proto.u_fc.tec[k % 9]; \
      7: C.u_proto.u_stuff.run[k % 3]   = !C.u_proto.u_stuff.run[k % 3]; \
      8: C.u_proto.tx_o                 = !C.u_proto.tx_o; \
      default: C.u_proto.is_tx          = !C.u_proto.is_tx; \
    endcase

  task automatic flip_ddwc(int rep, int r, int k);
    case (rep)
      0: `FLIP_IN(dut.g_pair[0].u_pair.g_rep[0].u_ctrl)
      1: `FLIP_IN(dut.g_pair[0].u_pair.g_rep[1].u_ctrl)
      2: `FLIP_IN(dut.g_pair[1].u_pair.g_rep[0].u_ctrl)
      default: `FLIP_IN(dut.g_pair[1].u_pair.g_rep[1].u_ctrl)
    endcase
  endtask

  task automatic flip_plain(int r, int k);
    `FLIP_IN(plain)
  endtask

  int n_bus_err0 = 0, n_bus_err1 = 0;
  bit wrong_d, wrong_p, seen_d, seen_p;
  always @(posedge clk) if (rst_n) begin
    if (out_q0.err_evt) n_bus_err0++;
    if (out_q1.err_evt) n_bus_err1++;
    if (out_q0.rx_valid) begin seen_d <= 1; if (out_q0.rx_msg != msg) wrong_d <= 1; end
    if (out_q1.rx_valid) begin seen_p <= 1; if (out_q1.rx_msg != msg) wrong_p <= 1; end
  end

  initial begin
    int rep[3], r[3], k[3], when[3];
    int e0, e1;
    int n_d_ok, n_d_wrong, n_d_silent, n_d_lost, n_p_ok, n_p_wrong, n_p_lost, n_detect;
    bit ok_d, ok_p;
    can_msg_t m;
    start = 0; msg = '0;
    for (int nup = 1; nup <= 3; nup++) begin
      n_d_ok = 0; n_d_wrong = 0; n_d_silent = 0; n_d_lost = 0;
      n_p_ok = 0; n_p_wrong = 0; n_p_lost = 0; n_detect = 0;
      for (int t = 0; t < TRIALS; t++) begin
        rst_n = 0;
        repeat (3) @(negedge clk);
        rst_n = 1;
        repeat (14 * 64) @(negedge clk);
        m.id = 11'($urandom_range(1, 2046)); m.rtr = 0; m.dlc = 4'd8;
        m.data = {$urandom, $urandom};
        // distinct registers, random replicas, bits and times
        r[0] = $urandom_range(0, 9);
        r[1] = (r[0] + $urandom_range(1, 9)) % 10;
        do r[2] = $urandom_range(0, 9); while (r[2] == r[0] || r[2] == r[1]);
        for (int u = 0; u < 3; u++) begin
          rep[u] = $urandom_range(0, 3); k[u] = $urandom;
          when[u] = $urandom_range(0, 100 * 64);
        end
        e0 = n_bus_err0; e1 = n_bus_err1;
        @(negedge clk); msg = m; start = 1;
        seen_d = 0; seen_p = 0; wrong_d = 0; wrong_p = 0;
        @(negedge clk); start = 0;
        for (int c = 0; c < 250 * 64; c++) begin
          for (int u = 0; u < nup; u++)
            if (c == when[u]) begin
              flip_ddwc(rep[u], r[u], k[u]);
              flip_plain(r[u], k[u]);
            end
          @(negedge clk);
        end
        ok_d = seen_d && !wrong_d && n_bus_err0 == e0;
        ok_p = seen_p && !wrong_p && n_bus_err1 == e1;
        if (ok_d) n_d_ok++;
        else if (wrong_d) n_d_wrong++;
        else if (fatal) n_d_silent++;
        else n_d_lost++;
        if (ok_p) n_p_ok++; else if (wrong_p) n_p_wrong++; else n_p_lost++;
        if (fail != 2'b00) n_detect++;
        if (nup == 1)
          check(ok_d && fail != 2'b11,
                $sformatf("one upset: DDwC lost the frame (replica %0d reg %0d bit %0d at %0d)",
                          rep[0], r[0], k[0], when[0]));
        else
          check((ok_d || (fatal && tx_d)) && !wrong_d,
                $sformatf("%0d upsets: DDwC neither intact nor fail-silent (trial %0d)", nup, t));
        check(fatal == (fail == 2'b11) && (!fatal || tx_d), "fatal only with both pairs failed, bus released");
      end
      $display("%0d upset(s), %0d frames: DDwC intact %0d, wrong %0d, fail-silent %0d, lost %0d (pair disconnected in %0d)",
               nup, TRIALS, n_d_ok, n_d_wrong, n_d_silent, n_d_lost, n_detect);
      $display("%0d upset(s), %0d frames: plain intact %0d, wrong %0d, lost %0d",
               nup, TRIALS, n_p_ok, n_p_wrong, n_p_lost);
      if (nup == 1) begin
        check(n_p_wrong + n_p_lost > 0, "the upsets disturb an unprotected controller");
        check(n_detect > 0, "upsets were detected by the pair comparators");
      end
      if (nup == 3) check(n_d_silent > 0, "multiple upsets reached the fail-silent state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
