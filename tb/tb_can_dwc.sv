// tb_can_dwc: duplex with comparison.
//
// A DwC pair and a plain controller share a wired-AND bus. Without upsets
// the two replicas stay equal through a full exchange (no mismatch). An
// upset is then emulated by inverting one stored bit of replica 1: first a
// bit of its pending transmit message, which stays hidden until that bit is
// sent and must then raise the mismatch while replica 0 still sends the
// correct frame; then a bit of its receive error counter, which is visible
// at once.
module tb_can_dwc;
  import can_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     start [2];
  can_msg_t msg   [2];
  logic     ack   [2];
  can_out_t out   [2];
  logic     mism;
  logic [3:0] diff;
  logic     bus;
  assign bus = out[0].tx & out[1].tx;

  can_dwc dut (.clk, .rst_n, .rx_i(bus), .tx_start_i(start[0]), .tx_msg_i(msg[0]),
    .rx_ack_i(ack[0]), .acc_code_i('0), .acc_mask_i('0), .out_o(out[0]),
    .mismatch_o(mism), .diff_o(diff));
  can_controller peer (.clk, .rst_n, .rx_i(bus), .tx_start_i(start[1]),
    .tx_msg_i(msg[1]), .rx_ack_i(ack[1]), .acc_code_i('0), .acc_mask_i('0),
    .out_o(out[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_mism = 0;
  always @(posedge clk) if (rst_n && mism) n_mism++;

  task automatic send(int n, can_msg_t m);
    @(negedge clk); msg[n] = m; start[n] = 1;
    @(negedge clk); start[n] = 0;
  endtask

  task automatic wait_sndok(int n, output bit ok);
    ok = 0;
    for (int i = 0; i < 300 * 64 && !ok; i++) begin
      @(posedge clk);
      if (out[n].sndok) ok = 1;
    end
  endtask

  initial begin
    can_msg_t m;
    bit ok;
    for (int i = 0; i < 2; i++) begin start[i] = 0; msg[i] = '0; ack[i] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (14 * 64) @(posedge clk);

    m = '{id:11'h321, rtr:0, dlc:4'd8, data:64'h0102_0304_0506_0708};
    send(0, m);
    wait_sndok(0, ok);
    check(ok && out[1].rx_valid && out[1].rx_msg == m, "pair transmits");
    m = '{id:11'h0C0, rtr:0, dlc:4'd2, data:64'hBEEF_0000_0000_0000};
    send(1, m);
    wait_sndok(1, ok);
    repeat (64) @(posedge clk);
    check(ok && out[0].rx_valid && out[0].rx_msg == m, "pair receives");
    check(n_mism == 0, "no mismatch without upsets");
    @(negedge clk); ack[0] = 1; ack[1] = 1; @(negedge clk); ack[0] = 0; ack[1] = 0;

    // upset in a pending message bit of replica 1 (last data byte)
    m = '{id:11'h222, rtr:0, dlc:4'd8, data:64'h1111_2222_3333_4444};
    send(0, m);
    @(negedge clk);
    dut.g_rep[1].u_ctrl.u_obj.tx_msg_o.data[2] = !dut.g_rep[1].u_ctrl.u_obj.tx_msg_o.data[2];
    repeat (3) @(negedge clk);
    check(n_mism == 0, "latent upset not yet visible");
    wait_sndok(0, ok);
    check(n_mism > 0, "mismatch once the upset bit is sent");
    check(ok && out[1].rx_msg == m, "replica 0 frame intact on the bus");

    // upset in the receive error counter of replica 1: visible at once
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    n_mism = 0;
    dut.g_rep[1].u_ctrl.u_proto.u_fc.rec[3] = !dut.g_rep[1].u_ctrl.u_proto.u_fc.rec[3];
    repeat (2) @(negedge clk);
    check(mism && diff == 4'b0100, "counter upset raises mismatch in the status group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
