// tb_can_object_layer: host handshake, acceptance filter and buffer status.
//
// Drives the host side and the transfer-layer side of the object layer
// directly. Checks: a transmit request is latched and held, a second
// request while pending is ignored, tx_done produces one sndok pulse;
// random identifiers against random code/mask pairs are accepted exactly
// when the masked bits match; a second accepted message before the host
// acknowledges is dropped, sets overrun and requests an overload frame.
module tb_can_object_layer;
  import can_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_start = 0, rx_ack = 0, tx_done = 0, rx_done = 0;
  can_msg_t tx_msg_i = '0, rx_msg = '0, rx_msg_o, tx_msg_o;
  logic [ID_W-1:0] code = '0, mask = '0;
  logic sndok, rx_valid, rx_overrun, tx_pending, ovl_req;
  always #5 clk = ~clk;

  can_object_layer dut (.clk, .rst_n, .tx_start_i(tx_start), .tx_msg_i,
    .rx_ack_i(rx_ack), .acc_code_i(code), .acc_mask_i(mask), .sndok_o(sndok),
    .rx_valid_o(rx_valid), .rx_overrun_o(rx_overrun), .rx_msg_o,
    .tx_pending_o(tx_pending), .tx_msg_o, .tx_done, .rx_done, .rx_msg,
    .ovl_req_o(ovl_req));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic can_msg_t rnd_msg();
    can_msg_t m;
    m.id = 11'($urandom); m.rtr = 1'($urandom); m.dlc = 4'($urandom_range(0, 8));
    m.data = {$urandom, $urandom};
    return m;
  endfunction

  initial begin
    can_msg_t a, b;
    int nacc = 0, nrej = 0;
    bit exp_acc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // transmit handshake
    a = rnd_msg(); b = rnd_msg();
    @(negedge clk); tx_msg_i = a; tx_start = 1;
    @(negedge clk); tx_start = 0; tx_msg_i = b;
    check(tx_pending && tx_msg_o == a, "request latched");
    @(negedge clk); tx_start = 1;
    @(negedge clk); tx_start = 0;
    check(tx_msg_o == a, "request ignored while pending");
    @(negedge clk); tx_done = 1;
    @(negedge clk); tx_done = 0;
    check(sndok && !tx_pending, "sndok after tx_done");
    @(negedge clk);
    check(!sndok, "sndok is one cycle");

    // acceptance filter
    for (int i = 0; i < 300; i++) begin
      code = 11'($urandom); mask = (i % 3 == 0) ? 11'h7FF : 11'($urandom);
      a = rnd_msg();
      if (i % 4 == 0) a.id = code ^ (11'($urandom) & ~mask);
      exp_acc = ((a.id & mask) == (code & mask));
      @(negedge clk); rx_msg = a; rx_done = 1;
      @(negedge clk); rx_done = 0;
      check(rx_valid == exp_acc, $sformatf("filter id %h code %h mask %h", a.id, code, mask));
      if (exp_acc) begin
        nacc++;
        check(rx_msg_o == a, "stored message");
        @(negedge clk); rx_ack = 1; @(negedge clk); rx_ack = 0;
        check(!rx_valid, "ack clears valid");
      end else nrej++;
    end
    check(nacc > 50 && nrej > 50, "filter coverage");

    // overrun
    code = '0; mask = '0;
    a = rnd_msg(); b = rnd_msg();
    @(negedge clk); rx_msg = a; rx_done = 1;
    @(negedge clk); rx_msg = b; rx_done = 1;
    #1 check(ovl_req, "overload requested on overflow");
    @(negedge clk); rx_done = 0;
    check(rx_overrun && rx_msg_o == a, "overrun keeps the first message");
    @(negedge clk); rx_ack = 1; @(negedge clk); rx_ack = 0;
    check(!rx_overrun && !rx_valid, "ack clears overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
