// tb_can_err_frame: error frame sequence, bit by bit.
//
// A bit clock of 8 cycles drives `sample`; the bus is this node's tx ANDed
// with bits forced by other (modelled) nodes. Cases: an active flag alone
// (6 dominant + 8 recessive), an active flag stretched by another node's
// flag (up to 12 dominant bits on the bus, `echo_dom` reported), and a
// passive flag (recessive). The length of each frame in bits is checked.
module tb_can_err_frame;
  logic clk = 0, rst_n = 0, start = 0, passive = 0, sample = 0, bit_i = 1;
  logic tx, busy, done, echo_dom;
  always #5 clk = ~clk;

  can_err_frame dut (.clk, .rst_n, .start, .passive, .sample, .bit_i,
                     .tx_o(tx), .busy, .done, .echo_dom);

  int checks = 0, failures = 0;
  // pat[from +: n] all equal to v
  function automatic bit all_is(bit pat[$], int from, int n, bit v);
    if (pat.size() < from + n) return 0;
    for (int i = from; i < from + n; i++) if (pat[i] != v) return 0;
    return 1;
  endfunction

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

  // run one error frame; `other` dominant bits from another node start at
  // bit `odly`; returns the node's tx pattern and the frame length
  task automatic run(bit pas, int other, int odly, output bit pat[$], output int len,
                     output bit saw_echo);
    bit b;
    bit got;
    pat.delete(); saw_echo = 0;
    @(negedge clk); start = 1; passive = pas; sample = 1; bit_i = 0;
    @(negedge clk); start = 0; sample = 0;
    len = 0;
    got = 0;
    for (int i = 0; i < 40 && !got; i++) begin
      repeat (3) @(negedge clk);
      pat.push_back(tx);
      b = tx & !(i >= odly && i < odly + other);
      bit_i = b; sample = 1;
      @(negedge clk); sample = 0;
      if (done) got = 1;
      if (echo_dom) saw_echo = 1;
      len++;
      repeat (3) @(negedge clk);
      if (echo_dom) saw_echo = 1;
    end
  endtask

  initial begin
    bit pat[$];
    int len;
    bit echo;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!busy && tx, "idle recessive");

    run(0, 0, 0, pat, len, echo);
    check(len == 14, $sformatf("active flag alone: %0d bits", len));
    check(all_is(pat, 0, 6, 0) && all_is(pat, 6, 8, 1),
          "6 dominant then 8 recessive");
    check(!echo, "no echo");
    check(!busy, "busy drops after done");

    // another node's flag starts 3 bits later: 9 dominant bits on the bus
    run(0, 6, 3, pat, len, echo);
    check(len == 17, $sformatf("stretched flag: %0d bits", len));
    check(echo, "echo_dom after own flag");
    check(all_is(pat, 6, 3, 1), "own tx recessive after its flag");

    // another node's flag right after ours: 12 dominant bits
    run(0, 6, 6, pat, len, echo);
    check(len == 20, $sformatf("12 dominant bits: %0d bits", len));

    // passive flag is recessive
    run(1, 0, 0, pat, len, echo);
    check(len == 14, $sformatf("passive frame: %0d bits", len));
    check(all_is(pat, 0, 6, 1), "passive flag recessive");
    check(!echo, "no echo for passive flag");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
