// tb_can_ovl_frame: overload frame sequence, bit by bit.
//
// A bit clock of 8 cycles drives `sample`. Checks the six dominant flag
// bits followed by eight recessive delimiter bits, the stretching of the
// dominant part by another node's overload flag, and the frame length.
module tb_can_ovl_frame;
  logic clk = 0, rst_n = 0, start = 0, sample = 0, bit_i = 1;
  logic tx, busy, done;
  always #5 clk = ~clk;

  can_ovl_frame dut (.clk, .rst_n, .start, .sample, .bit_i, .tx_o(tx), .busy, .done);

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

  task automatic run(int other, int odly, output bit pat[$], output int len);
    bit got;
    @(negedge clk); start = 1; sample = 0;
    @(negedge clk); start = 0;
    pat.delete(); len = 0;
    got = 0;
    for (int i = 0; i < 40 && !got; i++) begin
      repeat (3) @(negedge clk);
      pat.push_back(tx);
      bit_i = tx & !(i >= odly && i < odly + other); sample = 1;
      @(negedge clk); sample = 0;
      if (done) got = 1;
      len++;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    bit pat[$];
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!busy && tx, "idle recessive");
    run(0, 0, pat, len);
    check(len == 14, $sformatf("overload frame: %0d bits", len));
    check(all_is(pat, 0, 6, 0) && all_is(pat, 6, 8, 1), "flag and delimiter");
    check(!busy, "busy drops");
    run(6, 4, pat, len);
    check(len == 18, $sformatf("stretched overload frame: %0d bits", len));
    check(all_is(pat, 6, 4, 1), "own tx recessive after flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
