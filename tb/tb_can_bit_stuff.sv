// tb_can_bit_stuff: stuff tracker against a behavioural run-length model.
//
// A random bus stream (biased towards long runs) is fed one sample at a
// time. Before each sample the model predicts whether the bit is a stuff
// bit; `stuff_next` must agree and, for stuff bits, `stuff_err` must be high
// exactly when the bit repeats the run value. Also checks `last_o`, that
// `en` low freezes the tracker, and that `clear` restarts it.
module tb_can_bit_stuff;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, sample = 0, bit_i = 1;
  logic stuff_next, last, stuff_err;
  always #5 clk = ~clk;

  can_bit_stuff dut (.clk, .rst_n, .clear, .en, .sample, .bit_i,
                     .stuff_next, .last_o(last), .stuff_err);

  int checks = 0, failures = 0, n_stuff = 0, n_err = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run;
    bit mlast, b, is_stuff;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      run = 0; mlast = 1;
      for (int i = 0; i < 120; i++) begin
        // mostly repeat the previous bit to make long runs
        b = ($urandom_range(0, 9) < 7) ? mlast : !mlast;
        if (i == 0) b = 0;
        is_stuff = (run == 5);
        en = 1; sample = 1; bit_i = b;
        #1;
        check(stuff_next == is_stuff, $sformatf("stuff_next at bit %0d", i));
        check(stuff_err == (is_stuff && b == mlast), $sformatf("stuff_err at bit %0d", i));
        if (is_stuff) n_stuff++;
        if (is_stuff && b == mlast) n_err++;
        @(negedge clk);
        sample = 0;
        if (run > 0 && b == mlast && !is_stuff) run++;
        else begin run = 1; mlast = b; end
        check(last == mlast, "last_o");
        // an idle cycle and a disabled sample must not change anything
        en = 0; sample = 1; bit_i = !b;
        @(negedge clk);
        sample = 0;
        check(last == mlast && stuff_next == (run == 5), "disabled sample ignored");
      end
    end
    check(n_stuff > 20 && n_err > 5, $sformatf("coverage: %0d stuff bits, %0d errors", n_stuff, n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
