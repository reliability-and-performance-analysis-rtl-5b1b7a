// tb_can_bit_timing: bit period, hard sync, resynchronisation, triple sampling.
//
// Default parameters: 16 MHz clock, 250 kbit/s, 16 quanta of 4 cycles.
// Checks: with a recessive bus the start-of-bit pulses come every 64
// cycles (250 kbit/s); after a hard-sync edge the first sample comes at the
// sample point (11 quanta plus the two-flop input synchroniser); a random
// bit stream sent exactly at 250 kbit/s and one sent 1.6 % slow (65 cycles
// per bit, which only works with resynchronisation) are sampled without
// error; a one-quantum glitch hitting one of the three samples is voted
// away while a longer glitch hitting two samples is not (resynchronisation
// is held off for these two cases so that the sample instants stay put).
module tb_can_bit_timing;
  logic clk = 0, rst_n = 0, rx = 1, hard_sync_en = 1, tx_dominant = 0;
  logic sample, bitv, tx_point;
  always #5 clk = ~clk;

  can_bit_timing dut (.clk, .rst_n, .rx_i(rx), .hard_sync_en, .tx_dominant,
                      .sample_o(sample), .bit_o(bitv), .tx_point_o(tx_point));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  bit rec_on = 0;
  bit got[$];
  longint samp_t[$];
  always @(posedge clk) begin
    cyc++;
    if (rec_on && sample) begin got.push_back(bitv); samp_t.push_back(cyc); end
  end

  // send a frame-like stream: SOF then bits with runs of at most 2, each
  // bit lasting `per` cycles; the first sample must hit the SOF bit
  task automatic stream(int per, int n, output int errs, output longint first_dt);
    bit sent[$];
    longint t_edge;
    bit b;
    errs = 0;
    got.delete(); samp_t.delete();
    @(negedge clk);
    hard_sync_en = 1; rec_on = 1;
    rx = 0; sent.push_back(0); t_edge = cyc;
    repeat (per) @(negedge clk);
    hard_sync_en = 0;
    for (int i = 1; i < n; i++) begin
      b = (i >= 2 && sent[i-1] == sent[i-2]) ? !sent[i-1] : 1'($urandom);
      sent.push_back(b);
      rx = b;
      repeat (per) @(negedge clk);
    end
    rx = 1;
    repeat (per) @(negedge clk);
    rec_on = 0;
    hard_sync_en = 1;
    first_dt = samp_t.size() > 0 ? samp_t[0] - t_edge : -1;
    if (got.size() < n) errs = n;
    else foreach (sent[i]) if (got[i] != sent[i]) errs++;
  endtask

  // one recessive bit after a hard sync edge, with a dominant glitch of
  // `glen` cycles starting `gstart` cycles after the bit start
  task automatic glitch(int gstart, int glen, output bit res);
    got.delete(); samp_t.delete();
    @(negedge clk);
    hard_sync_en = 1; rec_on = 1;
    rx = 0;
    repeat (64) @(negedge clk);
    hard_sync_en = 0;
    tx_dominant = 1;         // no resynchronisation: samples stay in place
    rx = 1;
    for (int c = 0; c < 64; c++) begin
      rx = !(c >= gstart && c < gstart + glen);
      @(negedge clk);
    end
    rx = 1;
    tx_dominant = 0;
    repeat (64 * 12) @(negedge clk);
    rec_on = 0;
    hard_sync_en = 1;
    res = got.size() >= 2 ? got[1] : 1'b0;
  endtask

  initial begin
    longint tp[$];
    int errs;
    longint dt;
    bit r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bit period on an idle bus
    while (tp.size() < 6) begin
      @(posedge clk);
      if (tx_point) tp.push_back(cyc);
    end
    for (int i = 1; i < tp.size(); i++)
      check(tp[i] - tp[i-1] == 64, $sformatf("bit period %0d cycles", tp[i] - tp[i-1]));

    stream(64, 120, errs, dt);
    check(errs == 0, $sformatf("nominal rate: %0d sampling errors", errs));
    check(dt >= 44 && dt <= 48, $sformatf("first sample %0d cycles after the edge", dt));
    repeat (64 * 12) @(negedge clk);
    stream(65, 120, errs, dt);
    check(errs == 0, $sformatf("slow sender: %0d sampling errors", errs));
    repeat (64 * 12) @(negedge clk);
    stream(63, 120, errs, dt);
    check(errs == 0, $sformatf("fast sender: %0d sampling errors", errs));
    repeat (64 * 12) @(negedge clk);

    // the three samples sit about 36, 40 and 44 cycles into the bit
    glitch(38, 4, r);
    check(r == 1'b1, "single-sample glitch voted away");
    glitch(35, 7, r);
    check(r == 1'b0, "two-sample glitch reads dominant");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
