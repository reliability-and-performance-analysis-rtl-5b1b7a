// tb_can_fault_conf: error counters and node state against a reference model.
//
// Random sequences of error and success events are applied; a behavioural
// model of the counting rules (TEC +8 / -1, REC +1, +8, -1 or reset to 120)
// predicts TEC, REC and the state (active, passive at 128, bus off at 256).
// A directed part drives TEC to bus off and checks recovery after 128 runs
// of 11 recessive bits.
module tb_can_fault_conf;
  import can_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_err = 0, rx_err = 0, rx_err8 = 0, tx_ok = 0, rx_ok = 0, rec11 = 0;
  logic [CNT_W-1:0] tec, rec;
  err_state_e state;
  always #5 clk = ~clk;

  can_fault_conf dut (.clk, .rst_n, .tx_err, .rx_err, .rx_err8, .tx_ok, .rx_ok,
                      .rec11, .tec, .rec, .state);

  int checks = 0, failures = 0;
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

  int mt = 0, mr = 0;
  int n_passive = 0;

  task automatic ev(bit te, bit re, bit re8, bit to, bit ro);
    @(negedge clk);
    tx_err = te; rx_err = re; rx_err8 = re8; tx_ok = to; rx_ok = ro;
    @(negedge clk);
    tx_err = 0; rx_err = 0; rx_err8 = 0; tx_ok = 0; rx_ok = 0;
    if (te) mt = (mt + 8 > 256) ? 256 : mt + 8;
    else if (to && mt > 0) mt--;
    if (re) mr++;
    if (re8) mr += 8;
    if (mr > 256) mr = 256;
    if (ro) mr = (mr >= 128) ? 120 : (mr > 0 ? mr - 1 : 0);
  endtask

  initial begin
    err_state_e exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000 && mt < 256; i++) begin
      int k = $urandom_range(0, 9);
      ev(k == 0, k inside {1, 2, 3}, k == 4, k inside {5, 6}, k inside {7, 8, 9});
      exp = (mt >= 256) ? BUS_OFF : ((mt >= 128 || mr >= 128) ? ERR_PASSIVE : ERR_ACTIVE);
      if (exp == ERR_PASSIVE) n_passive++;
      check(tec == CNT_W'(mt) && rec == CNT_W'(mr) && state == exp,
            $sformatf("step %0d: tec %0d/%0d rec %0d/%0d state %0d/%0d",
                      i, tec, mt, rec, mr, state, exp));
    end
    check(n_passive > 0, "error passive reached in the random part");
    // directed: drive to bus off
    while (mt < 256) ev(1, 0, 0, 0, 0);
    check(state == BUS_OFF && tec == 9'd256, "bus off at TEC 256");
    ev(0, 0, 0, 1, 1);
    check(state == BUS_OFF && tec == 9'd256, "no counting while bus off");
    for (int i = 0; i < 127; i++) begin
      @(negedge clk); rec11 = 1; @(negedge clk); rec11 = 0;
    end
    check(state == BUS_OFF, "still bus off after 127 sequences");
    @(negedge clk); rec11 = 1; @(negedge clk); rec11 = 0;
    check(state == ERR_ACTIVE && tec == 0 && rec == 0, "recovered after 128 sequences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
