// tb_can_out_cmp: replica comparator.
//
// Random bundles are compared with themselves (no mismatch) and with a
// copy in which one random bit was flipped (mismatch, and the field group
// of that bit marked in diff_o).
module tb_can_out_cmp;
  import can_pkg::*;

  localparam int W = $bits(can_out_t);
  can_out_t a, b;
  logic mism;
  logic [3:0] diff;

  can_out_cmp dut (.a, .b, .mismatch_o(mism), .diff_o(diff));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    can_out_t x;
    int k, grp;
    for (int i = 0; i < 2000; i++) begin
      for (int j = 0; j < W; j++) v[j] = 1'($urandom);
      a = can_out_t'(v); b = a;
      #1 check(!mism && diff == 0, "equal bundles");
      k = $urandom_range(0, W - 1);
      v[k] = !v[k];
      b = can_out_t'(v);
      // find the field group of bit k
      x = '0; x = can_out_t'(W'(1) << k);
      if (x.tx) grp = 0;
      else if (x.tx_busy || x.sndok || x.rx_valid || x.rx_overrun || x.rx_msg != '0) grp = 1;
      else if (x.err_state != ERR_ACTIVE || x.tec != 0 || x.rec != 0) grp = 2;
      else grp = 3;
      #1 check(mism && diff == (4'b1 << grp), $sformatf("bit %0d flipped, diff %b", k, diff));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
