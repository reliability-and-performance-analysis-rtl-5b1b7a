// tb_can_crc15: serial CRC-15 against polynomial long division.
//
// Random bit strings of random length are shifted into the CRC unit one
// bit per cycle; the result must equal the remainder computed by the
// reference model in can_ref_pkg. Also checks that clear empties the
// register and that the CRC of a message followed by its own CRC is zero.
module tb_can_crc15;
  import can_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, shift = 0, bit_i = 0;
  logic [14:0] crc;
  always #5 clk = ~clk;

  can_crc15 dut (.clk, .rst_n, .clear, .shift, .bit_i, .crc_o(crc));

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

  initial begin
    bitq_t m;
    bit [14:0] exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      m.delete();
      repeat (1 + $urandom_range(0, 99)) m.push_back(1'($urandom));
      exp = ref_crc(m);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(crc == 15'h0, "clear");
      foreach (m[i]) begin
        shift = 1; bit_i = m[i];
        @(negedge clk);
      end
      shift = 0;
      check(crc == exp, $sformatf("crc %h expected %h (len %0d)", crc, exp, m.size()));
      // append the CRC itself: the register must return to zero
      for (int i = 14; i >= 0; i--) begin
        shift = 1; bit_i = exp[i];
        @(negedge clk);
      end
      shift = 0;
      check(crc == 15'h0, "message plus CRC leaves zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
