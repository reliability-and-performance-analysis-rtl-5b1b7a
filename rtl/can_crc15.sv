// can_crc15: serial CAN CRC-15 generator and checker.
//
// Implements the CAN CRC polynomial x^15+x^14+x^10+x^8+x^7+x^4+x^3+1
// (0x4599) as a 15-bit linear feedback shift register. `clear` zeroes the
// register (done at start of frame); each cycle with `shift` high folds in
// one destuffed frame bit `bit_i`. The register is the CRC of all bits
// folded in so far and is read on `crc_o` the cycle after the last shift.
// The same unit serves transmission (the register is sent as the CRC field)
// and reception (the received CRC field is compared with it).
module can_crc15
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        shift,
  input  logic        bit_i,
  output logic [14:0] crc_o
);

  logic fb;
  assign fb = bit_i ^ crc_o[14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc_o <= '0;
    else if (clear)  crc_o <= '0;
    else if (shift)  crc_o <= {crc_o[13:0], 1'b0} ^ (fb ? CRC15_POLY : 15'h0);
  end

endmodule
