// can_bit_stuff: bit stuffing tracker shared by transmission and reception.
//
// CAN inserts a bit of opposite value after every five identical bits in
// the stuffed part of a frame (start of frame to end of CRC). Because a
// transmitter reads back every bit it sends, one tracker on the sampled bus
// bits serves both directions: after five identical bits `stuff_next` tells
// the transmitter to send the complement of `last_o` next, and tells the
// receiver that the next sampled bit is a stuff bit to discard. A sixth
// identical bit in that position raises `stuff_err` (combinational, valid
// with the `sample` pulse that carries the offending bit).
//
// Timing: `clear` (start of frame) empties the run; each `sample` with `en`
// high folds in one bus bit, stuff bits included.
module can_bit_stuff (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic sample,
  input  logic bit_i,
  output logic stuff_next,   // the next stuffed-region bit is a stuff bit
  output logic last_o,       // value of the current run
  output logic stuff_err     // a stuff bit had the run's value
);

  logic [2:0] run;

  assign stuff_next = (run == 3'd5);
  assign stuff_err  = sample && en && stuff_next && (bit_i == last_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= '0;
      last_o <= 1'b1;
    end else if (clear) begin
      run    <= '0;
      last_o <= 1'b1;
    end else if (sample && en) begin
      if (run != '0 && bit_i == last_o && !stuff_next) begin
        run <= run + 1'b1;
      end else begin
        run    <= 3'd1;
        last_o <= bit_i;
      end
    end
  end

endmodule
