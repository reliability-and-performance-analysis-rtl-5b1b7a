// can_ovl_frame: overload frame sequencer.
//
// Started with a one-cycle `start` pulse in the cycle of the `sample` pulse
// that decided an overload (a receive buffer overflow at the end of a frame,
// or a dominant bit in the first two intermission bits). From the next bit
// on it drives the six-bit dominant overload flag, keeps the bus recessive
// until the first recessive bus bit (other nodes' flags may stretch the
// dominant part to 6..12 bits), then counts seven more recessive bits and
// pulses `done`. `tx_o` is the level to drive (1 = recessive), `busy` is
// high from start to done. The sequence follows the design's description
// of the overload state machine.
module can_ovl_frame (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic sample,
  input  logic bit_i,
  output logic tx_o,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {OF_IDLE, OF_FLAG, OF_WAIT, OF_DELIM} of_state_e;

  of_state_e  st;
  logic [2:0] cnt;

  assign tx_o = (st != OF_FLAG);
  assign busy = (st != OF_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= OF_IDLE;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st  <= OF_FLAG;
        cnt <= '0;
      end else if (sample) begin
        unique case (st)
          OF_IDLE: ;
          OF_FLAG: begin
            if (cnt == 3'd5) st <= OF_WAIT;
            cnt <= cnt + 1'b1;
          end
          OF_WAIT: begin
            if (bit_i) begin
              st  <= OF_DELIM;
              cnt <= '0;
            end
          end
          OF_DELIM: begin
            if (cnt == 3'd6) begin
              st   <= OF_IDLE;
              done <= 1'b1;
            end
            cnt <= cnt + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
