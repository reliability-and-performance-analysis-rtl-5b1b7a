// can_err_frame: error frame sequencer.
//
// Started by the main state machine with a one-cycle `start` pulse in the
// cycle of the `sample` pulse on which an error was found. From the next bit
// on it sends the error flag: six dominant bits for an error-active node,
// six recessive bits for an error-passive one (`passive` is captured at
// start). It then keeps the bus recessive and waits for the first recessive
// bus bit; other nodes' flags may stretch the dominant part on the bus to
// 6..12 bits. That recessive bit is the first bit of the delimiter, after
// which seven more recessive bits complete the frame and `done` pulses.
//
// Outputs: `tx_o` is the level to drive (1 = recessive); `busy` is high from
// start until done; `echo_dom` pulses when the first bit after the node's
// own active flag is still dominant (a rule of the error counters).
// The sequence (flag, wait for recessive, seven recessive bits) follows the
// design's description; the passive flag is taken from the CAN standard.
module can_err_frame (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic passive,
  input  logic sample,
  input  logic bit_i,
  output logic tx_o,
  output logic busy,
  output logic done,
  output logic echo_dom
);

  typedef enum logic [1:0] {EF_IDLE, EF_FLAG, EF_ECHO, EF_DELIM} ef_state_e;

  ef_state_e  st;
  logic [2:0] cnt;
  logic       pas;
  logic       first_echo;

  assign tx_o = !(st == EF_FLAG && !pas);
  assign busy = (st != EF_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= EF_IDLE;
      cnt        <= '0;
      pas        <= 1'b0;
      first_echo <= 1'b0;
      done       <= 1'b0;
      echo_dom   <= 1'b0;
    end else begin
      done     <= 1'b0;
      echo_dom <= 1'b0;
      if (start) begin
        st  <= EF_FLAG;
        cnt <= '0;
        pas <= passive;
      end else if (sample) begin
        unique case (st)
          EF_IDLE: ;
          EF_FLAG: begin
            if (cnt == 3'd5) begin
              st         <= EF_ECHO;
              first_echo <= 1'b1;
            end
            cnt <= cnt + 1'b1;
          end
          EF_ECHO: begin
            first_echo <= 1'b0;
            if (bit_i) begin
              st  <= EF_DELIM;
              cnt <= '0;
            end else if (first_echo && !pas) begin
              echo_dom <= 1'b1;
            end
          end
          EF_DELIM: begin
            if (cnt == 3'd6) begin
              st   <= EF_IDLE;
              done <= 1'b1;
            end
            cnt <= cnt + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
