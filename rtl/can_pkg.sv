// can_pkg: shared types and constants of the fault-tolerant CAN 2.0A controller.
//
// The controller speaks CAN 2.0A (11-bit identifiers, standard frames only).
// Frame field lengths and the CRC-15 polynomial come from the CAN 2.0A
// specification. The output bundle `can_out_t` is everything one controller
// replica presents to the outside world; the duplex comparators compare it
// as a whole, so any upset that reaches a replica's outputs is seen.
package can_pkg;

  localparam int unsigned ID_W    = 11;   // CAN 2.0A identifier
  localparam int unsigned DLC_W   = 4;
  localparam int unsigned DATA_W  = 64;   // up to 8 data bytes
  localparam int unsigned CNT_W   = 9;    // error counters reach 256 (bus off)

  localparam logic [14:0] CRC15_POLY = 15'h4599;

  // Fault confinement state of a node.
  typedef enum logic [1:0] {
    ERR_ACTIVE  = 2'd0,
    ERR_PASSIVE = 2'd1,
    BUS_OFF     = 2'd2
  } err_state_e;

  // Error classes detected by the transfer layer.
  typedef enum logic [2:0] {
    E_NONE  = 3'd0,
    E_BIT   = 3'd1,
    E_STUFF = 3'd2,
    E_FORM  = 3'd3,
    E_CRC   = 3'd4,
    E_ACK   = 3'd5
  } err_kind_e;

  // A CAN 2.0A message as seen by the host.
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic              rtr;
    logic [DLC_W-1:0]  dlc;
    logic [DATA_W-1:0] data;    // byte 0 in bits 63:56, sent first
  } can_msg_t;

  // Everything a controller replica drives towards the bus and the host.
  typedef struct packed {
    logic        tx;          // bus transmit line, 1 = recessive
    logic        tx_busy;     // a transmit request is pending
    logic        sndok;       // one-cycle pulse: frame sent and acknowledged
    logic        rx_valid;    // rx_msg holds an unread message
    logic        rx_overrun;  // a message was lost because rx_msg was full
    can_msg_t    rx_msg;
    err_state_e  err_state;
    logic [CNT_W-1:0] tec;
    logic [CNT_W-1:0] rec;
    logic        err_evt;     // one-cycle pulse: an error was detected
    err_kind_e   err_kind;    // class of that error
    logic        arb_lost;    // one-cycle pulse: arbitration lost
    logic        ovl_evt;     // one-cycle pulse: an overload frame starts
  } can_out_t;

endpackage
