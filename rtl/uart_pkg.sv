// Shared types and constants of the BIST-enabled UART.
//
// The UART moves 8-bit characters framed as one start bit (0), eight data
// bits sent least significant bit first, and one stop bit (1). The status
// register layout and the state encodings of the controllers live here so
// that the RTL and the testbenches agree on them. The 8-bit character width
// follows the design; the bit order of the status word is this design's own.
package uart_pkg;

  localparam int unsigned DATA_BITS = 8;

  // Status register, read by the host with cd = 1.
  typedef struct packed {
    logic bist_fail;    // [7] self test finished with at least one failure
    logic bist_done;    // [6] self test finished
    logic overrun_err;  // [5] sticky: a character arrived while the buffer was full
    logic framing_err;  // [4] sticky: stop bit sampled as 0
    logic txe;          // [3] transmitter output register empty
    logic txrdy;        // [2] transmit buffer free
    logic rxfull;       // [1] receive buffer holds a character
    logic rxrdy;        // [0] received character ready for the host
  } status_t;

  // Transmitter output register sequencing.
  typedef enum logic [2:0] {
    TX_EMPTY, TX_FILLING, TX_READY, TX_START, TX_DATA, TX_STOP
  } tx_state_t;

  // Receiver control logic sequencing.
  typedef enum logic [2:0] {
    RX_IDLE, RX_DATA, RX_STOP, RX_XFER
  } rx_state_t;

  // Test controller sequencing.
  typedef enum logic [2:0] {
    B_IDLE, B_ARM, B_START, B_DATA, B_WAIT_RX, B_LOOP, B_DONE
  } bist_state_t;

endpackage
