// uart_pkg: types and constants shared by the UART blocks.
//
// The UART moves one character at a time between two ends over a serial line
// guarded by an RTS/CTS handshake. A character travels as a 10-bit frame: a
// start bit (0), eight data bits sent least significant bit first, and a stop
// bit (1). One frame bit is sent and sampled per clock; both ends share the
// clock. The state names follow the algorithmic state machine charts of the
// transmitter (Wait_TRANS, Send_RTS, Transmit) and of the receiver
// (Wait_Recv, Receive, Load_RDR).
//
// The CPU-side register map (RS/RW decode), the control and status bit
// positions and the even-parity convention are choices of this design; the
// frame format and the state machines follow the original description.
package uart_pkg;

  // Default character width: eight bits between start and stop bit.
  localparam int unsigned DATA_W_DEFAULT = 8;

  // Transmitter states.
  typedef enum logic [1:0] {
    TX_WAIT_TRANS = 2'd0,   // idle: preload the frame, wait for TRANS
    TX_SEND_RTS   = 2'd1,   // RTS high, wait for CTS from the far end
    TX_TRANSMIT   = 2'd2    // shift one frame bit out per clock
  } tx_state_t;

  // Receiver states.
  typedef enum logic [1:0] {
    RX_WAIT_RECV = 2'd0,    // idle: CTS low, wait for RTS from the far end
    RX_RECEIVE   = 2'd1,    // CTS high, shift one frame bit in per clock
    RX_LOAD_RDR  = 2'd2     // move the data bits to RDR, check the frame
  } rx_state_t;

  // CPU bus: RW = 1 reads, RW = 0 writes. RS selects the register pair.
  localparam logic RW_READ  = 1'b1;
  localparam logic RW_WRITE = 1'b0;
  localparam logic RS_CTRL  = 1'b0;   // write: control register, read: status register
  localparam logic RS_DATA  = 1'b1;   // write: TDR (starts a transmission), read: RDR

  // Control register bits.
  localparam int unsigned CTRL_MEN = 0;   // master enable
  localparam int unsigned CTRL_TE  = 1;   // transmitter enable
  localparam int unsigned CTRL_RE  = 2;   // receiver enable

  // Status register, as read by the CPU (RS = 0, RW = 1).
  typedef struct packed {
    logic [2:0] reserved;   // read as 0
    logic       tbusy;      // a transmission is pending or in progress
    logic       pe;         // parity error in the last received frame
    logic       fe;         // framing error (bad start or stop bit) in the last frame
    logic       tdre;       // transmit data register may be written
    logic       rdrf;       // receive data register full (RDRFB)
  } uart_status_t;

endpackage
