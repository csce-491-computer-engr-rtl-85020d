// uart_receiver: the receive side of the UART.
//
// A three-state machine. In Wait_Recv it keeps CTS low and the bit counter
// RCNT at zero, and polls RTS from the far end. When RTS is high and the
// receiver is enabled it moves to Receive, raises CTS and shifts the serial
// input into the top of a 10-bit shift register, one bit per clock, counting
// with RCNT. After the tenth bit (RCNT = 9) it moves to Load_RDR, copies the
// eight bits between start and stop bit into the read data register RDR,
// checks the frame and sets RDRFB (receive data register full), then returns
// to Wait_Recv.
//
// CTS release: CTS is dropped in the clock that takes the stop bit, not one
// clock after Load_RDR. A far-end transmitter that queues its next character
// at once is then back in Send_RTS only after CTS has fallen, and cannot
// mistake the CTS of the finished frame for a new grant. This is a choice of
// this design; without it such a back-to-back character would be lost.
//
// Start-bit hunt: CTS reaches the far end a clock after Receive is entered
// and the far end needs a few clocks more to put its start bit on the line.
// So while RCNT is still zero, Receive ignores samples that are 1 (an idle
// line) and starts counting at the first 0, the start bit. This keeps the two
// ends aligned without a shared frame strobe; it is a choice of this design.
//
// Checks in Load_RDR: fe (framing error) is set when the start bit is not 0
// or the stop bit is not 1; pe (parity error) is set when the eight data bits
// hold an odd number of ones, the character carrying an even-parity bit in
// its least significant position. Both are sticky: they stay set through
// later frames until flags_clear (the CPU reading the status register)
// clears them; a bad frame in the clearing clock still sets them. Because
// of the start-bit hunt the start bit is always 0, so fe reports a bad stop
// bit in practice.
//
// Interface: rts_in, rxdata, enable, rdr_read and flags_clear are sampled
// on the rising clock edge. rdr_read (the CPU reading RDR) clears rdrf; a frame landing in
// the same clock wins. res is an asynchronous, active-high reset.
//
// The states, the RCNT = 9 exit, RDR <- shift[8:1] and the framing check
// follow the receiver chart of the original description; the start-bit hunt,
// the early CTS release, the parity convention, the enable input, the sticky
// flags and the two clear inputs are choices of this design.
//
// The assertion uses the reset as its disable condition, which lint reports
// as a synchronous use of the asynchronous reset; no flip-flop is built
// from it.
module uart_receiver
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT
) (
  input  logic              clk,
  input  logic              res,
  input  logic              enable,
  input  logic              rts_in,
  input  logic              rxdata,
  input  logic              rdr_read,
  input  logic              flags_clear,
  output logic              cts,
  output logic [DATA_W-1:0] rdr,
  output logic              rdrf,
  output logic              fe,
  output logic              pe
);

  localparam int unsigned FRAME_W = DATA_W + 2;
  localparam int unsigned CNT_W   = $clog2(FRAME_W);
  localparam logic [CNT_W-1:0] LAST_BIT = CNT_W'(FRAME_W - 1);

  rx_state_t          state;
  logic [CNT_W-1:0]   rcnt;
  logic [FRAME_W-1:0] rshift;
  logic               take;

  // A sample is taken once the start bit has been seen.
  assign take = (rcnt != '0) || !rxdata;

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      state  <= RX_WAIT_RECV;
      rcnt   <= '0;
      rshift <= '0;
      cts    <= 1'b0;
      rdr    <= '0;
      rdrf   <= 1'b0;
      fe     <= 1'b0;
      pe     <= 1'b0;
    end else begin
      if (rdr_read) rdrf <= 1'b0;
      if (flags_clear) begin
        fe <= 1'b0;
        pe <= 1'b0;
      end
      unique case (state)
        RX_WAIT_RECV: begin
          cts  <= 1'b0;
          rcnt <= '0;
          if (rts_in && enable) state <= RX_RECEIVE;
        end
        RX_RECEIVE: begin
          cts <= 1'b1;
          if (take) begin
            rshift <= {rxdata, rshift[FRAME_W-1:1]};
            rcnt   <= rcnt + 1'b1;
            if (rcnt == LAST_BIT) begin
              cts   <= 1'b0;
              state <= RX_LOAD_RDR;
            end
          end
        end
        RX_LOAD_RDR: begin
          rdr   <= rshift[FRAME_W-2:1];
          if (rshift[0] || !rshift[FRAME_W-1]) fe <= 1'b1;
          if (^rshift[FRAME_W-2:1])            pe <= 1'b1;
          rdrf  <= 1'b1;
          state <= RX_WAIT_RECV;
        end
        default: state <= RX_WAIT_RECV;
      endcase
    end
  end

  // CTS is only given while a frame is being received.
  a_cts_only_in_frame: assert property (@(posedge clk) disable iff (res)
    cts |-> (state == RX_RECEIVE));

endmodule
