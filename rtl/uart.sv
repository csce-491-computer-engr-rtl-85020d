// uart: one serial communication controller.
//
// Three concurrent machines behind one CPU port: the controller decodes the
// CPU's register accesses and hands work on; the transmitter sends the
// character in TDR to the far end; the receiver takes a character from the
// far end into RDR. Transmitter and receiver each have their own handshake
// pair, so one UART can send and receive at the same time.
//
// Serial side, as seen from this end:
//   txdata  out  serial data to the far end (idle high)
//   rts     out  request to send, to the far end's receiver
//   cts_in  in   clear to send, from the far end's receiver
//   rxdata  in   serial data from the far end
//   rts_in  in   the far end's request to send
//   cts     out  clear to send, to the far end's transmitter
// CPU side: cs, rs, rw, din, dout as described in uart_controller.
// res is an asynchronous, active-high reset; all state changes on the
// rising edge of clk, and one frame bit takes one clock.
//
// The split into controller, transmitter and receiver follows the original
// description.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT
) (
  input  logic              clk,
  input  logic              res,
  input  logic              cs,
  input  logic              rs,
  input  logic              rw,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              txdata,
  output logic              rts,
  input  logic              cts_in,
  input  logic              rxdata,
  input  logic              rts_in,
  output logic              cts
);

  logic              trans, tx_tdre, tx_busy;
  logic [DATA_W-1:0] tdr, rdr;
  logic              rx_enable, rdr_read, flags_clear, rdrf, fe, pe;

  uart_controller #(.DATA_W(DATA_W)) u_ctrl (
    .clk, .res, .cs, .rs, .rw, .din, .dout,
    .trans, .tdr, .tx_tdre, .tx_busy,
    .rx_enable, .rdr_read, .flags_clear, .rdr, .rdrf, .fe, .pe
  );

  uart_transmitter #(.DATA_W(DATA_W)) u_tx (
    .clk, .res, .trans, .tdr, .cts(cts_in), .rts, .txdata,
    .tdre(tx_tdre), .busy(tx_busy)
  );

  uart_receiver #(.DATA_W(DATA_W)) u_rx (
    .clk, .res, .enable(rx_enable), .rts_in, .rxdata, .rdr_read, .flags_clear,
    .cts, .rdr, .rdrf, .fe, .pe
  );

endmodule
