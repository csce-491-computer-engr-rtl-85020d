// uart_link: two UARTs joined by a serial cable, the top of the design.
//
// The host end (a CPU's UART) and the target end (the UART of a printer's
// I/O microcontroller) are two identical uart instances. The cable carries
// one data line and one RTS/CTS pair in each direction:
//   host txdata -> target rxdata,  host rts -> target rts_in,
//   target cts -> host cts_in, and the same the other way round.
// Each end's CPU bus is brought out (h_* for the host, t_* for the target),
// since the processors themselves are outside this design. The cable's six
// lines are also brought out so that a test can watch the handshake.
//
// Both ends run on one clock and one asynchronous, active-high reset; a
// character takes ten clocks on the line plus the handshake around it.
module uart_link
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT
) (
  input  logic              clk,
  input  logic              res,
  // host CPU bus
  input  logic              h_cs,
  input  logic              h_rs,
  input  logic              h_rw,
  input  logic [DATA_W-1:0] h_din,
  output logic [DATA_W-1:0] h_dout,
  // target microcontroller bus
  input  logic              t_cs,
  input  logic              t_rs,
  input  logic              t_rw,
  input  logic [DATA_W-1:0] t_din,
  output logic [DATA_W-1:0] t_dout,
  // cable lines, for observation
  output logic              h_txdata,
  output logic              h_rts,
  output logic              h_cts,
  output logic              t_txdata,
  output logic              t_rts,
  output logic              t_cts
);

  uart #(.DATA_W(DATA_W)) u_host (
    .clk, .res,
    .cs(h_cs), .rs(h_rs), .rw(h_rw), .din(h_din), .dout(h_dout),
    .txdata(h_txdata), .rts(h_rts), .cts_in(t_cts),
    .rxdata(t_txdata), .rts_in(t_rts), .cts(h_cts)
  );

  uart #(.DATA_W(DATA_W)) u_target (
    .clk, .res,
    .cs(t_cs), .rs(t_rs), .rw(t_rw), .din(t_din), .dout(t_dout),
    .txdata(t_txdata), .rts(t_rts), .cts_in(h_cts),
    .rxdata(h_txdata), .rts_in(h_rts), .cts(t_cts)
  );

endmodule
