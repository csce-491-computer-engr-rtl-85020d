// uart_controller: the CPU-side register file of the UART.
//
// The CPU reaches the UART through a chip select (cs), a register select
// (rs), a read/write line (rw, 1 = read) and an 8-bit data bus. Four
// accesses exist:
//   rs = 0, rw = 0  write the control register (master, transmit and
//                   receive enables)
//   rs = 0, rw = 1  read the status register (see uart_pkg::uart_status_t);
//                   this clears the framing and parity error flags
//   rs = 1, rw = 0  write the transmit data register TDR; this starts a
//                   transmission by raising TRANS to the transmitter
//   rs = 1, rw = 1  read the receive data register RDR; this clears RDRFB
// Writes take effect on the rising clock edge while cs is high. Read data on
// dout is combinational from the registers and reads as 0 when no read is
// selected. A read of RDR lasting several clocks clears RDRFB only once,
// since it stays clear.
//
// TRANS: a TDR write sets a pending flag; trans is the flag gated by the
// master and transmit enables. The flag clears in the clock in which the
// transmitter, idle in Wait_TRANS, takes it. If the transmitter is still
// busy with an earlier frame, the request simply waits, so a TDR write is
// never lost. A new write in the clock the request is taken keeps it pending.
// Status TDRE is the transmitter's TDRE with the pending flag masked in;
// TBUSY is high while a request is pending or the transmitter is busy.
//
// The RS/RW/ACC-bus interface, the TDR write that fires TRANS and the RDR
// read that clears RDRFB and the clearing of the error flags on a status check
// follow the original description; the register map,
// the bit positions and the pending-request flag are choices of this design.
module uart_controller
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT
) (
  input  logic              clk,
  input  logic              res,
  // CPU bus
  input  logic              cs,
  input  logic              rs,
  input  logic              rw,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  // to and from the transmitter
  output logic              trans,
  output logic [DATA_W-1:0] tdr,
  input  logic              tx_tdre,
  input  logic              tx_busy,
  // to and from the receiver
  output logic              rx_enable,
  output logic              rdr_read,
  output logic              flags_clear,
  input  logic [DATA_W-1:0] rdr,
  input  logic              rdrf,
  input  logic              fe,
  input  logic              pe
);

  logic [DATA_W-1:0] ctrl;
  logic              pend;
  logic              tx_enable;
  logic              wr_ctrl, wr_tdr, rd_status;
  uart_status_t      status;

  assign wr_ctrl   = cs && rs == RS_CTRL && rw == RW_WRITE;
  assign wr_tdr    = cs && rs == RS_DATA && rw == RW_WRITE;
  assign rd_status = cs && rs == RS_CTRL && rw == RW_READ;
  assign rdr_read  = cs && rs == RS_DATA && rw == RW_READ;
  assign flags_clear = rd_status;

  assign tx_enable = ctrl[CTRL_MEN] && ctrl[CTRL_TE];
  assign rx_enable = ctrl[CTRL_MEN] && ctrl[CTRL_RE];
  assign trans     = pend && tx_enable;

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      ctrl <= '0;
      tdr  <= '0;
      pend <= 1'b0;
    end else begin
      if (wr_ctrl) ctrl <= din;
      if (wr_tdr) begin
        tdr  <= din;
        pend <= 1'b1;
      end else if (trans && !tx_busy) begin
        pend <= 1'b0;
      end
    end
  end

  always_comb begin
    status          = '0;
    status.rdrf     = rdrf;
    status.tdre     = tx_tdre && !pend;
    status.fe       = fe;
    status.pe       = pe;
    status.tbusy    = pend || tx_busy;
  end

  always_comb begin
    if (rdr_read)       dout = rdr;
    else if (rd_status) dout = DATA_W'(status);
    else                dout = '0;
  end

endmodule
