// tb_uart_controller: self-checking test of the UART's CPU-side registers.
//
// The bench drives the CPU bus (cs, rs, rw, din) and stands in for the
// transmitter (tx_tdre, tx_busy) and receiver (rdr, rdrf, fe, pe). It checks
// the control register's enables, that a TDR write loads TDR and raises
// TRANS only when master and transmit enables are set, that TRANS waits
// while the transmitter is busy and drops the clock after it is taken, the
// status register's bit positions, that an RDR read returns RDR and pulses
// rdr_read, that a status read pulses flags_clear, and that dout is 0 when
// nothing is read.
module tb_uart_controller;
  import uart_pkg::*;

  localparam int unsigned DATA_W = DATA_W_DEFAULT;

  logic clk = 1'b0;
  logic res, cs, rs, rw;
  logic [DATA_W-1:0] din, dout, tdr, rdr;
  logic trans, tx_tdre, tx_busy, rx_enable, rdr_read, flags_clear, rdrf, fe, pe;
  logic last_fc;

  int checks = 0;
  int failures = 0;

  uart_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic bus_write(input logic sel, input logic [DATA_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; rs = sel; rw = RW_WRITE; din = d;
    @(negedge clk);
    cs = 1'b0; rw = RW_READ; din = '0;
  endtask

  // Combinational read in the current clock; the access ends at the next edge.
  task automatic bus_read(input logic sel, output logic [DATA_W-1:0] d, output logic strobe);
    @(negedge clk);
    cs = 1'b1; rs = sel; rw = RW_READ;
    #1;
    d = dout;
    strobe = rdr_read;
    last_fc = flags_clear;
    @(negedge clk);
    cs = 1'b0;
  endtask

  logic [DATA_W-1:0] v;
  logic s;
  uart_status_t st;

  initial begin
    res = 1'b1; cs = 1'b0; rs = 1'b0; rw = RW_READ; din = '0;
    tx_tdre = 1'b1; tx_busy = 1'b0; rdr = 8'h3c; rdrf = 1'b0; fe = 1'b0; pe = 1'b0;
    repeat (2) @(negedge clk);
    res = 1'b0;
    @(negedge clk);
    check(trans == 1'b0 && rx_enable == 1'b0 && rdr_read == 1'b0 && dout == '0, "reset state");

    // TDR write with the UART disabled: TDR loads, TRANS held back.
    bus_write(RS_DATA, 8'h96);
    check(tdr == 8'h96, "TDR loaded");
    check(trans == 1'b0, "no TRANS while disabled");
    bus_read(RS_CTRL, v, s);
    st = uart_status_t'(v);
    check(st.tdre == 1'b0 && st.tbusy == 1'b1, "pending request shows in status");

    // Receive enable alone.
    bus_write(RS_CTRL, 8'b0000_0101);
    check(rx_enable == 1'b1 && trans == 1'b0, "master+receive enable");
    bus_write(RS_CTRL, 8'b0000_0100);
    check(rx_enable == 1'b0, "receive enable needs master enable");

    // Master + transmit enable: the pending request goes out, transmitter busy.
    tx_busy = 1'b1;
    bus_write(RS_CTRL, 8'b0000_0011);
    check(trans == 1'b1, "TRANS once enabled");
    repeat (3) begin
      @(negedge clk);
      check(trans == 1'b1, "TRANS waits while transmitter busy");
    end
    tx_busy = 1'b0;
    @(negedge clk);
    check(trans == 1'b0, "TRANS dropped after being taken");
    bus_read(RS_CTRL, v, s);
    st = uart_status_t'(v);
    check(st.tdre == 1'b1 && st.tbusy == 1'b0, "status idle after request taken");

    // A TDR write with an idle transmitter gives a one-clock TRANS.
    bus_write(RS_DATA, 8'h21);
    check(trans == 1'b1 && tdr == 8'h21, "TRANS after TDR write");
    @(negedge clk);
    check(trans == 1'b0, "one-clock TRANS with idle transmitter");

    // Status bit positions.
    for (int i = 0; i < 16; i++) begin
      rdrf = i[0]; tx_tdre = i[1]; fe = i[2]; pe = i[3]; tx_busy = 1'b0;
      bus_read(RS_CTRL, v, s);
      check(v == {4'b0, i[3:0]}, $sformatf("status %b for case %0d", v, i));
      check(s == 1'b0, "no rdr_read on status read");
      check(last_fc == 1'b1, "status read clears the error flags");
    end
    tx_busy = 1'b1; tx_tdre = 1'b1; rdrf = 1'b0; fe = 1'b0; pe = 1'b0;
    bus_read(RS_CTRL, v, s);
    check(v == 8'b0001_0010, "TBUSY bit");
    tx_busy = 1'b0;

    // RDR reads.
    for (int i = 0; i < 20; i++) begin
      rdr = DATA_W'($urandom);
      bus_read(RS_DATA, v, s);
      check(v == rdr, "RDR read data");
      check(s == 1'b1, "rdr_read strobe");
      check(last_fc == 1'b0, "RDR read leaves the error flags");
    end
    @(negedge clk);
    check(dout == '0 && rdr_read == 1'b0 && flags_clear == 1'b0, "bus idle");

    // Reset clears the control register.
    res = 1'b1;
    @(negedge clk);
    res = 1'b0;
    check(rx_enable == 1'b0 && trans == 1'b0, "reset clears enables");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
