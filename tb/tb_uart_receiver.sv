// tb_uart_receiver: self-checking test of the UART receiver.
//
// The bench plays the far-end transmitter: it raises RTS, waits for CTS
// (which must come two clocks later), drops RTS, keeps the line idle for a
// random number of clocks, then drives the ten frame bits one per clock. It
// checks RDR, RDRFB and the framing and parity flags against the frame it
// sent, including frames with a bad stop bit and odd parity (the error
// flags must stay set until flags_clear, which the bench pulses at random
// after a frame); that CTS
// falls as the stop bit is taken; that RDRFB rises two clocks after the
// stop bit and is cleared by
// rdr_read; and that a disabled receiver never answers RTS.
module tb_uart_receiver;
  import uart_pkg::*;

  localparam int unsigned DATA_W = DATA_W_DEFAULT;
  localparam int unsigned FRAME_W = DATA_W + 2;

  logic clk = 1'b0;
  logic res, enable, rts_in, rxdata, rdr_read, flags_clear;
  logic exp_fe, exp_pe;
  logic cts, rdrf, fe, pe;
  logic [DATA_W-1:0] rdr;

  int checks = 0;
  int failures = 0;

  uart_receiver dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Send one frame: data d, with the given stop bit, after gap idle clocks.
  task automatic frame(input logic [DATA_W-1:0] d, input logic stop_bit, input int gap);
    logic [FRAME_W-1:0] f;
    f = {stop_bit, d, 1'b0};
    @(negedge clk);
    rts_in = 1'b1;
    @(negedge clk);
    check(cts == 1'b0, "no CTS after one clock");
    @(negedge clk);
    check(cts == 1'b1, "CTS two clocks after RTS");
    rts_in = 1'b0;
    repeat (gap) @(negedge clk);
    for (int i = 0; i < FRAME_W; i++) begin
      rxdata = f[i];
      @(negedge clk);
      check(rdrf == 1'b0, "RDRFB low until the frame is complete");
      check(cts == (i < FRAME_W - 1), "CTS high until the stop bit is taken");
    end
    rxdata = 1'b1;
    @(negedge clk);
    check(rdrf == 1'b1, "RDRFB two clocks after the stop bit");
    check(rdr == d, $sformatf("RDR %h expected %h", rdr, d));
    exp_fe = exp_fe || !stop_bit;
    exp_pe = exp_pe || (^d);
    check(fe == exp_fe, "framing flag (sticky until cleared)");
    check(pe == exp_pe, "parity flag (sticky until cleared)");
    check(cts == 1'b0, "CTS low after the frame");
    rdr_read = 1'b1;
    flags_clear = ($urandom_range(0, 1) == 1);
    @(negedge clk);
    rdr_read = 1'b0;
    check(rdrf == 1'b0, "read of RDR clears RDRFB");
    if (flags_clear) begin
      check(fe == 1'b0 && pe == 1'b0, "flags_clear clears the error flags");
      exp_fe = 1'b0;
      exp_pe = 1'b0;
    end else begin
      check(fe == exp_fe && pe == exp_pe, "error flags held without flags_clear");
    end
    flags_clear = 1'b0;
  endtask

  initial begin
    res = 1'b1; enable = 1'b0; rts_in = 1'b0; rxdata = 1'b1; rdr_read = 1'b0;
    flags_clear = 1'b0; exp_fe = 1'b0; exp_pe = 1'b0;
    repeat (3) @(negedge clk);
    res = 1'b0;
    @(negedge clk);
    check(cts == 1'b0 && rdrf == 1'b0 && fe == 1'b0 && pe == 1'b0, "reset state");
    // Disabled: RTS is not answered.
    rts_in = 1'b1;
    repeat (6) @(negedge clk);
    check(cts == 1'b0, "disabled receiver gives no CTS");
    rts_in = 1'b0;
    @(negedge clk);
    enable = 1'b1;
    frame(8'h00, 1'b1, 0);
    frame(8'hff, 1'b1, 3);
    frame(8'h41, 1'b1, 1);     // odd number of ones: parity error expected
    frame(8'h42, 1'b0, 2);     // stop bit 0: framing error expected
    frame(8'h81, 1'b1, 5);
    for (int n = 0; n < 40; n++)
      frame(DATA_W'($urandom), ($urandom_range(0, 7) != 0), int'($urandom_range(0, 6)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
