// tb_uart_transmitter: self-checking test of the UART transmitter.
//
// For a set of characters (fixed corner cases, then random ones) the bench
// pulses TRANS, answers RTS with CTS after a random delay, and reads the ten
// frame bits off txdata one per clock. It checks the frame against
// {1, data, 0} sent LSB first, that the line stays idle and RTS stays high
// while CTS is withheld, that RTS follows TRANS by one clock and the start
// bit follows CTS by two, that the ten bits take exactly ten clocks, that
// RTS is released once sending starts, and TDRE/busy around the frame.
module tb_uart_transmitter;
  import uart_pkg::*;

  localparam int unsigned DATA_W = DATA_W_DEFAULT;
  localparam int unsigned FRAME_W = DATA_W + 2;

  logic clk = 1'b0;
  logic res;
  logic trans;
  logic [DATA_W-1:0] tdr;
  logic cts;
  logic rts, txdata, tdre, busy;

  int checks = 0;
  int failures = 0;

  uart_transmitter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic send(input logic [DATA_W-1:0] d, input int cts_delay);
    logic [FRAME_W-1:0] expect_frame;
    logic [FRAME_W-1:0] got;
    expect_frame = {1'b1, d, 1'b0};
    @(negedge clk);
    tdr   = d;
    trans = 1'b1;
    @(negedge clk);
    trans = 1'b0;
    check(rts == 1'b1, "RTS one clock after TRANS");
    check(busy == 1'b1, "busy after TRANS");
    repeat (cts_delay) begin
      @(negedge clk);
      check(rts == 1'b1 && txdata == 1'b1, "RTS held, line idle while CTS withheld");
    end
    cts = 1'b1;
    @(negedge clk);
    check(txdata == 1'b1, "no data one clock after CTS");
    @(negedge clk);
    check(rts == 1'b0, "RTS released once sending");
    cts = 1'b0;
    for (int i = 0; i < FRAME_W; i++) begin
      got[i] = txdata;
      if (i == 2) check(tdre == 1'b0, "TDRE low while shifting");
      if (i < FRAME_W - 1) begin
        check(busy == 1'b1, "busy during frame");
        @(negedge clk);
      end
    end
    check(got == expect_frame, $sformatf("frame %h expected %h", got, expect_frame));
    check(busy == 1'b0, "idle when the stop bit is on the line");
    @(negedge clk);
    check(txdata == 1'b1 && tdre == 1'b1 && rts == 1'b0, "idle line after frame");
  endtask

  initial begin
    res = 1'b1; trans = 1'b0; tdr = '0; cts = 1'b0;
    repeat (3) @(negedge clk);
    res = 1'b0;
    @(negedge clk);
    check(txdata == 1'b1 && rts == 1'b0 && tdre == 1'b1 && busy == 1'b0, "reset state");
    // TDR changes while idle must not start anything.
    tdr = 8'h5a;
    repeat (3) @(negedge clk);
    check(rts == 1'b0 && busy == 1'b0, "no request without TRANS");
    send(8'h00, 0);
    send(8'hff, 1);
    send(8'ha5, 3);
    send(8'h01, 0);
    send(8'h80, 7);
    for (int n = 0; n < 40; n++) send(DATA_W'($urandom), int'($urandom_range(0, 6)));
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
