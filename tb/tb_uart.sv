// tb_uart: self-checking test of one UART, with the bench as both the CPU
// and the far end of the serial line.
//
// It runs the verification scenarios of the design: the CPU programs the
// control register; a transmit (the CPU writes TDR and the bench, acting as
// the far-end receiver, answers RTS with CTS and captures the frame); a
// receive (the bench raises the far end's RTS, waits for CTS and sends a
// frame; the CPU polls RDRFB in the status register and reads RDR, which
// clears RDRFB); a transmit and a receive running at the same time; and
// frames with a bad stop bit or odd parity, which must show in the status
// register until the status check that reports them. Every character is checked against what was sent.
module tb_uart;
  import uart_pkg::*;

  localparam int unsigned DATA_W = DATA_W_DEFAULT;
  localparam int unsigned FRAME_W = DATA_W + 2;

  logic clk = 1'b0;
  logic res;
  logic txdata, rts, cts_in, rxdata, rts_in, cts;

  int checks = 0;
  int failures = 0;

  cpu_bus_if #(.DATA_W(DATA_W)) bus (.clk);

  uart dut (
    .clk, .res,
    .cs(bus.cs), .rs(bus.rs), .rw(bus.rw), .din(bus.din), .dout(bus.dout),
    .txdata, .rts, .cts_in, .rxdata, .rts_in, .cts
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Far-end receiver: grant CTS after a random delay, capture the frame.
  logic [FRAME_W-1:0] captured[$];
  initial begin
    cts_in = 1'b0;
    forever begin
      logic [FRAME_W-1:0] f;
      @(negedge clk);
      if (rts) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        cts_in = 1'b1;
        while (txdata) @(negedge clk);
        for (int i = 0; i < FRAME_W; i++) begin
          f[i] = txdata;
          if (i == 0) cts_in = 1'b0;
          @(negedge clk);
        end
        captured.push_back(f);
      end
    end
  end

  // Far-end transmitter: one frame with the given stop bit.
  task automatic remote_send(input logic [DATA_W-1:0] d, input logic stop_bit);
    logic [FRAME_W-1:0] f;
    int waited;
    f = {stop_bit, d, 1'b0};
    @(negedge clk);
    rts_in = 1'b1;
    waited = 0;
    while (!cts && waited < 100) begin
      @(negedge clk);
      waited++;
    end
    check(cts == 1'b1, "UART answers RTS with CTS");
    rts_in = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    for (int i = 0; i < FRAME_W; i++) begin
      rxdata = f[i];
      @(negedge clk);
    end
    rxdata = 1'b1;
  endtask

  // CPU: wait for RDRFB, check status flags and the character, and that the
  // read cleared RDRFB.
  task automatic cpu_receive(input logic [DATA_W-1:0] d, input logic stop_bit);
    int polls;
    logic [DATA_W-1:0] v;
    uart_status_t st;
    bus.poll(0, 200, polls, v);
    check(polls > 0, "RDRFB set after a frame");
    st = uart_status_t'(v);
    check(st.fe == !stop_bit, "FE flag");
    check(st.pe == ^d, "PE flag");
    bus.read(RS_DATA, v);
    check(v == d, $sformatf("RDR %h expected %h", v, d));
    bus.read(RS_CTRL, v);
    st = uart_status_t'(v);
    check(st.rdrf == 1'b0, "reading RDR clears RDRFB");
    check(st.fe == 1'b0 && st.pe == 1'b0, "status check cleared the error flags");
  endtask

  task automatic cpu_transmit(input logic [DATA_W-1:0] d);
    int polls;
    logic [DATA_W-1:0] st;
    bus.poll(1, 200, polls, st);
    check(polls > 0, "TDRE before writing TDR");
    bus.write(RS_DATA, d);
  endtask

  task automatic expect_frame(input logic [DATA_W-1:0] d);
    int waited;
    waited = 0;
    while (captured.size() == 0 && waited < 200) begin
      @(negedge clk);
      waited++;
    end
    check(captured.size() > 0, "frame seen on txdata");
    if (captured.size() > 0) begin
      logic [FRAME_W-1:0] f;
      f = captured.pop_front();
      check(f == {1'b1, d, 1'b0}, $sformatf("frame %h expected %h", f, {1'b1, d, 1'b0}));
    end
  endtask

  logic [DATA_W-1:0] a, b;
  logic [DATA_W-1:0] v;

  initial begin
    res = 1'b1; rts_in = 1'b0; rxdata = 1'b1;
    repeat (3) @(negedge clk);
    res = 1'b0;

    // Control register: master, transmit and receive enables.
    bus.read(RS_CTRL, v);
    check(v == 8'b0000_0010, "status after reset: only TDRE");
    bus.write(RS_CTRL, 8'b0000_0111);

    // Transmit.
    for (int n = 0; n < 10; n++) begin
      a = DATA_W'($urandom);
      cpu_transmit(a);
      expect_frame(a);
    end

    // Receive, including a bad stop bit and odd parity.
    remote_send(8'h55, 1'b1); cpu_receive(8'h55, 1'b1);
    remote_send(8'h54, 1'b1); cpu_receive(8'h54, 1'b1);
    remote_send(8'h66, 1'b0); cpu_receive(8'h66, 1'b0);
    for (int n = 0; n < 10; n++) begin
      a = DATA_W'($urandom);
      remote_send(a, 1'b1);
      cpu_receive(a, 1'b1);
    end

    // Parallel transmit and receive.
    for (int n = 0; n < 10; n++) begin
      a = DATA_W'($urandom);
      b = DATA_W'($urandom);
      fork
        remote_send(b, 1'b1);
        cpu_transmit(a);
      join
      expect_frame(a);
      cpu_receive(b, 1'b1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
