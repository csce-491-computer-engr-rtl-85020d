// tb_uart_link: end-to-end test of the two-ended UART link at its default
// size.
//
// Each end has a CPU thread, as in the design's own verification plan: it
// loops over its register bus, applying queued control-register writes,
// reading RDR whenever RDRFB is set (keeping the status seen with each
// character), and writing the next queued character to TDR whenever TDRE is
// set. The main thread queues work for both ends and checks that every
// character arrives intact and in order at the other end, with the parity
// flag matching its parity.
//
// Phases: host to target; target to host; both directions at once; a
// handshake stall (the target's receiver disabled, so the host waits in
// Send_RTS with RTS high until it is enabled); and characters with odd
// parity. A monitor counts how often each mechanism happened (CTS wait,
// queued TRANS behind a busy transmitter, both transmitters shifting at
// once, parity error, RDRFB cleared by a read) and counts a failure for any
// that never did. It also checks two cycle counts worked out from the state
// machines: 16 clocks from the clock edge that writes TDR to RDRFB at the
// other end when both sides are idle, and 15 clocks between start bits when
// characters are sent back to back.
module tb_uart_link;
  import uart_pkg::*;

  localparam int unsigned DATA_W = DATA_W_DEFAULT;

  logic clk = 1'b0;
  logic res;
  logic h_txdata, h_rts, h_cts, t_txdata, t_rts, t_cts;

  int checks = 0;
  int failures = 0;

  cpu_bus_if #(.DATA_W(DATA_W)) hb (.clk);
  cpu_bus_if #(.DATA_W(DATA_W)) tbus (.clk);

  uart_link dut (
    .clk, .res,
    .h_cs(hb.cs), .h_rs(hb.rs), .h_rw(hb.rw), .h_din(hb.din), .h_dout(hb.dout),
    .t_cs(tbus.cs), .t_rs(tbus.rs), .t_rw(tbus.rw), .t_din(tbus.din), .t_dout(tbus.dout),
    .h_txdata, .h_rts, .h_cts, .t_txdata, .t_rts, .t_cts
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- CPU threads
  typedef struct packed {
    logic [DATA_W-1:0] status;
    logic [DATA_W-1:0] data;
  } rx_entry_t;

  logic [DATA_W-1:0] h_sendq[$], t_sendq[$];
  logic [DATA_W-1:0] h_ctrlq[$], t_ctrlq[$];
  rx_entry_t         h_rxq[$], t_rxq[$];
  bit                run = 1'b0;

  initial begin : host_cpu
    logic [DATA_W-1:0] st, d;
    wait (run);
    forever begin
      if (h_ctrlq.size() > 0) hb.write(RS_CTRL, h_ctrlq.pop_front());
      hb.read(RS_CTRL, st);
      if (st[0]) begin
        hb.read(RS_DATA, d);
        h_rxq.push_back({st, d});
      end
      if (st[1] && h_sendq.size() > 0) hb.write(RS_DATA, h_sendq.pop_front());
    end
  end

  initial begin : target_cpu
    logic [DATA_W-1:0] st, d;
    wait (run);
    forever begin
      if (t_ctrlq.size() > 0) tbus.write(RS_CTRL, t_ctrlq.pop_front());
      tbus.read(RS_CTRL, st);
      if (st[0]) begin
        tbus.read(RS_DATA, d);
        t_rxq.push_back({st, d});
      end
      if (st[1] && t_sendq.size() > 0) tbus.write(RS_DATA, t_sendq.pop_front());
    end
  end

  // ---------------------------------------------------------------- monitor
  longint cyc = 0;
  int n_cts_wait = 0, n_queued_trans = 0, n_parallel = 0, n_parity_err = 0, n_rdrf_clear = 0;
  int n_back_to_back = 0;
  longint h_last_start = -1000;
  longint lat_write = -1;
  int     latency = -1;
  bit     measure = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (h_rts && !h_cts) n_cts_wait++;
    if (dut.u_host.u_ctrl.trans && dut.u_host.u_tx.busy) n_queued_trans++;
    if (dut.u_target.u_ctrl.trans && dut.u_target.u_tx.busy) n_queued_trans++;
    if (dut.u_host.u_tx.state == TX_TRANSMIT && dut.u_target.u_tx.state == TX_TRANSMIT) n_parallel++;
    if (dut.u_host.u_rx.rdr_read && dut.u_host.u_rx.rdrf) n_rdrf_clear++;
    if (dut.u_target.u_rx.rdr_read && dut.u_target.u_rx.rdrf) n_rdrf_clear++;
    // Start bit of the host's transmitter: it goes out after this edge.
    if (dut.u_host.u_tx.state == TX_TRANSMIT && dut.u_host.u_tx.tcnt == 0) begin
      if (cyc - h_last_start < 15) begin
        checks++; failures++;
        $display("FAIL: start bits %0d clocks apart", cyc - h_last_start);
      end
      if (cyc - h_last_start == 15) n_back_to_back++;
      h_last_start = cyc;
    end
    // Latency from the TDR write edge to RDRFB at the far end.
    if (measure && lat_write < 0 && dut.u_host.u_ctrl.wr_tdr) lat_write = cyc;
    if (measure && lat_write >= 0 && latency < 0 && !dut.u_target.u_rx.rdrf
        && dut.u_target.u_rx.state == RX_LOAD_RDR)
      latency = int'(cyc - lat_write);
  end

  // ---------------------------------------------------------------- helpers
  task automatic wait_rx(ref rx_entry_t q[$], input int n, input int max_clocks);
    int k;
    k = 0;
    while (q.size() < n && k < max_clocks) begin
      @(negedge clk);
      k++;
    end
    check(q.size() >= n, $sformatf("%0d characters arrived (got %0d)", n, q.size()));
  endtask

  task automatic compare(ref rx_entry_t q[$], input logic [DATA_W-1:0] sent[$], input string dir);
    for (int i = 0; i < sent.size(); i++) begin
      if (q.size() == 0) begin
        check(1'b0, {dir, ": character missing"});
      end else begin
        rx_entry_t e;
        uart_status_t st;
        e = q.pop_front();
        st = uart_status_t'(e.status);
        check(e.data == sent[i], $sformatf("%s: char %0d is %h, sent %h", dir, i, e.data, sent[i]));
        check(st.pe == ^sent[i], $sformatf("%s: parity flag of %h", dir, sent[i]));
        check(st.fe == 1'b0, {dir, ": no framing error"});
        if (st.pe) n_parity_err++;
      end
    end
    check(q.size() == 0, {dir, ": no extra characters"});
  endtask

  function automatic logic [DATA_W-1:0] even_parity_char(input logic [6:0] ascii);
    return {ascii, ^ascii};
  endfunction

  logic [DATA_W-1:0] sent_h[$], sent_t[$];

  initial begin
    res = 1'b1;
    repeat (3) @(negedge clk);
    res = 1'b0;
    @(negedge clk);
    check(h_txdata && t_txdata && !h_rts && !t_rts && !h_cts && !t_cts, "lines idle after reset");
    h_ctrlq.push_back(8'b0000_0111);
    t_ctrlq.push_back(8'b0000_0111);
    run = 1'b1;
    repeat (10) @(negedge clk);

    // Host to target, ASCII characters with even parity in the LSB.
    sent_h = {};
    for (int i = 0; i < 16; i++) sent_h.push_back(even_parity_char(7'($urandom)));
    measure = 1'b1;
    foreach (sent_h[i]) h_sendq.push_back(sent_h[i]);
    wait_rx(t_rxq, sent_h.size(), 2000);
    measure = 1'b0;
    compare(t_rxq, sent_h, "host->target");
    check(latency == 16, $sformatf("TDR write to far-end RDRFB takes %0d clocks, expected 16", latency));

    // Target to host.
    sent_t = {};
    for (int i = 0; i < 16; i++) sent_t.push_back(even_parity_char(7'($urandom)));
    foreach (sent_t[i]) t_sendq.push_back(sent_t[i]);
    wait_rx(h_rxq, sent_t.size(), 2000);
    compare(h_rxq, sent_t, "target->host");

    // Both directions at once.
    sent_h = {}; sent_t = {};
    for (int i = 0; i < 20; i++) begin
      sent_h.push_back(even_parity_char(7'($urandom)));
      sent_t.push_back(even_parity_char(7'($urandom)));
    end
    foreach (sent_h[i]) h_sendq.push_back(sent_h[i]);
    foreach (sent_t[i]) t_sendq.push_back(sent_t[i]);
    fork
      wait_rx(t_rxq, sent_h.size(), 3000);
      wait_rx(h_rxq, sent_t.size(), 3000);
    join
    compare(t_rxq, sent_h, "parallel host->target");
    compare(h_rxq, sent_t, "parallel target->host");

    // Handshake stall: the target's receiver is off, the host must wait.
    t_ctrlq.push_back(8'b0000_0011);
    repeat (20) @(negedge clk);
    sent_h = {8'h9a};
    h_sendq.push_back(8'h9a);
    repeat (100) @(negedge clk);
    check(h_rts == 1'b1 && h_cts == 1'b0 && h_txdata == 1'b1, "host holds RTS, line idle, while not cleared to send");
    check(t_rxq.size() == 0, "nothing received while the receiver is off");
    t_ctrlq.push_back(8'b0000_0111);
    wait_rx(t_rxq, 1, 500);
    compare(t_rxq, sent_h, "after stall");

    // Odd parity: delivered, flagged by the receiver.
    sent_h = {};
    for (int i = 0; i < 8; i++) begin
      logic [6:0] c;
      c = 7'($urandom);
      sent_h.push_back({c, ~^c});
    end
    foreach (sent_h[i]) h_sendq.push_back(sent_h[i]);
    wait_rx(t_rxq, sent_h.size(), 2000);
    compare(t_rxq, sent_h, "odd parity");

    // Every mechanism must have happened.
    check(n_cts_wait > 0, "CTS wait happened");
    check(n_queued_trans > 0, "TRANS queued behind a busy transmitter");
    check(n_back_to_back > 0, "back-to-back characters 15 clocks apart");
    check(n_parallel > 0, "both transmitters shifting at once");
    check(n_parity_err > 0, "parity error flagged");
    check(n_rdrf_clear > 0, "RDRFB cleared by a read");
    $display("mechanisms: cts_wait=%0d queued_trans=%0d back_to_back=%0d parallel=%0d parity_err=%0d rdrf_clear=%0d",
             n_cts_wait, n_queued_trans, n_back_to_back, n_parallel, n_parity_err, n_rdrf_clear);
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
