// cpu_bus_if: the CPU side of a UART, as driven by a testbench.
//
// Bundles chip select, register select, read/write and the two data buses,
// and gives the bus cycles a test needs: a one-clock register write, a
// one-clock register read (data sampled just after the access starts), and
// a poll of the status register until a chosen bit is set. Signals change
// on the falling clock edge so the UART samples them cleanly on the rising
// edge.
interface cpu_bus_if #(
  parameter int unsigned DATA_W = 8
) (
  input logic clk
);
  logic              cs = 1'b0;
  logic              rs = 1'b0;
  logic              rw = 1'b1;
  logic [DATA_W-1:0] din = '0;
  logic [DATA_W-1:0] dout;

  task automatic write(input logic sel, input logic [DATA_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; rs = sel; rw = 1'b0; din = d;
    @(negedge clk);
    cs = 1'b0; rw = 1'b1; din = '0;
  endtask

  task automatic read(input logic sel, output logic [DATA_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; rs = sel; rw = 1'b1;
    #1;
    d = dout;
    @(negedge clk);
    cs = 1'b0;
  endtask

  // Poll the status register until bit `bit_no` is 1; returns the number of
  // polls, or -1 after max_polls, and the last status value read.
  task automatic poll(input int bit_no, input int max_polls, output int polls,
                      output logic [DATA_W-1:0] st);
    polls = -1;
    for (int i = 1; i <= max_polls; i++) begin
      read(1'b0, st);
      if (st[bit_no]) begin
        polls = i;
        break;
      end
    end
  endtask
endinterface
