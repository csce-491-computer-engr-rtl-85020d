// uart_transmitter: the send side of the UART.
//
// A three-state machine. In Wait_TRANS it holds the line idle (Txdata = 1),
// clears the bit counter TCNT, marks the transmit data register empty (TDRE)
// and keeps reloading the shift register with the frame {1, TDR, 0}, so the
// frame always holds the current TDR. When TRANS is seen it moves to Send_RTS,
// where RTS is driven high until the far end answers with CTS. It then moves
// to Transmit and stays there for one clock per frame bit: each clock the
// lowest shift-register bit goes to Txdata, the register shifts right and
// TCNT counts up. After the tenth bit (TCNT = 9) it returns to Wait_TRANS.
//
// Interface: trans, tdr and cts are sampled on the rising clock edge; rts is
// a decoded state output (high in Send_RTS only); txdata and tdre are
// registered. busy is high whenever the machine is not in Wait_TRANS.
// res is an asynchronous, active-high reset.
//
// Timing: with CTS already high, the start bit appears on txdata three clocks
// after TRANS is sampled (Send_RTS, then the first Transmit clock loads it),
// and the ten frame bits occupy ten consecutive clocks.
//
// The states, register transfers and the frame {1, TDR, 0} follow the
// transmitter chart of the original description. Filling the vacated shift
// register bit with 1 and the busy output are choices of this design.
//
// The assertions use the reset as their disable condition, which lint
// reports as a synchronous use of the asynchronous reset; no flip-flop is
// built from it.
module uart_transmitter
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT
) (
  input  logic              clk,
  input  logic              res,
  input  logic              trans,
  input  logic [DATA_W-1:0] tdr,
  input  logic              cts,
  output logic              rts,
  output logic              txdata,
  output logic              tdre,
  output logic              busy
);

  localparam int unsigned FRAME_W = DATA_W + 2;
  localparam int unsigned CNT_W   = $clog2(FRAME_W);
  localparam logic [CNT_W-1:0] LAST_BIT = CNT_W'(FRAME_W - 1);

  tx_state_t          state;
  logic [CNT_W-1:0]   tcnt;
  logic [FRAME_W-1:0] tshift;

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      state  <= TX_WAIT_TRANS;
      tcnt   <= '0;
      tshift <= '1;
      txdata <= 1'b1;
      tdre   <= 1'b1;
    end else begin
      unique case (state)
        TX_WAIT_TRANS: begin
          tcnt   <= '0;
          txdata <= 1'b1;
          tshift <= {1'b1, tdr, 1'b0};
          tdre   <= 1'b1;
          if (trans) state <= TX_SEND_RTS;
        end
        TX_SEND_RTS: begin
          if (cts) state <= TX_TRANSMIT;
        end
        TX_TRANSMIT: begin
          tcnt   <= tcnt + 1'b1;
          tdre   <= 1'b0;
          tshift <= {1'b1, tshift[FRAME_W-1:1]};
          txdata <= tshift[0];
          if (tcnt == LAST_BIT) state <= TX_WAIT_TRANS;
        end
        default: state <= TX_WAIT_TRANS;
      endcase
    end
  end

  assign rts  = (state == TX_SEND_RTS);
  assign busy = (state != TX_WAIT_TRANS);

  // Handshake rule: data is shifted out only after CTS has been seen.
  a_cts_before_data: assert property (@(posedge clk) disable iff (res)
    (state == TX_SEND_RTS && !cts) |=> (state == TX_SEND_RTS));
  // RTS is released once the transmission has started.
  a_rts_low_while_sending: assert property (@(posedge clk) disable iff (res)
    (state == TX_TRANSMIT) |-> !rts);

endmodule
