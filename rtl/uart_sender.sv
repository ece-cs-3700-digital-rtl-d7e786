// uart_sender -- serial transmitter with a four-phase request/acknowledge input.
//
// On the parallel side the sender is a four-phase (return-to-zero) handshake
// slave: when XMT-REQ (`xmt_req`) is seen high the byte on `xmt_data` is
// copied into a shift register and sent; once the whole frame is on the line
// XMT-ACK (`xmt_ack`) rises and stays high until XMT-REQ falls, after which
// XMT-ACK falls and the sender waits for the next request. On the serial side
// it drives XMT (`xmt`), which idles at 1. A frame is a start bit (0), the
// eight data bits least-significant first, and two stop bits (1).
//
// The controller is a small state machine (IDLE, START, DATA, STOP, ACK) that
// steps a tick counter and a bit counter and shifts the data register right
// by one at every bit boundary. Everything advances only on `tick`, the
// clock enable at OVERSAMPLE x the baud rate, so each bit is held on XMT for
// exactly OVERSAMPLE ticks. XMT-REQ is also looked at only on ticks.
//
// Timing: XMT falls in the clock cycle after the tick on which XMT-REQ is
// seen; XMT-ACK rises (1 + 8 + 2) x OVERSAMPLE = 88 ticks later, when the
// second stop bit has been held for its full bit time; XMT-ACK falls one
// cycle after the first tick that sees XMT-REQ low. `state` is brought out
// for status lights. `rst` is synchronous and active high.
//
// The frame, the two stop bits, the handshake order and the 8x rate follow
// the design description; the state set, the registered XMT output and
// acting only on ticks are this design's own choices.
module uart_sender #(
  parameter int unsigned OVERSAMPLE = uart_pkg::DEFAULT_OVERSAMPLE
) (
  input  logic                 clk,
  input  logic                 rst,       // Clr
  input  logic                 tick,      // OVERSAMPLE x baud clock enable
  input  logic                 xmt_req,   // XMT-REQ
  input  logic [7:0]           xmt_data,  // XMT-Data
  output logic                 xmt_ack,   // XMT-ACK
  output logic                 xmt,       // serial line to the terminal
  output uart_pkg::tx_state_e  state      // controller state, for status lights
);
  import uart_pkg::*;

  localparam int unsigned TW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam logic [TW-1:0] TLAST = TW'(OVERSAMPLE - 1);

  logic [TW-1:0] tcount;    // ticks into the current bit
  logic [2:0]    bitn;      // data bit / stop bit index
  logic [7:0]    shreg;     // bits still to send, next one in bit 0

  wire bit_done = tick && (tcount == TLAST);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= TX_IDLE;
      tcount  <= '0;
      bitn    <= '0;
      shreg   <= '0;
      xmt     <= 1'b1;
      xmt_ack <= 1'b0;
    end else begin
      if (tick && state inside {TX_START, TX_DATA, TX_STOP})
        tcount <= (tcount == TLAST) ? '0 : tcount + 1'b1;

      unique case (state)
        TX_IDLE: begin
          if (tick && xmt_req) begin
            shreg  <= xmt_data;
            xmt    <= 1'b0;              // start bit
            tcount <= '0;
            state  <= TX_START;
          end
        end
        TX_START: begin
          if (bit_done) begin
            xmt   <= shreg[0];           // data bit 0
            shreg <= shreg >> 1;
            bitn  <= '0;
            state <= TX_DATA;
          end
        end
        TX_DATA: begin
          if (bit_done) begin
            if (bitn == 3'(DATA_BITS - 1)) begin
              xmt   <= 1'b1;             // first stop bit
              bitn  <= '0;
              state <= TX_STOP;
            end else begin
              xmt   <= shreg[0];
              shreg <= shreg >> 1;
              bitn  <= bitn + 1'b1;
            end
          end
        end
        TX_STOP: begin
          if (bit_done) begin
            if (bitn == 3'(TX_STOP_BITS - 1)) begin
              xmt_ack <= 1'b1;
              state   <= TX_ACK;
            end else begin
              bitn <= bitn + 1'b1;
            end
          end
        end
        TX_ACK: begin
          if (tick && !xmt_req) begin
            xmt_ack <= 1'b0;
            state   <= TX_IDLE;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // The line is idle (1) whenever no frame is in progress.
  a_idle_high: assert property (@(posedge clk) disable iff (rst)
                                (state inside {TX_IDLE, TX_ACK}) |-> xmt)
    else $error("uart_sender: XMT not idle outside a frame");

endmodule
