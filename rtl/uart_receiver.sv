// uart_receiver -- serial receiver with a four-phase request/acknowledge output.
//
// The receiver watches RCV (`rcv`), which idles at 1, for a start bit. Since
// the terminal's clock is neither in phase nor exactly at the same rate as
// ours, the receiver resynchronises on every frame and samples each bit in
// its middle: it runs from a clock enable (`tick`) at OVERSAMPLE (8) x the
// baud rate, sees the line low on some tick, counts OVERSAMPLE/2 ticks to the
// middle of the start bit, checks that the line is still low (a shorter low
// pulse is ignored as noise), and then samples every OVERSAMPLE ticks: eight
// data bits, least-significant first, shifted into a shift register from the
// top, then one stop bit. If the stop bit reads 1 the byte is copied to
// RCV-Data (`rcv_data`) and RCV-REQ (`rcv_req`) rises. When the consumer
// raises RCV-ACK (`rcv_ack`), RCV-REQ falls, and the receiver waits for
// RCV-ACK to fall before it looks for the next start bit. While the
// handshake is open, the line is not watched.
//
// If the stop bit reads 0 (a framing error or a break), the byte is dropped,
// RCV-Data keeps the previous byte, and the receiver waits for the line to
// return to 1 before looking for a new start bit.
//
// RCV comes from outside and is passed through two flip-flops on `clk`
// before it is used. RCV-Data holds the last good byte, so it can drive a
// display directly; it changes only when a new byte is offered.
//
// Timing (in ticks from the tick T0 that first sees the synchronised line
// low): start bit checked at T0+4, data bit i sampled at T0+4+8(i+1), stop
// bit at T0+76, and RCV-REQ high from the cycle after that tick. RCV-ACK
// is looked at only on ticks. `rst` is synchronous and active high.
//
// The frame, one expected stop bit, mid-bit sampling at 8x and the handshake
// order follow the design description. The start-bit recheck, the input
// synchroniser, the handling of a 0 stop bit and the separate output
// register are this design's own choices.
module uart_receiver #(
  parameter int unsigned OVERSAMPLE = uart_pkg::DEFAULT_OVERSAMPLE
) (
  input  logic                 clk,
  input  logic                 rst,       // Clr
  input  logic                 tick,      // OVERSAMPLE x baud clock enable
  input  logic                 rcv,       // serial line from the terminal
  output logic                 rcv_req,   // RCV-REQ
  input  logic                 rcv_ack,   // RCV-ACK
  output logic [7:0]           rcv_data,  // RCV-Data
  output uart_pkg::rx_state_e  state      // controller state, for status lights
);
  import uart_pkg::*;

  localparam int unsigned TW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam logic [TW-1:0] TLAST = TW'(OVERSAMPLE - 1);
  localparam logic [TW-1:0] THALF = TW'(OVERSAMPLE / 2 - 1);

  logic [1:0]    sync;      // input synchroniser, sync[1] is the usable line
  logic          line;
  logic [TW-1:0] tcount;    // ticks since the last sample point
  logic [2:0]    bitn;      // data bit index
  logic [7:0]    shreg;     // bits received so far, newest in bit 7

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rcv};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RX_IDLE;
      tcount   <= '0;
      bitn     <= '0;
      shreg    <= '0;
      rcv_data <= '0;
      rcv_req  <= 1'b0;
    end else if (tick) begin
      unique case (state)
        RX_IDLE: begin
          if (!line) begin
            tcount <= '0;
            state  <= RX_START;
          end
        end
        RX_START: begin
          if (tcount == THALF) begin
            tcount <= '0;
            bitn   <= '0;
            state  <= line ? RX_IDLE : RX_DATA;   // too short: noise
          end else begin
            tcount <= tcount + 1'b1;
          end
        end
        RX_DATA: begin
          if (tcount == TLAST) begin
            tcount <= '0;
            shreg  <= {line, shreg[7:1]};         // LSB arrives first
            bitn   <= bitn + 1'b1;
            if (bitn == 3'(DATA_BITS - 1)) state <= RX_STOP;
          end else begin
            tcount <= tcount + 1'b1;
          end
        end
        RX_STOP: begin
          if (tcount == TLAST) begin
            tcount <= '0;
            if (line) begin
              rcv_data <= shreg;
              rcv_req  <= 1'b1;
              state    <= RX_REQ;
            end else begin
              state    <= RX_BREAK;
            end
          end else begin
            tcount <= tcount + 1'b1;
          end
        end
        RX_REQ: begin
          if (rcv_ack) begin
            rcv_req <= 1'b0;
            state   <= RX_WAIT;
          end
        end
        RX_WAIT: begin
          if (!rcv_ack) state <= RX_IDLE;
        end
        RX_BREAK: begin
          if (line) state <= RX_IDLE;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  // RCV-Data may change only while no request is open.
  a_data_stable: assert property (@(posedge clk) disable iff (rst)
                                  rcv_req && $past(rcv_req) |-> $stable(rcv_data))
    else $error("uart_receiver: RCV-Data changed during RCV-REQ");

endmodule
