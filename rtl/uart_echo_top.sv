// uart_echo_top -- a UART that echoes every character typed on a terminal.
//
// Characters arrive from the terminal on RCV as asynchronous serial frames
// (9600 baud, start bit, 8 data bits LSB first, stop bit). The receiver
// collects each one into a byte and offers it with a four-phase handshake
// (RCV-REQ / RCV-ACK). That handshake is wired straight to the sender's
// (XMT-REQ / XMT-ACK), so the sender takes the byte, sends it back on XMT
// with two stop bits, and only then acknowledges; the receiver then closes
// the handshake and looks for the next character. The byte last received is
// shown on the eight lights D[7:0] (D[7] the high-order bit).
//
// A clock divider turns the 100 MHz board clock CLOCK into a one-cycle
// enable at 8 x 9600 = 76.8 kHz, the rate at which both state machines run.
// RESET (a switch, active high) clears both machines and the divider; it
// takes effect at once and is released two CLOCK edges after the switch
// opens, through a two-flip-flop synchroniser.
//
// Status lights, as the design description suggests for bring-up: the
// state of each machine (RCV_STATE, XMT_STATE) and the two handshake wires
// between them (HS_REQ, HS_ACK).
//
// Because the sender acknowledges only after the echo has left, a character
// that starts arriving before the echo of the previous one is finished is not
// seen. At typing speed this never happens.
//
// The structure, the pin names XMT, RCV, CLOCK, D and RESET, the rates and the
// echo wiring follow the design description; the reset synchroniser and the
// clock enable in place of a divided clock are this design's own choices.
module uart_echo_top #(
  parameter int unsigned CLK_HZ     = uart_pkg::DEFAULT_CLK_HZ,
  parameter int unsigned BAUD       = uart_pkg::DEFAULT_BAUD,
  parameter int unsigned OVERSAMPLE = uart_pkg::DEFAULT_OVERSAMPLE
) (
  input  logic       CLOCK,      // board oscillator
  input  logic       RESET,      // reset switch, active high
  input  logic       RCV,        // serial data from the terminal
  output logic       XMT,        // serial data to the terminal
  output logic [7:0] D,          // last received byte, to the LED display
  output logic [2:0] RCV_STATE,  // receiver state, status lights
  output logic [2:0] XMT_STATE,  // sender state, status lights
  output logic       HS_REQ,     // RCV-REQ = XMT-REQ
  output logic       HS_ACK      // XMT-ACK = RCV-ACK
);
  import uart_pkg::*;

  localparam int unsigned DIVIDE = clk_div(CLK_HZ, BAUD, OVERSAMPLE);

  logic [1:0] rst_sync;
  logic       rst;
  logic       tick;
  logic       req, ack;
  logic [7:0] data;
  rx_state_e  rx_state;
  tx_state_e  tx_state;

  // Reset takes effect at once and is released on a clock edge.
  always_ff @(posedge CLOCK or posedge RESET) begin
    if (RESET) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst = rst_sync[1];

  clock_divider #(.DIVIDE(DIVIDE)) u_div (
    .clk  (CLOCK),
    .rst  (rst),
    .tick (tick)
  );

  uart_receiver #(.OVERSAMPLE(OVERSAMPLE)) u_rcv (
    .clk      (CLOCK),
    .rst      (rst),
    .tick     (tick),
    .rcv      (RCV),
    .rcv_req  (req),
    .rcv_ack  (ack),
    .rcv_data (data),
    .state    (rx_state)
  );

  uart_sender #(.OVERSAMPLE(OVERSAMPLE)) u_xmt (
    .clk      (CLOCK),
    .rst      (rst),
    .tick     (tick),
    .xmt_req  (req),
    .xmt_data (data),
    .xmt_ack  (ack),
    .xmt      (XMT),
    .state    (tx_state)
  );

  hs4_checker #(.W(8)) u_hs_check (
    .clk  (CLOCK),
    .rst  (rst),
    .req  (req),
    .ack  (ack),
    .data (data)
  );

  assign D         = data;
  assign RCV_STATE = rx_state;
  assign XMT_STATE = tx_state;
  assign HS_REQ    = req;
  assign HS_ACK    = ack;

endmodule
