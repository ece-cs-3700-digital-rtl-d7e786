// uart_pkg -- constants and state types shared by the echo UART.
//
// The serial frame is the asynchronous format used by EIA-232 terminals:
// the line idles at 1, a start bit of 0 opens the frame, eight data bits
// follow least-significant bit first, and stop bits of 1 close it. The
// receiver expects one stop bit and the sender always sends two, which is
// safe against a terminal set for either. Both state machines run from a
// clock enable at eight times the baud rate (76.8 kHz for 9600 baud) and
// look at the line in the middle of each bit.
//
// The frame format, the 9600 baud rate, the 8x oversampling and the stop-bit
// counts follow the design description; the state encodings below are this
// design's own.
package uart_pkg;

  localparam int unsigned DATA_BITS       = 8;            // bits per character
  localparam int unsigned TX_STOP_BITS    = 2;            // stop bits the sender sends
  localparam int unsigned DEFAULT_CLK_HZ  = 100_000_000;  // board oscillator
  localparam int unsigned DEFAULT_BAUD    = 9600;
  localparam int unsigned DEFAULT_OVERSAMPLE = 8;         // system clock = 8 x baud

  // Divisor from the board clock to the oversampling rate, rounded to nearest.
  function automatic int unsigned clk_div(input int unsigned clk_hz,
                                          input int unsigned baud,
                                          input int unsigned oversample);
    int unsigned rate;
    rate = baud * oversample;
    return (clk_hz + rate / 2) / rate;
  endfunction

  // Receiver controller states.
  typedef enum logic [2:0] {
    RX_IDLE   = 3'd0,  // line idle, waiting for a 0 (start bit)
    RX_START  = 3'd1,  // counting to the middle of the start bit
    RX_DATA   = 3'd2,  // sampling the eight data bits
    RX_STOP   = 3'd3,  // sampling the stop bit
    RX_REQ    = 3'd4,  // byte offered, RCV-REQ high, waiting for RCV-ACK
    RX_WAIT   = 3'd5,  // RCV-REQ low, waiting for RCV-ACK to fall
    RX_BREAK  = 3'd6   // stop bit was 0: waiting for the line to return to 1
  } rx_state_e;

  // Sender controller states.
  typedef enum logic [2:0] {
    TX_IDLE   = 3'd0,  // XMT at 1, waiting for XMT-REQ
    TX_START  = 3'd1,  // sending the start bit
    TX_DATA   = 3'd2,  // sending the eight data bits
    TX_STOP   = 3'd3,  // sending the two stop bits
    TX_ACK    = 3'd4   // XMT-ACK high, waiting for XMT-REQ to fall
  } tx_state_e;

endpackage
