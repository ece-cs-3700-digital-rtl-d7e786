// clock_divider -- derives the UART's 8 x baud rate from the board clock.
//
// The sender and receiver state machines run at eight times the baud rate,
// 76.8 kHz for 9600 baud, derived from the 100 MHz board oscillator. Rather
// than producing a second clock, this block produces a clock enable: `tick`
// is high for one `clk` cycle out of every DIVIDE, and the state machines
// advance only on those cycles. This is functionally the same as clocking
// them at clk/DIVIDE, but keeps the whole design in one clock domain.
//
// A modulo-DIVIDE counter counts up from 0; `tick` is asserted in the cycle
// in which it holds DIVIDE-1, after which it wraps to 0. With the default
// DIVIDE of 1302 the rate is 100 MHz / 1302 = 76.805 kHz, 0.006 % above
// 76.8 kHz. Reset (`rst`, synchronous, active high) clears the counter, so
// the first tick comes DIVIDE cycles after reset is released.
//
// Interface:  clk, rst in;  tick out (registered, one cycle wide).
// The 76.8 kHz target follows the design description; the divide-by-counter
// with a clock-enable output is this design's own choice.
module clock_divider #(
  parameter int unsigned DIVIDE = uart_pkg::clk_div(uart_pkg::DEFAULT_CLK_HZ,
                                                    uart_pkg::DEFAULT_BAUD,
                                                    uart_pkg::DEFAULT_OVERSAMPLE)
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (DIVIDE > 1) ? $clog2(DIVIDE) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIVIDE - 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick  <= (count == LAST);
      count <= (count == LAST) ? '0 : count + 1'b1;
    end
  end

  initial assert (DIVIDE >= 1) else $error("clock_divider: DIVIDE must be at least 1");

endmodule
