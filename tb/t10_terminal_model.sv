// t10_terminal_model -- behavioural model of a serial terminal (not synthesizable).
//
// Stands in for the terminal at the far end of the three-wire EIA-232 link,
// as seen after the board's level converters (logic levels, idle 1). It has
// the terminal's two data wires: `txd`, the keyboard side, which the UART
// reads as RCV, and `rxd`, the screen side, driven by the UART's XMT.
//
// The terminal has its own clock, unrelated in phase to the UART's: with one
// simulation time unit taken as 1 ns it runs at 10 MHz (period 100 units),
// and a bit lasts BIT_TCLK of its cycles, 1042 for 9600 baud.
//
// Keyboard: the task send_char sends one frame, start bit, eight data bits
// LSB first and one or two stop bits, with the bit time scaled by a rate
// error in parts per thousand, so a terminal whose clock is a little fast or
// slow can be modelled. send_glitch pulls the line low for a number of
// terminal cycles. send_frame_bad_stop sends a frame whose stop bit is 0.
//
// Screen: a receiver waits for a falling edge on `rxd`, samples each bit in
// its middle at the nominal rate, and pushes the byte, the time of its start
// edge and whether both of the two stop bits read 1 into the queues rx_byte,
// rx_time and rx_stop_ok.
module t10_terminal_model #(
  parameter int unsigned BIT_TCLK = 1042   // 10 MHz / 9600 baud
) (
  output logic txd,
  input  logic rxd
);
  logic tclk = 1'b0;
  initial begin
    #7;                                   // arbitrary phase against the UART
    forever #50 tclk = ~tclk;
  end

  task automatic wait_tclk(input int n);
    repeat (n) @(posedge tclk);
  endtask

  logic [7:0] rx_byte[$];
  realtime    rx_time[$];
  bit         rx_stop_ok[$];
  realtime    last_tx_start;

  initial txd = 1'b1;

  task automatic send_char(input logic [7:0] c, input int stop_bits = 2,
                           input int err_ppt = 0);
    int b = (BIT_TCLK * (1000 + err_ppt) + 500) / 1000;
    @(posedge tclk);
    last_tx_start = $realtime;
    txd = 1'b0;
    wait_tclk(b);
    for (int i = 0; i < 8; i++) begin
      txd = c[i];
      wait_tclk(b);
    end
    txd = 1'b1;
    wait_tclk(b * stop_bits);
  endtask

  task automatic send_frame_bad_stop(input logic [7:0] c);
    @(posedge tclk);
    txd = 1'b0;
    wait_tclk(BIT_TCLK);
    for (int i = 0; i < 8; i++) begin
      txd = c[i];
      wait_tclk(BIT_TCLK);
    end
    txd = 1'b0;      // stop bit missing
    wait_tclk(BIT_TCLK);
  endtask

  task automatic send_glitch(input int width);
    @(posedge tclk);
    txd = 1'b0;
    wait_tclk(width);
    txd = 1'b1;
  endtask

  task automatic idle(input int cycles);
    txd = 1'b1;
    wait_tclk(cycles);
  endtask

  initial begin
    forever begin
      logic [7:0] c;
      realtime    t0;
      bit         ok;
      @(negedge rxd);
      t0 = $realtime;
      wait_tclk(BIT_TCLK / 2);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          wait_tclk(BIT_TCLK);
          c[i] = rxd;
        end
        wait_tclk(BIT_TCLK);
        ok = rxd;
        wait_tclk(BIT_TCLK);
        ok = ok && rxd;
        rx_byte.push_back(c);
        rx_time.push_back(t0);
        rx_stop_ok.push_back(ok);
      end
    end
  end
endmodule
