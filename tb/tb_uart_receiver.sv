// tb_uart_receiver -- self-checking test of the serial receiver.
//
// The receiver runs at the default 8x oversampling from a clock enable that
// the testbench pulses every 25th clock cycle, so one nominal bit time is
// 200 cycles. A terminal model in the testbench sends frames (start bit,
// eight data bits LSB first, one or two stop bits) with a random idle gap
// n0 each, so the start edge falls at any phase of the tick, and with a
// bit time that is either nominal or off by up to +/-2 %, and a few frames
// near the limits of mid-bit sampling, 3 % fast and 5 % slow (the terminal's
// clock is not ours). A consumer model answers RCV-REQ with RCV-ACK after a
// random delay and drops it after RCV-REQ falls.
//
// Checked: every byte value arrives intact; RCV-REQ rises in the middle of the
// stop bit (between 76 and 77 ticks after the start edge, plus the two-flop
// synchroniser, for nominal-rate frames); RCV-REQ falls after RCV-ACK rises;
// RCV-Data is unchanged while RCV-REQ is high; a low glitch shorter than half
// a bit is ignored; a frame whose stop bit is 0 is dropped and leaves RCV-Data
// as it was, and the next good frame is received; a reset in mid-frame
// returns the receiver to idle. Each such event is counted and must occur.
// The four-phase rules are also watched by hs4_checker. A watchdog stops a
// hang.
module tb_uart_receiver;
  import uart_pkg::*;

  localparam int OS   = 8;
  localparam int TDIV = 25;
  localparam int BIT  = OS * TDIV;   // nominal bit time in clock cycles

  logic       clk = 1'b0;
  logic       rst;
  logic       tick;
  logic       rcv;
  logic       req, ack;
  logic [7:0] data;
  rx_state_e  state;
  int         tdiv;
  int         checks = 0, failures = 0;
  longint     cycle = 0;

  int n_good = 0, n_mismatch = 0, n_glitch = 0, n_ferr = 0, n_reset = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    tdiv  <= (tdiv == TDIV - 1) ? 0 : tdiv + 1;
  end
  assign tick = (tdiv == 0);

  uart_receiver dut (.clk, .rst, .tick, .rcv, .rcv_req(req), .rcv_ack(ack),
                     .rcv_data(data), .state);

  hs4_checker #(.W(8)) u_chk (.clk, .rst, .req, .ack, .data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- consumer: four-phase acknowledge ----------------
  int     n_req = 0;          // number of RCV-REQ rising edges seen
  longint req_cycle;          // cycle of the last rising edge
  logic [7:0] req_data;
  event   hs_done;
  bit     prev_req = 0;

  always @(posedge clk) begin
    if (rst) prev_req <= 0;
    else begin
      prev_req <= req;
      if (req && !prev_req) begin
        n_req     <= n_req + 1;
        req_cycle <= cycle;
        req_data  <= data;
      end
    end
  end

  initial begin
    ack = 1'b0;
    forever begin
      @(posedge clk iff (req && !rst));
      repeat ($urandom_range(0, 5 * TDIV)) @(posedge clk);
      @(negedge clk) ack = 1'b1;
      @(posedge clk iff !req);
      repeat ($urandom_range(0, 5 * TDIV)) @(posedge clk);
      @(negedge clk) ack = 1'b0;
      repeat (2 * TDIV) @(posedge clk);   // receiver back in idle
      -> hs_done;
    end
  end

  // ---------------- terminal: serial frames ----------------
  longint start_cycle;

  task automatic line_for(input logic v, input int cycles);
    rcv = v;
    repeat (cycles) @(negedge clk);
  endtask

  // Sends one frame; bit_cycles may differ from BIT to model a clock mismatch.
  task automatic send_frame(input logic [7:0] b, input int bit_cycles, input logic stop);
    @(negedge clk);
    start_cycle = cycle;
    line_for(1'b0, bit_cycles);
    for (int i = 0; i < 8; i++) line_for(b[i], bit_cycles);
    line_for(stop, bit_cycles);
    rcv = 1'b1;
  endtask

  task automatic good_frame(input logic [7:0] b, input int bit_cycles);
    int n0 = n_req;
    line_for(1'b1, $urandom_range(1, 3 * BIT));       // random phase
    fork
      send_frame(b, bit_cycles, 1'b1);
      @hs_done;
    join
    check(n_req == n0 + 1, $sformatf("byte %02h: %0d requests, want 1", b, n_req - n0));
    check(req_data == b, $sformatf("byte %02h: received %02h (bit time %0d)", b, req_data, bit_cycles));
    if (bit_cycles == BIT) begin
      // start edge seen at most TDIV + 2 cycles late; stop sampled 76 ticks later
      longint lat = req_cycle - start_cycle;
      check(lat >= 76 * TDIV && lat <= 77 * TDIV + 4,
            $sformatf("byte %02h: RCV-REQ %0d cycles after start edge", b, lat));
      n_good++;
    end else begin
      n_mismatch++;
    end
  endtask

  initial begin
    rst  = 1'b1;
    rcv  = 1'b1;
    tdiv = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3 * TDIV) @(posedge clk);
    check(!req && data == 8'h00 && state == RX_IDLE, "not idle after reset");

    // every byte value at the nominal rate
    for (int v = 0; v < 256; v++) good_frame(8'(v), BIT);

    // terminal clock up to 2 % fast or slow
    for (int k = 0; k < 40; k++) begin
      automatic int pct10 = (k % 2 == 0) ? -20 + (k % 5) : 20 - (k % 5);   // tenths of a percent
      good_frame(8'($urandom), BIT + (BIT * pct10) / 1000);
    end

    // near the limits of the mid-bit sampling: terminal 3 % fast, 5 % slow
    for (int k = 0; k < 8; k++)
      good_frame(8'($urandom), (k % 2 == 0) ? BIT - (BIT * 30) / 1000 : BIT + (BIT * 50) / 1000);

    // a glitch shorter than half a bit is not a start bit
    begin
      automatic int n0 = n_req;
      line_for(1'b1, BIT);
      line_for(1'b0, 2 * TDIV);
      line_for(1'b1, 12 * BIT);
      check(n_req == n0 && state == RX_IDLE, "glitch taken as a start bit");
      n_glitch++;
    end
    good_frame(8'h5A, BIT);

    // framing error: stop bit 0 drops the byte and keeps RCV-Data
    begin
      automatic int n0 = n_req;
      automatic logic [7:0] keep = data;
      line_for(1'b1, BIT);
      send_frame(8'hC3, BIT, 1'b0);
      line_for(1'b0, 3 * BIT);          // line held low (break)
      check(state == RX_BREAK, "receiver not waiting for the line after a 0 stop bit");
      line_for(1'b1, 2 * BIT);
      check(n_req == n0, "byte with a 0 stop bit was offered");
      check(data == keep, "RCV-Data changed by a dropped byte");
      check(state == RX_IDLE, "receiver not idle after line returned to 1");
      n_ferr++;
    end
    good_frame(8'h33, BIT);

    // reset in the middle of a frame
    begin
      automatic int n0 = n_req;
      line_for(1'b1, BIT);
      fork
        send_frame(8'hFF, BIT, 1'b1);   // line stays 1 after the reset
        begin
          repeat (4 * BIT) @(negedge clk);
          rst = 1'b1;
          repeat (3) @(negedge clk);
          check(state == RX_IDLE && !req && data == 8'h00, "reset did not clear the receiver");
          rst = 1'b0;
        end
      join
      line_for(1'b1, 2 * BIT);
      check(n_req == n0, "a frame cut by reset was offered");
      n_reset++;
    end
    good_frame(8'h7E, BIT);

    check(n_good > 0 && n_mismatch > 0 && n_glitch > 0 && n_ferr > 0 && n_reset > 0,
          "a mechanism was never exercised");
    $display("events: nominal=%0d mismatched=%0d glitch=%0d framing=%0d reset=%0d",
             n_good, n_mismatch, n_glitch, n_ferr, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
