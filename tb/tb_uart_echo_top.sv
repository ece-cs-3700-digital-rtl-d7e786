// tb_uart_echo_top -- end-to-end test of the echo UART at full size.
//
// The whole design runs with its default parameters: a 100 MHz CLOCK divided
// to 76.8 kHz, 9600 baud, 8x oversampling. A terminal model types characters
// on RCV and decodes what comes back on XMT with its own time base. For every
// character the testbench checks that the same byte is echoed, that the echo
// carries two stop bits, that the LED byte D shows it, and that each of the
// two handshake wires HS_REQ and HS_ACK rose exactly once for it. For
// characters sent at the exact rate it also checks the echo latency: the
// echo's start bit must begin 76 to 79 ticks of the 76.8 kHz enable after
// the typed character's start bit, i.e. half a bit after the middle of the
// incoming stop bit, one tick for the sender to see XMT-REQ, and the phase of
// the tick.
//
// Mechanisms exercised and counted (each must happen at least once): echo of
// characters sent with one and with two stop bits; a terminal clock 2 % fast
// and 2 % slow; a low glitch shorter than half a bit, which must not produce
// an echo; a frame with a 0 stop bit, which must be dropped and leave D as it
// was; RESET in the middle of an echo, which must put XMT back to idle
// and clear D; and two characters sent back to back, of which only the first
// is echoed, because the receiver does not watch the line until the echo of
// the first has been sent. The four-phase rules between the two machines are watched by
// the assertions inside the design. A watchdog stops a hang.
module tb_uart_echo_top;
  // Times are in simulation units, taken as 1 ns: CLOCK period 10 (100 MHz).
  localparam real TICK = 1302 * 10.0;        // period of the 76.8 kHz enable
  localparam int  TB   = 1042;               // terminal cycles per bit (10 MHz / 9600)

  logic       CLOCK = 1'b0;
  logic       RESET;
  logic       RCV, XMT;
  logic [7:0] D;
  logic [2:0] RCV_STATE, XMT_STATE;
  logic       HS_REQ, HS_ACK;

  int checks = 0, failures = 0;
  int n_one_stop = 0, n_two_stop = 0, n_fast = 0, n_slow = 0, n_exact = 0;
  int n_glitch = 0, n_ferr = 0, n_reset = 0, n_overrun = 0;
  int n_req = 0, n_ack = 0;

  always #5 CLOCK = ~CLOCK;

  uart_echo_top dut (.CLOCK, .RESET, .RCV, .XMT, .D, .RCV_STATE, .XMT_STATE,
                     .HS_REQ, .HS_ACK);

  t10_terminal_model term (.txd(RCV), .rxd(XMT));

  always @(posedge HS_REQ) n_req++;
  always @(posedge HS_ACK) n_ack++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $realtime, what);
    end
  endtask

  // Types one character and checks its echo.
  task automatic type_char(input logic [7:0] c, input int stop_bits, input int err_ppt);
    int      n0 = term.rx_byte.size();
    int      r0 = n_req, a0 = n_ack;
    bit      got = 0;
    term.idle($urandom_range(TB / 10, 3 * TB));
    fork
      term.send_char(c, stop_bits, err_ppt);
    join_none
    for (int k = 0; k < TB * 25 && term.rx_byte.size() == n0; k++) term.wait_tclk(1);
    got = term.rx_byte.size() > n0;
    check(got, $sformatf("no echo of %02h", c));
    if (got) begin
      real lat = term.rx_time[n0] - term.last_tx_start;
      check(term.rx_byte[n0] == c, $sformatf("typed %02h, echoed %02h", c, term.rx_byte[n0]));
      check(term.rx_stop_ok[n0], $sformatf("echo of %02h lacks two stop bits", c));
      check(D == c, $sformatf("D shows %02h after %02h", D, c));
      if (err_ppt == 0) begin
        check(lat >= 76 * TICK && lat <= 79 * TICK,
              $sformatf("echo of %02h started %0.1f ticks after the typed start bit", c, lat / TICK));
        n_exact++;
      end
    end
    wait (XMT_STATE == 3'd0 && RCV_STATE == 3'd0);
    term.wait_tclk(TB * 2);
    check(n_req == r0 + 1 && n_ack == a0 + 1,
          $sformatf("%02h: %0d REQ and %0d ACK pulses, want 1 each", c, n_req - r0, n_ack - a0));
    if (stop_bits == 1) n_one_stop++; else n_two_stop++;
    if (err_ppt > 0) n_slow++;
    if (err_ppt < 0) n_fast++;
  endtask

  string msg = "Hello, UART! 0123456789 ~{|}";

  initial begin
    RESET = 1'b1;
    repeat (3 * 1302) @(posedge CLOCK);
    RESET = 1'b0;
    repeat (3 * 1302) @(posedge CLOCK);
    check(XMT == 1'b1 && D == 8'h00, "not idle after reset");

    foreach (msg[i]) type_char(msg[i], (i % 3 == 0) ? 1 : 2, 0);
    type_char("a", 2,  20);      // terminal 2 % slow
    type_char("Z", 1, -20);      // terminal 2 % fast
    type_char(8'h0D, 2, -20);    // CR
    type_char(8'h7F, 1,  20);    // DEL

    // two characters back to back: the second arrives while the first is
    // being echoed and is not seen
    begin
      automatic int n0 = term.rx_byte.size();
      automatic int r0 = n_req;
      term.send_char("x", 1, 0);
      term.send_char("y", 1, 0);
      term.idle(TB * 30);
      check(term.rx_byte.size() == n0 + 1 && n_req == r0 + 1,
            $sformatf("back-to-back pair gave %0d echoes, want 1", term.rx_byte.size() - n0));
      if (term.rx_byte.size() > n0) check(term.rx_byte[n0] == "x", "first of a back-to-back pair not echoed");
      check(D == "x", "D does not show the first of a back-to-back pair");
      n_overrun++;
    end

    // noise shorter than half a bit
    begin
      automatic int n0 = term.rx_byte.size();
      automatic int r0 = n_req;
      term.send_glitch(TB / 4);
      term.idle(TB * 25);
      check(term.rx_byte.size() == n0 && n_req == r0, "glitch was echoed");
      n_glitch++;
    end
    type_char("g", 2, 0);

    // frame with a 0 stop bit
    begin
      automatic int n0 = term.rx_byte.size();
      automatic int r0 = n_req;
      automatic logic [7:0] keep = D;
      term.send_frame_bad_stop(8'h55);
      term.idle(TB * 25);
      check(term.rx_byte.size() == n0 && n_req == r0, "frame with a 0 stop bit was echoed");
      check(D == keep, "D changed by a dropped frame");
      n_ferr++;
    end
    type_char("f", 2, 0);

    // reset in the middle of an echo
    fork
      term.send_char("R", 2, 0);
    join_none
    wait (HS_REQ);
    term.wait_tclk(TB * 4);
    check(XMT_STATE != 3'd0, "echo not in progress when reset was applied");
    RESET = 1'b1;
    repeat (4) @(posedge CLOCK);
    #1;
    check(XMT == 1'b1 && D == 8'h00 && !HS_REQ && !HS_ACK, "reset did not clear the design");
    RESET = 1'b0;
    term.idle(TB * 15);
    n_reset++;
    type_char("!", 2, 0);

    check(n_one_stop > 0 && n_two_stop > 0 && n_fast > 0 && n_slow > 0 && n_exact > 0 &&
          n_glitch > 0 && n_ferr > 0 && n_reset > 0 && n_overrun > 0, "a mechanism was never exercised");
    $display("events: exact-rate=%0d one-stop=%0d two-stop=%0d fast=%0d slow=%0d glitch=%0d framing=%0d reset=%0d back-to-back=%0d handshakes=%0d",
             n_exact, n_one_stop, n_two_stop, n_fast, n_slow, n_glitch, n_ferr, n_reset, n_overrun, n_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge CLOCK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
