// tb_uart_sender -- self-checking test of the serial sender.
//
// The sender runs at the default 8x oversampling from a clock enable that the
// testbench pulses every third clock cycle. For each of the 256 byte values
// the testbench raises XMT-REQ with the byte and then, tick by tick, compares
// the XMT line with the frame it builds itself: start bit 0, data bits LSB
// first, two stop bits 1, each held for exactly 8 ticks (88 ticks in all).
// It checks that XMT-ACK stays low while the frame is sent, rises right after
// the second stop bit, stays high as long as XMT-REQ is held (a random number
// of extra ticks), and falls on the first tick after XMT-REQ falls; that the
// line idles at 1 between frames; that the elapsed clock cycles match 88
// ticks; and that a reset in mid-frame returns the line to idle. The
// four-phase rules are also watched by hs4_checker. A watchdog stops a hang.
module tb_uart_sender;
  import uart_pkg::*;

  localparam int unsigned OS   = 8;
  localparam int unsigned TDIV = 3;
  localparam int unsigned FRAME_TICKS = (1 + 8 + 2) * OS;

  logic       clk = 1'b0;
  logic       rst;
  logic       tick;
  logic       req;
  logic [7:0] data;
  logic       ack, xmt;
  tx_state_e  state;
  int         tdiv;
  int         checks = 0, failures = 0;
  longint     cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    tdiv  <= (tdiv == TDIV - 1) ? 0 : tdiv + 1;
  end
  assign tick = (tdiv == 0);

  uart_sender dut (.clk, .rst, .tick, .xmt_req(req), .xmt_data(data),
                   .xmt_ack(ack), .xmt, .state);

  hs4_checker #(.W(8)) u_chk (.clk, .rst, .req, .ack, .data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Returns just after the next clock edge at which the sender sees a tick.
  task automatic wait_tick();
    forever begin
      @(negedge clk);
      if (tick) begin
        @(posedge clk);
        #1;
        break;
      end
    end
  endtask

  function automatic bit frame_bit(input logic [7:0] b, input int idx);
    if (idx == 0) return 1'b0;          // start
    if (idx <= 8) return b[idx - 1];    // data, LSB first
    return 1'b1;                        // two stop bits
  endfunction

  task automatic send_and_check(input logic [7:0] b, input int hold);
    longint c0;
    @(negedge clk);
    data = b;
    req  = 1'b1;
    wait_tick();                                       // tick E0
    c0 = cycle;
    for (int k = 0; k < FRAME_TICKS; k++) begin
      if (k > 0) wait_tick();
      check(xmt == frame_bit(b, k / OS),
            $sformatf("byte %02h tick %0d: XMT=%0b", b, k, xmt));
      check(!ack, $sformatf("byte %02h tick %0d: ACK early", b, k));
    end
    wait_tick();                                       // tick E88
    check(ack, $sformatf("byte %02h: ACK not raised after frame", b));
    check(xmt, $sformatf("byte %02h: XMT not idle after frame", b));
    check(cycle - c0 == FRAME_TICKS * TDIV,
          $sformatf("byte %02h: frame took %0d cycles, want %0d", b, cycle - c0, FRAME_TICKS * TDIV));
    for (int h = 0; h < hold; h++) begin
      wait_tick();
      check(ack && xmt, $sformatf("byte %02h: ACK dropped while REQ high", b));
    end
    @(negedge clk);
    req  = 1'b0;
    data = 8'($urandom);
    wait_tick();
    check(!ack, $sformatf("byte %02h: ACK not lowered after REQ fell", b));
    repeat (3) begin
      wait_tick();
      check(xmt && !ack && state == TX_IDLE, $sformatf("byte %02h: not idle between frames", b));
    end
  endtask

  initial begin
    rst  = 1'b1;
    req  = 1'b0;
    data = '0;
    tdiv = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (2) wait_tick();
    check(xmt && !ack, "line not idle after reset");

    for (int v = 0; v < 256; v++) send_and_check(8'(v), $urandom_range(0, 5));

    // reset in the middle of a frame
    @(negedge clk);
    data = 8'h00;
    req  = 1'b1;
    repeat (20) wait_tick();
    check(!xmt, "mid-frame: expected a 0 data bit on the line");
    @(negedge clk) begin rst = 1'b1; req = 1'b0; end
    repeat (2) @(posedge clk);
    #1 check(xmt && !ack && state == TX_IDLE, "reset did not return the sender to idle");
    @(negedge clk) rst = 1'b0;
    send_and_check(8'h41, 0);   // 'A'

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
