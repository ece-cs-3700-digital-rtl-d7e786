// tb_clock_divider -- self-checking test of the 8 x baud clock-enable divider.
//
// Two instances are tested: one at the default divisor (100 MHz to 76.8 kHz,
// expected 1302 from round(100e6 / 76800)) and one with a divisor of 5. For
// each, the testbench counts clock cycles independently and checks that the
// first tick after reset comes exactly DIVIDE cycles after reset is
// released, that every later tick is exactly DIVIDE cycles after the one
// before, and that a tick is one cycle wide. A reset in mid-count must
// restart the count. A watchdog ends the run if it hangs.
module tb_clock_divider;
  localparam int unsigned EXP_DEFAULT = 1302;   // 100_000_000 / 76_800 = 1302.08
  localparam int unsigned SMALL       = 5;

  logic clk = 1'b0;
  logic rst;
  logic tick_d, tick_s;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider                    dut_d (.clk, .rst, .tick(tick_d));
  clock_divider #(.DIVIDE(SMALL))  dut_s (.clk, .rst, .tick(tick_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Cycle counters since reset release; record tick positions.
  int unsigned cyc;
  int unsigned last_d, last_s, n_d, n_s;
  bit          prev_d, prev_s;

  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0; last_d <= 0; last_s <= 0; n_d <= 0; n_s <= 0;
      prev_d <= 0; prev_s <= 0;
    end else begin
      cyc <= cyc + 1;
      prev_d <= tick_d;
      prev_s <= tick_s;
      if (tick_d) begin
        check(!prev_d, "default divider: tick wider than one cycle");
        check(cyc - last_d == EXP_DEFAULT,
              $sformatf("default divider: tick spacing %0d, want %0d", cyc - last_d, EXP_DEFAULT));
        last_d <= cyc;
        n_d <= n_d + 1;
      end
      if (tick_s) begin
        check(!prev_s, "small divider: tick wider than one cycle");
        check(cyc - last_s == SMALL,
              $sformatf("small divider: tick spacing %0d, want %0d", cyc - last_s, SMALL));
        last_s <= cyc;
        n_s <= n_s + 1;
      end
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // 10 default periods
    repeat (10 * EXP_DEFAULT + 2) @(posedge clk);
    #1;
    check(n_d == 10, $sformatf("default divider: %0d ticks in 10 periods", n_d));
    check(n_s == (10 * EXP_DEFAULT + 2) / SMALL,
          $sformatf("small divider: %0d ticks", n_s));
    // reset in mid-count, then check the first spacing again
    repeat (EXP_DEFAULT / 2) @(posedge clk);
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3 * EXP_DEFAULT + 1) @(posedge clk);
    #1;
    check(n_d == 3, $sformatf("default divider after reset: %0d ticks, want 3", n_d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
