// tb_rtc_freq_divider: checks the RTC frequency divider with DIV = 5, a 37 ns reference
// clock and a 10 ns bus clock. Every interval between two ms_tick pulses must equal
// DIV reference periods within one bus clock, each pulse must be one bus cycle wide, and
// a clear issued right after a tick must postpone the next tick by the synchroniser
// delay plus a whole DIV period.
module tb_rtc_freq_divider;
  localparam int DIV = 5;
  localparam realtime TP = 10ns, TR = 37ns;
  logic pclk = 0, pclk_rtc = 0, presetn = 0, clear = 0, ms_tick;
  int checks = 0, failures = 0;

  always #(TP/2) pclk = ~pclk;
  always #(TR/2) pclk_rtc = ~pclk_rtc;

  rtc_freq_divider #(.DIV(DIV)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime last_tick = 0;
  int n_ticks = 0;
  bit measuring = 0;
  always @(posedge pclk) if (presetn && ms_tick) begin
    if (measuring && n_ticks > 0)
      check((($realtime - last_tick) >= DIV*TR - TP) && (($realtime - last_tick) <= DIV*TR + TP),
            $sformatf("tick interval %0t", $realtime - last_tick));
    n_ticks++;
    last_tick = $realtime;
  end

  // pulse width: never two ticks in consecutive cycles
  logic prev_tick = 0;
  always @(posedge pclk) begin
    if (presetn) check(!(prev_tick && ms_tick), "tick wider than one cycle");
    prev_tick = ms_tick;
  end

  initial begin
    realtime t_clr;
    repeat (3) @(posedge pclk);
    presetn = 1;
    measuring = 1;
    wait (n_ticks == 20);
    measuring = 0;
    // clear right after a tick
    @(posedge pclk iff ms_tick);
    @(negedge pclk); clear = 1; t_clr = $realtime;
    @(negedge pclk); clear = 0;
    @(posedge pclk iff ms_tick);
    check(($realtime - t_clr) >= (DIV + 1) * TR, $sformatf("tick after clear too early: %0t", $realtime - t_clr));
    check(($realtime - t_clr) <= (DIV + 4) * TR + 4 * TP, $sformatf("tick after clear too late: %0t", $realtime - t_clr));
    check(n_ticks >= 21, "tick count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
