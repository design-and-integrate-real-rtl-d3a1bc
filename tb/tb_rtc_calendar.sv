// tb_rtc_calendar: checks the RTC counter and time/date register with MS_PER_SEC = 4.
// A reference calendar written independently here (a table of month lengths, year % 4
// leap rule) predicts every step. Directed cases cover each roll-over (second, minute,
// hour, end of 30- and 31-day months, 28 February in a common year, 28 and 29 February
// in a leap year, new year, year 15 to 0, counting on from the all-zero reset value);
// then random start values are stepped and compared. The millisecond counter, the
// seconds rate (one step per MS_PER_SEC ticks) and the restart of the millisecond on a
// load are checked too.
module tb_rtc_calendar;
  import soc_pkg::*;
  localparam int MSPS = 4;
  logic clk = 0, rst_n = 0, ms_tick = 0, load = 0;
  rtc_time_t load_time = '0, time_o;
  logic [9:0] msec_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rtc_calendar #(.MS_PER_SEC(MSPS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  function automatic rtc_time_t ref_next(rtc_time_t t);
    int mdays [13] = '{31, 31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};
    int s = t.second, mi = t.minute, h = t.hour, d = t.date, mo = t.month, y = t.year;
    int dim;
    dim = (mo >= 1 && mo <= 12) ? mdays[mo] : 31;
    if (mo == 2 && (y % 4) == 0) dim = 29;
    s++;
    if (s >= 60) begin s = 0; mi++; end
    if (mi >= 60) begin mi = 0; h++; end
    if (h >= 24) begin h = 0; d++; end
    if (d > dim) begin d = 1; mo++; end
    if (mo > 12) begin mo = 1; y = (y + 1) % 16; end
    ref_next = '{hour: 5'(h), minute: 6'(mi), second: 6'(s), date: 5'(d), month: 4'(mo), year: 4'(y)};
  endfunction

  function automatic rtc_time_t mk(int h, int mi, int s, int d, int mo, int y);
    mk = '{hour: 5'(h), minute: 6'(mi), second: 6'(s), date: 5'(d), month: 4'(mo), year: 4'(y)};
  endfunction

  task automatic do_load(rtc_time_t t);
    @(negedge clk); load = 1; load_time = t;
    @(negedge clk); load = 0;
    check(time_o == t, "load");
    check(msec_o == 0, "msec after load");
  endtask

  // one second: MSPS ticks, with idle cycles between them
  task automatic one_second(rtc_time_t expect_t);
    for (int k = 0; k < MSPS; k++) begin
      @(negedge clk); ms_tick = 1;
      @(negedge clk); ms_tick = 0;
      if (k < MSPS - 1) begin
        check(msec_o == 10'(k + 1), $sformatf("msec %0d", msec_o));
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(time_o == expect_t, $sformatf("step: got %p expected %p", time_o, expect_t));
    check(msec_o == 0, "msec wrap");
  endtask

  task automatic step_from(rtc_time_t t);
    do_load(t);
    one_second(ref_next(t));
  endtask

  initial begin
    rtc_time_t t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(time_o == '0 && msec_o == 0, "reset value");
    // counting on from reset value zero
    one_second(mk(0, 0, 1, 0, 0, 0));
    step_from(mk(23, 59, 59, 0, 0, 0));     // date 0 -> 1
    step_from(mk(23, 59, 59, 31, 0, 0));    // month 0 -> 1
    step_from(mk(8, 18, 52, 22, 7, 0));     // plain second
    step_from(mk(8, 18, 59, 22, 7, 0));     // minute
    step_from(mk(8, 59, 59, 22, 7, 0));     // hour
    step_from(mk(23, 59, 59, 21, 6, 1));    // day
    step_from(mk(23, 59, 59, 30, 6, 1));    // 30-day month end
    step_from(mk(23, 59, 59, 30, 7, 1));    // 31-day month, not yet end
    step_from(mk(23, 59, 59, 31, 7, 1));    // 31-day month end
    step_from(mk(23, 59, 59, 28, 2, 1));    // Feb common year -> Mar 1
    step_from(mk(23, 59, 59, 28, 2, 4));    // Feb leap year -> 29
    step_from(mk(23, 59, 59, 29, 2, 4));    // Feb 29 -> Mar 1
    step_from(mk(23, 59, 59, 31, 12, 3));   // new year
    step_from(mk(23, 59, 59, 31, 12, 15));  // year wraps
    // several seconds in a row
    t = mk(23, 59, 58, 28, 2, 8);
    do_load(t);
    for (int i = 0; i < 5; i++) begin t = ref_next(t); one_second(t); end
    // random legal values
    for (int i = 0; i < 300; i++) begin
      int mo, y, dmax, d;
      mo = $urandom_range(1, 12);
      y = $urandom_range(0, 15);
      dmax = (mo == 2) ? ((y % 4 == 0) ? 29 : 28) : ((mo == 4 || mo == 6 || mo == 9 || mo == 11) ? 30 : 31);
      d = ($urandom_range(0, 1) == 1) ? dmax : $urandom_range(1, dmax);
      step_from(mk($urandom_range(20, 23), $urandom_range(57, 59), $urandom_range(57, 59), d, mo, y));
    end
    // a load in the middle of a second restarts the millisecond count
    do_load(mk(1, 2, 3, 4, 5, 6));
    @(negedge clk); ms_tick = 1; @(negedge clk); ms_tick = 0;
    check(msec_o == 1, "one ms");
    do_load(mk(1, 2, 3, 4, 5, 6));
    one_second(mk(1, 2, 4, 4, 5, 6));
    // load wins over a simultaneous tick
    @(negedge clk); load = 1; ms_tick = 1; load_time = mk(9, 9, 9, 9, 9, 9);
    @(negedge clk); load = 0; ms_tick = 0;
    check(time_o == mk(9, 9, 9, 9, 9, 9) && msec_o == 0, "load over tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
