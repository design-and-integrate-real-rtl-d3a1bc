// rtc_calendar: the RTC's counter and time/date register. It counts milliseconds,
// and on every whole second advances seconds, minutes, hours, date, month and year,
// with months of 28, 29, 30 or 31 days and a leap year every fourth year.
//
// How it works: a binary millisecond counter (0 .. MS_PER_SEC-1) advances on each
// ms_tick. When it wraps, the time/date register steps by one second; each field rolls
// over into the next (second 59, minute 59, hour 23, the last day of the month,
// month 12, year 15). A write from the bus (load) replaces the whole time/date word and
// restarts the millisecond count at zero; the load wins over a tick in the same cycle.
//
// Interface: clk/rst_n (bus clock, active-low asynchronous reset); ms_tick from the
// frequency divider; load/load_time from the function controller; time_o and msec_o
// go to the alarm comparator and the read-data register.
//
// Timing: the register updates one clock after the ms_tick that completes a second.
//
// Follows the design description: the fields and their widths (hours 5, minutes 6,
// seconds 6, date 5, month 4, year 4 bits), reset of every field to zero, the leap year
// every four years and the 1 ms counter resolution. Own choices: a year is a 4-bit
// count that wraps at 15, year 0 counts as a leap year, and the out-of-range reset
// values (date 0, month 0) are simply counted on from (month 0 has 31 days and steps to
// month 1).
module rtc_calendar
  import soc_pkg::*;
#(
  parameter int unsigned MS_PER_SEC = 1000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ms_tick,
  input  logic      load,
  input  rtc_time_t load_time,
  output rtc_time_t time_o,
  output logic [9:0] msec_o
);
  if (MS_PER_SEC < 2 || MS_PER_SEC > 1024) begin : g_bad_ms_per_sec
    $error("rtc_calendar: MS_PER_SEC must lie in 2..1024 (10-bit millisecond counter)");
  end

  logic [9:0] ms_r;
  rtc_time_t  t_r, t_next;
  logic       sec_wrap;

  assign sec_wrap = ms_tick && (ms_r == 10'(MS_PER_SEC - 1));

  // next calendar value, one second on
  always_comb begin
    t_next = t_r;
    if (t_r.second >= 6'd59) begin
      t_next.second = '0;
      if (t_r.minute >= 6'd59) begin
        t_next.minute = '0;
        if (t_r.hour >= 5'd23) begin
          t_next.hour = '0;
          if (t_r.date >= days_in_month(t_r.month, t_r.year)) begin
            t_next.date = 5'd1;
            if (t_r.month >= 4'd12) begin
              t_next.month = 4'd1;
              t_next.year  = t_r.year + 1'b1;
            end else begin
              t_next.month = t_r.month + 1'b1;
            end
          end else begin
            t_next.date = t_r.date + 1'b1;
          end
        end else begin
          t_next.hour = t_r.hour + 1'b1;
        end
      end else begin
        t_next.minute = t_r.minute + 1'b1;
      end
    end else begin
      t_next.second = t_r.second + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ms_r     <= '0;
      t_r      <= '0;
    end else begin
      if (load) begin
        ms_r <= '0;
        t_r  <= load_time;
      end else if (ms_tick) begin
        if (sec_wrap) begin
          ms_r     <= '0;
          t_r      <= t_next;
        end else begin
          ms_r <= ms_r + 1'b1;
        end
      end
    end

  assign time_o = t_r;
  assign msec_o = ms_r;

endmodule
