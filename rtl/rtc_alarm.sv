// rtc_alarm: the RTC's alarm register and comparator. Software stores an alarm time and
// date; when the running time/date becomes equal to it, the alarm interrupt flag is set
// and stays set until software clears it.
//
// How it works: the comparator checks all thirty bits of the time/date word against the
// alarm register. The flag is set on the first cycle of a match (a rising edge of the
// comparison), so that clearing the flag during the matching second does not set it
// again. The flag is only set while the alarm is enabled. A write-one-to-clear from the
// bus clears it; a new match in the same cycle wins.
//
// Interface: clk/rst_n; alarm_wr with alarm_wdata (time/date word) and alarm_en_wdata
// write the alarm register; irq_clr clears the flag; time_i is the running time;
// alarm_o/alarm_en_o read back the register, irq is the flag (the RTC interrupt line).
//
// Timing: irq rises one clock after the time register reaches the alarm value.
//
// Follows the design description: an alarm register of the same time/date fields as
// the time register, a comparator between the two, an interrupt to the processor. Own
// choices: the enable bit, the edge-triggered sticky flag and its clearing by writing 1.
module rtc_alarm
  import soc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      alarm_wr,
  input  rtc_time_t alarm_wdata,
  input  logic      alarm_en_wdata,
  input  logic      irq_clr,
  input  rtc_time_t time_i,
  output rtc_time_t alarm_o,
  output logic      alarm_en_o,
  output logic      irq
);
  rtc_time_t alarm_r;
  logic      en_r, match, match_q, irq_r;

  assign match = (time_i == alarm_r);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      alarm_r <= '0;
      en_r    <= 1'b0;
      match_q <= 1'b0;
      irq_r   <= 1'b0;
    end else begin
      match_q <= match;
      if (alarm_wr) begin
        alarm_r <= alarm_wdata;
        en_r    <= alarm_en_wdata;
      end
      if (en_r && match && !match_q) irq_r <= 1'b1;
      else if (irq_clr)               irq_r <= 1'b0;
    end

  assign alarm_o    = alarm_r;
  assign alarm_en_o = en_r;
  assign irq        = irq_r;

endmodule
