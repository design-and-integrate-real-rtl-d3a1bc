// rtc_apb: real time clock peripheral on the APB bus. It keeps the time of day and the
// calendar date to millisecond resolution, lets software set the time and an alarm,
// and raises IRQ_RTC when the alarm time is reached.
//
// Structure: a bus interface and function controller decode APB writes into the time
// register, the alarm register and the interrupt status; the frequency divider turns
// PCLK_RTC into a millisecond tick; the counter/calendar (rtc_calendar) holds the
// time/date register; the alarm module (rtc_alarm) compares it with the alarm register;
// the out-data stage concatenates the fields of the addressed register into a
// registered PRDATA.
//
// Registers (offset in the 4 KB window, PADDR[11:0]):
//   0x000 TIME    RW  [29:25] hours [24:19] minutes [18:13] seconds [12:8] date
//                     [7:4] month [3:0] year; bits 31:30 are not stored and read 0.
//                     A write sets the time and restarts the current millisecond.
//   0x004 ALARM   RW  same fields as TIME; bit 30 enables the alarm.
//   0x008 STATUS  R/W1C bit 0: alarm interrupt flag (drives IRQ_RTC); write 1 to clear.
//   0x00C MSEC    RO  [9:0] milliseconds into the current second.
//   other offsets read 0, writes are ignored.
//
// Timing (all in the PCLK_APB domain): zero wait states. PREADY is asserted in the
// access phase (PSEL and PENABLE high). PRDATA is a register that loads the addressed value on every PCLK_APB edge, so it
// holds the value selected by PADDR in the setup phase during the access phase. Writes
// take effect at the end of the access phase.
//
// Follows the design description: the split into bus interface, frequency divider,
// counter, time/date register, alarm register and comparator, function controller and
// a registered PRDATA built by concatenating data bits (its block diagram); the two
// clocks PCLK_APB and PCLK_RTC; the bit packing of the time/date word and bits 31:30
// reading back as zero (its waveform writes 0x5096_9670 and reads back 0x1096_9670 as
// 08:18:52, date 22, month 7, year 0). Own choices: the offsets of the ALARM, STATUS and
// MSEC registers, the alarm enable bit, write-one-to-clear, and PREADY in the access
// phase.
module rtc_apb
  import soc_pkg::*;
#(
  parameter int unsigned DIV        = 1000,  // PCLK_RTC cycles per millisecond
  parameter int unsigned MS_PER_SEC = 1000   // milliseconds per second
) (
  input  logic        PCLK_APB,
  input  logic        PCLK_RTC,
  input  logic        PRESETn,
  input  logic        PSEL,
  input  logic        PENABLE,
  input  logic        PWRITE,
  input  logic [11:0] PADDR,
  input  logic [31:0] PWDATA,
  output logic [31:0] PRDATA,
  output logic        PREADY,
  output logic        IRQ_RTC
);
  // ------------------------------------------------ function controller
  logic wr_en, wr_time, wr_alarm, wr_status;
  assign wr_en     = PSEL && PENABLE && PWRITE;
  assign wr_time   = wr_en && (PADDR == RTC_OFS_TIME);
  assign wr_alarm  = wr_en && (PADDR == RTC_OFS_ALARM);
  assign wr_status = wr_en && (PADDR == RTC_OFS_STATUS);

  // ------------------------------------------------ frequency divider
  logic ms_tick;
  rtc_freq_divider #(.DIV(DIV)) u_div (
    .pclk_rtc (PCLK_RTC),
    .pclk     (PCLK_APB),
    .presetn  (PRESETn),
    .clear    (wr_time),
    .ms_tick  (ms_tick)
  );

  // ------------------------------------------------ counter and time/date register
  rtc_time_t  cur_time;
  logic [9:0] msec;
  rtc_calendar #(.MS_PER_SEC(MS_PER_SEC)) u_cal (
    .clk       (PCLK_APB),
    .rst_n     (PRESETn),
    .ms_tick   (ms_tick),
    .load      (wr_time),
    .load_time (rtc_time_t'(PWDATA[29:0])),
    .time_o    (cur_time),
    .msec_o    (msec)
  );

  // ------------------------------------------------ alarm register and comparator
  rtc_time_t alarm_time;
  logic      alarm_en, irq;
  rtc_alarm u_alarm (
    .clk            (PCLK_APB),
    .rst_n          (PRESETn),
    .alarm_wr       (wr_alarm),
    .alarm_wdata    (rtc_time_t'(PWDATA[29:0])),
    .alarm_en_wdata (PWDATA[30]),
    .irq_clr        (wr_status && PWDATA[0]),
    .time_i         (cur_time),
    .alarm_o        (alarm_time),
    .alarm_en_o     (alarm_en),
    .irq            (irq)
  );
  assign IRQ_RTC = irq;

  // ------------------------------------------------ out-data: concatenation and PRDATA
  logic [31:0] rdata_mux;
  always_comb begin
    unique case (PADDR)
      RTC_OFS_TIME:   rdata_mux = {2'b00, cur_time};
      RTC_OFS_ALARM:  rdata_mux = {1'b0, alarm_en, alarm_time};
      RTC_OFS_STATUS: rdata_mux = {31'd0, irq};
      RTC_OFS_MSEC:   rdata_mux = {22'd0, msec};
      default:        rdata_mux = '0;
    endcase
  end

  always_ff @(posedge PCLK_APB or negedge PRESETn)
    if (!PRESETn) PRDATA <= '0;
    else          PRDATA <= rdata_mux;

  assign PREADY = PSEL && PENABLE;

  // ------------------------------------------------ bus rules
  // PENABLE is shared by all slaves of the bus, so it may be high while this slave is
  // not selected; an access phase of this slave must follow its setup phase.
  a_setup_before_access: assert property (@(posedge PCLK_APB) disable iff (!PRESETn)
    (PSEL && PENABLE) |-> $past(PSEL && !PENABLE));
  a_addr_stable: assert property (@(posedge PCLK_APB) disable iff (!PRESETn)
    (PSEL && !PENABLE) |=> (PENABLE && $stable(PADDR) && $stable(PWRITE)));

endmodule
