// soc_pkg: types and constants shared by the RTC, the TDSP thermal monitor and the
// bus decoders of the microcontroller.
//
// The system memory map (ROM, RAM, the APB peripherals, the GPIO ports) and the packing
// of the RTC time/date word follow the design description. The register offsets inside
// each 4 KB peripheral window, other than the RTC time word at offset 0, are this
// design's own choice.
package soc_pkg;

  // ---------------------------------------------------------------- memory map
  localparam logic [31:0] ROM_BASE       = 32'h0000_0000;  // .. 0x0000_FFFF
  localparam logic [31:0] RAM_BASE       = 32'h2000_0000;  // .. 0x2000_FFFF
  localparam logic [31:0] APB_BASE       = 32'h4000_0000;  // .. 0x4000_FFFF
  localparam logic [31:0] GPIO0_BASE     = 32'h4001_0000;  // .. 0x4001_0FFF
  localparam logic [31:0] GPIO1_BASE     = 32'h4001_1000;  // .. 0x4001_1FFF

  // APB slots: PADDR[15:12] inside the APB window.
  typedef enum logic [3:0] {
    SLOT_TIMER0    = 4'h0,
    SLOT_TIMER1    = 4'h1,
    SLOT_DUALTIMER = 4'h2,
    SLOT_UART0     = 4'h4,
    SLOT_UART1     = 4'h5,
    SLOT_UART2     = 4'h6,
    SLOT_RTC       = 4'h7,
    SLOT_WATCHDOG  = 4'h8,
    SLOT_TDSP      = 4'h9
  } apb_slot_e;

  // Index of each APB slave in the decoder's select/response vectors.
  localparam int unsigned APB_NSLV = 9;
  localparam int unsigned APB_IDX_TIMER0    = 0;
  localparam int unsigned APB_IDX_TIMER1    = 1;
  localparam int unsigned APB_IDX_DUALTIMER = 2;
  localparam int unsigned APB_IDX_UART0     = 3;
  localparam int unsigned APB_IDX_UART1     = 4;
  localparam int unsigned APB_IDX_UART2     = 5;
  localparam int unsigned APB_IDX_RTC       = 6;
  localparam int unsigned APB_IDX_WATCHDOG  = 7;
  localparam int unsigned APB_IDX_TDSP      = 8;

  // AHB slaves, in the order of the AHB decoder's select/response vectors.
  localparam int unsigned AHB_NSLV = 5;
  localparam int unsigned AHB_IDX_ROM   = 0;
  localparam int unsigned AHB_IDX_RAM   = 1;
  localparam int unsigned AHB_IDX_APB   = 2;
  localparam int unsigned AHB_IDX_GPIO0 = 3;
  localparam int unsigned AHB_IDX_GPIO1 = 4;

  // ---------------------------------------------------------------- RTC
  // Time/date word, bits [29:0] of the RTC time register (and of the alarm register):
  //   [29:25] hours  [24:19] minutes  [18:13] seconds  [12:8] date  [7:4] month  [3:0] year
  typedef struct packed {
    logic [4:0] hour;
    logic [5:0] minute;
    logic [5:0] second;
    logic [4:0] date;
    logic [3:0] month;
    logic [3:0] year;
  } rtc_time_t;

  localparam logic [11:0] RTC_OFS_TIME   = 12'h000;  // RW  time and date
  localparam logic [11:0] RTC_OFS_ALARM  = 12'h004;  // RW  alarm time/date, bit 30 alarm enable
  localparam logic [11:0] RTC_OFS_STATUS = 12'h008;  // R/W1C bit 0 alarm interrupt flag
  localparam logic [11:0] RTC_OFS_MSEC   = 12'h00C;  // RO  millisecond counter

  // Days in a month; any month outside 1..12 (such as the reset value 0) counts 31 days.
  // Every fourth year (year % 4 == 0) is a leap year.
  function automatic logic [4:0] days_in_month(logic [3:0] month, logic [3:0] year);
    unique case (month)
      4'd2:                      days_in_month = (year[1:0] == 2'b00) ? 5'd29 : 5'd28;
      4'd4, 4'd6, 4'd9, 4'd11:   days_in_month = 5'd30;
      default:                   days_in_month = 5'd31;
    endcase
  endfunction

  // ---------------------------------------------------------------- TDSP
  localparam logic [11:0] TDSP_OFS_CTRL   = 12'h000;  // RW  bit 0 monitor enable, bit 1 IRQ enable
  localparam logic [11:0] TDSP_OFS_THRESH = 12'h004;  // RW  threshold
  localparam logic [11:0] TDSP_OFS_STATUS = 12'h008;  // R/W1C bit 1 over-temperature interrupt
  localparam logic [11:0] TDSP_OFS_ADC    = 12'h00C;  // RO  latest ADC sample

endpackage
