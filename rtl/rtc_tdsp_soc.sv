// rtc_tdsp_soc: the microcontroller's custom part. A Cortex-M0 class system with ROM,
// RAM, GPIO, timers, UARTs and a watchdog on AHB and APB is extended with two
// peripherals, a real time clock (RTC) with calendar and alarm and a temperature monitor
// (TDSP) that interrupts when an on-chip temperature sensor's ADC code rises above a
// programmed threshold. This module holds the two peripherals and the address decoding
// of the system memory map that places them.
//
// Structure: ahb_decoder decodes processor addresses into ROM, RAM, the AHB-to-APB
// bridge and GPIO0/1. The bridge's APB master port enters here; apb_decoder selects among
// the nine APB slaves; rtc_apb sits at 0x4000_7000 and tdsp_apb at 0x4000_9000. The
// processor, memories, bridge, GPIO, timers, UARTs and watchdog are standard parts of
// the surrounding system and are connected through the ports of this module.
//
// Interface:
//   AHB:  HCLK, HRESETn, HADDR, HTRANS, HREADY from the processor; hsel_s to the AHB
//         slaves (index AHB_IDX_* in soc_pkg), their responses in, HRDATA/HREADY_OUT/
//         HRESP back to the processor.
//   APB:  PCLK, PRESETn, PSEL (the bridge's select for the whole APB window), PENABLE,
//         PWRITE, PADDR[15:0], PWDATA from the bridge, PRDATA/PREADY back to it.
//   External APB slaves, array index 0..6 = Timer0, Timer1, Dualtimer, UART0, UART1,
//         UART2, Watchdog: ext_psel out, ext_prdata/ext_pready in.
//   PCLK_RTC: the RTC reference clock. INPUTADC: the temperature ADC code.
//   IRQ_RTC, IRQ_TDSP: interrupts to the processor.
//
// Follows the design description: the memory map and the peripheral set; the RTC's two
// clocks; the 2-bit ADC input. Own choices: a separate IRQ_TDSP line next to the
// status bit, and the parameter defaults noted in each peripheral.
module rtc_tdsp_soc
  import soc_pkg::*;
#(
  parameter int unsigned RTC_DIV        = 1000,  // PCLK_RTC cycles per millisecond
  parameter int unsigned RTC_MS_PER_SEC = 1000,
  parameter int unsigned ADC_W          = 2
) (
  // AHB
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HREADY,
  output logic [AHB_NSLV-1:0] hsel_s,
  input  logic [31:0] hrdata_s [AHB_NSLV],
  input  logic [AHB_NSLV-1:0] hreadyout_s,
  input  logic [AHB_NSLV-1:0] hresp_s,
  output logic [31:0] HRDATA,
  output logic        HREADY_OUT,
  output logic        HRESP,
  // APB from the bridge
  input  logic        PCLK,
  input  logic        PRESETn,
  input  logic        PSEL,
  input  logic        PENABLE,
  input  logic        PWRITE,
  input  logic [15:0] PADDR,
  input  logic [31:0] PWDATA,
  output logic [31:0] PRDATA,
  output logic        PREADY,
  // other APB slaves
  output logic [6:0]  ext_psel,
  input  logic [31:0] ext_prdata [7],
  input  logic [6:0]  ext_pready,
  // RTC and TDSP
  input  logic             PCLK_RTC,
  input  logic [ADC_W-1:0] INPUTADC,
  output logic             IRQ_RTC,
  output logic             IRQ_TDSP
);
  // ------------------------------------------------ AHB
  ahb_decoder u_ahb_dec (
    .HCLK, .HRESETn, .HADDR, .HTRANS, .HREADY,
    .hsel_s, .hrdata_s, .hreadyout_s, .hresp_s,
    .HRDATA, .HREADY_OUT, .HRESP
  );

  // ------------------------------------------------ APB
  localparam int unsigned EXT_IDX [7] = '{APB_IDX_TIMER0, APB_IDX_TIMER1, APB_IDX_DUALTIMER,
                                          APB_IDX_UART0, APB_IDX_UART1, APB_IDX_UART2,
                                          APB_IDX_WATCHDOG};

  logic [APB_NSLV-1:0] psel_s, pready_s;
  logic [31:0]         prdata_s [APB_NSLV];

  apb_decoder u_apb_dec (
    .PSEL, .PADDR, .PRDATA, .PREADY,
    .psel_s, .prdata_s, .pready_s
  );

  always_comb
    for (int i = 0; i < 7; i++) ext_psel[i] = psel_s[EXT_IDX[i]];

  for (genvar i = 0; i < 7; i++) begin : g_ext
    assign prdata_s[EXT_IDX[i]] = ext_prdata[i];
    assign pready_s[EXT_IDX[i]] = ext_pready[i];
  end

  rtc_apb #(.DIV(RTC_DIV), .MS_PER_SEC(RTC_MS_PER_SEC)) u_rtc (
    .PCLK_APB (PCLK),
    .PCLK_RTC (PCLK_RTC),
    .PRESETn  (PRESETn),
    .PSEL     (psel_s[APB_IDX_RTC]),
    .PENABLE  (PENABLE),
    .PWRITE   (PWRITE),
    .PADDR    (PADDR[11:0]),
    .PWDATA   (PWDATA),
    .PRDATA   (prdata_s[APB_IDX_RTC]),
    .PREADY   (pready_s[APB_IDX_RTC]),
    .IRQ_RTC  (IRQ_RTC)
  );

  tdsp_apb #(.ADC_W(ADC_W)) u_tdsp (
    .PCLK     (PCLK),
    .PRESETn  (PRESETn),
    .PSEL     (psel_s[APB_IDX_TDSP]),
    .PENABLE  (PENABLE),
    .PWRITE   (PWRITE),
    .PADDR    (PADDR[11:0]),
    .PWDATA   (PWDATA),
    .PRDATA   (prdata_s[APB_IDX_TDSP]),
    .PREADY   (pready_s[APB_IDX_TDSP]),
    .INPUTADC (INPUTADC),
    .IRQ_TDSP (IRQ_TDSP)
  );

endmodule
