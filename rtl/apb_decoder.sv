// apb_decoder: the APB side of the system's memory map. The AHB-to-APB bridge drives a
// single APB master port over the 64 KB window at 0x4000_0000; this block steers each
// transfer to one of nine peripherals by address and returns that peripheral's read
// data and ready.
//
// How it works: PADDR[15:12] selects a 4 KB slot. Timer0 0x0, Timer1 0x1, Dualtimer 0x2,
// UART0 0x4, UART1 0x5, UART2 0x6, RTC 0x7, Watchdog 0x8, TDSP 0x9. The matching slave's
// PSEL follows the master's PSEL; PRDATA and PREADY are multiplexed back from it. A
// transfer to an unused slot (0x3, 0xA .. 0xF) completes at once and reads zero.
//
// Interface: the master side (PSEL, PADDR) in, PRDATA/PREADY out; per slave a PSEL out
// and a PRDATA/PREADY in, indexed as in soc_pkg (APB_IDX_*). PENABLE, PWRITE, PWDATA and
// PADDR go to all slaves unchanged and do not pass through here.
//
// Timing: purely combinational.
//
// Follows the design description: the peripherals and their base and end addresses.
// Own choice: the behaviour of the unused slots.
module apb_decoder
  import soc_pkg::*;
(
  input  logic        PSEL,
  input  logic [15:0] PADDR,
  output logic [31:0] PRDATA,
  output logic        PREADY,
  output logic [APB_NSLV-1:0] psel_s,
  input  logic [31:0] prdata_s [APB_NSLV],
  input  logic [APB_NSLV-1:0] pready_s
);
  logic [APB_NSLV-1:0] hit;

  always_comb begin
    hit = '0;
    unique case (PADDR[15:12])
      SLOT_TIMER0:    hit[APB_IDX_TIMER0]    = 1'b1;
      SLOT_TIMER1:    hit[APB_IDX_TIMER1]    = 1'b1;
      SLOT_DUALTIMER: hit[APB_IDX_DUALTIMER] = 1'b1;
      SLOT_UART0:     hit[APB_IDX_UART0]     = 1'b1;
      SLOT_UART1:     hit[APB_IDX_UART1]     = 1'b1;
      SLOT_UART2:     hit[APB_IDX_UART2]     = 1'b1;
      SLOT_RTC:       hit[APB_IDX_RTC]       = 1'b1;
      SLOT_WATCHDOG:  hit[APB_IDX_WATCHDOG]  = 1'b1;
      SLOT_TDSP:      hit[APB_IDX_TDSP]      = 1'b1;
      default:        hit = '0;
    endcase
  end

  assign psel_s = PSEL ? hit : '0;

  always_comb begin
    PRDATA = '0;
    PREADY = 1'b1;
    for (int i = 0; i < APB_NSLV; i++)
      if (hit[i]) begin
        PRDATA = prdata_s[i];
        PREADY = pready_s[i];
      end
  end

endmodule
