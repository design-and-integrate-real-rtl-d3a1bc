// tdsp_apb: temperature digital signal processing (TDSP) peripheral on the APB bus, a
// dynamic thermal monitor. It samples the code of an on-chip temperature sensor's ADC,
// compares it with a threshold set by software, and reports an over-temperature
// interrupt in its status register (read through PRDATA) and on IRQ_TDSP.
//
// Structure: the interface register brings the asynchronous ADC code into the PCLK
// domain; the programmable watchdog unit (tdsp_watchdog) holds the threshold and
// compares; the interrupt generator (tdsp_irq_gen) latches the event; the function
// controller decodes APB accesses and drives PREADY; the read data leave through a
// PRDATA register.
//
// Registers (offset in the 4 KB window, PADDR[11:0]):
//   0x000 CTRL    RW  bit 0 monitor enable, bit 1 interrupt line enable (reset 0)
//   0x004 THRESH  RW  [ADC_W-1:0] threshold (reset: all ones)
//   0x008 STATUS  R/W1C bit 1 over-temperature interrupt; write 1 to bit 1 to clear.
//                 Reads 2'b10 when the interrupt has occurred.
//   0x00C ADC     RO  [ADC_W-1:0] latest synchronised ADC code
//   other offsets read 0, writes are ignored.
//
// Timing: zero wait states, PREADY asserted in the access phase. PRDATA loads the value
// addressed by PADDR on every PCLK edge. From an ADC change to the status flag: two
// clocks of synchroniser, one of comparison, one of flag, four in all.
//
// Follows the design description: the blocks above, a 2-bit ADC input, the threshold
// compare (ADC higher than threshold) and the status value 2'b10 read on an interrupt
// when the ADC reads 2'b11. Own choices: the register offsets, the enables, the
// synchroniser, the reset threshold and the separate interrupt line.
module tdsp_apb
  import soc_pkg::*;
#(
  parameter int unsigned ADC_W = 2
) (
  input  logic             PCLK,
  input  logic             PRESETn,
  input  logic             PSEL,
  input  logic             PENABLE,
  input  logic             PWRITE,
  input  logic [11:0]      PADDR,
  input  logic [31:0]      PWDATA,
  output logic [31:0]      PRDATA,
  output logic             PREADY,
  input  logic [ADC_W-1:0] INPUTADC,
  output logic             IRQ_TDSP
);
  // ------------------------------------------------ interface register
  logic [ADC_W-1:0] adc_meta_r, adc_r;
  always_ff @(posedge PCLK or negedge PRESETn)
    if (!PRESETn) begin
      adc_meta_r <= '0;
      adc_r      <= '0;
    end else begin
      adc_meta_r <= INPUTADC;
      adc_r      <= adc_meta_r;
    end

  // ------------------------------------------------ function controller
  logic wr_en;
  logic mon_en_r, irq_en_r;
  assign wr_en = PSEL && PENABLE && PWRITE;

  always_ff @(posedge PCLK or negedge PRESETn)
    if (!PRESETn) begin
      mon_en_r <= 1'b0;
      irq_en_r <= 1'b0;
    end else if (wr_en && PADDR == TDSP_OFS_CTRL) begin
      mon_en_r <= PWDATA[0];
      irq_en_r <= PWDATA[1];
    end

  assign PREADY = PSEL && PENABLE;

  // ------------------------------------------------ programmable watchdog unit
  logic [ADC_W-1:0] thresh;
  logic             over;
  tdsp_watchdog #(.ADC_W(ADC_W)) u_wdog (
    .clk          (PCLK),
    .rst_n        (PRESETn),
    .thresh_wr    (wr_en && PADDR == TDSP_OFS_THRESH),
    .thresh_wdata (PWDATA[ADC_W-1:0]),
    .enable       (mon_en_r),
    .adc          (adc_r),
    .thresh_o     (thresh),
    .over         (over)
  );

  // ------------------------------------------------ interrupt generator
  logic flag;
  tdsp_irq_gen u_irq (
    .clk    (PCLK),
    .rst_n  (PRESETn),
    .over   (over),
    .clr    (wr_en && PADDR == TDSP_OFS_STATUS && PWDATA[1]),
    .irq_en (irq_en_r),
    .flag   (flag),
    .irq    (IRQ_TDSP)
  );

  // ------------------------------------------------ read data
  logic [31:0] rdata_mux;
  always_comb begin
    unique case (PADDR)
      TDSP_OFS_CTRL:   rdata_mux = {30'd0, irq_en_r, mon_en_r};
      TDSP_OFS_THRESH: rdata_mux = 32'(thresh);
      TDSP_OFS_STATUS: rdata_mux = {30'd0, flag, 1'b0};
      TDSP_OFS_ADC:    rdata_mux = 32'(adc_r);
      default:         rdata_mux = '0;
    endcase
  end

  always_ff @(posedge PCLK or negedge PRESETn)
    if (!PRESETn) PRDATA <= '0;
    else          PRDATA <= rdata_mux;

  // PENABLE is shared by all slaves of the bus, so it may be high while this slave is
  // not selected; an access phase of this slave must follow its setup phase.
  a_setup_before_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (PSEL && PENABLE) |-> $past(PSEL && !PENABLE));

endmodule
