// tdsp_irq_gen: the TDSP's interrupt generator. It turns the watchdog unit's
// over-threshold indication into an interrupt status flag, which the processor reads
// through PRDATA, and an interrupt line.
//
// How it works: the flag is set in every cycle in which the watchdog reports an
// over-temperature sample and stays set until software clears it. Setting wins over
// clearing, so a flag cleared while the chip is still too hot comes back at once. The
// interrupt line is the flag gated by an interrupt enable.
//
// Interface: clk/rst_n; over from the watchdog unit; clr (write one to clear) from the
// function controller; irq_en from the control register; flag (status bit) and irq.
//
// Timing: flag and irq rise one clock after over.
//
// Follows the design description: an interrupt generator after the watchdog unit and an
// interrupt that shows in PRDATA. Own choices: the sticky flag, set-over-clear priority
// and the enable.
module tdsp_irq_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic over,
  input  logic clr,
  input  logic irq_en,
  output logic flag,
  output logic irq
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    flag <= 1'b0;
    else if (over) flag <= 1'b1;
    else if (clr)  flag <= 1'b0;

  assign irq = flag && irq_en;

endmodule
