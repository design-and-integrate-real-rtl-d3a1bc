// tdsp_watchdog: the TDSP's programmable watchdog unit. Software programs a temperature
// threshold; while monitoring is enabled, the unit watches every ADC sample and flags
// each one that is higher than the threshold.
//
// How it works: a threshold register written from the bus, and a registered
// greater-than comparator between the sampled ADC code and the threshold.
//
// Interface: clk/rst_n; thresh_wr/thresh_wdata program the threshold and thresh_o reads
// it back; enable gates the comparison; adc is the sample from the interface register;
// over is high for every cycle in which the previous cycle's sample exceeded the
// threshold.
//
// Timing: over follows adc by one clock.
//
// Follows the design description: a threshold set by the processor and an alarm when
// the ADC value is higher than it (strictly greater). Own choices: the enable input and
// the register stage on the output; the threshold resets to the largest code so that
// nothing is flagged before software has programmed it.
module tdsp_watchdog #(
  parameter int unsigned ADC_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             thresh_wr,
  input  logic [ADC_W-1:0] thresh_wdata,
  input  logic             enable,
  input  logic [ADC_W-1:0] adc,
  output logic [ADC_W-1:0] thresh_o,
  output logic             over
);
  logic [ADC_W-1:0] thresh_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      thresh_r <= '1;
      over     <= 1'b0;
    end else begin
      if (thresh_wr) thresh_r <= thresh_wdata;
      over <= enable && (adc > thresh_r);
    end

  assign thresh_o = thresh_r;

endmodule
