// rtc_freq_divider: the RTC's frequency divider. It divides the RTC reference clock
// (PCLK_RTC) down to a millisecond rate and delivers one single-cycle tick per
// millisecond in the bus clock domain (PCLK), where the time registers live.
//
// How it works: a binary counter in the PCLK_RTC domain counts DIV reference cycles and
// then flips a toggle flag. The flag crosses into PCLK through a two-flop synchroniser;
// every change seen after the synchroniser becomes one PCLK-wide ms_tick. A toggle
// (rather than a pulse) crosses safely whatever the ratio of the two clocks, as long as
// PCLK runs faster than twice the millisecond rate.
//
// Interface: pclk_rtc, pclk, presetn (active-low asynchronous reset, used in both
// domains); clear (PCLK domain) restarts the division, so that a millisecond starts
// afresh when software sets the time. ms_tick is the output.
//
// Timing: ms_tick follows each DIV-th PCLK_RTC edge by two to three PCLK cycles.
//
// The divider and its place between the two clocks follow the design description; the
// millisecond output rate follows its stated 1 ms resolution. The reference frequency
// is not given: DIV = 1000 assumes a 1 MHz PCLK_RTC. The clear input, the toggle
// crossing and its synchroniser are this design's own choices.
module rtc_freq_divider #(
  parameter int unsigned DIV = 1000   // PCLK_RTC cycles per millisecond
) (
  input  logic pclk_rtc,
  input  logic pclk,
  input  logic presetn,
  input  logic clear,
  output logic ms_tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  // clear crosses into the RTC domain as a toggle, too
  logic clr_tgl_p;
  logic [1:0] clr_sync_r;
  logic clr_seen_r;
  logic [CW-1:0] cnt_r;
  logic tgl_r;

  always_ff @(posedge pclk or negedge presetn)
    if (!presetn)    clr_tgl_p <= 1'b0;
    else if (clear)  clr_tgl_p <= ~clr_tgl_p;

  always_ff @(posedge pclk_rtc or negedge presetn)
    if (!presetn) begin
      clr_sync_r <= '0;
      clr_seen_r <= 1'b0;
      cnt_r      <= '0;
      tgl_r      <= 1'b0;
    end else begin
      clr_sync_r <= {clr_sync_r[0], clr_tgl_p};
      clr_seen_r <= clr_sync_r[1];
      if (clr_sync_r[1] != clr_seen_r) begin
        cnt_r <= '0;
      end else if (cnt_r == CW'(DIV - 1)) begin
        cnt_r <= '0;
        tgl_r <= ~tgl_r;
      end else begin
        cnt_r <= cnt_r + 1'b1;
      end
    end

  // toggle back into the bus clock domain
  logic [2:0] tgl_sync_r;
  always_ff @(posedge pclk or negedge presetn)
    if (!presetn) tgl_sync_r <= '0;
    else          tgl_sync_r <= {tgl_sync_r[1:0], tgl_r};

  assign ms_tick = tgl_sync_r[2] ^ tgl_sync_r[1];

endmodule
