// tb_rtc_tdsp_soc_full: the whole system part at its default parameters (RTC divider
// 1000, 1000 ms per second) with a 1 MHz RTC reference clock and a 4 MHz bus clock.
// One complete operation: software sets the time to 08:18:52 (date 22, month 7, year 0,
// the word 0x5096_9670), programs an alarm for 08:18:53, and the alarm interrupt must
// arrive one real second (of simulated time) after the time was written. Then the
// millisecond register, the time read-back and a TDSP over-temperature interrupt are
// checked.
module tb_rtc_tdsp_soc_full;
  import soc_pkg::*;
  localparam realtime TP = 250ns, TR = 1000ns;

  logic HCLK = 0, PCLK_RTC = 0, RESETn = 0;
  logic [31:0] HADDR = '0;
  logic [1:0]  HTRANS = 2'b00;
  logic        HREADY;
  logic [AHB_NSLV-1:0] hsel_s, hreadyout_s = '1, hresp_s = '0;
  logic [31:0] hrdata_s [AHB_NSLV];
  logic [31:0] HRDATA;
  logic        HREADY_OUT, HRESP;
  logic [6:0]  ext_psel, ext_pready = '1;
  logic [31:0] ext_prdata [7];
  logic [1:0]  INPUTADC = '0;
  logic        IRQ_RTC, IRQ_TDSP;
  int checks = 0, failures = 0;

  always #(TP/2) HCLK = ~HCLK;
  always #(TR/2) PCLK_RTC = ~PCLK_RTC;
  assign HREADY = HREADY_OUT;
  initial for (int i = 0; i < 7; i++) ext_prdata[i] = '0;
  initial for (int i = 0; i < AHB_NSLV; i++) hrdata_s[i] = '0;

  apb_bfm bus (.PCLK(HCLK));

  rtc_tdsp_soc dut (
    .HCLK, .HRESETn(RESETn), .HADDR, .HTRANS, .HREADY,
    .hsel_s, .hrdata_s, .hreadyout_s, .hresp_s, .HRDATA, .HREADY_OUT, .HRESP,
    .PCLK(HCLK), .PRESETn(RESETn),
    .PSEL(bus.PSEL), .PENABLE(bus.PENABLE), .PWRITE(bus.PWRITE), .PADDR(bus.PADDR[15:0]),
    .PWDATA(bus.PWDATA), .PRDATA(bus.PRDATA), .PREADY(bus.PREADY),
    .ext_psel, .ext_prdata, .ext_pready,
    .PCLK_RTC, .INPUTADC, .IRQ_RTC, .IRQ_TDSP
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] RTC  = 32'h4000_7000;
  localparam logic [31:0] TDSP = 32'h4000_9000;

  logic [31:0] d;
  realtime t_set, t_irq;
  initial begin
    bus.idle();
    repeat (3) @(negedge HCLK);
    RESETn = 1;
    bus.write(RTC, 32'h5096_9670);
    t_set = $realtime;
    bus.read(RTC, d);
    check(d == 32'h1096_9670, $sformatf("time readback %h", d));
    // alarm at 08:18:53, enabled
    bus.write(RTC + 32'h004, 32'h4000_0000 | (32'h1096_9670 & ~(32'h3F << 13)) | (32'd53 << 13));
    // half a second later: still 52, about 500 ms counted
    #500ms;
    bus.read(RTC, d);
    check(d[18:13] == 52, "seconds at 0.5 s");
    bus.read(RTC + 32'h00C, d);
    check(d >= 498 && d <= 501, $sformatf("msec at 0.5 s: %0d", d));
    check(IRQ_RTC == 0, "alarm early");
    @(posedge IRQ_RTC);
    t_irq = $realtime;
    $display("alarm %0t after setting the time", t_irq - t_set);
    check(t_irq - t_set >= 1s && t_irq - t_set <= 1s + 8*TR, $sformatf("alarm after %0t", t_irq - t_set));
    bus.read(RTC, d);
    check(d == ((32'h1096_9670 & ~(32'h3F << 13)) | (32'd53 << 13)), $sformatf("time at alarm %h", d));
    bus.read(RTC + 32'h008, d);
    check(d == 1, "alarm status");
    bus.write(RTC + 32'h008, 32'h1);
    check(IRQ_RTC == 0, "alarm cleared");
    // TDSP
    bus.write(TDSP + 32'h004, 32'h2);
    bus.write(TDSP + 32'h000, 32'h3);
    INPUTADC = 2'b11;
    repeat (6) @(negedge HCLK);
    bus.read(TDSP + 32'h008, d);
    check(d == 32'h2 && IRQ_TDSP == 1, $sformatf("tdsp status %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge HCLK);   // 1.5 s
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
