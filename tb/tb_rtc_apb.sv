// tb_rtc_apb: end-to-end check of the RTC peripheral over APB, with DIV = 4 and
// MS_PER_SEC = 5 so that a second lasts 20 reference clocks (30 ns each), 600 ns.
// Checks: reset values; the waveform example of the design (write 0x5096_9670 to TIME,
// read back 0x1096_9670 = 08:18:52, date 22, month 7, year 0); zero wait states; the
// length of a second measured on the bus-visible register; the millisecond register;
// an alarm two seconds ahead raising IRQ_RTC at the right time and the status flag,
// and its clearing; reads of unused offsets.
module tb_rtc_apb;
  import soc_pkg::*;
  localparam int DIV = 4, MSPS = 5;
  localparam realtime TP = 10ns, TR = 30ns;
  logic PCLK = 0, PCLK_RTC = 0, PRESETn = 0;
  logic IRQ_RTC;
  int checks = 0, failures = 0;

  always #(TP/2) PCLK = ~PCLK;
  always #(TR/2) PCLK_RTC = ~PCLK_RTC;

  apb_bfm bus (.PCLK);
  rtc_apb #(.DIV(DIV), .MS_PER_SEC(MSPS)) dut (
    .PCLK_APB(PCLK), .PCLK_RTC, .PRESETn,
    .PSEL(bus.PSEL), .PENABLE(bus.PENABLE), .PWRITE(bus.PWRITE), .PADDR(bus.PADDR[11:0]),
    .PWDATA(bus.PWDATA), .PRDATA(bus.PRDATA), .PREADY(bus.PREADY), .IRQ_RTC
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sec_of(logic [31:0] w);  return int'(w[18:13]); endfunction

  // time of every change of the seconds field, found by reading TIME back to back
  realtime sec_edge [$];
  task automatic poll_seconds(int n_changes);
    logic [31:0] w;
    int last;
    bus.read(32'h000, w);
    last = sec_of(w);
    sec_edge.delete();
    while (sec_edge.size() < n_changes) begin
      bus.read(32'h000, w);
      if (sec_of(w) != last) sec_edge.push_back($realtime);
      last = sec_of(w);
    end
  endtask

  logic [31:0] d;
  realtime t_alarm_expect, t_irq;
  initial begin
    bus.idle();
    repeat (3) @(negedge PCLK);
    PRESETn = 1;
    bus.read(32'h000, d); check(d == 0, "TIME reset");
    bus.read(32'h004, d); check(d == 0, "ALARM reset");
    bus.read(32'h008, d); check(d == 0, "STATUS reset");
    check(IRQ_RTC == 0, "IRQ reset");

    // example from the design's waveform
    bus.write(32'h000, 32'h5096_9670);
    check(bus.n_wait == 0, "write wait states");
    bus.read(32'h000, d);
    check(bus.n_wait == 0, "read wait states");
    check(d == 32'h1096_9670, $sformatf("TIME readback %h", d));
    check(d[29:25] == 8 && d[24:19] == 18 && d[18:13] == 52 && d[12:8] == 22 && d[7:4] == 7 && d[3:0] == 0,
          "TIME fields 08:18:52 22/7/0");
    bus.read(32'h00C, d);
    check(d < MSPS, $sformatf("MSEC %0d", d));

    // length of one second
    poll_seconds(3);
    check(sec_edge[2] - sec_edge[1] >= MSPS*DIV*TR - 4*TP && sec_edge[2] - sec_edge[1] <= MSPS*DIV*TR + 4*TP,
          $sformatf("second length %0t", sec_edge[2] - sec_edge[1]));
    bus.read(32'h000, d);
    check(sec_of(d) == 55, $sformatf("seconds now %0d", sec_of(d)));

    // alarm at 08:18:57, 22/7/0
    bus.write(32'h004, 32'h4000_0000 | 32'h1096_9670 & ~32'(6'h3F << 13) | 32'(57) << 13);
    bus.read(32'h004, d);
    check(d == (32'h4000_0000 | (32'h1096_9670 & ~(32'h3F << 13)) | (32'd57 << 13)), $sformatf("ALARM readback %h", d));
    t_alarm_expect = sec_edge[2] + 2 * MSPS*DIV*TR;
    @(posedge IRQ_RTC);
    t_irq = $realtime;
    check(t_irq >= t_alarm_expect - 5*TP && t_irq <= t_alarm_expect + 5*TP,
          $sformatf("alarm at %0t, expected %0t", t_irq, t_alarm_expect));
    bus.read(32'h000, d);
    check(sec_of(d) == 57, "alarm second");
    bus.read(32'h008, d); check(d == 1, "STATUS flag");
    bus.write(32'h008, 32'h0);  check(IRQ_RTC == 1, "write 0 keeps flag");
    bus.write(32'h008, 32'h1);  check(IRQ_RTC == 0, "write 1 clears flag");
    bus.read(32'h008, d); check(d == 0, "STATUS cleared");
    // disabled alarm: set alarm at 59 without enable; must not fire
    bus.write(32'h004, (32'h1096_9670 & ~(32'h3F << 13)) | (32'd59 << 13));
    do bus.read(32'h000, d); while (sec_of(d) != 0);
    repeat (3) @(posedge PCLK);
    check(IRQ_RTC == 0, "disabled alarm fired");
    bus.read(32'h000, d);
    check(d[24:19] == 19 && d[29:25] == 8, "minute rolled to 19");
    bus.read(32'h010, d); check(d == 0, "unused offset");
    bus.read(32'hFFC, d); check(d == 0, "unused offset top");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge PCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
