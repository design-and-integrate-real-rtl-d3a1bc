// tb_rtc_tdsp_soc: end-to-end test of the system's RTC/TDSP part through its AHB and APB
// ports, with the RTC divided down (RTC_DIV = 4, RTC_MS_PER_SEC = 5: a second is 600 ns)
// so that calendar roll-overs can be watched. The processor side is played by the
// testbench: an APB master in place of the AHB-to-APB bridge, and direct AHB
// address-phase stimulus in place of the processor. The seven standard APB peripherals
// are small models that return their own signature; the UART0 model inserts one wait
// state.
//
// Every mechanism is counted and must occur at least once: AHB selection of each of the
// five AHB slaves, the AHB default-slave error, APB access to each standard peripheral,
// an APB wait state, an unused APB slot, setting the RTC time, roll-over of seconds,
// minutes, hours, day, month and year, the leap day, the RTC alarm interrupt and its
// clearing, the TDSP over-temperature interrupt (status 2'b10 on ADC code 3) and its
// clearing.
module tb_rtc_tdsp_soc;
  import soc_pkg::*;
  localparam realtime TP = 10ns, TR = 30ns;
  localparam int DIV = 4, MSPS = 5;

  logic HCLK = 0, PCLK_RTC = 0, RESETn = 0;
  logic [31:0] HADDR = '0;
  logic [1:0]  HTRANS = 2'b00;
  logic        HREADY;
  logic [AHB_NSLV-1:0] hsel_s, hreadyout_s = '1, hresp_s = '0;
  logic [31:0] hrdata_s [AHB_NSLV];
  logic [31:0] HRDATA;
  logic        HREADY_OUT, HRESP;
  logic [6:0]  ext_psel, ext_pready;
  logic [31:0] ext_prdata [7];
  logic [1:0]  INPUTADC = '0;
  logic        IRQ_RTC, IRQ_TDSP;
  int checks = 0, failures = 0;

  always #(TP/2) HCLK = ~HCLK;
  always #(TR/2) PCLK_RTC = ~PCLK_RTC;
  assign HREADY = HREADY_OUT;

  apb_bfm bus (.PCLK(HCLK));

  rtc_tdsp_soc #(.RTC_DIV(DIV), .RTC_MS_PER_SEC(MSPS)) dut (
    .HCLK, .HRESETn(RESETn), .HADDR, .HTRANS, .HREADY,
    .hsel_s, .hrdata_s, .hreadyout_s, .hresp_s, .HRDATA, .HREADY_OUT, .HRESP,
    .PCLK(HCLK), .PRESETn(RESETn),
    .PSEL(bus.PSEL), .PENABLE(bus.PENABLE), .PWRITE(bus.PWRITE), .PADDR(bus.PADDR[15:0]),
    .PWDATA(bus.PWDATA), .PRDATA(bus.PRDATA), .PREADY(bus.PREADY),
    .ext_psel, .ext_prdata, .ext_pready,
    .PCLK_RTC, .INPUTADC, .IRQ_RTC, .IRQ_TDSP
  );

  // standard APB peripherals: signature read data; UART0 (index 3) takes one wait state
  logic uart_wait_done;
  always_ff @(posedge HCLK) uart_wait_done <= ext_psel[3] && bus.PENABLE && !uart_wait_done;
  always_comb
    for (int i = 0; i < 7; i++) begin
      ext_prdata[i] = 32'hE000_0000 + 32'(i);
      ext_pready[i] = (i == 3) ? uart_wait_done : 1'b1;
    end
  initial for (int i = 0; i < AHB_NSLV; i++) hrdata_s[i] = 32'hB000_0000 + 32'(i);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanisms
  typedef enum int {M_AHB_SEL, M_AHB_ERR, M_APB_EXT, M_APB_WAIT, M_APB_UNUSED, M_RTC_SET,
                    M_SEC, M_MIN, M_HOUR, M_DAY, M_MONTH, M_YEAR, M_LEAP, M_ALARM, M_ALARM_CLR,
                    M_TDSP_IRQ, M_TDSP_CLR, M_N} mech_e;
  int mech [M_N];
  string mech_name [M_N] = '{"ahb select", "ahb error", "apb standard peripheral", "apb wait state",
                             "apb unused slot", "rtc set", "second", "minute", "hour", "day",
                             "month", "year", "leap day", "rtc alarm", "rtc alarm clear",
                             "tdsp interrupt", "tdsp clear"};

  localparam logic [31:0] RTC  = 32'h4000_7000;
  localparam logic [31:0] TDSP = 32'h4000_9000;

  function automatic logic [31:0] tw(int h, int mi, int s, int d, int mo, int y);
    return {2'b00, 5'(h), 6'(mi), 6'(s), 5'(d), 4'(mo), 4'(y)};
  endfunction

  // set the time, wait for the next second, read back
  task automatic step_check(logic [31:0] from, logic [31:0] expect_w, mech_e m1, mech_e m2);
    logic [31:0] d;
    bus.write(RTC + 32'h000, from);
    bus.read(RTC + 32'h000, d);
    if (d == from) mech[M_RTC_SET]++;
    check(d == from, "time set");
    repeat (MSPS * DIV * 3 + 10) @(posedge HCLK);    // a little over one second
    bus.read(RTC + 32'h000, d);
    check(d == expect_w, $sformatf("from %h expected %h got %h", from, expect_w, d));
    if (d == expect_w) begin
      mech[M_SEC]++;
      if (m1 != M_N) mech[m1]++;
      if (m2 != M_N) mech[m2]++;
    end
  endtask

  logic [31:0] d;
  initial begin
    bus.idle();
    repeat (3) @(negedge HCLK);
    RESETn = 1;

    // ---------------- AHB map
    for (int i = 0; i <= AHB_NSLV; i++) begin
      static logic [31:0] a [6] = '{32'h0000_1234, 32'h2000_8000, 32'h4000_7000, 32'h4001_0010, 32'h4001_1FFC, 32'h3000_0000};
      @(negedge HCLK); HADDR = a[i]; HTRANS = 2'b10;
      #1;
      if (i < AHB_NSLV) begin
        check(hsel_s == AHB_NSLV'(1) << i, $sformatf("hsel for %h", a[i]));
        @(negedge HCLK); HTRANS = 2'b00;
        check(HRDATA == 32'hB000_0000 + 32'(i) && HREADY_OUT && !HRESP, "ahb data phase");
        if (HRDATA == 32'hB000_0000 + 32'(i)) mech[M_AHB_SEL]++;
      end else begin
        check(hsel_s == '0, "unmapped hsel");
        @(negedge HCLK); HTRANS = 2'b00;
        check(!HREADY_OUT && HRESP, "ahb error 1");
        @(negedge HCLK);
        check(HREADY_OUT && HRESP, "ahb error 2");
        if (HRESP) mech[M_AHB_ERR]++;
      end
    end

    // ---------------- APB map: standard peripherals
    begin
      static logic [31:0] base [7] = '{32'h4000_0000, 32'h4000_1000, 32'h4000_2000, 32'h4000_4000,
                                32'h4000_5000, 32'h4000_6000, 32'h4000_8000};
      for (int i = 0; i < 7; i++) begin
        bus.read(base[i] + 32'h10, d);
        check(d == 32'hE000_0000 + 32'(i), $sformatf("apb slave %0d read %h", i, d));
        if (d == 32'hE000_0000 + 32'(i)) mech[M_APB_EXT]++;
        if (i == 3) begin
          check(bus.n_wait == 1, "uart wait state");
          if (bus.n_wait == 1) mech[M_APB_WAIT]++;
        end
      end
    end
    bus.read(32'h4000_3000, d);
    check(d == 0 && bus.n_wait == 0, "unused slot");
    if (d == 0) mech[M_APB_UNUSED]++;

    // ---------------- RTC: the design's example and the calendar roll-overs
    bus.write(RTC, 32'h5096_9670);
    bus.read(RTC, d);
    check(d == 32'h1096_9670, $sformatf("example readback %h", d));
    step_check(tw(8, 18, 52, 22, 7, 0),   tw(8, 18, 53, 22, 7, 0),  M_N, M_N);
    step_check(tw(8, 18, 59, 22, 7, 0),   tw(8, 19, 0, 22, 7, 0),   M_MIN, M_N);
    step_check(tw(8, 59, 59, 22, 7, 0),   tw(9, 0, 0, 22, 7, 0),    M_HOUR, M_N);
    step_check(tw(23, 59, 59, 21, 6, 1),  tw(0, 0, 0, 22, 6, 1),    M_DAY, M_N);
    step_check(tw(23, 59, 59, 30, 6, 1),  tw(0, 0, 0, 1, 7, 1),     M_MONTH, M_N);
    step_check(tw(23, 59, 59, 28, 2, 1),  tw(0, 0, 0, 1, 3, 1),     M_MONTH, M_N);
    step_check(tw(23, 59, 59, 28, 2, 4),  tw(0, 0, 0, 29, 2, 4),    M_LEAP, M_N);
    step_check(tw(23, 59, 59, 31, 12, 3), tw(0, 0, 0, 1, 1, 4),     M_YEAR, M_N);

    // ---------------- RTC alarm, one second ahead
    bus.write(RTC, tw(8, 18, 52, 22, 7, 0));
    bus.write(RTC + 32'h004, 32'h4000_0000 | tw(8, 18, 53, 22, 7, 0));
    check(IRQ_RTC == 0, "alarm early");
    fork
      begin : wait_alarm
        @(posedge IRQ_RTC);
        mech[M_ALARM]++;
      end
      begin
        repeat (MSPS * DIV * 3 * 2) @(posedge HCLK);
        disable wait_alarm;
      end
    join
    check(IRQ_RTC == 1, "alarm fired");
    bus.read(RTC + 32'h008, d); check(d == 1, "alarm status");
    bus.write(RTC + 32'h008, 32'h1);
    bus.read(RTC + 32'h008, d); check(d == 0 && IRQ_RTC == 0, "alarm cleared");
    if (d == 0 && IRQ_RTC == 0) mech[M_ALARM_CLR]++;

    // ---------------- TDSP: threshold 2, ADC code 3
    bus.write(TDSP + 32'h004, 32'h2);
    bus.write(TDSP + 32'h000, 32'h3);
    INPUTADC = 2'b01;
    repeat (6) @(negedge HCLK);
    check(IRQ_TDSP == 0, "tdsp below threshold");
    INPUTADC = 2'b11;
    repeat (6) @(negedge HCLK);
    bus.read(TDSP + 32'h008, d);
    check(d == 32'h2 && IRQ_TDSP == 1, $sformatf("tdsp overheat status %h", d));
    if (d == 32'h2) mech[M_TDSP_IRQ]++;
    INPUTADC = 2'b00;
    repeat (6) @(negedge HCLK);
    bus.write(TDSP + 32'h008, 32'h2);
    bus.read(TDSP + 32'h008, d);
    check(d == 0 && IRQ_TDSP == 0, "tdsp cleared");
    if (d == 0) mech[M_TDSP_CLR]++;
    // the RTC is unaffected by TDSP traffic, and vice versa
    bus.read(TDSP + 32'h00C, d); check(d == 0, "tdsp adc");
    check(IRQ_RTC == 0, "no stray rtc interrupt");

    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-24s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge HCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
