// tb_tdsp_apb: end-to-end check of the TDSP thermal monitor over APB with a 2-bit ADC
// code driven by the testbench (standing in for the temperature sensor and ADC).
// Checks: reset values; register read-back; ADC read-back through the interface
// register; no interrupt while monitoring is disabled; with threshold 2, ADC code 3 sets
// the status register to 2'b10 (the design's example) and raises IRQ_TDSP four clocks
// after the ADC change; code 2 (equal) and 1 do not; write-one-to-clear; the line enable;
// zero wait states; and a sweep of all threshold/code pairs against the rule
// "interrupt when ADC > threshold".
module tb_tdsp_apb;
  localparam int W = 2;
  logic PCLK = 0, PRESETn = 0;
  logic [W-1:0] INPUTADC = '0;
  logic IRQ_TDSP;
  int checks = 0, failures = 0;

  always #5 PCLK = ~PCLK;

  apb_bfm bus (.PCLK);
  tdsp_apb #(.ADC_W(W)) dut (
    .PCLK, .PRESETn,
    .PSEL(bus.PSEL), .PENABLE(bus.PENABLE), .PWRITE(bus.PWRITE), .PADDR(bus.PADDR[11:0]),
    .PWDATA(bus.PWDATA), .PRDATA(bus.PRDATA), .PREADY(bus.PREADY),
    .INPUTADC, .IRQ_TDSP
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] d;
  int lat;
  initial begin
    bus.idle();
    repeat (3) @(negedge PCLK);
    PRESETn = 1;
    bus.read(32'h000, d); check(d == 0, "CTRL reset");
    bus.read(32'h004, d); check(d == 3, "THRESH reset");
    bus.read(32'h008, d); check(d == 0, "STATUS reset");
    check(bus.n_wait == 0, "zero wait states");
    // ADC path
    for (int a = 0; a < 4; a++) begin
      INPUTADC = W'(a);
      bus.read(32'h00C, d); bus.read(32'h00C, d);
      check(d == a, $sformatf("ADC readback %0d", d));
    end
    bus.write(32'h004, 32'h2);
    bus.read(32'h004, d); check(d == 2, "THRESH readback");
    // disabled: code 3 must not flag
    INPUTADC = 2'b11;
    repeat (6) @(negedge PCLK);
    bus.read(32'h008, d); check(d == 0, "disabled monitor flagged");
    // enable monitor and line, code 1
    INPUTADC = 2'b01;
    bus.write(32'h000, 32'h3);
    bus.read(32'h000, d); check(d == 3, "CTRL readback");
    repeat (6) @(negedge PCLK);
    bus.read(32'h008, d); check(d == 0, "code 1 flagged");
    INPUTADC = 2'b10;
    repeat (6) @(negedge PCLK);
    bus.read(32'h008, d); check(d == 0, "code equal to threshold flagged");
    // code 3: latency from ADC change to IRQ
    @(negedge PCLK); INPUTADC = 2'b11;
    lat = 0;
    while (!IRQ_TDSP && lat < 20) begin @(negedge PCLK); lat++; end
    check(lat == 4, $sformatf("ADC to IRQ latency %0d", lat));
    bus.read(32'h008, d); check(d == 32'h2, $sformatf("STATUS on overheat %h (expected 2'b10)", d));
    // clear while still hot: comes back
    bus.write(32'h008, 32'h2);
    repeat (2) @(negedge PCLK);
    bus.read(32'h008, d); check(d == 32'h2, "flag returns while hot");
    // cool down, clear
    INPUTADC = 2'b00;
    repeat (6) @(negedge PCLK);
    bus.read(32'h008, d); check(d == 32'h2, "flag sticky after cool-down");
    bus.write(32'h008, 32'h1);   // wrong bit: no clear
    check(IRQ_TDSP == 1, "write to bit 0 cleared");
    bus.write(32'h008, 32'h2);
    check(IRQ_TDSP == 0, "IRQ cleared");
    bus.read(32'h008, d); check(d == 0, "STATUS cleared");
    // line enable off: flag still shows in status, line stays low
    bus.write(32'h000, 32'h1);
    INPUTADC = 2'b11;
    repeat (6) @(negedge PCLK);
    check(IRQ_TDSP == 0, "line masked");
    bus.read(32'h008, d); check(d == 32'h2, "flag with line masked");
    // sweep
    for (int th = 0; th < 4; th++)
      for (int a = 0; a < 4; a++) begin
        bus.write(32'h000, 32'h3);
        bus.write(32'h004, 32'(th));
        INPUTADC = W'(a);
        repeat (4) @(negedge PCLK);
        bus.write(32'h008, 32'h2);
        repeat (6) @(negedge PCLK);
        bus.read(32'h008, d);
        check(d == ((a > th) ? 32'h2 : 32'h0), $sformatf("sweep th=%0d adc=%0d status=%h", th, a, d));
        check(IRQ_TDSP == (a > th), "sweep line");
      end
    bus.read(32'h010, d); check(d == 0, "unused offset");
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
