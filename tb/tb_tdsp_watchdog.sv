// tb_tdsp_watchdog: checks the TDSP programmable watchdog unit (2-bit ADC). For every
// threshold and every ADC code the over output must be (adc > threshold) one clock later
// while enabled, and stay low while disabled. Also checks the reset threshold (all
// ones, nothing flagged) and the threshold read-back.
module tb_tdsp_watchdog;
  localparam int W = 2;
  logic clk = 0, rst_n = 0, thresh_wr = 0, enable = 0, over;
  logic [W-1:0] thresh_wdata = '0, adc = '0, thresh_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  tdsp_watchdog #(.ADC_W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(thresh_o == 2'b11, "reset threshold");
    enable = 1;
    for (int a = 0; a < 4; a++) begin
      adc = W'(a); @(negedge clk);
      check(over == 0, "nothing above reset threshold");
    end
    for (int th = 0; th < 4; th++) begin
      @(negedge clk); thresh_wr = 1; thresh_wdata = W'(th);
      @(negedge clk); thresh_wr = 0;
      check(thresh_o == W'(th), "threshold readback");
      for (int en = 0; en < 2; en++)
        for (int a = 0; a < 4; a++) begin
          enable = en[0]; adc = W'(a);
          @(negedge clk);
          check(over == (en == 1 && a > th), $sformatf("th=%0d en=%0d adc=%0d over=%0d", th, en, a, over));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
