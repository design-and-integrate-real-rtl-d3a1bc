// tb_rtc_alarm: checks the RTC alarm register and comparator. The running time is
// driven directly. Checks: register write and read-back; no interrupt while disabled;
// the flag rises exactly one clock after the time reaches the alarm value; it stays set
// after the time moves on; clearing during the matching time does not set it again;
// a clear works; a difference in any single field prevents the match.
module tb_rtc_alarm;
  import soc_pkg::*;
  logic clk = 0, rst_n = 0, alarm_wr = 0, alarm_en_wdata = 0, irq_clr = 0;
  rtc_time_t alarm_wdata = '0, time_i = '0, alarm_o;
  logic alarm_en_o, irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rtc_alarm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_alarm(rtc_time_t a, bit en);
    @(negedge clk); alarm_wr = 1; alarm_wdata = a; alarm_en_wdata = en;
    @(negedge clk); alarm_wr = 0;
    check(alarm_o == a && alarm_en_o == en, "alarm readback");
  endtask

  task automatic clear_irq();
    @(negedge clk); irq_clr = 1;
    @(negedge clk); irq_clr = 0;
  endtask

  rtc_time_t a;
  initial begin
    repeat (2) @(negedge clk);
    time_i = 30'h1234567;
    rst_n = 1;
    @(negedge clk);
    check(irq == 0 && alarm_en_o == 0, "reset");
    a = '{hour: 5'd8, minute: 6'd19, second: 6'd0, date: 5'd22, month: 4'd7, year: 4'd0};
    // disabled: no interrupt
    set_alarm(a, 0);
    @(negedge clk); time_i = a;
    repeat (3) @(negedge clk);
    check(irq == 0, "disabled alarm fired");
    time_i = '0;
    // enabled
    set_alarm(a, 1);
    repeat (2) @(negedge clk);
    check(irq == 0, "no match, irq");
    time_i = a;              // changes after a negedge
    @(posedge clk); #1;
    check(irq == 1, "irq one clock after match");
    @(negedge clk); time_i.second = 6'd1;
    repeat (3) @(negedge clk);
    check(irq == 1, "irq sticky");
    clear_irq();
    check(irq == 0, "irq cleared");
    // clear during the matching time
    time_i = a;
    repeat (2) @(negedge clk);
    check(irq == 1, "irq again on new match");
    clear_irq();
    repeat (3) @(negedge clk);
    check(irq == 0, "no re-set while still matching");
    // each field alone breaks the match
    for (int f = 0; f < 6; f++) begin
      rtc_time_t t;
      @(negedge clk); time_i = '0;
      @(negedge clk);
      t = a;
      case (f)
        0: t.hour = 5'd9;   1: t.minute = 6'd20;  2: t.second = 6'd1;
        3: t.date = 5'd21;  4: t.month = 4'd6;    default: t.year = 4'd1;
      endcase
      time_i = t;
      repeat (3) @(negedge clk);
      check(irq == 0, $sformatf("field %0d mismatch fired", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
