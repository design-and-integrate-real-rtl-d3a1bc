// tb_tdsp_irq_gen: checks the TDSP interrupt generator against a cycle-by-cycle model
// (flag set by over, else cleared by clr; irq = flag and irq_en) under random stimulus,
// plus the directed cases: sticky flag, clear, set winning over a simultaneous clear,
// the enable masking only the line and not the flag.
module tb_tdsp_irq_gen;
  logic clk = 0, rst_n = 0, over = 0, clr = 0, irq_en = 0, flag, irq;
  int checks = 0, failures = 0;
  bit model_flag = 0;

  always #5 clk = ~clk;
  tdsp_irq_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(bit o, bit c, bit e);
    over = o; clr = c; irq_en = e;
    @(negedge clk);
    if (o) model_flag = 1; else if (c) model_flag = 0;
    check(flag == model_flag && irq == (model_flag && e), $sformatf("over=%0d clr=%0d en=%0d flag=%0d irq=%0d", o, c, e, flag, irq));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(flag == 0 && irq == 0, "reset");
    cyc(1, 0, 1); cyc(0, 0, 1); cyc(0, 0, 1);   // sticky
    cyc(0, 0, 0);                               // enable masks the line only
    cyc(0, 1, 1);                               // clear
    cyc(1, 1, 1);                               // set wins
    cyc(0, 1, 1);
    for (int i = 0; i < 500; i++) cyc(($urandom_range(0, 3) == 0), $urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);
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
