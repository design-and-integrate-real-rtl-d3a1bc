// tb_apb_decoder: checks the APB address decoder against the system memory map. For
// every 4 KB slot of the APB window (and random offsets inside it) exactly the expected
// slave's select follows PSEL, and PRDATA/PREADY come from that slave (each slave model
// returns its own signature and a random ready). Unused slots select nothing, read zero
// and are ready at once.
module tb_apb_decoder;
  import soc_pkg::*;
  logic        PSEL = 0;
  logic [15:0] PADDR = '0;
  logic [31:0] PRDATA;
  logic        PREADY;
  logic [APB_NSLV-1:0] psel_s, pready_s = '0;
  logic [31:0] prdata_s [APB_NSLV];
  int checks = 0, failures = 0;

  apb_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected slave index for a slot, -1 for none (base addresses 0x4000_0000 + slot*0x1000)
  // Timer0, Timer1, Dualtimer, -, UART0..2, RTC, Watchdog, TDSP, then unused slots
  localparam int EXP_IDX [16] = '{0, 1, 2, -1, 3, 4, 5, 6, 7, 8, -1, -1, -1, -1, -1, -1};

  initial begin
    for (int i = 0; i < APB_NSLV; i++) prdata_s[i] = 32'hA000_0000 + i;
    for (int rep = 0; rep < 20; rep++)
      for (int slot = 0; slot < 16; slot++) begin
        int e;
        e = EXP_IDX[slot];
        pready_s = APB_NSLV'($urandom);
        PADDR = {4'(slot), 12'($urandom)};
        PSEL = 1;
        #1;
        check(psel_s == ((e >= 0) ? (APB_NSLV'(1) << e) : '0), $sformatf("slot %0d psel %b", slot, psel_s));
        check(PRDATA == ((e >= 0) ? 32'hA000_0000 + e : 32'h0), $sformatf("slot %0d prdata %h", slot, PRDATA));
        check(PREADY == ((e >= 0) ? pready_s[e] : 1'b1), $sformatf("slot %0d pready", slot));
        PSEL = 0;
        #1;
        check(psel_s == '0, "select without PSEL");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
