// tb_ahb_decoder: checks the AHB decoder and response multiplexer. Address phase: each
// range of the memory map (ROM, RAM, APB, GPIO0, GPIO1, with random offsets) selects
// exactly its slave, other addresses select none. Data phase: the response comes from
// the slave selected in the previous address phase, and is held while HREADY is low.
// Default slave: an active transfer to an unmapped address gets the two-cycle ERROR
// response (HREADY low with HRESP high, then both high); an idle transfer gets OKAY.
module tb_ahb_decoder;
  import soc_pkg::*;
  logic HCLK = 0, HRESETn = 0;
  logic [31:0] HADDR = '0;
  logic [1:0]  HTRANS = 2'b00;
  logic        HREADY;
  logic [AHB_NSLV-1:0] hsel_s, hreadyout_s, hresp_s;
  logic [31:0] hrdata_s [AHB_NSLV];
  logic [31:0] HRDATA;
  logic        HREADY_OUT, HRESP;
  int checks = 0, failures = 0;

  always #5 HCLK = ~HCLK;
  assign HREADY = HREADY_OUT;
  ahb_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] addr_of(int idx);
    case (idx)
      0: return 32'h0000_0000 | 32'($urandom_range(0, 16'hFFFF));
      1: return 32'h2000_0000 | 32'($urandom_range(0, 16'hFFFF));
      2: return 32'h4000_0000 | 32'($urandom_range(0, 16'hFFFF));
      3: return 32'h4001_0000 | 32'($urandom_range(0, 12'hFFF));
      4: return 32'h4001_1000 | 32'($urandom_range(0, 12'hFFF));
      default: begin
        static logic [31:0] a [6] = '{32'h0001_0000, 32'h1FFF_FFFC, 32'h2001_0000, 32'h4001_2000, 32'h5000_0000, 32'hFFFF_FFFC};
        return a[$urandom_range(0, 5)];
      end
    endcase
  endfunction

  initial begin
    hreadyout_s = '1; hresp_s = '0;
    for (int i = 0; i < AHB_NSLV; i++) hrdata_s[i] = 32'hB000_0000 + i;
    repeat (2) @(negedge HCLK);
    HRESETn = 1;
    @(negedge HCLK);
    for (int n = 0; n < 200; n++) begin
      int idx;
      idx = $urandom_range(0, AHB_NSLV);   // AHB_NSLV = unmapped
      // address phase
      HADDR = addr_of(idx); HTRANS = 2'b10;
      #1;
      check(hsel_s == ((idx < AHB_NSLV) ? (AHB_NSLV'(1) << idx) : '0), $sformatf("hsel %b for %h", hsel_s, HADDR));
      @(negedge HCLK);
      HTRANS = 2'b00; HADDR = 32'h0000_0000;
      if (idx < AHB_NSLV) begin
        // slave inserts a wait state half of the time
        if ($urandom_range(0, 1) == 1) begin
          hreadyout_s[idx] = 0; #1;
          check(HREADY_OUT == 0 && HRDATA == 32'hB000_0000 + idx, "wait state routed");
          @(negedge HCLK);
          hreadyout_s[idx] = 1;
        end
        #1;
        check(HREADY_OUT == 1 && HRESP == 0 && HRDATA == 32'hB000_0000 + idx, $sformatf("data phase %0d: %h", idx, HRDATA));
        @(negedge HCLK);
      end else begin
        check(HREADY_OUT == 0 && HRESP == 1, "default slave error, first cycle");
        @(negedge HCLK);
        check(HREADY_OUT == 1 && HRESP == 1, "default slave error, second cycle");
        @(negedge HCLK);
      end
    end
    // idle transfer to an unmapped address: OKAY
    HADDR = 32'h5000_0000; HTRANS = 2'b00;
    @(negedge HCLK);
    check(HREADY_OUT == 1 && HRESP == 0, "idle to unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge HCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
