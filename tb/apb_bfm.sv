// apb_bfm: APB master bus-functional model used by the testbenches. It holds the master
// side of an APB port and two tasks that run one complete transfer each: a setup phase
// (PSEL high, PENABLE low) followed by an access phase that lasts until the slave gives
// PREADY. read() returns PRDATA as sampled just before the clock edge that ends the
// access phase (through a clocking block, so there is no race with the slave's
// registers). n_wait counts the extra access cycles of the last transfer.
interface apb_bfm (input logic PCLK);
  logic        PSEL;
  logic        PENABLE;
  logic        PWRITE;
  logic [31:0] PADDR;
  logic [31:0] PWDATA;
  logic [31:0] PRDATA;
  logic        PREADY;
  int          n_wait;

  clocking cb @(posedge PCLK);
    input PRDATA, PREADY;
  endclocking

  task automatic idle();
    PSEL = 1'b0; PENABLE = 1'b0; PWRITE = 1'b0; PADDR = '0; PWDATA = '0;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data);
    @(negedge PCLK);
    PSEL = 1'b1; PENABLE = 1'b0; PWRITE = 1'b1; PADDR = addr; PWDATA = data;
    @(negedge PCLK);
    PENABLE = 1'b1;
    n_wait = 0;
    @(cb);
    while (!cb.PREADY) begin n_wait++; @(cb); end
    @(negedge PCLK);
    PSEL = 1'b0; PENABLE = 1'b0; PWRITE = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge PCLK);
    PSEL = 1'b1; PENABLE = 1'b0; PWRITE = 1'b0; PADDR = addr;
    @(negedge PCLK);
    PENABLE = 1'b1;
    n_wait = 0;
    @(cb);
    while (!cb.PREADY) begin n_wait++; @(cb); end
    data = cb.PRDATA;
    @(negedge PCLK);
    PSEL = 1'b0; PENABLE = 1'b0;
  endtask
endinterface
