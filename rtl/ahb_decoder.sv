// ahb_decoder: the AHB side of the system's memory map. It selects the AHB slave a
// processor address falls in (ROM, RAM, the AHB-to-APB bridge or one of the two GPIO
// ports) and routes that slave's data-phase response back to the processor.
//
// How it works: the address phase decodes HADDR into a one-hot HSEL. Because AHB returns
// data one phase later, the select is registered whenever HREADY is high, and the
// registered select steers HRDATA, HREADYOUT and HRESP in the data phase. An active
// transfer (HTRANS NONSEQ or SEQ) to an address outside every range is answered by a
// built-in default slave with the two-cycle ERROR response of the AHB protocol.
//
// Map: ROM 0x0000_0000-0x0000_FFFF, RAM 0x2000_0000-0x2000_FFFF, APB 0x4000_0000-
// 0x4000_FFFF, GPIO0 0x4001_0000-0x4001_0FFF, GPIO1 0x4001_1000-0x4001_1FFF.
//
// Interface: HCLK/HRESETn; the master's HADDR, HTRANS and the system HREADY; per slave
// (indexed as AHB_IDX_* in soc_pkg) an HSEL out and HRDATA/HREADYOUT/HRESP in; the
// multiplexed HRDATA, HREADY_OUT and HRESP out.
//
// Follows the design description: the slaves and their address ranges. Own choices:
// the default slave and its ERROR response (an idle or unmapped data phase reads zero).
module ahb_decoder
  import soc_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HREADY,
  output logic [AHB_NSLV-1:0] hsel_s,
  input  logic [31:0] hrdata_s [AHB_NSLV],
  input  logic [AHB_NSLV-1:0] hreadyout_s,
  input  logic [AHB_NSLV-1:0] hresp_s,
  output logic [31:0] HRDATA,
  output logic        HREADY_OUT,
  output logic        HRESP
);
  // ------------------------------------------------ address phase
  always_comb begin
    hsel_s = '0;
    if (HADDR[31:16] == ROM_BASE[31:16])    hsel_s[AHB_IDX_ROM]   = 1'b1;
    if (HADDR[31:16] == RAM_BASE[31:16])    hsel_s[AHB_IDX_RAM]   = 1'b1;
    if (HADDR[31:16] == APB_BASE[31:16])    hsel_s[AHB_IDX_APB]   = 1'b1;
    if (HADDR[31:12] == GPIO0_BASE[31:12])  hsel_s[AHB_IDX_GPIO0] = 1'b1;
    if (HADDR[31:12] == GPIO1_BASE[31:12])  hsel_s[AHB_IDX_GPIO1] = 1'b1;
  end

  logic trans_active, unmapped;
  assign trans_active = HTRANS[1];
  assign unmapped     = (hsel_s == '0);

  // ------------------------------------------------ data-phase select
  logic [AHB_NSLV-1:0] dsel_r;
  always_ff @(posedge HCLK or negedge HRESETn)
    if (!HRESETn)    dsel_r <= '0;
    else if (HREADY) dsel_r <= hsel_s;

  // ------------------------------------------------ default slave
  typedef enum logic [1:0] {DS_IDLE, DS_ERR1, DS_ERR2} ds_state_e;
  ds_state_e ds_r;
  always_ff @(posedge HCLK or negedge HRESETn)
    if (!HRESETn) ds_r <= DS_IDLE;
    else begin
      unique case (ds_r)
        DS_ERR1: ds_r <= DS_ERR2;
        default: ds_r <= (HREADY && trans_active && unmapped) ? DS_ERR1 : DS_IDLE;
      endcase
    end

  // ------------------------------------------------ response multiplexer
  always_comb begin
    HRDATA     = '0;
    HREADY_OUT = 1'b1;
    HRESP      = 1'b0;
    for (int i = 0; i < AHB_NSLV; i++)
      if (dsel_r[i]) begin
        HRDATA     = hrdata_s[i];
        HREADY_OUT = hreadyout_s[i];
        HRESP      = hresp_s[i];
      end
    if (ds_r == DS_ERR1) begin
      HREADY_OUT = 1'b0;
      HRESP      = 1'b1;
    end else if (ds_r == DS_ERR2) begin
      HREADY_OUT = 1'b1;
      HRESP      = 1'b1;
    end
  end

  a_onehot_sel: assert property (@(posedge HCLK) disable iff (!HRESETn) $onehot0(hsel_s));

endmodule
