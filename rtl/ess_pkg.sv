// ess_pkg: types and constants shared by the PCIe-to-DDR3 backbone.
//
// Holds the PCIe TLP header layout (first header DW, Fig. "first header present in
// all TLPs"), the format/type codes the backbone understands (MRd, MWr, Cpl, CplD),
// the register map of the CPU-visible register file, and the AXI4 address-channel
// bundle used on every memory-mapped link (DMA, ADC writer, interconnect, memory).
//
// TLP words travel on a 64-bit AXI4-Stream as in the Xilinx endpoint user
// interface: header DW0 in bits [31:0] of the first beat, DW1 in [63:32], DW2 in
// [31:0] of the second beat. Inside a DW the PCIe field layout is kept, so byte +0
// of the header (R, Fmt, Type) is bits [31:24].
package ess_pkg;

  // ---------------------------------------------------------------- TLP format
  typedef enum logic [1:0] {
    FMT_3DW_NODATA = 2'b00,
    FMT_4DW_NODATA = 2'b01,
    FMT_3DW_DATA   = 2'b10,
    FMT_4DW_DATA   = 2'b11
  } tlp_fmt_e;

  localparam logic [4:0] TYPE_MEM = 5'b00000;
  localparam logic [4:0] TYPE_CPL = 5'b01010;

  // {fmt, type} codes as 7-bit values
  localparam logic [6:0] FT_MRD32 = 7'h00;  // 00_00000
  localparam logic [6:0] FT_MWR32 = 7'h40;  // 10_00000
  localparam logic [6:0] FT_CPL   = 7'h0A;  // 00_01010
  localparam logic [6:0] FT_CPLD  = 7'h4A;  // 10_01010

  // First header DW, bit 31 down to bit 0.
  typedef struct packed {
    logic       r0;
    tlp_fmt_e   fmt;
    logic [4:0] typ;
    logic       r1;
    logic [2:0] tc;
    logic [3:0] r2;
    logic       td;
    logic       ep;
    logic [1:0] attr;
    logic [1:0] at;
    logic [9:0] length;   // payload length in DW
  } tlp_dw0_t;

  // Second DW of a memory request
  typedef struct packed {
    logic [15:0] requester_id;
    logic [7:0]  tag;
    logic [3:0]  last_be;
    logic [3:0]  first_be;
  } tlp_req_dw1_t;

  // Second and third DW of a completion
  typedef struct packed {
    logic [15:0] completer_id;
    logic [2:0]  status;
    logic        bcm;
    logic [11:0] byte_count;
  } tlp_cpl_dw1_t;

  typedef struct packed {
    logic [15:0] requester_id;
    logic [7:0]  tag;
    logic        r;
    logic [6:0]  lower_addr;
  } tlp_cpl_dw2_t;

  // Fields of a register read request that egress needs for its completion
  typedef struct packed {
    logic [15:0] requester_id;
    logic [7:0]  tag;
    logic [2:0]  tc;
    logic [1:0]  attr;
    logic [6:0]  lower_addr;
  } cpl_req_t;

  // PCIe maximum payload size in bytes configured in the endpoint
  localparam int unsigned MAX_PAYLOAD_BYTES = 128;

  // ---------------------------------------------------------------- registers
  // Register index = byte offset / 4 inside the BAR.
  localparam int unsigned REG_AW = 12;
  typedef logic [REG_AW-1:0] reg_idx_t;

  localparam reg_idx_t R_ID           = 12'h000;
  localparam reg_idx_t R_ADC_ACQ      = 12'h010;
  localparam reg_idx_t R_ADC_SAMPLE   = 12'h011;
  localparam reg_idx_t R_MEM_RESET    = 12'h020;
  localparam reg_idx_t R_STEADY       = 12'h021;
  localparam reg_idx_t R_MASTER_RST   = 12'h0FF;
  localparam reg_idx_t R_ADC_ADDR0    = 12'h120;
  localparam reg_idx_t R_ADC_BLK_LEN  = 12'h12A;
  localparam reg_idx_t R_DRD_DST_LO   = 12'h200;
  localparam reg_idx_t R_DRD_DST_HI   = 12'h201;
  localparam reg_idx_t R_DRD_SRC      = 12'h202;
  localparam reg_idx_t R_DRD_LEN      = 12'h203;
  localparam reg_idx_t R_DRD_CTRL     = 12'h204;
  localparam reg_idx_t R_DRD_SWAP     = 12'h205;
  localparam reg_idx_t R_DWR_SRC_LO   = 12'h210;
  localparam reg_idx_t R_DWR_SRC_HI   = 12'h211;
  localparam reg_idx_t R_DWR_DST      = 12'h212;
  localparam reg_idx_t R_DWR_LEN      = 12'h213;
  localparam reg_idx_t R_DWR_CTRL     = 12'h214;
  localparam reg_idx_t R_IRQ_EN       = 12'h220;
  localparam reg_idx_t R_IRQ_STATUS   = 12'h221;
  localparam reg_idx_t R_IRQ_CLEAR    = 12'h222;
  localparam reg_idx_t R_USER_FIRST   = 12'h400;
  localparam reg_idx_t R_USER_LAST    = 12'h4FF;

  localparam logic [31:0] FIRMWARE_ID = 32'h8301_2808;
  localparam int unsigned NUM_ADC_CH  = 10;

  // IRQ status / clear bit positions
  localparam int unsigned IRQ_RD_DMA = 0;
  localparam int unsigned IRQ_WR_DMA = 1;
  localparam int unsigned IRQ_DAQ    = 14;
  localparam int unsigned IRQ_USER   = 15;

  // Settings the register file hands to the DMA, egress and ADC writer
  typedef struct packed {
    logic [31:0] rd_host_addr;   // 0x200
    logic [31:0] rd_mem_addr;    // 0x202
    logic [31:0] rd_len;         // 0x203, bytes
    logic        rd_swap;        // 0x205 bit 0
    logic [31:0] wr_host_addr;   // 0x210
    logic [31:0] wr_mem_addr;    // 0x212
    logic [31:0] wr_len;         // 0x213, bytes
  } dma_cfg_t;

  // ---------------------------------------------------------------- AXI4
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

  // AW / AR payload
  typedef struct packed {
    logic [31:0] addr;
    logic [7:0]  len;    // beats - 1
    logic [2:0]  size;   // log2(bytes per beat)
    logic [1:0]  burst;
  } axi_ax_t;

  // ---------------------------------------------------------------- DDR3 commands
  // Commands of the SDRAM command truth table, as the memory controller asks for them
  typedef enum logic [3:0] {
    CMD_INHIBIT, CMD_NOP, CMD_BURST_TERM, CMD_READ, CMD_READ_AP, CMD_WRITE,
    CMD_WRITE_AP, CMD_ACTIVATE, CMD_PRECHARGE, CMD_PRECHARGE_ALL, CMD_REFRESH,
    CMD_LOAD_MODE
  } ddr3_cmd_e;

endpackage
