// ess_backbone_top: PCIe-to-DDR3 communication backbone of an LLRF digitizer board.
//
// Lets a host CPU, over a PCIe endpoint, read and write a register file and move
// blocks of data between host memory and the board's DDR3 memory by DMA, while
// the board's ADCs also write samples into the same memory.
//
//   PCIe core rx stream -> ingress -> register file (register writes)
//                                  -> egress (register reads: completions)
//                                  -> DMA engine (payload of DMA writes)
//   DMA engine -> AXI4 64-bit -> interconnect (width conversion, arbitration)
//   ADC writer -> AXI4 256-bit -> interconnect
//   interconnect -> AXI4 256-bit -> memory interface (outside this block)
//   memory read data -> DMA read FIFO -> egress -> MWr TLPs -> PCIe core tx stream
//
// Ports: the AXI4-Stream receive and transmit interfaces and configuration status
// of the vendor PCIe endpoint core; the 256-bit AXI4 master towards the vendor
// DDR3 memory interface (m_*); a second 256-bit read port on the interconnect
// (aux_*) for a further reader; the ADC sample inputs; the interrupt request
// level; the memory/interconnect reset requested by register 0x020; and the DDR3
// command pins of the command encoder used inside the memory controller.
// Clocks: everything runs on clk, the 125 MHz clock of the PCIe user interface,
// except the m_* port, which runs on mem_clk, the memory interface's AXI clock
// (250 MHz in the document); the interconnect crosses between them. mem_rst_n is
// the interconnect reset brought into mem_clk.
// The block split, connections and clock ratio follow the document's system
// overview.
module ess_backbone_top
  import ess_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter bit          ROUND_ROBIN = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // PCIe endpoint core: receive stream
  input  logic [63:0]               rx_tdata,
  input  logic [7:0]                rx_tkeep,
  input  logic                      rx_tlast,
  input  logic                      rx_tvalid,
  output logic                      rx_tready,
  // PCIe endpoint core: transmit stream
  output logic [63:0]               tx_tdata,
  output logic [7:0]                tx_tkeep,
  output logic                      tx_tlast,
  output logic                      tx_tvalid,
  input  logic                      tx_tready,
  // PCIe endpoint core: configuration and interrupt
  input  logic [15:0]               completer_id,
  input  logic                      link_up,
  input  logic                      bus_master_en,
  output logic                      irq,
  // user logic interrupt source
  input  logic                      user_irq,
  // memory interface status and reset
  input  logic                      mem_init_done,
  output logic                      mem_reset,
  // ADC samples
  input  logic [NUM_ADC_CH-1:0][15:0] adc_data,
  input  logic                      adc_valid,
  output logic [31:0]               adc_dropped,
  // AXI4 256-bit master to the DDR3 memory interface, on mem_clk
  input  logic                      mem_clk,
  output logic                      mem_rst_n,
  output axi_ax_t                   m_aw,
  output logic                      m_awvalid,
  input  logic                      m_awready,
  output logic [255:0]              m_wdata,
  output logic [31:0]               m_wstrb,
  output logic                      m_wlast,
  output logic                      m_wvalid,
  input  logic                      m_wready,
  input  logic [1:0]                m_bresp,
  input  logic                      m_bvalid,
  output logic                      m_bready,
  output axi_ax_t                   m_ar,
  output logic                      m_arvalid,
  input  logic                      m_arready,
  input  logic [255:0]              m_rdata,
  input  logic [1:0]                m_rresp,
  input  logic                      m_rlast,
  input  logic                      m_rvalid,
  output logic                      m_rready,
  // second read port of the interconnect
  input  axi_ax_t                   aux_ar,
  input  logic                      aux_arvalid,
  output logic                      aux_arready,
  output logic [255:0]              aux_rdata,
  output logic [1:0]                aux_rresp,
  output logic                      aux_rlast,
  output logic                      aux_rvalid,
  input  logic                      aux_rready,
  output logic [1:0]                arb_delayed,
  // DDR3 command pins (command encoder of the memory controller)
  input  ddr3_cmd_e                 ddr_cmd,
  output logic                      ddr_cs_n,
  output logic                      ddr_ras_n,
  output logic                      ddr_cas_n,
  output logic                      ddr_we_n,
  output logic                      ddr_a10
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1;

  // register file
  logic        reg_wr_en;
  reg_idx_t    reg_wr_idx, reg_rd_idx;
  logic [31:0] reg_wr_data, reg_rd_data;
  dma_cfg_t    dma_cfg;
  logic        dma_rd_start, dma_wr_start, adc_trigger;
  logic [31:0] adc_sample_ctrl, adc_blk_len, irq_status;
  logic [NUM_ADC_CH-1:0][31:0] adc_start_blk;
  logic        rd_dma_done, wr_dma_done, daq_done, adc_busy;
  // ingress <-> egress
  logic        req_comp, comp_done;
  cpl_req_t    cpl_req;
  // ingress -> DMA
  logic [63:0] dw_data;
  logic        dw_valid, dw_last, dw_ready;
  // DMA read FIFO
  logic        f_wr, f_rd, f_full, f_empty;
  logic [63:0] f_wdata, f_rdata;
  logic [FCW-1:0] f_count;
  // DMA AXI
  axi_ax_t     d_aw, d_ar;
  logic        d_awvalid, d_awready, d_wvalid, d_wready, d_wlast, d_bvalid, d_bready;
  logic        d_arvalid, d_arready, d_rvalid, d_rready, d_rlast;
  logic [63:0] d_wdata, d_rdata;
  logic [7:0]  d_wstrb;
  logic [1:0]  d_bresp, d_rresp;
  // ADC AXI
  axi_ax_t     a_aw;
  logic        a_awvalid, a_awready, a_wvalid, a_wready, a_wlast, a_bvalid, a_bready;
  logic [255:0] a_wdata;
  logic [31:0] a_wstrb;
  logic [1:0]  a_bresp;
  logic        eg_busy, dma_busy, ic_rst_n;

  reg_file u_regs (
    .clk, .rst_n,
    .wr_en(reg_wr_en), .wr_idx(reg_wr_idx), .wr_data(reg_wr_data),
    .rd_idx(reg_rd_idx), .rd_data(reg_rd_data),
    .mem_init_done, .link_up, .bus_master_en, .adc_busy,
    .rd_dma_done, .wr_dma_done, .daq_done, .user_irq,
    .dma_cfg, .dma_rd_start, .dma_wr_start, .adc_trigger,
    .adc_sample_ctrl, .adc_start_blk, .adc_blk_len, .mem_reset, .irq_status, .irq
  );

  ingress u_ingress (
    .clk, .rst_n,
    .rx_tdata, .rx_tkeep, .rx_tlast, .rx_tvalid, .rx_tready,
    .reg_wr_en, .reg_wr_idx, .reg_wr_data,
    .reg_rd_idx, .req_comp, .cpl_req, .comp_done,
    .dma_wdata(dw_data), .dma_wvalid(dw_valid), .dma_wlast(dw_last), .dma_wready(dw_ready)
  );

  egress #(.FIFO_CW(FCW)) u_egress (
    .clk, .rst_n,
    .tx_tdata, .tx_tkeep, .tx_tlast, .tx_tvalid, .tx_tready, .completer_id,
    .req_comp, .cpl_req, .reg_rd_data, .comp_done,
    .dma_rd_start, .dma_wr_start, .dma_cfg, .rd_dma_done, .busy(eg_busy),
    .fifo_rdata(f_rdata), .fifo_count(f_count), .fifo_rd(f_rd)
  );

  sync_fifo #(.DW(64), .DEPTH(FIFO_DEPTH)) u_dma_read_fifo (
    .clk, .rst_n, .wr(f_wr), .wdata(f_wdata), .rd(f_rd), .rdata(f_rdata),
    .full(f_full), .empty(f_empty), .count(f_count)
  );

  dma_engine u_dma (
    .clk, .rst_n, .dma_rd_start, .dma_wr_start, .dma_cfg, .wr_dma_done, .busy(dma_busy),
    .in_wdata(dw_data), .in_wvalid(dw_valid), .in_wlast(dw_last), .in_wready(dw_ready),
    .fifo_wr(f_wr), .fifo_wdata(f_wdata), .fifo_full(f_full),
    .m_aw(d_aw), .m_awvalid(d_awvalid), .m_awready(d_awready),
    .m_wdata(d_wdata), .m_wstrb(d_wstrb), .m_wlast(d_wlast), .m_wvalid(d_wvalid),
    .m_wready(d_wready), .m_bresp(d_bresp), .m_bvalid(d_bvalid), .m_bready(d_bready),
    .m_ar(d_ar), .m_arvalid(d_arvalid), .m_arready(d_arready),
    .m_rdata(d_rdata), .m_rresp(d_rresp), .m_rlast(d_rlast), .m_rvalid(d_rvalid),
    .m_rready(d_rready)
  );

  adc_daq u_adc (
    .clk, .rst_n, .trigger(adc_trigger), .ch_enable(adc_sample_ctrl[NUM_ADC_CH-1:0]),
    .start_blk(adc_start_blk), .blk_len(adc_blk_len),
    .adc_data, .adc_valid, .busy(adc_busy), .daq_done, .dropped(adc_dropped),
    .m_aw(a_aw), .m_awvalid(a_awvalid), .m_awready(a_awready),
    .m_wdata(a_wdata), .m_wstrb(a_wstrb), .m_wlast(a_wlast), .m_wvalid(a_wvalid),
    .m_wready(a_wready), .m_bresp(a_bresp), .m_bvalid(a_bvalid), .m_bready(a_bready)
  );

  // Register 0x020 resets the interconnect (and, outside, the memory interface).
  assign ic_rst_n = rst_n && !mem_reset;

  axi_interconnect #(.ROUND_ROBIN(ROUND_ROBIN)) u_ic (
    .clk, .rst_n(ic_rst_n),
    .s0_aw(d_aw), .s0_awvalid(d_awvalid), .s0_awready(d_awready),
    .s0_wdata(d_wdata), .s0_wstrb(d_wstrb), .s0_wlast(d_wlast), .s0_wvalid(d_wvalid),
    .s0_wready(d_wready), .s0_bresp(d_bresp), .s0_bvalid(d_bvalid), .s0_bready(d_bready),
    .s0_ar(d_ar), .s0_arvalid(d_arvalid), .s0_arready(d_arready),
    .s0_rdata(d_rdata), .s0_rresp(d_rresp), .s0_rlast(d_rlast), .s0_rvalid(d_rvalid),
    .s0_rready(d_rready),
    .s1_aw(a_aw), .s1_awvalid(a_awvalid), .s1_awready(a_awready),
    .s1_wdata(a_wdata), .s1_wstrb(a_wstrb), .s1_wlast(a_wlast), .s1_wvalid(a_wvalid),
    .s1_wready(a_wready), .s1_bresp(a_bresp), .s1_bvalid(a_bvalid), .s1_bready(a_bready),
    .s1_ar(aux_ar), .s1_arvalid(aux_arvalid), .s1_arready(aux_arready),
    .s1_rdata(aux_rdata), .s1_rresp(aux_rresp), .s1_rlast(aux_rlast),
    .s1_rvalid(aux_rvalid), .s1_rready(aux_rready),
    .m_clk(mem_clk), .m_rst_n(mem_rst_n),
    .m_aw, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_ar, .m_arvalid, .m_arready, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .arb_delayed
  );

  ddr3_cmd_encoder u_cmd (
    .clk, .rst_n, .cmd(ddr_cmd),
    .cs_n(ddr_cs_n), .ras_n(ddr_ras_n), .cas_n(ddr_cas_n), .we_n(ddr_we_n), .a10(ddr_a10)
  );

  // Status kept for debug visibility only.
  logic unused_ok;
  assign unused_ok = ^{f_empty, eg_busy, dma_busy, irq_status, adc_sample_ctrl[31:NUM_ADC_CH]};

endmodule
