// axi_clock_converter: carries a 256-bit AXI4 port from one clock to another.
//
// The interconnect works on the PCIe user clock, while the memory interface takes
// its AXI port on a clock twice as fast. Each of the five AXI channels crosses in
// its own async_fifo, in the direction the channel flows: AW, W and AR from the
// slave side (s_clk) to the master side (m_clk), B and R back. A channel is valid
// on the far side while its FIFO is not empty, and ready on the near side while
// its FIFO is not full, so the handshakes on both sides follow the AXI rules and
// no ready depends on a valid. Latency is a few cycles of the receiving clock per
// channel; with FIFOs of 8 entries a burst streams without gaps once started.
// Reset: the master side is reset by s_rst_n brought into m_clk through two flops,
// so one reset (which register 0x020 also drives) clears both halves. The master
// side leaves reset two m_clk cycles after the slave side and also enters it that
// much later, so the reset should be applied while the port is idle: in the middle
// of a burst the two halves can briefly disagree on the FIFO contents.
// The 1:2 clock ratio is the document's; the FIFO-based converter is this
// design's own, since the document uses the vendor interconnect's converter.
module axi_clock_converter
  import ess_pkg::*;
#(
  parameter int unsigned DW = 256,
  parameter int unsigned AW = 3
) (
  // slave side (interconnect clock)
  input  logic            s_clk,
  input  logic            s_rst_n,
  input  axi_ax_t         s_aw,
  input  logic            s_awvalid,
  output logic            s_awready,
  input  logic [DW-1:0]   s_wdata,
  input  logic [DW/8-1:0] s_wstrb,
  input  logic            s_wlast,
  input  logic            s_wvalid,
  output logic            s_wready,
  output logic [1:0]      s_bresp,
  output logic            s_bvalid,
  input  logic            s_bready,
  input  axi_ax_t         s_ar,
  input  logic            s_arvalid,
  output logic            s_arready,
  output logic [DW-1:0]   s_rdata,
  output logic [1:0]      s_rresp,
  output logic            s_rlast,
  output logic            s_rvalid,
  input  logic            s_rready,
  // master side (memory clock)
  input  logic            m_clk,
  output logic            m_rst_n,
  output axi_ax_t         m_aw,
  output logic            m_awvalid,
  input  logic            m_awready,
  output logic [DW-1:0]   m_wdata,
  output logic [DW/8-1:0] m_wstrb,
  output logic            m_wlast,
  output logic            m_wvalid,
  input  logic            m_wready,
  input  logic [1:0]      m_bresp,
  input  logic            m_bvalid,
  output logic            m_bready,
  output axi_ax_t         m_ar,
  output logic            m_arvalid,
  input  logic            m_arready,
  input  logic [DW-1:0]   m_rdata,
  input  logic [1:0]      m_rresp,
  input  logic            m_rlast,
  input  logic            m_rvalid,
  output logic            m_rready
);

  localparam int unsigned AXW = $bits(axi_ax_t);
  localparam int unsigned WW  = DW + DW/8 + 1;
  localparam int unsigned RW  = DW + 2 + 1;

  // master-side reset, synchronized to m_clk
  logic [1:0] m_rst_sync;
  always_ff @(posedge m_clk) m_rst_sync <= {m_rst_sync[0], s_rst_n};
  assign m_rst_n = m_rst_sync[1];

  logic aw_full, aw_empty, w_full, w_empty, b_full, b_empty, ar_full, ar_empty, r_full, r_empty;
  logic [AXW-1:0] aw_q, ar_q;
  logic [WW-1:0]  w_q;
  logic [RW-1:0]  r_q;

  async_fifo #(.DW(AXW), .AW(AW)) u_aw (
    .wclk(s_clk), .wrst_n(s_rst_n), .wr(s_awvalid), .wdata(s_aw), .full(aw_full),
    .rclk(m_clk), .rrst_n(m_rst_n), .rd(m_awready), .rdata(aw_q), .empty(aw_empty));
  assign s_awready = !aw_full;
  assign m_awvalid = !aw_empty;
  assign m_aw      = axi_ax_t'(aw_q);

  async_fifo #(.DW(WW), .AW(AW)) u_w (
    .wclk(s_clk), .wrst_n(s_rst_n), .wr(s_wvalid), .wdata({s_wlast, s_wstrb, s_wdata}), .full(w_full),
    .rclk(m_clk), .rrst_n(m_rst_n), .rd(m_wready), .rdata(w_q), .empty(w_empty));
  assign s_wready = !w_full;
  assign m_wvalid = !w_empty;
  assign {m_wlast, m_wstrb, m_wdata} = w_q;

  async_fifo #(.DW(2), .AW(AW)) u_b (
    .wclk(m_clk), .wrst_n(m_rst_n), .wr(m_bvalid), .wdata(m_bresp), .full(b_full),
    .rclk(s_clk), .rrst_n(s_rst_n), .rd(s_bready), .rdata(s_bresp), .empty(b_empty));
  assign m_bready = !b_full;
  assign s_bvalid = !b_empty;

  async_fifo #(.DW(AXW), .AW(AW)) u_ar (
    .wclk(s_clk), .wrst_n(s_rst_n), .wr(s_arvalid), .wdata(s_ar), .full(ar_full),
    .rclk(m_clk), .rrst_n(m_rst_n), .rd(m_arready), .rdata(ar_q), .empty(ar_empty));
  assign s_arready = !ar_full;
  assign m_arvalid = !ar_empty;
  assign m_ar      = axi_ax_t'(ar_q);

  async_fifo #(.DW(RW), .AW(AW)) u_r (
    .wclk(m_clk), .wrst_n(m_rst_n), .wr(m_rvalid), .wdata({m_rlast, m_rresp, m_rdata}), .full(r_full),
    .rclk(s_clk), .rrst_n(s_rst_n), .rd(s_rready), .rdata(r_q), .empty(r_empty));
  assign m_rready = !r_full;
  assign s_rvalid = !r_empty;
  assign {s_rlast, s_rresp, s_rdata} = r_q;

endmodule
