// axi_interconnect: joins the DMA and the ADC writer to the single memory port.
//
// Port S0 is the DMA's 64-bit AXI4 master; port S1 is a 256-bit AXI4 master (the
// ADC writer on the write side; its read side is free for a second reader). The
// master port M is the 256-bit AXI4 slave of the DDR3 memory interface.
// S0 goes through a width converter in each direction (axi_upsizer for AW/W/B,
// axi_downsizer for AR/R) so that 64-bit beats are packed into, and unpacked
// from, 256-bit memory beats. Both ports then meet in axi_arbiter, which grants
// the memory to one master at a time per direction (round robin by default, or a
// fixed priority).
// The granted port then crosses from the interconnect clock (clk, the 125 MHz
// PCIe user clock) to the memory clock (m_clk, 250 MHz in the document: a 1:2
// ratio) in axi_clock_converter. Everything up to the converter runs on clk; the
// M port runs on m_clk, and m_rst_n is rst_n synchronized to m_clk.
// The width conversion, arbitration and 1:2 clock conversion are the document's;
// how each is built (FIFO-based crossing, round robin per direction) is this
// design's own, as the document uses the vendor's interconnect for them.
module axi_interconnect
  import ess_pkg::*;
#(
  parameter bit          ROUND_ROBIN = 1'b1,
  parameter int unsigned PRIO_MASTER = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // S0: 64-bit (DMA)
  input  axi_ax_t      s0_aw,
  input  logic         s0_awvalid,
  output logic         s0_awready,
  input  logic [63:0]  s0_wdata,
  input  logic [7:0]   s0_wstrb,
  input  logic         s0_wlast,
  input  logic         s0_wvalid,
  output logic         s0_wready,
  output logic [1:0]   s0_bresp,
  output logic         s0_bvalid,
  input  logic         s0_bready,
  input  axi_ax_t      s0_ar,
  input  logic         s0_arvalid,
  output logic         s0_arready,
  output logic [63:0]  s0_rdata,
  output logic [1:0]   s0_rresp,
  output logic         s0_rlast,
  output logic         s0_rvalid,
  input  logic         s0_rready,
  // S1: 256-bit (ADC writer)
  input  axi_ax_t      s1_aw,
  input  logic         s1_awvalid,
  output logic         s1_awready,
  input  logic [255:0] s1_wdata,
  input  logic [31:0]  s1_wstrb,
  input  logic         s1_wlast,
  input  logic         s1_wvalid,
  output logic         s1_wready,
  output logic [1:0]   s1_bresp,
  output logic         s1_bvalid,
  input  logic         s1_bready,
  input  axi_ax_t      s1_ar,
  input  logic         s1_arvalid,
  output logic         s1_arready,
  output logic [255:0] s1_rdata,
  output logic [1:0]   s1_rresp,
  output logic         s1_rlast,
  output logic         s1_rvalid,
  input  logic         s1_rready,
  // M: 256-bit to the memory interface, on the memory clock
  input  logic         m_clk,
  output logic         m_rst_n,
  output axi_ax_t      m_aw,
  output logic         m_awvalid,
  input  logic         m_awready,
  output logic [255:0] m_wdata,
  output logic [31:0]  m_wstrb,
  output logic         m_wlast,
  output logic         m_wvalid,
  input  logic         m_wready,
  input  logic [1:0]   m_bresp,
  input  logic         m_bvalid,
  output logic         m_bready,
  output axi_ax_t      m_ar,
  output logic         m_arvalid,
  input  logic         m_arready,
  input  logic [255:0] m_rdata,
  input  logic [1:0]   m_rresp,
  input  logic         m_rlast,
  input  logic         m_rvalid,
  output logic         m_rready,
  output logic [1:0]   arb_delayed
);

  // S0 after width conversion
  axi_ax_t      w0_aw, w0_ar;
  logic         w0_awvalid, w0_awready, w0_wvalid, w0_wready, w0_wlast;
  logic [255:0] w0_wdata;
  logic [31:0]  w0_wstrb;
  logic [1:0]   w0_bresp;
  logic         w0_bvalid, w0_bready;
  logic         w0_arvalid, w0_arready, w0_rvalid, w0_rready;

  logic [1:0]   a_bresp, a_rresp;
  logic [255:0] a_rdata;
  logic         a_rlast;
  logic [1:0]   a_bvalid, a_rvalid;

  axi_upsizer u_up (
    .clk, .rst_n,
    .s_aw(s0_aw), .s_awvalid(s0_awvalid), .s_awready(s0_awready),
    .s_wdata(s0_wdata), .s_wstrb(s0_wstrb), .s_wlast(s0_wlast),
    .s_wvalid(s0_wvalid), .s_wready(s0_wready),
    .s_bresp(s0_bresp), .s_bvalid(s0_bvalid), .s_bready(s0_bready),
    .m_aw(w0_aw), .m_awvalid(w0_awvalid), .m_awready(w0_awready),
    .m_wdata(w0_wdata), .m_wstrb(w0_wstrb), .m_wlast(w0_wlast),
    .m_wvalid(w0_wvalid), .m_wready(w0_wready),
    .m_bresp(w0_bresp), .m_bvalid(w0_bvalid), .m_bready(w0_bready)
  );

  axi_downsizer u_down (
    .clk, .rst_n,
    .s_ar(s0_ar), .s_arvalid(s0_arvalid), .s_arready(s0_arready),
    .s_rdata(s0_rdata), .s_rresp(s0_rresp), .s_rlast(s0_rlast),
    .s_rvalid(s0_rvalid), .s_rready(s0_rready),
    .m_ar(w0_ar), .m_arvalid(w0_arvalid), .m_arready(w0_arready),
    .m_rdata(a_rdata), .m_rresp(a_rresp), .m_rlast(a_rlast),
    .m_rvalid(a_rvalid[0]), .m_rready(w0_rready)
  );

  assign w0_bresp  = a_bresp;
  assign w0_bvalid = a_bvalid[0];
  assign s1_bresp  = a_bresp;
  assign s1_bvalid = a_bvalid[1];
  assign s1_rdata  = a_rdata;
  assign s1_rresp  = a_rresp;
  assign s1_rlast  = a_rlast;
  assign s1_rvalid = a_rvalid[1];
  assign w0_rvalid = a_rvalid[0];

  // arbiter output, still on clk
  axi_ax_t      c_aw, c_ar;
  logic         c_awvalid, c_awready, c_wlast, c_wvalid, c_wready, c_bvalid, c_bready;
  logic         c_arvalid, c_arready, c_rlast, c_rvalid, c_rready;
  logic [255:0] c_wdata, c_rdata;
  logic [31:0]  c_wstrb;
  logic [1:0]   c_bresp, c_rresp;

  axi_arbiter #(.DW(256), .ROUND_ROBIN(ROUND_ROBIN), .PRIO_MASTER(PRIO_MASTER)) u_arb (
    .clk, .rst_n,
    .s_aw({s1_aw, w0_aw}), .s_awvalid({s1_awvalid, w0_awvalid}),
    .s_awready({s1_awready, w0_awready}),
    .s_wdata({s1_wdata, w0_wdata}), .s_wstrb({s1_wstrb, w0_wstrb}),
    .s_wlast({s1_wlast, w0_wlast}), .s_wvalid({s1_wvalid, w0_wvalid}),
    .s_wready({s1_wready, w0_wready}),
    .s_bvalid(a_bvalid), .s_bready({s1_bready, w0_bready}),
    .s_ar({s1_ar, w0_ar}), .s_arvalid({s1_arvalid, w0_arvalid}),
    .s_arready({s1_arready, w0_arready}),
    .s_rvalid(a_rvalid), .s_rready({s1_rready, w0_rready}),
    .s_bresp(a_bresp), .s_rdata(a_rdata), .s_rresp(a_rresp), .s_rlast(a_rlast),
    .m_aw(c_aw), .m_awvalid(c_awvalid), .m_awready(c_awready),
    .m_wdata(c_wdata), .m_wstrb(c_wstrb), .m_wlast(c_wlast), .m_wvalid(c_wvalid),
    .m_wready(c_wready), .m_bresp(c_bresp), .m_bvalid(c_bvalid), .m_bready(c_bready),
    .m_ar(c_ar), .m_arvalid(c_arvalid), .m_arready(c_arready),
    .m_rdata(c_rdata), .m_rresp(c_rresp), .m_rlast(c_rlast), .m_rvalid(c_rvalid),
    .m_rready(c_rready),
    .delayed(arb_delayed)
  );

  axi_clock_converter #(.DW(256)) u_cc (
    .s_clk(clk), .s_rst_n(rst_n),
    .s_aw(c_aw), .s_awvalid(c_awvalid), .s_awready(c_awready),
    .s_wdata(c_wdata), .s_wstrb(c_wstrb), .s_wlast(c_wlast), .s_wvalid(c_wvalid),
    .s_wready(c_wready), .s_bresp(c_bresp), .s_bvalid(c_bvalid), .s_bready(c_bready),
    .s_ar(c_ar), .s_arvalid(c_arvalid), .s_arready(c_arready),
    .s_rdata(c_rdata), .s_rresp(c_rresp), .s_rlast(c_rlast), .s_rvalid(c_rvalid),
    .s_rready(c_rready),
    .m_clk, .m_rst_n,
    .m_aw, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_ar, .m_arvalid, .m_arready, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready
  );

  logic unused_ok;
  assign unused_ok = w0_rvalid;

endmodule
