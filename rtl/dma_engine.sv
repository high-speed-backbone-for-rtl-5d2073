// dma_engine: bridge between the PCIe stream side and the memory-mapped AXI4 side.
//
// A state machine with the states of the DMA diagram in the document:
//   RST_STATE         samples address and length registers when a transfer starts
//   DMA_READ_TO_ROOT  (memory -> host) issues AR bursts of at most 128 bytes, the
//                     maximum PCIe payload, one per MWr packet egress will build;
//                     leaves when the last request has been accepted
//   DMA_W8_STATE      waits until pipe_counter, the number of bursts whose data has
//                     not fully arrived, is zero
//   DMA_AW_STATE      (host -> memory) sends one AW for the whole write length: a
//                     write never exceeds one burst
//   DMA_WR_FROM_ROOT  passes completion payload words from ingress to the W channel
//                     and leaves after the last beat
// Read data is accepted in every state and written into the DMA read FIFO; R is
// stalled while the FIFO is full. B responses are accepted at once; each one
// raises wr_dma_done (write-DMA-done interrupt). Start requests that arrive while
// a transfer runs are kept until the FSM is back in RST_STATE.
// The 64-bit data width, INCR bursts and 128-byte read bursts follow the document.
// Lengths are in bytes and must be a multiple of 8; wlast is generated from a beat
// count, so a completion that the host splits into several TLPs is still written
// as one burst. Those two points are this design's choices.
module dma_engine
  import ess_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dma_rd_start,
  input  logic        dma_wr_start,
  input  dma_cfg_t    dma_cfg,
  output logic        wr_dma_done,
  output logic        busy,
  // payload from ingress (DMA write)
  input  logic [63:0] in_wdata,
  input  logic        in_wvalid,
  input  logic        in_wlast,
  output logic        in_wready,
  // DMA read FIFO write side
  output logic        fifo_wr,
  output logic [63:0] fifo_wdata,
  input  logic        fifo_full,
  // AXI4 master, 64-bit
  output axi_ax_t     m_aw,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [63:0] m_wdata,
  output logic [7:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  output axi_ax_t     m_ar,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [63:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready
);

  typedef enum logic [2:0] {
    RST_STATE, DMA_READ_TO_ROOT, DMA_W8_STATE, DMA_AW_STATE, DMA_WR_FROM_ROOT
  } state_e;

  localparam int unsigned MPS = MAX_PAYLOAD_BYTES;

  state_e      state;
  logic        rd_pend, wr_pend;
  logic [31:0] addr;
  logic [31:0] remaining;
  logic [7:0]  wr_beats;       // beats - 1 of the write burst
  logic [7:0]  beat_cnt;
  logic [7:0]  pipe_counter;

  logic [31:0] burst_bytes;
  assign burst_bytes = (remaining > MPS) ? MPS : remaining;

  // ---------------------------------------------------------------- AXI outputs
  always_comb begin
    m_ar.addr  = addr;
    m_ar.len   = 8'((burst_bytes >> 3) - 1);
    m_ar.size  = 3'd3;
    m_ar.burst = AXI_BURST_INCR;
    m_arvalid  = (state == DMA_READ_TO_ROOT);

    m_aw.addr  = addr;
    m_aw.len   = wr_beats;
    m_aw.size  = 3'd3;
    m_aw.burst = AXI_BURST_INCR;
    m_awvalid  = (state == DMA_AW_STATE);

    m_wdata    = in_wdata;
    m_wstrb    = 8'hFF;
    m_wlast    = (beat_cnt == wr_beats);
    m_wvalid   = (state == DMA_WR_FROM_ROOT) && in_wvalid;
    in_wready  = (state == DMA_WR_FROM_ROOT) && m_wready;
  end

  assign m_rready   = !fifo_full;
  assign fifo_wr    = m_rvalid && m_rready;
  assign fifo_wdata = m_rdata;
  assign m_bready   = 1'b1;
  assign busy       = (state != RST_STATE) || rd_pend || wr_pend;

  logic ar_go, r_last_go, w_go;
  assign ar_go     = m_arvalid && m_arready;
  assign r_last_go = m_rvalid && m_rready && m_rlast;
  assign w_go      = m_wvalid && m_wready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= RST_STATE;
      rd_pend      <= 1'b0;
      wr_pend      <= 1'b0;
      addr         <= '0;
      remaining    <= '0;
      wr_beats     <= '0;
      beat_cnt     <= '0;
      pipe_counter <= '0;
      wr_dma_done  <= 1'b0;
    end else begin
      wr_dma_done <= m_bvalid;
      if (dma_rd_start) rd_pend <= 1'b1;
      if (dma_wr_start) wr_pend <= 1'b1;
      pipe_counter <= pipe_counter + 8'(ar_go) - 8'(r_last_go);

      unique case (state)
        RST_STATE: begin
          if (rd_pend) begin
            rd_pend   <= 1'b0;
            addr      <= dma_cfg.rd_mem_addr;
            remaining <= dma_cfg.rd_len;
            state     <= (dma_cfg.rd_len != 0) ? DMA_READ_TO_ROOT : RST_STATE;
          end else if (wr_pend) begin
            wr_pend   <= 1'b0;
            addr      <= dma_cfg.wr_mem_addr;
            wr_beats  <= 8'((dma_cfg.wr_len >> 3) - 1);
            beat_cnt  <= '0;
            state     <= (dma_cfg.wr_len != 0) ? DMA_AW_STATE : RST_STATE;
          end
        end
        DMA_READ_TO_ROOT: begin
          if (ar_go) begin
            addr      <= addr + MPS;
            remaining <= remaining - burst_bytes;
            if (remaining <= MPS) state <= DMA_W8_STATE;
          end
        end
        DMA_W8_STATE: begin
          if (pipe_counter == 0) state <= RST_STATE;
        end
        DMA_AW_STATE: begin
          if (m_awready) state <= DMA_WR_FROM_ROOT;
        end
        DMA_WR_FROM_ROOT: begin
          if (w_go) begin
            beat_cnt <= beat_cnt + 8'd1;
            if (m_wlast) state <= RST_STATE;
          end
        end
        default: state <= RST_STATE;
      endcase
    end
  end

  // Response codes are not reported to software; ingress' end-of-packet flag is
  // not needed because the burst length is known.
  logic unused_ok;
  assign unused_ok = ^{m_bresp, m_rresp, in_wlast};

endmodule
