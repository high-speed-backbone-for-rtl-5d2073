// egress: transmit-side transaction layer of the PCIe endpoint.
//
// Builds every upstream TLP on the 64-bit AXI4-Stream to the PCIe core. Three jobs,
// as in the egress state diagram of the document:
//   Completion  RST_STATE sends {DW1, DW0} of a CplD as soon as ingress raises
//               req_comp; CPL_STATE_QWS sends {register data, DW2} and pulses
//               comp_done. The register file is addressed while in RST_STATE, so a
//               register read costs no wait cycle when the core is ready.
//   DMA read    (memory -> host, started by writing 0x1 to 0x204, DMA_SEL = 0)
//               Each MWr carries at most 128 bytes (the maximum payload size). In
//               DMA_TRAN_H1 the FSM waits until the DMA read FIFO holds the whole
//               payload, then sends {DW1, DW0}; DMA_TRAN_H2 sends {data DW0, DW2};
//               DMA_TRAN_QWS streams the rest. Because of the 3-DW header every
//               payload ends in a half-filled beat; for all but the last packet
//               that beat is sent from BUBBLE_STATE, which then returns to
//               DMA_TRAN_H1 with the host address advanced by 128 bytes. After the
//               last packet rd_dma_done asks for the read-DMA-done interrupt.
//               A 128-byte packet takes 18 beats, so back-to-back packets leave
//               every 18 cycles.
//   DMA write   (host -> memory, started by writing 0x1 to 0x214, DMA_SEL = 1)
//               One MRd for the whole write length is sent from DMA_TRAN_H1 and
//               DMA_TRAN_H2 to the host buffer; the completion comes back through
//               ingress.
// Start requests are remembered until the FSM is free; a pending completion is
// served first. Register 0x205 bit 0 swaps the two bytes of every 16-bit sample
// on the way out; the lane order of the swap is this design's choice.
// tx_tvalid and the beat contents depend only on registered state and the FIFO
// count, never on tx_tready.
module egress
  import ess_pkg::*;
#(
  parameter int unsigned FIFO_CW = 10          // width of the FIFO fill count
) (
  input  logic        clk,
  input  logic        rst_n,
  // to the PCIe core (AXI4-Stream, endpoint transmit)
  output logic [63:0] tx_tdata,
  output logic [7:0]  tx_tkeep,
  output logic        tx_tlast,
  output logic        tx_tvalid,
  input  logic        tx_tready,
  input  logic [15:0] completer_id,      // bus/device/function of this endpoint
  // register read completions
  input  logic        req_comp,
  input  cpl_req_t    cpl_req,
  input  logic [31:0] reg_rd_data,
  output logic        comp_done,
  // DMA control
  input  logic        dma_rd_start,
  input  logic        dma_wr_start,
  input  dma_cfg_t    dma_cfg,
  output logic        rd_dma_done,
  output logic        busy,
  // DMA read FIFO (first-word-fall-through)
  input  logic [63:0] fifo_rdata,
  input  logic [FIFO_CW-1:0] fifo_count,
  output logic        fifo_rd
);

  typedef enum logic [2:0] {
    RST_STATE, CPL_STATE_QWS, DMA_TRAN_H1, DMA_TRAN_H2, DMA_TRAN_QWS, BUBBLE_STATE
  } state_e;

  localparam int unsigned MPS = MAX_PAYLOAD_BYTES;

  state_e      state;
  logic        dma_sel;            // 0: DMA read (MWr upstream), 1: DMA write (MRd)
  logic        rd_pend, wr_pend;
  logic [31:0] host_addr;
  logic [31:0] remaining;          // bytes of the DMA read not yet packetised
  logic [31:0] wr_len;
  logic [4:0]  words_left;         // FIFO words still to read in this packet
  logic [31:0] held_dw;
  logic        final_pkt;

  // Size of the next MWr payload
  logic [31:0] pkt_bytes;
  logic [7:0]  pkt_words;
  assign pkt_bytes = (remaining > MPS) ? MPS : remaining;
  assign pkt_words = 8'(pkt_bytes >> 3);

  logic dma_valid;
  assign dma_valid = ({{(32-FIFO_CW){1'b0}}, fifo_count} >= {24'b0, pkt_words});

  // Sample byte swap
  logic [63:0] fifo_word;
  always_comb begin
    fifo_word = fifo_rdata;
    if (dma_cfg.rd_swap)
      for (int h = 0; h < 4; h++)
        fifo_word[16*h +: 16] = {fifo_rdata[16*h +: 8], fifo_rdata[16*h+8 +: 8]};
  end

  // ------------------------------------------------------------ header words
  tlp_dw0_t     mwr_dw0, mrd_dw0, cpl_dw0;
  tlp_req_dw1_t mwr_dw1, mrd_dw1;
  tlp_cpl_dw1_t cpl_dw1;
  tlp_cpl_dw2_t cpl_dw2;

  always_comb begin
    mwr_dw0 = '0;
    mwr_dw0.fmt    = FMT_3DW_DATA;
    mwr_dw0.typ    = FT_MWR32[4:0];
    mwr_dw0.length = 10'(pkt_bytes >> 2);
    mwr_dw1 = '{requester_id: completer_id, tag: 8'h00,
                last_be: (pkt_bytes > 4) ? 4'hF : 4'h0, first_be: 4'hF};

    mrd_dw0 = '0;
    mrd_dw0.fmt    = FMT_3DW_NODATA;
    mrd_dw0.typ    = FT_MRD32[4:0];
    mrd_dw0.length = 10'(wr_len >> 2);
    mrd_dw1 = '{requester_id: completer_id, tag: 8'h00,
                last_be: (wr_len > 4) ? 4'hF : 4'h0, first_be: 4'hF};

    cpl_dw0 = '0;
    cpl_dw0.fmt    = FMT_3DW_DATA;
    cpl_dw0.typ    = FT_CPLD[4:0];
    cpl_dw0.tc     = cpl_req.tc;
    cpl_dw0.attr   = cpl_req.attr;
    cpl_dw0.length = 10'd1;
    cpl_dw1 = '{completer_id: completer_id, status: 3'b000, bcm: 1'b0, byte_count: 12'd4};
    cpl_dw2 = '{requester_id: cpl_req.requester_id, tag: cpl_req.tag, r: 1'b0,
                lower_addr: cpl_req.lower_addr};
  end

  // ------------------------------------------------------------ beat contents
  always_comb begin
    tx_tvalid = 1'b0;
    tx_tdata  = '0;
    tx_tkeep  = 8'hFF;
    tx_tlast  = 1'b0;
    fifo_rd   = 1'b0;
    unique case (state)
      RST_STATE: begin
        tx_tvalid = req_comp;
        tx_tdata  = {cpl_dw1, cpl_dw0};
      end
      CPL_STATE_QWS: begin
        tx_tvalid = 1'b1;
        tx_tdata  = {reg_rd_data, cpl_dw2};
        tx_tlast  = 1'b1;
      end
      DMA_TRAN_H1: begin
        tx_tvalid = dma_sel || dma_valid;
        tx_tdata  = dma_sel ? {mrd_dw1, mrd_dw0} : {mwr_dw1, mwr_dw0};
      end
      DMA_TRAN_H2: begin
        tx_tvalid = 1'b1;
        if (dma_sel) begin
          tx_tdata = {32'h0, host_addr[31:2], 2'b00};
          tx_tkeep = 8'h0F;
          tx_tlast = 1'b1;
        end else begin
          tx_tdata = {fifo_word[31:0], host_addr[31:2], 2'b00};
          fifo_rd  = tx_tready;
        end
      end
      DMA_TRAN_QWS: begin
        tx_tvalid = 1'b1;
        if (words_left != 0) begin
          tx_tdata = {fifo_word[31:0], held_dw};
          fifo_rd  = tx_tready;
        end else begin
          tx_tdata = {32'h0, held_dw};
          tx_tkeep = 8'h0F;
          tx_tlast = 1'b1;
        end
      end
      BUBBLE_STATE: begin
        tx_tvalid = 1'b1;
        tx_tdata  = {32'h0, held_dw};
        tx_tkeep  = 8'h0F;
        tx_tlast  = 1'b1;
      end
      default: ;
    endcase
  end

  logic go;
  assign go = tx_tvalid && tx_tready;
  assign comp_done = (state == CPL_STATE_QWS) && go;
  assign busy = (state != RST_STATE) || rd_pend || wr_pend;

  // ------------------------------------------------------------ state machine
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= RST_STATE;
      dma_sel     <= 1'b0;
      rd_pend     <= 1'b0;
      wr_pend     <= 1'b0;
      host_addr   <= '0;
      remaining   <= '0;
      wr_len      <= '0;
      words_left  <= '0;
      held_dw     <= '0;
      final_pkt   <= 1'b0;
      rd_dma_done <= 1'b0;
    end else begin
      rd_dma_done <= 1'b0;
      if (dma_rd_start) rd_pend <= 1'b1;
      if (dma_wr_start) wr_pend <= 1'b1;

      unique case (state)
        RST_STATE: begin
          if (req_comp) begin
            if (go) state <= CPL_STATE_QWS;
          end else if (rd_pend) begin
            rd_pend   <= 1'b0;
            dma_sel   <= 1'b0;
            host_addr <= dma_cfg.rd_host_addr;
            remaining <= dma_cfg.rd_len;
            state     <= (dma_cfg.rd_len != 0) ? DMA_TRAN_H1 : RST_STATE;
            if (dma_cfg.rd_len == 0) rd_dma_done <= 1'b1;
          end else if (wr_pend) begin
            wr_pend   <= 1'b0;
            dma_sel   <= 1'b1;
            host_addr <= dma_cfg.wr_host_addr;
            wr_len    <= dma_cfg.wr_len;
            state     <= DMA_TRAN_H1;
          end
        end
        CPL_STATE_QWS: if (go) state <= RST_STATE;
        DMA_TRAN_H1: begin
          if (go) begin
            state      <= DMA_TRAN_H2;
            words_left <= 5'(pkt_words);
            final_pkt  <= (remaining <= MPS);
          end
        end
        DMA_TRAN_H2: begin
          if (go) begin
            if (dma_sel) begin
              state <= RST_STATE;
            end else begin
              state      <= DMA_TRAN_QWS;
              held_dw    <= fifo_word[63:32];
              words_left <= words_left - 5'd1;
              remaining  <= remaining - pkt_bytes;
              host_addr  <= host_addr + MPS;
            end
          end
        end
        DMA_TRAN_QWS: begin
          if (go) begin
            if (words_left != 0) begin
              held_dw    <= fifo_word[63:32];
              words_left <= words_left - 5'd1;
              if (words_left == 5'd1 && !final_pkt) state <= BUBBLE_STATE;
            end else begin
              state       <= RST_STATE;
              rd_dma_done <= 1'b1;
            end
          end
        end
        BUBBLE_STATE: if (go) state <= DMA_TRAN_H1;
        default: state <= RST_STATE;
      endcase
    end
  end

endmodule
