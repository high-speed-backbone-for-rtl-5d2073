// ingress: receive-side transaction layer of the PCIe endpoint.
//
// Watches the 64-bit AXI4-Stream from the PCIe core and decodes each TLP header on
// its first beat. Three kinds of packet are acted on; every other packet is drained
// and ignored:
//   MWr, 3-DW header, 1 DW   -> register write (reg_wr_en/idx/data), then W8_STATE
//                               until the write has been taken (write_busy low)
//   MRd, 3-DW header         -> register read: the register index goes to the
//                               register file and the request fields to egress
//                               (req_comp); W8_STATE until egress reports comp_done
//   CplD                     -> DMA_RECEIVE_DATA: the payload of a completion to an
//                               earlier DMA-write read request is realigned from the
//                               3-DW-header offset to whole 64-bit words and passed
//                               to the DMA engine until its last word (DMA_fin)
// States and triggers follow the ingress state diagram of the document; the MWr
// trigger uses the table value {fmt,type} = 0x40 (see ess_pkg). The stream is
// stalled (rx_tready low) while in W8_STATE and whenever the DMA engine cannot take
// a payload word. Payload lengths must be a whole number of 64-bit words.
//
// Beat layout: beat 0 = {DW1, DW0}; beat 1 = {first payload DW, DW2 (address)}.
// Timing: a register write reaches the register file one cycle after its second
// beat; a payload word reaches the DMA one cycle after it arrives on rx.
module ingress
  import ess_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the PCIe core (AXI4-Stream, endpoint receive)
  input  logic [63:0] rx_tdata,
  input  logic [7:0]  rx_tkeep,
  input  logic        rx_tlast,
  input  logic        rx_tvalid,
  output logic        rx_tready,
  // register write port
  output logic        reg_wr_en,
  output reg_idx_t    reg_wr_idx,
  output logic [31:0] reg_wr_data,
  // register read request towards egress
  output reg_idx_t    reg_rd_idx,
  output logic        req_comp,
  output cpl_req_t    cpl_req,
  input  logic        comp_done,
  // DMA write payload towards the DMA engine
  output logic [63:0] dma_wdata,
  output logic        dma_wvalid,
  output logic        dma_wlast,
  input  logic        dma_wready
);

  typedef enum logic [2:0] {
    RST_STATE, MEM_WR32, MEM_RD32, W8_STATE, DMA_RECEIVE_DATA
  } state_e;

  state_e   state;
  logic     in_pkt;        // a beat that is not the first of a TLP
  logic     write_busy;
  logic     first_data;    // next CplD beat is the one holding DW2
  logic [31:0] held_dw;

  tlp_dw0_t     dw0;
  tlp_req_dw1_t dw1;
  logic [6:0]   ft;
  logic         sop;

  assign dw0 = tlp_dw0_t'(rx_tdata[31:0]);
  assign dw1 = tlp_req_dw1_t'(rx_tdata[63:32]);
  assign ft  = {dw0.fmt, dw0.typ};
  assign sop = !in_pkt;

  // Handshake on the stream in the current state
  always_comb begin
    unique case (state)
      W8_STATE:         rx_tready = 1'b0;
      DMA_RECEIVE_DATA: rx_tready = first_data ? 1'b1 : dma_wready;
      default:          rx_tready = 1'b1;
    endcase
  end

  logic beat;
  assign beat = rx_tvalid && rx_tready;

  // Realigned payload: {low DW of this beat, high DW of the previous beat}
  assign dma_wdata  = {rx_tdata[31:0], held_dw};
  assign dma_wvalid = (state == DMA_RECEIVE_DATA) && !first_data && rx_tvalid;
  assign dma_wlast  = rx_tlast;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= RST_STATE;
      in_pkt     <= 1'b0;
      write_busy <= 1'b0;
      first_data <= 1'b0;
      held_dw    <= '0;
      reg_wr_en  <= 1'b0;
      reg_wr_idx <= '0;
      reg_wr_data<= '0;
      reg_rd_idx <= '0;
      req_comp   <= 1'b0;
      cpl_req    <= '0;
    end else begin
      reg_wr_en <= 1'b0;
      if (beat) in_pkt <= !rx_tlast;

      unique case (state)
        RST_STATE: begin
          if (beat && sop) begin
            if (ft == FT_CPLD) begin
              state      <= DMA_RECEIVE_DATA;
              first_data <= 1'b1;
            end else if (ft == FT_MWR32 && dw0.length == 10'd1) begin
              state <= MEM_WR32;
            end else if (ft == FT_MRD32) begin
              state <= MEM_RD32;
              cpl_req.requester_id <= dw1.requester_id;
              cpl_req.tag          <= dw1.tag;
              cpl_req.tc           <= dw0.tc;
              cpl_req.attr         <= dw0.attr;
            end
          end
        end
        MEM_WR32: begin
          if (beat) begin
            reg_wr_en   <= 1'b1;
            reg_wr_idx  <= rx_tdata[REG_AW+1:2];
            reg_wr_data <= rx_tdata[63:32];
            write_busy  <= 1'b1;
            state       <= W8_STATE;
          end
        end
        MEM_RD32: begin
          if (beat) begin
            reg_rd_idx         <= rx_tdata[REG_AW+1:2];
            cpl_req.lower_addr <= {rx_tdata[6:2], 2'b00};
            req_comp           <= 1'b1;
            state              <= W8_STATE;
          end
        end
        W8_STATE: begin
          // The register file takes a write in one cycle.
          write_busy <= 1'b0;
          if (comp_done) req_comp <= 1'b0;
          if ((write_busy && !req_comp) || comp_done) state <= RST_STATE;
        end
        DMA_RECEIVE_DATA: begin
          if (beat) begin
            held_dw    <= rx_tdata[63:32];
            first_data <= 1'b0;
            if (rx_tlast) state <= RST_STATE;   // DMA_fin
          end
        end
        default: state <= RST_STATE;
      endcase
    end
  end

  // Byte enables of the stream are not needed: only whole-DW accesses are used.
  logic unused_ok;
  assign unused_ok = ^{rx_tkeep, dw0.r0, dw0.r1, dw0.r2, dw0.td, dw0.ep, dw0.at,
                       dw1.last_be, dw1.first_be};

endmodule
