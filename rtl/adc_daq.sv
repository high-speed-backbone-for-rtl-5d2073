// adc_daq: writes ADC samples into DDR3 memory through the interconnect.
//
// An acquisition starts with a write of 0x1 to register 0x010 (trigger). For each
// of `blk_len` blocks (register 0x12A) the writer collects 16 consecutive 16-bit
// samples from every channel on the common sample strobe, which fills one 256-bit
// block per channel (sample i in bits [16i+15:16i]). It then writes the block of
// each active channel (register 0x011 bits [9:0]) with a single-beat 256-bit AXI4
// write to byte address (start block address of the channel + block number) * 32,
// start addresses coming from registers 0x120-0x129. After the last block it
// pulses daq_done (DAQ-done interrupt, status bit 14).
// Samples that arrive while blocks are being written are not stored; they are
// counted in `dropped`. Write latency therefore sets the gap between blocks.
// The registers, the 256-bit block unit and the IRQ bit follow the document; how
// samples are packed, the channel-enable bits, the channel-by-channel write order
// and the single-beat writes are this design's choices, since the document gives
// the function of the ADC path but not its insides.
module adc_daq
  import ess_pkg::*;
#(
  parameter int unsigned NCH = NUM_ADC_CH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    trigger,
  input  logic [NCH-1:0]          ch_enable,
  input  logic [NCH-1:0][31:0]    start_blk,
  input  logic [31:0]             blk_len,
  input  logic [NCH-1:0][15:0]    adc_data,
  input  logic                    adc_valid,
  output logic                    busy,
  output logic                    daq_done,
  output logic [31:0]             dropped,
  // 256-bit AXI4 write master
  output axi_ax_t                 m_aw,
  output logic                    m_awvalid,
  input  logic                    m_awready,
  output logic [255:0]            m_wdata,
  output logic [31:0]             m_wstrb,
  output logic                    m_wlast,
  output logic                    m_wvalid,
  input  logic                    m_wready,
  input  logic [1:0]              m_bresp,
  input  logic                    m_bvalid,
  output logic                    m_bready
);

  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;

  typedef enum logic [2:0] {IDLE, CAPTURE, NEXT_CH, WRITE, RESP} state_e;
  state_e state;

  logic [NCH-1:0][255:0] blk_buf;
  logic [3:0]            sample_idx;
  logic [31:0]           blk;
  logic [CHW-1:0]        ch;
  logic                  aw_done, w_done;

  always_comb begin
    m_aw.addr  = (start_blk[ch] + blk) << 5;
    m_aw.len   = 8'd0;
    m_aw.size  = 3'd5;
    m_aw.burst = AXI_BURST_INCR;
  end
  assign m_awvalid = (state == WRITE) && !aw_done;
  assign m_wvalid  = (state == WRITE) && !w_done;
  assign m_wdata   = blk_buf[ch];
  assign m_wstrb   = '1;
  assign m_wlast   = 1'b1;
  assign m_bready  = (state == RESP);
  assign busy      = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= IDLE;
      blk_buf    <= '0;
      sample_idx <= '0;
      blk        <= '0;
      ch         <= '0;
      aw_done    <= 1'b0;
      w_done     <= 1'b0;
      daq_done   <= 1'b0;
      dropped    <= '0;
    end else begin
      daq_done <= 1'b0;
      if (adc_valid && state != CAPTURE && state != IDLE) dropped <= dropped + 32'd1;
      unique case (state)
        IDLE: if (trigger) begin
          blk        <= '0;
          sample_idx <= '0;
          dropped    <= '0;
          if (blk_len == 0) daq_done <= 1'b1;
          else              state    <= CAPTURE;
        end
        CAPTURE: if (adc_valid) begin
          for (int c = 0; c < NCH; c++) blk_buf[c][16*sample_idx +: 16] <= adc_data[c];
          sample_idx <= sample_idx + 4'd1;
          if (sample_idx == 4'd15) begin
            ch    <= '0;
            state <= NEXT_CH;
          end
        end
        NEXT_CH: begin
          // skip channels that are not active
          if (ch_enable[ch]) begin
            aw_done <= 1'b0;
            w_done  <= 1'b0;
            state   <= WRITE;
          end else if (ch == CHW'(NCH-1)) begin
            blk <= blk + 32'd1;
            if (blk + 32'd1 == blk_len) begin
              daq_done <= 1'b1;
              state    <= IDLE;
            end else begin
              state <= CAPTURE;
            end
          end else begin
            ch <= ch + 1'b1;
          end
        end
        WRITE: begin
          if (m_awvalid && m_awready) aw_done <= 1'b1;
          if (m_wvalid && m_wready)   w_done  <= 1'b1;
          if ((aw_done || m_awready) && (w_done || m_wready)) state <= RESP;
        end
        RESP: if (m_bvalid) begin
          if (ch == CHW'(NCH-1)) begin
            blk <= blk + 32'd1;
            if (blk + 32'd1 == blk_len) begin
              daq_done <= 1'b1;
              state    <= IDLE;
            end else begin
              state <= CAPTURE;
            end
          end else begin
            ch    <= ch + 1'b1;
            state <= NEXT_CH;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  logic unused_ok;
  assign unused_ok = ^m_bresp;

endmodule
