// reg_file: the CPU-visible control and status registers of the backbone.
//
// Single-DW registers addressed by register index (BAR byte offset / 4). Ingress
// writes one register per cycle (wr_en, wr_idx, wr_data); reads are combinational
// on rd_idx so that egress can return the completion data in the cycle after the
// request header without extra latency.
//
// Map (index: meaning, reset value):
//   0x000 R   firmware identifier 0x83012808
//   0x010 R/W ADC acquisition: writing 0x1 starts one acquisition (adc_trigger
//             pulse); reads return the ADC writer's busy flag in bit 0
//   0x011 R/W ADC sample control: bits [9:0] select the active channels
//   0x020 R/W memory manual reset, level output mem_reset (write 1, then 0)
//   0x021 R   steady state: bit 2 memory init done, bit 1 link up, bit 0 bus master enable
//   0x0FF R/W master reset: writing 0x1 returns every register to its reset value
//   0x120-0x129 R/W ADC channel 1..10 sample start block address (256-bit blocks)
//   0x12A R/W ADC sample block length (256-bit blocks per channel per trigger)
//   0x200 / 0x201 DMA read destination (host) address low / high
//   0x202 DMA read source (memory) address, 0x203 DMA read length in bytes
//   0x204 DMA read control: writing 0x1 starts a read (dma_rd_start pulse)
//   0x205 DMA read sample byte swap control, bit 0
//   0x210 / 0x211 DMA write source (host) address low / high
//   0x212 DMA write destination (memory) address, 0x213 DMA write length in bytes
//   0x214 DMA write control: writing 0x1 starts a write (dma_wr_start pulse)
//   0x220 IRQ enable, 0x221 IRQ status, 0x222 IRQ clear (write 1 to clear)
//     IRQ bits: 15 user, 14 DAQ done, 1 write DMA done, 0 read DMA done
//   0x400-0x4FF R/W user registers
// The map, reset values and IRQ bits follow the document. Which register sits at
// 0x210 and which at 0x212 follows the per-register descriptions (host address at
// 0x210, memory address at 0x212). The busy flag in 0x010, the channel-enable bits
// in 0x011 and the set-wins-over-clear rule of the IRQ status are this design's
// choices. The high address halves are stored but unused: the design issues
// 32-bit addresses only. All registers use a synchronous active-low reset.
module reg_file
  import ess_pkg::*;
#(
  parameter int unsigned USER_REGS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port from ingress
  input  logic              wr_en,
  input  reg_idx_t          wr_idx,
  input  logic [31:0]       wr_data,
  // read port for egress completions
  input  reg_idx_t          rd_idx,
  output logic [31:0]       rd_data,
  // status inputs
  input  logic              mem_init_done,
  input  logic              link_up,
  input  logic              bus_master_en,
  input  logic              adc_busy,
  // interrupt sources (one-cycle pulses)
  input  logic              rd_dma_done,
  input  logic              wr_dma_done,
  input  logic              daq_done,
  input  logic              user_irq,
  // settings and commands
  output dma_cfg_t          dma_cfg,
  output logic              dma_rd_start,
  output logic              dma_wr_start,
  output logic              adc_trigger,
  output logic [31:0]       adc_sample_ctrl,
  output logic [NUM_ADC_CH-1:0][31:0] adc_start_blk,
  output logic [31:0]       adc_blk_len,
  output logic              mem_reset,
  output logic [31:0]       irq_status,
  output logic              irq
);

  logic [31:0] r_adc_sample, r_mem_reset;
  logic [NUM_ADC_CH-1:0][31:0] r_adc_addr;
  logic [31:0] r_adc_len;
  logic [31:0] r_drd_dst_lo, r_drd_dst_hi, r_drd_src, r_drd_len, r_drd_ctrl, r_drd_swap;
  logic [31:0] r_dwr_src_lo, r_dwr_src_hi, r_dwr_dst, r_dwr_len, r_dwr_ctrl;
  logic [31:0] r_irq_en, r_irq_status;
  logic [31:0] r_user [USER_REGS];

  localparam int unsigned UW = (USER_REGS > 1) ? $clog2(USER_REGS) : 1;
  reg_idx_t wr_adc_off, rd_adc_off, rd_user_off;
  assign wr_adc_off  = wr_idx - R_ADC_ADDR0;
  assign rd_adc_off  = rd_idx - R_ADC_ADDR0;
  assign rd_user_off = rd_idx - R_USER_FIRST;

  logic master_rst;
  assign master_rst = wr_en && (wr_idx == R_MASTER_RST) && (wr_data == 32'h1);

  logic [31:0] irq_set, irq_clr;
  always_comb begin
    irq_set = '0;
    irq_set[IRQ_RD_DMA] = rd_dma_done;
    irq_set[IRQ_WR_DMA] = wr_dma_done;
    irq_set[IRQ_DAQ]    = daq_done;
    irq_set[IRQ_USER]   = user_irq;
    irq_clr = (wr_en && wr_idx == R_IRQ_CLEAR) ? wr_data : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_adc_sample <= '0; r_mem_reset <= '0;
      r_adc_addr <= '0; r_adc_len <= '0;
      r_drd_dst_lo <= '0; r_drd_dst_hi <= '0; r_drd_src <= '0; r_drd_len <= '0;
      r_drd_ctrl <= '0; r_drd_swap <= '0;
      r_dwr_src_lo <= '0; r_dwr_src_hi <= '0; r_dwr_dst <= '0; r_dwr_len <= '0;
      r_dwr_ctrl <= '0;
      r_irq_en <= '0; r_irq_status <= '0;
    end else if (master_rst) begin
      r_adc_sample <= '0; r_mem_reset <= '0;
      r_adc_addr <= '0; r_adc_len <= '0;
      r_drd_dst_lo <= '0; r_drd_dst_hi <= '0; r_drd_src <= '0; r_drd_len <= '0;
      r_drd_ctrl <= '0; r_drd_swap <= '0;
      r_dwr_src_lo <= '0; r_dwr_src_hi <= '0; r_dwr_dst <= '0; r_dwr_len <= '0;
      r_dwr_ctrl <= '0;
      r_irq_en <= '0; r_irq_status <= '0;
    end else begin
      r_irq_status <= (r_irq_status & ~irq_clr) | irq_set;
      if (wr_en) begin
        unique case (wr_idx)
          R_ADC_SAMPLE:  r_adc_sample <= wr_data;
          R_MEM_RESET:   r_mem_reset  <= wr_data;
          R_ADC_BLK_LEN: r_adc_len    <= wr_data;
          R_DRD_DST_LO:  r_drd_dst_lo <= wr_data;
          R_DRD_DST_HI:  r_drd_dst_hi <= wr_data;
          R_DRD_SRC:     r_drd_src    <= wr_data;
          R_DRD_LEN:     r_drd_len    <= wr_data;
          R_DRD_CTRL:    r_drd_ctrl   <= wr_data;
          R_DRD_SWAP:    r_drd_swap   <= wr_data;
          R_DWR_SRC_LO:  r_dwr_src_lo <= wr_data;
          R_DWR_SRC_HI:  r_dwr_src_hi <= wr_data;
          R_DWR_DST:     r_dwr_dst    <= wr_data;
          R_DWR_LEN:     r_dwr_len    <= wr_data;
          R_DWR_CTRL:    r_dwr_ctrl   <= wr_data;
          R_IRQ_EN:      r_irq_en     <= wr_data;
          default: begin
            if (wr_idx >= R_ADC_ADDR0 && wr_idx < R_ADC_ADDR0 + reg_idx_t'(NUM_ADC_CH))
              r_adc_addr[wr_adc_off[3:0]] <= wr_data;
          end
        endcase
      end
    end
  end

  // User registers: a plain array, cleared by the master reset register.
  always_ff @(posedge clk) begin
    for (int i = 0; i < USER_REGS; i++) begin
      if (!rst_n || master_rst)
        r_user[i] <= '0;
      else if (wr_en && wr_idx == R_USER_FIRST + reg_idx_t'(i))
        r_user[i] <= wr_data;
    end
  end

  always_comb begin
    unique case (rd_idx)
      R_ID:          rd_data = FIRMWARE_ID;
      R_ADC_ACQ:     rd_data = {31'b0, adc_busy};
      R_ADC_SAMPLE:  rd_data = r_adc_sample;
      R_MEM_RESET:   rd_data = r_mem_reset;
      R_STEADY:      rd_data = {29'b0, mem_init_done, link_up, bus_master_en};
      R_MASTER_RST:  rd_data = '0;
      R_ADC_BLK_LEN: rd_data = r_adc_len;
      R_DRD_DST_LO:  rd_data = r_drd_dst_lo;
      R_DRD_DST_HI:  rd_data = r_drd_dst_hi;
      R_DRD_SRC:     rd_data = r_drd_src;
      R_DRD_LEN:     rd_data = r_drd_len;
      R_DRD_CTRL:    rd_data = r_drd_ctrl;
      R_DRD_SWAP:    rd_data = r_drd_swap;
      R_DWR_SRC_LO:  rd_data = r_dwr_src_lo;
      R_DWR_SRC_HI:  rd_data = r_dwr_src_hi;
      R_DWR_DST:     rd_data = r_dwr_dst;
      R_DWR_LEN:     rd_data = r_dwr_len;
      R_DWR_CTRL:    rd_data = r_dwr_ctrl;
      R_IRQ_EN:      rd_data = r_irq_en;
      R_IRQ_STATUS:  rd_data = r_irq_status;
      R_IRQ_CLEAR:   rd_data = '0;
      default: begin
        rd_data = '0;
        if (rd_idx >= R_ADC_ADDR0 && rd_idx < R_ADC_ADDR0 + reg_idx_t'(NUM_ADC_CH))
          rd_data = r_adc_addr[rd_adc_off[3:0]];
        else if (rd_idx >= R_USER_FIRST && rd_idx < R_USER_FIRST + reg_idx_t'(USER_REGS))
          rd_data = r_user[rd_user_off[UW-1:0]];
      end
    endcase
  end

  // Commands: a write of 0x1 to a control register starts the action.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dma_rd_start <= 1'b0;
      dma_wr_start <= 1'b0;
      adc_trigger  <= 1'b0;
    end else begin
      dma_rd_start <= wr_en && wr_idx == R_DRD_CTRL && wr_data == 32'h1;
      dma_wr_start <= wr_en && wr_idx == R_DWR_CTRL && wr_data == 32'h1;
      adc_trigger  <= wr_en && wr_idx == R_ADC_ACQ  && wr_data == 32'h1;
    end
  end

  always_comb begin
    dma_cfg.rd_host_addr = r_drd_dst_lo;
    dma_cfg.rd_mem_addr  = r_drd_src;
    dma_cfg.rd_len       = r_drd_len;
    dma_cfg.rd_swap      = r_drd_swap[0];
    dma_cfg.wr_host_addr = r_dwr_src_lo;
    dma_cfg.wr_mem_addr  = r_dwr_dst;
    dma_cfg.wr_len       = r_dwr_len;
  end

  assign adc_sample_ctrl = r_adc_sample;
  assign adc_start_blk   = r_adc_addr;
  assign adc_blk_len     = r_adc_len;
  assign mem_reset       = r_mem_reset[0];
  assign irq_status      = r_irq_status;
  assign irq             = |(r_irq_status & r_irq_en);

  // The high address halves are stored for software but not used by the 32-bit datapath.
  logic unused_ok;
  assign unused_ok = ^{r_drd_dst_hi, r_dwr_src_hi};

endmodule
