// tb_reg_file: register file against a software model of the register map.
// Random writes (including to read-only and unmapped indices) are mirrored in an
// associative-array model and every index is read back; the DMA settings and ADC
// outputs are compared with the model; start pulses must last exactly one cycle
// and appear only for a write of 0x1; IRQ status bits are set by their sources,
// cleared by writes to the clear register and raise irq only when enabled; the
// steady-state and busy bits follow their inputs; the master reset clears all.
module tb_reg_file;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0;
  reg_idx_t wr_idx = '0, rd_idx = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic mem_init_done = 0, link_up = 0, bus_master_en = 0, adc_busy = 0;
  logic rd_dma_done = 0, wr_dma_done = 0, daq_done = 0, user_irq = 0;
  dma_cfg_t dma_cfg;
  logic dma_rd_start, dma_wr_start, adc_trigger, mem_reset, irq;
  logic [31:0] adc_sample_ctrl, adc_blk_len, irq_status;
  logic [NUM_ADC_CH-1:0][31:0] adc_start_blk;

  reg_file #(.USER_REGS(256)) dut (.*);

  logic [31:0] model [int];
  int n_rd_start = 0, n_wr_start = 0, n_trig = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit plain_rw(int i);
    return i == 'h011 || i == 'h020 || (i >= 'h120 && i <= 'h12A) ||
           (i >= 'h200 && i <= 'h205) || (i >= 'h210 && i <= 'h214) ||
           i == 'h220 || (i >= 'h400 && i <= 'h4FF);
  endfunction

  function automatic logic [31:0] expect_rd(int i);
    if (i == 'h000) return 32'h8301_2808;
    if (i == 'h010) return {31'b0, adc_busy};
    if (i == 'h021) return {29'b0, mem_init_done, link_up, bus_master_en};
    if (plain_rw(i)) return model.exists(i) ? model[i] : 32'h0;
    return 32'h0;
  endfunction

  task automatic write(int i, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_idx = reg_idx_t'(i); wr_data = d;
    @(negedge clk);
    wr_en = 0;
    if (plain_rw(i)) model[i] = d;
  endtask

  task automatic check_all(string tag);
    int list[$] = '{'h000, 'h010, 'h011, 'h020, 'h021, 'h0FF, 'h12A, 'h203, 'h205, 'h213,
                    'h220, 'h222, 'h3FF, 'h500, 'h7FF};
    for (int i = 'h120; i < 'h12A; i++) list.push_back(i);
    for (int i = 'h200; i <= 'h214; i++) list.push_back(i);
    for (int k = 0; k < 16; k++) list.push_back('h400 + $urandom_range(0, 255));
    foreach (list[k]) begin
      rd_idx = reg_idx_t'(list[k]);
      #1;
      if (list[k] != 'h221) chk(rd_data == expect_rd(list[k]), $sformatf("%s read 0x%03h = %h", tag, list[k], rd_data));
    end
  endtask

  task automatic check_outputs();
    logic [31:0] m[int];
    m = model;
    chk(dma_cfg.rd_host_addr == (m.exists('h200) ? m['h200] : 0), "rd_host_addr");
    chk(dma_cfg.rd_mem_addr  == (m.exists('h202) ? m['h202] : 0), "rd_mem_addr");
    chk(dma_cfg.rd_len       == (m.exists('h203) ? m['h203] : 0), "rd_len");
    chk(dma_cfg.rd_swap      == (m.exists('h205) ? m['h205][0] : 0), "rd_swap");
    chk(dma_cfg.wr_host_addr == (m.exists('h210) ? m['h210] : 0), "wr_host_addr");
    chk(dma_cfg.wr_mem_addr  == (m.exists('h212) ? m['h212] : 0), "wr_mem_addr");
    chk(dma_cfg.wr_len       == (m.exists('h213) ? m['h213] : 0), "wr_len");
    chk(adc_sample_ctrl == (m.exists('h011) ? m['h011] : 0), "adc_sample_ctrl");
    chk(adc_blk_len == (m.exists('h12A) ? m['h12A] : 0), "adc_blk_len");
    chk(mem_reset == (m.exists('h020) ? m['h020][0] : 0), "mem_reset");
    for (int c = 0; c < NUM_ADC_CH; c++)
      chk(adc_start_blk[c] == (m.exists('h120 + c) ? m['h120 + c] : 0), "adc_start_blk");
  endtask

  // pulse monitor: start outputs follow a write of exactly 0x1 by one cycle
  logic prev_wr_en; reg_idx_t prev_idx; logic [31:0] prev_data;
  always @(posedge clk) begin
    if (rst_n) begin
      chk(dma_rd_start == (prev_wr_en && prev_idx == 12'h204 && prev_data == 1), "dma_rd_start pulse");
      chk(dma_wr_start == (prev_wr_en && prev_idx == 12'h214 && prev_data == 1), "dma_wr_start pulse");
      chk(adc_trigger  == (prev_wr_en && prev_idx == 12'h010 && prev_data == 1), "adc_trigger pulse");
      n_rd_start += int'(dma_rd_start); n_wr_start += int'(dma_wr_start); n_trig += int'(adc_trigger);
    end
    prev_wr_en <= wr_en; prev_idx <= wr_idx; prev_data <= wr_data;
  end

  initial begin
    prev_wr_en = 0; prev_idx = '0; prev_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_all("reset");
    check_outputs();
    // steady state and busy bits
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      {mem_init_done, link_up, bus_master_en, adc_busy} = 4'(k);
      check_all("status");
    end
    // random traffic
    for (int n = 0; n < 600; n++) begin
      int i;
      int pool[$] = '{'h000, 'h010, 'h011, 'h020, 'h021, 'h12A, 'h200, 'h201, 'h202, 'h203,
                      'h204, 'h205, 'h210, 'h211, 'h212, 'h213, 'h214, 'h220, 'h300, 'h7FF};
      if ($urandom_range(0, 2) == 0) i = 'h400 + $urandom_range(0, 255);
      else if ($urandom_range(0, 3) == 0) i = 'h120 + $urandom_range(0, 9);
      else i = pool[$urandom_range(0, pool.size() - 1)];
      write(i, ($urandom_range(0, 3) == 0) ? 32'h1 : $urandom);
      if (n % 50 == 0) begin check_all("random"); check_outputs(); end
    end
    check_all("random end");
    check_outputs();
    // interrupts
    write('h222, 32'hFFFF_FFFF);
    write('h220, 32'h0);
    @(negedge clk); rd_dma_done = 1; @(negedge clk); rd_dma_done = 0;
    @(negedge clk); wr_dma_done = 1; @(negedge clk); wr_dma_done = 0;
    @(negedge clk); daq_done = 1; @(negedge clk); daq_done = 0;
    @(negedge clk); user_irq = 1; @(negedge clk); user_irq = 0;
    @(negedge clk);
    chk(irq_status == 32'h0000_C003, $sformatf("irq status all set %h", irq_status));
    chk(!irq, "irq masked while enable is 0");
    write('h220, 32'h0000_4000);
    chk(irq, "irq from DAQ bit when enabled");
    write('h222, 32'h0000_4000);
    @(negedge clk);
    chk(irq_status == 32'h0000_8003, "DAQ bit cleared");
    chk(!irq, "irq drops after clear");
    rd_idx = 12'h221; #1;
    chk(rd_data == 32'h0000_8003, "irq status readable");
    // set and clear in the same cycle: set wins
    @(negedge clk);
    wr_en = 1; wr_idx = 12'h222; wr_data = 32'h1; rd_dma_done = 1;
    @(negedge clk);
    wr_en = 0; rd_dma_done = 0;
    chk(irq_status[0], "set wins over clear");
    write('h220, 32'h0000_8000);
    chk(irq, "user irq enabled");
    // master reset
    write('h0FF, 32'h2);
    chk(irq_status != 0, "master reset needs exactly 0x1");
    write('h0FF, 32'h1);
    model.delete();
    @(negedge clk);
    chk(irq_status == 0 && !irq, "master reset clears irq");
    check_all("master reset");
    check_outputs();
    chk(n_rd_start > 0 && n_wr_start > 0 && n_trig > 0, "all start pulses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
