// tb_dma_engine: DMA engine between a 64-bit AXI4 memory model and the stream side.
// The memory model (here in the testbench) accepts several read bursts in flight,
// returns data in order with random gaps, and takes writes with random ready.
// The DMA read FIFO is modelled with a random full flag. Checks, for DMA reads of
// several lengths: the AR bursts (address steps of 128 bytes, 128-byte bursts and
// a shorter last one, size and burst type), every word reaching the FIFO in order,
// at least two bursts in flight at once, and the return to idle only after the
// last data. For DMA writes: one AW for the whole length, the payload written to
// memory, wlast on the last beat only, and one wr_dma_done per write. A start
// request arriving while a transfer runs must be served afterwards.
module tb_dma_engine;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        dma_rd_start = 0, dma_wr_start = 0, wr_dma_done, busy;
  dma_cfg_t    dma_cfg = '0;
  logic [63:0] in_wdata = '0;
  logic        in_wvalid = 0, in_wlast = 0, in_wready;
  logic        fifo_wr, fifo_full = 0;
  logic [63:0] fifo_wdata;
  axi_ax_t     m_aw, m_ar;
  logic        m_awvalid, m_awready = 0, m_wlast, m_wvalid, m_wready = 0;
  logic [63:0] m_wdata, m_rdata = '0;
  logic [7:0]  m_wstrb;
  logic [1:0]  m_bresp = 2'b00, m_rresp = 2'b00;
  logic        m_bvalid = 0, m_bready, m_arvalid, m_arready = 0;
  logic        m_rlast = 0, m_rvalid = 0, m_rready;

  dma_engine dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] pat(int unsigned a);
    return {a ^ 32'h5A5A_0000, ~a};
  endfunction

  // ---------------------------------------------------------------- memory model
  logic [63:0] mem [int unsigned];
  axi_ax_t ar_q[$];
  int unsigned exp_ar_addr[$], exp_ar_len[$];
  int unsigned r_addr, r_left, r_busy = 0, max_inflight = 0, n_ar = 0;
  int unsigned aw_addr, aw_left;
  bit aw_seen = 0;
  int n_aw = 0, n_b = 0, n_done = 0;
  logic [63:0] fifo_q[$];

  function automatic logic [63:0] rd(int unsigned a);
    return mem.exists(a >> 3) ? mem[a >> 3] : pat(a >> 3);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // AR
      if (m_arvalid && m_arready) begin
        n_ar++;
        if (exp_ar_addr.size() == 0) chk(0, "unexpected AR");
        else begin
          int unsigned ea, el;
          ea = exp_ar_addr.pop_front(); el = exp_ar_len.pop_front();
          chk(m_ar.addr == ea && m_ar.len == 8'(el) && m_ar.size == 3'd3 && m_ar.burst == 2'b01,
              $sformatf("AR %h len %0d expected %h len %0d", m_ar.addr, m_ar.len, ea, el));
        end
        ar_q.push_back(m_ar);
      end
      if (ar_q.size() + r_busy > max_inflight) max_inflight = ar_q.size() + r_busy;
      // R
      if (m_rvalid && m_rready) begin
        r_addr += 8;
        if (r_left == 0) r_busy = 0; else r_left--;
      end
      if (fifo_wr) begin
        chk(!fifo_full, "FIFO written while full");
        fifo_q.push_back(fifo_wdata);
      end
      // AW / W / B
      if (m_awvalid && m_awready) begin
        n_aw++;
        aw_addr = m_aw.addr; aw_left = m_aw.len; aw_seen = 1;
        chk(m_aw.size == 3'd3 && m_aw.burst == 2'b01, "AW size and burst");
      end
      if (m_wvalid && m_wready) begin
        chk(m_wstrb == 8'hFF, "full strobes");
        chk(m_wlast == (aw_left == 0), "wlast on the last beat only");
        mem[aw_addr >> 3] = m_wdata;
        aw_addr += 8;
        if (aw_left == 0) m_bvalid <= 1; else aw_left--;
      end
      if (m_bvalid && m_bready) begin m_bvalid <= 0; n_b++; end
      if (wr_dma_done) n_done++;
    end
  end

  always @(negedge clk) begin
    m_arready <= ($urandom_range(0, 2) != 0);
    m_awready <= ($urandom_range(0, 1) != 0);
    m_wready  <= ($urandom_range(0, 3) != 0);
    fifo_full <= ($urandom_range(0, 5) == 0);
    if (!r_busy && ar_q.size() != 0 && $urandom_range(0, 3) == 0) begin
      axi_ax_t a;
      a = ar_q.pop_front();
      r_busy = 1; r_addr = a.addr; r_left = a.len;
    end
    m_rvalid <= r_busy && ($urandom_range(0, 4) != 0);
    m_rdata  <= rd(r_addr);
    m_rlast  <= (r_left == 0);
  end

  // ---------------------------------------------------------------- operations
  task automatic dma_read(int unsigned src, int unsigned len, bit write_queued = 0);
    int t = 0;
    fifo_q = {};
    for (int unsigned o = 0; o < len; o += 128) begin
      exp_ar_addr.push_back(src + o);
      exp_ar_len.push_back(((len - o > 128) ? 128 : len - o) / 8 - 1);
    end
    @(negedge clk);
    dma_cfg.rd_mem_addr = src; dma_cfg.rd_len = len;
    dma_rd_start = 1;
    @(negedge clk);
    dma_rd_start = 0;
    if (write_queued)  // busy stays high for the queued write: wait for the data
      do begin @(negedge clk); t++; end while (fifo_q.size() < len / 8 && t < 20000);
    else
      do begin @(negedge clk); t++; end while (busy && t < 20000);
    chk(t < 20000, "read finishes");
    chk(exp_ar_addr.size() == 0, "all AR bursts issued");
    chk(!r_busy && ar_q.size() == 0, "idle only after the last read data");
    chk(fifo_q.size() == len / 8, $sformatf("FIFO words %0d expected %0d", fifo_q.size(), len / 8));
    foreach (fifo_q[i]) chk(fifo_q[i] == rd(src + 8 * i), "read word");
  endtask

  task automatic dma_write(int unsigned dst, int unsigned len, bit started = 0);
    logic [63:0] w[$];
    int t = 0, done0 = n_done, aw0 = n_aw;
    for (int i = 0; i < len / 8; i++) w.push_back({$urandom, $urandom});
    if (!started) begin
      @(negedge clk);
      dma_cfg.wr_mem_addr = dst; dma_cfg.wr_len = len;
      dma_wr_start = 1;
      @(negedge clk);
      dma_wr_start = 0;
    end
    // payload from ingress, random gaps
    for (int i = 0; i < w.size(); i++) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      in_wvalid = 1; in_wdata = w[i]; in_wlast = (i == w.size() - 1);
      @(posedge clk);
      while (!in_wready) @(posedge clk);
      @(negedge clk);
      in_wvalid = 0;
    end
    do begin @(negedge clk); t++; end while ((busy || m_bvalid) && t < 20000);
    repeat (3) @(negedge clk);
    if (!started) chk(n_aw == aw0 + 1, "one AW per write");
    chk(n_done == done0 + 1, "one wr_dma_done per write");
    foreach (w[i]) chk(mem[(dst >> 3) + i] == w[i], "written word");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    dma_read(32'h0000_0000, 512);
    dma_read(32'h0010_0100, 8);
    dma_read(32'h0020_0000, 1000);
    dma_write(32'h0100_0000, 64);
    dma_write(32'h0100_1000, 128);
    dma_write(32'h0100_2000, 8);
    // read back what was written
    dma_read(32'h0100_0000, 64);
    // write start arriving while a read runs
    fork
      dma_read(32'h0030_0000, 384, 1);
      begin
        repeat (4) @(negedge clk);
        chk(busy, "read running");
        dma_cfg.wr_mem_addr = 32'h0100_3000; dma_cfg.wr_len = 40;
        dma_wr_start = 1;
        @(negedge clk);
        dma_wr_start = 0;
        chk(n_aw == 3, "write waits for the running read");
      end
    join
    dma_write(32'h0100_3000, 40, 1);
    chk(max_inflight >= 2, $sformatf("read bursts in flight: max %0d", max_inflight));
    chk(n_aw == 4 && n_b == 4, "four write bursts and responses");
    $display("AR=%0d AW=%0d B=%0d max_inflight=%0d", n_ar, n_aw, n_b, max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
