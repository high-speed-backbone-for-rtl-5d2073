// tb_axi_clock_converter: 256-bit AXI4 bursts across the 1:2 clock converter.
//
// The slave side runs on a 125 MHz-like clock (period 8), the master side on a
// clock twice as fast (period 4, offset by 1) into a stalling memory model. A
// writer process issues random INCR bursts (1..8 beats, random strobes) and a
// reader process, started together with it, reads random bursts (1..16 beats) of a separate
// region that is pre-loaded through the model. Then every written burst is read
// back. Each read beat is compared with a byte-level reference, and rlast, bresp,
// rresp and the number of B responses are checked. Half of the reads take data
// slowly, so that the read-data FIFO fills and must hold the memory back. The master-side reset must
// follow the slave-side reset.
module tb_axi_clock_converter;
  import ess_pkg::*;
  logic s_clk = 1'b0, m_clk = 1'b0, s_rst_n = 1'b0, m_rst_n;
  always #4 s_clk = ~s_clk;
  initial begin #1; forever #2 m_clk = ~m_clk; end
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  axi_ax_t      s_aw = '0, s_ar = '0, m_aw, m_ar;
  logic         s_awvalid = 0, s_awready, s_wlast = 0, s_wvalid = 0, s_wready;
  logic [255:0] s_wdata = '0, s_rdata, m_wdata, m_rdata;
  logic [31:0]  s_wstrb = '1, m_wstrb;
  logic [1:0]   s_bresp, s_rresp, m_bresp, m_rresp;
  logic         s_bvalid, s_bready = 0, s_arvalid = 0, s_arready, s_rlast, s_rvalid, s_rready = 0;
  logic         m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic         m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;

  axi_clock_converter #(.DW(256)) dut (.*);

  axi_mem_model #(.READ_LAT(5), .STALLS(1'b1)) mem (
    .clk(m_clk), .rst_n(m_rst_n),
    .aw(m_aw), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .ar(m_ar), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready)
  );

  logic [255:0] ref_mem [int unsigned];
  function automatic logic [255:0] ref_rd(int unsigned i);
    if (ref_mem.exists(i)) return ref_mem[i];
    return mem.peek(i);
  endfunction

  int n_b = 0, n_aw = 0;
  always @(posedge s_clk) if (s_rst_n && s_bvalid && s_bready) begin
    n_b++;
    chk(s_bresp == AXI_RESP_OKAY, "bresp");
  end

  task automatic wr_burst(int unsigned idx, int unsigned len);
    @(negedge s_clk);
    s_aw = '{addr: idx << 5, len: 8'(len - 1), size: 3'd5, burst: AXI_BURST_INCR};
    s_awvalid = 1;
    do @(posedge s_clk); while (!s_awready);
    n_aw++;
    @(negedge s_clk);
    s_awvalid = 0;
    for (int i = 0; i < len; i++) begin
      logic [255:0] v;
      s_wvalid = 1; s_wlast = (i == len - 1);
      for (int k = 0; k < 8; k++) s_wdata[32 * k +: 32] = $urandom;
      s_wstrb = ($urandom_range(0, 3) == 0) ? $urandom : '1;
      do @(posedge s_clk); while (!s_wready);
      v = ref_rd(idx + i);
      for (int b = 0; b < 32; b++) if (s_wstrb[b]) v[8 * b +: 8] = s_wdata[8 * b +: 8];
      ref_mem[idx + i] = v;
      @(negedge s_clk);
      s_wvalid = 0; s_wlast = 0;
    end
    s_bready = 1;
    do @(posedge s_clk); while (!s_bvalid);
    @(negedge s_clk);
    s_bready = 0;
  endtask

  task automatic rd_burst(int unsigned idx, int unsigned len);
    int n = 0;
    int slow = $urandom_range(0, 1);   // slow readers let the read FIFO fill up
    @(negedge s_clk);
    s_ar = '{addr: idx << 5, len: 8'(len - 1), size: 3'd5, burst: AXI_BURST_INCR};
    s_arvalid = 1;
    do @(posedge s_clk); while (!s_arready);
    @(negedge s_clk);
    s_arvalid = 0;
    if (slow != 0) repeat ($urandom_range(0, 24)) @(negedge s_clk);
    s_rready = 1;
    forever begin
      @(posedge s_clk);
      if (s_rvalid && s_rready) begin
        chk(s_rdata == ref_rd(idx + n), $sformatf("read data idx %0d", idx + n));
        chk(s_rresp == AXI_RESP_OKAY, "rresp");
        chk(s_rlast == (n == len - 1), "rlast");
        n++;
        if (s_rlast) break;
      end
      @(negedge s_clk);
      s_rready = slow ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 4) != 0);
    end
    @(negedge s_clk);
    s_rready = 0;
  endtask

  int unsigned w_idx[$], w_len[$];
  initial begin
    repeat (4) @(posedge s_clk);
    chk(!m_rst_n, "master side held in reset");
    s_rst_n = 1;
    repeat (2) @(posedge s_clk);
    chk(m_rst_n, "master side out of reset");
    for (int i = 0; i < 64; i++) mem.poke(32'h100 + i, {8{32'hC0DE_0000 + 32'(i)}});
    fork
      for (int k = 0; k < 60; k++) begin
        int unsigned a = $urandom_range(0, 120), l = $urandom_range(1, 8);
        w_idx.push_back(a); w_len.push_back(l);
        wr_burst(a, l);
      end
      for (int k = 0; k < 40; k++) rd_burst(32'h100 + $urandom_range(0, 48), $urandom_range(1, 16));
    join
    while (w_idx.size() != 0) rd_burst(w_idx.pop_front(), w_len.pop_front());
    repeat (10) @(posedge s_clk);
    chk(n_b == n_aw, $sformatf("B responses %0d for %0d bursts", n_b, n_aw));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge s_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
