// tb_axi_interconnect: DMA-side 64-bit port and ADC-side 256-bit port sharing memory.
// Port S0 runs 64-bit write and read bursts (as the DMA does, up to 128 bytes, at
// any 8-byte aligned start); port S1 runs 256-bit write bursts (as the ADC writer
// does) and 256-bit reads on its spare read port, all at the same time and with
// random gaps, into one stalling 256-bit memory model. A byte-level reference
// memory per port region checks every read, and a final read-back compares the
// whole regions. The memory side runs on its own clock, so every transfer also
// crosses the interconnect's clock converter. The arbiter's delayed flag must show that each port was held
// back by the other at least once.
module tb_axi_interconnect;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic m_clk = 1'b0, m_rst_n;
  always #5 clk = ~clk;
  always #3 m_clk = ~m_clk;   // memory clock, unrelated to clk
  int checks = 0, failures = 0;

  axi_ax_t      s0_aw = '0, s0_ar = '0, s1_aw = '0, s1_ar = '0, m_aw, m_ar;
  logic         s0_awvalid = 0, s0_awready, s0_wlast = 0, s0_wvalid = 0, s0_wready;
  logic [63:0]  s0_wdata = '0, s0_rdata;
  logic [7:0]   s0_wstrb = 8'hFF;
  logic [1:0]   s0_bresp, s0_rresp, s1_bresp, s1_rresp, m_bresp, m_rresp;
  logic         s0_bvalid, s0_bready = 0, s0_arvalid = 0, s0_arready;
  logic         s0_rlast, s0_rvalid, s0_rready = 0;
  logic         s1_awvalid = 0, s1_awready, s1_wlast = 0, s1_wvalid = 0, s1_wready;
  logic [255:0] s1_wdata = '0, s1_rdata, m_wdata, m_rdata;
  logic [31:0]  s1_wstrb = '1, m_wstrb;
  logic         s1_bvalid, s1_bready = 0, s1_arvalid = 0, s1_arready;
  logic         s1_rlast, s1_rvalid, s1_rready = 0;
  logic         m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic         m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [1:0]   arb_delayed;

  axi_interconnect #(.ROUND_ROBIN(1'b1)) dut (.*);

  axi_mem_model #(.READ_LAT(4), .STALLS(1'b1)) mem (
    .clk(m_clk), .rst_n(m_rst_n),
    .aw(m_aw), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .ar(m_ar), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference, in 64-bit words (byte address >> 3)
  logic [63:0] ref_mem [int unsigned];
  function automatic logic [63:0] ref_rd(int unsigned w);
    logic [255:0] v;
    if (ref_mem.exists(w)) return ref_mem[w];
    v = mem.peek(w >> 2);
    return v[64 * (w % 4) +: 64];
  endfunction

  int n_delayed0 = 0, n_delayed1 = 0;
  always @(posedge clk) if (rst_n) begin
    n_delayed0 += int'(arb_delayed[0]);
    n_delayed1 += int'(arb_delayed[1]);
  end

  // ---------------------------------------------------------------- S0 (64-bit)
  task automatic s0_write(int unsigned addr, int unsigned len);
    @(negedge clk);
    s0_aw = '{addr: addr, len: 8'(len - 1), size: 3'd3, burst: AXI_BURST_INCR};
    s0_awvalid = 1;
    do @(posedge clk); while (!s0_awready);
    @(negedge clk);
    s0_awvalid = 0;
    for (int i = 0; i < len; i++) begin
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      s0_wvalid = 1; s0_wdata = {$urandom, $urandom}; s0_wlast = (i == len - 1);
      do @(posedge clk); while (!s0_wready);
      ref_mem[(addr >> 3) + i] = s0_wdata;
      @(negedge clk);
      s0_wvalid = 0; s0_wlast = 0;
    end
    s0_bready = 1;
    do @(posedge clk); while (!s0_bvalid);
    @(negedge clk);
    s0_bready = 0;
  endtask

  task automatic s0_read(int unsigned addr, int unsigned len);
    int n = 0;
    @(negedge clk);
    s0_ar = '{addr: addr, len: 8'(len - 1), size: 3'd3, burst: AXI_BURST_INCR};
    s0_arvalid = 1;
    do @(posedge clk); while (!s0_arready);
    @(negedge clk);
    s0_arvalid = 0;
    s0_rready = 1;
    forever begin
      @(posedge clk);
      if (s0_rvalid && s0_rready) begin
        chk(s0_rdata == ref_rd((addr >> 3) + n), $sformatf("S0 read %h beat %0d", addr, n));
        chk(s0_rlast == (n == len - 1), "S0 rlast");
        n++;
        if (s0_rlast) break;
      end
      @(negedge clk);
      s0_rready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    s0_rready = 0;
  endtask

  // ---------------------------------------------------------------- S1 (256-bit)
  task automatic s1_write(int unsigned idx, int unsigned len);
    @(negedge clk);
    s1_aw = '{addr: idx << 5, len: 8'(len - 1), size: 3'd5, burst: AXI_BURST_INCR};
    s1_awvalid = 1;
    do @(posedge clk); while (!s1_awready);
    @(negedge clk);
    s1_awvalid = 0;
    for (int i = 0; i < len; i++) begin
      s1_wvalid = 1; s1_wlast = (i == len - 1);
      for (int k = 0; k < 8; k++) s1_wdata[32 * k +: 32] = $urandom;
      do @(posedge clk); while (!s1_wready);
      for (int l = 0; l < 4; l++) ref_mem[4 * (idx + i) + l] = s1_wdata[64 * l +: 64];
      @(negedge clk);
      s1_wvalid = 0; s1_wlast = 0;
    end
    s1_bready = 1;
    do @(posedge clk); while (!s1_bvalid);
    @(negedge clk);
    s1_bready = 0;
  endtask

  task automatic s1_read(int unsigned idx, int unsigned len);
    int n = 0;
    @(negedge clk);
    s1_ar = '{addr: idx << 5, len: 8'(len - 1), size: 3'd5, burst: AXI_BURST_INCR};
    s1_arvalid = 1;
    do @(posedge clk); while (!s1_arready);
    @(negedge clk);
    s1_arvalid = 0;
    s1_rready = 1;
    forever begin
      @(posedge clk);
      if (s1_rvalid) begin
        for (int l = 0; l < 4; l++)
          chk(s1_rdata[64 * l +: 64] == ref_rd(4 * (idx + n) + l), "S1 read lane");
        chk(s1_rlast == (n == len - 1), "S1 rlast");
        n++;
        if (s1_rlast) break;
      end
    end
    @(negedge clk);
    s1_rready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int k = 0; k < 50; k++) begin
        int unsigned a = 32'h0001_0000 + 8 * $urandom_range(0, 255);
        int unsigned l = $urandom_range(1, 16);
        s0_write(a, l);
        s0_read(a & ~32'h7F, 16);
      end
      for (int k = 0; k < 50; k++) begin
        int unsigned i = 32'h0000_1000 + $urandom_range(0, 63);
        s1_write(i, $urandom_range(1, 4));
        if (k % 3 == 0) s1_read(32'h0000_0400 + $urandom_range(0, 63), $urandom_range(1, 4));
      end
    join
    // whole-region read-back through both ports
    for (int o = 0; o < 2048 + 128; o += 128) s0_read(32'h0001_0000 + o, 16);
    for (int i = 0; i < 68; i += 4) s1_read(32'h0000_1000 + i, 4);
    chk(n_delayed0 > 0 && n_delayed1 > 0,
        $sformatf("both ports delayed by arbitration (%0d/%0d)", n_delayed0, n_delayed1));
    $display("delayed cycles S0=%0d S1=%0d", n_delayed0, n_delayed1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
