// tb_axi_downsizer: 256-to-64-bit read converter against a 256-bit read model.
// The model returns 32-byte words derived from their address, with optional random
// gaps; the narrow side takes data with optional random back-pressure. For random
// bursts (any 8-byte aligned start, 1 to 32 beats) the checks are: the wide AR is
// 32-byte aligned with size 5 and covers exactly the narrow burst, every narrow
// beat carries the right 8 bytes, rlast marks the last narrow beat only, and no
// extra beats appear. Rate: with no gaps on either side a 16-beat (128-byte) read
// must deliver its 16 narrow beats in 16 consecutive cycles.
module tb_axi_downsizer;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axi_ax_t      s_ar = '0, m_ar;
  logic         s_arvalid = 0, s_arready, s_rlast, s_rvalid, s_rready = 1;
  logic [63:0]  s_rdata;
  logic [1:0]   s_rresp, m_rresp = 2'b00;
  logic         m_arvalid, m_arready = 0, m_rlast = 0, m_rvalid = 0, m_rready;
  logic [255:0] m_rdata = '0;

  axi_downsizer dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] wide(int unsigned idx);
    logic [255:0] v;
    for (int l = 0; l < 4; l++) v[64 * l +: 64] = {idx, 32'(l) ^ 32'hC0DE_0000};
    return v;
  endfunction
  function automatic logic [63:0] narrow(int unsigned a);
    return wide(a >> 5) >> (64 * ((a >> 3) % 4));
  endfunction

  // 256-bit read model
  bit stall = 1;
  int unsigned r_idx, r_left;
  bit r_busy = 0;
  axi_ax_t got_ar;
  int n_ar = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_arvalid && m_arready) begin
      got_ar = m_ar; n_ar++;
      r_busy = 1; r_idx = m_ar.addr >> 5; r_left = m_ar.len;
    end else if (m_rvalid && m_rready) begin
      if (r_left == 0) r_busy = 0; else begin r_left--; r_idx++; end
    end
  end
  always @(negedge clk) begin
    m_arready <= !r_busy && (!stall || $urandom_range(0, 1) == 0);
    m_rvalid  <= r_busy && !(m_arvalid && m_arready) && (!stall || $urandom_range(0, 3) != 0);
    m_rdata   <= wide(r_idx);
    m_rlast   <= (r_left == 0);
    s_rready  <= !stall || ($urandom_range(0, 3) != 0);
  end

  // narrow side collector
  logic [63:0] got[$];
  logic        got_last[$];
  int          got_cyc[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && s_rvalid && s_rready) begin
      got.push_back(s_rdata); got_last.push_back(s_rlast); got_cyc.push_back(cyc);
    end
  end

  task automatic burst(int unsigned addr, int unsigned len);
    int t = 0;
    int unsigned nwide = ((addr >> 3) % 4 + len - 1) / 4 + 1;
    got = {}; got_last = {}; got_cyc = {};
    @(negedge clk);
    s_ar.addr = addr; s_ar.len = 8'(len - 1); s_ar.size = 3'd3; s_ar.burst = AXI_BURST_INCR;
    s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    while ((got.size() < len || r_busy) && t < 2000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    chk(got_ar.addr == (addr & ~32'h1F) && got_ar.size == 3'd5 && got_ar.len == 8'(nwide - 1),
        $sformatf("wide AR %h len %0d for %h/%0d", got_ar.addr, got_ar.len, addr, len));
    chk(got.size() == len, $sformatf("narrow beats %0d expected %0d", got.size(), len));
    foreach (got[i]) begin
      chk(got[i] == narrow(addr + 8 * i), $sformatf("beat %0d data", i));
      chk(got_last[i] == (i == len - 1), "rlast position");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(32'h0000_0000, 16);
    burst(32'h0000_0108, 1);
    burst(32'h0000_0218, 3);
    for (int n = 0; n < 80; n++)
      burst(32'h0010_0000 + 8 * $urandom_range(0, 1023), $urandom_range(1, 32));
    // full rate without gaps
    stall = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 4; n++) begin
      burst(32'h0020_0000 + 128 * n, 16);
      chk(got_cyc.size() == 16 && got_cyc[15] - got_cyc[0] == 15,
          "16 narrow beats in 16 consecutive cycles");
    end
    $display("bursts=%0d", n_ar);
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
