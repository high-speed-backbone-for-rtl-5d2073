// tb_axi_upsizer: 64-to-256-bit write converter in front of the 256-bit memory model.
// Random narrow bursts (any 8-byte aligned start, 1 to 32 beats, random strobes)
// are written through the converter, with random gaps on the narrow side and
// random back-pressure from the memory model. A byte-level reference memory is
// updated from the narrow beats; after each burst the model's contents must match
// it, the wide AW must be 32-byte aligned with size 5 and the right beat count,
// wlast must mark the last wide beat, and the B response must come back once.
module tb_axi_upsizer;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axi_ax_t      s_aw = '0, m_aw, ar_idle;
  logic         s_awvalid = 0, s_awready, s_wlast = 0, s_wvalid = 0, s_wready;
  logic [63:0]  s_wdata = '0;
  logic [7:0]   s_wstrb = '0;
  logic [1:0]   s_bresp, m_bresp, rresp;
  logic         s_bvalid, s_bready = 1;
  logic         m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [255:0] m_wdata, rdata;
  logic [31:0]  m_wstrb;
  logic         arready, rlast, rvalid;

  assign ar_idle = '0;

  axi_upsizer dut (.*);

  axi_mem_model #(.READ_LAT(2), .STALLS(1'b1)) mem (
    .clk, .rst_n,
    .aw(m_aw), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .ar(ar_idle), .arvalid(1'b0), .arready, .rdata, .rresp, .rlast, .rvalid, .rready(1'b0)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] ref_mem [int unsigned];
  int n_wide = 0, n_wlast = 0, n_b = 0;
  axi_ax_t got_aw;

  always @(posedge clk) if (rst_n) begin
    if (m_awvalid && m_awready) got_aw = m_aw;
    if (m_wvalid && m_wready) begin n_wide++; if (m_wlast) n_wlast++; end
    if (s_bvalid && s_bready) n_b++;
  end

  function automatic logic [7:0] ref_byte(int unsigned a);
    logic [255:0] v;
    if (ref_mem.exists(a)) return ref_mem[a];
    v = mem.peek(a >> 5);
    return v[8 * (a % 32) +: 8];
  endfunction

  task automatic burst(int unsigned addr, int unsigned len);
    int wide0 = n_wide, b0 = n_b, t = 0;
    int unsigned exp_wide = ((addr >> 3) % 4 + len - 1) / 4 + 1;
    logic [7:0] snapshot [int unsigned];
    // remember the old contents of the bytes the burst touches
    for (int unsigned a = addr & ~32'h1F; a < ((addr + 8 * len + 8 + 31) & ~32'h1F); a++)
      snapshot[a] = ref_byte(a);
    @(negedge clk);
    s_aw.addr = addr; s_aw.len = 8'(len - 1); s_aw.size = 3'd3; s_aw.burst = AXI_BURST_INCR;
    s_awvalid = 1;
    do @(posedge clk); while (!s_awready);
    @(negedge clk);
    s_awvalid = 0;
    for (int i = 0; i < len; i++) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      s_wvalid = 1; s_wdata = {$urandom, $urandom}; s_wlast = (i == len - 1);
      s_wstrb = ($urandom_range(0, 2) == 0) ? 8'($urandom) : 8'hFF;
      do @(posedge clk); while (!s_wready);
      for (int b = 0; b < 8; b++)
        if (s_wstrb[b]) snapshot[addr + 8 * i + b] = s_wdata[8 * b +: 8];
      @(negedge clk);
      s_wvalid = 0; s_wlast = 0;
    end
    while (n_b == b0 && t < 1000) begin @(negedge clk); t++; end
    chk(n_b == b0 + 1, "one B response");
    chk(got_aw.addr == (addr & ~32'h1F) && got_aw.size == 3'd5 && got_aw.burst == 2'b01,
        "wide AW address, size and burst");
    chk(got_aw.len == 8'(exp_wide - 1), $sformatf("wide AW len %0d expected %0d", got_aw.len, exp_wide - 1));
    chk(n_wide - wide0 == exp_wide, "wide beat count");
    foreach (snapshot[a]) begin
      logic [255:0] v;
      v = mem.peek(a >> 5);
      chk(v[8 * (a % 32) +: 8] == snapshot[a], $sformatf("byte %h", a));
      ref_mem[a] = snapshot[a];
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(32'h0000_1000, 16);    // aligned 128-byte burst
    burst(32'h0000_2008, 1);     // single beat in lane 1
    burst(32'h0000_3018, 6);     // starts in the top lane
    for (int n = 0; n < 60; n++)
      burst(32'h0001_0000 + 8 * $urandom_range(0, 511), $urandom_range(1, 32));
    chk(n_wlast == n_b, "one wlast per burst");
    $display("bursts=%0d wide_beats=%0d", n_b, n_wide);
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
