// tb_adc_daq: ADC acquisition writer in front of the stalling 256-bit memory model.
// Each channel's sample is {channel number, running count}, so a stored block shows
// where its samples came from. For several acquisitions (all channels, some
// channels disabled, samples every cycle or with gaps) the checks are: every
// enabled channel's blocks hold 16 consecutive samples of that channel in order,
// block b of channel c lies at (start block of c + b) * 32 bytes, each block starts
// after the previous one, disabled channels write nothing, the samples taken plus
// the dropped count equal the samples offered while busy, and daq_done pulses
// once per acquisition (at once for a block length of 0).
module tb_adc_daq;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCH = NUM_ADC_CH;
  logic                 trigger = 0, adc_valid = 0, busy, daq_done;
  logic [NCH-1:0]       ch_enable = '1;
  logic [NCH-1:0][31:0] start_blk = '0;
  logic [31:0]          blk_len = 0, dropped;
  logic [NCH-1:0][15:0] adc_data = '0;
  axi_ax_t              m_aw, ar_idle;
  logic                 m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [255:0]         m_wdata, rdata;
  logic [31:0]          m_wstrb;
  logic [1:0]           m_bresp, rresp;
  logic                 arready, rlast, rvalid;

  assign ar_idle = '0;

  adc_daq #(.NCH(NCH)) dut (.*);

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

  // sample source
  logic [11:0] count = '0;
  bit gaps = 0;
  int offered = 0, n_done = 0, n_dropped_seen = 0;
  always @(negedge clk) begin
    adc_valid <= !gaps || ($urandom_range(0, 2) == 0);
    for (int c = 0; c < NCH; c++) adc_data[c] <= {4'(c), count};
  end
  always @(posedge clk) if (rst_n) begin
    if (adc_valid) count <= count + 1;
    if (adc_valid && busy) offered++;
    if (daq_done) n_done++;
  end

  task automatic acquire(logic [NCH-1:0] en, int unsigned blocks, int unsigned base);
    int t = 0, done0 = n_done;
    int unsigned written0 = mem.writes;
    @(negedge clk);
    ch_enable = en; blk_len = blocks;
    for (int c = 0; c < NCH; c++) start_blk[c] = base + 32'(c) * 32'h100;
    offered = 0;
    trigger = 1;
    @(negedge clk);
    trigger = 0;
    while ((busy || n_done == done0) && t < 50000) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
    chk(n_done == done0 + 1, "one daq_done per acquisition");
    chk(mem.writes - written0 == blocks * $countones(en),
        $sformatf("writes %0d expected %0d", mem.writes - written0, blocks * $countones(en)));
    chk(offered == 16 * int'(blocks) + int'(dropped),
        $sformatf("offered %0d = 16*%0d + dropped %0d", offered, blocks, dropped));
    if (dropped > 0) n_dropped_seen++;
    for (int c = 0; c < NCH; c++) begin
      int prev_last = -1;
      for (int b = 0; b < blocks; b++) begin
        int unsigned idx = base + 32'(c) * 32'h100 + 32'(b);
        logic [255:0] v;
        v = mem.peek(idx);
        if (!en[c]) begin
          chk(v == {8{idx ^ 32'hA5A5_0000}}, "disabled channel not written");
          continue;
        end
        for (int i = 0; i < 16; i++) begin
          logic [15:0] s, s0;
          s = v[16 * i +: 16]; s0 = v[15:0];
          chk(s[15:12] == 4'(c), $sformatf("channel %0d block %0d sample %0d from channel %0d", c, b, i, s[15:12]));
          chk(s[11:0] == 12'(s0[11:0] + 12'(i)), "consecutive samples in a block");
        end
        if (prev_last >= 0) chk(12'(v[11:0] - 12'(prev_last)) >= 12'd1, "blocks follow in order");
        prev_last = int'(v[16 * 15 +: 12]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    acquire('1, 3, 32'h0000_1000);
    acquire(10'b10_0101_0011, 4, 32'h0001_0000);
    gaps = 1;
    acquire('1, 2, 32'h0002_0000);
    acquire(10'b00_0000_0001, 5, 32'h0003_0000);
    gaps = 0;
    acquire('1, 0, 32'h0004_0000);
    chk(n_dropped_seen > 0, "samples dropped while writing");
    $display("acquisitions=%0d", n_done);
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
