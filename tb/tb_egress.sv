// tb_egress: transmit-side TLP builder against packets worked out in the testbench.
// A first-word-fall-through FIFO model feeds DMA read data. Every TLP leaving on
// the stream is collected and compared beat by beat (data, keep, last) with an
// expected packet built here from the PCIe header layout. Covered: register read
// completions, MWr packetisation of DMA reads of several lengths (128-byte
// packets plus a shorter final one, and the sample byte swap), the MRd of a DMA
// write, a completion and a DMA read requested in the same cycle (completion
// first), read length 0, random back-pressure on the stream with the FIFO filled
// slowly, and the AXI-Stream rule that a beat offered is held until taken.
// Timing: with the FIFO prefilled and the stream always ready, 128-byte packets
// must leave back to back, one every 18 cycles (header, header+data, 15 data
// beats, last half beat).
module tb_egress;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CW = 11;
  logic [63:0] tx_tdata;
  logic [7:0]  tx_tkeep;
  logic        tx_tlast, tx_tvalid, tx_tready = 1'b1;
  logic [15:0] completer_id = 16'h0100;
  logic        req_comp = 1'b0, comp_done;
  cpl_req_t    cpl_req = '0;
  logic [31:0] reg_rd_data = '0;
  logic        dma_rd_start = 1'b0, dma_wr_start = 1'b0, rd_dma_done, busy;
  dma_cfg_t    dma_cfg = '0;
  logic [63:0] fifo_rdata;
  logic [CW-1:0] fifo_count;
  logic        fifo_rd;

  egress #(.FIFO_CW(CW)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- FIFO model
  logic [63:0] fmem [1024];
  int unsigned wp = 0, rp = 0;
  assign fifo_rdata = fmem[rp % 1024];
  assign fifo_count = CW'(wp - rp);
  always @(posedge clk) if (rst_n && fifo_rd) begin
    chk(wp != rp, "FIFO read while empty");
    rp <= rp + 1;
  end
  initial foreach (fmem[i]) fmem[i] = '0;

  // ---------------------------------------------------------------- expected packets
  typedef struct { logic [63:0] d; logic [7:0] k; logic l; } beat_t;
  beat_t exp_q[$];         // flattened expected beats
  int pkts_seen = 0, n_done = 0, n_bp = 0;
  int first_cycle[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic beat_t mk(logic [63:0] d, logic [7:0] k, logic l);
    beat_t b; b.d = d; b.k = k; b.l = l; return b;
  endfunction

  function automatic logic [63:0] swp(logic [63:0] w, bit s);
    logic [63:0] r = w;
    if (s) for (int h = 0; h < 4; h++) r[16*h +: 16] = {w[16*h +: 8], w[16*h+8 +: 8]};
    return r;
  endfunction

  // Queue the MWr TLPs of a DMA read, given the words that will be in the FIFO.
  task automatic expect_read(int unsigned addr, int unsigned len, logic [63:0] w[$], bit s);
    int unsigned off = 0;
    while (off < len) begin
      int unsigned n = (len - off > 128) ? 128 : len - off;
      int unsigned k = n / 8;
      logic [31:0] dw0 = {1'b0, 2'b10, 5'b00000, 14'b0, 10'(n / 4)};
      logic [31:0] dw1 = {completer_id, 8'h00, (n > 4) ? 4'hF : 4'h0, 4'hF};
      logic [63:0] cur, prev;
      exp_q.push_back(mk({dw1, dw0}, 8'hFF, 0));
      cur = swp(w.pop_front(), s);
      exp_q.push_back(mk({cur[31:0], addr + off}, 8'hFF, 0));
      for (int j = 1; j < k; j++) begin
        prev = cur;
        cur = swp(w.pop_front(), s);
        exp_q.push_back(mk({cur[31:0], prev[63:32]}, 8'hFF, 0));
      end
      exp_q.push_back(mk({32'h0, cur[63:32]}, 8'h0F, 1));
      off += n;
    end
  endtask

  // ---------------------------------------------------------------- monitor
  logic        hold_v;
  logic [63:0] hold_d;
  logic        in_pkt;
  always @(posedge clk) begin
    if (!rst_n) begin
      hold_v <= 0; hold_d <= '0; in_pkt <= 0;
    end else begin
      if (hold_v) chk(tx_tvalid && tx_tdata == hold_d, "beat held under back-pressure");
      hold_v <= tx_tvalid && !tx_tready;
      hold_d <= tx_tdata;
      if (tx_tvalid && !tx_tready) n_bp++;
      if (tx_tvalid && tx_tready) begin
        if (!in_pkt) first_cycle.push_back(cyc);
        in_pkt <= !tx_tlast;
        if (exp_q.size() == 0) chk(0, $sformatf("unexpected beat %h", tx_tdata));
        else begin
          beat_t e;
          e = exp_q.pop_front();
          chk(tx_tdata == e.d && tx_tkeep == e.k && tx_tlast == e.l,
              $sformatf("beat %h/%h/%0d expected %h/%h/%0d", tx_tdata, tx_tkeep, tx_tlast, e.d, e.k, e.l));
        end
        if (tx_tlast) pkts_seen++;
      end
      if (rd_dma_done) n_done++;
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic fill(int unsigned nwords, output logic [63:0] w[$]);
    w = {};
    for (int i = 0; i < nwords; i++) begin
      logic [63:0] v = {$urandom, $urandom};
      w.push_back(v);
      fmem[wp % 1024] = v;
      wp++;
    end
  endtask

  task automatic start_read(int unsigned addr, int unsigned mem, int unsigned len, bit s);
    @(negedge clk);
    dma_cfg.rd_host_addr = addr; dma_cfg.rd_mem_addr = mem; dma_cfg.rd_len = len;
    dma_cfg.rd_swap = s;
    dma_rd_start = 1;
    @(negedge clk);
    dma_rd_start = 0;
  endtask

  task automatic wait_idle();
    int t = 0;
    do begin @(negedge clk); t++; end while ((busy || exp_q.size() != 0) && t < 5000);
    chk(t < 5000, "egress returns to idle");
    repeat (2) @(negedge clk);
  endtask

  task automatic completion(logic [31:0] data);
    cpl_req_t r;
    r.requester_id = 16'($urandom); r.tag = 8'($urandom); r.tc = 3'($urandom);
    r.attr = 2'($urandom); r.lower_addr = {5'($urandom), 2'b00};
    exp_q.push_back(mk({completer_id, 3'b000, 1'b0, 12'd4,
                        1'b0, 2'b10, 5'b01010, 1'b0, r.tc, 4'b0, 1'b0, 1'b0, r.attr, 2'b0, 10'd1},
                       8'hFF, 0));
    exp_q.push_back(mk({data, r.requester_id, r.tag, 1'b0, r.lower_addr}, 8'hFF, 1));
    @(negedge clk);
    req_comp = 1; cpl_req = r; reg_rd_data = data;
    do @(posedge clk); while (!comp_done);
    @(negedge clk);
    req_comp = 0;
  endtask

  initial begin
    logic [63:0] w[$];
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // register read completions
    for (int i = 0; i < 5; i++) completion($urandom);
    wait_idle();
    chk(pkts_seen == 5, "five completions sent");

    // DMA read of 512 bytes, prefilled, stream always ready: 18-cycle cadence
    fill(64, w);
    expect_read(32'h1000_0000, 512, w, 0);
    first_cycle = {};
    start_read(32'h1000_0000, 0, 512, 0);
    wait_idle();
    chk(first_cycle.size() == 4, "four MWr packets");
    for (int i = 1; i < first_cycle.size(); i++)
      chk(first_cycle[i] - first_cycle[i-1] == 18,
          $sformatf("packet spacing %0d cycles, expected 18", first_cycle[i] - first_cycle[i-1]));
    chk(n_done == 1, "rd_dma_done once after the last packet");

    // 200 bytes with byte swap: 128 + 72
    fill(25, w);
    expect_read(32'h2000_0040, 200, w, 1);
    first_cycle = {};
    start_read(32'h2000_0040, 0, 200, 1);
    wait_idle();
    chk(first_cycle.size() == 2, "128 + 72 byte packets");
    chk(n_done == 2, "rd_dma_done after swapped read");

    // length zero: no packet, done at once
    t0 = pkts_seen;
    start_read(32'h3000_0000, 0, 0, 0);
    wait_idle();
    chk(pkts_seen == t0 && n_done == 3, "zero-length read");

    // DMA write: one MRd for the whole length
    @(negedge clk);
    dma_cfg.wr_host_addr = 32'h4000_0100; dma_cfg.wr_len = 64;
    exp_q.push_back(mk({completer_id, 8'h00, 4'hF, 4'hF, 1'b0, 2'b00, 5'b0, 14'b0, 10'd16}, 8'hFF, 0));
    exp_q.push_back(mk({32'h0, 32'h4000_0100}, 8'h0F, 1));
    dma_wr_start = 1;
    @(negedge clk);
    dma_wr_start = 0;
    wait_idle();

    // completion and DMA read requested together: completion goes first
    fill(16, w);
    @(negedge clk);
    begin
      cpl_req_t r = '0;
      r.requester_id = 16'h0000; r.tag = 8'h11;
      exp_q.push_back(mk({completer_id, 3'b000, 1'b0, 12'd4, 1'b0, 2'b10, 5'b01010, 14'b0, 10'd1}, 8'hFF, 0));
      exp_q.push_back(mk({32'hCAFE_0001, 16'h0000, 8'h11, 8'h00}, 8'hFF, 1));
      expect_read(32'h5000_0000, 128, w, 0);
      dma_cfg.rd_host_addr = 32'h5000_0000; dma_cfg.rd_len = 128; dma_cfg.rd_swap = 0;
      dma_rd_start = 1; req_comp = 1; cpl_req = r; reg_rd_data = 32'hCAFE_0001;
      @(negedge clk);
      dma_rd_start = 0;
      while (!comp_done) @(negedge clk);
      @(negedge clk);
      req_comp = 0;
    end
    wait_idle();

    // random back-pressure, FIFO filled slowly while packets go out
    for (int rep = 0; rep < 3; rep++) begin
      int unsigned len = 8 * $urandom_range(33, 80);
      logic [63:0] all[$];
      all = {};
      for (int i = 0; i < len / 8; i++) all.push_back({$urandom, $urandom});
      expect_read(32'h6000_0000 + 32'(rep) * 32'h1000, len, all, rep[0]);
      dma_cfg.rd_host_addr = 32'h6000_0000 + 32'(rep) * 32'h1000;
      fork
        start_read(32'h6000_0000 + 32'(rep) * 32'h1000, 0, len, rep[0]);
        begin
          foreach (all[i]) begin
            @(negedge clk);
            while ($urandom_range(0, 2) == 0) @(negedge clk);
            fmem[wp % 1024] = all[i];
            wp++;
          end
        end
        begin
          repeat (400) begin
            @(negedge clk);
            tx_tready = ($urandom_range(0, 3) != 0);
          end
          tx_tready = 1;
        end
      join
      wait_idle();
    end
    chk(n_done == 7, $sformatf("rd_dma_done count %0d", n_done));
    chk(n_bp > 0, "back-pressure exercised");
    $display("packets=%0d backpressure_cycles=%0d read_done=%0d", pkts_seen, n_bp, n_done);
    chk(exp_q.size() == 0, "all expected beats seen");
    chk(wp == rp, "FIFO drained exactly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
