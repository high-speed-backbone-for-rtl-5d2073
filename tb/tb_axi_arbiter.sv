// tb_axi_arbiter: two-master arbiter in both policies, each in front of a memory model.
// Instance 0 uses round robin, instance 1 fixed priority for master 1. In each,
// both masters run random write and read bursts at the same time, each in its own
// address region, with random gaps and a memory model that stalls at random.
// Checks: written data lands in memory, read data and rlast reach the master that
// asked, each master gets exactly one B per write and only its own R beats, and
// the delayed flag is seen. Policy: while both masters keep write requests
// pending, round robin must alternate the grants; fixed priority must give every
// contested grant to master 1.
module tb_axi_arbiter;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // per instance (first index) and master (second index)
  axi_ax_t      s_aw [2][2], s_ar [2][2];
  logic [1:0]   s_awvalid [2], s_awready [2], s_wlast [2], s_wvalid [2], s_wready [2];
  logic [1:0]   s_bvalid [2], s_bready [2], s_arvalid [2], s_arready [2];
  logic [1:0]   s_rvalid [2], s_rready [2], delayed [2];
  logic [255:0] s_wdata [2][2];
  logic [1:0]   s_bresp [2], s_rresp [2];
  logic [255:0] s_rdata [2];
  logic         s_rlast [2];
  axi_ax_t      m_aw [2], m_ar [2];
  logic         m_awvalid [2], m_awready [2], m_wlast [2], m_wvalid [2], m_wready [2];
  logic [255:0] m_wdata [2], m_rdata [2];
  logic [31:0]  m_wstrb [2];
  logic [1:0]   m_bresp [2], m_rresp [2];
  logic         m_bvalid [2], m_bready [2], m_arvalid [2], m_arready [2];
  logic         m_rlast [2], m_rvalid [2], m_rready [2];

  for (genvar g = 0; g < 2; g++) begin : g_inst
    axi_arbiter #(.DW(256), .ROUND_ROBIN(g == 0), .PRIO_MASTER(1)) dut (
      .clk, .rst_n,
      .s_aw({s_aw[g][1], s_aw[g][0]}), .s_awvalid(s_awvalid[g]), .s_awready(s_awready[g]),
      .s_wdata({s_wdata[g][1], s_wdata[g][0]}), .s_wstrb({32'hFFFF_FFFF, 32'hFFFF_FFFF}),
      .s_wlast(s_wlast[g]), .s_wvalid(s_wvalid[g]), .s_wready(s_wready[g]),
      .s_bvalid(s_bvalid[g]), .s_bready(s_bready[g]),
      .s_ar({s_ar[g][1], s_ar[g][0]}), .s_arvalid(s_arvalid[g]), .s_arready(s_arready[g]),
      .s_rvalid(s_rvalid[g]), .s_rready(s_rready[g]),
      .s_bresp(s_bresp[g]), .s_rdata(s_rdata[g]), .s_rresp(s_rresp[g]), .s_rlast(s_rlast[g]),
      .m_aw(m_aw[g]), .m_awvalid(m_awvalid[g]), .m_awready(m_awready[g]),
      .m_wdata(m_wdata[g]), .m_wstrb(m_wstrb[g]), .m_wlast(m_wlast[g]),
      .m_wvalid(m_wvalid[g]), .m_wready(m_wready[g]),
      .m_bresp(m_bresp[g]), .m_bvalid(m_bvalid[g]), .m_bready(m_bready[g]),
      .m_ar(m_ar[g]), .m_arvalid(m_arvalid[g]), .m_arready(m_arready[g]),
      .m_rdata(m_rdata[g]), .m_rresp(m_rresp[g]), .m_rlast(m_rlast[g]),
      .m_rvalid(m_rvalid[g]), .m_rready(m_rready[g]),
      .delayed(delayed[g])
    );
    axi_mem_model #(.READ_LAT(3), .STALLS(1'b1)) mem (
      .clk, .rst_n,
      .aw(m_aw[g]), .awvalid(m_awvalid[g]), .awready(m_awready[g]),
      .wdata(m_wdata[g]), .wstrb(m_wstrb[g]), .wlast(m_wlast[g]),
      .wvalid(m_wvalid[g]), .wready(m_wready[g]),
      .bresp(m_bresp[g]), .bvalid(m_bvalid[g]), .bready(m_bready[g]),
      .ar(m_ar[g]), .arvalid(m_arvalid[g]), .arready(m_arready[g]),
      .rdata(m_rdata[g]), .rresp(m_rresp[g]), .rlast(m_rlast[g]),
      .rvalid(m_rvalid[g]), .rready(m_rready[g])
    );
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [255:0] ref_mem [2][int unsigned];
  int n_delayed [2] = '{0, 0};
  int contested [2] = '{0, 0};
  int alternations = 0, prio_wins = 0;
  int last_winner [2] = '{-1, -1};
  bit policy_phase = 0;
  logic [1:0] pend_aw [2];

  function automatic logic [255:0] data_for(int unsigned idx, int m);
    return {8{idx ^ (32'(m) << 28) ^ 32'h1234_0000}};
  endfunction

  initial begin
    for (int g = 0; g < 2; g++) begin
      s_awvalid[g] = 0; s_wlast[g] = 0; s_wvalid[g] = 0; s_bready[g] = 0;
      s_arvalid[g] = 0; s_rready[g] = 0;
      for (int m = 0; m < 2; m++) begin s_aw[g][m] = '0; s_ar[g][m] = '0; s_wdata[g][m] = '0; end
    end
  end

  // policy monitor: grants decided while both masters had an AW waiting
  bit contest_q [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      if (|delayed[g]) n_delayed[g]++;
      if (m_awvalid[g] && m_awready[g]) begin
        int w;
        w = s_awready[g][1] ? 1 : 0;
        if (contest_q[g] && policy_phase) begin
          contested[g]++;
          if (g == 0) begin
            if (last_winner[0] >= 0) chk(w != last_winner[0], "round robin alternates");
            alternations++;
          end else begin
            chk(w == 1, "fixed priority: master 1 wins");
            prio_wins++;
          end
        end
        last_winner[g] = w;
        contest_q[g] = 0;
      end
    end
    // the arbiter decides in its idle state (encoding 0) on the requests it sees
    if (g_inst[0].dut.wst == 2'd0 && s_awvalid[0] != 0) contest_q[0] = (s_awvalid[0] == 2'b11);
    if (g_inst[1].dut.wst == 2'd0 && s_awvalid[1] != 0) contest_q[1] = (s_awvalid[1] == 2'b11);
  end

  task automatic wr(int g, int m, int unsigned idx, int unsigned len, bit gaps = 1);
    if (gaps) @(negedge clk);  // without gaps the next AW follows the B at once
    s_aw[g][m] = '{addr: idx << 5, len: 8'(len - 1), size: 3'd5, burst: AXI_BURST_INCR};
    s_awvalid[g][m] = 1;
    do @(posedge clk); while (!s_awready[g][m]);
    @(negedge clk);
    s_awvalid[g][m] = 0;
    for (int i = 0; i < len; i++) begin
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      s_wvalid[g][m] = 1; s_wdata[g][m] = data_for(idx + i, m) ^ 256'($urandom);
      s_wlast[g][m] = (i == len - 1);
      do @(posedge clk); while (!s_wready[g][m]);
      ref_mem[g][idx + i] = s_wdata[g][m];
      @(negedge clk);
      s_wvalid[g][m] = 0; s_wlast[g][m] = 0;
    end
    s_bready[g][m] = 1;
    do @(posedge clk); while (!s_bvalid[g][m]);
    @(negedge clk);
    s_bready[g][m] = 0;
  endtask

  task automatic rd(int g, int m, int unsigned idx, int unsigned len);
    int n = 0;
    @(negedge clk);
    s_ar[g][m] = '{addr: idx << 5, len: 8'(len - 1), size: 3'd5, burst: AXI_BURST_INCR};
    s_arvalid[g][m] = 1;
    do @(posedge clk); while (!s_arready[g][m]);
    @(negedge clk);
    s_arvalid[g][m] = 0;
    s_rready[g][m] = 1;
    forever begin
      @(posedge clk);
      if (s_rvalid[g][m]) begin
        logic [255:0] e;
        e = ref_mem[g].exists(idx + n) ? ref_mem[g][idx + n] : g_mem_peek(g, idx + n);
        chk(s_rdata[g] == e, $sformatf("inst %0d master %0d read beat %0d", g, m, n));
        chk(s_rlast[g] == (n == len - 1), "rlast position");
        n++;
        if (s_rlast[g]) break;
      end
    end
    @(negedge clk);
    s_rready[g][m] = 0;
  endtask

  function automatic logic [255:0] g_mem_peek(int g, int unsigned idx);
    return (g == 0) ? g_inst[0].mem.peek(idx) : g_inst[1].mem.peek(idx);
  endfunction

  // other master's responses must never show up at an idle master
  always @(posedge clk) if (rst_n) for (int g = 0; g < 2; g++) begin
    chk(!(s_rvalid[g][0] && s_rvalid[g][1]), "R to one master at a time");
    chk(!(s_bvalid[g][0] && s_bvalid[g][1]), "B to one master at a time");
  end

  task automatic traffic(int g, int m, int n);
    for (int k = 0; k < n; k++) begin
      int unsigned base = (m == 0) ? 32'h0000_1000 : 32'h0000_8000;
      int unsigned idx = base + $urandom_range(0, 200);
      if ($urandom_range(0, 1)) wr(g, m, idx, $urandom_range(1, 8));
      else rd(g, m, idx, $urandom_range(1, 8));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // mixed random traffic on both instances, both masters at once
    fork
      traffic(0, 0, 60);
      traffic(0, 1, 60);
      traffic(1, 0, 60);
      traffic(1, 1, 60);
    join
    // policy: both masters keep write requests pending
    policy_phase = 1;
    fork
      for (int k = 0; k < 12; k++) wr(0, 0, 32'h2000 + 4 * k, 2, 0);
      for (int k = 0; k < 12; k++) wr(0, 1, 32'h3000 + 4 * k, 2, 0);
      for (int k = 0; k < 12; k++) wr(1, 0, 32'h2000 + 4 * k, 2, 0);
      for (int k = 0; k < 12; k++) wr(1, 1, 32'h3000 + 4 * k, 2, 0);
    join
    policy_phase = 0;
    // read back everything written in the policy phase
    for (int g = 0; g < 2; g++) begin
      rd(g, 0, 32'h2000, 48);
      rd(g, 1, 32'h3000, 48);
    end
    chk(alternations >= 8, $sformatf("round robin contested grants: %0d", alternations));
    chk(prio_wins >= 8, $sformatf("fixed priority contested grants: %0d", prio_wins));
    chk(n_delayed[0] > 0 && n_delayed[1] > 0, "delayed flag seen");
    $display("rr_contested=%0d prio_contested=%0d delayed=%0d/%0d",
             alternations, prio_wins, n_delayed[0], n_delayed[1]);
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
