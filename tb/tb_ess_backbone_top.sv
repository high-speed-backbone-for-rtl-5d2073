// tb_ess_backbone_top: end-to-end test of the backbone at its default parameters.
//
// A host model plays the PCIe core and root complex: it sends register writes and
// reads as TLPs on the receive stream, answers the backbone's read requests with
// completions from a host memory array, and stores the data of the backbone's
// MWr packets in that array. axi_mem_model stands in for the DDR3 memory
// interface, with random back-pressure, on a memory clock twice the PCIe clock. The test covers: firmware ID and status
// registers, register write/read and master reset, a DMA write (host -> memory),
// a multi-packet DMA read (memory -> host) with and without the sample byte swap,
// interrupts and their clearing, an ADC acquisition running while a DMA write
// competes for the memory, a read on the second interconnect port during a DMA
// read, transmit back-pressure, the memory manual reset, and the command-inhibit
// to NOP substitution. Expected values are computed here, not taken from the DUT.
// Each mechanism is counted, and one that never happened counts as a failure.
module tb_ess_backbone_top;
  import ess_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mem_clk = 1'b0, mem_rst_n;
  always #4 clk = ~clk;   // 125 MHz
  initial begin           // 250 MHz memory clock, offset from clk
    #1;
    forever #2 mem_clk = ~mem_clk;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ DUT
  logic [63:0] rx_tdata, tx_tdata;
  logic [7:0]  rx_tkeep, tx_tkeep;
  logic        rx_tlast, rx_tvalid, rx_tready, tx_tlast, tx_tvalid, tx_tready;
  logic [15:0] completer_id = 16'h0300;
  logic        link_up = 1'b1, bus_master_en = 1'b1, mem_init_done = 1'b1;
  logic        irq, user_irq = 1'b0, mem_reset;
  logic [NUM_ADC_CH-1:0][15:0] adc_data;
  logic        adc_valid = 1'b0;
  logic [31:0] adc_dropped;
  axi_ax_t     m_aw, m_ar, aux_ar;
  logic        m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [255:0] m_wdata, m_rdata, aux_rdata;
  logic [31:0] m_wstrb;
  logic [1:0]  m_bresp, m_rresp, aux_rresp, arb_delayed;
  logic        aux_arvalid = 1'b0, aux_arready, aux_rlast, aux_rvalid, aux_rready = 1'b1;
  ddr3_cmd_e   ddr_cmd = CMD_NOP;
  logic        ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n, ddr_a10;

  ess_backbone_top dut (.*);

  axi_mem_model #(.READ_LAT(6), .STALLS(1'b1)) mem (
    .clk(mem_clk), .rst_n(mem_rst_n),
    .aw(m_aw), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .ar(m_ar), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready)
  );

  // ------------------------------------------------------------ counters
  int n_reg_wr = 0, n_cpl = 0, n_mrd = 0, n_mwr = 0, n_bubble_pkts = 0;
  int n_tx_stall = 0, n_rx_stall = 0, n_irq = 0, n_contention = 0, n_aux_reads = 0;
  int n_swap = 0, n_daq = 0, n_master_rst = 0, n_mem_reset = 0, n_nop_subst = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ host memory
  logic [31:0] host [int unsigned];          // indexed by byte address / 4
  function automatic logic [31:0] host_rd(int unsigned a);
    if (host.exists(a >> 2)) return host[a >> 2];
    return 32'hDEAD_0000 | (a >> 2);
  endfunction

  // ------------------------------------------------------------ rx driver
  typedef struct packed { logic [63:0] d; logic [7:0] k; logic l; } beat_t;
  beat_t rx_q[$];
  bit    tx_stall_on = 1'b0;

  initial begin
    rx_tvalid = 1'b0; rx_tdata = '0; rx_tkeep = '0; rx_tlast = 1'b0;
  end
  always @(posedge clk) begin
    if (rx_tvalid && rx_tready) void'(rx_q.pop_front());
    if (rst_n && rx_tvalid && !rx_tready) n_rx_stall++;
    if (rx_q.size() > 0) begin
      rx_tvalid <= 1'b1;
      rx_tdata  <= rx_q[0].d;
      rx_tkeep  <= rx_q[0].k;
      rx_tlast  <= rx_q[0].l;
    end else begin
      rx_tvalid <= 1'b0;
    end
  end

  localparam logic [15:0] HOST_ID = 16'h0000;
  logic [7:0] tag_ctr = 8'h10;

  task automatic reg_write(input logic [11:0] idx, input logic [31:0] data);
    logic [31:0] dw0, dw1, dw2;
    dw0 = {1'b0, 2'b10, 5'b00000, 1'b0, 3'b0, 4'b0, 1'b0, 1'b0, 2'b0, 2'b0, 10'd1};
    dw1 = {HOST_ID, tag_ctr, 4'h0, 4'hF};
    dw2 = {18'h0, idx, 2'b00};
    tag_ctr++;
    rx_q.push_back('{d: {dw1, dw0}, k: 8'hFF, l: 1'b0});
    rx_q.push_back('{d: {data, dw2}, k: 8'hFF, l: 1'b1});
    n_reg_wr++;
  endtask

  logic [31:0] cpl_data_q[$];
  logic [7:0]  cpl_tag_q[$];

  task automatic reg_read(input logic [11:0] idx, output logic [31:0] data);
    logic [31:0] dw0, dw1, dw2;
    logic [7:0]  t;
    int          guard;
    t   = tag_ctr++;
    dw0 = {1'b0, 2'b00, 5'b00000, 1'b0, 3'b0, 4'b0, 1'b0, 1'b0, 2'b0, 2'b0, 10'd1};
    dw1 = {HOST_ID, t, 4'h0, 4'hF};
    dw2 = {18'h0, idx, 2'b00};
    rx_q.push_back('{d: {dw1, dw0}, k: 8'hFF, l: 1'b0});
    rx_q.push_back('{d: {32'h0, dw2}, k: 8'h0F, l: 1'b1});
    guard = 0;
    while (cpl_data_q.size() == 0 && guard < 2000) begin @(posedge clk); guard++; end
    if (cpl_data_q.size() == 0) begin
      check(0, $sformatf("no completion for read of 0x%03h", idx));
      data = '0;
    end else begin
      data = cpl_data_q.pop_front();
      check(cpl_tag_q.pop_front() == t, "completion tag matches request tag");
    end
  endtask

  task automatic expect_reg(input logic [11:0] idx, input logic [31:0] exp, input string what);
    logic [31:0] v;
    reg_read(idx, v);
    check(v == exp, $sformatf("%s: reg 0x%03h = %08h, expected %08h", what, idx, v, exp));
  endtask

  // ------------------------------------------------------------ tx monitor / host
  typedef struct { int unsigned addr; int unsigned len; logic [7:0] tag; longint due; } mrd_t;
  mrd_t   mrd_q[$];
  longint mwr_hdr_cycle[$];
  int     tx_state = 0;       // 0: header beat, 1: second beat, 2: payload
  logic [6:0]  t_ft;
  int unsigned t_len, t_addr, t_left;
  logic [7:0]  t_tag;

  always @(posedge clk) begin
    if (!rst_n) tx_tready <= 1'b1;
    else        tx_tready <= tx_stall_on ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (rst_n && tx_tvalid && !tx_tready) n_tx_stall++;
    if (rst_n && tx_tvalid && tx_tready) begin
      case (tx_state)
        0: begin
          t_ft  = tx_tdata[30:24];
          t_len = tx_tdata[9:0];
          t_tag = tx_tdata[47:40];
          if (t_ft == 7'h40) mwr_hdr_cycle.push_back(cycle);
          check(tx_tdata[63:48] == completer_id || t_ft == 7'h4A, "requester ID is the endpoint's");
          check(!tx_tlast, "header beat is not the last beat");
          tx_state = 1;
        end
        1: begin
          if (t_ft == 7'h4A) begin
            cpl_data_q.push_back(tx_tdata[63:32]);
            cpl_tag_q.push_back(tx_tdata[15:8]);
            check(tx_tlast && tx_tkeep == 8'hFF, "completion is two full beats");
            n_cpl++;
            tx_state = 0;
          end else if (t_ft == 7'h00) begin
            mrd_q.push_back('{addr: tx_tdata[31:0], len: t_len, tag: t_tag, due: cycle + 20});
            check(tx_tlast && tx_tkeep == 8'h0F, "read request is a 3-DW header only");
            n_mrd++;
            tx_state = 0;
          end else if (t_ft == 7'h40) begin
            t_addr = tx_tdata[31:0];
            host[t_addr >> 2] = tx_tdata[63:32];
            t_addr += 4;
            t_left = t_len - 1;
            n_mwr++;
            tx_state = tx_tlast ? 0 : 2;
            check((t_left == 0) == tx_tlast, "MWr length matches beats");
          end else begin
            check(0, $sformatf("unexpected TLP type %02h", t_ft));
            tx_state = tx_tlast ? 0 : 2;
            t_left = 0;
          end
        end
        default: begin
          host[t_addr >> 2] = tx_tdata[31:0];
          t_addr += 4; t_left--;
          if (t_left > 0) begin
            host[t_addr >> 2] = tx_tdata[63:32];
            t_addr += 4; t_left--;
          end else begin
            check(tx_tkeep == 8'h0F, "odd final DW leaves the upper half empty");
          end
          if (tx_tlast) begin
            check(t_left == 0, "MWr ended with its payload");
            tx_state = 0;
          end
        end
      endcase
    end
  end

  // Answers read requests with one CplD each after a delay
  always @(posedge clk) begin
    if (mrd_q.size() > 0 && cycle >= mrd_q[0].due) begin
      mrd_t r;
      logic [31:0] d[$];
      logic [31:0] dw0, dw1, dw2;
      r = mrd_q.pop_front();
      d.delete();
      for (int i = 0; i < int'(r.len); i++) d.push_back(host_rd(r.addr + 4 * i));
      dw0 = {1'b0, 2'b10, 5'b01010, 1'b0, 3'b0, 4'b0, 6'b0, 10'(r.len)};
      dw1 = {HOST_ID, 3'b000, 1'b0, 12'(4 * r.len)};
      dw2 = {completer_id, r.tag, 1'b0, 7'(r.addr)};
      rx_q.push_back('{d: {dw1, dw0}, k: 8'hFF, l: 1'b0});
      rx_q.push_back('{d: {d[0], dw2}, k: 8'hFF, l: (r.len == 1)});
      for (int i = 1; i < int'(r.len); i += 2)
        rx_q.push_back('{d: {(i + 1 < int'(r.len)) ? d[i + 1] : 32'h0, d[i]},
                         k: (i + 1 < int'(r.len)) ? 8'hFF : 8'h0F,
                         l: (i + 2 >= int'(r.len))});
    end
  end

  always @(posedge clk) if (arb_delayed != 0) n_contention++;
  logic irq_q = 1'b0;
  always @(posedge clk) begin irq_q <= irq; if (irq && !irq_q) n_irq++; end

  task automatic wait_irq(input int bitn, input string what);
    logic [31:0] st;
    int guard;
    guard = 0;
    st = 0;
    while (!st[bitn] && guard < 100) begin
      repeat (20) @(posedge clk);
      reg_read(R_IRQ_STATUS, st);
      guard++;
    end
    check(st[bitn] == 1'b1, {what, " interrupt status bit set"});
  endtask

  // ------------------------------------------------------------ sequence
  logic [31:0] v;
  int sc;
  int unsigned mem_base, nbytes;
  logic [255:0] w;

  initial begin
    for (int c = 0; c < NUM_ADC_CH; c++) adc_data[c] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // identification and status
    expect_reg(R_ID, 32'h8301_2808, "firmware ID");
    expect_reg(R_STEADY, 32'h7, "steady state signals");
    link_up = 1'b0;
    expect_reg(R_STEADY, 32'h5, "steady state with link down");
    link_up = 1'b1;

    // plain registers, user registers, master reset
    reg_write(12'h400, 32'h1234_5678);
    reg_write(12'h4FF, 32'hCAFE_F00D);
    reg_write(R_DRD_LEN, 32'h0000_0100);
    reg_write(12'h125, 32'h0000_0777);
    expect_reg(12'h400, 32'h1234_5678, "user register 0x400");
    expect_reg(12'h4FF, 32'hCAFE_F00D, "user register 0x4FF");
    expect_reg(R_DRD_LEN, 32'h0000_0100, "DMA READ LEN");
    expect_reg(12'h125, 32'h0000_0777, "ADC ch 6 start address");
    reg_write(R_MASTER_RST, 32'h1);
    n_master_rst++;
    expect_reg(12'h400, 32'h0, "user register after master reset");
    expect_reg(R_DRD_LEN, 32'h0, "DMA READ LEN after master reset");
    expect_reg(R_ID, 32'h8301_2808, "firmware ID after master reset");

    reg_write(R_IRQ_EN, 32'h0000_C003);

    // ---------------- DMA write: 64 bytes host 0x1000 -> memory 0x40
    for (int i = 0; i < 16; i++) host[(32'h1000 >> 2) + i] = 32'hA000_0000 + i * 32'h0101;
    reg_write(R_DWR_SRC_LO, 32'h0000_1000);
    reg_write(R_DWR_DST,    32'h0000_0040);
    reg_write(R_DWR_LEN,    32'd64);
    reg_write(R_DWR_CTRL,   32'h1);
    wait_irq(IRQ_WR_DMA, "DMA write done");
    check(irq == 1'b1, "interrupt line raised for enabled status bit");
    for (int i = 0; i < 16; i++) begin
      w = mem.peek((32'h40 >> 5) + i / 8);
      check(w[32 * (i % 8) +: 32] == 32'hA000_0000 + i * 32'h0101,
            $sformatf("DMA write DW %0d in memory", i));
    end
    reg_write(R_IRQ_CLEAR, 32'h0000_0002);
    expect_reg(R_IRQ_STATUS, 32'h0, "IRQ status after clear");
    check(irq == 1'b0, "interrupt line low after clear");

    // ---------------- DMA read: 512 bytes memory 0x2000 -> host 0x8000
    mem_base = 32'h2000; nbytes = 512;
    for (int i = 0; i < int'(nbytes / 32); i++)
      for (int j = 0; j < 8; j++) w[32 * j +: 32] = 32'h5000_0000 + (i * 8 + j);
    for (int i = 0; i < int'(nbytes / 32); i++) begin
      for (int j = 0; j < 8; j++) w[32 * j +: 32] = 32'h5000_0000 + (i * 8 + j);
      mem.poke((mem_base >> 5) + i, w);
    end
    reg_write(R_DRD_DST_LO, 32'h0000_8000);
    reg_write(R_DRD_SRC,    mem_base);
    reg_write(R_DRD_LEN,    nbytes);
    mwr_hdr_cycle.delete();
    tx_stall_on = 1'b1;
    // a read on the second interconnect port competes for the memory
    fork
      begin
        @(posedge clk);
        aux_ar <= '{addr: 32'h40, len: 8'd0, size: 3'd5, burst: AXI_BURST_INCR};
        aux_arvalid <= 1'b1;
        do @(posedge clk); while (!aux_arready);
        aux_arvalid <= 1'b0;
        do @(posedge clk); while (!aux_rvalid);
        check(aux_rdata[31:0] == 32'hA000_0000 && aux_rlast, "second read port data");
        n_aux_reads++;
      end
    join_none
    reg_write(R_DRD_CTRL, 32'h1);
    wait_irq(IRQ_RD_DMA, "DMA read done");
    tx_stall_on = 1'b0;
    check(mwr_hdr_cycle.size() == nbytes / 128, $sformatf("DMA read sent %0d MWr packets", mwr_hdr_cycle.size()));
    if (mwr_hdr_cycle.size() > 1) n_bubble_pkts += mwr_hdr_cycle.size() - 1;
    for (int i = 0; i < int'(nbytes / 4); i++)
      check(host_rd(32'h8000 + 4 * i) == 32'h5000_0000 + i, $sformatf("DMA read DW %0d in host", i));
    reg_write(R_IRQ_CLEAR, 32'h1);

    // ---------------- DMA read with sample byte swap, 64 bytes
    reg_write(R_DRD_SWAP, 32'h1);
    reg_write(R_DRD_DST_LO, 32'h0000_9000);
    reg_write(R_DRD_LEN, 32'd64);
    reg_write(R_DRD_CTRL, 32'h1);
    wait_irq(IRQ_RD_DMA, "DMA read (swapped) done");
    for (int i = 0; i < 16; i++) begin
      logic [31:0] e;
      e = 32'h5000_0000 + i;
      check(host_rd(32'h9000 + 4 * i) == {e[23:16], e[31:24], e[7:0], e[15:8]},
            $sformatf("swapped DW %0d", i));
    end
    n_swap++;
    reg_write(R_DRD_SWAP, 32'h0);
    reg_write(R_IRQ_CLEAR, 32'h1);

    // ---------------- ADC acquisition racing a DMA write
    for (int c = 0; c < NUM_ADC_CH; c++) reg_write(R_ADC_ADDR0 + 12'(c), 32'h1000 + 32'(c) * 16);
    reg_write(R_ADC_BLK_LEN, 32'd2);
    reg_write(R_ADC_SAMPLE, 32'h0000_03FF);
    for (int i = 0; i < 16; i++) host[(32'h3000 >> 2) + i] = 32'hB000_0000 + i;
    reg_write(R_DWR_SRC_LO, 32'h0000_3000);
    reg_write(R_DWR_DST,    32'h0001_0000);
    reg_write(R_DWR_LEN,    32'd64);
    reg_write(R_ADC_ACQ, 32'h1);
    reg_write(R_DWR_CTRL, 32'h1);
    // samples arrive every cycle; sample value = channel * 4096 + running count
    begin
      int guard = 0;
      sc = 0;
      while (!dut.u_adc.busy && guard < 200) begin @(posedge clk); guard++; end
      while (dut.u_adc.busy && guard < 20000) begin
        adc_valid <= 1'b1;
        for (int c = 0; c < NUM_ADC_CH; c++) adc_data[c] <= 16'(c * 4096 + sc);
        sc++;
        @(posedge clk);
        guard++;
      end
      adc_valid <= 1'b0;
    end
    wait_irq(IRQ_DAQ, "DAQ done");
    wait_irq(IRQ_WR_DMA, "DMA write during acquisition done");
    n_daq++;
    // each block holds 16 consecutive samples of its own channel; the samples that
    // arrived while blocks were written are missing between block 0 and block 1
    begin
      logic [255:0] w0, w1;
      int unsigned first0, first1;
      w0 = mem.peek(32'h1000);
      w1 = mem.peek(32'h1001);
      first0 = w0[15:0];
      first1 = w1[15:0];
      check(first1 - first0 - 16 <= adc_dropped && adc_dropped <= sc - 32 && adc_dropped > 0,
            $sformatf("dropped count %0d between block gap %0d and samples offered %0d less 32",
                      adc_dropped, first1 - first0 - 16, sc));
      for (int c = 0; c < NUM_ADC_CH; c++)
        for (int b = 0; b < 2; b++) begin
          w = mem.peek(32'h1000 + c * 16 + b);
          for (int k = 0; k < 16; k++)
            check(w[16 * k +: 16] == 16'(c * 4096 + (b == 0 ? first0 : first1) + k),
                  $sformatf("ADC ch %0d block %0d sample %0d", c, b, k));
        end
    end
    for (int i = 0; i < 16; i++) begin
      w = mem.peek((32'h0001_0000 >> 5) + i / 8);
      check(w[32 * (i % 8) +: 32] == 32'hB000_0000 + i, $sformatf("concurrent DMA write DW %0d: %08h", i, w[32 * (i % 8) +: 32]));
    end
    reg_write(R_IRQ_CLEAR, 32'h0000_4002);

    // ---------------- user interrupt
    @(posedge clk) user_irq <= 1'b1;
    @(posedge clk) user_irq <= 1'b0;
    expect_reg(R_IRQ_STATUS, 32'h0000_8000, "user IRQ status");
    reg_write(R_IRQ_CLEAR, 32'h0000_8000);
    expect_reg(R_IRQ_STATUS, 32'h0, "user IRQ cleared");

    // ---------------- memory manual reset
    reg_write(R_MEM_RESET, 32'h1);
    repeat (10) @(posedge clk);
    check(mem_reset == 1'b1, "memory reset asserted");
    expect_reg(R_MEM_RESET, 32'h1, "memory reset register");
    reg_write(R_MEM_RESET, 32'h0);
    repeat (10) @(posedge clk);
    check(mem_reset == 1'b0, "memory reset released");
    n_mem_reset++;

    // ---------------- command encoder: inhibit goes out as NOP
    @(posedge clk) ddr_cmd <= CMD_INHIBIT;
    @(posedge clk) ddr_cmd <= CMD_NOP;
    @(posedge clk);
    check({ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} == 4'b0111, "inhibit sent as NOP");
    n_nop_subst++;

    repeat (20) @(posedge clk);
    // every mechanism must have happened
    check(n_reg_wr > 0,       "register writes happened");
    check(n_cpl > 0,          "completions happened");
    check(n_mrd > 0,          "DMA read requests to host happened");
    check(n_mwr > 0,          "MWr packets happened");
    check(n_bubble_pkts > 0,  "back-to-back packets through BUBBLE_STATE happened");
    check(n_tx_stall > 0,     "transmit back-pressure happened");
    check(n_rx_stall > 0,     "receive stall happened");
    check(n_irq > 0,          "interrupts happened");
    check(n_contention > 0,   "a master delayed by the arbiter happened");
    check(n_aux_reads > 0,    "second-port read happened");
    check(n_swap > 0 && n_daq > 0 && n_master_rst > 0 && n_mem_reset > 0 && n_nop_subst > 0,
          "swap, acquisition, master reset, memory reset and NOP substitution happened");
    $display("mechanisms: regwr=%0d cpl=%0d mrd=%0d mwr=%0d bubble=%0d txstall=%0d rxstall=%0d irq=%0d contention=%0d aux=%0d",
             n_reg_wr, n_cpl, n_mrd, n_mwr, n_bubble_pkts, n_tx_stall, n_rx_stall, n_irq, n_contention, n_aux_reads);
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
