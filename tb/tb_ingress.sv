// tb_ingress: receive-side TLP decoder driven with a mix of TLPs built here.
// A stream driver sends MWr register writes, MRd register reads, CplD payloads of
// DMA writes and packets that must be ignored (MWr longer than one DW, a 4-DW MRd,
// a message), with random gaps in rx_tvalid. An egress model answers each read
// request with comp_done after a random delay; a DMA sink takes payload words with
// random back-pressure. Checks: every register write arrives once with the right
// index and data, each read request carries the right index and requester fields,
// CplD payload words come out realigned in order with dma_wlast on the last, the
// ignored packets cause nothing, and the stream is stalled while a read waits.
module tb_ingress;
  import ess_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] rx_tdata = '0;
  logic [7:0]  rx_tkeep = 8'hFF;
  logic        rx_tlast = 0, rx_tvalid = 0, rx_tready;
  logic        reg_wr_en;
  reg_idx_t    reg_wr_idx, reg_rd_idx;
  logic [31:0] reg_wr_data;
  logic        req_comp, comp_done = 0;
  cpl_req_t    cpl_req;
  logic [63:0] dma_wdata;
  logic        dma_wvalid, dma_wlast, dma_wready = 0;

  ingress dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [63:0] d; logic l; } beat_t;
  beat_t rxq[$];
  typedef struct { reg_idx_t idx; logic [31:0] data; } wr_t;
  wr_t exp_wr[$];
  typedef struct { reg_idx_t idx; cpl_req_t r; } rd_t;
  rd_t exp_rd[$];
  logic [63:0] exp_dma[$];
  logic        exp_dma_last[$];
  int n_wr = 0, n_rd = 0, n_dma = 0, n_stall = 0;

  function automatic beat_t mk(logic [63:0] d, logic l);
    beat_t b; b.d = d; b.l = l; return b;
  endfunction

  task automatic send_mwr(reg_idx_t idx, logic [31:0] data);
    rxq.push_back(mk({16'h0000, 8'h00, 4'h0, 4'hF, 1'b0, 2'b10, 5'b00000, 14'b0, 10'd1}, 0));
    rxq.push_back(mk({data, 18'h0, idx, 2'b00}, 1));
    exp_wr.push_back('{idx, data});
  endtask

  task automatic send_mrd(reg_idx_t idx);
    cpl_req_t r;
    r.requester_id = 16'($urandom); r.tag = 8'($urandom); r.tc = 3'($urandom);
    r.attr = 2'($urandom); r.lower_addr = {idx[4:0], 2'b00};
    rxq.push_back(mk({r.requester_id, r.tag, 4'h0, 4'hF,
                      1'b0, 2'b00, 5'b00000, 1'b0, r.tc, 4'b0, 2'b0, r.attr, 2'b0, 10'd1}, 0));
    rxq.push_back(mk({32'h0, 18'h0, idx, 2'b00}, 1));
    exp_rd.push_back('{idx, r});
  endtask

  task automatic send_cpld(int ndw);
    logic [31:0] p[$];
    for (int i = 0; i < ndw; i++) p.push_back($urandom);
    rxq.push_back(mk({16'h0100, 3'b000, 1'b0, 12'(4 * ndw),
                      1'b0, 2'b10, 5'b01010, 14'b0, 10'(ndw)}, 0));
    rxq.push_back(mk({p[0], 16'h0000, 8'h00, 8'h00}, ndw == 1));
    for (int i = 1; i < ndw; i += 2)
      rxq.push_back(mk({(i + 1 < ndw) ? p[i + 1] : 32'h0, p[i]}, i + 2 >= ndw));
    for (int w = 0; w < ndw / 2; w++) begin
      exp_dma.push_back({p[2 * w + 1], p[2 * w]});
      exp_dma_last.push_back(w == ndw / 2 - 1);
    end
  endtask

  task automatic send_ignored(int kind);
    case (kind)
      0: begin // MWr of two DW
        rxq.push_back(mk({32'h0000_00FF, 1'b0, 2'b10, 5'b00000, 14'b0, 10'd2}, 0));
        rxq.push_back(mk({32'h1, 32'h0000_0040}, 0));
        rxq.push_back(mk({32'h0, 32'h2}, 1));
      end
      1: begin // MRd with 4-DW header
        rxq.push_back(mk({32'h0000_00FF, 1'b0, 2'b01, 5'b00000, 14'b0, 10'd1}, 0));
        rxq.push_back(mk({32'h0000_0040, 32'h0000_0001}, 1));
      end
      default: begin // message
        rxq.push_back(mk({32'h0000_0000, 1'b0, 2'b01, 5'b10000, 14'b0, 10'd0}, 0));
        rxq.push_back(mk({32'h0, 32'h0}, 0));
        rxq.push_back(mk({32'h0, 32'h0}, 1));
      end
    endcase
  endtask

  // stream driver with random gaps
  logic taken = 0;
  always @(posedge clk) begin
    taken <= rst_n && rx_tvalid && rx_tready;
    if (rst_n && rx_tvalid && rx_tready) void'(rxq.pop_front());
  end
  always @(negedge clk) begin
    if (rx_tvalid && !taken) ;  // hold the offered beat until it is taken
    else if (rxq.size() != 0 && $urandom_range(0, 3) != 0) begin
      rx_tvalid <= 1; rx_tdata <= rxq[0].d; rx_tlast <= rxq[0].l;
    end else rx_tvalid <= 0;
  end

  // egress model: comp_done one cycle, some cycles after req_comp
  int cdelay = 0;
  always @(negedge clk) begin
    comp_done <= 0;
    if (req_comp && !comp_done) begin
      if (cdelay == 0) cdelay = $urandom_range(1, 6);
      else if (--cdelay == 0) comp_done <= 1;
    end
  end

  // DMA sink
  always @(negedge clk) dma_wready <= ($urandom_range(0, 2) != 0);

  logic req_q;
  always @(posedge clk) begin
    if (!rst_n) req_q <= 0;
    else begin
      req_q <= req_comp;
      if (reg_wr_en) begin
        n_wr++;
        if (exp_wr.size() == 0) chk(0, "unexpected register write");
        else begin
          wr_t e;
          e = exp_wr.pop_front();
          chk(reg_wr_idx == e.idx && reg_wr_data == e.data,
              $sformatf("write %h=%h expected %h=%h", reg_wr_idx, reg_wr_data, e.idx, e.data));
        end
      end
      if (req_comp && !req_q) begin
        n_rd++;
        if (exp_rd.size() == 0) chk(0, "unexpected read request");
        else begin
          rd_t e;
          e = exp_rd.pop_front();
          chk(reg_rd_idx == e.idx && cpl_req == e.r,
              $sformatf("read %h/%h expected %h/%h", reg_rd_idx, cpl_req, e.idx, e.r));
        end
      end
      if (req_comp) begin
        chk(!rx_tready, "stream stalled while the completion is pending");
        if (rx_tvalid) n_stall++;
      end
      if (dma_wvalid && dma_wready) begin
        n_dma++;
        if (exp_dma.size() == 0) chk(0, "unexpected DMA word");
        else begin
          logic [63:0] e; logic el;
          e = exp_dma.pop_front(); el = exp_dma_last.pop_front();
          chk(dma_wdata == e && dma_wlast == el,
              $sformatf("DMA word %h/%0d expected %h/%0d", dma_wdata, dma_wlast, e, el));
        end
      end
    end
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      case ($urandom_range(0, 5))
        0, 1: send_mwr(reg_idx_t'($urandom), $urandom);
        2, 3: send_mrd(reg_idx_t'($urandom));
        4:    send_cpld(2 * $urandom_range(1, 32));
        default: send_ignored($urandom_range(0, 2));
      endcase
    end
    t = 0;
    while ((rxq.size() != 0 || req_comp) && t < 40000) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
    chk(exp_wr.size() == 0 && exp_rd.size() == 0 && exp_dma.size() == 0, "all expected actions seen");
    chk(n_wr > 0 && n_rd > 0 && n_dma > 0 && n_stall > 0, "writes, reads, payload and stalls exercised");
    $display("writes=%0d reads=%0d dma_words=%0d stalled=%0d", n_wr, n_rd, n_dma, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
