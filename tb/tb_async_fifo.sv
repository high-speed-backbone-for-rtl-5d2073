// tb_async_fifo: dual-clock FIFO against a queue model, in both clock orders.
//
// Two instances of depth 8: one with a write clock faster than the read clock, one
// the other way round (clock periods 6/14 and 14/6 time units, unrelated phases).
// Writers and readers request at random. Every accepted write is pushed to a
// queue, every accepted read must return the queue's oldest entry, the occupancy
// may never exceed the depth, and the fast-writer instance must fill all 8 entries
// (full raised too early would show here). At the end both FIFOs are drained and
// must come back empty with every word delivered.
module tb_async_fifo;
  localparam int unsigned AW = 3;
  localparam int unsigned N  = 3000;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rst_n = 1'b0;
  int   done_cnt = 0;

  for (genvar g = 0; g < 2; g++) begin : g_inst
    localparam int WP = (g == 0) ? 3 : 7;
    localparam int RP = (g == 0) ? 7 : 3;
    logic wclk = 1'b0, rclk = 1'b0;
    logic wr = 1'b0, rd = 1'b0, full, empty;
    logic [15:0] wdata = '0, rdata;
    logic [15:0] q[$];
    int sent = 0, got = 0, max_occ = 0, occ;
    bit  draining = 0;

    initial begin #(g + 1); forever #(WP) wclk = ~wclk; end
    initial begin #(2 * g + 2); forever #(RP) rclk = ~rclk; end

    async_fifo #(.DW(16), .AW(AW)) dut (
      .wclk, .wrst_n(rst_n), .wr, .wdata, .full,
      .rclk, .rrst_n(rst_n), .rd, .rdata, .empty);

    assign occ = q.size();

    always @(posedge wclk) if (rst_n) begin
      if (wr && !full) begin
        q.push_back(wdata);
        sent <= sent + 1;
      end
    end
    always @(negedge wclk) begin
      if (occ > max_occ) max_occ = occ;
      wr    <= rst_n && (sent < N) && ($urandom_range(0, 3) != 0);
      wdata <= 16'($urandom);
    end

    always @(posedge rclk) if (rst_n) begin
      if (rd && !empty) begin
        logic [15:0] e;
        chk(q.size() != 0, "read from empty model");
        if (q.size() != 0) begin
          e = q.pop_front();
          chk(rdata == e, $sformatf("inst %0d data %h exp %h", g, rdata, e));
        end
        got <= got + 1;
      end
      chk(q.size() <= 2**AW, "occupancy above depth");
    end
    always @(negedge rclk)
      rd <= rst_n && (draining || $urandom_range(0, 2) != 0);

    initial begin
      wait (rst_n);
      wait (sent == N);
      draining = 1;
      wait (got == N);
      repeat (6) @(posedge rclk);
      chk(empty, "empty after drain");
      chk(q.size() == 0, "model empty after drain");
      if (g == 0) chk(max_occ == 2**AW, $sformatf("fast writer filled the FIFO (max %0d)", max_occ));
      done_cnt++;
    end
  end

  initial begin
    #100 rst_n = 1'b1;
    wait (done_cnt == 2);
    $display("words: %0d and %0d", g_inst[0].got, g_inst[1].got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
