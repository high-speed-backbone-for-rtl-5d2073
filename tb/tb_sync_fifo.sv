// tb_sync_fifo: random pushes and pops against a queue model, at a small depth so
// that full and empty are reached often. Checks data order, count, full, empty,
// that writes when full and reads when empty are ignored, and fall-through of
// the first word in the cycle after it is written.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 8;
  logic wr = 0, rd = 0, full, empty;
  logic [63:0] wdata = '0, rdata;
  logic [3:0] count;
  logic [63:0] model[$];
  int n_full = 0, n_empty_rd = 0;

  sync_fifo #(.DW(64), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    wdata = 64'h1111; wr = 1;
    @(negedge clk);
    wr = 0;
    chk(rdata == 64'h1111 && !empty, "first word falls through");
    model.push_back(64'h1111);
    for (int i = 0; i < 3000; i++) begin
      wr = ($urandom_range(0, 99) < (i < 1500 ? 60 : 40));
      rd = ($urandom_range(0, 99) < (i < 1500 ? 40 : 60));
      wdata = {$urandom, $urandom};
      #1;
      chk(count == 4'(model.size()), "count matches model");
      chk(full == (model.size() == DEPTH), "full flag");
      chk(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) chk(rdata == model[0], "head data");
      if (full && wr) n_full++;
      if (empty && rd) n_empty_rd++;
      @(posedge clk);
      if (rd && model.size() > 0) void'(model.pop_front());
      if (wr && model.size() + (rd ? 1 : 0) < DEPTH + (rd ? 1 : 0) && !(full)) model.push_back(wdata);
      @(negedge clk);
    end
    chk(n_full > 0 && n_empty_rd > 0, "full and empty were both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
