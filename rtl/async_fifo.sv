// async_fifo: dual-clock FIFO for crossing one AXI channel between clock domains.
//
// Entries are written on wclk and read on rclk. Each side keeps a binary pointer
// one bit wider than the address and publishes it in Gray code; the other side
// samples it through a two-flop synchronizer, so only one bit of a crossing
// pointer changes per step. Full is judged on the write side against the
// synchronized read pointer, empty on the read side against the synchronized write
// pointer; both are therefore pessimistic by the synchronizer delay (two or three
// cycles of the observing clock), never optimistic.
// Interface: wr/wdata/full on the write side, rd/rdata/empty on the read side,
// with rdata showing the oldest entry while empty is low (first-word fall-through).
// Each side has its own synchronous active-low reset; both resets must be applied
// together, with no traffic, before use. This is a standard clock-crossing FIFO,
// this design's own implementation of the clock conversion in the interconnect.
module async_fifo #(
  parameter int unsigned DW = 64,
  parameter int unsigned AW = 3            // depth 2**AW
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          empty
);

  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wbin, rbin, wgray, rgray;
  logic [AW:0]   rgray_w1, rgray_w2;        // read pointer seen in the write domain
  logic [AW:0]   wgray_r1, wgray_r2;        // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------------------------------------------------------- write side
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + (AW+1)'(wr && !full);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------------------------------------------------------- read side
  logic [AW:0] rbin_nx;
  assign rbin_nx = rbin + (AW+1)'(rd && !empty);
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
