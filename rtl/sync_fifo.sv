// sync_fifo: single-clock first-word-fall-through FIFO, used as the DMA read FIFO.
//
// Memory read data from the DMA engine is written here and egress reads it back
// when it builds MWr packets. Egress only starts a packet once `count` shows the
// whole payload is present, so the packet leaves the endpoint without gaps even
// when the memory delivers data in pieces. rdata always shows the oldest word;
// rd pops it. wr is ignored when full, rd when empty. Storage is a plain array
// (block RAM on an FPGA).
// The document places a FIFO between the DMA and egress and says what it is for;
// its depth (one 36 Kbit block RAM of 64-bit words) and the FWFT style are this
// design's choices.
module sync_fifo #(
  parameter int unsigned DW    = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = AW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          full,
  output logic          empty,
  output logic [CW-1:0] count
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  logic do_wr, do_rd;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rdata = mem[rp];
  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);

endmodule
