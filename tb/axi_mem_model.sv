// axi_mem_model: behavioural 256-bit AXI4 memory slave for simulation.
//
// Stands in for the DDR3 memory interface and memory. Sparse storage, indexed by
// 32-byte word. Handles INCR bursts of 32-byte beats, one write and one read burst
// at a time, honours write strobes, and returns read data after READ_LAT cycles.
// With STALLS set, ready and valid signals are dropped at random cycles so that
// the masters see back-pressure and gaps in read data. Unwritten words read as a
// pattern derived from their index. Not synthesizable.
module axi_mem_model
  import ess_pkg::*;
#(
  parameter int unsigned READ_LAT = 6,
  parameter bit          STALLS   = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axi_ax_t      aw,
  input  logic         awvalid,
  output logic         awready,
  input  logic [255:0] wdata,
  input  logic [31:0]  wstrb,
  input  logic         wlast,
  input  logic         wvalid,
  output logic         wready,
  output logic [1:0]   bresp,
  output logic         bvalid,
  input  logic         bready,
  input  axi_ax_t      ar,
  input  logic         arvalid,
  output logic         arready,
  output logic [255:0] rdata,
  output logic [1:0]   rresp,
  output logic         rlast,
  output logic         rvalid,
  input  logic         rready
);

  logic [255:0] mem [int unsigned];
  int unsigned  writes, reads, beats_w, beats_r;

  function automatic logic [255:0] peek(int unsigned idx);
    if (mem.exists(idx)) return mem[idx];
    return {8{idx ^ 32'hA5A5_0000}};
  endfunction

  function automatic void poke(int unsigned idx, logic [255:0] v);
    mem[idx] = v;
  endfunction

  // write side
  logic        w_busy, b_pend;
  int unsigned w_idx;
  logic        rnd_w, rnd_aw, rnd_r;

  always_ff @(posedge clk) begin
    rnd_w  <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
    rnd_aw <= STALLS ? ($urandom_range(0, 1) != 0) : 1'b1;
    rnd_r  <= STALLS ? ($urandom_range(0, 4) != 0) : 1'b1;
  end

  assign awready = rst_n && !w_busy && !b_pend && rnd_aw;
  assign wready  = w_busy && rnd_w;
  assign bvalid  = b_pend;
  assign bresp   = AXI_RESP_OKAY;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_busy <= 1'b0;
      b_pend <= 1'b0;
      w_idx  <= 0;
      writes <= 0;
      beats_w <= 0;
    end else begin
      if (awvalid && awready) begin
        w_busy <= 1'b1;
        w_idx  <= aw.addr >> 5;
        writes <= writes + 1;
      end
      if (wvalid && wready) begin
        logic [255:0] v;
        v = peek(w_idx);
        for (int b = 0; b < 32; b++) if (wstrb[b]) v[8*b +: 8] = wdata[8*b +: 8];
        mem[w_idx] = v;
        w_idx   <= w_idx + 1;
        beats_w <= beats_w + 1;
        if (wlast) begin
          w_busy <= 1'b0;
          b_pend <= 1'b1;
        end
      end
      if (bvalid && bready) b_pend <= 1'b0;
    end
  end

  // read side
  logic        r_busy;
  int unsigned r_idx, r_left, r_wait;

  assign arready = rst_n && !r_busy;
  assign rvalid  = r_busy && (r_wait == 0) && rnd_r;
  assign rdata   = peek(r_idx);
  assign rresp   = AXI_RESP_OKAY;
  assign rlast   = (r_left == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_busy <= 1'b0;
      r_idx  <= 0;
      r_left <= 0;
      r_wait <= 0;
      reads  <= 0;
      beats_r <= 0;
    end else begin
      if (r_wait != 0) r_wait <= r_wait - 1;
      if (arvalid && arready) begin
        r_busy <= 1'b1;
        r_idx  <= ar.addr >> 5;
        r_left <= ar.len;
        r_wait <= READ_LAT;
        reads  <= reads + 1;
      end
      if (rvalid && rready) begin
        r_idx   <= r_idx + 1;
        beats_r <= beats_r + 1;
        if (r_left == 0) r_busy <= 1'b0;
        else             r_left <= r_left - 1;
      end
    end
  end

endmodule
