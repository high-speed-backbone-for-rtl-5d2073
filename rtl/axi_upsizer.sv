// axi_upsizer: AXI4 write-path width converter, 64-bit slave to 256-bit master.
//
// The DMA writes memory with 64-bit beats while the memory interface takes 256-bit
// beats. One write burst is converted at a time: the AW is taken, re-issued with
// the address aligned to 32 bytes, size 5 and the number of wide beats the narrow
// burst covers; narrow beats are then packed into their byte lanes (address bits
// [4:3] select the lane of the first beat) and a wide beat, with the write strobes
// of the lanes actually filled, is sent when the top lane is filled or at the last
// narrow beat. The B response is passed back unchanged.
// Throughput: four narrow beats per wide beat plus at most one cycle while a wide
// beat waits for m_wready. The document names the up-sizer in the interconnect
// structure and the 64/256-bit widths; the packing method is this design's own.
module axi_upsizer
  import ess_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // 64-bit slave
  input  axi_ax_t      s_aw,
  input  logic         s_awvalid,
  output logic         s_awready,
  input  logic [63:0]  s_wdata,
  input  logic [7:0]   s_wstrb,
  input  logic         s_wlast,
  input  logic         s_wvalid,
  output logic         s_wready,
  output logic [1:0]   s_bresp,
  output logic         s_bvalid,
  input  logic         s_bready,
  // 256-bit master
  output axi_ax_t      m_aw,
  output logic         m_awvalid,
  input  logic         m_awready,
  output logic [255:0] m_wdata,
  output logic [31:0]  m_wstrb,
  output logic         m_wlast,
  output logic         m_wvalid,
  input  logic         m_wready,
  input  logic [1:0]   m_bresp,
  input  logic         m_bvalid,
  output logic         m_bready
);

  typedef enum logic [1:0] {IDLE, AW, W, B} state_e;
  state_e state;

  axi_ax_t      aw_q;
  logic [1:0]   lane;
  logic [255:0] buf_d;
  logic [31:0]  buf_s;
  logic         out_v;
  logic [255:0] out_d;
  logic [31:0]  out_s;
  logic         out_l;

  // Number of wide beats - 1 covered by the narrow burst
  logic [8:0] span;
  assign span = 9'(aw_q.addr[4:3]) + 9'(aw_q.len);

  always_comb begin
    m_aw.addr  = {aw_q.addr[31:5], 5'b0};
    m_aw.len   = 8'(span >> 2);
    m_aw.size  = 3'd5;
    m_aw.burst = AXI_BURST_INCR;
  end

  assign s_awready = (state == IDLE);
  assign m_awvalid = (state == AW);
  assign s_wready  = (state == W) && !out_v;
  assign m_wvalid  = out_v;
  assign m_wdata   = out_d;
  assign m_wstrb   = out_s;
  assign m_wlast   = out_l;
  assign s_bvalid  = (state == B) && m_bvalid;
  assign s_bresp   = m_bresp;
  assign m_bready  = (state == B) && s_bready;

  logic [255:0] nd;
  logic [31:0]  ns;
  always_comb begin
    nd = buf_d;
    ns = buf_s;
    nd[64*lane +: 64] = s_wdata;
    ns[8*lane +: 8]   = s_wstrb;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      aw_q  <= '0;
      lane  <= '0;
      buf_d <= '0;
      buf_s <= '0;
      out_v <= 1'b0;
      out_d <= '0;
      out_s <= '0;
      out_l <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (s_awvalid) begin
          aw_q  <= s_aw;
          lane  <= s_aw.addr[4:3];
          buf_d <= '0;
          buf_s <= '0;
          state <= AW;
        end
        AW: if (m_awready) state <= W;
        W: begin
          if (out_v && m_wready) begin
            out_v <= 1'b0;
            if (out_l) state <= B;
          end
          if (s_wvalid && s_wready) begin
            if (lane == 2'd3 || s_wlast) begin
              out_v <= 1'b1;
              out_d <= nd;
              out_s <= ns;
              out_l <= s_wlast;
              buf_d <= '0;
              buf_s <= '0;
            end else begin
              buf_d <= nd;
              buf_s <= ns;
            end
            lane <= lane + 2'd1;
          end
        end
        B: if (m_bvalid && s_bready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
