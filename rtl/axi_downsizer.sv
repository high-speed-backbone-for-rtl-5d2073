// axi_downsizer: AXI4 read-path width converter, 256-bit master to 64-bit slave.
//
// The DMA reads memory with 64-bit beats while the memory interface returns
// 256-bit beats. One read burst is converted at a time: the AR is taken and
// re-issued with the address aligned to 32 bytes, size 5 and the number of wide
// beats the narrow burst covers. Each wide beat is held and handed out as 64-bit
// beats, starting at the lane given by address bits [4:3] for the first wide beat
// and at lane 0 afterwards, until the narrow burst length is reached; rlast marks
// the last narrow beat. The next wide beat is taken in the cycle the last lane of
// the held one leaves, so a steady stream gives one 64-bit beat per cycle.
// The document names the down-sizer and the widths; the method is this design's.
module axi_downsizer
  import ess_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // 64-bit slave
  input  axi_ax_t      s_ar,
  input  logic         s_arvalid,
  output logic         s_arready,
  output logic [63:0]  s_rdata,
  output logic [1:0]   s_rresp,
  output logic         s_rlast,
  output logic         s_rvalid,
  input  logic         s_rready,
  // 256-bit master
  output axi_ax_t      m_ar,
  output logic         m_arvalid,
  input  logic         m_arready,
  input  logic [255:0] m_rdata,
  input  logic [1:0]   m_rresp,
  input  logic         m_rlast,
  input  logic         m_rvalid,
  output logic         m_rready
);

  typedef enum logic [1:0] {IDLE, AR, R} state_e;
  state_e state;

  axi_ax_t      ar_q;
  logic         hv;        // a wide beat is held
  logic [255:0] hdata;
  logic [1:0]   hresp;
  logic [1:0]   lane;
  logic [7:0]   ncnt;      // narrow beats left after the current one

  logic [8:0] span;
  assign span = 9'(ar_q.addr[4:3]) + 9'(ar_q.len);

  always_comb begin
    m_ar.addr  = {ar_q.addr[31:5], 5'b0};
    m_ar.len   = 8'(span >> 2);
    m_ar.size  = 3'd5;
    m_ar.burst = AXI_BURST_INCR;
  end

  assign s_arready = (state == IDLE);
  assign m_arvalid = (state == AR);
  // A new wide beat is taken while the last lane of the held one is handed out.
  assign m_rready  = (state == R) && (!hv || (s_rready && lane == 2'd3 && ncnt != 0));
  assign s_rvalid  = hv;
  assign s_rdata   = hdata[64*lane +: 64];
  assign s_rresp   = hresp;
  assign s_rlast   = (ncnt == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      ar_q  <= '0;
      hv    <= 1'b0;
      hdata <= '0;
      hresp <= '0;
      lane  <= '0;
      ncnt  <= '0;
    end else begin
      unique case (state)
        IDLE: if (s_arvalid) begin
          ar_q  <= s_ar;
          lane  <= s_ar.addr[4:3];
          ncnt  <= s_ar.len;
          state <= AR;
        end
        AR: if (m_arready) state <= R;
        R: begin
          if (hv && s_rready) begin
            lane <= lane + 2'd1;
            ncnt <= ncnt - 8'd1;
            if (ncnt == 0) begin
              hv    <= 1'b0;
              state <= IDLE;
            end else if (lane == 2'd3) begin
              hv <= 1'b0;
            end
          end
          if (m_rvalid && m_rready) begin
            hv    <= 1'b1;
            hdata <= m_rdata;
            hresp <= m_rresp;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The wide burst ends together with the narrow one; its last flag is not needed.
  logic unused_ok;
  assign unused_ok = m_rlast;

endmodule
