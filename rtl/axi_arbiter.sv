// axi_arbiter: two-master, one-slave AXI4 write and read arbiter (256-bit).
//
// Master 0 is the DMA, master 1 the ADC writer; the slave is the memory interface.
// Writes and reads are arbitrated independently, so a read and a write can be in
// flight at the same time. Write side: when idle, one requesting AW is granted and
// forwarded; that master's W beats follow, and the grant is held until the B
// response has been routed back, after which the next AW can win. Read side: one
// AR is granted and the grant is held until the R beat with rlast has been
// returned. While a master is not granted its ready signals stay low, which delays
// it: this is the arbitration the document asks for when software and the ADCs
// both want the memory.
// Policy, as the document allows: ROUND_ROBIN = 1 gives the two masters equal
// priority, alternating when both wait; ROUND_ROBIN = 0 always prefers
// PRIO_MASTER. One outstanding transaction per direction and round robin as the
// default are this design's choices.
module axi_arbiter
  import ess_pkg::*;
#(
  parameter int unsigned DW          = 256,
  parameter bit          ROUND_ROBIN = 1'b1,
  parameter int unsigned PRIO_MASTER = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // slave ports (index 0: DMA, 1: ADC)
  input  axi_ax_t [1:0]         s_aw,
  input  logic    [1:0]         s_awvalid,
  output logic    [1:0]         s_awready,
  input  logic    [1:0][DW-1:0] s_wdata,
  input  logic    [1:0][DW/8-1:0] s_wstrb,
  input  logic    [1:0]         s_wlast,
  input  logic    [1:0]         s_wvalid,
  output logic    [1:0]         s_wready,
  output logic    [1:0]         s_bvalid,
  input  logic    [1:0]         s_bready,
  input  axi_ax_t [1:0]         s_ar,
  input  logic    [1:0]         s_arvalid,
  output logic    [1:0]         s_arready,
  output logic    [1:0]         s_rvalid,
  input  logic    [1:0]         s_rready,
  // shared response payloads (valid only for the granted port)
  output logic    [1:0]         s_bresp,
  output logic    [DW-1:0]      s_rdata,
  output logic    [1:0]         s_rresp,
  output logic                  s_rlast,
  // master port to memory
  output axi_ax_t               m_aw,
  output logic                  m_awvalid,
  input  logic                  m_awready,
  output logic    [DW-1:0]      m_wdata,
  output logic    [DW/8-1:0]    m_wstrb,
  output logic                  m_wlast,
  output logic                  m_wvalid,
  input  logic                  m_wready,
  input  logic    [1:0]         m_bresp,
  input  logic                  m_bvalid,
  output logic                  m_bready,
  output axi_ax_t               m_ar,
  output logic                  m_arvalid,
  input  logic                  m_arready,
  input  logic    [DW-1:0]      m_rdata,
  input  logic    [1:0]         m_rresp,
  input  logic                  m_rlast,
  input  logic                  m_rvalid,
  output logic                  m_rready,
  // per master: high while it requests but the other master holds the grant
  output logic    [1:0]         delayed
);

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;

  wstate_e wst;
  rstate_e rst_q;
  logic    wgnt, rgnt;          // granted master index
  logic    wlast_gnt, rlast_gnt; // master granted last time (round robin)

  // Pick a master from a request pair
  function automatic logic pick(input logic [1:0] req, input logic last_gnt);
    if (req == 2'b11) begin
      if (ROUND_ROBIN) return !last_gnt;
      return 1'(PRIO_MASTER);
    end
    return req[1];
  endfunction

  // ---------------------------------------------------------------- write
  always_comb begin
    m_aw      = s_aw[wgnt];
    m_awvalid = (wst == W_ADDR) && s_awvalid[wgnt];
    s_awready = '0;
    s_awready[wgnt] = (wst == W_ADDR) && m_awready;

    m_wdata  = s_wdata[wgnt];
    m_wstrb  = s_wstrb[wgnt];
    m_wlast  = s_wlast[wgnt];
    m_wvalid = (wst == W_DATA) && s_wvalid[wgnt];
    s_wready = '0;
    s_wready[wgnt] = (wst == W_DATA) && m_wready;

    s_bvalid = '0;
    s_bvalid[wgnt] = (wst == W_RESP) && m_bvalid;
    s_bresp  = m_bresp;
    m_bready = (wst == W_RESP) && s_bready[wgnt];
  end

  // ---------------------------------------------------------------- read
  always_comb begin
    m_ar      = s_ar[rgnt];
    m_arvalid = (rst_q == R_ADDR) && s_arvalid[rgnt];
    s_arready = '0;
    s_arready[rgnt] = (rst_q == R_ADDR) && m_arready;

    s_rvalid = '0;
    s_rvalid[rgnt] = (rst_q == R_DATA) && m_rvalid;
    s_rdata  = m_rdata;
    s_rresp  = m_rresp;
    s_rlast  = m_rlast;
    m_rready = (rst_q == R_DATA) && s_rready[rgnt];
  end

  always_comb begin
    for (int i = 0; i < 2; i++)
      delayed[i] = (s_awvalid[i] && wst != W_IDLE && wgnt != 1'(i)) ||
                   (s_arvalid[i] && rst_q != R_IDLE && rgnt != 1'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst       <= W_IDLE;
      rst_q     <= R_IDLE;
      wgnt      <= 1'b0;
      rgnt      <= 1'b0;
      wlast_gnt <= 1'b1;
      rlast_gnt <= 1'b1;
    end else begin
      unique case (wst)
        W_IDLE: if (|s_awvalid) begin
          wgnt      <= pick(s_awvalid, wlast_gnt);
          wlast_gnt <= pick(s_awvalid, wlast_gnt);
          wst       <= W_ADDR;
        end
        W_ADDR: if (m_awvalid && m_awready) wst <= W_DATA;
        W_DATA: if (m_wvalid && m_wready && m_wlast) wst <= W_RESP;
        W_RESP: if (m_bvalid && m_bready) wst <= W_IDLE;
        default: wst <= W_IDLE;
      endcase
      unique case (rst_q)
        R_IDLE: if (|s_arvalid) begin
          rgnt      <= pick(s_arvalid, rlast_gnt);
          rlast_gnt <= pick(s_arvalid, rlast_gnt);
          rst_q     <= R_ADDR;
        end
        R_ADDR: if (m_arvalid && m_arready) rst_q <= R_DATA;
        R_DATA: if (m_rvalid && m_rready && m_rlast) rst_q <= R_IDLE;
        default: rst_q <= R_IDLE;
      endcase
    end
  end

endmodule
