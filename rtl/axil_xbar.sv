// axil_xbar: the local AXI4-Lite bus of the DVS unit, one manager (the soft
// processor's data port) to NSLV subordinates (the dual-port RAM and the I2C
// controller).
//
// Each direction is routed on its own. When a write address arrives it is
// decoded against the BASE/MASK table (addr & MASK == BASE) and accepted; the
// address is then offered to the chosen subordinate, the write data beat is
// steered to it, and its write response is passed back, after which the
// write path is free again. Reads work the same way with the read address and
// read data channels. An address that matches no subordinate is answered by
// the bus itself with DECERR (write data is accepted and dropped; reads
// return zero). The bus adds one cycle of latency on the address channels.
// Only one transaction per direction is in flight, which matches an AXI4-Lite
// manager that waits for each response. That the processor, the RAM and the
// I2C core share a local AXI4-Lite bus follows the design description; the
// decoder itself is this design's own.
module axil_xbar
  import dvs_pkg::*;
#(
  parameter int unsigned NSLV = 2,
  parameter axil_addr_t  BASE [NSLV] = '{DPRAM_BASE, IIC_BASE},
  parameter axil_addr_t  MASK [NSLV] = '{DPRAM_MASK, IIC_MASK}
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [NSLV],
  input  axil_rsp_t s_rsp [NSLV]
);

  localparam int unsigned SW = (NSLV > 1) ? $clog2(NSLV) : 1;

  typedef enum logic [1:0] {P_IDLE, P_ADDR, P_RESP} path_e;

  // Decode: index of the matching subordinate and a hit flag.
  function automatic logic [SW:0] decode(axil_addr_t a);
    logic [SW:0] r;
    r = '0;
    for (int i = NSLV - 1; i >= 0; i--)
      if ((a & MASK[i]) == BASE[i]) r = {1'b1, SW'(i)};
    return r;
  endfunction

  // ---------------- write path ----------------
  path_e      wst;
  logic [SW-1:0] wsel;
  logic       whit, w_done;
  axil_addr_t awaddr_q;
  logic [SW:0] wdec;
  assign wdec = decode(m_req.awaddr);

  // ---------------- read path -----------------
  path_e      rst_q;
  logic [SW-1:0] rsel;
  logic       rhit;
  axil_addr_t araddr_q;
  logic [SW:0] rdec;
  assign rdec = decode(m_req.araddr);

  logic s_aw_hs, m_w_hs, m_b_hs, s_ar_hs, m_r_hs;
  assign s_aw_hs = (wst == P_ADDR) && whit && s_rsp[wsel].awready;
  assign m_w_hs  = (wst != P_IDLE) && !w_done && m_req.wvalid && m_rsp.wready;
  assign m_b_hs  = m_rsp.bvalid && m_req.bready;
  assign s_ar_hs = (rst_q == P_ADDR) && rhit && s_rsp[rsel].arready;
  assign m_r_hs  = m_rsp.rvalid && m_req.rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst      <= P_IDLE;
      wsel     <= '0;
      whit     <= 1'b0;
      w_done   <= 1'b0;
      awaddr_q <= '0;
    end else begin
      unique case (wst)
        P_IDLE: if (m_req.awvalid) begin
          wst      <= P_ADDR;
          awaddr_q <= m_req.awaddr;
          whit     <= wdec[SW];
          wsel     <= wdec[SW-1:0];
          w_done   <= 1'b0;
        end
        P_ADDR: if (s_aw_hs || !whit) wst <= P_RESP;
        P_RESP: if (m_b_hs) wst <= P_IDLE;
        default: wst <= P_IDLE;
      endcase
      if (m_w_hs) w_done <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q    <= P_IDLE;
      rsel     <= '0;
      rhit     <= 1'b0;
      araddr_q <= '0;
    end else begin
      unique case (rst_q)
        P_IDLE: if (m_req.arvalid) begin
          rst_q    <= P_ADDR;
          araddr_q <= m_req.araddr;
          rhit     <= rdec[SW];
          rsel     <= rdec[SW-1:0];
        end
        P_ADDR: if (s_ar_hs || !rhit) rst_q <= P_RESP;
        P_RESP: if (m_r_hs) rst_q <= P_IDLE;
        default: rst_q <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NSLV; i++) begin
      s_req[i]         = '0;
      s_req[i].awaddr  = awaddr_q;
      s_req[i].wdata   = m_req.wdata;
      s_req[i].wstrb   = m_req.wstrb;
      s_req[i].araddr  = araddr_q;
      if (whit && SW'(i) == wsel) begin
        s_req[i].awvalid = (wst == P_ADDR);
        s_req[i].wvalid  = (wst != P_IDLE) && !w_done && m_req.wvalid;
        s_req[i].bready  = (wst == P_RESP) && m_req.bready;
      end
      if (rhit && SW'(i) == rsel) begin
        s_req[i].arvalid = (rst_q == P_ADDR);
        s_req[i].rready  = (rst_q == P_RESP) && m_req.rready;
      end
    end

    m_rsp         = '0;
    m_rsp.awready = (wst == P_IDLE);
    m_rsp.arready = (rst_q == P_IDLE);
    if (whit) begin
      m_rsp.wready = (wst != P_IDLE) && !w_done && s_rsp[wsel].wready;
      m_rsp.bvalid = (wst == P_RESP) && s_rsp[wsel].bvalid;
      m_rsp.bresp  = s_rsp[wsel].bresp;
    end else begin
      m_rsp.wready = (wst != P_IDLE) && !w_done;
      m_rsp.bvalid = (wst == P_RESP) && w_done;
      m_rsp.bresp  = RESP_DECERR;
    end
    if (rhit) begin
      m_rsp.rvalid = (rst_q == P_RESP) && s_rsp[rsel].rvalid;
      m_rsp.rdata  = s_rsp[rsel].rdata;
      m_rsp.rresp  = s_rsp[rsel].rresp;
    end else begin
      m_rsp.rvalid = (rst_q == P_RESP);
      m_rsp.rdata  = '0;
      m_rsp.rresp  = RESP_DECERR;
    end
  end

  // Manager-side handshake rules.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.awvalid && !m_rsp.awready |=> m_req.awvalid);
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.arvalid && !m_rsp.arready |=> m_req.arvalid);

endmodule
