// axil_reg_port: turns one AXI4-Lite subordinate port into a simple
// register/memory access port.
//
// Writes: the address and data channels are accepted independently and held;
// once both have arrived, wr_en pulses for one cycle with wr_addr, wr_data and
// wr_strb, and the write response (OKAY) is raised in the same cycle. A new
// address or data beat is only accepted after the response has been taken.
// Reads: the address handshake pulses rd_en with rd_addr for one cycle. The
// attached logic must present rd_data on the following cycle (a registered
// read, as a block RAM gives); it is captured and returned one cycle after
// that, so rvalid is high at the second rising edge after the address
// handshake. Likewise bvalid is high at the second rising edge after the
// later of the address and data handshakes.
// One transaction per direction is in flight at a time, which is all that
// AXI4-Lite managers such as a soft processor's data port issue.
// The handshake rules of the manager side (valid held until ready, payload
// stable) are checked with assertions.
module axil_reg_port
  import dvs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  req,
  output axil_rsp_t  rsp,
  output logic       wr_en,
  output axil_addr_t wr_addr,
  output axil_data_t wr_data,
  output axil_strb_t wr_strb,
  output logic       rd_en,
  output axil_addr_t rd_addr,
  input  axil_data_t rd_data
);

  logic       aw_held, w_held, bvalid_q;
  logic       rd_wait, rvalid_q;
  axil_addr_t awaddr_q;
  axil_data_t wdata_q, rdata_q;
  axil_strb_t wstrb_q;

  logic aw_hs, w_hs, ar_hs;
  assign aw_hs = req.awvalid && !aw_held && !bvalid_q;
  assign w_hs  = req.wvalid  && !w_held  && !bvalid_q;
  assign ar_hs = req.arvalid && !rd_wait && !rvalid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held  <= 1'b0;
      w_held   <= 1'b0;
      bvalid_q <= 1'b0;
      awaddr_q <= '0;
      wdata_q  <= '0;
      wstrb_q  <= '0;
    end else begin
      if (aw_hs) begin
        aw_held  <= 1'b1;
        awaddr_q <= req.awaddr;
      end
      if (w_hs) begin
        w_held  <= 1'b1;
        wdata_q <= req.wdata;
        wstrb_q <= req.wstrb;
      end
      if (wr_en) begin
        aw_held  <= 1'b0;
        w_held   <= 1'b0;
        bvalid_q <= 1'b1;
      end else if (bvalid_q && req.bready) begin
        bvalid_q <= 1'b0;
      end
    end
  end

  assign wr_en   = aw_held && w_held && !bvalid_q;
  assign wr_addr = awaddr_q;
  assign wr_data = wdata_q;
  assign wr_strb = wstrb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_wait  <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rd_wait <= ar_hs;
      if (rd_wait) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  assign rd_en   = ar_hs;
  assign rd_addr = req.araddr;

  always_comb begin
    rsp         = '0;
    rsp.awready = !aw_held && !bvalid_q;
    rsp.wready  = !w_held && !bvalid_q;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = !rd_wait && !rvalid_q;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = RESP_OKAY;
  end

  // Manager-side handshake rules.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req.awvalid && !rsp.awready |=> req.awvalid && $stable(req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req.wvalid && !rsp.wready |=> req.wvalid && $stable(req.wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req.arvalid && !rsp.arready |=> req.arvalid && $stable(req.araddr));

endmodule
