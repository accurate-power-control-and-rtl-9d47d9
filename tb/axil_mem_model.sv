// axil_mem_model: AXI4-Lite subordinate for testbenches, a 16-word memory
// with randomly delayed ready signals and responses. Addresses with bit 11
// set answer SLVERR and store nothing. n_wr/n_rd count completed accesses.
module axil_mem_model
  import dvs_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output axil_data_t mem [16],
  output int unsigned n_wr,
  output int unsigned n_rd
);

  logic aw_got, w_got;
  axil_addr_t awa;
  axil_data_t wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= '0; aw_got <= 1'b0; w_got <= 1'b0; n_wr <= 0; n_rd <= 0;
      awa <= '0; wd <= '0;
      for (int i = 0; i < 16; i++) mem[i] <= '0;
    end else begin
      rsp.awready <= !aw_got && !rsp.bvalid && ($urandom_range(MAX_WAIT) == 0);
      rsp.wready  <= !w_got  && !rsp.bvalid && ($urandom_range(MAX_WAIT) == 0);
      rsp.arready <= !rsp.rvalid && !rsp.arready && ($urandom_range(MAX_WAIT) == 0);
      if (req.awvalid && rsp.awready) begin aw_got <= 1'b1; awa <= req.awaddr; rsp.awready <= 1'b0; end
      if (req.wvalid && rsp.wready)   begin w_got  <= 1'b1; wd  <= req.wdata;  rsp.wready  <= 1'b0; end
      if (aw_got && w_got && !rsp.bvalid) begin
        rsp.bvalid <= 1'b1;
        rsp.bresp  <= awa[11] ? RESP_SLVERR : RESP_OKAY;
        if (!awa[11]) mem[awa[5:2]] <= wd;
        aw_got <= 1'b0; w_got <= 1'b0;
        rsp.awready <= 1'b0; rsp.wready <= 1'b0;
      end
      if (rsp.bvalid && req.bready) begin rsp.bvalid <= 1'b0; n_wr <= n_wr + 1; end
      if (req.arvalid && rsp.arready) begin
        rsp.arready <= 1'b0;
        rsp.rvalid  <= 1'b1;
        rsp.rdata   <= req.araddr[11] ? 32'h0 : mem[req.araddr[5:2]];
        rsp.rresp   <= req.araddr[11] ? RESP_SLVERR : RESP_OKAY;
      end
      if (rsp.rvalid && req.rready) begin
        rsp.rvalid <= 1'b0; n_rd <= n_rd + 1; rsp.arready <= 1'b0;
      end
    end
  end

endmodule
