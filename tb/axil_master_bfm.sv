// axil_master_bfm: AXI4-Lite manager for testbenches. Other testbench code
// calls its tasks hierarchically (write, read). All outputs change on the
// falling clock edge and ready/valid are looked at there, so handshakes are
// free of races with the design's rising-edge logic. MAX_WAIT > 0 adds a
// random delay of up to MAX_WAIT cycles before bready/rready go high.
module axil_master_bfm
  import dvs_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 0
) (
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic idle_cycles(input int unsigned n);
    repeat (n) @(negedge clk);
  endtask

  task automatic write(input axil_addr_t a, input axil_data_t d,
                       input axil_strb_t s, output axil_resp_e resp);
    logic hs_aw, hs_w, hs_b;
    @(negedge clk);
    req.awaddr  = a;
    req.awvalid = 1'b1;
    req.wdata   = d;
    req.wstrb   = s;
    req.wvalid  = 1'b1;
    // A handshake seen at a falling edge completes at the next rising edge;
    // the valid is then dropped at the following falling edge.
    hs_aw = rsp.awready;
    hs_w  = rsp.wready;
    while (req.awvalid || req.wvalid) begin
      @(negedge clk);
      if (hs_aw) req.awvalid = 1'b0;
      if (hs_w)  req.wvalid  = 1'b0;
      hs_aw = req.awvalid && rsp.awready;
      hs_w  = req.wvalid && rsp.wready;
    end
    if (MAX_WAIT > 0) repeat ($urandom_range(MAX_WAIT)) @(negedge clk);
    req.bready = 1'b1;
    hs_b = rsp.bvalid;
    if (hs_b) resp = rsp.bresp;
    while (!hs_b) begin
      @(negedge clk);
      hs_b = rsp.bvalid;
      if (hs_b) resp = rsp.bresp;
    end
    @(negedge clk);
    req.bready = 1'b0;
  endtask

  task automatic read(input axil_addr_t a, output axil_data_t d,
                      output axil_resp_e resp);
    logic hs;
    @(negedge clk);
    req.araddr  = a;
    req.arvalid = 1'b1;
    hs = rsp.arready;
    while (req.arvalid) begin
      @(negedge clk);
      if (hs) req.arvalid = 1'b0;
      hs = req.arvalid && rsp.arready;
    end
    if (MAX_WAIT > 0) repeat ($urandom_range(MAX_WAIT)) @(negedge clk);
    req.rready = 1'b1;
    hs = rsp.rvalid;
    if (hs) begin d = rsp.rdata; resp = rsp.rresp; end
    while (!hs) begin
      @(negedge clk);
      hs = rsp.rvalid;
      if (hs) begin d = rsp.rdata; resp = rsp.rresp; end
    end
    @(negedge clk);
    req.rready = 1'b0;
  endtask

endmodule
