// dvs_dpram: the dual-port RAM register file of the DVS unit.
//
// Port A faces the processing system (the application processor writes
// commands here and reads results); port B sits on the local AXI4-Lite bus of
// the soft processor, which reads the commands, executes them and writes the
// results back. Both ports are AXI4-Lite subordinates with full read and
// write access and byte strobes; each is wrapped by axil_reg_port, so read
// data and write responses are valid two cycles after the address handshake
// (for a write, after the later of the address and data handshakes).
// Words are addressed by addr[AW+1:2]; higher address bits are ignored, so
// the memory repeats inside whatever window the bus decoder gives it.
// If both ports write the same word in the same cycle, port B (the soft
// processor) wins. A read and a write of the same word in the same cycle on
// different ports returns the old contents.
// That the register file is a dual-port RAM reached from both sides follows
// the design description; its size, the collision rule and the access timing
// are this design's own choices.
module dvs_dpram
  import dvs_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t a_req,
  output axil_rsp_t a_rsp,
  input  axil_req_t b_req,
  output axil_rsp_t b_rsp
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic       a_wr_en, a_rd_en, b_wr_en, b_rd_en;
  axil_addr_t a_wr_addr, a_rd_addr, b_wr_addr, b_rd_addr;
  axil_data_t a_wr_data, b_wr_data, a_rd_data, b_rd_data;
  axil_strb_t a_wr_strb, b_wr_strb;

  axil_reg_port u_port_a (
    .clk, .rst_n, .req(a_req), .rsp(a_rsp),
    .wr_en(a_wr_en), .wr_addr(a_wr_addr), .wr_data(a_wr_data), .wr_strb(a_wr_strb),
    .rd_en(a_rd_en), .rd_addr(a_rd_addr), .rd_data(a_rd_data)
  );

  axil_reg_port u_port_b (
    .clk, .rst_n, .req(b_req), .rsp(b_rsp),
    .wr_en(b_wr_en), .wr_addr(b_wr_addr), .wr_data(b_wr_data), .wr_strb(b_wr_strb),
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_data(b_rd_data)
  );

  axil_data_t mem [DEPTH];

  logic [AW-1:0] a_widx, b_widx, a_ridx, b_ridx;
  assign a_widx = a_wr_addr[AW+1:2];
  assign b_widx = b_wr_addr[AW+1:2];
  assign a_ridx = a_rd_addr[AW+1:2];
  assign b_ridx = b_rd_addr[AW+1:2];

  always_ff @(posedge clk) begin
    for (int i = 0; i < AXIL_DW/8; i++) begin
      if (a_wr_en && a_wr_strb[i] && !(b_wr_en && b_wr_strb[i] && b_widx == a_widx))
        mem[a_widx][8*i +: 8] <= a_wr_data[8*i +: 8];
      if (b_wr_en && b_wr_strb[i])
        mem[b_widx][8*i +: 8] <= b_wr_data[8*i +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (a_rd_en) a_rd_data <= mem[a_ridx];
    if (b_rd_en) b_rd_data <= mem[b_ridx];
  end

endmodule
