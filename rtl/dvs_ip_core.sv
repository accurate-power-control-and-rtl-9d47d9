// dvs_ip_core: the dynamic voltage scaling (DVS) unit placed in the
// programmable logic of a Zynq-7000 device (ZC702 board), and the top of this
// design.
//
// The application processor cannot reach the board's programmable power
// supply directly from the logic side, so this unit does it: the processor
// writes a command (set a rail's voltage, or read its voltage, current or
// power) into a dual-port RAM through the PS AXI4-Lite port; a soft processor
// on a local AXI4-Lite bus polls that RAM, drives the I2C controller to talk
// PMBus to the power controller (first selecting the PMBus channel of the
// board's 1-to-8 I2C switch), refuses voltages outside 650..1000 mV, and
// writes the status and reading back into the RAM for the application
// processor to collect. The window is also enforced in hardware: PS writes
// pass axil_vout_guard, which answers an out-of-window SET_VOUT request with
// a REJECTED status itself, so such a request never reaches the firmware.
//
// Inside: axil_vout_guard and dvs_dpram (port A: PS side, port B: local
// bus), axil_xbar (local bus, RAM at DPRAM_BASE and I2C controller at
// IIC_BASE), i2c_master. The
// soft processor itself is not part of this RTL: its data port enters as
// mb_req/mb_rsp, the manager side of the local bus, so any processor or
// state machine that runs the mailbox protocol of dvs_pkg can be attached.
// I2C lines are open drain: *_oe = 1 pulls the line low. vout_reject pulses
// for one cycle for each request the guard refuses.
// The three-part structure, the bus topology and the voltage window follow
// the design description; memory size, address map, register map and
// mailbox layout are this design's own.
module dvs_ip_core
  import dvs_pkg::*;
#(
  parameter int unsigned DPRAM_DEPTH    = 256,
  parameter int unsigned PRESCALE_RESET = 250
) (
  input  logic      clk,       // PL clock, 100 MHz
  input  logic      rst_n,
  // PS AXI4-Lite subordinate port (application processor)
  input  axil_req_t ps_req,
  output axil_rsp_t ps_rsp,
  // Local bus manager port (soft processor data port)
  input  axil_req_t mb_req,
  output axil_rsp_t mb_rsp,
  // IIC_SCL/SDA_MAIN
  input  logic      scl_i,
  output logic      scl_oe,
  input  logic      sda_i,
  output logic      sda_oe,
  // One-cycle pulse: a PS request was refused by the voltage window guard
  output logic      vout_reject
);

  localparam int unsigned NSLV = 2;
  localparam int unsigned S_DPRAM = 0;
  localparam int unsigned S_IIC   = 1;

  axil_req_t s_req [NSLV];
  axil_rsp_t s_rsp [NSLV];

  axil_xbar #(
    .NSLV(NSLV),
    .BASE('{DPRAM_BASE, IIC_BASE}),
    .MASK('{DPRAM_MASK, IIC_MASK})
  ) u_bus (
    .clk, .rst_n,
    .m_req(mb_req), .m_rsp(mb_rsp),
    .s_req, .s_rsp
  );

  axil_req_t ram_a_req;
  axil_rsp_t ram_a_rsp;

  axil_vout_guard #(.IDX_BITS($clog2(DPRAM_DEPTH))) u_guard (
    .clk, .rst_n,
    .m_req(ps_req), .m_rsp(ps_rsp),
    .s_req(ram_a_req), .s_rsp(ram_a_rsp),
    .reject(vout_reject)
  );

  dvs_dpram #(.DEPTH(DPRAM_DEPTH)) u_dpram (
    .clk, .rst_n,
    .a_req(ram_a_req), .a_rsp(ram_a_rsp),
    .b_req(s_req[S_DPRAM]), .b_rsp(s_rsp[S_DPRAM])
  );

  i2c_master #(.PRESCALE_RESET(PRESCALE_RESET)) u_iic (
    .clk, .rst_n,
    .req(s_req[S_IIC]), .rsp(s_rsp[S_IIC]),
    .scl_i, .scl_oe, .sda_i, .sda_oe
  );

endmodule
