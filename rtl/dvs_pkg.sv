// dvs_pkg: types and constants shared by the dynamic voltage scaling (DVS)
// unit. The unit sits in the programmable logic of a Zynq-7000 device and
// lets the processing system ask for a new core voltage, or for a voltage,
// current or power reading, through a small mailbox memory; a soft processor
// on a local AXI4-Lite bus carries the request out over I2C/PMBus.
//
// What is here:
//  * AXI4-Lite request/response structs, one per direction, so that a whole
//    port is two signals (the same bundle recurs on every port of the unit).
//  * The local bus address map seen by the soft processor.
//  * The register map of the I2C controller.
//  * The mailbox word layout used between the application processor and the
//    soft processor, and the PMBus command codes and addresses the firmware
//    uses on the ZC702 board.
//  * The allowed output voltage window, 650 mV to 1000 mV, which comes from
//    the design description; requests outside it are refused.
// The address map, register map and mailbox layout are this design's own
// choices; PMBus command codes are those of the PMBus standard.
package dvs_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  typedef logic [AXIL_AW-1:0] axil_addr_t;
  typedef logic [AXIL_DW-1:0] axil_data_t;
  typedef logic [AXIL_DW/8-1:0] axil_strb_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axil_resp_e;

  // Manager -> subordinate signals of one AXI4-Lite port.
  typedef struct packed {
    axil_addr_t awaddr;
    logic       awvalid;
    axil_data_t wdata;
    axil_strb_t wstrb;
    logic       wvalid;
    logic       bready;
    axil_addr_t araddr;
    logic       arvalid;
    logic       rready;
  } axil_req_t;

  // Subordinate -> manager signals of one AXI4-Lite port.
  typedef struct packed {
    logic       awready;
    logic       wready;
    axil_resp_e bresp;
    logic       bvalid;
    logic       arready;
    axil_data_t rdata;
    axil_resp_e rresp;
    logic       rvalid;
  } axil_rsp_t;

  // ---------------------------------------------------------------------
  // Local bus address map (soft processor view).
  // ---------------------------------------------------------------------
  localparam axil_addr_t DPRAM_BASE = 32'hC000_0000;
  localparam axil_addr_t DPRAM_MASK = 32'hFFFF_F000; // 4 KiB window
  localparam axil_addr_t IIC_BASE   = 32'h4080_0000;
  localparam axil_addr_t IIC_MASK   = 32'hFFFF_0000; // 64 KiB window

  // ---------------------------------------------------------------------
  // I2C controller registers (byte offsets).
  // ---------------------------------------------------------------------
  localparam logic [7:0] I2C_REG_CMD      = 8'h00; // W: command + TX byte
  localparam logic [7:0] I2C_REG_STATUS   = 8'h04; // R: status + RX byte
  localparam logic [7:0] I2C_REG_PRESCALE = 8'h08; // RW: quarter SCL period

  // Bits of the CMD register.
  localparam int unsigned I2C_CMD_START = 0;
  localparam int unsigned I2C_CMD_STOP  = 1;
  localparam int unsigned I2C_CMD_READ  = 2;
  localparam int unsigned I2C_CMD_WRITE = 3;
  localparam int unsigned I2C_CMD_NACK  = 4;  // ack bit sent after a read
  // CMD[15:8] holds the byte to transmit.

  // Bits of the STATUS register. STATUS[15:8] holds the last received byte.
  localparam int unsigned I2C_ST_BUSY    = 0;
  localparam int unsigned I2C_ST_RXNACK  = 1;
  localparam int unsigned I2C_ST_ARBLOST = 2;
  localparam int unsigned I2C_ST_CMDERR  = 3;

  typedef struct packed {
    logic start;
    logic stop;
    logic read;
    logic write;
    logic nack;
  } i2c_cmd_t;

  // ---------------------------------------------------------------------
  // Mailbox in the dual-port RAM (word indices).
  // CMD    [31] GO, [27:12] millivolts, [11:8] PMBus page, [7:0] opcode
  // STATUS [31] DONE, [1:0] result code
  // RESULT [15:0] raw PMBus reading
  // ---------------------------------------------------------------------
  localparam int unsigned MBX_CMD    = 0;
  localparam int unsigned MBX_STATUS = 1;
  localparam int unsigned MBX_RESULT = 2;

  typedef enum logic [7:0] {
    OP_SET_VOUT  = 8'h01,
    OP_READ_VOUT = 8'h02,
    OP_READ_IOUT = 8'h03,
    OP_READ_POUT = 8'h04
  } mbx_op_e;

  typedef enum logic [1:0] {
    MBX_OK       = 2'd0,
    MBX_REJECTED = 2'd1,
    MBX_I2C_ERR  = 2'd2,
    MBX_BAD_OP   = 2'd3
  } mbx_code_e;

  // Allowed output voltage window in millivolts.
  localparam int unsigned VOUT_MIN_MV = 650;
  localparam int unsigned VOUT_MAX_MV = 1000;

  // ---------------------------------------------------------------------
  // Board side: I2C addresses (7-bit) and PMBus commands.
  // ---------------------------------------------------------------------
  localparam logic [6:0] I2C_ADDR_SWITCH = 7'h74; // PCA9548 1-to-8 switch
  localparam logic [6:0] I2C_ADDR_UCD    = 7'h34; // UCD92xx controller
  localparam logic [7:0] SWITCH_CH_PMBUS = 8'h80; // channel 7

  localparam logic [7:0] PMBUS_PAGE         = 8'h00;
  localparam logic [7:0] PMBUS_VOUT_MODE    = 8'h20;
  localparam logic [7:0] PMBUS_VOUT_COMMAND = 8'h21;
  localparam logic [7:0] PMBUS_READ_VOUT    = 8'h8B;
  localparam logic [7:0] PMBUS_READ_IOUT    = 8'h8C;
  localparam logic [7:0] PMBUS_READ_POUT    = 8'h96;

  // VOUT values use the PMBus LINEAR16 format with exponent -12.
  localparam int unsigned VOUT_EXP_SHIFT = 12;

endpackage
