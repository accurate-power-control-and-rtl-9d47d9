// i2c_master: the I2C controller of the DVS unit, an AXI4-Lite subordinate on
// the local bus that drives the board's main I2C lines (IIC_SCL/SDA_MAIN), on
// which the PMBus power controller sits behind a 1-to-8 bus switch.
//
// Registers (byte offsets, see dvs_pkg):
//   0x00 CMD      write: [0] START, [1] STOP, [2] READ, [3] WRITE,
//                 [4] NACK (acknowledge bit to send after a READ),
//                 [15:8] byte to send. Starts one command of i2c_byte_engine.
//                 A write while the engine is busy is dropped and sets CMDERR.
//   0x04 STATUS   read: [0] BUSY, [1] RXNACK (target did not acknowledge the
//                 last byte written), [2] ARBLOST, [3] CMDERR, [15:8] last
//                 byte received. CMDERR is cleared by the next accepted CMD.
//   0x08 PRESCALE read/write: [15:0] clock cycles per quarter SCL period;
//                 values below 2 are raised to 2.
// Firmware issues a transfer as a string of commands (for a PMBus word read:
// START+WRITE address, WRITE command code, START+WRITE address|1, READ,
// READ+NACK+STOP) and polls BUSY between them. Register reads return two
// cycles after the address handshake (axil_reg_port).
// The design description names this core and its bus position only; the
// register map and command scheme are this design's own, chosen to be simple
// to drive from a polling firmware loop.
module i2c_master
  import dvs_pkg::*;
#(
  parameter int unsigned PRESCALE_RESET = 250  // 100 kHz SCL from 100 MHz
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  input  logic      scl_i,
  output logic      scl_oe,
  input  logic      sda_i,
  output logic      sda_oe
);

  logic       wr_en, rd_en;
  axil_addr_t wr_addr, rd_addr;
  axil_data_t wr_data, rd_data;
  axil_strb_t wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  logic [15:0] prescale_q;
  logic        cmd_err;
  logic        go;
  i2c_cmd_t    cmd;
  logic [7:0]  tx_byte;
  logic        busy, rx_nack, arb_lost;
  logic [7:0]  rx_byte;

  logic wr_cmd, wr_pre;
  assign wr_cmd = wr_en && (wr_addr[7:0] == I2C_REG_CMD) && wr_strb[0];
  assign wr_pre = wr_en && (wr_addr[7:0] == I2C_REG_PRESCALE);

  always_comb begin
    cmd.start = wr_data[I2C_CMD_START];
    cmd.stop  = wr_data[I2C_CMD_STOP];
    cmd.read  = wr_data[I2C_CMD_READ];
    cmd.write = wr_data[I2C_CMD_WRITE];
    cmd.nack  = wr_data[I2C_CMD_NACK];
    tx_byte   = wr_data[15:8];
  end
  assign go = wr_cmd && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prescale_q <= 16'(PRESCALE_RESET);
      cmd_err    <= 1'b0;
    end else begin
      if (wr_pre) begin
        if (wr_strb[0]) prescale_q[7:0]  <= wr_data[7:0];
        if (wr_strb[1]) prescale_q[15:8] <= wr_data[15:8];
      end
      if (go)                 cmd_err <= 1'b0;
      else if (wr_cmd && busy) cmd_err <= 1'b1;
    end
  end

  logic [15:0] prescale_eff;
  assign prescale_eff = (prescale_q < 16'd2) ? 16'd2 : prescale_q;

  i2c_byte_engine u_engine (
    .clk, .rst_n,
    .prescale (prescale_eff),
    .cmd_valid(go),
    .cmd,
    .tx_byte,
    .busy,
    .done     (),
    .rx_byte,
    .rx_nack,
    .arb_lost,
    .scl_i, .scl_oe, .sda_i, .sda_oe
  );

  // A command being accepted counts as busy at once, so a STATUS read issued
  // right after the CMD write never sees a stale idle engine.
  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data <= '0;
      unique case (rd_addr[7:0])
        I2C_REG_STATUS: begin
          rd_data[I2C_ST_BUSY]    <= busy || go;
          rd_data[I2C_ST_RXNACK]  <= rx_nack;
          rd_data[I2C_ST_ARBLOST] <= arb_lost;
          rd_data[I2C_ST_CMDERR]  <= cmd_err;
          rd_data[15:8]           <= rx_byte;
        end
        I2C_REG_PRESCALE: rd_data[15:0] <= prescale_q;
        default: ;
      endcase
    end
  end

endmodule
