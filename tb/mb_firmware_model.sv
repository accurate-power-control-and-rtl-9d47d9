// mb_firmware_model: behavioural stand-in for the soft processor and its
// firmware, driving the local-bus manager port of dvs_ip_core. Testbench use
// only.
//
// When enable rises it first points the board's 1-to-8 I2C switch at the
// PMBus channel, then loops: poll the mailbox CMD word in the dual-port RAM;
// on GO clear it, carry out the request over PMBus and write RESULT and then
// STATUS (DONE set, result code). SET_VOUT outside 650..1000 mV is refused
// without touching the bus (MBX_REJECTED). Millivolts are converted to the
// LINEAR16 mantissa (exponent -12) as mv * 4096 / 1000. Every request first
// writes PAGE to select the rail. A NACK anywhere gives MBX_I2C_ERR.
// Counters report how often each path was taken.
module mb_firmware_model
  import dvs_pkg::*;
(
  input  logic      clk,
  input  logic      enable,
  output axil_req_t mb_req,
  input  axil_rsp_t mb_rsp,
  output int unsigned n_switch_sel,
  output int unsigned n_set_vout,
  output int unsigned n_reads,
  output int unsigned n_rejected,
  output int unsigned n_i2c_err,
  output int unsigned n_bad_op
);

  axil_master_bfm bfm (.clk, .req(mb_req), .rsp(mb_rsp));

  localparam axil_addr_t I2C_CMD = IIC_BASE + axil_addr_t'(I2C_REG_CMD);
  localparam axil_addr_t I2C_ST  = IIC_BASE + axil_addr_t'(I2C_REG_STATUS);

  function automatic axil_addr_t mbx(int unsigned w);
    return DPRAM_BASE + axil_addr_t'(4 * w);
  endfunction

  function automatic axil_data_t cmdw(logic s, logic p, logic r, logic w,
                                      logic n, logic [7:0] b);
    axil_data_t d = '0;
    d[I2C_CMD_START] = s; d[I2C_CMD_STOP] = p; d[I2C_CMD_READ] = r;
    d[I2C_CMD_WRITE] = w; d[I2C_CMD_NACK] = n; d[15:8] = b;
    return d;
  endfunction

  // One I2C command; ok is cleared on a NACK after a written byte.
  task automatic op(input axil_data_t c, inout logic ok, output logic [7:0] rx);
    axil_data_t st;
    axil_resp_e r;
    bfm.write(I2C_CMD, c, 4'hF, r);
    do bfm.read(I2C_ST, st, r); while (st[I2C_ST_BUSY]);
    if (c[I2C_CMD_WRITE] && st[I2C_ST_RXNACK]) ok = 1'b0;
    rx = st[15:8];
  endtask

  task automatic release_bus(inout logic ok);
    logic [7:0] rx;
    op(cmdw(0, 1, 0, 0, 0, 8'h00), ok, rx);
  endtask

  task automatic pm_write(input logic [6:0] a, input logic [7:0] code,
                          input int unsigned nbytes, input logic [15:0] data,
                          inout logic ok);
    logic [7:0] rx;
    op(cmdw(1, 0, 0, 1, 0, {a, 1'b0}), ok, rx);
    if (!ok) begin release_bus(ok); return; end
    op(cmdw(0, nbytes == 0, 0, 1, 0, code), ok, rx);
    if (nbytes >= 1) op(cmdw(0, nbytes == 1, 0, 1, 0, data[7:0]), ok, rx);
    if (nbytes >= 2) op(cmdw(0, 1, 0, 1, 0, data[15:8]), ok, rx);
  endtask

  task automatic pm_read_word(input logic [6:0] a, input logic [7:0] code,
                              output logic [15:0] w, inout logic ok);
    logic [7:0] lo, hi;
    w = '0;
    op(cmdw(1, 0, 0, 1, 0, {a, 1'b0}), ok, lo);
    if (!ok) begin release_bus(ok); return; end
    op(cmdw(0, 0, 0, 1, 0, code), ok, lo);
    op(cmdw(1, 0, 0, 1, 0, {a, 1'b1}), ok, lo);
    if (!ok) begin release_bus(ok); return; end
    op(cmdw(0, 0, 1, 0, 0, 8'h00), ok, lo);
    op(cmdw(0, 1, 1, 0, 1, 8'h00), ok, hi);
    w = {hi, lo};
  endtask

  initial begin
    axil_data_t c;
    axil_resp_e r;
    logic ok;
    logic [15:0] w;
    mbx_code_e code;
    int unsigned mv;
    n_switch_sel = 0; n_set_vout = 0; n_reads = 0;
    n_rejected = 0; n_i2c_err = 0; n_bad_op = 0;
    wait (enable);

    ok = 1'b1;
    pm_write(I2C_ADDR_SWITCH, SWITCH_CH_PMBUS, 0, 16'h0, ok);
    if (ok) n_switch_sel++;

    forever begin
      bfm.read(mbx(MBX_CMD), c, r);
      if (c[31]) begin
        bfm.write(mbx(MBX_CMD), 32'h0, 4'hF, r);
        ok   = 1'b1;
        w    = '0;
        code = MBX_OK;
        mv   = int'(c[27:12]);
        unique case (c[7:0])
          OP_SET_VOUT: begin
            if (mv < VOUT_MIN_MV || mv > VOUT_MAX_MV) begin
              code = MBX_REJECTED;
              n_rejected++;
            end else begin
              pm_write(I2C_ADDR_UCD, PMBUS_PAGE, 1, {8'h00, 4'h0, c[11:8]}, ok);
              if (ok) pm_write(I2C_ADDR_UCD, PMBUS_VOUT_COMMAND, 2,
                               16'((mv << VOUT_EXP_SHIFT) / 1000), ok);
              if (ok) n_set_vout++;
            end
          end
          OP_READ_VOUT, OP_READ_IOUT, OP_READ_POUT: begin
            pm_write(I2C_ADDR_UCD, PMBUS_PAGE, 1, {8'h00, 4'h0, c[11:8]}, ok);
            if (ok) pm_read_word(I2C_ADDR_UCD,
                                 (c[7:0] == OP_READ_VOUT) ? PMBUS_READ_VOUT :
                                 (c[7:0] == OP_READ_IOUT) ? PMBUS_READ_IOUT :
                                                            PMBUS_READ_POUT, w, ok);
            if (ok) n_reads++;
          end
          default: begin
            code = MBX_BAD_OP;
            n_bad_op++;
          end
        endcase
        if (!ok) begin
          code = MBX_I2C_ERR;
          n_i2c_err++;
        end
        bfm.write(mbx(MBX_RESULT), {16'h0, w}, 4'hF, r);
        bfm.write(mbx(MBX_STATUS), {1'b1, 29'h0, code}, 4'hF, r);
      end
    end
  end

endmodule
