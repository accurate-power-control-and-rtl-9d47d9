// tb_i2c_master: self-checking test of the I2C controller against the board
// model (bus switch + PMBus controller, with clock stretching).
// Checks: register reset values; switch channel write and read-back; a NACKed
// address; a PMBus word write and a word read with repeated START; CMDERR on
// a command written while busy; arbitration loss against a line held low;
// the SCL period (4 * PRESCALE cycles plus at most 3 for input sync) at the
// reset prescale and at a reprogrammed one; and that the engine waited
// while the target stretched the clock.
module tb_i2c_master;
  import dvs_pkg::*;

  localparam int unsigned STRETCH = 700;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic m_scl_oe, m_sda_oe, t_scl_oe, t_sda_oe, jam_sda;
  logic scl, sda;
  assign scl = !(m_scl_oe || t_scl_oe);
  assign sda = !(m_sda_oe || t_sda_oe || jam_sda);

  logic [7:0]  sw_ctrl;
  logic [15:0] vout [4];
  int unsigned n_vout_writes, n_stretches;

  i2c_master dut (
    .clk, .rst_n, .req, .rsp,
    .scl_i(scl), .scl_oe(m_scl_oe), .sda_i(sda), .sda_oe(m_sda_oe)
  );
  axil_master_bfm #(.MAX_WAIT(3)) bfm (.clk, .req, .rsp);
  zc702_pmbus_model #(.STRETCH(STRETCH)) board (
    .clk, .rst_n, .scl, .sda, .scl_oe(t_scl_oe), .sda_oe(t_sda_oe),
    .sw_ctrl, .vout, .n_vout_writes, .n_stretches
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // SCL rise-to-rise intervals.
  longint unsigned cyc = 0, last_rise = 0, min_iv = '1, max_iv = 0;
  logic scl_d = 1'b1;
  always @(posedge clk) begin
    cyc++;
    scl_d <= scl;
    if (scl && !scl_d) begin
      if (last_rise != 0) begin
        if (cyc - last_rise < min_iv) min_iv = cyc - last_rise;
        if (cyc - last_rise > max_iv) max_iv = cyc - last_rise;
      end
      last_rise = cyc;
    end
  end
  // Cycles in which the engine had released SCL but a target held it low.
  int unsigned held_cycles = 0;
  always @(posedge clk) if (rst_n && !m_scl_oe && !scl) held_cycles++;

  task automatic reset_iv();
    min_iv = '1; max_iv = 0; last_rise = 0;
  endtask

  localparam axil_addr_t A_CMD = axil_addr_t'(I2C_REG_CMD);
  localparam axil_addr_t A_ST  = axil_addr_t'(I2C_REG_STATUS);
  localparam axil_addr_t A_PRE = axil_addr_t'(I2C_REG_PRESCALE);

  function automatic axil_data_t cmdw(logic s, logic p, logic r, logic w,
                                      logic n, logic [7:0] b);
    axil_data_t d = '0;
    d[I2C_CMD_START] = s; d[I2C_CMD_STOP] = p; d[I2C_CMD_READ] = r;
    d[I2C_CMD_WRITE] = w; d[I2C_CMD_NACK] = n; d[15:8] = b;
    return d;
  endfunction

  // Issue one command and wait for the engine to finish; returns STATUS.
  task automatic op(input axil_data_t c, output axil_data_t st);
    axil_resp_e r;
    bfm.write(A_CMD, c, 4'hF, r);
    do bfm.read(A_ST, st, r); while (st[I2C_ST_BUSY]);
  endtask

  axil_data_t st, d;
  axil_resp_e r;

  initial begin
    jam_sda = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    bfm.read(A_PRE, d, r);
    check(d[15:0] == 16'd250 && r == RESP_OKAY, "prescale reset value");
    bfm.read(A_ST, d, r);
    check(d[3:0] == 4'b0000, "status idle after reset");

    // Select the PMBus channel of the switch; measure SCL at prescale 250.
    reset_iv();
    op(cmdw(1, 0, 0, 1, 0, {I2C_ADDR_SWITCH, 1'b0}), st);
    check(!st[I2C_ST_RXNACK], "switch address acknowledged");
    op(cmdw(0, 1, 0, 1, 0, SWITCH_CH_PMBUS), st);
    check(!st[I2C_ST_RXNACK], "switch data acknowledged");
    check(sw_ctrl == SWITCH_CH_PMBUS, "switch channel 7 selected");
    check(min_iv >= 1000 && min_iv <= 1003, $sformatf("SCL period %0d at prescale 250", min_iv));
    check(held_cycles > 0, "clock stretching held the engine");

    // Read the switch back.
    op(cmdw(1, 0, 0, 1, 0, {I2C_ADDR_SWITCH, 1'b1}), st);
    op(cmdw(0, 1, 1, 0, 1, 8'h00), st);
    check(st[15:8] == SWITCH_CH_PMBUS, "switch read-back");

    // Unknown address is not acknowledged.
    op(cmdw(1, 0, 0, 1, 0, {7'h50, 1'b0}), st);
    check(st[I2C_ST_RXNACK], "unknown address NACKed");
    op(cmdw(0, 1, 0, 0, 0, 8'h00), st);

    // Faster bus.
    bfm.write(A_PRE, 32'd20, 4'hF, r);
    bfm.read(A_PRE, d, r);
    check(d[15:0] == 16'd20, "prescale written");
    reset_iv();

    // PMBus word write: VOUT_COMMAND = 0x0C00 (0.75 V).
    op(cmdw(1, 0, 0, 1, 0, {I2C_ADDR_UCD, 1'b0}), st);
    check(!st[I2C_ST_RXNACK], "controller address acknowledged behind switch");
    op(cmdw(0, 0, 0, 1, 0, PMBUS_VOUT_COMMAND), st);
    op(cmdw(0, 0, 0, 1, 0, 8'h00), st);
    op(cmdw(0, 1, 0, 1, 0, 8'h0C), st);
    check(vout[0] == 16'h0C00, $sformatf("VOUT_COMMAND written, got %h", vout[0]));
    check(min_iv >= 80 && min_iv <= 83, $sformatf("SCL period %0d at prescale 20", min_iv));

    // PMBus word read with repeated start.
    op(cmdw(1, 0, 0, 1, 0, {I2C_ADDR_UCD, 1'b0}), st);
    op(cmdw(0, 0, 0, 1, 0, PMBUS_READ_VOUT), st);
    op(cmdw(1, 0, 0, 1, 0, {I2C_ADDR_UCD, 1'b1}), st);
    check(!st[I2C_ST_RXNACK], "read address acknowledged");
    op(cmdw(0, 0, 1, 0, 0, 8'h00), st);
    check(st[15:8] == 8'h00, "READ_VOUT low byte");
    op(cmdw(0, 1, 1, 0, 1, 8'h00), st);
    check(st[15:8] == 8'h0C, "READ_VOUT high byte");

    // Command while busy is dropped and flagged.
    bfm.write(A_CMD, cmdw(1, 0, 0, 1, 0, {I2C_ADDR_SWITCH, 1'b0}), 4'hF, r);
    bfm.write(A_CMD, cmdw(0, 1, 0, 1, 0, 8'h01), 4'hF, r);
    bfm.read(A_ST, d, r);
    check(d[I2C_ST_CMDERR] && d[I2C_ST_BUSY], "CMDERR on command while busy");
    do bfm.read(A_ST, st, r); while (st[I2C_ST_BUSY]);
    op(cmdw(0, 1, 0, 0, 0, 8'h00), st);
    check(!st[I2C_ST_CMDERR], "CMDERR cleared by next command");
    check(sw_ctrl == SWITCH_CH_PMBUS, "dropped command had no effect");

    // Arbitration: another master holds SDA low.
    jam_sda = 1'b1;
    op(cmdw(1, 0, 0, 1, 0, 8'hFF), st);
    check(st[I2C_ST_ARBLOST], "arbitration loss detected");
    check(!m_scl_oe && !m_sda_oe, "lines released after arbitration loss");
    jam_sda = 1'b0;
    repeat (100) @(posedge clk);
    op(cmdw(1, 1, 0, 1, 0, {I2C_ADDR_SWITCH, 1'b1}), st);
    check(!st[I2C_ST_ARBLOST] && !st[I2C_ST_RXNACK], "bus usable after arbitration loss");

    check(n_stretches > 0, "target stretched the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
