// tb_dvs_ip_core: end-to-end test of the DVS unit at its default parameters.
// The application processor side is an AXI4-Lite manager on the PS port; the
// soft processor is mb_firmware_model on the local-bus port; the board is
// zc702_pmbus_model (switch + PMBus controller, stretching SCL).
// It sweeps rail 0 from 1.00 V down to 0.75 V in 50 mV steps, reading
// voltage, current and power at each step, then covers the refused range,
// the window edges, a second rail, an unknown opcode and a missing target.
// Out-of-window requests must be answered by the hardware guard at once,
// without reaching the firmware.
// Each request's latency is checked against the times measured for the
// logic-side method on the real board (3.9 ms for one reading, 50.3 ms for a
// voltage change, at 100 MHz). Every mechanism must occur at least once.
module tb_dvs_ip_core;
  import dvs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t ps_req, mb_req;
  axil_rsp_t ps_rsp, mb_rsp;
  logic m_scl_oe, m_sda_oe, t_scl_oe, t_sda_oe, board_present, fw_enable, vout_reject;
  logic scl, sda;
  assign scl = !(m_scl_oe || (t_scl_oe && board_present));
  assign sda = !(m_sda_oe || (t_sda_oe && board_present));

  logic [7:0]  sw_ctrl;
  logic [15:0] vout [4];
  int unsigned n_vout_writes, n_stretches;
  int unsigned n_switch_sel, n_set_vout, n_reads, n_rejected, n_i2c_err, n_bad_op;

  dvs_ip_core dut (
    .clk, .rst_n, .ps_req, .ps_rsp, .mb_req, .mb_rsp,
    .scl_i(scl), .scl_oe(m_scl_oe), .sda_i(sda), .sda_oe(m_sda_oe),
    .vout_reject
  );
  axil_master_bfm ps (.clk, .req(ps_req), .rsp(ps_rsp));
  mb_firmware_model fw (
    .clk, .enable(fw_enable), .mb_req, .mb_rsp,
    .n_switch_sel, .n_set_vout, .n_reads, .n_rejected, .n_i2c_err, .n_bad_op
  );
  zc702_pmbus_model #(.STRETCH(300)) board (
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

  longint unsigned cyc = 0;
  int unsigned n_guard_rej = 0;
  always @(posedge clk) begin
    cyc++;
    if (vout_reject) n_guard_rej++;
  end

  // Expected board readings, from the load the board model emulates.
  function automatic int unsigned mv_of(logic [15:0] m);
    return (int'(m) * 1000) >> 12;
  endfunction
  function automatic logic [15:0] exp_iout(int unsigned page, int unsigned mv);
    int unsigned ma = mv / 2 + 100 * page;
    return {5'b11100, 11'((ma * 16) / 1000)};
  endfunction
  function automatic logic [15:0] exp_pout(int unsigned page, int unsigned mv);
    int unsigned ma = mv / 2 + 100 * page;
    int unsigned mw = mv * ma / 1000;
    return {5'b11000, 11'((mw * 256) / 1000)};
  endfunction

  localparam longint unsigned MON_LIMIT = 390_000;    // 3.9 ms at 100 MHz
  localparam longint unsigned SET_LIMIT = 5_030_000;  // 50.3 ms at 100 MHz

  function automatic axil_addr_t mbx(int unsigned w);
    return axil_addr_t'(4 * w);
  endfunction

  task automatic request(input mbx_op_e opc, input int unsigned page,
                         input int unsigned mv, output mbx_code_e code,
                         output logic [15:0] result, output longint unsigned cycles);
    axil_data_t d;
    axil_resp_e r;
    longint unsigned t0, limit;
    ps.write(mbx(MBX_STATUS), 32'h0, 4'hF, r);
    t0 = cyc;
    ps.write(mbx(MBX_CMD), {1'b1, 3'b000, 16'(mv), 4'(page), 8'(opc)}, 4'hF, r);
    limit = (opc == OP_SET_VOUT) ? SET_LIMIT : MON_LIMIT;
    do ps.read(mbx(MBX_STATUS), d, r); while (!d[31] && cyc - t0 <= limit);
    cycles = cyc - t0;
    if (!d[31]) begin
      failures++;
      $display("FAIL: request %h not done within %0d cycles", opc, limit);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    code = mbx_code_e'(d[1:0]);
    ps.read(mbx(MBX_RESULT), d, r);
    result = d[15:0];
  endtask

  mbx_code_e       code;
  logic [15:0]     res, mant;
  longint unsigned t, worst_mon = 0, worst_set = 0;
  axil_resp_e      r;
  axil_data_t      d;

  initial begin
    board_present = 1'b1;
    fw_enable     = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    ps.write(mbx(MBX_CMD), 32'h0, 4'hF, r);
    ps.write(mbx(MBX_STATUS), 32'h0, 4'hF, r);
    ps.read(mbx(MBX_CMD), d, r);
    check(d == 32'h0 && r == RESP_OKAY, "PS port writes and reads the mailbox");
    fw_enable = 1'b1;

    request(OP_READ_VOUT, 0, 0, code, res, t);
    check(code == MBX_OK && res == 16'd4096, $sformatf("nominal 1.000 V read back, got %h", res));
    check(sw_ctrl == SWITCH_CH_PMBUS, "firmware pointed the switch at the PMBus");

    for (int mv = 1000; mv >= 750; mv -= 50) begin
      mant = 16'((mv * 4096) / 1000);
      request(OP_SET_VOUT, 0, mv, code, res, t);
      if (t > worst_set) worst_set = t;
      check(code == MBX_OK, $sformatf("set %0d mV accepted", mv));
      check(vout[0] == mant, $sformatf("rail 0 at %0d mV: %h", mv, vout[0]));
      request(OP_READ_VOUT, 0, 0, code, res, t);
      if (t > worst_mon) worst_mon = t;
      check(code == MBX_OK && res == mant, $sformatf("READ_VOUT at %0d mV", mv));
      request(OP_READ_IOUT, 0, 0, code, res, t);
      check(code == MBX_OK && res == exp_iout(0, mv_of(mant)),
            $sformatf("READ_IOUT at %0d mV: %h", mv, res));
      request(OP_READ_POUT, 0, 0, code, res, t);
      check(code == MBX_OK && res == exp_pout(0, mv_of(mant)),
            $sformatf("READ_POUT at %0d mV: %h", mv, res));
    end
    $display("worst case: set %0d cycles, one reading %0d cycles", worst_set, worst_mon);
    check(worst_set < SET_LIMIT, "voltage change within 50.3 ms");
    check(worst_mon < MON_LIMIT, "reading within 3.9 ms");

    // Outside the window: refused by the hardware guard, rail unchanged,
    // and the firmware never sees the request.
    mant = vout[0];
    begin
      automatic int unsigned rd_before = n_reads, set_before = n_set_vout;
      request(OP_SET_VOUT, 0, 600, code, res, t);
      check(t < 100, $sformatf("refusal answered by the guard in %0d cycles", t));
      check(n_reads == rd_before && n_set_vout == set_before, "refused request did not reach the firmware");
    end
    request(OP_SET_VOUT, 0, 600, code, res, t);
    check(code == MBX_REJECTED && vout[0] == mant, "600 mV refused");
    request(OP_SET_VOUT, 0, 1050, code, res, t);
    check(code == MBX_REJECTED && vout[0] == mant, "1050 mV refused");
    request(OP_SET_VOUT, 0, 649, code, res, t);
    check(code == MBX_REJECTED, "649 mV refused");
    request(OP_SET_VOUT, 0, 650, code, res, t);
    check(code == MBX_OK && vout[0] == 16'((650 * 4096) / 1000), "650 mV accepted");
    request(OP_SET_VOUT, 0, 1000, code, res, t);
    check(code == MBX_OK && vout[0] == 16'd4096, "1000 mV accepted");

    // A second rail.
    request(OP_SET_VOUT, 1, 900, code, res, t);
    check(code == MBX_OK && vout[1] == 16'((900 * 4096) / 1000) && vout[0] == 16'd4096,
          "rail 1 set without touching rail 0");
    request(OP_READ_IOUT, 1, 0, code, res, t);
    check(code == MBX_OK && res == exp_iout(1, mv_of(vout[1])), "rail 1 current");

    // Unknown opcode.
    request(mbx_op_e'(8'h07), 0, 0, code, res, t);
    check(code == MBX_BAD_OP, "unknown opcode reported");

    // Power controller missing from the bus.
    board_present = 1'b0;
    request(OP_READ_VOUT, 0, 0, code, res, t);
    check(code == MBX_I2C_ERR, "missing target reported as I2C error");
    board_present = 1'b1;
    request(OP_READ_VOUT, 0, 0, code, res, t);
    check(code == MBX_OK && res == 16'd4096, "recovers once the target answers");

    $display("mechanisms: switch=%0d set=%0d read=%0d guard_rejected=%0d fw_rejected=%0d bad_op=%0d i2c_err=%0d stretch=%0d",
             n_switch_sel, n_set_vout, n_reads, n_guard_rej, n_rejected, n_bad_op, n_i2c_err, n_stretches);
    check(n_switch_sel > 0, "switch selection happened");
    check(n_set_vout > 0 && n_vout_writes == n_set_vout, "voltage changes reached the controller");
    check(n_reads > 0, "readings happened");
    check(n_guard_rej == 4, $sformatf("guard refused the 4 out-of-window requests (%0d)", n_guard_rej));
    check(n_bad_op > 0, "unknown opcode happened");
    check(n_i2c_err > 0, "I2C error happened");
    check(n_stretches > 0, "clock stretching happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
