// tb_axil_vout_guard: self-checking test of the voltage window guard in front
// of the dual-port RAM (both at their defaults). Directed cases cover the
// window edges (649/650/1000/1001 mV), requests without GO, other opcodes,
// partial writes that set GO, and an alias of the CMD word above the RAM
// depth; then random writes and reads over the first words are compared
// with a reference model of the guard's rule. Every refusal must pulse
// reject exactly once.
module tb_axil_vout_guard;
  import dvs_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t m_req, a_req, b_req;
  axil_rsp_t m_rsp, a_rsp, b_rsp;
  logic reject;

  axil_vout_guard dut (.clk, .rst_n, .m_req, .m_rsp, .s_req(a_req), .s_rsp(a_rsp), .reject);
  dvs_dpram ram (.clk, .rst_n, .a_req, .a_rsp, .b_req, .b_rsp);
  axil_master_bfm #(.MAX_WAIT(2)) ps (.clk, .req(m_req), .rsp(m_rsp));
  initial b_req = '0;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned n_pulses = 0;
  always @(posedge clk) if (reject) n_pulses++;

  localparam axil_data_t REJ = {1'b1, 29'd0, MBX_REJECTED};

  function automatic axil_data_t req_word(logic go, logic [7:0] opc, int unsigned mv);
    return {go, 3'b000, 16'(mv), 4'h0, opc};
  endfunction

  // Reference rule: does this write get refused?
  function automatic logic refused(int unsigned word, axil_data_t d, axil_strb_t s);
    int unsigned mv = int'(d[27:12]);
    if (word % DEPTH != MBX_CMD || !(s[3] && d[31])) return 1'b0;
    if (s != 4'hF) return 1'b1;
    return (d[7:0] == OP_SET_VOUT) && (mv < VOUT_MIN_MV || mv > VOUT_MAX_MV);
  endfunction

  axil_data_t ref_mem [8];
  int unsigned exp_pulses = 0;

  task automatic wr(input int unsigned word, input axil_data_t d, input axil_strb_t s);
    axil_resp_e r;
    ps.write(axil_addr_t'(4 * word), d, s, r);
    check(r == RESP_OKAY, "write response OKAY");
    if (refused(word, d, s)) begin
      ref_mem[MBX_STATUS] = REJ;
      exp_pulses++;
    end else begin
      for (int i = 0; i < 4; i++)
        if (s[i]) ref_mem[word % DEPTH][8*i +: 8] = d[8*i +: 8];
    end
  endtask

  task automatic expect_mem(input string what);
    axil_data_t d;
    axil_resp_e r;
    for (int w = 0; w < 8; w++) begin
      ps.read(axil_addr_t'(4 * w), d, r);
      check(d == ref_mem[w], $sformatf("%s: word %0d = %h, expected %h", what, w, d, ref_mem[w]));
    end
    check(n_pulses == exp_pulses, $sformatf("%s: %0d reject pulses, expected %0d", what, n_pulses, exp_pulses));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 8; w++) begin
      ref_mem[w] = '0;
      wr(w, 32'h0, 4'hF);
    end

    wr(MBX_CMD, req_word(1, OP_SET_VOUT, 800), 4'hF);
    expect_mem("800 mV passes");
    wr(MBX_STATUS, 32'h0, 4'hF);
    wr(MBX_CMD, req_word(1, OP_SET_VOUT, 600), 4'hF);
    check(ref_mem[MBX_STATUS] == REJ, "reference marks 600 mV refused");
    expect_mem("600 mV refused");
    wr(MBX_STATUS, 32'h0, 4'hF);
    wr(MBX_CMD, req_word(1, OP_SET_VOUT, 649), 4'hF);
    expect_mem("649 mV refused");
    wr(MBX_CMD, req_word(1, OP_SET_VOUT, 650), 4'hF);
    expect_mem("650 mV passes");
    wr(MBX_CMD, req_word(1, OP_SET_VOUT, 1000), 4'hF);
    expect_mem("1000 mV passes");
    wr(MBX_STATUS, 32'h0, 4'hF);
    wr(MBX_CMD, req_word(1, OP_SET_VOUT, 1001), 4'hF);
    expect_mem("1001 mV refused");
    wr(MBX_CMD, req_word(0, OP_SET_VOUT, 100), 4'hF);
    expect_mem("no GO: stored as is");
    wr(MBX_CMD, req_word(1, OP_READ_IOUT, 5), 4'hF);
    expect_mem("reading with any millivolt field passes");
    wr(MBX_STATUS, 32'h0, 4'hF);
    wr(MBX_CMD, 32'h8000_0000, 4'b1000);
    expect_mem("partial write setting GO refused");
    wr(MBX_STATUS, 32'h0, 4'hF);
    wr(DEPTH + MBX_CMD, req_word(1, OP_SET_VOUT, 2000), 4'hF);
    expect_mem("alias of CMD above the depth refused");
    check(exp_pulses == 5, "five directed refusals");

    for (int n = 0; n < 300; n++) begin
      automatic int unsigned w = ($urandom_range(3) == 0) ? $urandom_range(7) : MBX_CMD;
      automatic axil_data_t d = $urandom;
      automatic axil_strb_t s = ($urandom_range(3) == 0) ? 4'($urandom) : 4'hF;
      d[27:12] = 16'($urandom_range(1100, 550));
      d[7:0]   = ($urandom_range(1) == 0) ? OP_SET_VOUT : 8'($urandom_range(4));
      wr(w, d, s);
      if (n % 50 == 49) expect_mem("random traffic");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
