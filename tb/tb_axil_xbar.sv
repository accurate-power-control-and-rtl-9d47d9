// tb_axil_xbar: self-checking test of the local bus decoder with its default
// address map (dual-port RAM window and I2C window) and two randomly stalling
// memory models as subordinates. Checks routing of writes and reads to the
// right subordinate, that the other one is untouched, that subordinate
// errors are passed back, that unmapped addresses get DECERR with read data
// zero and reach nobody, and many random interleaved accesses.
module tb_axil_xbar;
  import dvs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t m_req;
  axil_rsp_t m_rsp;
  axil_req_t s_req [2];
  axil_rsp_t s_rsp [2];
  axil_data_t mem0 [16], mem1 [16];
  int unsigned nw0, nr0, nw1, nr1;

  axil_xbar dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  axil_master_bfm #(.MAX_WAIT(2)) bfm (.clk, .req(m_req), .rsp(m_rsp));
  axil_mem_model s0 (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]), .mem(mem0), .n_wr(nw0), .n_rd(nr0));
  axil_mem_model s1 (.clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]), .mem(mem1), .n_wr(nw1), .n_rd(nr1));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  axil_data_t ref0 [16], ref1 [16];
  axil_data_t d;
  axil_resp_e r;

  initial begin
    for (int i = 0; i < 16; i++) begin ref0[i] = '0; ref1[i] = '0; end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    bfm.write(DPRAM_BASE + 32'h8, 32'hA5A5_0001, 4'hF, r);
    check(r == RESP_OKAY && mem0[2] == 32'hA5A5_0001 && nw1 == 0, "write routed to RAM window");
    bfm.write(IIC_BASE + 32'h4, 32'h1234_5678, 4'hF, r);
    check(r == RESP_OKAY && mem1[1] == 32'h1234_5678 && mem0[1] == 32'h0, "write routed to I2C window");
    ref0[2] = 32'hA5A5_0001; ref1[1] = 32'h1234_5678;
    bfm.read(DPRAM_BASE + 32'h8, d, r);
    check(r == RESP_OKAY && d == 32'hA5A5_0001, "read from RAM window");
    bfm.read(IIC_BASE + 32'h4, d, r);
    check(r == RESP_OKAY && d == 32'h1234_5678, "read from I2C window");

    // Subordinate error passed through.
    bfm.write(IIC_BASE + 32'h800, 32'hDEAD, 4'hF, r);
    check(r == RESP_SLVERR, "SLVERR passed back on write");
    bfm.read(DPRAM_BASE + 32'h800, d, r);
    check(r == RESP_SLVERR, "SLVERR passed back on read");

    // Unmapped: DECERR, nobody sees it.
    begin
      automatic int unsigned w0 = nw0, w1 = nw1, r0 = nr0, r1 = nr1;
      bfm.write(32'h1000_0000, 32'hFFFF_FFFF, 4'hF, r);
      check(r == RESP_DECERR, "DECERR on unmapped write");
      bfm.read(DPRAM_BASE + 32'h1000, d, r);
      check(r == RESP_DECERR && d == 32'h0, "DECERR on read just past the RAM window");
      check(nw0 == w0 && nw1 == w1 && nr0 == r0 && nr1 == r1, "unmapped accesses reached nobody");
    end

    // Random traffic.
    for (int n = 0; n < 300; n++) begin
      automatic int unsigned which = $urandom_range(2);
      automatic int unsigned idx = $urandom_range(15);
      automatic axil_addr_t a;
      automatic axil_data_t v = $urandom;
      a = (which == 0) ? DPRAM_BASE : (which == 1) ? IIC_BASE : 32'h2000_0000;
      a = a + axil_addr_t'(4 * idx);
      if ($urandom_range(1) == 0) begin
        bfm.write(a, v, 4'hF, r);
        if (which == 0) ref0[idx] = v;
        if (which == 1) ref1[idx] = v;
        check(r == ((which == 2) ? RESP_DECERR : RESP_OKAY), "random write response");
      end else begin
        bfm.read(a, d, r);
        check(r == ((which == 2) ? RESP_DECERR : RESP_OKAY) &&
              d == ((which == 0) ? ref0[idx] : (which == 1) ? ref1[idx] : 32'h0),
              $sformatf("random read %h", a));
      end
    end
    for (int i = 0; i < 16; i++)
      check(mem0[i] == ref0[i] && mem1[i] == ref1[i], "final memory contents");

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
