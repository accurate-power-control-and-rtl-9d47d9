// tb_dvs_dpram: self-checking test of the dual-port RAM register file at its
// default depth. Port A plays the application processor, port B the soft
// processor. Checks: data written on one port is read on the other; byte
// strobes; every word of the memory with a pattern; addresses above the
// depth wrap; a same-cycle write of one word from both ports leaves port B's
// data; and the access timing of both ports (read data valid two cycles
// after the address handshake, write response two cycles after the last of
// address and data).
module tb_dvs_dpram;
  import dvs_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t a_req, b_req;
  axil_rsp_t a_rsp, b_rsp;

  dvs_dpram dut (.clk, .rst_n, .a_req, .a_rsp, .b_req, .b_rsp);
  axil_master_bfm #(.MAX_WAIT(2)) pa (.clk, .req(a_req), .rsp(a_rsp));
  axil_master_bfm #(.MAX_WAIT(2)) pb (.clk, .req(b_req), .rsp(b_rsp));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Latency monitor on port A.
  longint unsigned cyc = 0, t_ar = 0, t_w = 0;
  int unsigned rd_lat = 0, wr_lat = 0, n_lat = 0;
  logic rv_d = 1'b0, bv_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (a_req.arvalid && a_rsp.arready) t_ar = cyc;
    if ((a_req.wvalid && a_rsp.wready) || (a_req.awvalid && a_rsp.awready)) t_w = cyc;
    if (a_rsp.rvalid && !rv_d) begin rd_lat = int'(cyc - t_ar); n_lat++; end
    if (a_rsp.bvalid && !bv_d) wr_lat = int'(cyc - t_w);
    rv_d <= a_rsp.rvalid;
    bv_d <= a_rsp.bvalid;
  end

  function automatic axil_data_t pat(int unsigned i);
    return 32'h9E37_79B9 * (i + 1) ^ (i << 20);
  endfunction

  axil_data_t d;
  axil_resp_e r;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    pa.write(32'h0, 32'h8000_1234, 4'hF, r);
    check(r == RESP_OKAY, "port A write response");
    check(wr_lat == 2, $sformatf("write response latency %0d", wr_lat));
    pb.read(32'h0, d, r);
    check(d == 32'h8000_1234 && r == RESP_OKAY, "A to B");
    pb.write(32'h8, 32'hCAFE_F00D, 4'hF, r);
    pa.read(32'h8, d, r);
    check(d == 32'hCAFE_F00D, "B to A");
    check(rd_lat == 2, $sformatf("read latency %0d", rd_lat));

    // Byte strobes.
    pa.write(32'h8, 32'h1122_3344, 4'b0101, r);
    pb.read(32'h8, d, r);
    check(d == 32'hCA22_F044, $sformatf("byte strobes: %h", d));

    // Every word.
    for (int i = 0; i < DEPTH; i++) begin
      if (i % 2 == 0) pa.write(axil_addr_t'(4 * i), pat(i), 4'hF, r);
      else            pb.write(axil_addr_t'(4 * i), pat(i), 4'hF, r);
    end
    for (int i = 0; i < DEPTH; i++) begin
      if (i % 2 == 0) pb.read(axil_addr_t'(4 * i), d, r);
      else            pa.read(axil_addr_t'(4 * i), d, r);
      check(d == pat(i), $sformatf("word %0d", i));
    end

    // Wrap-around above the depth.
    pa.read(axil_addr_t'(4 * DEPTH + 12), d, r);
    check(d == pat(3), "address wraps at the depth");

    // Same word, same cycle, both ports: B wins.
    fork
      pa.write(32'h10, 32'hAAAA_AAAA, 4'hF, r);
      pb.write(32'h10, 32'h5555_5555, 4'hF, r);
    join
    pa.read(32'h10, d, r);
    check(d == 32'h5555_5555, $sformatf("collision: port B wins, got %h", d));

    // Both ports reading at once.
    fork
      pa.read(32'h14, d, r);
      begin
        axil_data_t d2;
        axil_resp_e r2;
        pb.read(32'h18, d2, r2);
        check(d2 == pat(6), "simultaneous read on B");
      end
    join
    check(d == pat(5), "simultaneous read on A");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
