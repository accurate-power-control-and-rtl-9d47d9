// axil_vout_guard: enforces the output voltage window of the DVS unit in
// hardware, on the PS side of the mailbox.
//
// It sits between the PS AXI4-Lite port and port A of the dual-port RAM.
// Reads pass straight through. Each write is held until both its address and
// its data have arrived, then inspected: a write to the mailbox CMD word that
// sets GO must be a full-word write, and if its opcode is SET_VOUT the
// millivolt field must lie in VOUT_MIN_MV..VOUT_MAX_MV (650..1000 mV). A
// write that breaks either rule is not stored; in its place the guard writes
// the STATUS word with DONE set and the code MBX_REJECTED, so the request is
// answered at once without ever reaching the firmware, and reject pulses for
// one cycle. All other writes are forwarded unchanged. Either way the RAM's
// write response is returned to the PS.
// The CMD word is recognised the way the RAM decodes it, by address bits
// [IDX_BITS+1:2], so aliases of the word above the RAM depth are caught too.
// Timing: a write reaches the RAM one cycle after both its handshakes, which
// adds two cycles to a PS write; reads are not delayed.
// That requests outside the window are refused by the unit follows the
// design description; doing it here, in front of the mailbox, and the
// full-word rule are this design's own choices.
module axil_vout_guard
  import dvs_pkg::*;
#(
  parameter int unsigned IDX_BITS = 8   // log2 of the RAM depth in words
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,    // from the PS
  output axil_rsp_t m_rsp,
  output axil_req_t s_req,    // to the RAM
  input  axil_rsp_t s_rsp,
  output logic      reject
);

  logic       aw_held, w_held, fwd, aw_sent, w_sent;
  axil_addr_t awaddr_q, out_addr;
  axil_data_t wdata_q, out_data;
  axil_strb_t wstrb_q, out_strb;

  // Inspection of the held write.
  logic        is_cmd, sets_go, is_set, in_window, bad;
  int unsigned mv;
  always_comb begin
    is_cmd    = (awaddr_q[IDX_BITS+1:2] == IDX_BITS'(MBX_CMD));
    sets_go   = wstrb_q[3] && wdata_q[31];
    is_set    = (wdata_q[7:0] == OP_SET_VOUT);
    mv        = int'(wdata_q[27:12]);
    in_window = (mv >= VOUT_MIN_MV) && (mv <= VOUT_MAX_MV);
    bad       = is_cmd && sets_go && ((wstrb_q != '1) || (is_set && !in_window));
  end

  logic start_fwd;
  assign start_fwd = aw_held && w_held && !fwd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held <= 1'b0; w_held <= 1'b0; fwd <= 1'b0;
      aw_sent <= 1'b0; w_sent <= 1'b0;
      awaddr_q <= '0; wdata_q <= '0; wstrb_q <= '0;
      out_addr <= '0; out_data <= '0; out_strb <= '0;
      reject <= 1'b0;
    end else begin
      reject <= 1'b0;
      if (m_req.awvalid && m_rsp.awready) begin
        aw_held  <= 1'b1;
        awaddr_q <= m_req.awaddr;
      end
      if (m_req.wvalid && m_rsp.wready) begin
        w_held  <= 1'b1;
        wdata_q <= m_req.wdata;
        wstrb_q <= m_req.wstrb;
      end
      if (start_fwd) begin
        fwd     <= 1'b1;
        aw_sent <= 1'b0;
        w_sent  <= 1'b0;
        reject  <= bad;
        if (bad) begin
          out_addr <= awaddr_q;
          out_addr[IDX_BITS+1:2] <= IDX_BITS'(MBX_STATUS);
          out_data <= {1'b1, 29'd0, MBX_REJECTED};
          out_strb <= '1;
        end else begin
          out_addr <= awaddr_q;
          out_data <= wdata_q;
          out_strb <= wstrb_q;
        end
      end
      if (fwd) begin
        if (s_req.awvalid && s_rsp.awready) aw_sent <= 1'b1;
        if (s_req.wvalid && s_rsp.wready)   w_sent  <= 1'b1;
        if (m_rsp.bvalid && m_req.bready) begin
          fwd <= 1'b0; aw_held <= 1'b0; w_held <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    s_req         = m_req;          // read channels pass through
    s_req.awaddr  = out_addr;
    s_req.awvalid = fwd && !aw_sent;
    s_req.wdata   = out_data;
    s_req.wstrb   = out_strb;
    s_req.wvalid  = fwd && !w_sent;
    s_req.bready  = fwd && m_req.bready;

    m_rsp         = s_rsp;
    m_rsp.awready = !aw_held;
    m_rsp.wready  = !w_held;
    m_rsp.bvalid  = fwd && s_rsp.bvalid;
  end

  a_no_early_b: assert property (@(posedge clk) disable iff (!rst_n)
    !fwd |-> !m_rsp.bvalid);

endmodule
