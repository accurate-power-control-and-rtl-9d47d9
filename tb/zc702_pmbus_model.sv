// zc702_pmbus_model: behavioural model of the board side of the main I2C bus
// of a ZC702: the PCA9548 1-to-8 bus switch (address 0x74, one control byte,
// bit n connects channel n) and, behind channel 7, a UCD92xx PMBus power
// controller (address 0x34). Testbench use only.
//
// The model oversamples the bus lines on clk and reacts to START, STOP and
// SCL edges. It acknowledges its own addresses (the controller only while
// channel 7 is switched on) and every written byte, drives read data after
// the falling SCL edge and follows the master's ACK/NACK. When STRETCH > 0 it
// holds SCL low for STRETCH cycles after each acknowledge it gives, to
// exercise clock stretching.
// Controller behaviour: PAGE (0x00) selects one of four rails, VOUT_COMMAND
// (0x21) sets the rail voltage at once (LINEAR16, exponent -12), READ_VOUT
// returns it, READ_IOUT and READ_POUT return values computed from it with
// iout_ma() and pout_mw() in LINEAR11 format, VOUT_MODE returns 0x14.
module zc702_pmbus_model
  import dvs_pkg::*;
#(
  parameter int unsigned STRETCH = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe,
  output logic [7:0]  sw_ctrl,
  output logic [15:0] vout [4],
  output int unsigned n_vout_writes,
  output int unsigned n_stretches
);

  // Rail current in mA for a rail voltage in mV (a resistive-looking load).
  function automatic int unsigned iout_ma(int unsigned page, int unsigned mv);
    return mv / 2 + 100 * page;
  endfunction
  function automatic int unsigned pout_mw(int unsigned page, int unsigned mv);
    return mv * iout_ma(int'(page), mv) / 1000;
  endfunction
  function automatic int unsigned mant_to_mv(logic [15:0] m);
    return (int'(m) * 1000) >> VOUT_EXP_SHIFT;
  endfunction
  // LINEAR11: [15:11] exponent (two's complement), [10:0] mantissa.
  function automatic logic [15:0] lin11(int unsigned milli, int exp_neg);
    logic [4:0] e;
    e = 5'(-exp_neg);
    return {e, 11'((milli << exp_neg) / 1000)};
  endfunction

  typedef enum logic [2:0] {T_IDLE, T_RX, T_RXACK, T_TX, T_TXACK} tstate_e;
  typedef enum logic [1:0] {SEL_NONE, SEL_SW, SEL_UCD} sel_e;

  tstate_e     st;
  sel_e        sel;
  logic        scl_p, sda_p, first, rd_mode, m_nack;
  logic [3:0]  bitcnt;
  logic [7:0]  shreg, txb;
  logic [7:0]  cmd_code;
  logic [7:0]  wbuf [2];
  int unsigned nwr, rd_idx, hold;
  logic [1:0]  page;

  function automatic logic [15:0] read_word(logic [7:0] code);
    int unsigned mv;
    mv = mant_to_mv(vout[page]);
    unique case (code)
      PMBUS_PAGE:      return {14'd0, page};
      PMBUS_VOUT_MODE: return 16'h0014;
      PMBUS_READ_VOUT, PMBUS_VOUT_COMMAND: return vout[page];
      PMBUS_READ_IOUT: return lin11(iout_ma(int'(page), mv), 4);
      PMBUS_READ_POUT: return lin11(pout_mw(int'(page), mv), 8);
      default:         return 16'hFFFF;
    endcase
  endfunction

  function automatic logic [7:0] tx_byte(int unsigned idx);
    logic [15:0] w;
    if (sel == SEL_SW) return sw_ctrl;
    w = read_word(cmd_code);
    return (idx == 0) ? w[7:0] : w[15:8];
  endfunction

  // nwr counts the bytes written after the address, command code included.
  task automatic apply_write();
    if (sel == SEL_UCD) begin
      if (cmd_code == PMBUS_PAGE && nwr >= 2) page <= wbuf[0][1:0];
      if (cmd_code == PMBUS_VOUT_COMMAND && nwr >= 3) begin
        vout[page]    <= {wbuf[1], wbuf[0]};
        n_vout_writes <= n_vout_writes + 1;
      end
    end
    nwr <= 0;
  endtask

  logic [7:0] tx_first, tx_next;
  always_comb begin
    tx_first = tx_byte(0);
    tx_next  = tx_byte(rd_idx + 1);
  end

  logic start_ev, stop_ev, rise, fall;
  assign start_ev = scl && scl_p && sda_p && !sda;
  assign stop_ev  = scl && scl_p && !sda_p && sda;
  assign rise     = scl && !scl_p;
  assign fall     = !scl && scl_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; sel <= SEL_NONE; scl_p <= 1'b1; sda_p <= 1'b1;
      scl_oe <= 1'b0; sda_oe <= 1'b0; sw_ctrl <= 8'h00;
      for (int i = 0; i < 4; i++) vout[i] <= 16'd4096;  // 1.000 V
      page <= '0; n_vout_writes <= 0; n_stretches <= 0; hold <= 0;
      first <= 1'b0; rd_mode <= 1'b0; bitcnt <= '0; shreg <= '0; txb <= '0;
      cmd_code <= '0; nwr <= 0; rd_idx <= 0; m_nack <= 1'b0;
      wbuf[0] <= '0; wbuf[1] <= '0;
    end else begin
      scl_p <= scl;
      sda_p <= sda;
      if (hold > 0) begin
        hold <= hold - 1;
        if (hold == 1) scl_oe <= 1'b0;
      end
      if (stop_ev) begin
        apply_write();
        st <= T_IDLE; sda_oe <= 1'b0;
      end else if (start_ev) begin
        apply_write();
        st <= T_RX; bitcnt <= '0; first <= 1'b1; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          T_RX: begin
            if (rise) begin
              shreg  <= {shreg[6:0], sda};
              bitcnt <= bitcnt + 4'd1;
            end else if (fall && bitcnt == 4'd8) begin
              if (first) begin
                first   <= 1'b0;
                rd_mode <= shreg[0];
                rd_idx  <= 0;
                if (shreg[7:1] == I2C_ADDR_SWITCH) begin
                  sel <= SEL_SW; sda_oe <= 1'b1; st <= T_RXACK;
                end else if (shreg[7:1] == I2C_ADDR_UCD && sw_ctrl[7]) begin
                  sel <= SEL_UCD; sda_oe <= 1'b1; st <= T_RXACK;
                end else begin
                  sel <= SEL_NONE; st <= T_IDLE;
                end
              end else begin
                if (sel == SEL_SW) sw_ctrl <= shreg;
                if (sel == SEL_UCD) begin
                  if (nwr == 0 && !rd_mode) begin
                    cmd_code <= shreg;
                    nwr <= 1;
                  end else if (nwr <= 2) begin
                    wbuf[nwr-1] <= shreg;
                    nwr <= nwr + 1;
                  end
                end
                sda_oe <= 1'b1; st <= T_RXACK;
              end
            end
          end
          T_RXACK: if (fall) begin
            if (STRETCH > 0) begin
              scl_oe <= 1'b1; hold <= STRETCH; n_stretches <= n_stretches + 1;
            end
            bitcnt <= '0;
            if (rd_mode) begin
              txb    <= tx_first;
              sda_oe <= !tx_first[7];
              st     <= T_TX;
            end else begin
              sda_oe <= 1'b0;
              st     <= T_RX;
            end
          end
          T_TX: if (fall) begin
            if (bitcnt == 4'd7) begin
              sda_oe <= 1'b0; st <= T_TXACK;
            end else begin
              sda_oe <= !txb[6 - bitcnt];
            end
            bitcnt <= bitcnt + 4'd1;
          end
          T_TXACK: begin
            if (rise) m_nack <= sda;
            else if (fall) begin
              if (!m_nack) begin
                txb    <= tx_next;
                sda_oe <= !tx_next[7];
                rd_idx <= rd_idx + 1;
                bitcnt <= '0;
                st     <= T_TX;
              end else begin
                sda_oe <= 1'b0; st <= T_IDLE;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
