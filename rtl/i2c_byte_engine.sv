// i2c_byte_engine: bit-level I2C master. One command may generate a START
// (or repeated START), then write or read one byte with its acknowledge bit,
// then a STOP, in that order; any of the three may be left out.
//
// Timing: the engine divides each SCL bit into four quarters of PRESCALE
// clock cycles (prescale input). A data bit is: SCL low and SDA set up
// (quarter 0), SCL released (1), SCL high (2, the bit is sampled at its end),
// SCL pulled low (3). START and STOP use the same four-quarter frame. So a
// byte with its acknowledge takes 9 * 4 * prescale cycles, plus two cycles
// per SCL release for the input synchronisers; with a 100 MHz clock and
// prescale = 250 the bus runs at 100 kHz, the standard PMBus rate.
// Clock stretching: while the engine has released SCL but the line still
// reads low, the quarter counter waits, so a slow target can hold the bus.
// Arbitration: if, while sending a 1 in a data bit, SDA is read low, the
// engine releases both lines, flags arb_lost and ends the command.
// Both bus lines are open drain: *_oe = 1 pulls the line low, 0 releases it;
// scl_i/sda_i are the line levels and are synchronised here.
// After a byte without STOP the engine keeps SCL low, holding the bus for
// the next command. The quarter-period scheme, the command set and the
// arbitration check are this design's own; the design description gives
// only that an I2C controller drives the PMBus lines.
module i2c_byte_engine
  import dvs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] prescale,   // clock cycles per quarter SCL period, >= 2
  input  logic        cmd_valid,  // accepted when busy is low
  input  i2c_cmd_t    cmd,
  input  logic [7:0]  tx_byte,
  output logic        busy,
  output logic        done,       // one-cycle pulse at the end of a command
  output logic [7:0]  rx_byte,
  output logic        rx_nack,    // acknowledge bit seen after a write
  output logic        arb_lost,
  input  logic        scl_i,
  output logic        scl_oe,
  input  logic        sda_i,
  output logic        sda_oe
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BIT, S_STOP} state_e;

  state_e      state;
  logic [1:0]  phase;
  logic [3:0]  bitn;        // 0..7 data bits, 8 acknowledge
  logic [15:0] cnt;
  logic [7:0]  shreg;
  i2c_cmd_t    cur;
  logic        scl_q, sda_q; // 1 = line released
  logic [1:0]  scl_sync, sda_sync;
  logic        scl_s, sda_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
    end else begin
      scl_sync <= {scl_sync[0], scl_i};
      sda_sync <= {sda_sync[0], sda_i};
    end
  end
  assign scl_s = scl_sync[1];
  assign sda_s = sda_sync[1];

  // SDA level driven in quarter 0 of data bit n.
  function automatic logic bit_level(i2c_cmd_t c, logic [3:0] n, logic [7:0] sh);
    if (n == 4'd8) return c.write ? 1'b1 : c.nack;
    return c.write ? sh[7] : 1'b1;
  endfunction

  logic stall, tick;
  assign stall = scl_q && !scl_s;
  assign tick  = (state != S_IDLE) && !stall && (cnt == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      phase    <= '0;
      bitn     <= '0;
      cnt      <= '0;
      shreg    <= '0;
      cur      <= '0;
      scl_q    <= 1'b1;
      sda_q    <= 1'b1;
      done     <= 1'b0;
      rx_nack  <= 1'b0;
      arb_lost <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE && !stall && cnt != 16'd0) cnt <= cnt - 16'd1;
      if (tick) cnt <= prescale - 16'd1;

      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur      <= cmd;
          shreg    <= tx_byte;
          bitn     <= '0;
          phase    <= '0;
          cnt      <= prescale - 16'd1;
          arb_lost <= 1'b0;
          if (cmd.start) begin
            state <= S_START;
            sda_q <= 1'b1;
          end else if (cmd.read || cmd.write) begin
            state <= S_BIT;
            scl_q <= 1'b0;
            sda_q <= bit_level(cmd, 4'd0, tx_byte);
          end else if (cmd.stop) begin
            state <= S_STOP;
            scl_q <= 1'b0;
            sda_q <= 1'b0;
          end else begin
            done <= 1'b1;
          end
        end

        S_START: if (tick) begin
          phase <= phase + 2'd1;
          unique case (phase)
            2'd0: scl_q <= 1'b1;
            2'd1: sda_q <= 1'b0;  // SDA falls while SCL is high
            2'd2: scl_q <= 1'b0;
            default: begin
              if (cur.read || cur.write) begin
                state <= S_BIT;
                sda_q <= bit_level(cur, 4'd0, shreg);
              end else if (cur.stop) begin
                state <= S_STOP;
                sda_q <= 1'b0;
              end else begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          endcase
        end

        S_BIT: if (tick) begin
          phase <= phase + 2'd1;
          unique case (phase)
            2'd0: scl_q <= 1'b1;
            2'd1: begin
              if (bitn == 4'd8) begin
                if (cur.write) rx_nack <= sda_s;
              end else begin
                shreg <= {shreg[6:0], sda_s};
              end
            end
            2'd2: begin
              if (cur.write && bitn != 4'd8 && sda_q && !sda_s) begin
                arb_lost <= 1'b1;
                state    <= S_IDLE;
                done     <= 1'b1;
                scl_q    <= 1'b1;
                sda_q    <= 1'b1;
              end else begin
                scl_q <= 1'b0;
              end
            end
            default: begin
              if (bitn != 4'd8) begin
                bitn  <= bitn + 4'd1;
                sda_q <= bit_level(cur, bitn + 4'd1, shreg);
              end else if (cur.stop) begin
                state <= S_STOP;
                sda_q <= 1'b0;
              end else begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          endcase
        end

        S_STOP: if (tick) begin
          phase <= phase + 2'd1;
          unique case (phase)
            2'd0: scl_q <= 1'b1;
            2'd1: sda_q <= 1'b1;  // SDA rises while SCL is high
            2'd2: ;               // bus free time
            default: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          endcase
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign rx_byte = shreg;
  assign scl_oe  = !scl_q;
  assign sda_oe  = !sda_q;

endmodule
