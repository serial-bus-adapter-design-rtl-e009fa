// I2C adapter between a processor with one-directional I2C pins and a
// bidirectional I2C bus.
//
// The processor side (HPS) has separate input and output lines for clock and
// data: hps_scli/hps_sdi come from the processor, hps_sclo/hps_sdo go back to
// it.  The bus side is an ordinary open-drain SCL/SDA pair.  The adapter
// samples the processor lines with the 50 MHz system clock and follows the
// transfer with a ten-state controller (see i2c_pkg::adapter_state_t):
//
//   idle -> getaddress -> rw -> ack -> { wr -> rw_wr -> ack_wr | rd -> rw_rd -> ack_rd } ...
//
// A START (hps_sdi falls while hps_scli is high) enters getaddress from any
// state; a STOP (hps_sdi rises while hps_scli is high) returns to idle from
// any state.  The bit counter counts falling edges of hps_scli: eight in
// getaddress (the first one ends the START), seven in wr/rd, so that the
// eighth bit of every byte is spent in rw/rw_wr/rw_rd and the ninth (ACK)
// clock in ack/ack_wr/ack_rd.  The eighth bit of every byte is latched in
// rw_r and chooses the direction of the next byte: 0 -> wr, 1 -> rd.  For the
// address byte this is the usual R/W bit; for data bytes it is this
// adapter's own convention, which the processor must follow.  An ACK of 1
// (NACK) sends the controller back to getaddress.
//
// SDA direction per state: idle/getaddress/rw/wr/rw_wr copy hps_sdi onto the
// bus; ack/ack_wr/rd/rw_rd release it so the device can drive it; ack_rd
// copies the processor's ACK from hps_sdi onto the bus.  SCL is always
// copied from hps_scli.  hps_sclo/hps_sdo always return the bus levels, so
// the processor sees the device's ACKs and read data.
//
// Interface: scl_o/sda_o are open-drain drive values (0 pulls the line low,
// 1 releases it); scl_i/sda_i are the resolved line levels.  Every output is
// registered: one system clock from input to output.  The ACK bit is sampled
// on the rising hps_scli edge of the ninth clock and acted on at its falling
// edge.
//
// Follows the described design: the state set and sequence, the falling-edge
// bit counting, start/stop detection from one registered sample, the
// direction rule from the eighth bit, NACK -> getaddress, and the reset
// behaviour: all registers and outputs are cleared while rst_n is 1, as the
// reset process and the signal generators' reset pulse have it, although the
// port is named like an active-low reset.  This design's own choices: the
// split open-drain bus ports, forwarding the R/W bit and the processor's
// read ACK to the bus, reloading the bit counter at every START, hps_sdo and
// hps_sclo mirroring the bus in every state, and the ACK sampling instant.
module i2c_adapter
  import i2c_pkg::*;
(
  input  logic clk,       // system clock, 50 MHz
  input  logic rst_n,     // asynchronous reset, asserted while 1 (see above)
  // bidirectional bus side, open drain
  input  logic scl_i,
  output logic scl_o,
  input  logic sda_i,
  output logic sda_o,
  // processor side, one-directional
  input  logic hps_scli,
  input  logic hps_sdi,
  output logic hps_sclo,
  output logic hps_sdo
);

  adapter_state_t state;
  logic [3:0] bit_cnt;
  logic       rw_r;         // eighth bit of the last byte: next direction
  logic       ack_cypress;  // ACK sampled from the bus device
  logic       ack_hps;      // ACK sampled from the processor
  logic       hps_scl_r, hps_sda_r;

  logic start_edge, stop_edge, scl_edge, scl_rise;

  // START/STOP: data edge while the clock is high (one registered sample).
  assign start_edge = hps_scli &  hps_sda_r & ~hps_sdi;
  assign stop_edge  = hps_scli & ~hps_sda_r &  hps_sdi;
  // Bit boundaries: falling clock edge; ACK sample point: rising edge.
  assign scl_edge   = hps_scl_r & ~hps_scli;
  assign scl_rise   = ~hps_scl_r & hps_scli;

  always_ff @(posedge clk or posedge rst_n) begin
    if (rst_n) begin
      state       <= ST_IDLE;
      bit_cnt     <= 4'd8;
      rw_r        <= 1'b0;
      scl_o       <= 1'b0;
      sda_o       <= 1'b0;
      hps_sclo    <= 1'b0;
      hps_sdo     <= 1'b0;
      hps_scl_r   <= 1'b0;
      hps_sda_r   <= 1'b0;
      ack_cypress <= 1'b0;
      ack_hps     <= 1'b0;
    end else begin
      hps_scl_r <= hps_scli;
      hps_sda_r <= hps_sdi;
      scl_o     <= hps_scli;
      hps_sclo  <= scl_i;
      hps_sdo   <= sda_i;

      // bus SDA direction, decided by the current state
      unique case (state)
        ST_ACK, ST_ACK_WR, ST_RD, ST_RW_RD: sda_o <= 1'b1;
        default:                            sda_o <= hps_sdi;
      endcase

      if (start_edge) begin
        state   <= ST_GETADDRESS;
        bit_cnt <= 4'd8;
      end else if (stop_edge) begin
        state   <= ST_IDLE;
        bit_cnt <= 4'd8;
      end else begin
        unique case (state)
          ST_IDLE: ;

          ST_GETADDRESS, ST_WR, ST_RD: begin
            if (bit_cnt == 4'd0) begin
              unique case (state)
                ST_GETADDRESS: state <= ST_RW;
                ST_WR:         state <= ST_RW_WR;
                default:       state <= ST_RW_RD;
              endcase
            end else if (scl_edge) begin
              bit_cnt <= bit_cnt - 4'd1;
            end
          end

          ST_RW, ST_RW_WR, ST_RW_RD: begin
            // eighth bit: from the processor when it transmits, from the bus when it reads
            rw_r <= (state == ST_RW_RD) ? sda_i : hps_sda_r;
            if (scl_edge) begin
              unique case (state)
                ST_RW:    state <= ST_ACK;
                ST_RW_WR: state <= ST_ACK_WR;
                default:  state <= ST_ACK_RD;
              endcase
            end
          end

          ST_ACK, ST_ACK_WR, ST_ACK_RD: begin
            if (scl_rise) begin
              if (state == ST_ACK_RD) ack_hps     <= hps_sdi;
              else                    ack_cypress <= sda_i;
            end
            if (scl_edge) begin
              bit_cnt <= 4'd7;
              if (((state == ST_ACK_RD) ? ack_hps : ack_cypress) == 1'b0)
                state <= rw_r ? ST_RD : ST_WR;
              else
                state <= ST_GETADDRESS;
            end
          end

          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // the bit counter never leaves 0..8
  assert property (@(posedge clk) disable iff (rst_n) bit_cnt <= 4'd8);

endmodule
