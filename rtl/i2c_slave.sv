// I2C slave with a byte-wide parallel side, used as the receiving end of the
// adapter test systems (its last received byte drives eight LEDs).
//
// SCL and SDA are sampled with the system clock and compared with the
// previous sample.  START (SDA falls while SCL is high) and STOP (SDA rises
// while SCL is high) reset the byte machine from any state; START/STOP are
// reported as one-clock pulses on start_detected/stop_detected.  After a
// START the slave shifts in the address byte on rising SCL edges, MSB first.
// If the upper seven bits equal SLAVE_ADDR it pulls SDA low for the ninth
// clock (ACK), raises transfer_started and shows the R/W bit on read_mode;
// otherwise it ignores the bus until the next START.
//
//   write transfer (R/W = 0): every further byte is shifted in, presented on
//     data_in with a one-clock data_in_valid pulse at the falling edge after
//     its eighth bit, and acknowledged.
//   read transfer (R/W = 1), TX_ENABLE = 1: the slave pulses
//     data_out_requested, loads data_out and sends it MSB first, changing SDA
//     on falling SCL edges; it reads the master's ACK and stops sending after
//     a NACK.
//   read transfer, TX_ENABLE = 0 (default): the transmit side is unused, as
//     in the test systems; the slave receives the bytes that another device
//     puts on the bus into data_in, does not acknowledge them itself, and
//     follows the master's ACK/NACK.
//
// Interface: clock and reset (asserted while 1, like the rest of the test
// system), scl in, sda_i/sda_o open drain (0 pulls low, 1 releases).
// Latency: two system clocks from a bus edge to the reaction.  The port list,
// the meaning of each port and the receive-only use follow the described
// slave; the internals are this design's own, written from the I2C rules.
module i2c_slave
  import i2c_pkg::*;
#(
  parameter logic [6:0] SLAVE_ADDR = 7'b000_0000,
  parameter bit         TX_ENABLE  = 1'b0
) (
  input  logic       clock,
  input  logic       reset,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_o,
  output logic       start_detected,
  output logic       transfer_started,
  output logic       read_mode,
  output logic       stop_detected,
  input  logic [7:0] data_out,
  output logic       data_out_requested,
  output logic [7:0] data_in,
  output logic       data_in_valid
);

  slave_state_t state;
  logic       scl_s, sda_s, scl_p, sda_p;   // current and previous samples
  logic [3:0] cnt;                          // rising SCL edges in this byte slot, 0..9
  logic [7:0] shreg;                        // receive shift register
  logic [7:0] txreg;                        // transmit byte
  logic       ack_bit;                      // level of the ninth bit
  logic       addr_match;

  logic start_c, stop_c, scl_rise, scl_fall;
  assign start_c  = scl_s & scl_p &  sda_p & ~sda_s;
  assign stop_c   = scl_s & scl_p & ~sda_p &  sda_s;
  assign scl_rise = scl_s & ~scl_p;
  assign scl_fall = ~scl_s & scl_p;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state              <= SL_IDLE;
      scl_s              <= 1'b1;
      sda_s              <= 1'b1;
      scl_p              <= 1'b1;
      sda_p              <= 1'b1;
      cnt                <= '0;
      shreg              <= '0;
      txreg              <= '0;
      ack_bit            <= 1'b1;
      addr_match         <= 1'b0;
      sda_o              <= 1'b1;
      start_detected     <= 1'b0;
      stop_detected      <= 1'b0;
      transfer_started   <= 1'b0;
      read_mode          <= 1'b0;
      data_out_requested <= 1'b0;
      data_in            <= '0;
      data_in_valid      <= 1'b0;
    end else begin
      scl_s <= scl;
      sda_s <= sda_i;
      scl_p <= scl_s;
      sda_p <= sda_s;
      start_detected     <= 1'b0;
      stop_detected      <= 1'b0;
      data_in_valid      <= 1'b0;
      data_out_requested <= 1'b0;

      if (start_c) begin
        start_detected   <= 1'b1;
        state            <= SL_ADDR;
        cnt              <= '0;
        addr_match       <= 1'b0;
        transfer_started <= 1'b0;
        sda_o            <= 1'b1;
      end else if (stop_c) begin
        stop_detected    <= 1'b1;
        state            <= SL_IDLE;
        transfer_started <= 1'b0;
        sda_o            <= 1'b1;
      end else if (state != SL_IDLE) begin
        if (scl_rise) begin
          if (cnt < 4'd8) shreg   <= {shreg[6:0], sda_s};
          else            ack_bit <= sda_s;
          if (cnt < 4'd9) cnt <= cnt + 4'd1;
        end else if (scl_fall) begin
          if (cnt == 4'd8) begin
            // eighth bit done: the ninth clock is the ACK slot
            unique case (state)
              SL_ADDR: begin
                if (shreg[7:1] == SLAVE_ADDR) begin
                  addr_match       <= 1'b1;
                  read_mode        <= shreg[0];
                  transfer_started <= 1'b1;
                  sda_o            <= 1'b0;
                end else begin
                  state <= SL_IDLE;
                end
              end
              SL_RX: begin
                data_in       <= shreg;
                data_in_valid <= 1'b1;
                sda_o         <= read_mode;   // ACK only what was written to us
              end
              default: sda_o <= 1'b1;         // SL_TX: master acknowledges
            endcase
          end else if (cnt == 4'd9) begin
            // ACK slot done: start the next byte
            cnt   <= '0;
            sda_o <= 1'b1;
            unique case (state)
              SL_ADDR: begin
                if (read_mode && TX_ENABLE) begin
                  state              <= SL_TX;
                  txreg              <= data_out;
                  data_out_requested <= 1'b1;
                  sda_o              <= data_out[7];
                end else begin
                  state <= SL_RX;
                end
              end
              SL_RX: if (read_mode && ack_bit) state <= SL_IDLE;
              default: begin
                if (!ack_bit) begin
                  txreg              <= data_out;
                  data_out_requested <= 1'b1;
                  sda_o              <= data_out[7];
                end else begin
                  state <= SL_IDLE;
                end
              end
            endcase
          end else if (state == SL_TX && cnt != 4'd0) begin
            sda_o <= txreg[3'(7 - cnt)];
          end
        end
      end
    end
  end

  // only the addressed slave ever drives SDA low outside TX
  assert property (@(posedge clock) disable iff (reset) (!sda_o && state != SL_TX) |-> addr_match);

endmodule
