// Shared types and constants of the I2C adapter test system.
//
// adapter_state_t is the ten-state controller of the I2C adapter: one
// idle state, then for each byte on the wire a counting state (first seven
// bits), a selection state (eighth bit, which the adapter keeps as the
// direction of the next byte) and an acknowledge state.  The state names
// follow the adapter's description; the encoding is this design's own.
// slave_state_t is the byte-level state of the I2C slave.
package i2c_pkg;

  typedef enum logic [3:0] {
    ST_IDLE,        // waiting for a START condition
    ST_GETADDRESS,  // address bits 1..7, HPS -> bus
    ST_RW,          // address bit 8 (R/W), HPS -> bus, latched in rw_r
    ST_ACK,         // 9th clock of the address byte, slave ACK sampled
    ST_WR,          // data bits 1..7 of a write byte, HPS -> bus
    ST_RW_WR,       // data bit 8 of a write byte, latched in rw_r
    ST_ACK_WR,      // 9th clock of a write byte, slave ACK sampled
    ST_RD,          // data bits 1..7 of a read byte, bus -> HPS
    ST_RW_RD,       // data bit 8 of a read byte, latched in rw_r
    ST_ACK_RD       // 9th clock of a read byte, HPS ACK sampled
  } adapter_state_t;

  typedef enum logic [2:0] {
    SL_IDLE,        // not addressed: wait for START
    SL_ADDR,        // shifting in the address byte
    SL_RX,          // receiving data bytes
    SL_TX           // transmitting data bytes (only with TX_ENABLE)
  } slave_state_t;

  // Number of system clocks in one SCL period.
  function automatic int unsigned clks_per_scl(int unsigned clk_hz, int unsigned scl_hz);
    return clk_hz / scl_hz;
  endfunction

endpackage
