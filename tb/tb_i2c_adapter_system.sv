// End-to-end testbench of i2c_adapter_system at its default sizes: 50 MHz
// system clock (20 ns period) and 200 Hz SCL, so one SCL period is 250000
// clocks (5 ms) and each transfer takes about 110 ms of simulated time.
//
// Both test systems run from power-up until their transfers are over.
// Counted mechanisms, each of which must happen at least once: START and
// STOP seen by each adapter, address acknowledged by the bus device, write
// byte forwarded processor -> bus, bus turned around and read byte forwarded
// bus -> processor, processor ACK forwarded to the bus, byte delivered on each
// LED bus.  Checked values and timing: bus SCL period 5 ms; LEDs dark
// until the byte arrives and then 10101010 (write) and 10101011 (read), each
// in the twentieth SCL period after power-up, as the generators' phase plan
// gives.  The NACK path of the adapter cannot occur here (both generators
// always acknowledge); the adapter's own testbench covers it.
module tb_i2c_adapter_system;
  import i2c_pkg::*;

  localparam int P = 250_000;   // clocks per SCL period at the defaults

  logic clk = 1'b0;
  logic [7:0] leds_write, leds_read;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  i2c_adapter_system dut (.clk_50(clk), .leds_write(leds_write), .leds_read(leds_read));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int cyc = 0;
  int n_wr_start = 0, n_wr_stop = 0, n_rd_start = 0, n_rd_stop = 0;
  int n_addr_ack = 0, n_wr_byte = 0, n_rd_byte = 0, n_hps_ack = 0, n_led_wr = 0, n_led_rd = 0;
  int wr_valid_cyc = -1, rd_valid_cyc = -1;
  realtime scl_rise_t = 0, scl_period = 0;
  logic scl_p = 1'b0;
  adapter_state_t wst_p = ST_IDLE, rst_p = ST_IDLE;
  logic [7:0] lw_p = 8'h00, lr_p = 8'h00;
  bit dark_ok = 1'b1;

  always @(posedge clk) begin
    adapter_state_t ws, rs;
    cyc++;
    ws = dut.write_sys.i2c.state;
    rs = dut.read_sys.i2c.state;
    if (!dut.write_sys.rst) begin
      if (ws == ST_GETADDRESS && wst_p != ST_GETADDRESS) n_wr_start++;
      if (ws == ST_IDLE && wst_p != ST_IDLE) n_wr_stop++;
      if (ws == ST_WR && wst_p == ST_ACK) n_addr_ack++;
      if (ws == ST_ACK_WR && wst_p == ST_RW_WR) n_wr_byte++;
    end
    if (!dut.read_sys.rst) begin
      if (rs == ST_GETADDRESS && rst_p != ST_GETADDRESS) n_rd_start++;
      if (rs == ST_IDLE && rst_p != ST_IDLE) n_rd_stop++;
      if (rs == ST_RD && rst_p == ST_ACK) n_addr_ack++;
      if (rs == ST_ACK_RD && rst_p == ST_RW_RD) n_rd_byte++;
      if (rs == ST_ACK_RD && dut.read_sys.scl_bus && !dut.read_sys.sda_bus
          && dut.read_sys.adp_sda_o == 1'b0) n_hps_ack++;
    end
    wst_p = ws;
    rst_p = rs;
    if (dut.write_sys.slave.data_in_valid) wr_valid_cyc = cyc;
    if (dut.read_sys.slave.data_in_valid)  rd_valid_cyc = cyc;
    if (cyc > P && leds_write != lw_p) n_led_wr++;
    if (cyc > P && leds_read  != lr_p) n_led_rd++;
    if (cyc > P && cyc < 20 * P && (leds_write != 8'h00 || leds_read != 8'h00)) dark_ok = 1'b0;
    lw_p = leds_write;
    lr_p = leds_read;
    if (dut.write_sys.scl_bus && !scl_p) begin
      if (scl_rise_t > 0) scl_period = $realtime - scl_rise_t;
      scl_rise_t = $realtime;
    end
    scl_p = dut.write_sys.scl_bus;
  end

  initial begin
    repeat (24 * P) @(posedge clk);
    $display("mechanisms: wr_start=%0d wr_stop=%0d rd_start=%0d rd_stop=%0d addr_ack=%0d wr_byte=%0d rd_byte=%0d hps_ack=%0d led_wr=%0d led_rd=%0d",
             n_wr_start, n_wr_stop, n_rd_start, n_rd_stop, n_addr_ack, n_wr_byte, n_rd_byte, n_hps_ack, n_led_wr, n_led_rd);
    check(n_wr_start > 0, "write system: START detected");
    check(n_wr_stop > 0,  "write system: STOP detected");
    check(n_rd_start > 0, "read system: START detected");
    check(n_rd_stop > 0,  "read system: STOP detected");
    check(n_addr_ack == 2, "address acknowledged in both systems");
    check(n_wr_byte == 1, "write byte forwarded");
    check(n_rd_byte == 1, "read byte forwarded after bus turnaround");
    check(n_hps_ack > 0,  "processor ACK forwarded to the bus");
    check(n_led_wr == 1 && n_led_rd == 1, "one byte delivered to each LED bus");
    check(scl_period > 4.99e6 && scl_period < 5.01e6, $sformatf("SCL period 5 ms (%0.0f ns)", scl_period));
    check(dark_ok, "LEDs dark from the end of reset to phase 20");
    check(wr_valid_cyc >= 20 * P && wr_valid_cyc < 21 * P, "write byte arrives in SCL period 20");
    check(rd_valid_cyc >= 20 * P && rd_valid_cyc < 21 * P, "read byte arrives in SCL period 20");
    check(leds_write == 8'b1010_1010, $sformatf("leds_write = 10101010 (%b)", leds_write));
    check(leds_read  == 8'b1010_1011, $sformatf("leds_read = 10101011 (%b)", leds_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
