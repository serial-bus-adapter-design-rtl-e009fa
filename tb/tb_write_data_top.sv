// Self-checking testbench of write_data_top, scaled to 100 clocks per SCL
// period.  A bus monitor (active once the
// generator's reset pulse is over) decodes the I2C bus between adapter and slave
// (START, bits at rising SCL, STOP) and checks it against the transfer the
// generator is known to send: address 00000000, ACK 0, data 10101010, ACK 0.
// Also checked: the adapter walks through getaddress, rw, ack, wr, rw_wr,
// ack_wr and back to idle; the slave reports START, the address match in
// phase 11, one data_in_valid in phase 20 and STOP; the LEDs show 10101010
// from phase 20 on and 0 before.
module tb_write_data_top;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned SCL_HZ = 500_000;
  localparam int P = CLK_HZ / SCL_HZ;

  logic clk = 1'b0;
  logic [7:0] leds;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  write_data_top #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (.clk_50(clk), .leds(leds));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int cyc = 0;
  logic scl_p = 1'b1, sda_p = 1'b1;
  int n_start = 0, n_stop = 0, nbits = 0, stop_cyc = -1;
  logic [17:0] bits;
  int valid_cyc = -1, n_valid = 0, tstart_cyc = -1;
  bit seen [adapter_state_t];
  logic [7:0] leds_before = 8'hFF;

  always @(posedge clk) begin
    logic scl, sda;
    cyc++;
    scl = dut.scl_bus;
    sda = dut.sda_bus;
    if (!dut.rst && scl && scl_p && sda_p && !sda) begin n_start++; nbits = 0; end
    if (!dut.rst && scl && scl_p && !sda_p && sda) begin n_stop++; stop_cyc = cyc; end
    if (scl && !scl_p && n_start > 0 && n_stop == 0 && nbits < 18) begin
      bits[17 - nbits] = sda;
      nbits++;
    end
    scl_p <= scl;
    sda_p <= sda;
    seen[dut.i2c.state] = 1'b1;
    if (!dut.rst && dut.slave.data_in_valid) begin n_valid++; valid_cyc = cyc; end
    if (!dut.rst && dut.slave.transfer_started && tstart_cyc < 0) tstart_cyc = cyc;
    if (cyc == 19 * P) leds_before = leds;
  end

  initial begin
    repeat (25 * P) @(posedge clk);
    check(n_start == 1 && n_stop == 1, $sformatf("one START and one STOP on the bus (%0d, %0d)", n_start, n_stop));
    check(nbits == 18, "18 bits between START and STOP");
    check(bits[17:10] == 8'h00, "bus address 00000000");
    check(bits[9] == 1'b0, "slave ACKs the address");
    check(bits[8:1] == 8'hAA, $sformatf("bus data 10101010 (%b)", bits[8:1]));
    check(bits[0] == 1'b0, "slave ACKs the data");
    check(stop_cyc >= 21 * P && stop_cyc < 22 * P, "STOP in phase 21");
    check(seen.exists(ST_GETADDRESS) && seen.exists(ST_RW) && seen.exists(ST_ACK), "address states visited");
    check(seen.exists(ST_WR) && seen.exists(ST_RW_WR) && seen.exists(ST_ACK_WR), "write states visited");
    check(!seen.exists(ST_RD), "read states not visited");
    check(dut.i2c.state == ST_IDLE, "adapter idle after STOP");
    check(tstart_cyc >= 11 * P && tstart_cyc < 12 * P, "address matched in phase 11");
    check(n_valid == 1 && valid_cyc >= 20 * P && valid_cyc < 21 * P, "one data byte, valid in phase 20");
    check(dut.slave.stop_detected == 1'b0 && !dut.slave.transfer_started, "slave saw STOP");
    check(leds_before == 8'h00, "LEDs dark before the byte arrives");
    check(leds == 8'b1010_1010, $sformatf("LEDs show 10101010 (%b)", leds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
