// Self-checking testbench of read_data_top, scaled to 100 clocks per SCL
// period.  Two monitors, active once the generator's reset pulse is over:
// one decodes the I2C bus between adapter and device, one the adapter's
// processor-side outputs hps_sclo/hps_sdo.  Both must carry address
// 00000001, ACK 0, data 10101011, ACK 0.  Also checked: the adapter goes
// through getaddress, rw, ack, rd, rw_rd, ack_rd, never pulls SDA low
// during SCL high in rd/rw_rd, puts the processor's ACK on the bus, and ends in idle;
// the receive-only slave on the processor side sees read_mode, gets one byte
// in phase 20, and the LEDs then show 10101011.
module tb_read_data_top;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned SCL_HZ = 500_000;
  localparam int P = CLK_HZ / SCL_HZ;

  logic clk = 1'b0;
  logic [7:0] leds;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  read_data_top #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (.clk_50(clk), .leds(leds));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one I2C line decoder
  typedef struct {
    logic scl_p, sda_p;
    int n_start, n_stop, nbits;
    logic [17:0] bits;
  } mon_t;

  function automatic void mon_step(ref mon_t m, input logic scl, input logic sda, input logic active);
    if (active && scl && m.scl_p && m.sda_p && !sda) begin m.n_start++; m.nbits = 0; end
    if (active && scl && m.scl_p && !m.sda_p && sda) m.n_stop++;
    if (active && scl && !m.scl_p && m.n_start > 0 && m.n_stop == 0 && m.nbits < 18) begin
      m.bits[17 - m.nbits] = sda;
      m.nbits++;
    end
    m.scl_p = scl;
    m.sda_p = sda;
  endfunction

  mon_t busm = '{1'b1, 1'b1, 0, 0, 0, '0};
  mon_t hpsm = '{1'b1, 1'b1, 0, 0, 0, '0};
  int cyc = 0, valid_cyc = -1, n_valid = 0, drive_in_rd = 0, ack_rd_low = 0;
  bit seen [adapter_state_t];

  always @(posedge clk) begin
    cyc++;
    mon_step(busm, dut.scl_bus, dut.sda_bus, !dut.rst);
    mon_step(hpsm, dut.hps_sclo, dut.hps_sdo, !dut.rst);
    seen[dut.i2c.state] = 1'b1;
    if ((dut.i2c.state == ST_RD || dut.i2c.state == ST_RW_RD) && dut.scl_bus && !dut.adp_sda_o) drive_in_rd++;
    if (dut.i2c.state == ST_ACK_RD && dut.scl_bus && !dut.adp_sda_o) ack_rd_low++;
    if (!dut.rst && dut.slave.data_in_valid) begin n_valid++; valid_cyc = cyc; end
  end

  localparam logic [17:0] EXPECT = {8'b0000_0001, 1'b0, 8'b1010_1011, 1'b0};

  initial begin
    repeat (25 * P) @(posedge clk);
    check(busm.n_start == 1 && busm.nbits == 18, "bus: one START, 18 bits");
    check(busm.bits == EXPECT, $sformatf("bus sequence (%b)", busm.bits));
    check(hpsm.n_start == 1 && hpsm.nbits >= 18, "processor side: START and 18 bits");
    check(hpsm.bits == EXPECT, $sformatf("processor-side sequence (%b)", hpsm.bits));
    check(seen.exists(ST_GETADDRESS) && seen.exists(ST_RW) && seen.exists(ST_ACK), "address states visited");
    check(seen.exists(ST_RD) && seen.exists(ST_RW_RD) && seen.exists(ST_ACK_RD), "read states visited");
    check(!seen.exists(ST_ACK_WR), "write ACK state not visited");
    check(drive_in_rd == 0, "adapter never pulls SDA low while SCL is high in rd/rw_rd");
    check(ack_rd_low > 0, "processor ACK forwarded to the bus");
    check(dut.i2c.state == ST_IDLE, "adapter idle after STOP");
    check(dut.slave.read_mode, "slave sees a read transfer");
    check(n_valid == 1 && valid_cyc >= 20 * P && valid_cyc < 21 * P, "one byte received, valid in phase 20");
    check(leds == 8'b1010_1011, $sformatf("LEDs show 10101011 (%b)", leds));
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
