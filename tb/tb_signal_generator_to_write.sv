// Self-checking testbench of signal_generator_to_write.
//
// An independent I2C bus monitor decodes the generator's scl/sda: START and
// STOP conditions, and the bit sampled at every rising SCL edge.  Checked:
// the reset pulse lasts exactly one phase (one SCL period), the SCL period
// is CLK_HZ/SCL_HZ clocks, START falls in phase 2 and STOP in phase 21, and
// the bits between them are address 00000000, ACK 0, data 10101010, ACK 0.
// The generator runs scaled down (40 clocks per SCL period).
module tb_signal_generator_to_write;

  localparam int unsigned CLK_HZ = 800;
  localparam int unsigned SCL_HZ = 20;
  localparam int P = CLK_HZ / SCL_HZ;

  logic clk = 1'b0;
  logic rst, scl, sda;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  signal_generator_to_write #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (
    .clk_50(clk), .rst(rst), .scl(scl), .sda(sda));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int cyc = 0;
  int rst_cycles = 0, start_cyc = -1, stop_cyc = -1, n_start = 0, n_stop = 0;
  int last_rise = -1, period = -1, period_bad = 0;
  logic scl_p = 1'b0, sda_p = 1'b1;
  logic [18:0] bits;   // bits sampled after START: 8 address, ack, 8 data, ack, stop-phase bit
  int nbits = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst) rst_cycles++;
    if (scl && scl_p && sda_p && !sda) begin n_start++; start_cyc = cyc; nbits = 0; end
    if (scl && scl_p && !sda_p && sda) begin n_stop++; stop_cyc = cyc; end
    if (scl && !scl_p) begin
      if (last_rise >= 0) begin
        if (period >= 0 && cyc - last_rise != period) period_bad++;
        period = cyc - last_rise;
      end
      last_rise = cyc;
      if (n_start > 0 && n_stop == 0 && nbits < 19) begin
        bits[18 - nbits] = sda;
        nbits++;
      end
    end
    scl_p <= scl;
    sda_p <= sda;
  end

  initial begin
    repeat (30 * P) @(posedge clk);
    check(rst_cycles == P + 1, $sformatf("reset lasts one phase plus the output register (%0d cycles)", rst_cycles));
    check(period == P && period_bad == 0, $sformatf("SCL period %0d clocks", period));
    check(n_start == 1 && n_stop == 1, "exactly one START and one STOP");
    check(start_cyc >= 2 * P && start_cyc < 3 * P, "START in phase 2");
    check(stop_cyc >= 21 * P && stop_cyc < 22 * P, "STOP in phase 21");
    check(nbits == 19, $sformatf("19 clocks between START and STOP (%0d)", nbits));
    check(bits[18:11] == 8'b0000_0000, "address 00000000");
    check(bits[10] == 1'b0, "ACK slot after address is 0");
    check(bits[9:2] == 8'b1010_1010, $sformatf("data 10101010 (%b)", bits[9:2]));
    check(bits[1] == 1'b0, "ACK slot after data is 0");
    check(scl === 1'b1 || scl === 1'b0, "scl keeps running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
