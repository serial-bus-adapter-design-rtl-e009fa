// Self-checking testbench of signal_generator_to_read.
//
// An independent monitor watches both sides of the generator.  On the
// processor side (scl_ex/sda_ex) it finds START and STOP; at every rising
// clock edge after START it samples sda_ex, the device-side sda and their
// AND (the level a receiver on a wired-AND line would see).  Checked: reset
// lasts one phase, both clocks run with period CLK_HZ/SCL_HZ and in step,
// START in phase 2 and STOP in phase 21 on sda_ex only, the processor side
// sends 00000001 and ACKs in the tenth data-byte slot, the device side ACKs
// the address and sends 10101011, and the line carries
// 00000001 0 10101011 0.  Scaled down to 40 clocks per SCL period.
module tb_signal_generator_to_read;

  localparam int unsigned CLK_HZ = 800;
  localparam int unsigned SCL_HZ = 20;
  localparam int P = CLK_HZ / SCL_HZ;

  logic clk = 1'b0;
  logic rst, scl, sda, scl_ex, sda_ex;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  signal_generator_to_read #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (
    .clk_50(clk), .rst(rst), .scl(scl), .sda(sda), .scl_ex(scl_ex), .sda_ex(sda_ex));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int cyc = 0;
  int rst_cycles = 0, start_cyc = -1, stop_cyc = -1, n_start = 0, n_stop = 0, n_dev_events = 0;
  int last_rise = -1, period = -1, skew = 0;
  logic scl_p = 1'b0, sda_p = 1'b1, dsda_p = 1'b1;
  logic [17:0] ex_bits, dev_bits, line_bits;
  int nbits = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst) rst_cycles++;
    if (scl !== scl_ex) skew++;
    if (scl_ex && scl_p && sda_p && !sda_ex) begin n_start++; start_cyc = cyc; nbits = 0; end
    if (scl_ex && scl_p && !sda_p && sda_ex) begin n_stop++; stop_cyc = cyc; end
    if (scl && scl_p && (dsda_p != sda)) n_dev_events++;
    if (scl_ex && !scl_p) begin
      if (last_rise >= 0) period = cyc - last_rise;
      last_rise = cyc;
      if (n_start > 0 && n_stop == 0 && nbits < 18) begin
        ex_bits[17 - nbits]   = sda_ex;
        dev_bits[17 - nbits]  = sda;
        line_bits[17 - nbits] = sda_ex & sda;
        nbits++;
      end
    end
    scl_p  <= scl_ex;
    sda_p  <= sda_ex;
    dsda_p <= sda;
  end

  initial begin
    repeat (30 * P) @(posedge clk);
    check(rst_cycles == P + 1, $sformatf("reset lasts one phase plus the output register (%0d)", rst_cycles));
    check(period == P && skew == 0, "both clocks at CLK_HZ/SCL_HZ and in step");
    check(n_start == 1 && n_stop == 1, "one START and one STOP on the processor side");
    check(n_dev_events == 0, "device side makes no START/STOP");
    check(start_cyc >= 2 * P && start_cyc < 3 * P, "START in phase 2");
    check(stop_cyc >= 21 * P && stop_cyc < 22 * P, "STOP in phase 21");
    check(ex_bits[17:10] == 8'b0000_0001, "processor sends address 00000001");
    check(ex_bits[9] == 1'b1 && ex_bits[8:1] == 8'hFF, "processor releases SDA for ACK and data");
    check(ex_bits[0] == 1'b0, "processor ACKs the data byte");
    check(dev_bits[17:10] == 8'hFF, "device released during the address");
    check(dev_bits[9] == 1'b0, "device ACKs the address");
    check(dev_bits[8:1] == 8'b1010_1011, $sformatf("device sends 10101011 (%b)", dev_bits[8:1]));
    check(line_bits == {8'b0000_0001, 1'b0, 8'b1010_1011, 1'b0}, "wired-AND line sequence");
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
