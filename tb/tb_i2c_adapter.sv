// Self-checking testbench of i2c_adapter.
//
// The testbench plays the processor on the one-directional side and the
// device on the bus side, one SCL bit at a time (SCL low half, high half;
// data changes a quarter into the low half).  The bus is the AND of the
// adapter's and the device's drive values.  Checked, against values the
// testbench knows from what it sends:
//   - reset clears every output; SCL reaches the bus one clock after hps_scli
//   - START -> getaddress, seven bits later rw, then ack
//   - write byte: every address and data bit seen on the bus equals hps_sdi,
//     the bus is released in the ACK slot and the device ACK returns on hps_sdo
//   - read byte: the adapter releases SDA in rd, every device bit returns on
//     hps_sdo, the processor ACK is put on the bus, the eighth bit 1 keeps rd
//   - NACK after the address -> getaddress; STOP -> idle
module tb_i2c_adapter;
  import i2c_pkg::*;

  localparam int H = 16;   // system clocks per SCL half period
  localparam int Q = H / 2;

  logic clk = 1'b0;
  logic rst_n;
  logic hps_scli, hps_sdi, hps_sclo, hps_sdo;
  logic scl_o, sda_o, dev_sda;
  logic scl_bus, sda_bus;

  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_nack = 0;

  always #10 clk = ~clk;

  assign scl_bus = scl_o;
  assign sda_bus = sda_o & dev_sda;

  i2c_adapter dut (
    .clk(clk), .rst_n(rst_n),
    .scl_i(scl_bus), .scl_o(scl_o), .sda_i(sda_bus), .sda_o(sda_o),
    .hps_scli(hps_scli), .hps_sdi(hps_sdi), .hps_sclo(hps_sclo), .hps_sdo(hps_sdo)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t state=%s)", what, $time, dut.state.name());
    end
  endtask

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // one SCL clock; returns bus SDA and hps_sdo in the middle of SCL high
  task automatic bit_slot(input logic hps_bit, input logic dev_bit,
                          output logic bus_v, output logic sdo_v);
    hps_scli = 1'b0;
    wait_clk(Q);
    hps_sdi = hps_bit;
    dev_sda = dev_bit;
    wait_clk(H - Q);
    hps_scli = 1'b1;
    wait_clk(Q);
    bus_v = sda_bus;
    sdo_v = hps_sdo;
    wait_clk(H - Q);
  endtask

  task automatic start_cond();
    hps_scli = 1'b0;
    wait_clk(Q);
    hps_sdi = 1'b1;
    dev_sda = 1'b1;
    wait_clk(H - Q);
    hps_scli = 1'b1;
    wait_clk(Q);
    hps_sdi = 1'b0;
    n_start++;
    wait_clk(H - Q);
  endtask

  task automatic stop_cond();
    hps_scli = 1'b0;
    wait_clk(Q);
    hps_sdi = 1'b0;
    dev_sda = 1'b1;
    wait_clk(H - Q);
    hps_scli = 1'b1;
    wait_clk(Q);
    hps_sdi = 1'b1;
    n_stop++;
    wait_clk(H - Q);
  endtask

  // processor writes a byte; device answers dev_ack
  task automatic write_byte(input logic [7:0] b, input logic dev_ack, input bit is_addr);
    logic bv, sv;
    for (int i = 7; i >= 0; i--) begin
      bit_slot(b[i], 1'b1, bv, sv);
      check(bv == b[i], $sformatf("bus carries written bit %0d", i));
      if (is_addr && i >= 1) check(dut.state == ST_GETADDRESS, "getaddress during bits 1..7");
      if (is_addr && i == 0) check(dut.state == ST_RW, "rw during the R/W bit");
      if (!is_addr && i >= 1) check(dut.state == ST_WR, "wr during data bits 1..7");
      if (!is_addr && i == 0) check(dut.state == ST_RW_WR, "rw_wr during data bit 8");
    end
    bit_slot(1'b0, dev_ack, bv, sv);
    check(sda_o == 1'b1, "adapter releases SDA in the ACK slot");
    check(dut.state == (is_addr ? ST_ACK : ST_ACK_WR), "ack state during 9th clock");
    check(sv == dev_ack, "device ACK returned on hps_sdo");
  endtask

  // processor reads a byte sent by the device; processor answers hps_ack
  task automatic read_byte(input logic [7:0] b, input logic hps_ack);
    logic bv, sv;
    for (int i = 7; i >= 0; i--) begin
      bit_slot(1'b1, b[i], bv, sv);
      check(sda_o == 1'b1, "adapter releases SDA while reading");
      check(sv == b[i], $sformatf("hps_sdo carries read bit %0d", i));
      check(dut.state == ((i >= 1) ? ST_RD : ST_RW_RD), "rd / rw_rd during read bits");
    end
    bit_slot(hps_ack, 1'b1, bv, sv);
    check(dut.state == ST_ACK_RD, "ack_rd during 9th clock");
    check(bv == hps_ack, "processor ACK put on the bus");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hps_scli = 1'b1;
    hps_sdi  = 1'b1;
    dev_sda  = 1'b1;
    rst_n    = 1'b1;               // reset asserted while 1
    wait_clk(5);
    check(scl_o == 0 && sda_o == 0 && hps_sclo == 0 && hps_sdo == 0, "reset clears outputs");
    check(dut.state == ST_IDLE, "idle in reset");
    rst_n = 1'b0;
    wait_clk(4);

    // latency of the clock path: one system clock
    @(negedge clk); hps_scli = 1'b0;
    @(posedge clk); #1;
    check(scl_o == 1'b0, "scl_o follows hps_scli after one clock");
    wait_clk(H);

    // ---- write transfer: address 0x00 (W), data 0xAA, STOP
    start_cond();
    check(dut.state == ST_GETADDRESS, "START enters getaddress");
    write_byte(8'h00, 1'b0, 1'b1);
    write_byte(8'hAA, 1'b0, 1'b0);
    check(dut.rw_r == 1'b0, "eighth data bit 0 selects write");
    stop_cond();
    wait_clk(2);
    check(dut.state == ST_IDLE, "STOP returns to idle");

    // ---- read transfer: address 0x01 (R), device data 0xAB then 0x5A, STOP
    start_cond();
    write_byte(8'h01, 1'b0, 1'b1);
    check(dut.rw_r == 1'b1, "R/W bit 1 latched");
    read_byte(8'hAB, 1'b0);           // last bit 1: keep reading
    check(dut.rw_r == 1'b1, "eighth read bit 1 selects read");
    read_byte(8'h5A, 1'b0);           // last bit 0: next byte is a write
    check(dut.rw_r == 1'b0, "eighth read bit 0 selects write");
    begin
      logic bv, sv;
      bit_slot(1'b1, 1'b1, bv, sv);
      check(dut.state == ST_WR, "direction switches to wr after a 0 eighth bit");
    end
    stop_cond();
    wait_clk(2);
    check(dut.state == ST_IDLE, "STOP returns to idle after read");

    // ---- NACK: nobody answers the address
    start_cond();
    write_byte(8'h42, 1'b1, 1'b1);
    begin
      logic bv, sv;
      bit_slot(1'b1, 1'b1, bv, sv);
      check(dut.state == ST_GETADDRESS, "NACK sends the adapter back to getaddress");
      if (dut.state == ST_GETADDRESS) n_nack++;
    end
    stop_cond();
    wait_clk(2);
    check(dut.state == ST_IDLE, "idle after final STOP");

    // ---- asynchronous reset in the middle of a transfer
    start_cond();
    bit_slot(1'b0, 1'b1, dummy_b, dummy_s);
    @(negedge clk); rst_n = 1'b1; #1;
    check(dut.state == ST_IDLE && sda_o == 1'b0, "asynchronous reset mid-transfer");
    rst_n = 1'b0;

    check(n_start == 4 && n_stop == 3 && n_nack == 1, "all scenarios ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic dummy_b, dummy_s;
endmodule
