// Self-checking testbench of i2c_slave.
//
// A behavioural I2C master in the testbench drives SCL and its own SDA drive
// value; the line is the AND of master and slave drives.  Two slaves are on
// the same bus: one receive-only with address 0 (the configuration of the
// test systems), one with address 0x2A and TX_ENABLE = 1.  Checked against
// the bytes the master sends or expects:
//   - START/STOP pulses; no reaction to a foreign address
//   - write: ACK of the address and of each byte, data_in/data_in_valid,
//     transfer_started and read_mode levels
//   - read with TX_ENABLE: data_out_requested, the bits of data_out on the
//     line, stop after the master's NACK
//   - read with TX_ENABLE = 0: the byte another device sends lands on data_in
module tb_i2c_slave;

  localparam int H = 12;
  localparam int Q = H / 2;

  logic clk = 1'b0;
  logic reset;
  logic scl, m_sda, dev_sda;
  logic s0_sda_o, s1_sda_o, sda;
  logic s0_start, s0_tstart, s0_rmode, s0_stop, s0_req, s0_valid;
  logic s1_start, s1_tstart, s1_rmode, s1_stop, s1_req, s1_valid;
  logic [7:0] s0_din, s1_din, s1_dout;

  int checks = 0, failures = 0;
  int n_start0 = 0, n_stop0 = 0, n_valid0 = 0, n_req1 = 0, n_valid1 = 0;

  always #10 clk = ~clk;
  assign sda = m_sda & dev_sda & s0_sda_o & s1_sda_o;

  i2c_slave #(.SLAVE_ADDR(7'h00), .TX_ENABLE(1'b0)) s0 (
    .clock(clk), .reset(reset), .scl(scl), .sda_i(sda), .sda_o(s0_sda_o),
    .start_detected(s0_start), .transfer_started(s0_tstart), .read_mode(s0_rmode),
    .stop_detected(s0_stop), .data_out(8'h00), .data_out_requested(s0_req),
    .data_in(s0_din), .data_in_valid(s0_valid));

  i2c_slave #(.SLAVE_ADDR(7'h2A), .TX_ENABLE(1'b1)) s1 (
    .clock(clk), .reset(reset), .scl(scl), .sda_i(sda), .sda_o(s1_sda_o),
    .start_detected(s1_start), .transfer_started(s1_tstart), .read_mode(s1_rmode),
    .stop_detected(s1_stop), .data_out(s1_dout), .data_out_requested(s1_req),
    .data_in(s1_din), .data_in_valid(s1_valid));

  always @(posedge clk) begin
    if (s0_start) n_start0++;
    if (s0_stop)  n_stop0++;
    if (s0_valid) n_valid0++;
    if (s1_req)   n_req1++;
    if (s1_valid) n_valid1++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // one clock; m and d are master and extra-device drive values; returns the line at SCL high
  task automatic bit_slot(input logic m, input logic d, output logic line);
    scl = 1'b0;
    wait_clk(Q);
    m_sda = m;
    dev_sda = d;
    wait_clk(H - Q);
    scl = 1'b1;
    wait_clk(Q);
    line = sda;
    wait_clk(H - Q);
  endtask

  task automatic start_cond();
    scl = 1'b0; wait_clk(Q);
    m_sda = 1'b1; dev_sda = 1'b1; wait_clk(H - Q);
    scl = 1'b1; wait_clk(Q);
    m_sda = 1'b0; wait_clk(H - Q);
  endtask

  task automatic stop_cond();
    scl = 1'b0; wait_clk(Q);
    m_sda = 1'b0; dev_sda = 1'b1; wait_clk(H - Q);
    scl = 1'b1; wait_clk(Q);
    m_sda = 1'b1; wait_clk(H - Q);
  endtask

  // master sends a byte; returns the ACK level
  task automatic send(input logic [7:0] b, output logic ack);
    logic l;
    for (int i = 7; i >= 0; i--) bit_slot(b[i], 1'b1, l);
    bit_slot(1'b1, 1'b1, ack);
  endtask

  // master reads a byte from the line (dev drives d_byte), then answers mack
  task automatic recv(input logic [7:0] d_byte, input logic mack, output logic [7:0] got);
    logic l;
    for (int i = 7; i >= 0; i--) begin
      bit_slot(1'b1, d_byte[i], l);
      got[i] = l;
    end
    bit_slot(mack, 1'b1, l);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ack;
    logic [7:0] got;
    scl = 1'b1; m_sda = 1'b1; dev_sda = 1'b1; s1_dout = 8'h00;
    reset = 1'b1;
    wait_clk(4);
    check(s0_sda_o && s1_sda_o && !s0_tstart && s0_din == 8'h00, "reset state");
    reset = 1'b0;
    wait_clk(4);

    // ---- write 0xAA, 0x3C to address 0 (receive-only slave)
    start_cond();
    check(n_start0 == 1, "start_detected pulse");
    send(8'h00, ack);
    check(ack == 1'b0, "address 0 acknowledged");
    check(s0_tstart && !s0_rmode, "transfer_started, write mode");
    check(!s1_tstart, "other slave not addressed");
    send(8'hAA, ack);
    check(ack == 1'b0, "data byte acknowledged");
    check(s0_din == 8'hAA, "data_in = 0xAA");
    send(8'h3C, ack);
    check(ack == 1'b0 && s0_din == 8'h3C, "second byte 0x3C");
    check(n_valid0 == 2, "two data_in_valid pulses");
    stop_cond();
    wait_clk(4);
    check(n_stop0 == 1 && !s0_tstart, "stop_detected, transfer ended");

    // ---- foreign address: nobody answers
    start_cond();
    send(8'hE0, ack);
    check(ack == 1'b1, "unknown address NACKed");
    send(8'h55, ack);
    check(ack == 1'b1 && s0_din == 8'h3C, "unaddressed slave ignores data");
    stop_cond();

    // ---- read from transmitting slave 0x2A: two bytes, NACK after the second
    s1_dout = 8'hC5;
    start_cond();
    send({7'h2A, 1'b1}, ack);
    check(ack == 1'b0 && s1_tstart && s1_rmode, "read address acknowledged, read_mode");
    recv(8'hFF, 1'b0, got);
    check(n_req1 == 1, "first data_out_requested");
    check(got == 8'hC5, "first transmitted byte 0xC5");
    s1_dout = 8'h3A;
    wait_clk(1);
    recv(8'hFF, 1'b1, got);
    check(n_req1 == 2, "second data_out_requested");
    check(got == 8'h3A, $sformatf("second transmitted byte 0x3A (got %h)", got));
    begin
      logic l;
      bit_slot(1'b1, 1'b1, l);
      check(l == 1'b1, "slave releases SDA after NACK");
    end
    stop_cond();

    // ---- read from address 0 with TX disabled: another device answers
    start_cond();
    send(8'h01, ack);
    check(ack == 1'b0, "receive-only slave acknowledges its address");
    check(s0_tstart && s0_rmode, "read_mode on receive-only slave");
    recv(8'hAB, 1'b0, got);
    check(got == 8'hAB && s0_din == 8'hAB, "device byte captured on data_in");
    stop_cond();
    wait_clk(4);
    check(n_valid1 == 0, "transmitting slave produced no data_in_valid");
    check(n_start0 == 4 && n_stop0 == 4, "four START and four STOP seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
