// Read test system: a signal generator plays both the processor, which sends
// the address of a read through the adapter's processor inputs, and the
// addressed bus device, which answers with one data byte.  The adapter turns
// the bus around and returns the byte on its processor outputs, where an I2C
// slave stands in for the processor's receive pin and shows the byte on eight
// LEDs.
//
//   signal_generator_to_read scl_ex/sda_ex --> i2c_adapter hps_scli/hps_sdi
//   signal_generator_to_read scl/sda <==I2C bus==> i2c_adapter scl/sda
//   i2c_adapter hps_sclo/hps_sdo --> i2c_slave scl/sda
//   i2c_slave data_in[7:0] --> leds[7:0]
//
// The generator's rst output resets the adapter and the slave.  The bus is
// open drain (wired AND of the drive values, 1 = released).  The slave sits on
// one-directional lines, so its SDA drive goes nowhere; it works receive-only
// (TX_ENABLE = 0), takes the address byte 00000001 (address 0, read) and
// captures the byte the device sends.  With the default 200 Hz SCL the LEDs
// show 10101011 about 100 ms after power-up.  The block connections follow
// the described read system; the wired-AND bus model is this design's own.
module read_data_top #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 200
) (
  input  logic       clk_50,
  output logic [7:0] leds
);

  logic rst;
  logic gen_scl, gen_sda, gen_scl_ex, gen_sda_ex;
  logic adp_scl_o, adp_sda_o;
  logic scl_bus, sda_bus;
  logic hps_sclo, hps_sdo;
  logic slv_sda_o;

  signal_generator_to_read #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) sig_gen_read (
    .clk_50 (clk_50),
    .rst    (rst),
    .scl    (gen_scl),
    .sda    (gen_sda),
    .scl_ex (gen_scl_ex),
    .sda_ex (gen_sda_ex)
  );

  i2c_adapter i2c (
    .clk      (clk_50),
    .rst_n    (rst),
    .scl_i    (scl_bus),
    .scl_o    (adp_scl_o),
    .sda_i    (sda_bus),
    .sda_o    (adp_sda_o),
    .hps_scli (gen_scl_ex),
    .hps_sdi  (gen_sda_ex),
    .hps_sclo (hps_sclo),
    .hps_sdo  (hps_sdo)
  );

  // open-drain bus lines: adapter and device
  assign scl_bus = adp_scl_o & gen_scl;
  assign sda_bus = adp_sda_o & gen_sda;

  i2c_slave #(.SLAVE_ADDR(7'b000_0000), .TX_ENABLE(1'b0)) slave (
    .clock              (clk_50),
    .reset              (rst),
    .scl                (hps_sclo),
    .sda_i              (hps_sdo),
    .sda_o              (slv_sda_o),
    .start_detected     (),
    .transfer_started   (),
    .read_mode          (),
    .stop_detected      (),
    .data_out           (8'h00),
    .data_out_requested (),
    .data_in            (leds),
    .data_in_valid      ()
  );

  // the slave's SDA drive has no line to drive: hps_sdo is an output only
  logic unused_slv;
  assign unused_slv = slv_sda_o;

endmodule
