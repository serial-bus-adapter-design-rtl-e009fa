// Write test system: a signal generator plays the processor and writes one
// byte through the I2C adapter to an I2C slave, whose received byte is shown
// on eight LEDs.
//
//   signal_generator_to_write --scl/sda--> i2c_adapter hps_scli/hps_sdi
//   i2c_adapter scl/sda <==I2C bus==> i2c_slave scl/sda
//   i2c_slave data_in[7:0] --> leds[7:0]
//
// The generator's rst output resets the adapter and the slave.  The bus is
// open drain: each line is the AND of the drive values of the parties on it
// (1 = released), which stands in for the pull-up resistors of a real bus.
// The slave's transmit input data_out is tied to 0, as in the described
// system.  With the default 200 Hz SCL the transfer ends about 110 ms
// (22 SCL periods) after power-up and the LEDs then show 10101010.  The
// block connections follow the described write system; the wired-AND bus
// model is this design's own.
module write_data_top #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 200
) (
  input  logic       clk_50,
  output logic [7:0] leds
);

  logic rst;
  logic gen_scl, gen_sda;
  logic adp_scl_o, adp_sda_o, slv_sda_o;
  logic scl_bus, sda_bus;
  logic hps_sclo, hps_sdo;

  signal_generator_to_write #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) sig_gen_write (
    .clk_50 (clk_50),
    .rst    (rst),
    .scl    (gen_scl),
    .sda    (gen_sda)
  );

  i2c_adapter i2c (
    .clk      (clk_50),
    .rst_n    (rst),
    .scl_i    (scl_bus),
    .scl_o    (adp_scl_o),
    .sda_i    (sda_bus),
    .sda_o    (adp_sda_o),
    .hps_scli (gen_scl),
    .hps_sdi  (gen_sda),
    .hps_sclo (hps_sclo),
    .hps_sdo  (hps_sdo)
  );

  // open-drain bus lines
  assign scl_bus = adp_scl_o;
  assign sda_bus = adp_sda_o & slv_sda_o;

  i2c_slave #(.SLAVE_ADDR(7'b000_0000)) slave (
    .clock              (clk_50),
    .reset              (rst),
    .scl                (scl_bus),
    .sda_i              (sda_bus),
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

  // hps_sclo/hps_sdo return the bus to the processor, which the generator
  // does not read back.
  logic unused_hps;
  assign unused_hps = hps_sclo ^ hps_sdo;

endmodule
