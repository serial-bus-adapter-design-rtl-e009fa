// Top level: the write and the read test systems of the I2C adapter, side by
// side.  Both run from the same 50 MHz clock and each drives its own LED bus:
// leds_write shows the byte the slave received through the adapter in the
// write direction (10101010), leds_read the byte the processor side received
// in the read direction (10101011).  On the board these are two separate
// builds driving LEDR[7:0]; here they share one top so that both can be
// built and simulated together.
module i2c_adapter_system #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 200
) (
  input  logic       clk_50,
  output logic [7:0] leds_write,
  output logic [7:0] leds_read
);

  write_data_top #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) write_sys (
    .clk_50 (clk_50),
    .leds   (leds_write)
  );

  read_data_top #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) read_sys (
    .clk_50 (clk_50),
    .leds   (leds_read)
  );

endmodule
