// Test-pattern source for the read direction.  It plays two parties at once:
// the processor that reads one byte through the I2C adapter (scl_ex/sda_ex,
// wired to the adapter's hps_scli/hps_sdi) and the addressed device on the
// bidirectional bus (scl/sda, wired to the bus as open-drain drivers: 1
// releases the line, 0 pulls it low).
//
// Time is divided into phases of one SCL period each (50 MHz / 200 Hz =
// 250000 clocks by default).  Within a phase both clocks are low for the
// first half and high for the second; data changes a quarter into the phase,
// START and STOP three quarters into it (clock high).
//
//   phase    sda_ex (processor side)         sda (device side)
//   0        high, rst = 1                   released
//   1        high                            released
//   2        START: falls while scl_ex high  released
//   3..10    address byte ADDR_BYTE, MSB     released
//            first (default 00000001: read)
//   11       released                        0: device ACKs its address
//   12..19   released                        data byte DATA_BYTE, MSB first
//                                            (default 10101011; its last bit
//                                            1 keeps the adapter reading)
//   20       0: processor ACKs the byte      released
//   21       STOP: low, rises while high     released
//   22..     high, clocks keep toggling      released
//
// Ports: clk_50 in; rst, scl, sda, scl_ex, sda_ex out, all registered.  The
// phase plan, the byte values, which party drives which phase, the 200 Hz
// clocks and the reset pulse follow the described generator; the edge
// positions inside a phase and the device side being released outside its
// own phases are this design's choices.  The registers start from declared
// power-up values (FPGA style); there is no reset input.
module signal_generator_to_read #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SCL_HZ    = 200,
  parameter logic [7:0]  ADDR_BYTE = 8'b0000_0001,
  parameter logic [7:0]  DATA_BYTE = 8'b1010_1011
) (
  input  logic clk_50,
  output logic rst,
  output logic scl,
  output logic sda,
  output logic scl_ex,
  output logic sda_ex
);

  localparam int unsigned PHASE_CLKS = CLK_HZ / SCL_HZ;
  localparam int unsigned QUARTER    = PHASE_CLKS / 4;
  localparam int unsigned HALF       = PHASE_CLKS / 2;
  localparam int unsigned THREE_Q    = 3 * QUARTER;
  localparam int unsigned CW         = $clog2(PHASE_CLKS);
  localparam logic [4:0]  LAST_PHASE = 5'd22;

  logic [CW-1:0] counter_scl = '0;   // position inside the phase
  logic [4:0]    counter     = '0;   // phase number
  logic rst_r    = 1'b1;
  logic scl_r    = 1'b0;
  logic sda_r    = 1'b1;
  logic sda_ex_r = 1'b1;

  assign rst    = rst_r;
  assign scl    = scl_r;
  assign scl_ex = scl_r;
  assign sda    = sda_r;
  assign sda_ex = sda_ex_r;

  // processor-side SDA value a quarter into each phase
  function automatic logic ex_bit_at(logic [4:0] p);
    if (p >= 5'd3 && p <= 5'd10)      return ADDR_BYTE[3'(10 - p)];
    else if (p == 5'd20 || p == 5'd21) return 1'b0;
    else                               return 1'b1;
  endfunction

  // device-side SDA value a quarter into each phase
  function automatic logic dev_bit_at(logic [4:0] p);
    if (p == 5'd11)                    return 1'b0;
    else if (p >= 5'd12 && p <= 5'd19) return DATA_BYTE[3'(19 - p)];
    else                               return 1'b1;
  endfunction

  always_ff @(posedge clk_50) begin
    if (counter_scl == CW'(PHASE_CLKS - 1)) begin
      counter_scl <= '0;
      if (counter != LAST_PHASE) counter <= counter + 5'd1;
    end else begin
      counter_scl <= counter_scl + 1'b1;
    end

    rst_r <= (counter == 5'd0);
    scl_r <= (counter_scl >= CW'(HALF));

    if (counter_scl == CW'(QUARTER)) begin
      sda_ex_r <= ex_bit_at(counter);
      sda_r    <= dev_bit_at(counter);
    end else if (counter_scl == CW'(THREE_Q)) begin
      if (counter == 5'd2)  sda_ex_r <= 1'b0;   // START
      if (counter == 5'd21) sda_ex_r <= 1'b1;   // STOP
    end
  end

endmodule
