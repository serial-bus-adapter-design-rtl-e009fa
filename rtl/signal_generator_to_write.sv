// Test-pattern source for the write direction: it plays the processor that
// writes one byte through the I2C adapter.
//
// Time is divided into phases of one SCL period each (50 MHz / 200 Hz =
// 250000 clocks by default).  Within a phase SCL is low for the first half
// and high for the second; SDA changes a quarter into the phase (SCL low) for
// data bits, and three quarters into it (SCL high) for START and STOP.
//
//   phase 0      rst = 1 (reset pulse for the rest of the system), SDA high
//   phase 1      idle, SDA high
//   phase 2      START: SDA falls while SCL is high
//   phase 3..10  address byte ADDR_BYTE, MSB first (default 00000000: write)
//   phase 11     SDA 0 in the ACK slot
//   phase 12..19 data byte DATA_BYTE, MSB first (default 10101010; its last
//                bit 0 keeps the adapter in the write direction)
//   phase 20     SDA 0 in the ACK slot
//   phase 21     STOP: SDA low, then rises while SCL is high
//   phase 22..   SDA high, SCL keeps toggling; the pattern is sent once
//
// Ports: clk_50 in; rst, scl, sda out, all registered.  rst is 1 during
// phase 0 only.  The phase plan, the byte values, the 200 Hz SCL and the
// reset pulse follow the described generator; the position of the edges
// inside a phase is this design's choice.  The counters start from their
// declared power-up values, as FPGA registers do; the module has no reset
// input of its own.
module signal_generator_to_write #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SCL_HZ    = 200,
  parameter logic [7:0]  ADDR_BYTE = 8'b0000_0000,
  parameter logic [7:0]  DATA_BYTE = 8'b1010_1010
) (
  input  logic clk_50,
  output logic rst,
  output logic scl,
  output logic sda
);

  localparam int unsigned PHASE_CLKS = CLK_HZ / SCL_HZ;
  localparam int unsigned QUARTER    = PHASE_CLKS / 4;
  localparam int unsigned HALF       = PHASE_CLKS / 2;
  localparam int unsigned THREE_Q    = 3 * QUARTER;
  localparam int unsigned CW         = $clog2(PHASE_CLKS);
  localparam logic [4:0]  LAST_PHASE = 5'd22;

  logic [CW-1:0] counter_scl = '0;   // position inside the phase
  logic [4:0]    counter     = '0;   // phase number

  logic rst_r = 1'b1;
  logic scl_r = 1'b0;
  logic sda_r = 1'b1;

  assign rst = rst_r;
  assign scl = scl_r;
  assign sda = sda_r;

  // SDA value set a quarter into each phase
  function automatic logic bit_at(logic [4:0] p);
    if (p >= 5'd3 && p <= 5'd10)       return ADDR_BYTE[3'(10 - p)];
    else if (p == 5'd11)               return 1'b0;
    else if (p >= 5'd12 && p <= 5'd19) return DATA_BYTE[3'(19 - p)];
    else if (p == 5'd20 || p == 5'd21) return 1'b0;
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

    if (counter_scl == CW'(QUARTER))
      sda_r <= bit_at(counter);
    else if (counter_scl == CW'(THREE_Q)) begin
      if (counter == 5'd2)  sda_r <= 1'b0;   // START
      if (counter == 5'd21) sda_r <= 1'b1;   // STOP
    end
  end

endmodule
