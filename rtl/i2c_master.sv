// i2c_master: I2C master bus controller (single master).
//
// The block a host (FPGA user logic) uses to talk to I2C slaves such as a
// real-time clock. It is built from three parts:
//   * i2c_sync        - two-flop synchronisers on the SCL and SDA levels read
//                       back from the bus;
//   * i2c_clk_gen     - divides clk into quarter periods of SCL, and holds
//                       while a slave stretches the clock;
//   * i2c_master_ctrl - the START / address + R/W / data / acknowledge / STOP
//                       sequencer.
// Host interface: clk, rst, enable, addr_in (7-bit slave address in bits
// 7:1, or A7..A0 of a 10-bit address with ten_bit = 1 and A9..A8 on
// addr_hi), rw (1 = read), data_in, and back busy, data_req, data_out,
// rd_valid, ack_error; see i2c_master_ctrl for the handshake.
// Bus interface: open-drain style. scl_oe / sda_oe high means "pull the line
// low"; scl_i / sda_i are the line levels. On an FPGA pad:
// pad = oe ? 1'b0 : 1'bz, with an external pull-up.
// Timing: SCL = CLK_FREQ_HZ / (4 * DIV), DIV = ceil(CLK_FREQ_HZ / (4 * SCL_FREQ_HZ));
// a byte with its acknowledge takes 36 quarters. The default 50 MHz system
// clock and 100 kHz SCL are this design's choices.
module i2c_master #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned SCL_FREQ_HZ = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  // host side
  input  logic       enable,
  input  logic       ten_bit,   // 1: 10-bit address {addr_hi, addr_in}
  input  logic [1:0] addr_hi,   // A9..A8 of a 10-bit address
  input  logic [7:0] addr_in,
  input  logic       rw,
  input  logic [7:0] data_in,
  output logic       busy,
  output logic       data_req,
  output logic [7:0] data_out,
  output logic       rd_valid,
  output logic       ack_error,
  // bus side
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       scl_oe,
  output logic       sda_oe
);
  logic scl_s, sda_s, tick, run, stretch;

  i2c_sync u_scl_sync (.clk, .rst, .d(scl_i), .q(scl_s));
  i2c_sync u_sda_sync (.clk, .rst, .d(sda_i), .q(sda_s));

  i2c_clk_gen #(
    .CLK_FREQ_HZ(CLK_FREQ_HZ),
    .SCL_FREQ_HZ(SCL_FREQ_HZ)
  ) u_clk_gen (
    .clk, .rst, .run, .hold(stretch), .tick
  );

  i2c_master_ctrl u_ctrl (
    .clk, .rst, .tick,
    .enable, .ten_bit, .addr_hi, .addr_in, .rw, .data_in,
    .busy, .data_req, .data_out, .rd_valid, .ack_error,
    .scl_in(scl_s), .sda_in(sda_s),
    .scl_low(scl_oe), .sda_low(sda_oe),
    .run, .stretch
  );
endmodule
