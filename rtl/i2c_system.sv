// i2c_system: the FPGA I2C master on a shared two-wire bus.
//
// One master (this controller) and N_EXT external slaves - a real-time clock
// and a microcontroller in the intended setup - share SDA and SCL. The
// slaves are off-chip parts, so their open-drain drives come in as
// ext_scl_pull / ext_sda_pull (bit i high: slave i pulls the line low); the
// resolved line levels go out as scl / sda for the slaves to read. The
// master's host interface is brought out unchanged (see i2c_master and
// i2c_master_ctrl for the handshake and timing). Device 0 of the bus is the
// master, devices 1..N_EXT the slaves.
// Following the document: one master that starts every transfer and drives
// the clock, several addressed slaves, wired-AND lines with pull-ups. The
// number of slaves, the clock rates and the port style are this design's.
module i2c_system #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned SCL_FREQ_HZ = 100_000,
  parameter int unsigned N_EXT       = 2
) (
  input  logic             clk,
  input  logic             rst,
  // host side
  input  logic             enable,
  input  logic             ten_bit,
  input  logic [1:0]       addr_hi,
  input  logic [7:0]       addr_in,
  input  logic             rw,
  input  logic [7:0]       data_in,
  output logic             busy,
  output logic             data_req,
  output logic [7:0]       data_out,
  output logic             rd_valid,
  output logic             ack_error,
  // bus side
  input  logic [N_EXT-1:0] ext_scl_pull,
  input  logic [N_EXT-1:0] ext_sda_pull,
  output logic             scl,
  output logic             sda,
  output logic             master_scl_oe,
  output logic             master_sda_oe
);
  i2c_master #(
    .CLK_FREQ_HZ(CLK_FREQ_HZ),
    .SCL_FREQ_HZ(SCL_FREQ_HZ)
  ) u_master (
    .clk, .rst,
    .enable, .ten_bit, .addr_hi, .addr_in, .rw, .data_in,
    .busy, .data_req, .data_out, .rd_valid, .ack_error,
    .scl_i(scl), .sda_i(sda),
    .scl_oe(master_scl_oe), .sda_oe(master_sda_oe)
  );

  i2c_bus #(.N_DEV(N_EXT + 1)) u_bus (
    .scl_pull({ext_scl_pull, master_scl_oe}),
    .sda_pull({ext_sda_pull, master_sda_oe}),
    .scl, .sda
  );
endmodule
