// i2c_bus: the two-wire, wired-AND I2C bus.
//
// SDA and SCL are open-drain lines with a pull-up resistor: a device can only
// pull a line low or let go of it. A line therefore reads high exactly when
// no attached device pulls it low. Each of the N_DEV devices gives one
// "pull low" bit per line; the outputs are the resulting line levels that
// every device reads back. This is the bus of the two-wire configuration
// with one master and several slaves; the number of devices is this design's
// choice. On a real board the AND is done by the wires and the pull-ups; this
// module is the same function for simulation and for on-chip buses.
module i2c_bus #(
  parameter int unsigned N_DEV = 3
) (
  input  logic [N_DEV-1:0] scl_pull,  // device i pulls SCL low
  input  logic [N_DEV-1:0] sda_pull,  // device i pulls SDA low
  output logic             scl,       // resolved SCL level
  output logic             sda        // resolved SDA level
);
  assign scl = ~|scl_pull;
  assign sda = ~|sda_pull;
endmodule
