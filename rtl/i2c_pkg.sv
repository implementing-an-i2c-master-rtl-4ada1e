// i2c_pkg: types and constants shared by the I2C master bus controller.
//
// The controller paces the bus in "quarters": every SCL bit period is cut
// into four equal quarters, two with SCL low and two with SCL high. The
// helper function below turns a system clock and a wanted SCL rate into the
// number of system clocks per quarter. The state encoding names the bus
// slots the controller steps through (START, one data or acknowledge bit,
// repeated START, STOP and the bus-free gap after STOP).
package i2c_pkg;

  // Bus slots of the master state machine. Every slot except S_IDLE lasts
  // four quarters.
  typedef enum logic [2:0] {
    S_IDLE,     // bus free, waiting for a request
    S_START,    // SCL high, SDA falls half way: START condition
    S_BIT,      // one address / data bit, written or read
    S_ACK,      // the acknowledge bit after every byte
    S_RESTART,  // brings SDA and SCL high again ahead of a repeated START
    S_STOP,     // SDA low while SCL rises, then SDA rises: STOP condition
    S_BUSFREE   // both lines high, bus-free time before the next START
  } state_t;

  // What follows the acknowledge bit of the current data byte.
  typedef enum logic [1:0] {
    N_DATA,     // another data byte, same slave, same direction
    N_RESTART,  // repeated START (new slave address or direction)
    N_STOP      // end of the transfer
  } next_t;

  // Slave address and direction of a transfer. For a 7-bit address the
  // address sits in lo[7:1] (lo[0] = 0) and hi = 0; for a 10-bit address
  // hi holds A9..A8 and lo holds A7..A0.
  typedef struct packed {
    logic       ten;  // 10-bit addressing
    logic [1:0] hi;
    logic [7:0] lo;
    logic       rw;   // 1 = read
  } xfer_addr_t;

  // First byte of a 10-bit address: the reserved pattern 11110, A9, A8, R/W.
  localparam logic [4:0] TEN_BIT_PREFIX = 5'b11110;

  // System clocks per quarter of an SCL period, rounded up so that SCL never
  // runs faster than asked, and never below 4 so that the two-flop input
  // synchroniser always settles inside one quarter.
  function automatic int unsigned quarter_div(int unsigned clk_hz, int unsigned scl_hz);
    int unsigned d;
    d = (clk_hz + 4 * scl_hz - 1) / (4 * scl_hz);
    return (d < 4) ? 4 : d;
  endfunction

endpackage
