// i2c_clk_gen: quarter-period tick generator for the I2C master.
//
// The master produces SCL itself. This block divides the system clock by
// DIV = ceil(CLK_FREQ_HZ / (4 * SCL_FREQ_HZ)) and emits a one-cycle `tick` at the
// end of every quarter of an SCL period; the controller advances one quarter
// per tick, so SCL runs at CLK_FREQ_HZ / (4 * DIV).
//
// Interface and timing:
//   run   - while low the divider is held at zero (no ticks); the first tick
//           comes DIV cycles after run rises.
//   hold  - clock stretching: while high, the divider waits on its last count
//           and the tick is withheld. The controller raises it when it has
//           released SCL but the line still reads low (a slave holds it), so
//           the high half of the bit only starts once SCL is really high.
//   tick  - combinational, one system clock wide.
// The generator is this design's own choice of how to produce the bus clock;
// the rate is a parameter (100 kHz standard mode by default).
module i2c_clk_gen #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned SCL_FREQ_HZ = 100_000
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  input  logic run,
  input  logic hold,
  output logic tick
);
  import i2c_pkg::*;

  localparam int unsigned DIV = quarter_div(CLK_FREQ_HZ, SCL_FREQ_HZ);
  localparam int unsigned CW  = $clog2(DIV);

  logic [CW-1:0] cnt;
  logic          last;

  assign last = (cnt == CW'(DIV - 1));
  assign tick = run && last && !hold;

  always_ff @(posedge clk) begin
    if (rst || !run)  cnt <= '0;
    else if (last)    cnt <= hold ? cnt : '0;
    else              cnt <= cnt + 1'b1;
  end

endmodule
