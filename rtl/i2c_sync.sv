// i2c_sync: two-flop synchroniser for an asynchronous input line.
//
// The SDA and SCL levels come from pads and change at any time with respect
// to the system clock; each passes through STAGES flip-flops before the
// controller uses it. The output lags the input by STAGES clocks. RESET_VAL
// is the idle level of the line (high for an I2C bus).
module i2c_sync #(
  parameter int unsigned STAGES    = 2,
  parameter bit          RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst,   // synchronous, active high
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] ff;

  always_ff @(posedge clk) begin
    if (rst) ff <= {STAGES{RESET_VAL}};
    else     ff <= {ff[STAGES-2:0], d};
  end

  assign q = ff[STAGES-1];
endmodule
