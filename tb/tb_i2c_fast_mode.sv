// tb_i2c_fast_mode: the master configured for fast-mode devices.
//
// 50 MHz system clock, SCL_FREQ_HZ = 380 kHz (divider 33, SCL 378.8 kHz).
// A register-file slave is written and read back through a repeated START.
// Every SCL low and high time during the transfers is measured against the
// fast-mode minimums of 1.3 us low and 0.6 us high (65 and 30 clocks), and the
// SCL period inside a byte must be exactly 4 * 33 clocks.
module tb_i2c_fast_mode;
  localparam int unsigned DIV = 33;

  logic clk = 1'b0, rst = 1'b1;
  logic enable = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [1:0] addr_hi = '0;
  logic [7:0] addr_in = '0, data_in = '0;
  logic busy, data_req, rd_valid, ack_error;
  logic [7:0] data_out;
  logic scl_oe, sda_oe, scl, sda, s_scl, s_sda;
  int checks = 0, failures = 0;
  logic [7:0] rdq[$];

  always #10 clk = ~clk;

  i2c_master #(.CLK_FREQ_HZ(50_000_000), .SCL_FREQ_HZ(380_000)) dut (
    .clk, .rst, .enable, .ten_bit, .addr_hi, .addr_in, .rw, .data_in,
    .busy, .data_req, .data_out, .rd_valid, .ack_error,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe
  );
  i2c_slave_model #(.ADDR(7'h57)) eeprom (
    .clk, .rst, .scl, .sda, .scl_pull(s_scl), .sda_pull(s_sda));

  assign scl = !(scl_oe || s_scl);
  assign sda = !(sda_oe || s_sda);

  always @(posedge clk) if (rd_valid) rdq.push_back(data_out);

  // SCL phase lengths
  int lo = 0, hi = 0, min_lo = 1_000_000, min_hi = 1_000_000, n_per = 0, n_per_ok = 0;
  int since_rise = 0;
  logic scl_q = 1'b1;
  always @(posedge clk) begin
    scl_q <= scl;
    since_rise <= since_rise + 1;
    if (busy) begin
      if (!scl && scl_q) begin if (hi < min_hi) min_hi = hi; end
      if (scl && !scl_q) begin
        if (lo < min_lo) min_lo = lo;
        n_per++;
        if (since_rise == 4 * DIV) n_per_ok++;
        since_rise <= 1;
      end
    end
    hi = scl ? hi + 1 : 0;
    lo = scl ? 0 : lo + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [6:0] a, input logic [7:0] wb[$], input int nr);
    int nw, n;
    nw = wb.size();
    addr_in <= {a, 1'b0};
    rw      <= (nw == 0);
    data_in <= (nw > 0) ? wb[0] : 8'h00;
    enable  <= 1'b1;
    @(posedge clk);
    while (!busy) @(posedge clk);
    n = 0;
    while (busy) begin
      if (data_req) begin
        n++;
        if (n < nw)                 data_in <= wb[n];
        else if (n == nw && nr > 0) rw <= 1'b1;
        if (n == nw + nr)           enable <= 1'b0;
      end
      if (ack_error) enable <= 1'b0;
      @(posedge clk);
    end
    enable <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    logic [7:0] wb[$];
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    wb = '{8'h00, 8'h11, 8'h22, 8'h33, 8'h44};
    xfer(7'h57, wb, 0);
    check(eeprom.regs[0] == 8'h11 && eeprom.regs[3] == 8'h44 && !ack_error, "fast-mode write");
    wb = '{8'h01};
    xfer(7'h57, wb, 3);
    check(rdq.size() == 3 && rdq[0] == 8'h22 && rdq[1] == 8'h33 && rdq[2] == 8'h44, "fast-mode read");
    check(min_lo >= 65, $sformatf("shortest SCL low %0d clocks", min_lo));
    check(min_hi >= 30, $sformatf("shortest SCL high %0d clocks", min_hi));
    check(n_per_ok > 60, $sformatf("SCL periods of 4*DIV: %0d of %0d", n_per_ok, n_per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
