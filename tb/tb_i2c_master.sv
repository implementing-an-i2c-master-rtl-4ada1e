// tb_i2c_master: self-checking testbench of the I2C master bus controller.
//
// Two behavioural slaves share the wired-AND bus with the master: 0x68 (an
// RTC-like register file that stretches the clock after every acknowledge)
// and 0x50 (no stretching). The host side runs: a register write, a write of
// the register pointer followed by a repeated-START read, and a transfer to
// an absent address. It checks the slave's registers, the data read back,
// ack_error, the SCL period (4 * DIV clocks), the exact length of an
// unstretched transfer, and that clock stretching really slowed a transfer.
module tb_i2c_master;
  localparam int unsigned CLK_HZ = 4_000_000;
  localparam int unsigned SCL_HZ = 100_000;
  localparam int unsigned DIV    = CLK_HZ / (4 * SCL_HZ);

  logic clk = 1'b0, rst = 1'b1;
  logic enable = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [1:0] addr_hi = '0;
  logic [7:0] addr_in = '0, data_in = '0;
  logic busy, data_req, rd_valid, ack_error;
  logic [7:0] data_out;
  logic scl_oe, sda_oe, scl, sda;
  logic s0_scl, s0_sda, s1_scl, s1_sda;

  int checks = 0, failures = 0;
  logic [7:0] rdq[$];

  always #5 clk = ~clk;

  i2c_master #(.CLK_FREQ_HZ(CLK_HZ), .SCL_FREQ_HZ(SCL_HZ)) dut (
    .clk, .rst, .enable, .ten_bit, .addr_hi, .addr_in, .rw, .data_in,
    .busy, .data_req, .data_out, .rd_valid, .ack_error,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe
  );

  assign scl = !(scl_oe || s0_scl || s1_scl);
  assign sda = !(sda_oe || s0_sda || s1_sda);

  i2c_slave_model #(.ADDR(7'h68), .STRETCH(60)) rtc (
    .clk, .rst, .scl, .sda, .scl_pull(s0_scl), .sda_pull(s0_sda));
  i2c_slave_model #(.ADDR(7'h50), .STRETCH(0)) plain (
    .clk, .rst, .scl, .sda, .scl_pull(s1_scl), .sda_pull(s1_sda));

  always @(posedge clk) if (rd_valid) rdq.push_back(data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One transfer: nw bytes written, then (if nr > 0) a repeated START and nr
  // bytes read. With nw == 0 it is a plain read. Returns busy-high cycles.
  task automatic xfer(input logic [6:0] a, input logic [7:0] wb[$], input int nr,
                      output int cycles);
    int nw, n;
    nw = wb.size();
    cycles = 0;
    addr_in <= {a, 1'b0};
    rw      <= (nw == 0);
    data_in <= (nw > 0) ? wb[0] : 8'h00;
    enable  <= 1'b1;
    @(posedge clk);
    while (!busy) @(posedge clk);
    n = 0;
    while (busy) begin
      cycles++;
      if (data_req) begin
        n++;
        if (n < nw)            data_in <= wb[n];
        else if (n == nw && nr > 0) rw <= 1'b1;
        if (n == nw + nr)      enable <= 1'b0;
      end
      if (ack_error) enable <= 1'b0;
      @(posedge clk);
    end
    enable <= 1'b0;
    @(posedge clk);
  endtask

  // SCL period measured from rising edges
  int last_rise = -1, period_ok = 0, period_bad = 0, cyc = 0;
  logic scl_q = 1'b1;
  always @(posedge clk) begin
    cyc++;
    scl_q <= scl;
    if (scl && !scl_q && !rst) begin
      if (last_rise >= 0 && (cyc - last_rise) == 4 * DIV) period_ok++;
      last_rise = cyc;
    end
  end

  initial begin
    int c;
    logic [7:0] wb[$];
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);

    // 1. unstretched write to 0x50: pointer 3, data 0x5A, 0xC3
    wb = '{8'h03, 8'h5A, 8'hC3};
    xfer(7'h50, wb, 0, c);
    check(plain.regs[3] == 8'h5A && plain.regs[4] == 8'hC3, "0x50 register write");
    check(!ack_error, "no ack_error on good write");
    // START 4 + address 36 + 3 bytes * 36 + STOP 4 + bus free 4 quarters
    check(c == DIV * (4 + 36 * 4 + 8), $sformatf("write length %0d cycles", c));
    check(period_ok > 30, "SCL period is 4*DIV clocks");

    // 2. stretched write to RTC, then pointer write + repeated START read
    wb = '{8'h10, 8'hA1, 8'hB2};
    xfer(7'h68, wb, 0, c);
    check(rtc.regs[16] == 8'hA1 && rtc.regs[17] == 8'hB2, "RTC register write");
    check(c > DIV * (4 + 36 * 4 + 8) + 3 * 20, $sformatf("clock stretching lengthened the transfer (%0d)", c));
    check(rtc.n_stretch >= 4, "slave stretched the clock");
    rdq.delete();
    wb = '{8'h10};
    xfer(7'h68, wb, 3, c);
    check(rdq.size() == 3, "three bytes read");
    if (rdq.size() == 3)
      check(rdq[0] == 8'hA1 && rdq[1] == 8'hB2 && rdq[2] == 8'(18 * 7 + 3),
            $sformatf("read data %h %h %h", rdq[0], rdq[1], rdq[2]));
    check(rtc.n_start == 4 && rtc.n_stop == 3, $sformatf("repeated START seen by slave %0d %0d", rtc.n_start, rtc.n_stop));

    // 3. absent slave: address not acknowledged
    wb = '{8'h00, 8'h11};
    xfer(7'h22, wb, 0, c);
    check(ack_error, "ack_error for absent slave");
    check(c == DIV * (4 + 36 + 8), $sformatf("abort length %0d cycles", c));
    check(plain.regs[0] != 8'h11 && rtc.regs[0] != 8'h11, "nothing written on NACK");

    // 4. read from 0x50 without pointer write (pointer left at 5)
    rdq.delete();
    wb = {};
    xfer(7'h50, wb, 2, c);
    check(rdq.size() == 2 && rdq[0] == 8'(5 * 7 + 3) && rdq[1] == 8'(6 * 7 + 3), "plain read");
    check(!ack_error, "ack_error cleared by next transfer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
