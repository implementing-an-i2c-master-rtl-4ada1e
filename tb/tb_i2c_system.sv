// tb_i2c_system: end-to-end test of the master on the shared bus, at the
// design's default parameters (50 MHz system clock, 100 kHz SCL).
//
// Two behavioural slaves hang on the bus: an RTC-like register file at 0x68
// that stretches SCL after each acknowledge, and a second device (standing in
// for a microcontroller) at 0x42, with a 10-bit device (0x3C9) on the same
// wires. The host writes registers in both, reads
// them back through a pointer write and repeated START, reads without a
// pointer write, and addresses an absent slave. Besides the data, the
// testbench counts every bus mechanism the controller has - START, repeated
// START, STOP, slave acknowledge of address and data, master acknowledge and
// the final not-acknowledge of a read, a missing acknowledge (ack_error),
// clock stretching, 10-bit addressing - and counts a failure for any that never happened.
module tb_i2c_system;
  localparam int unsigned DIV = 50_000_000 / (4 * 100_000);  // 125 clocks per quarter

  logic clk = 1'b0, rst = 1'b1;
  logic enable = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [1:0] addr_hi = '0;
  logic [7:0] addr_in = '0, data_in = '0;
  logic busy, data_req, rd_valid, ack_error;
  logic [7:0] data_out;
  logic scl, sda, m_scl_oe, m_sda_oe;
  logic [1:0] ext_scl_pull, ext_sda_pull;

  int checks = 0, failures = 0;
  logic [7:0] rdq[$];

  always #10 clk = ~clk;

  i2c_system dut (
    .clk, .rst, .enable, .ten_bit, .addr_hi, .addr_in, .rw, .data_in,
    .busy, .data_req, .data_out, .rd_valid, .ack_error,
    .ext_scl_pull, .ext_sda_pull, .scl, .sda,
    .master_scl_oe(m_scl_oe), .master_sda_oe(m_sda_oe)
  );

  i2c_slave_model #(.ADDR(7'h68), .STRETCH(400)) rtc (
    .clk, .rst, .scl, .sda, .scl_pull(ext_scl_pull[0]), .sda_pull(ext_sda_pull[0]));
  // slave 1 position: a microcontroller at 0x42 and, on the same off-chip
  // wires, a device with the 10-bit address 0x3C9
  logic mcu_scl, mcu_sda, d10_scl, d10_sda;
  i2c_slave_model #(.ADDR(7'h42), .STRETCH(0)) mcu (
    .clk, .rst, .scl, .sda, .scl_pull(mcu_scl), .sda_pull(mcu_sda));
  i2c_slave_model #(.TEN_BIT(1'b1), .ADDR10(10'h3C9)) dev10 (
    .clk, .rst, .scl, .sda, .scl_pull(d10_scl), .sda_pull(d10_sda));
  assign ext_scl_pull[1] = mcu_scl || d10_scl;
  assign ext_sda_pull[1] = mcu_sda || d10_sda;

  // ---------------- bus event counters ----------------
  int n_start = 0, n_restart = 0, n_stop = 0, n_slave_ack = 0, n_master_ack = 0;
  int n_master_nack = 0, n_ack_error = 0, n_stretch = 0, n_sda_glitch = 0, n_ten_bit = 0;
  logic scl_q = 1'b1, sda_q = 1'b1, in_xfer = 1'b0, ack_error_q = 1'b0;
  logic [3:0] bitpos = '0;   // SCL high pulses since START or last acknowledge
  logic       m_released_q = 1'b0;
  logic       first_byte = 1'b0, rd_dir = 1'b0;
  logic [7:0] bytesh = '0;

  always @(posedge clk) begin
    if (!rst) begin
      scl_q <= scl;
      sda_q <= sda;
      ack_error_q <= ack_error;
      if (ack_error && !ack_error_q) n_ack_error++;
      if (scl && scl_q && sda_q && !sda) begin
        if (in_xfer) n_restart++; else n_start++;
        in_xfer <= 1'b1;
        bitpos  <= '0;
        first_byte <= 1'b1;
      end else if (scl && scl_q && !sda_q && sda) begin
        n_stop++;
        in_xfer <= 1'b0;
      end
      // bits are sampled on SCL rising edges; the ninth of a byte is the
      // acknowledge. The first byte after a START carries the direction.
      if (scl && !scl_q && in_xfer) begin
        if (bitpos == 4'd8) begin
          bitpos <= '0;
          if (first_byte) begin
            rd_dir <= bytesh[0];
            if (bytesh[7:3] == 5'b11110) n_ten_bit++;
            if (!sda) n_slave_ack++;
          end else if (rd_dir) begin
            if (!sda) n_master_ack++; else n_master_nack++;
          end else if (!sda) n_slave_ack++;
          first_byte <= 1'b0;
        end else begin
          bitpos <= bitpos + 4'd1;
          bytesh <= {bytesh[6:0], sda};
        end
      end
      // master has let go of SCL but a slave still holds it low
      m_released_q <= !m_scl_oe && !scl;
      if (!m_scl_oe && !scl && !m_released_q && ext_scl_pull != 0) n_stretch++;
    end
  end

  // SDA may only change while SCL is high as a START or STOP; the counters
  // above catch those, so here only count changes at the same time as an
  // SCL rising edge, which would be ambiguous on a real bus.
  always @(posedge clk) if (!rst && (sda != sda_q) && (scl != scl_q)) n_sda_glitch++;

  always @(posedge clk) if (rd_valid) rdq.push_back(data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // a10[10] = 1 selects 10-bit addressing of a10[9:0]; otherwise a10[6:0]
  // is a 7-bit address.
  task automatic xfer(input logic [10:0] a10, input logic [7:0] wb[$], input int nr,
                      output int cycles);
    int nw, n;
    nw = wb.size();
    cycles = 0;
    ten_bit <= a10[10];
    addr_hi <= a10[9:8];
    addr_in <= a10[10] ? a10[7:0] : {a10[6:0], 1'b0};
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
    int c;
    logic [7:0] wb[$];
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);

    // set the RTC's time registers 0..2 (seconds, minutes, hours)
    wb = '{8'h00, 8'h45, 8'h30, 8'h12};
    xfer(11'h068, wb, 0, c);
    check(rtc.regs[0] == 8'h45 && rtc.regs[1] == 8'h30 && rtc.regs[2] == 8'h12, "RTC write");
    check(!ack_error, "RTC write acknowledged");

    // write two bytes into the second slave, unstretched: exact length
    wb = '{8'h08, 8'hDE, 8'hAD};
    xfer(11'h042, wb, 0, c);
    check(mcu.regs[8] == 8'hDE && mcu.regs[9] == 8'hAD, "second slave write");
    check(c == DIV * (4 + 36 * 4 + 8), $sformatf("unstretched write took %0d cycles", c));

    // read the RTC time back: pointer write, repeated START, 3 reads
    rdq.delete();
    wb = '{8'h00};
    xfer(11'h068, wb, 3, c);
    check(rdq.size() == 3, "three RTC bytes");
    if (rdq.size() == 3)
      check(rdq[0] == 8'h45 && rdq[1] == 8'h30 && rdq[2] == 8'h12,
            $sformatf("RTC read %h %h %h", rdq[0], rdq[1], rdq[2]));

    // current-address read of the second slave (pointer now 10)
    rdq.delete();
    wb = {};
    xfer(11'h042, wb, 1, c);
    check(rdq.size() == 1 && rdq[0] == 8'(10 * 7 + 3), "current-address read");

    // nobody answers 0x33
    wb = '{8'h01};
    xfer(11'h033, wb, 0, c);
    check(ack_error, "missing acknowledge reported");
    check(rtc.n_addr_match == 3 && mcu.n_addr_match == 2, "each slave answered only its address");

    // 10-bit device: write two registers, read them back
    wb = '{8'h20, 8'h5A, 8'hA5};
    xfer(11'h7C9, wb, 0, c);
    check(dev10.regs[32] == 8'h5A && dev10.regs[33] == 8'hA5 && !ack_error, "10-bit write");
    rdq.delete();
    wb = '{8'h20};
    xfer(11'h7C9, wb, 2, c);
    check(rdq.size() == 2 && rdq[0] == 8'h5A && rdq[1] == 8'hA5, "10-bit read");
    check(mcu.n_addr_match == 2, "7-bit slave ignored the 10-bit transfers");

    // every mechanism happened at least once
    check(n_start      >= 7, $sformatf("START x%0d", n_start));
    check(n_restart    >= 1, $sformatf("repeated START x%0d", n_restart));
    check(n_stop       == n_start, $sformatf("STOP x%0d", n_stop));
    check(n_slave_ack  >= 10, $sformatf("slave ACK x%0d", n_slave_ack));
    check(n_master_ack == 3, $sformatf("master ACK x%0d", n_master_ack));
    check(n_master_nack == 3, $sformatf("master NACK x%0d", n_master_nack));
    check(n_ack_error  == 1, $sformatf("slave NACK x%0d", n_ack_error));
    check(n_stretch    >= 5, $sformatf("clock stretch x%0d", n_stretch));
    check(n_ten_bit    >= 3, $sformatf("10-bit header x%0d", n_ten_bit));
    check(n_sda_glitch == 0, $sformatf("SDA changed with SCL edge x%0d", n_sda_glitch));
    $display("events: start=%0d restart=%0d stop=%0d slave_ack=%0d master_ack=%0d master_nack=%0d nack=%0d stretch=%0d ten_bit=%0d",
             n_start, n_restart, n_stop, n_slave_ack, n_master_ack, n_master_nack, n_ack_error, n_stretch, n_ten_bit);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
