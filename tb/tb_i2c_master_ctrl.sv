// tb_i2c_master_ctrl: checks the master sequencer on its own.
//
// The testbench makes the quarter ticks itself (one every 4 clocks) and
// resolves the bus with one behavioural slave at 0x3C. An independent bus
// monitor decodes START, STOP and every 9-bit group (8 data bits + the
// acknowledge bit) sampled on SCL rising edges; the checks compare that
// record with the bytes expected for each transfer, including who
// acknowledged, and check the SCL high and low times (2 quarters each).
module tb_i2c_master_ctrl;
  localparam int Q = 4;   // clocks per quarter

  logic clk = 1'b0, rst = 1'b1, tick;
  logic enable = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [1:0] addr_hi = '0;
  logic [7:0] addr_in = '0, data_in = '0;
  logic busy, data_req, rd_valid, ack_error, run, stretch;
  logic [7:0] data_out;
  logic m_scl, m_sda, s_scl, s_sda, scl, sda;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  int qc = 0;
  always @(posedge clk) qc <= (!run || qc == Q - 1) ? 0 : qc + 1;
  assign tick = run && (qc == Q - 1) && !stretch;

  i2c_master_ctrl dut (
    .clk, .rst, .tick, .enable, .ten_bit, .addr_hi, .addr_in, .rw, .data_in,
    .busy, .data_req, .data_out, .rd_valid, .ack_error,
    .scl_in(scl), .sda_in(sda), .scl_low(m_scl), .sda_low(m_sda), .run, .stretch
  );
  i2c_slave_model #(.ADDR(7'h3C)) slv (
    .clk, .rst, .scl, .sda, .scl_pull(s_scl), .sda_pull(s_sda));
  logic t_scl, t_sda;
  i2c_slave_model #(.TEN_BIT(1'b1), .ADDR10(10'h2A5)) slv10 (
    .clk, .rst, .scl, .sda, .scl_pull(t_scl), .sda_pull(t_sda));

  assign scl = !(m_scl || s_scl || t_scl);
  assign sda = !(m_sda || s_sda || t_sda);

  // ---- independent bus monitor: 'S', 'P' markers and 9-bit groups ----
  int rec[$];            // START = -1, STOP = -2, else {byte, ack_bit}
  logic scl_q = 1'b1, sda_q = 1'b1;
  logic [8:0] sh = '0;
  int nb = 0, hi = 0, lo = 0, bad_hi = 0, bad_lo = 0;
  always @(posedge clk) begin
    scl_q <= scl; sda_q <= sda;
    if (!rst) begin
      if (scl && scl_q && sda_q && !sda) begin rec.push_back(-1); nb = 0; end
      if (scl && scl_q && !sda_q && sda) rec.push_back(-2);
      if (scl && !scl_q) begin
        sh = {sh[7:0], sda}; nb++;
        if (nb == 9) begin rec.push_back(int'(sh)); nb = 0; end
      end
      if (scl) hi++; else hi = 0;
      if (!scl) lo++; else lo = 0;
      if (!scl && scl_q && hi != 0 && busy && hi < 2 * Q - 2) bad_hi++;
      if (scl && !scl_q && lo != 0 && busy && lo < 2 * Q - 2) bad_lo++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // a10[9] = 1 selects 10-bit addressing of a10[9:0]; otherwise a10[6:0]
  // is a 7-bit address.
  task automatic xfer(input logic [10:0] a10, input logic [7:0] wb[$], input int nr);
    int nw, n;
    nw = wb.size();
    ten_bit <= a10[10];
    addr_hi <= a10[9:8];
    addr_in <= a10[10] ? a10[7:0] : {a10[6:0], 1'b1};  // 7-bit: bit 0 ignored
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

  function automatic string show(int r[$]);
    string s = "";
    foreach (r[i]) s = {s, (r[i] == -1) ? "S " : (r[i] == -2) ? "P " : $sformatf("%03h ", r[i])};
    return s;
  endfunction

  initial begin
    int exp[$];
    logic [7:0] wb[$];
    logic [7:0] got[$];
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    // write: S, 0x78 ack, 0x02 ack, 0x9A ack, 0x5B ack, P  (ack bit 0 = acknowledged)
    rec.delete();
    wb = '{8'h02, 8'h9A, 8'h5B};
    xfer(11'h03C, wb, 0);
    exp = '{-1, 'h0F0, 'h004, 'h134, 'h0B6, -2};
    check(rec == exp, {"write on bus: ", show(rec)});
    check(slv.regs[2] == 8'h9A && slv.regs[3] == 8'h5B, "slave received data");

    // pointer write, repeated START, read 2: master ACKs the first, NACKs the last
    rec.delete();
    wb = '{8'h02};
    fork
      xfer(11'h03C, wb, 2);
      begin
        got.delete();
        while (got.size() < 2) begin @(posedge clk); if (rd_valid) got.push_back(data_out); end
      end
    join
    exp = '{-1, 'h0F0, 'h004, -1, 'h0F2, 'h134, 'h0B7, -2};
    check(rec == exp, {"read on bus: ", show(rec)});
    check(got.size() == 2 && got[0] == 8'h9A && got[1] == 8'h5B, "data_out values");

    // absent slave: S, address NACKed, P, ack_error
    rec.delete();
    wb = '{8'h00};
    xfer(11'h011, wb, 0);
    exp = '{-1, 'h045, -2};
    check(rec == exp, {"NACK on bus: ", show(rec)});
    check(ack_error, "ack_error set");

    // 10-bit write to 0x2A5: header 11110_10_0, A7..A0, pointer, data
    rec.delete();
    wb = '{8'h04, 8'h77};
    xfer(11'h6A5, wb, 0);
    exp = '{-1, 'h1E8, 'h14A, 'h008, 'h0EE, -2};
    check(rec == exp, {"10-bit write on bus: ", show(rec)});
    check(slv10.regs[4] == 8'h77 && !ack_error, "10-bit slave received data");

    // 10-bit read: pointer write, Sr + full address, Sr + header with R
    rec.delete();
    wb = '{8'h04};
    fork
      xfer(11'h6A5, wb, 2);
      begin
        got.delete();
        while (got.size() < 2) begin @(posedge clk); if (rd_valid) got.push_back(data_out); end
      end
    join
    exp = '{-1, 'h1E8, 'h14A, 'h008, -1, 'h1E8, 'h14A, -1, 'h1EA, 'h0EE, 'h04D, -2};
    check(rec == exp, {"10-bit read on bus: ", show(rec)});
    check(got.size() == 2 && got[0] == 8'h77 && got[1] == 8'(5 * 7 + 3), "10-bit read data");
    check(slv.n_addr_match == 3, "7-bit slave ignored the 10-bit transfers");

    check(bad_hi == 0 && bad_lo == 0, $sformatf("SCL high/low too short: %0d %0d", bad_hi, bad_lo));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
