// tb_i2c_bus: checks the wired-AND bus resolution for every combination of
// three devices' pull-downs: a line is high only when nobody pulls it low,
// and SCL and SDA resolve independently.
module tb_i2c_bus;
  logic [2:0] scl_pull, sda_pull;
  logic scl, sda;
  int checks = 0, failures = 0;

  i2c_bus #(.N_DEV(3)) dut (.scl_pull, .sda_pull, .scl, .sda);

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int d = 0; d < 8; d++) begin
        scl_pull = 3'(s);
        sda_pull = 3'(d);
        #1;
        checks++;
        if (scl !== (s == 0) || sda !== (d == 0)) begin
          failures++;
          $display("FAIL: pulls scl=%b sda=%b gave scl=%b sda=%b", scl_pull, sda_pull, scl, sda);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
