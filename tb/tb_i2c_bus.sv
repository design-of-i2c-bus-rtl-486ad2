// tb_i2c_bus: test of the wired-AND resolution of the open-drain lines.
//
// Every combination of pull-down requests from three devices is applied,
// and each line must read low exactly when at least one device pulls it.
module tb_i2c_bus;

  localparam int N = 3;

  logic [N-1:0] scl_low, sda_low;
  logic         scl, sda;
  int checks = 0, failures = 0;

  i2c_bus #(.N(N)) dut (.scl_low(scl_low), .sda_low(sda_low), .scl(scl), .sda(sda));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**N; a++) begin
      for (int b = 0; b < 2**N; b++) begin
        bit exp_scl, exp_sda;
        scl_low = N'(a);
        sda_low = N'(b);
        #1;
        exp_scl = 1'b1;
        exp_sda = 1'b1;
        for (int i = 0; i < N; i++) begin
          if ((a & (1 << i)) != 0) exp_scl = 1'b0;
          if ((b & (1 << i)) != 0) exp_sda = 1'b0;
        end
        checks += 2;
        if (scl !== exp_scl) begin failures++; $display("FAIL: scl_low=%b scl=%b", scl_low, scl); end
        if (sda !== exp_sda) begin failures++; $display("FAIL: sda_low=%b sda=%b", sda_low, sda); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
