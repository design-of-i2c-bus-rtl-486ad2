// tb_i2c_tick_gen: test of the quarter-period tick generator.
//
// Checks, at the default divisor and at a small one, that the first tick
// comes exactly QDIV clocks after enabling, that ticks then repeat every
// QDIV clocks and last one cycle, and that no tick comes while disabled.
module tb_i2c_tick_gen;

  localparam int unsigned QD = i2c_pkg::I2C_QDIV;
  localparam int unsigned QS = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, en;
  logic tick_d, tick_s;

  int checks = 0, failures = 0;

  i2c_tick_gen                dut_d (.clk(clk), .rst(rst), .en(en), .tick(tick_d));
  i2c_tick_gen #(.QDIV(QS))   dut_s (.clk(clk), .rst(rst), .en(en), .tick(tick_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, nd, ns, last_d, last_s;
    bit bad_d, bad_s;
    rst = 1'b1; en = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(!tick_d && !tick_s, "no tick while disabled");
    nd = 0; ns = 0; last_d = 0; last_s = 0; bad_d = 0; bad_s = 0;
    en = 1'b1;
    for (cyc = 1; cyc <= 5 * QD; cyc++) begin
      if (tick_d) begin
        nd++;
        if (cyc - last_d != int'(QD)) bad_d = 1'b1;
        last_d = cyc;
      end
      if (tick_s) begin
        ns++;
        if (cyc - last_s != int'(QS)) bad_s = 1'b1;
        last_s = cyc;
      end
      @(negedge clk);
    end
    check(nd == 5, $sformatf("default divisor: %0d ticks in %0d clocks, expected 5", nd, 5 * QD));
    check(!bad_d, "default divisor: tick spacing");
    check(ns == int'(5 * QD / QS), $sformatf("small divisor: %0d ticks, expected %0d", ns, 5 * QD / QS));
    check(!bad_s, "small divisor: tick spacing");
    en = 1'b0;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      if (tick_d || tick_s) bad_d = 1'b1;
    end
    check(!bad_d, "no tick after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
