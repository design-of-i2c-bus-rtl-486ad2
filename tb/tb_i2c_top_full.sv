// tb_i2c_top_full: one complete write and read-back through the system at
// its default parameters (100 kHz SCL from a 50 MHz clock, address 1101000,
// 256 registers): write 00001111 to register 00101101; read it back with a
// register-address write and repeated START; then write 11110000 to the
// same register and read it back in one transfer (register address, data,
// repeated START, read). Checks the data, the register contents and the
// length of every transfer.
module tb_i2c_top_full;

  localparam int unsigned Q = i2c_pkg::I2C_QDIV;

  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz
  logic reset;
  int checks = 0, failures = 0;

  logic       cs, rwb, rb;
  logic [7:0] din;
  logic [7:0] ra, dout, udata, uaddr;
  logic       taken, dvalid, busy, done, aerr, scl, sda, saddr;
  logic [7:0] got;

  i2c_top u_dut (
    .clk(clk), .reset(reset), .chipselect(cs), .readwrite(rwb), .readback(rb), .skip_reg(1'b0),
    .addr_in(ra), .nbytes(8'd1), .datain(din), .data_taken(taken), .dataout(dout),
    .data_valid(dvalid), .busy(busy), .done(done), .ack_err(aerr), .scl(scl),
    .sda(sda), .slave_addressed(saddr), .uaddr(uaddr), .udata(udata)
  );

  always @(posedge clk) if (dvalid) got <= dout;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit rd, output int cycles);
    @(negedge clk); cs = 1'b1; rwb = rd; ra = 8'h2D;
    @(negedge clk); cs = 1'b0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    cs = 0; rwb = 0; rb = 0; din = 8'h0F; ra = 0; uaddr = 8'h2D; got = 0;
    reset = 1'b1; repeat (5) @(negedge clk); reset = 1'b0; repeat (5) @(negedge clk);
    xfer(1'b0, cyc);
    check(!aerr, "write acknowledged");
    check(cyc >= 4*Q*29 && cyc <= 4*Q*29 + 3, $sformatf("write %0d clocks, expected %0d", cyc, 4*Q*29));
    #1 check(udata == 8'h0F, "register 2D holds 0F");
    xfer(1'b1, cyc);
    @(negedge clk);
    check(!aerr, "read acknowledged");
    check(got == 8'h0F, $sformatf("read back %02h", got));
    check(cyc >= 4*Q*39 && cyc <= 4*Q*39 + 3, $sformatf("read %0d clocks, expected %0d", cyc, 4*Q*39));
    din = 8'hF0; rb = 1'b1;
    xfer(1'b1, cyc);
    @(negedge clk);
    check(!aerr, "read-back acknowledged");
    check(got == 8'hF0, $sformatf("read-back %02h, expected F0", got));
    #1 check(udata == 8'hF0, "register 2D holds F0");
    check(cyc >= 4*Q*48 && cyc <= 4*Q*48 + 3, $sformatf("read-back %0d clocks, expected %0d", cyc, 4*Q*48));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
