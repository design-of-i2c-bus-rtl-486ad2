// tb_i2c_slave_regs: test of the slave register file.
//
// Writes every register with a value from a reference array, then reads
// all of them through both read ports, then overwrites a random subset and
// checks that only those changed and that a write appears on the read
// ports after the clock edge that performs it.
module tb_i2c_slave_regs;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [7:0] waddr, wdata, raddr, rdata, uaddr, udata;
  logic [7:0] ref_mem [256];
  int checks = 0, failures = 0;

  i2c_slave_regs dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .uaddr(uaddr), .udata(udata)
  );

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
    we = 1'b0; waddr = 0; wdata = 0; raddr = 0; uaddr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ref_mem[i] = 8'($urandom);
      we = 1'b1; waddr = 8'(i); wdata = ref_mem[i];
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); uaddr = 8'(255 - i);
      #1;
      check(rdata == ref_mem[i], $sformatf("rdata[%0d]", i));
      check(udata == ref_mem[255 - i], $sformatf("udata[%0d]", 255 - i));
    end
    // Overwrite a few registers; the new value appears after the edge.
    for (int k = 0; k < 40; k++) begin
      logic [7:0] a, v;
      a = 8'($urandom); v = ~ref_mem[a];
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = v; raddr = a; uaddr = a;
      #1;
      check(rdata == ref_mem[a], "old value readable before the edge");
      ref_mem[a] = v;
      @(negedge clk); we = 1'b0;
      #1;
      check(rdata == v && udata == v, "new value after the edge");
    end
    for (int i = 0; i < 256; i++) begin
      uaddr = 8'(i); #1;
      check(udata == ref_mem[i], $sformatf("final udata[%0d]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
