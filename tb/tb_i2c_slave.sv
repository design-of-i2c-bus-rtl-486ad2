// tb_i2c_slave: test of the I2C slave controller, driven by a bit-banged
// bus master written here, with the register file modelled as an array.
//
// Checks: ACK of its own address and silence (NACK) for another one; the
// register pointer set by the first written byte; data bytes written to
// consecutive registers; reads starting at the pointer and continuing while
// the master acknowledges; a read without a pointer write starting where
// the last access left the pointer; a STOP in the middle of a byte aborting
// it; and the three-clock delay from a falling SCL edge to the ACK.
module tb_i2c_slave;

  localparam int H = 8;   // SCL half period in system clocks

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;

  logic       scl, m_sda, s_sda, sda;
  logic       reg_we, addressed;
  logic [7:0] reg_waddr, reg_wdata, reg_raddr, reg_rdata;
  logic [7:0] mem [256];
  int         n_writes;

  assign sda = m_sda & s_sda;
  assign reg_rdata = mem[reg_raddr];
  always @(posedge clk) if (reg_we) begin
    mem[reg_waddr] <= reg_wdata;
    n_writes++;
  end

  i2c_slave dut (
    .clk(clk), .rst(rst), .scl_i(scl), .sda_i(sda), .sda_o(s_sda),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .reg_raddr(reg_raddr), .reg_rdata(reg_rdata), .addressed(addressed)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic bus_start();
    m_sda = 1'b1; wait_clk(H);
    scl = 1'b1;   wait_clk(H);
    m_sda = 1'b0; wait_clk(H);
    scl = 1'b0;   wait_clk(H);
  endtask

  task automatic bus_stop();
    m_sda = 1'b0; wait_clk(H);
    scl = 1'b1;   wait_clk(H);
    m_sda = 1'b1; wait_clk(H);
  endtask

  task automatic send_byte(input logic [7:0] b, output bit ack, output int ack_delay);
    ack_delay = -1;
    for (int i = 7; i >= 0; i--) begin
      m_sda = b[i]; wait_clk(H / 2);
      scl = 1'b1;   wait_clk(H);
      scl = 1'b0;
      // After the eighth bit, measure how long after SCL fell the slave
      // pulls SDA.
      for (int k = 1; k <= H / 2; k++) begin
        @(negedge clk);
        if (i == 0 && !s_sda && ack_delay < 0) ack_delay = k;
      end
    end
    m_sda = 1'b1; wait_clk(H / 2);
    scl = 1'b1;   wait_clk(H / 2);
    ack = !sda;   wait_clk(H / 2);
    scl = 1'b0;   wait_clk(H / 2);
  endtask

  task automatic recv_byte(input bit ack, output logic [7:0] b);
    m_sda = 1'b1;
    for (int i = 7; i >= 0; i--) begin
      wait_clk(H / 2);
      scl = 1'b1; wait_clk(H / 2);
      b[i] = sda; wait_clk(H / 2);
      scl = 1'b0; wait_clk(H / 2);
    end
    m_sda = !ack; wait_clk(H / 2);
    scl = 1'b1;   wait_clk(H);
    scl = 1'b0;   wait_clk(H / 2);
    m_sda = 1'b1;
  endtask

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ack;
    int dly, w0;
    logic [7:0] b, d [4];
    scl = 1'b1; m_sda = 1'b1; n_writes = 0;
    foreach (mem[i]) mem[i] = 8'(i ^ 8'h5A);
    rst = 1'b1; wait_clk(4); rst = 1'b0; wait_clk(4);
    check(s_sda && !addressed, "released after reset");

    // Write: pointer 0x2D, data 0x0F.
    bus_start();
    send_byte(8'hD0, ack, dly);
    check(ack, "address+W acknowledged");
    check(dly == 3, $sformatf("ACK %0d clocks after SCL fell, expected 3", dly));
    check(addressed, "addressed after address match");
    send_byte(8'h2D, ack, dly);
    check(ack, "register address acknowledged");
    send_byte(8'h0F, ack, dly);
    check(ack, "data acknowledged");
    bus_stop();
    wait_clk(4);
    check(mem[8'h2D] == 8'h0F, "reg[2D] written with 0F");
    check(!addressed, "released after STOP");

    // Burst write of four bytes from 0xFE: wraps to 0x00, 0x01.
    foreach (d[i]) d[i] = 8'($urandom);
    bus_start();
    send_byte(8'hD0, ack, dly);
    send_byte(8'hFE, ack, dly);
    foreach (d[i]) begin
      send_byte(d[i], ack, dly);
      check(ack, "burst byte acknowledged");
    end
    bus_stop();
    wait_clk(4);
    check(mem[8'hFE] == d[0] && mem[8'hFF] == d[1] && mem[8'h00] == d[2] && mem[8'h01] == d[3],
          "burst written with wrap-around");

    // Read with pointer write and repeated START: 0xFE, 0xFF, 0x00.
    bus_start();
    send_byte(8'hD0, ack, dly);
    send_byte(8'hFE, ack, dly);
    bus_start();
    send_byte(8'hD1, ack, dly);
    check(ack, "address+R acknowledged");
    recv_byte(1'b1, b); check(b == d[0], $sformatf("read %02h expected %02h", b, d[0]));
    recv_byte(1'b1, b); check(b == d[1], $sformatf("read %02h expected %02h", b, d[1]));
    recv_byte(1'b0, b); check(b == d[2], $sformatf("read %02h expected %02h", b, d[2]));
    check(s_sda, "SDA released after master NACK");
    bus_stop();

    // Read without a pointer write starts at the last register read, 0x00.
    bus_start();
    send_byte(8'hD1, ack, dly);
    recv_byte(1'b1, b);
    check(b == d[2], $sformatf("current-address read %02h expected %02h", b, d[2]));
    recv_byte(1'b0, b);
    check(b == d[3], $sformatf("current-address read %02h expected %02h", b, d[3]));
    bus_stop();

    // Write one byte, then repeated START and read: the byte just written.
    bus_start();
    send_byte(8'hD0, ack, dly);
    send_byte(8'h50, ack, dly);
    send_byte(8'hC3, ack, dly);
    bus_start();
    send_byte(8'hD1, ack, dly);
    check(ack, "read-back address acknowledged");
    recv_byte(1'b0, b);
    check(b == 8'hC3 && mem[8'h50] == 8'hC3, $sformatf("read-back %02h expected C3", b));
    bus_stop();

    // Another address: no ACK, no register write.
    w0 = n_writes;
    bus_start();
    send_byte(8'hA0, ack, dly);
    check(!ack, "foreign address not acknowledged");
    send_byte(8'h10, ack, dly);
    check(!ack, "bytes after foreign address not acknowledged");
    send_byte(8'h99, ack, dly);
    bus_stop();
    wait_clk(4);
    check(n_writes == w0, "no write for foreign address");

    // STOP after four bits of a data byte: nothing written.
    w0 = n_writes;
    bus_start();
    send_byte(8'hD0, ack, dly);
    send_byte(8'h30, ack, dly);
    for (int i = 0; i < 4; i++) begin
      m_sda = 1'b1; wait_clk(H / 2); scl = 1'b1; wait_clk(H); scl = 1'b0; wait_clk(H / 2);
    end
    bus_stop();
    wait_clk(4);
    check(n_writes == w0, "aborted byte not written");
    check(!addressed, "idle after aborted byte");

    // The pointer was set to 0x30: a current-address read returns reg[30].
    bus_start();
    send_byte(8'hD1, ack, dly);
    recv_byte(1'b0, b);
    check(b == mem[8'h30], $sformatf("read after abort %02h expected %02h", b, mem[8'h30]));
    bus_stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
