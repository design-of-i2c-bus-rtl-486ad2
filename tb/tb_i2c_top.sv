// tb_i2c_top: end-to-end test of the I2C master/slave system.
//
// u_dut is the system at its default parameters (address 1101000, 100 kHz
// SCL from 50 MHz). The test writes single bytes and bursts, reads them
// back with a register-address write followed by a repeated START, writes
// and reads back in one transfer, reads with the pointer left where the
// previous access put it, and runs a series
// of random transfers. Every register written is compared with a reference
// copy kept here, every byte read with that copy, and the length of each
// transfer with the bit count worked out from the protocol.
// u_bad calls a device address that nobody answers, so the master must see
// NACK, set ack_err and end the transfer with STOP.
// The bus monitor counts START, repeated START and STOP conditions and each
// mechanism exercised; a mechanism that never happens is a failure.
module tb_i2c_top;

  localparam int unsigned Q      = i2c_pkg::I2C_QDIV;
  localparam int unsigned Q_BAD  = 8;

  logic clk = 1'b0;
  logic reset;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- u_dut
  logic       cs, rwb, skip, rb;
  logic [7:0] ra, nb, din, dout, udata;
  logic       taken, dvalid, busy, done, aerr, scl, sda, saddr;
  logic [7:0] uaddr;

  i2c_top u_dut (
    .clk(clk), .reset(reset), .chipselect(cs), .readwrite(rwb), .readback(rb), .skip_reg(skip),
    .addr_in(ra), .nbytes(nb), .datain(din), .data_taken(taken), .dataout(dout),
    .data_valid(dvalid), .busy(busy), .done(done), .ack_err(aerr), .scl(scl),
    .sda(sda), .slave_addressed(saddr), .uaddr(uaddr), .udata(udata)
  );

  // ---------------------------------------------------------------- u_bad
  logic       b_cs, b_taken, b_dvalid, b_busy, b_done, b_aerr, b_scl, b_sda, b_saddr;
  logic [7:0] b_dout, b_udata;

  i2c_top #(.QDIV(Q_BAD), .TARGET_ADDR(7'h69)) u_bad (
    .clk(clk), .reset(reset), .chipselect(b_cs), .readwrite(1'b0), .readback(1'b0), .skip_reg(1'b0),
    .addr_in(8'h10), .nbytes(8'd1), .datain(8'hA5), .data_taken(b_taken),
    .dataout(b_dout), .data_valid(b_dvalid), .busy(b_busy), .done(b_done),
    .ack_err(b_aerr), .scl(b_scl), .sda(b_sda), .slave_addressed(b_saddr),
    .uaddr(8'h00), .udata(b_udata)
  );

  // ------------------------------------------------------- data handshake
  logic [7:0] wbuf [256];
  int         widx;
  logic       wclr;
  logic [7:0] rbuf [$];
  assign din = wbuf[widx[7:0]];
  always_ff @(posedge clk) begin
    if (wclr) widx <= 0;
    else if (taken) widx <= widx + 1;
    if (dvalid) rbuf.push_back(dout);
  end

  // Reference copy of the slave registers and pointer.
  logic [7:0] refmem [256];
  bit         refvalid [256];
  logic [7:0] refptr;

  // ------------------------------------------------------------ bus monitor
  int n_start = 0, n_stop = 0, n_rstart = 0;
  int n_nack_addr = 0, n_master_nack = 0, n_master_ack = 0;
  int n_burst = 0, n_wrap = 0, n_cur_read = 0, n_write = 0, n_read = 0, n_readback = 0;
  logic scl_q = 1'b1, sda_q = 1'b1;
  bit   in_xfer = 1'b0;
  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin
      if (in_xfer) n_rstart++; else n_start++;
      in_xfer = 1'b1;
    end
    if (scl && scl_q && !sda_q && sda) begin
      n_stop++;
      in_xfer = 1'b0;
    end
  end

  // ------------------------------------------------------------------ tasks
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One transfer on u_dut; returns the number of clocks from the start
  // request to done.
  task automatic xfer(input bit rd, input bit cur, input logic [7:0] addr,
                      input int n, output int cycles);
    int t0;
    rbuf.delete();
    wclr = 1'b1;
    @(negedge clk);
    wclr = 1'b0;
    cs = 1'b1; rwb = rd; skip = cur; ra = addr; nb = 8'(n);
    @(negedge clk);
    cs = 1'b0;
    t0 = 0;
    while (!done) begin
      @(negedge clk);
      t0++;
    end
    cycles = t0;
    repeat (3) @(negedge clk);
  endtask

  task automatic do_write(input logic [7:0] addr, input int n);
    int cyc, expect_cyc;
    for (int i = 0; i < n; i++) wbuf[i] = 8'($urandom);
    xfer(1'b0, 1'b0, addr, n, cyc);
    expect_cyc = 4 * Q * (2 + 9 * (2 + n));
    check(cyc >= expect_cyc && cyc <= expect_cyc + 3,
          $sformatf("write length %0d clocks, expected %0d", cyc, expect_cyc));
    check(!aerr, "write acknowledged");
    check(widx == n, $sformatf("write consumed %0d bytes, expected %0d", widx, n));
    for (int i = 0; i < n; i++) begin
      logic [7:0] a;
      a = addr + 8'(i);
      if (a < addr) n_wrap++;
      refmem[a] = wbuf[i];
      refvalid[a] = 1'b1;
      uaddr = a;
      #1;
      check(udata == wbuf[i], $sformatf("reg[%02h]=%02h expected %02h", a, udata, wbuf[i]));
    end
    refptr = addr + 8'(n - 1);
    n_write++;
    if (n > 1) n_burst++;
  endtask

  // Read-back: write one byte to addr, then read n bytes from addr on.
  task automatic do_readback(input logic [7:0] addr, input int n);
    int cyc, expect_cyc;
    logic [7:0] a;
    wbuf[0] = 8'($urandom);
    rb = 1'b1;
    xfer(1'b1, 1'b0, addr, n, cyc);
    rb = 1'b0;
    refmem[addr] = wbuf[0];
    refvalid[addr] = 1'b1;
    expect_cyc = 4 * Q * (3 + 9 * (4 + n));
    check(cyc >= expect_cyc && cyc <= expect_cyc + 3,
          $sformatf("read-back length %0d clocks, expected %0d", cyc, expect_cyc));
    check(!aerr, "read-back acknowledged");
    check(widx == 1, "read-back wrote one byte");
    check(rbuf.size() == n, $sformatf("read-back returned %0d bytes, expected %0d", rbuf.size(), n));
    check(rbuf.size() > 0 && rbuf[0] == wbuf[0], "read-back returns the byte just written");
    a = addr;
    for (int i = 0; i < n && i < rbuf.size(); i++) begin
      if (refvalid[a])
        check(rbuf[i] == refmem[a], $sformatf("read-back reg[%02h]=%02h expected %02h", a, rbuf[i], refmem[a]));
      if (a == 8'hFF && i < n - 1) n_wrap++;
      a++;
    end
    refptr = a - 8'd1;
    n_read++;
    n_readback++;
    n_master_nack++;
    n_master_ack += n - 1;
    if (n > 1) n_burst++;
  endtask

  task automatic do_read(input bit cur, input logic [7:0] addr, input int n);
    int cyc, expect_cyc;
    logic [7:0] a;
    xfer(1'b1, cur, addr, n, cyc);
    expect_cyc = cur ? 4 * Q * (2 + 9 * (1 + n)) : 4 * Q * (3 + 9 * (3 + n));
    check(cyc >= expect_cyc && cyc <= expect_cyc + 3,
          $sformatf("read length %0d clocks, expected %0d", cyc, expect_cyc));
    check(!aerr, "read acknowledged");
    check(rbuf.size() == n, $sformatf("read returned %0d bytes, expected %0d", rbuf.size(), n));
    a = cur ? refptr : addr;
    for (int i = 0; i < n && i < rbuf.size(); i++) begin
      if (refvalid[a])
        check(rbuf[i] == refmem[a], $sformatf("read reg[%02h]=%02h expected %02h", a, rbuf[i], refmem[a]));
      if (a == 8'hFF && i < n - 1) n_wrap++;
      a++;
    end
    refptr = a - 8'd1;
    n_read++;
    n_master_nack++;
    n_master_ack += n - 1;
    if (cur) n_cur_read++;
    if (n > 1) n_burst++;
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- stimulus
  initial begin
    int cyc, nstart0;
    cs = 0; rwb = 0; rb = 0; skip = 0; ra = 0; nb = 1; uaddr = 0; b_cs = 0; wclr = 1'b1;
    refptr = 0;
    for (int i = 0; i < 256; i++) refvalid[i] = 1'b0;
    reset = 1'b1;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    check(scl && sda && !busy, "bus idle after reset");

    // The example transfer: data 00001111 to register 00101101.
    wbuf[0] = 8'h0F;
    xfer(1'b0, 1'b0, 8'h2D, 1, cyc);
    uaddr = 8'h2D; #1;
    check(udata == 8'h0F, "reg[2D] holds 0F");
    check(cyc >= 4*Q*29 && cyc <= 4*Q*29 + 3, $sformatf("single write %0d clocks", cyc));
    refmem[8'h2D] = 8'h0F; refvalid[8'h2D] = 1'b1; refptr = 8'h2D; n_write++;

    // Read it back: write pointer, repeated START, read.
    do_read(1'b0, 8'h2D, 1);
    check(rbuf.size() == 1 && rbuf[0] == 8'h0F, "read back 0F from reg[2D]");

    // Burst write across the end of the register file, read back.
    do_write(8'hFE, 4);
    do_read(1'b0, 8'hFE, 3);
    // Current-address read starts at the pointer (the last register read).
    do_read(1'b1, 8'h00, 2);
    // Read-back of a byte just written.
    do_readback(8'h2D, 1);
    check(u_dut.u_slave.ptr == refptr, "slave pointer follows reads");

    // Random transfers.
    for (int t = 0; t < 24; t++) begin
      logic [7:0] a;
      int n;
      a = 8'($urandom);
      n = 1 + int'($urandom_range(0, 4));
      case ($urandom_range(0, 3))
        0: do_write(a, n);
        1: do_read(1'b0, a, n);
        2: do_readback(a, n);
        default: do_read(1'b1, a, n);
      endcase
    end

    // NACK: u_bad calls address 1101001, which its slave does not answer.
    nstart0 = n_start;
    @(negedge clk); b_cs = 1'b1;
    @(negedge clk); b_cs = 1'b0;
    cyc = 0;
    while (!b_done && cyc < 100000) begin @(negedge clk); cyc++; end
    check(b_done, "NACKed transfer ends");
    check(b_aerr, "ack_err set after NACK");
    check(cyc >= 4*Q_BAD*11 && cyc <= 4*Q_BAD*11 + 3,
          $sformatf("NACKed transfer %0d clocks, expected %0d", cyc, 4*Q_BAD*11));
    check(!b_saddr, "unaddressed slave stays idle");
    if (b_aerr) n_nack_addr++;
    repeat (4) @(negedge clk);
    check(b_scl && b_sda && !b_busy, "bus released after NACK");

    // Every START of u_dut ended with a STOP.
    check(n_start == n_stop, $sformatf("%0d STARTs, %0d STOPs", n_start, n_stop));

    $display("mechanisms: writes=%0d reads=%0d readbacks=%0d bursts=%0d repeated_starts=%0d cur_reads=%0d",
             n_write, n_read, n_readback, n_burst, n_rstart, n_cur_read);
    $display("            master_acks=%0d master_nacks=%0d slave_nacks=%0d wraps=%0d starts=%0d stops=%0d",
             n_master_ack, n_master_nack, n_nack_addr, n_wrap, n_start, n_stop);
    check(n_write > 0,       "write transfers happened");
    check(n_read > 0,        "read transfers happened");
    check(n_burst > 0,       "burst transfers happened");
    check(n_rstart > 0,      "repeated START happened");
    check(n_cur_read > 0,    "current-address read happened");
    check(n_readback > 0,    "read-back transfer happened");
    check(n_master_ack > 0,  "master ACK of a read byte happened");
    check(n_master_nack > 0, "master NACK of the last read byte happened");
    check(n_nack_addr > 0,   "slave NACK happened");
    check(n_wrap > 0,        "register pointer wrap happened");
    check(n_stop > 0,        "STOP happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
