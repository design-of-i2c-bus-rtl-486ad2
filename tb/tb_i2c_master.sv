// tb_i2c_master: test of the I2C master controller against a bus-level
// slave model written here.
//
// The model watches SCL/SDA edges directly (no synchroniser), records every
// START, STOP, byte and master ACK/NACK it sees, answers the address
// 1101000 with ACK (or NACK when told to), and sends bytes from a queue when
// read. The test compares the recorded bus sequence with the one the
// protocol prescribes for each kind of transfer (write, burst write,
// pointer-write read, read-back, current-address read, NACKed transfers), the bytes the host gets
// back, the wdata handshake count, ack_err, and the transfer length in
// quarter periods.
module tb_i2c_master;

  localparam int unsigned Q = 10;
  localparam int EV_S = 256, EV_P = 257, EV_MACK = 258, EV_MNACK = 259;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;

  logic       start, rw, skip_reg, readback;
  logic [7:0] reg_addr, nbytes, wdata, rdata;
  logic       wdata_taken, rdata_valid, busy, done, ack_err;
  logic       scl_o, sda_o, sda_bus, model_sda;

  assign sda_bus = sda_o & model_sda;

  i2c_master #(.QDIV(Q)) dut (
    .clk(clk), .rst(rst), .start(start), .rw(rw), .readback(readback), .skip_reg(skip_reg),
    .reg_addr(reg_addr), .nbytes(nbytes), .wdata(wdata), .wdata_taken(wdata_taken),
    .rdata(rdata), .rdata_valid(rdata_valid), .busy(busy), .done(done),
    .ack_err(ack_err), .scl_o(scl_o), .sda_o(sda_o), .sda_i(sda_bus)
  );

  // ------------------------------------------------------ bus slave model
  int         log_q [$];
  logic [7:0] tx_q [$];
  bit         m_nack_addr = 1'b0;   // answer the address with NACK
  int         m_nack_byte = -1;     // NACK this written byte index (after address)
  typedef enum {B_IDLE, B_RX, B_RXACK, B_TX, B_TXACK} bstate_t;
  bstate_t    bst = B_IDLE;
  int         bits, nbyte;
  logic [7:0] sh;
  bit         rd_dir, mack, silent;

  initial model_sda = 1'b1;

  always @(negedge sda_bus) if (scl_o) begin
    log_q.push_back(EV_S);
    bst = B_RX; bits = 0; nbyte = 0; silent = 1'b0;
    model_sda = 1'b1;
  end
  always @(posedge sda_bus) if (scl_o) begin
    log_q.push_back(EV_P);
    bst = B_IDLE;
    model_sda = 1'b1;
  end
  always @(posedge scl_o) begin
    if (bst == B_RX && bits < 8) begin sh = {sh[6:0], sda_bus}; bits++; end
    if (bst == B_TXACK) mack = !sda_bus;
  end
  always @(negedge scl_o) begin
    case (bst)
      B_RX: if (bits == 8) begin
        log_q.push_back(int'(sh));
        if (nbyte == 0) rd_dir = sh[0];
        // After a NACK the model keeps recording bytes but answers none.
        if ((nbyte == 0 && (sh[7:1] != 7'b1101000 || m_nack_addr)) || nbyte == m_nack_byte)
          silent = 1'b1;
        if (!silent) model_sda = 1'b0;
        bst = B_RXACK;
      end
      B_RXACK: begin
        model_sda = 1'b1;
        bits = 0;
        if (nbyte == 0 && rd_dir && !silent) begin
          sh = (tx_q.size() != 0) ? tx_q.pop_front() : 8'hFF;
          model_sda = sh[7];
          bst = B_TX;
        end else bst = B_RX;
        nbyte++;
      end
      B_TX: begin
        bits++;
        if (bits == 8) begin model_sda = 1'b1; bst = B_TXACK; end
        else model_sda = sh[7 - bits];
      end
      B_TXACK: begin
        log_q.push_back(mack ? EV_MACK : EV_MNACK);
        if (mack) begin
          sh = (tx_q.size() != 0) ? tx_q.pop_front() : 8'hFF;
          bits = 0;
          model_sda = sh[7];
          bst = B_TX;
        end else bst = B_IDLE;
      end
      default: ;
    endcase
  end

  // -------------------------------------------------------- host handshake
  logic [7:0] wq [$];
  logic [7:0] rq [$];
  int         n_taken;
  always @(posedge clk) begin
    if (wdata_taken) begin
      n_taken++;
      #1 if (wq.size() != 0) void'(wq.pop_front());
      wdata = (wq.size() != 0) ? wq[0] : 8'h00;
    end
    if (rdata_valid) rq.push_back(rdata);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit r, input bit cur, input logic [7:0] ra, input int n,
                     output int cycles);
    log_q.delete(); rq.delete(); n_taken = 0;
    wdata = (wq.size() != 0) ? wq[0] : 8'h00;
    @(negedge clk);
    start = 1'b1; rw = r; skip_reg = cur; reg_addr = ra; nbytes = 8'(n);
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    check(!busy, "idle after done");
    check(scl_o && sda_o, "lines released after transfer");
  endtask

  task automatic expect_log(input int exp [$], input string what);
    bit same;
    same = (exp.size() == log_q.size());
    for (int i = 0; same && i < exp.size(); i++) same = (exp[i] == log_q[i]);
    check(same, {what, ": bus sequence"});
    if (!same) begin
      $write("  got:     "); foreach (log_q[i]) $write(" %0h", log_q[i]); $write("\n");
      $write("  expected:"); foreach (exp[i]) $write(" %0h", exp[i]); $write("\n");
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int exp [$];
    logic [7:0] d [$];
    start = 0; rw = 0; skip_reg = 0; readback = 0; reg_addr = 0; nbytes = 1; wdata = 0; n_taken = 0;
    rst = 1'b1;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(scl_o && sda_o && !busy, "idle after reset");

    // Single-byte write: S D0 reg data P.
    wq = '{8'h0F};
    run(1'b0, 1'b0, 8'h2D, 1, cyc);
    exp = '{EV_S, 'hD0, 'h2D, 'h0F, EV_P};
    expect_log(exp, "single write");
    check(!ack_err, "single write: no ack_err");
    check(n_taken == 1, "single write: one byte taken");
    check(cyc >= 4*Q*29 && cyc <= 4*Q*29 + 2, $sformatf("single write: %0d clocks", cyc));

    // Burst write of five random bytes.
    d.delete();
    for (int i = 0; i < 5; i++) d.push_back(8'($urandom));
    wq = d;
    run(1'b0, 1'b0, 8'h80, 5, cyc);
    exp = '{EV_S, 'hD0, 'h80};
    foreach (d[i]) exp.push_back(int'(d[i]));
    exp.push_back(EV_P);
    expect_log(exp, "burst write");
    check(n_taken == 5, $sformatf("burst write: %0d bytes taken", n_taken));
    check(cyc >= 4*Q*(2+9*7) && cyc <= 4*Q*(2+9*7) + 2, $sformatf("burst write: %0d clocks", cyc));

    // Read of three bytes with register address and repeated START.
    d.delete();
    for (int i = 0; i < 3; i++) d.push_back(8'($urandom));
    tx_q = d;
    run(1'b1, 1'b0, 8'h11, 3, cyc);
    exp = '{EV_S, 'hD0, 'h11, EV_S, 'hD1, EV_MACK, EV_MACK, EV_MNACK, EV_P};
    expect_log(exp, "read");
    check(rq.size() == 3 && rq[0] == d[0] && rq[1] == d[1] && rq[2] == d[2], "read: data returned");
    check(cyc >= 4*Q*(3+9*6) && cyc <= 4*Q*(3+9*6) + 2, $sformatf("read: %0d clocks", cyc));

    // Read-back: register address, one data byte, repeated START, two reads.
    wq = '{8'h3C};
    tx_q = '{8'h3C, 8'h99};
    readback = 1'b1;
    run(1'b1, 1'b0, 8'h22, 2, cyc);
    readback = 1'b0;
    exp = '{EV_S, 'hD0, 'h22, 'h3C, EV_S, 'hD1, EV_MACK, EV_MNACK, EV_P};
    expect_log(exp, "read-back");
    check(n_taken == 1, "read-back: one byte written");
    check(rq.size() == 2 && rq[0] == 8'h3C && rq[1] == 8'h99, "read-back: data returned");
    check(cyc >= 4*Q*(3+9*6) && cyc <= 4*Q*(3+9*6) + 2, $sformatf("read-back: %0d clocks", cyc));

    // Current-address read of one byte.
    tx_q = '{8'hA6};
    run(1'b1, 1'b1, 8'h00, 1, cyc);
    exp = '{EV_S, 'hD1, EV_MNACK, EV_P};
    expect_log(exp, "current-address read");
    check(rq.size() == 1 && rq[0] == 8'hA6, "current-address read: data");
    check(cyc >= 4*Q*(2+9*2) && cyc <= 4*Q*(2+9*2) + 2, $sformatf("current-address read: %0d clocks", cyc));

    // Address NACK: the master stops at once and flags the error.
    m_nack_addr = 1'b1;
    wq = '{8'h55};
    run(1'b0, 1'b0, 8'h01, 1, cyc);
    exp = '{EV_S, 'hD0, EV_P};
    expect_log(exp, "address NACK");
    check(ack_err, "address NACK: ack_err");
    check(n_taken == 0, "address NACK: no data taken");
    check(cyc >= 4*Q*11 && cyc <= 4*Q*11 + 2, $sformatf("address NACK: %0d clocks", cyc));
    m_nack_addr = 1'b0;

    // Data NACK on the second data byte of a three-byte burst.
    m_nack_byte = 3;
    wq = '{8'h01, 8'h02, 8'h03};
    run(1'b0, 1'b0, 8'h40, 3, cyc);
    exp = '{EV_S, 'hD0, 'h40, 'h01, 'h02, EV_P};
    expect_log(exp, "data NACK");
    check(ack_err, "data NACK: ack_err");
    m_nack_byte = -1;

    // The error flag clears with the next transfer.
    wq = '{8'h77};
    run(1'b0, 1'b0, 8'h02, 1, cyc);
    check(!ack_err, "ack_err cleared by next transfer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
