// i2c_top: an I2C bus with one master controller and one slave device.
//
// The master controller takes a transfer request from the host side (chip
// select, read/write, register address, data), serialises it onto SCL and
// SDA and returns the data it reads. The slave controller answers at
// address SLAVE_ADDR and reads and writes its register file. Both connect to
// the two open-drain lines through i2c_bus, which resolves them as a wired
// AND; the resolved levels are brought out as scl and sda so the bus can be
// watched. A second read port of the slave's register file (uaddr/udata)
// shows what the slave has stored.
//
// All blocks run on the one system clock `clk` with a synchronous
// active-high `reset`. Host-side handshakes and timing are those of
// i2c_master: pulse `chipselect` for one cycle while idle; `busy` stays high
// and `done` pulses once when the STOP has been sent.
//
// TARGET_ADDR is the device address the master calls and SLAVE_ADDR the one
// the slave answers to; both default to 1101000 as specified. They are
// separate parameters only so that a mismatch (and the NACK it causes) can
// be set up.
module i2c_top #(
  parameter int unsigned QDIV        = i2c_pkg::I2C_QDIV,
  parameter logic [6:0]  TARGET_ADDR = i2c_pkg::I2C_DEV_ADDR,
  parameter logic [6:0]  SLAVE_ADDR  = i2c_pkg::I2C_DEV_ADDR,
  parameter int unsigned AW          = 8,
  parameter int unsigned LEN_W       = 8
) (
  input  logic             clk,
  input  logic             reset,
  // host side of the master
  input  logic             chipselect,
  input  logic             readwrite,
  input  logic             readback,
  input  logic             skip_reg,
  input  logic [7:0]       addr_in,
  input  logic [LEN_W-1:0] nbytes,
  input  logic [7:0]       datain,
  output logic             data_taken,
  output logic [7:0]       dataout,
  output logic             data_valid,
  output logic             busy,
  output logic             done,
  output logic             ack_err,
  // bus lines and slave status
  output logic             scl,
  output logic             sda,
  output logic             slave_addressed,
  // register file view of the slave
  input  logic [AW-1:0]    uaddr,
  output logic [7:0]       udata
);

  logic          m_scl, m_sda, s_sda;
  logic          reg_we;
  logic [AW-1:0] reg_waddr, reg_raddr;
  logic [7:0]    reg_wdata, reg_rdata;

  i2c_master #(
    .DEV_ADDR(TARGET_ADDR),
    .QDIV    (QDIV),
    .LEN_W   (LEN_W)
  ) u_master (
    .clk        (clk),
    .rst        (reset),
    .start      (chipselect),
    .rw         (readwrite),
    .readback   (readback),
    .skip_reg   (skip_reg),
    .reg_addr   (addr_in),
    .nbytes     (nbytes),
    .wdata      (datain),
    .wdata_taken(data_taken),
    .rdata      (dataout),
    .rdata_valid(data_valid),
    .busy       (busy),
    .done       (done),
    .ack_err    (ack_err),
    .scl_o      (m_scl),
    .sda_o      (m_sda),
    .sda_i      (sda)
  );

  i2c_slave #(
    .DEV_ADDR(SLAVE_ADDR),
    .AW      (AW)
  ) u_slave (
    .clk      (clk),
    .rst      (reset),
    .scl_i    (scl),
    .sda_i    (sda),
    .sda_o    (s_sda),
    .reg_we   (reg_we),
    .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata),
    .reg_raddr(reg_raddr),
    .reg_rdata(reg_rdata),
    .addressed(slave_addressed)
  );

  i2c_slave_regs #(.AW(AW)) u_regs (
    .clk  (clk),
    .we   (reg_we),
    .waddr(reg_waddr),
    .wdata(reg_wdata),
    .raddr(reg_raddr),
    .rdata(reg_rdata),
    .uaddr(uaddr),
    .udata(udata)
  );

  // The slave never drives SCL.
  i2c_bus #(.N(2)) u_bus (
    .scl_low({1'b0, !m_scl}),
    .sda_low({!s_sda, !m_sda}),
    .scl    (scl),
    .sda    (sda)
  );

endmodule
