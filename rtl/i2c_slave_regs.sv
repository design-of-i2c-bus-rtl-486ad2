// i2c_slave_regs: register file of the I2C slave device.
//
// 2**AW eight-bit registers, addressed by the slave's register pointer. The
// slave controller writes a received data byte through the write port and
// fetches the byte it is about to transmit through its read port. A second
// read port lets the peripheral logic behind the slave (or a test) look at
// any register without disturbing the bus side.
//
// Interface: clk; we/waddr/wdata (write on the rising clock edge);
// raddr/rdata and uaddr/udata (combinational reads).
// The registers are not reset. The specification gives an 8-bit register
// address, hence AW = 8; the two read ports and the lack of reset are this
// design's own choices.
module i2c_slave_regs #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  input  logic [AW-1:0] uaddr,
  output logic [7:0]    udata
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
  assign udata = mem[uaddr];

endmodule
