// i2c_pkg: constants shared by the I2C master controller, the slave
// controller and the top level.
//
// The 7-bit device address 1101000 and the two address bytes built from it
// (11010000 for a write, 11010001 for a read) are the ones the design is
// specified with. The system clock and SCL rates are this design's own
// choice: a 50 MHz board clock and the 100 kHz standard-mode SCL, which
// gives a quarter SCL period of 125 system clocks.
package i2c_pkg;

  // 7-bit slave device address.
  localparam logic [6:0] I2C_DEV_ADDR = 7'b1101000;

  // Direction bit appended to the device address.
  localparam logic I2C_WRITE = 1'b0;
  localparam logic I2C_READ  = 1'b1;

  // Default clocking: system clock and SCL frequency in Hz.
  localparam int unsigned I2C_CLK_HZ = 50_000_000;
  localparam int unsigned I2C_SCL_HZ = 100_000;
  // System clocks per quarter SCL period.
  localparam int unsigned I2C_QDIV = I2C_CLK_HZ / (4 * I2C_SCL_HZ);

endpackage
