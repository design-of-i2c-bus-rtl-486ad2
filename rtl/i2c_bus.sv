// i2c_bus: the two open-drain I2C lines, SCL and SDA.
//
// Every device on the bus can only pull a line low; a pull-up resistor
// brings the line high when nobody pulls. The resolved level of each line is
// therefore the wired AND of all drivers: low if any device pulls it low,
// high otherwise. This block computes that resolution for N devices so that
// the rest of the design stays in plain two-state logic.
//
// Interface: scl_low[i] / sda_low[i] are high when device i pulls the line
// low; scl / sda are the resolved line levels. Purely combinational.
// Open-drain lines with pull-ups follow the specification; modelling them as
// a wired AND of pull-down requests is this design's own choice.
module i2c_bus #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] scl_low,
  input  logic [N-1:0] sda_low,
  output logic         scl,
  output logic         sda
);

  assign scl = ~|scl_low;
  assign sda = ~|sda_low;

endmodule
