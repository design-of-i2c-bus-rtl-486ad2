// i2c_tick_gen: quarter-period tick generator for the I2C master.
//
// The master divides every SCL period into four quarters (SCL low twice,
// SCL high twice) and advances one quarter per tick. This block counts
// system clocks and raises `tick` for one cycle every QDIV cycles while
// `en` is high. While `en` is low the counter is held at zero, so the first
// tick after enabling comes exactly QDIV cycles later, which makes the bus
// timing of a transfer a fixed multiple of QDIV.
//
// Interface: clk, synchronous active-high rst, en, tick (one-cycle pulse).
// Timing: with en held high, tick is high in cycles QDIV, 2*QDIV, ...
// counted from the first cycle en was sampled high.
// The divider itself is this design's own choice; the specification only
// says the controller runs from the system clock input.
module i2c_tick_gen #(
  parameter int unsigned QDIV = i2c_pkg::I2C_QDIV
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick
);

  localparam int unsigned CW = (QDIV > 1) ? $clog2(QDIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en || tick) cnt <= '0;
    else                    cnt <= cnt + 1'b1;
  end

  assign tick = en && (cnt == CW'(QDIV - 1));

  initial begin
    assert (QDIV >= 2) else $error("i2c_tick_gen: QDIV must be at least 2");
  end

endmodule
