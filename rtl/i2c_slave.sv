// i2c_slave: I2C slave device controller with a register pointer.
//
// The slave watches SCL and SDA through two-flop synchronisers and runs on
// the system clock, so it needs no clock of its own from the bus. From the
// synchronised lines it detects START (SDA falls while SCL is high), STOP
// (SDA rises while SCL is high) and the rising and falling edges of SCL.
// It shifts a bit in on every rising SCL edge, MSB first, and changes its
// own SDA output only after a falling SCL edge.
//
// The first byte after a START is the address byte. If its upper seven bits
// equal DEV_ADDR the slave pulls SDA low in the ninth clock (ACK), otherwise
// it stays silent until the next START.
//
// The register pointer always holds the last register addressed. After
// address + write the next byte is loaded into the pointer; the first data
// byte that follows is written to that register, and each further one to
// the next register up (the pointer moves along). After address + read the
// slave sends the register the pointer holds, and for every ACK from the
// master moves the pointer up by one and sends that register; a NACK ends
// the read. So a read right after a write returns the byte just written,
// and a read that is not preceded by a pointer write starts at the last
// register the pointer held. STOP or a new START aborts whatever is in
// progress.
//
// Interface: clk, synchronous active-high rst (clears the pointer), scl_i
// and sda_i (resolved bus lines), sda_o (0 pulls SDA low, 1 releases it),
// the register-file ports reg_we/reg_waddr/reg_wdata and reg_raddr/
// reg_rdata (combinational read), and `addressed`, high while the slave
// takes part in a transfer. Timing: sda_o changes three system clocks after
// the SCL edge that causes it, so SCL must stay in each level for well over
// three system clocks.
//
// Address 1101000, the register pointer and its read-back rules, and the
// per-byte ACK follow the specification. The oversampling structure, the
// way the pointer moves through a burst (wrapping at the end of the
// register file) and ignoring bytes after a non-matching address are this
// design's own choices. The
// slave never stretches SCL.
module i2c_slave #(
  parameter logic [6:0]  DEV_ADDR = i2c_pkg::I2C_DEV_ADDR,
  parameter int unsigned AW       = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          scl_i,
  input  logic          sda_i,
  output logic          sda_o,
  output logic          reg_we,
  output logic [AW-1:0] reg_waddr,
  output logic [7:0]    reg_wdata,
  output logic [AW-1:0] reg_raddr,
  input  logic [7:0]    reg_rdata,
  output logic          addressed
);

  import i2c_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE,    // not addressed, SDA released
    S_RX,      // receiving a byte
    S_RX_ACK,  // driving ACK for a received byte
    S_TX,      // sending a register byte
    S_TX_ACK   // reading the master's ACK / NACK
  } sstate_t;

  typedef enum logic [1:0] {
    B_ADDR,    // address byte
    B_REG,     // register pointer byte
    B_DATA     // data byte
  } byte_t;

  logic [1:0]    scl_sync, sda_sync;
  logic          scl_s, sda_s, scl_p, sda_p;
  logic          start_det, stop_det, scl_rise, scl_fall;

  sstate_t       state;
  byte_t         kind;
  logic [3:0]    cnt;
  logic [7:0]    shreg;
  logic [AW-1:0] ptr;
  logic          rw_q;
  logic          mack;
  logic          adv;       // next write goes to ptr + 1
  logic          drive_low;

  // Synchronise the bus lines and keep the previous synchronised level.
  always_ff @(posedge clk) begin
    if (rst) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_p    <= 1'b1;
      sda_p    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl_i};
      sda_sync <= {sda_sync[0], sda_i};
      scl_p    <= scl_s;
      sda_p    <= sda_s;
    end
  end

  assign scl_s     = scl_sync[1];
  assign sda_s     = sda_sync[1];
  assign start_det = scl_s && scl_p && sda_p && !sda_s;
  assign stop_det  = scl_s && scl_p && !sda_p && sda_s;
  assign scl_rise  = scl_s && !scl_p;
  assign scl_fall  = !scl_s && scl_p;

  assign sda_o     = !drive_low;
  assign addressed = (state != S_IDLE) && !(state == S_RX && kind == B_ADDR);

  // A received data byte is written when its ACK starts.
  assign reg_we    = (state == S_RX) && scl_fall && (cnt == 4'd8) && (kind == B_DATA);
  assign reg_waddr = adv ? ptr + 1'b1 : ptr;
  assign reg_wdata = shreg;
  // While waiting for the master's ACK, look ahead to the next register.
  assign reg_raddr = (state == S_TX_ACK) ? ptr + 1'b1 : ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      kind      <= B_ADDR;
      cnt       <= '0;
      shreg     <= '0;
      ptr       <= '0;
      rw_q      <= 1'b0;
      mack      <= 1'b0;
      adv       <= 1'b0;
      drive_low <= 1'b0;
    end else if (start_det) begin
      state     <= S_RX;
      kind      <= B_ADDR;
      cnt       <= '0;
      drive_low <= 1'b0;
    end else if (stop_det) begin
      state     <= S_IDLE;
      drive_low <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_RX: begin
          if (scl_rise && cnt != 4'd8) begin
            shreg <= {shreg[6:0], sda_s};
            cnt   <= cnt + 4'd1;
          end
          if (scl_fall && cnt == 4'd8) begin
            unique case (kind)
              B_ADDR: begin
                if (shreg[7:1] == DEV_ADDR) begin
                  rw_q      <= shreg[0];
                  drive_low <= 1'b1;
                  state     <= S_RX_ACK;
                end else begin
                  state <= S_IDLE;
                end
              end
              B_REG: begin
                ptr       <= shreg[AW-1:0];
                adv       <= 1'b0;
                drive_low <= 1'b1;
                state     <= S_RX_ACK;
              end
              default: begin
                ptr       <= reg_waddr;
                adv       <= 1'b1;
                drive_low <= 1'b1;
                state     <= S_RX_ACK;
              end
            endcase
          end
        end
        S_RX_ACK: begin
          if (scl_fall) begin
            cnt <= '0;
            if (kind == B_ADDR && rw_q == I2C_READ) begin
              shreg     <= reg_rdata;
              drive_low <= !reg_rdata[7];
              state     <= S_TX;
            end else begin
              drive_low <= 1'b0;
              kind      <= (kind == B_ADDR) ? B_REG : B_DATA;
              state     <= S_RX;
            end
          end
        end
        S_TX: begin
          if (scl_fall) begin
            if (cnt == 4'd7) begin
              drive_low <= 1'b0;
              state     <= S_TX_ACK;
            end else begin
              shreg     <= {shreg[6:0], 1'b0};
              drive_low <= !shreg[6];
              cnt       <= cnt + 4'd1;
            end
          end
        end
        S_TX_ACK: begin
          if (scl_rise) mack <= !sda_s;
          if (scl_fall) begin
            cnt <= '0;
            if (mack) begin
              ptr       <= ptr + 1'b1;
              shreg     <= reg_rdata;
              drive_low <= !reg_rdata[7];
              state     <= S_TX;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // An idle slave never holds SDA low.
  property p_idle_releases_sda;
    @(posedge clk) disable iff (rst) (state == S_IDLE) |-> !drive_low;
  endproperty
  assert property (p_idle_releases_sda);

  initial begin
    assert (AW >= 1 && AW <= 8) else $error("i2c_slave: AW must be 1..8");
  end

endmodule
