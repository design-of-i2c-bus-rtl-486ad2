// i2c_master: finite-state-machine I2C master controller.
//
// The master owns SCL and runs one transfer per `start` pulse (the chip
// select of the host side). A write transfer is
//   START, device address + W, register address, data byte(s), STOP
// and a read transfer sets the slave's register pointer first, then turns
// the bus round with a repeated START:
//   START, device address + W, register address,
//   repeated START, device address + R, data byte(s), STOP.
// With `readback` set a read first writes one data byte (wdata) after the
// register address, then turns round and reads, so the host reads back the
// byte it has just written:
//   START, address + W, register address, data byte,
//   repeated START, address + R, data byte(s), STOP.
// With `skip_reg` set a read leaves the pointer alone and reads from
// wherever it points (START, address + R, data, STOP). The receiver of every
// byte answers in a ninth clock: the master checks the slave's ACK after
// each byte it sends, stops the transfer and sets `ack_err` on a NACK, and
// itself acknowledges each byte it reads except the last, which it answers
// with NACK before the STOP.
//
// Timing: every bit occupies four quarters of QDIV system clocks (ticks from
// i2c_tick_gen). SCL is low in quarters 0 and 1 and high in 2 and 3; SDA
// changes only at the start of quarter 1 and is sampled at the end of
// quarter 2. START drives SDA low in the second half of an SCL-high bit,
// STOP releases SDA one quarter after SCL rose. A transfer of N data bytes
// lasts 4*QDIV*(2 + 9*(2+N)) clocks for a write and
// 4*QDIV*(3 + 9*(3+N)) for a read with register address,
// 4*QDIV*(3 + 9*(4+N)) for a read with `readback` and 4*QDIV*(2 + 9*(1+N))
// with `skip_reg`, counted from the cycle after `start` to `done`.
//
// Host interface: rw (0 write, 1 read), readback and skip_reg (the read
// variants above; skip_reg wins), reg_addr, nbytes (data bytes written in a
// write, read in a read; 0 is taken as 1), wdata with wdata_taken (a
// one-cycle pulse when wdata has been loaded; the next byte must be on
// wdata by the next byte boundary),
// rdata with rdata_valid, busy, done (one-cycle pulse) and ack_err (cleared
// by the next start). Bus side: scl_o / sda_o are 0 to pull the line low and
// 1 to release it; sda_i is the resolved bus level. The master does not
// support clock stretching or multi-master arbitration.
//
// The state sequence, the fixed address 1101000, MSB-first bytes, the
// 9-clock ACK and the repeated START for reads follow the specification.
// The write-then-read-back sequence of `readback` is the read operation of
// the specification's state list; the pointer-only read is the one of its
// protocol description. Multi-byte bursts, the NACK on the last read byte,
// `skip_reg` and the quarter-period timing are this design's own choices.
module i2c_master #(
  parameter logic [6:0]  DEV_ADDR = i2c_pkg::I2C_DEV_ADDR,
  parameter int unsigned QDIV     = i2c_pkg::I2C_QDIV,
  parameter int unsigned LEN_W    = 8
) (
  input  logic             clk,
  input  logic             rst,
  // host side
  input  logic             start,
  input  logic             rw,
  input  logic             readback,
  input  logic             skip_reg,
  input  logic [7:0]       reg_addr,
  input  logic [LEN_W-1:0] nbytes,
  input  logic [7:0]       wdata,
  output logic             wdata_taken,
  output logic [7:0]       rdata,
  output logic             rdata_valid,
  output logic             busy,
  output logic             done,
  output logic             ack_err,
  // bus side
  output logic             scl_o,
  output logic             sda_o,
  input  logic             sda_i
);

  import i2c_pkg::*;

  // One state per step of the transfer.
  typedef enum logic [3:0] {
    M_IDLE,        // bus idle, SCL and SDA high
    M_START,       // START condition
    M_ADDR_W,      // device address + write
    M_ACK_ADDR_W,  // slave ACK of the address
    M_REG,         // register address
    M_ACK_REG,     // slave ACK of the register address
    M_WDATA,       // write data byte
    M_ACK_WDATA,   // slave ACK of the data byte
    M_RSTART,      // repeated START before the read
    M_ADDR_R,      // device address + read
    M_ACK_ADDR_R,  // slave ACK of the read address
    M_RDATA,       // read data byte from the slave
    M_MACK,        // master ACK / NACK of the read byte
    M_STOP         // STOP condition
  } mstate_t;

  mstate_t          state;
  logic [1:0]       phase;     // quarter within the current bit
  logic [2:0]       bitcnt;    // bit within the current byte
  logic [7:0]       shreg;     // byte being sent or received
  logic [LEN_W-1:0] remain;    // data bytes left, including the current one
  logic             rw_q;
  logic             rb_q;
  logic [7:0]       reg_q;
  logic             nack;      // SDA sampled in the last ACK slot
  logic             tick;
  logic             scl_n, sda_n;

  i2c_tick_gen #(.QDIV(QDIV)) u_tick (
    .clk (clk),
    .rst (rst),
    .en  (state != M_IDLE),
    .tick(tick)
  );

  function automatic logic is_tx(mstate_t s);
    return s inside {M_ADDR_W, M_REG, M_WDATA, M_ADDR_R};
  endfunction

  function automatic logic is_listen(mstate_t s);
    return s inside {M_ACK_ADDR_W, M_ACK_REG, M_ACK_WDATA, M_ACK_ADDR_R, M_RDATA};
  endfunction

  // Line levels wanted in the current quarter. In quarter 0 of every bit
  // SDA keeps its level, so it never changes in the same cycle as SCL.
  always_comb begin
    scl_n = 1'b1;
    sda_n = sda_o;
    unique case (state)
      M_IDLE:  begin scl_n = 1'b1; sda_n = 1'b1; end
      M_START: begin scl_n = 1'b1; sda_n = ~phase[1]; end
      M_RSTART: begin
        scl_n = (phase != 2'd0);
        if (phase != 2'd0) sda_n = (phase != 2'd3);
      end
      M_STOP: begin
        scl_n = phase[1];
        if (phase != 2'd0) sda_n = (phase == 2'd3);
      end
      M_MACK: begin
        scl_n = phase[1];
        if (phase != 2'd0) sda_n = (remain == LEN_W'(1));
      end
      default: begin
        scl_n = phase[1];
        if (phase != 2'd0) sda_n = is_tx(state) ? shreg[7] : 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_o <= 1'b1;
      sda_o <= 1'b1;
    end else begin
      scl_o <= scl_n;
      sda_o <= sda_n;
    end
  end

  assign busy = (state != M_IDLE);

  always_ff @(posedge clk) begin
    wdata_taken <= 1'b0;
    rdata_valid <= 1'b0;
    done        <= 1'b0;
    if (rst) begin
      state   <= M_IDLE;
      phase   <= '0;
      bitcnt  <= '0;
      shreg   <= '0;
      remain  <= '0;
      rw_q    <= 1'b0;
      rb_q    <= 1'b0;
      reg_q   <= '0;
      nack    <= 1'b0;
      rdata   <= '0;
      ack_err <= 1'b0;
    end else if (state == M_IDLE) begin
      phase <= '0;
      if (start) begin
        rw_q    <= rw;
        rb_q    <= readback;
        reg_q   <= reg_addr;
        remain  <= (nbytes == '0) ? LEN_W'(1) : nbytes;
        ack_err <= 1'b0;
        state   <= M_START;
        // A read that keeps the register pointer goes straight to the
        // read address after START.
        shreg   <= (rw && skip_reg) ? {DEV_ADDR, I2C_READ} : {DEV_ADDR, I2C_WRITE};
        bitcnt  <= '0;
      end
    end else if (tick) begin
      phase <= phase + 2'd1;
      // Sample SDA in the middle of the SCL-high time.
      if (phase == 2'd2) begin
        if (state == M_RDATA) shreg <= {shreg[6:0], sda_i};
        if (is_listen(state)) nack <= sda_i;
      end
      // End of a bit: move on.
      if (phase == 2'd3) begin
        bitcnt <= '0;
        unique case (state)
          M_START: state <= (shreg[0] == I2C_READ) ? M_ADDR_R : M_ADDR_W;
          M_ADDR_W, M_REG, M_WDATA, M_ADDR_R: begin
            if (bitcnt == 3'd7) begin
              unique case (state)
                M_ADDR_W: state <= M_ACK_ADDR_W;
                M_REG:    state <= M_ACK_REG;
                M_WDATA:  state <= M_ACK_WDATA;
                default:  state <= M_ACK_ADDR_R;
              endcase
            end else begin
              shreg  <= {shreg[6:0], 1'b0};
              bitcnt <= bitcnt + 3'd1;
            end
          end
          M_ACK_ADDR_W: begin
            if (nack) begin ack_err <= 1'b1; state <= M_STOP; end
            else begin shreg <= reg_q; state <= M_REG; end
          end
          M_ACK_REG: begin
            if (nack) begin
              ack_err <= 1'b1;
              state   <= M_STOP;
            end else if (rw_q == I2C_READ && !rb_q) begin
              state <= M_RSTART;
            end else begin
              shreg       <= wdata;
              wdata_taken <= 1'b1;
              state       <= M_WDATA;
            end
          end
          M_ACK_WDATA: begin
            if (nack) begin
              ack_err <= 1'b1;
              state   <= M_STOP;
            end else if (rw_q == I2C_READ) begin
              // Read-back: one byte written, now turn round and read.
              state <= M_RSTART;
            end else if (remain == LEN_W'(1)) begin
              state <= M_STOP;
            end else begin
              remain      <= remain - 1'b1;
              shreg       <= wdata;
              wdata_taken <= 1'b1;
              state       <= M_WDATA;
            end
          end
          M_RSTART: begin
            shreg <= {DEV_ADDR, I2C_READ};
            state <= M_ADDR_R;
          end
          M_ACK_ADDR_R: begin
            if (nack) begin ack_err <= 1'b1; state <= M_STOP; end
            else state <= M_RDATA;
          end
          M_RDATA: begin
            if (bitcnt == 3'd7) begin
              rdata       <= shreg;
              rdata_valid <= 1'b1;
              state       <= M_MACK;
            end else begin
              bitcnt <= bitcnt + 3'd1;
            end
          end
          M_MACK: begin
            if (remain == LEN_W'(1)) state <= M_STOP;
            else begin
              remain <= remain - 1'b1;
              state  <= M_RDATA;
            end
          end
          M_STOP: begin
            state <= M_IDLE;
            done  <= 1'b1;
          end
          default: state <= M_IDLE;
        endcase
      end
    end
  end

  // SCL may only change while SDA is steady, except in a START or STOP.
  property p_sda_stable_while_scl_high;
    @(posedge clk) disable iff (rst)
      (scl_o && $past(scl_o) && !(state inside {M_START, M_RSTART, M_STOP, M_IDLE}))
        |-> (sda_o == $past(sda_o));
  endproperty
  assert property (p_sda_stable_while_scl_high);

endmodule
