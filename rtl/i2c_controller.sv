// i2c_controller: byte-level I2C master state machine.
//
// A hardware process that runs once per i2c_clock pulse and drives the two
// I2C lines through the shared variables SCL, SDA and SDA_oe.  Software
// sequences whole operations with a four-phase handshake: the controller
// raises `ready` while it waits in IDLE; software writes a command (START,
// SEND, RECEIVE, RECEIVE_LAST or STOP) into `command` and waits for `ready`
// to fall; the controller steps through the operation's states and parks in
// IDLE0; software writes IDLE and waits for `ready` to rise again.
//
//   START    SDA driven high, SCL high, SDA low, SCL low   (4 ticks)
//   SEND     sreg shifted out MSB first, one bit per 3 ticks, then SDA
//            released and the slave's acknowledge bit sampled with SCL high
//            into acknowledge_received (0 = slave acknowledged)   (29 ticks)
//   RECEIVE  SDA released, 8 bits shifted into sreg while SCL is high, then
//            the master drives ACK (RECEIVE) or NACK (RECEIVE_LAST)  (29 ticks)
//   STOP     SDA low, SCL high, SDA high                    (3 ticks)
// The handshake adds three ticks: IDLE accepting the command, IDLE0 seeing
// IDLE, and IDLE raising ready.  So from the command write to ready rising
// again a START takes 7 ticks, SEND and RECEIVE 32, STOP 6.
//
// SDA_oe and SCL_oe are tri-state controls: 1 releases the line, 0 drives it.
// The start/send sequence, the state numbers IDLE = 0, SEND1 = 5, SEND2 = 6,
// IDLE0 = 24, the 3-bit bit counter that counts 8 bits by wrapping from 0,
// and the handshake follow the published controller; the receive, start and
// stop sequences and the ACK/NACK command split are this design's own.
//
// Every controller-written variable is also writable by software (bus_we /
// bus_d, one strobe per register-map offset from shim_pkg); a software write
// wins over the controller's write in the same cycle.  Reset (synchronous)
// puts the state machine in IDLE with both lines released and high.
module i2c_controller
  import shim_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  i2c_clock,
  input  logic [2:0]            command,
  input  logic                  SDA_in,
  input  logic [I2C_NREGS-1:0]  bus_we,
  input  logic [31:0]           bus_d,
  output logic                  SCL,
  output logic                  SDA,
  output logic                  SDA_oe,
  output logic [7:0]            sreg,
  output logic [4:0]            state,
  output logic                  ready,
  output logic                  acknowledge_received
);

  // Hardware-only variables.
  logic [2:0] bit_counter, bit_counter_d;
  logic       master_nack, master_nack_d;

  // Values the process assigns this tick.
  logic       scl_d, sda_d, sda_oe_d, ready_d, ack_d;
  logic [7:0] sreg_d;
  logic [4:0] state_d;

  always_comb begin
    scl_d         = SCL;
    sda_d         = SDA;
    sda_oe_d      = SDA_oe;
    sreg_d        = sreg;
    state_d       = state;
    ready_d       = 1'b0;
    ack_d         = acknowledge_received;
    bit_counter_d = bit_counter;
    master_nack_d = master_nack;

    case (i2c_state_e'(state))
      ST_IDLE: begin
        ready_d = 1'b1;
        case (i2c_cmd_e'(command))
          CMD_START:        state_d = ST_START1;
          CMD_SEND:         state_d = ST_SEND1;
          CMD_RECEIVE:      begin state_d = ST_RECV1; master_nack_d = 1'b0; end
          CMD_RECEIVE_LAST: begin state_d = ST_RECV1; master_nack_d = 1'b1; end
          CMD_STOP:         state_d = ST_STOP1;
          default:          state_d = ST_IDLE;
        endcase
      end

      // Start (or repeated start) condition.
      ST_START1: begin sda_oe_d = 1'b0; sda_d = 1'b1; state_d = ST_START2; end
      ST_START2: begin scl_d = 1'b1;                  state_d = ST_START3; end
      ST_START3: begin sda_d = 1'b0;                  state_d = ST_START4; end
      ST_START4: begin scl_d = 1'b0;                  state_d = ST_IDLE0;  end

      // Send a byte, then read the acknowledge.
      ST_SEND1: begin sda_oe_d = 1'b0; bit_counter_d = '0; state_d = ST_SEND2; end
      ST_SEND2: begin sda_d = sreg[7];                     state_d = ST_SEND3; end
      ST_SEND3: begin
        scl_d         = 1'b1;
        sreg_d        = {sreg[6:0], 1'b0};
        bit_counter_d = bit_counter - 3'd1;
        state_d       = ST_SEND4;
      end
      ST_SEND4: begin
        scl_d   = 1'b0;
        state_d = (bit_counter == '0) ? ST_SEND5 : ST_SEND2;
      end
      ST_SEND5: begin sda_oe_d = 1'b1; state_d = ST_SEND6; end
      ST_SEND6: begin scl_d = 1'b1;    state_d = ST_SEND7; end
      ST_SEND7: begin ack_d = SDA_in;  state_d = ST_SEND8; end
      ST_SEND8: begin scl_d = 1'b0;    state_d = ST_IDLE0; end

      // Receive a byte, then send ACK or NACK.
      ST_RECV1: begin sda_oe_d = 1'b1; bit_counter_d = '0; state_d = ST_RECV2; end
      ST_RECV2: begin scl_d = 1'b1;                        state_d = ST_RECV3; end
      ST_RECV3: begin
        sreg_d        = {sreg[6:0], SDA_in};
        bit_counter_d = bit_counter - 3'd1;
        state_d       = ST_RECV4;
      end
      ST_RECV4: begin
        scl_d   = 1'b0;
        state_d = (bit_counter == '0) ? ST_RECV5 : ST_RECV2;
      end
      ST_RECV5: begin sda_d = master_nack; sda_oe_d = 1'b0; state_d = ST_RECV6; end
      ST_RECV6: begin scl_d = 1'b1;                          state_d = ST_RECV7; end
      ST_RECV7: begin scl_d = 1'b0;                          state_d = ST_RECV8; end
      ST_RECV8: begin sda_oe_d = 1'b1;                       state_d = ST_IDLE0; end

      // Stop condition.
      ST_STOP1: begin sda_oe_d = 1'b0; sda_d = 1'b0; state_d = ST_STOP2; end
      ST_STOP2: begin scl_d = 1'b1;                  state_d = ST_STOP3; end
      ST_STOP3: begin sda_d = 1'b1;                  state_d = ST_IDLE0; end

      // Wait for software to complete the handshake.
      ST_IDLE0: state_d = (i2c_cmd_e'(command) == CMD_IDLE) ? ST_IDLE : ST_IDLE0;

      default:  state_d = ST_IDLE;
    endcase
  end

  // Hardware-only registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      bit_counter <= '0;
      master_nack <= 1'b0;
    end else if (i2c_clock) begin
      bit_counter <= bit_counter_d;
      master_nack <= master_nack_d;
    end
  end

  // Shared variables: written by this process on each tick, by software
  // whenever it writes their address.
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b1)) u_scl (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(scl_d),
    .bus_we(bus_we[I2C_REG_SCL]), .bus_d(bus_d[0]), .q(SCL));
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b1)) u_sda (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(sda_d),
    .bus_we(bus_we[I2C_REG_SDA]), .bus_d(bus_d[0]), .q(SDA));
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b1)) u_sda_oe (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(sda_oe_d),
    .bus_we(bus_we[I2C_REG_SDA_OE]), .bus_d(bus_d[0]), .q(SDA_oe));
  shim_shared_var #(.WIDTH(8), .RESET_VAL(8'h00)) u_sreg (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(sreg_d),
    .bus_we(bus_we[I2C_REG_SREG]), .bus_d(bus_d[7:0]), .q(sreg));
  shim_shared_var #(.WIDTH(5), .RESET_VAL(ST_IDLE)) u_state (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(state_d),
    .bus_we(bus_we[I2C_REG_STATE]), .bus_d(bus_d[4:0]), .q(state));
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b0)) u_ready (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(ready_d),
    .bus_we(bus_we[I2C_REG_READY]), .bus_d(bus_d[0]), .q(ready));
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b0)) u_ack (
    .clk, .rst, .hw_we(i2c_clock), .hw_d(ack_d),
    .bus_we(bus_we[I2C_REG_ACK]), .bus_d(bus_d[0]), .q(acknowledge_received));

  // I2C rule: while SCL stays high the data wire changes only to make a
  // START (START3) or a STOP (STOP3).  It holds as long as software issues
  // commands in a legal I2C order (START before SEND/RECEIVE/STOP).
  logic sda_level, sda_level_d;
  assign sda_level   = SDA_oe   ? 1'b1 : SDA;
  assign sda_level_d = sda_oe_d ? 1'b1 : sda_d;

  property p_sda_stable_while_scl_high;
    @(posedge clk) disable iff (rst)
      (i2c_clock && (bus_we == '0) && SCL && scl_d && (sda_level_d != sda_level))
        |-> (state == 5'(ST_START3) || state == 5'(ST_STOP3));
  endproperty
  a_sda_stable_while_scl_high: assert property (p_sda_stable_while_scl_high);

  // Bits of the bus word and strobes of registers this process does not own.
  logic unused_ok;
  assign unused_ok = ^{bus_d[31:8], bus_we[I2C_REG_SDA_IN], bus_we[I2C_REG_COMMAND],
                       bus_we[I2C_REG_SCL_OE]};

endmodule
