// i2chw_core: I2C bus controller peripheral for the On-chip Peripheral Bus.
//
// The peripheral a SHIM-style compiler builds from the byte-level
// send/receive I2C controller: the OPB slave interface (shim_opb_slave), the
// controller process (i2c_controller) paced by i2c_tick, and the shared
// variables that only software writes (command, SCL_oe) or that hardware
// refreshes from the pin every cycle (SDA_data, the sampled SDA_in).
// Every shared variable is one 32-bit word on the bus; the map is in
// shim_pkg (SCL 0x00, SDA 0x04, SDA_oe 0x08, SDA_data 0x0C, sreg 0x10,
// state 0x14, ready 0x18, command 0x1C, acknowledge_received 0x20,
// SCL_oe 0x24), values in the low bits.
//
// Because software may write SCL, SDA and SDA_oe directly, the same
// peripheral also serves a purely software (bit-banged) driver while the
// controller sits in IDLE.
//
// Pins: SDA, SDA_oe, SDA_in, SCL, SCL_oe connect to bidirectional pads
// outside this block (pad input I = SDA/SCL, tri-state control T = *_oe,
// output O = SDA_in).  *_oe = 1 releases the line.  SCL_oe resets to 0 (this
// master drives SCL; the default assumes no clock-stretching slave).
module i2chw_core
  import shim_pkg::*;
#(
  parameter logic [31:0] c_baseaddr   = shim_pkg::DEFAULT_BASEADDR,
  parameter logic [31:0] c_highaddr   = shim_pkg::DEFAULT_HIGHADDR,
  parameter int unsigned c_opb_awidth = shim_pkg::OPB_AWIDTH,
  parameter int unsigned c_opb_dwidth = shim_pkg::OPB_DWIDTH,
  parameter int unsigned I2C_DIV      = 125
) (
  input  logic                      OPB_Clk,
  input  logic [c_opb_awidth-1:0]   OPB_ABus,
  input  logic [c_opb_dwidth/8-1:0] OPB_BE,
  input  logic [c_opb_dwidth-1:0]   OPB_DBus,
  input  logic                      OPB_RNW,
  input  logic                      OPB_Rst,
  input  logic                      OPB_select,
  input  logic                      OPB_seqaddr,
  output logic [c_opb_dwidth-1:0]   Sln_DBus,
  output logic                      Sln_errAck,
  output logic                      Sln_retry,
  output logic                      Sln_toutSup,
  output logic                      Sln_xferAck,
  output logic                      SDA,
  output logic                      SDA_oe,
  input  logic                      SDA_in,
  output logic                      SCL,
  output logic                      SCL_oe
);

  logic [I2C_NREGS-1:0]                   wr_en;
  logic [c_opb_dwidth-1:0]                wr_data;
  logic [I2C_NREGS-1:0][c_opb_dwidth-1:0] rd_vars;
  logic [31:0]                            bus_d;

  logic       i2c_clock;
  logic [2:0] command;
  logic       sda_data;
  logic [7:0] sreg;
  logic [4:0] state;
  logic       ready;
  logic       ack_received;

  shim_opb_slave #(
    .C_BASEADDR  (c_baseaddr),
    .C_HIGHADDR  (c_highaddr),
    .C_OPB_AWIDTH(c_opb_awidth),
    .C_OPB_DWIDTH(c_opb_dwidth),
    .NVARS       (I2C_NREGS)
  ) u_bus (
    .OPB_Clk, .OPB_Rst, .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW,
    .OPB_select, .OPB_seqaddr,
    .Sln_DBus, .Sln_errAck, .Sln_retry, .Sln_toutSup, .Sln_xferAck,
    .wr_en, .wr_data, .rd_vars
  );

  assign bus_d = 32'(wr_data);

  i2c_tick #(.DIV(I2C_DIV)) u_tick (
    .clk(OPB_Clk), .rst(OPB_Rst), .i2c_clock);

  i2c_controller u_ctrl (
    .clk(OPB_Clk), .rst(OPB_Rst), .i2c_clock, .command, .SDA_in,
    .bus_we(wr_en), .bus_d,
    .SCL, .SDA, .SDA_oe, .sreg, .state, .ready,
    .acknowledge_received(ack_received)
  );

  // Shared variables no hardware process writes: read from the bus only.
  shim_shared_var #(.WIDTH(3), .RESET_VAL(3'(CMD_IDLE))) u_command (
    .clk(OPB_Clk), .rst(OPB_Rst), .hw_we(1'b0), .hw_d(3'd0),
    .bus_we(wr_en[I2C_REG_COMMAND]), .bus_d(bus_d[2:0]), .q(command));
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b0)) u_scl_oe (
    .clk(OPB_Clk), .rst(OPB_Rst), .hw_we(1'b0), .hw_d(1'b0),
    .bus_we(wr_en[I2C_REG_SCL_OE]), .bus_d(bus_d[0]), .q(SCL_oe));
  // SDA_data follows the pin every cycle.
  shim_shared_var #(.WIDTH(1), .RESET_VAL(1'b1)) u_sda_data (
    .clk(OPB_Clk), .rst(OPB_Rst), .hw_we(1'b1), .hw_d(SDA_in),
    .bus_we(wr_en[I2C_REG_SDA_IN]), .bus_d(bus_d[0]), .q(sda_data));

  // Read side of every shared variable.
  always_comb begin
    rd_vars                  = '0;
    rd_vars[I2C_REG_SCL]     = c_opb_dwidth'(SCL);
    rd_vars[I2C_REG_SDA]     = c_opb_dwidth'(SDA);
    rd_vars[I2C_REG_SDA_OE]  = c_opb_dwidth'(SDA_oe);
    rd_vars[I2C_REG_SDA_IN]  = c_opb_dwidth'(sda_data);
    rd_vars[I2C_REG_SREG]    = c_opb_dwidth'(sreg);
    rd_vars[I2C_REG_STATE]   = c_opb_dwidth'(state);
    rd_vars[I2C_REG_READY]   = c_opb_dwidth'(ready);
    rd_vars[I2C_REG_COMMAND] = c_opb_dwidth'(command);
    rd_vars[I2C_REG_ACK]     = c_opb_dwidth'(ack_received);
    rd_vars[I2C_REG_SCL_OE]  = c_opb_dwidth'(SCL_oe);
  end

endmodule
