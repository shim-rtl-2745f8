// shim_system: the two SHIM example peripherals side by side.
//
// The hardware timer (shim_timer) and the I2C bus controller (i2chw_core)
// are separate example systems; each is an OPB slave at the same default
// address window 0xFEFF0200-0xFEFF02FF, so each keeps its own bus port here
// (prefix tmr_ and i2c_).  The processor and the bus that would drive these
// ports, and the bidirectional I/O pads that join SDA/SDA_oe/SDA_in and
// SCL/SCL_oe to the I2C wires, are outside this design: their signals are
// ports of this module.
module shim_system #(
  parameter int unsigned I2C_DIV = 125
) (
  // timer peripheral bus
  input  logic        tmr_OPB_Clk,
  input  logic        tmr_OPB_Rst,
  input  logic [31:0] tmr_OPB_ABus,
  input  logic [3:0]  tmr_OPB_BE,
  input  logic [31:0] tmr_OPB_DBus,
  input  logic        tmr_OPB_RNW,
  input  logic        tmr_OPB_select,
  input  logic        tmr_OPB_seqaddr,
  output logic [31:0] tmr_Sln_DBus,
  output logic        tmr_Sln_errAck,
  output logic        tmr_Sln_retry,
  output logic        tmr_Sln_toutSup,
  output logic        tmr_Sln_xferAck,
  // I2C controller bus
  input  logic        i2c_OPB_Clk,
  input  logic        i2c_OPB_Rst,
  input  logic [31:0] i2c_OPB_ABus,
  input  logic [3:0]  i2c_OPB_BE,
  input  logic [31:0] i2c_OPB_DBus,
  input  logic        i2c_OPB_RNW,
  input  logic        i2c_OPB_select,
  input  logic        i2c_OPB_seqaddr,
  output logic [31:0] i2c_Sln_DBus,
  output logic        i2c_Sln_errAck,
  output logic        i2c_Sln_retry,
  output logic        i2c_Sln_toutSup,
  output logic        i2c_Sln_xferAck,
  // I2C pad side
  output logic        SDA,
  output logic        SDA_oe,
  input  logic        SDA_in,
  output logic        SCL,
  output logic        SCL_oe
);

  shim_timer u_timer (
    .OPB_Clk    (tmr_OPB_Clk),
    .OPB_Rst    (tmr_OPB_Rst),
    .OPB_ABus   (tmr_OPB_ABus),
    .OPB_BE     (tmr_OPB_BE),
    .OPB_DBus   (tmr_OPB_DBus),
    .OPB_RNW    (tmr_OPB_RNW),
    .OPB_select (tmr_OPB_select),
    .OPB_seqaddr(tmr_OPB_seqaddr),
    .Sln_DBus   (tmr_Sln_DBus),
    .Sln_errAck (tmr_Sln_errAck),
    .Sln_retry  (tmr_Sln_retry),
    .Sln_toutSup(tmr_Sln_toutSup),
    .Sln_xferAck(tmr_Sln_xferAck)
  );

  i2chw_core #(.I2C_DIV(I2C_DIV)) opb_i2ccontroller_0_i (
    .OPB_Clk    (i2c_OPB_Clk),
    .OPB_ABus   (i2c_OPB_ABus),
    .OPB_BE     (i2c_OPB_BE),
    .OPB_DBus   (i2c_OPB_DBus),
    .OPB_RNW    (i2c_OPB_RNW),
    .OPB_Rst    (i2c_OPB_Rst),
    .OPB_select (i2c_OPB_select),
    .OPB_seqaddr(i2c_OPB_seqaddr),
    .Sln_DBus   (i2c_Sln_DBus),
    .Sln_errAck (i2c_Sln_errAck),
    .Sln_retry  (i2c_Sln_retry),
    .Sln_toutSup(i2c_Sln_toutSup),
    .Sln_xferAck(i2c_Sln_xferAck),
    .SDA, .SDA_oe, .SDA_in, .SCL, .SCL_oe
  );

endmodule
