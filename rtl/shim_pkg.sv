// shim_pkg: types and constants shared by the SHIM-style peripherals.
//
// Holds the OPB bus widths, the word-address register map of the I2C
// controller peripheral (one 32-bit word per shared variable, in declaration
// order), the command codes software writes into the controller's `command`
// variable and the state encoding of the controller.  The numbers IDLE = 0,
// SEND = 2 (commands) and IDLE = 0, SEND1 = 5, SEND2 = 6, IDLE0 = 24 (states)
// follow the published controller; the other codes fill the gaps in order and
// are this design's choice.
package shim_pkg;

  // On-chip Peripheral Bus widths (c_opb_awidth, c_opb_dwidth).
  localparam int unsigned OPB_AWIDTH = 32;
  localparam int unsigned OPB_DWIDTH = 32;

  // Default address window of a peripheral.
  localparam logic [31:0] DEFAULT_BASEADDR = 32'hFEFF_0200;
  localparam logic [31:0] DEFAULT_HIGHADDR = 32'hFEFF_02FF;

  // I2C controller register map: word offsets from the base address.
  localparam int unsigned I2C_REG_SCL     = 0;  // shared out bool SCL
  localparam int unsigned I2C_REG_SDA     = 1;  // shared out bool SDA
  localparam int unsigned I2C_REG_SDA_OE  = 2;  // shared out bool SDA_oe (1 = released)
  localparam int unsigned I2C_REG_SDA_IN  = 3;  // shared bool SDA_data (pin value)
  localparam int unsigned I2C_REG_SREG    = 4;  // shared uint:8 sreg
  localparam int unsigned I2C_REG_STATE   = 5;  // shared uint:5 state
  localparam int unsigned I2C_REG_READY   = 6;  // shared bool ready
  localparam int unsigned I2C_REG_COMMAND = 7;  // shared uint:3 command
  localparam int unsigned I2C_REG_ACK     = 8;  // shared bool acknowledge_received
  localparam int unsigned I2C_REG_SCL_OE  = 9;  // shared out bool SCL_oe (1 = released)
  localparam int unsigned I2C_NREGS       = 10;

  // Commands from software to the controller.
  typedef enum logic [2:0] {
    CMD_IDLE         = 3'd0,
    CMD_START        = 3'd1,
    CMD_SEND         = 3'd2,
    CMD_RECEIVE      = 3'd3,  // receive a byte, answer with ACK
    CMD_STOP         = 3'd4,
    CMD_RECEIVE_LAST = 3'd5   // receive a byte, answer with NACK
  } i2c_cmd_e;

  // Controller states.
  typedef enum logic [4:0] {
    ST_IDLE   = 5'd0,
    ST_START1 = 5'd1,  ST_START2 = 5'd2,  ST_START3 = 5'd3,  ST_START4 = 5'd4,
    ST_SEND1  = 5'd5,  ST_SEND2  = 5'd6,  ST_SEND3  = 5'd7,  ST_SEND4  = 5'd8,
    ST_SEND5  = 5'd9,  ST_SEND6  = 5'd10, ST_SEND7  = 5'd11, ST_SEND8  = 5'd12,
    ST_RECV1  = 5'd13, ST_RECV2  = 5'd14, ST_RECV3  = 5'd15, ST_RECV4  = 5'd16,
    ST_RECV5  = 5'd17, ST_RECV6  = 5'd18, ST_RECV7  = 5'd19, ST_RECV8  = 5'd20,
    ST_STOP1  = 5'd21, ST_STOP2  = 5'd22, ST_STOP3  = 5'd23,
    ST_IDLE0  = 5'd24
  } i2c_state_e;

endpackage
