// shim_timer: the hardware timer peripheral.
//
// One shared 32-bit variable, counter, is held in hardware.  The hardware
// process `count` adds one to it every bus clock cycle; software can read it
// (get_time) and write it (reset_timer writes zero) through the OPB at word
// offset 0 of the peripheral's window.  A software write in the same cycle as
// the increment wins, so the counter restarts from the written value.
//
// Interface: the OPB slave signals (see shim_opb_slave for the transfer
// timing: three cycles, acknowledge in the third).  The counter updates
// one cycle after the write strobe; a read returns the value the counter had
// in the first cycle of the transfer.  The counter wraps at 2^32.
module shim_timer #(
  parameter logic [31:0] C_BASEADDR   = shim_pkg::DEFAULT_BASEADDR,
  parameter logic [31:0] C_HIGHADDR   = shim_pkg::DEFAULT_HIGHADDR,
  parameter int unsigned C_OPB_AWIDTH = shim_pkg::OPB_AWIDTH,
  parameter int unsigned C_OPB_DWIDTH = shim_pkg::OPB_DWIDTH,
  parameter int unsigned COUNT_WIDTH  = 32
) (
  input  logic                      OPB_Clk,
  input  logic                      OPB_Rst,
  input  logic [C_OPB_AWIDTH-1:0]   OPB_ABus,
  input  logic [C_OPB_DWIDTH/8-1:0] OPB_BE,
  input  logic [C_OPB_DWIDTH-1:0]   OPB_DBus,
  input  logic                      OPB_RNW,
  input  logic                      OPB_select,
  input  logic                      OPB_seqaddr,
  output logic [C_OPB_DWIDTH-1:0]   Sln_DBus,
  output logic                      Sln_errAck,
  output logic                      Sln_retry,
  output logic                      Sln_toutSup,
  output logic                      Sln_xferAck
);

  logic [0:0]                        wr_en;
  logic [C_OPB_DWIDTH-1:0]           wr_data;
  logic [0:0][C_OPB_DWIDTH-1:0]      rd_vars;
  logic [COUNT_WIDTH-1:0]            counter;

  shim_opb_slave #(
    .C_BASEADDR  (C_BASEADDR),
    .C_HIGHADDR  (C_HIGHADDR),
    .C_OPB_AWIDTH(C_OPB_AWIDTH),
    .C_OPB_DWIDTH(C_OPB_DWIDTH),
    .NVARS       (1)
  ) u_bus (
    .OPB_Clk, .OPB_Rst, .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW,
    .OPB_select, .OPB_seqaddr,
    .Sln_DBus, .Sln_errAck, .Sln_retry, .Sln_toutSup, .Sln_xferAck,
    .wr_en, .wr_data, .rd_vars
  );

  // hw void count() { counter = counter + 1; }
  shim_shared_var #(.WIDTH(COUNT_WIDTH), .RESET_VAL('0)) u_counter (
    .clk   (OPB_Clk),
    .rst   (OPB_Rst),
    .hw_we (1'b1),
    .hw_d  (counter + 1'b1),
    .bus_we(wr_en[0]),
    .bus_d (COUNT_WIDTH'(wr_data)),
    .q     (counter)
  );

  assign rd_vars[0] = C_OPB_DWIDTH'(counter);

endmodule
