// shim_opb_slave: the bus interface put around every SHIM peripheral.
//
// It decodes the On-chip Peripheral Bus (OPB) address against the window
// [C_BASEADDR, C_HIGHADDR] to form the chip select, takes the low address
// bits as the word offset of a shared variable (variable i sits at byte
// address C_BASEADDR + 4*i), turns a write cycle into a one-cycle write strobe
// for that variable, and returns the selected variable on a read cycle.  The
// data path of the read follows the published generated code: a first
// register captures the addressed variable (read_data), a second one puts it
// on the bus only while the peripheral is selected for a read, and drives
// zero otherwise, as the OPB's OR-combined data bus requires.
//
// Handshake (this design's timing; the text gives the registers but not the
// cycle count): a transfer takes three cycles of OPB_select.
//   cycle 0  select seen, addressed variable captured in read_data
//   cycle 1  write strobe wr_en[offset] (the variable updates at its end)
//   cycle 2  Sln_xferAck high, Sln_DBus holds the read data
// The master ends the transfer when it sees Sln_xferAck; if select stays high
// a new transfer starts.  Offsets inside the window beyond NVARS read as zero
// and ignore writes but are acknowledged.  Byte enables and sequential
// addressing are not used: every variable is written as a whole word.
// Sln_errAck, Sln_retry and Sln_toutSup are held low.  Reset is the
// synchronous, active-high OPB_Rst.  Bit 31 is the most significant bit
// (the OPB documents number it 0).
module shim_opb_slave #(
  parameter logic [31:0] C_BASEADDR   = shim_pkg::DEFAULT_BASEADDR,
  parameter logic [31:0] C_HIGHADDR   = shim_pkg::DEFAULT_HIGHADDR,
  parameter int unsigned C_OPB_AWIDTH = shim_pkg::OPB_AWIDTH,
  parameter int unsigned C_OPB_DWIDTH = shim_pkg::OPB_DWIDTH,
  parameter int unsigned NVARS        = 1
) (
  input  logic                    OPB_Clk,
  input  logic                    OPB_Rst,
  input  logic [C_OPB_AWIDTH-1:0] OPB_ABus,
  input  logic [C_OPB_DWIDTH/8-1:0] OPB_BE,
  input  logic [C_OPB_DWIDTH-1:0] OPB_DBus,
  input  logic                    OPB_RNW,
  input  logic                    OPB_select,
  input  logic                    OPB_seqaddr,
  output logic [C_OPB_DWIDTH-1:0] Sln_DBus,
  output logic                    Sln_errAck,
  output logic                    Sln_retry,
  output logic                    Sln_toutSup,
  output logic                    Sln_xferAck,
  // towards the shared variables
  output logic [NVARS-1:0]        wr_en,
  output logic [C_OPB_DWIDTH-1:0] wr_data,
  input  logic [NVARS-1:0][C_OPB_DWIDTH-1:0] rd_vars
);

  localparam int unsigned OW = (NVARS > 1) ? $clog2(NVARS) : 1;
  localparam logic [C_OPB_AWIDTH-1:0] BASE = C_OPB_AWIDTH'(C_BASEADDR);
  localparam logic [C_OPB_AWIDTH-1:0] HIGH = C_OPB_AWIDTH'(C_HIGHADDR);

  logic                    cs1;
  logic [C_OPB_AWIDTH-1:0] rel_addr;
  logic [C_OPB_AWIDTH-3:0] word_off;
  logic                    off_valid;
  logic [OW-1:0]           offset;
  logic [1:0]              phase;
  logic [C_OPB_DWIDTH-1:0] read_data;
  logic [C_OPB_DWIDTH-1:0] dbus_out;
  logic                    xfer_ack;

  // Chip select and offset decode.
  always_comb begin
    cs1       = OPB_select && (OPB_ABus >= BASE) && (OPB_ABus <= HIGH);
    rel_addr  = OPB_ABus - BASE;
    word_off  = rel_addr[C_OPB_AWIDTH-1:2];
    off_valid = (word_off < (C_OPB_AWIDTH-2)'(NVARS));
    offset    = OW'(word_off);
  end

  // Write strobe: one cycle, in phase 1 of a selected write.
  always_comb begin
    wr_en   = '0;
    wr_data = OPB_DBus;
    if (cs1 && !OPB_RNW && phase == 2'd1 && off_valid)
      wr_en[offset] = 1'b1;
  end

  // Transfer sequencing and the registered read path.
  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      phase     <= '0;
      read_data <= '0;
      dbus_out  <= '0;
      xfer_ack  <= 1'b0;
    end else begin
      read_data <= off_valid ? rd_vars[offset] : '0;
      xfer_ack  <= cs1 && (phase == 2'd1);
      dbus_out  <= (cs1 && OPB_RNW && phase == 2'd1) ? read_data : '0;
      if (!cs1 || xfer_ack) phase <= '0;
      else if (phase != 2'd2) phase <= phase + 2'd1;
    end
  end

  assign Sln_DBus    = dbus_out;
  assign Sln_xferAck = xfer_ack;
  assign Sln_errAck  = 1'b0;
  assign Sln_retry   = 1'b0;
  assign Sln_toutSup = 1'b0;

  // Byte enables and sequential addressing do not change the behaviour.
  logic unused_ok;
  assign unused_ok = ^{OPB_BE, OPB_seqaddr, rel_addr[1:0]};

  // Bus rules: the read data bus is zero outside an acknowledged read, and an
  // acknowledge only follows a cycle in which this slave was selected.
  property p_dbus_idle_zero;
    @(posedge OPB_Clk) disable iff (OPB_Rst) !Sln_xferAck |-> (Sln_DBus == '0);
  endproperty
  a_dbus_idle_zero: assert property (p_dbus_idle_zero);

  property p_ack_after_select;
    @(posedge OPB_Clk) disable iff (OPB_Rst) Sln_xferAck |-> $past(cs1);
  endproperty
  a_ack_after_select: assert property (p_ack_after_select);

endmodule
