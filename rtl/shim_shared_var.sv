// shim_shared_var: the storage of one shared variable.
//
// A shared variable lives in hardware and is written by at most one hardware
// process and by software through the bus.  The hardware process offers a new
// value with hw_we/hw_d; a bus write offers bus_d with bus_we.  When both
// happen in the same clock cycle the bus write wins, because the bus write
// is placed after the process body: software takes precedence over
// hardware.  A variable that no hardware process writes simply ties hw_we
// low.  The register resets synchronously to RESET_VAL.  A bus write is
// truncated to WIDTH bits.
//
// Timing: the new value is visible on q one cycle after the write.
module shim_shared_var #(
  parameter int unsigned     WIDTH     = 32,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             hw_we,
  input  logic [WIDTH-1:0] hw_d,
  input  logic             bus_we,
  input  logic [WIDTH-1:0] bus_d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)          q <= RESET_VAL;
    else if (bus_we)  q <= bus_d;
    else if (hw_we)   q <= hw_d;
  end

endmodule
