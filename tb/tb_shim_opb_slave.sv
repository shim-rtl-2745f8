// tb_shim_opb_slave: OPB reads and writes to a four-variable slave.  Checks
// the address decode, the single write strobe with its data, the read data,
// the acknowledge in the third cycle of a transfer, zero on the data bus
// outside reads, and that addresses outside the window are not answered.
module tb_shim_opb_slave;
  localparam logic [31:0] BASE = 32'hFEFF_0200;
  logic clk = 0, rst = 1;
  logic [31:0] abus = '0, dbus = '0, sln_dbus, wr_data;
  logic [3:0]  be = 4'hF;
  logic rnw = 0, sel = 0, seq = 0;
  logic errack, retry, toutsup, xferack;
  logic [3:0] wr_en;
  logic [3:0][31:0] vars;
  int checks = 0, failures = 0;
  int strobes [4];

  shim_opb_slave #(.NVARS(4)) dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(sel), .OPB_seqaddr(seq),
    .Sln_DBus(sln_dbus), .Sln_errAck(errack), .Sln_retry(retry),
    .Sln_toutSup(toutsup), .Sln_xferAck(xferack),
    .wr_en, .wr_data, .rd_vars(vars));

  always #5 clk = ~clk;

  // Reference storage: written only through the strobes.
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      if (wr_en[i]) begin vars[i] <= wr_data; strobes[i]++; end
  end

  always @(posedge clk) if (!xferack && sln_dbus != 0) begin
    failures++; $display("data bus not zero outside a transfer");
  end

  task automatic opb_xfer(input logic [31:0] a, input logic r, input logic [31:0] d,
                          output logic [31:0] q, output int cycles);
    abus = a; rnw = r; dbus = d; sel = 1; cycles = 0;
    do begin @(negedge clk); cycles++; end while (!xferack && cycles < 20);
    q = sln_dbus;
    @(posedge clk); #1 sel = 0; abus = '0; dbus = '0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, exp [4];
    int cyc;
    for (int i = 0; i < 4; i++) begin vars[i] = '0; strobes[i] = 0; exp[i] = '0; end
    repeat (2) @(posedge clk); #1 rst = 0;
    checks++; if (errack || retry || toutsup) failures++;
    for (int n = 0; n < 40; n++) begin
      int i; logic [31:0] d;
      i = $urandom_range(0, 3); d = $urandom;
      opb_xfer(BASE + 32'(4*i), 1'b0, d, q, cyc);
      exp[i] = d;
      checks++; if (cyc != 3) begin failures++; $display("write ack after %0d cycles", cyc); end
      i = $urandom_range(0, 3);
      opb_xfer(BASE + 32'(4*i), 1'b1, 32'h0, q, cyc);
      checks++; if (cyc != 3) begin failures++; $display("read ack after %0d cycles", cyc); end
      checks++; if (q !== exp[i]) begin failures++; $display("read var %0d got %h exp %h", i, q, exp[i]); end
    end
    // one strobe per write
    begin
      int tot; tot = 0;
      for (int i = 0; i < 4; i++) tot += strobes[i];
      checks++; if (tot != 40) begin failures++; $display("strobes %0d", tot); end
    end
    // inside the window, beyond the variables: acknowledged, reads zero, writes nothing
    opb_xfer(BASE + 32'h40, 1'b0, 32'hDEAD_BEEF, q, cyc);
    checks++; if (cyc != 3) failures++;
    opb_xfer(BASE + 32'h40, 1'b1, 32'h0, q, cyc);
    checks++; if (q !== 32'h0 || cyc != 3) failures++;
    // outside the window: never acknowledged, variables unchanged
    opb_xfer(BASE + 32'h100, 1'b0, 32'h1234_5678, q, cyc);
    checks++; if (cyc != 20) begin failures++; $display("answered outside window"); end
    opb_xfer(BASE - 32'h4, 1'b1, 32'h0, q, cyc);
    checks++; if (cyc != 20) begin failures++; $display("answered below window"); end
    for (int i = 0; i < 4; i++) begin
      checks++; if (vars[i] !== exp[i]) begin failures++; $display("var %0d disturbed", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
