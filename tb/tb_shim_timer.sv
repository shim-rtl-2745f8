// tb_shim_timer: the timer counts one per cycle, reset_timer (a bus write of
// zero, or of any value) takes precedence over the increment, and get_time
// (a bus read) returns the count at the first cycle of the read transfer.
module tb_shim_timer;
  localparam logic [31:0] BASE = 32'hFEFF_0200;
  logic clk = 0, rst = 1;
  logic [31:0] abus = '0, dbus = '0, sln_dbus;
  logic rnw = 0, sel = 0;
  logic errack, retry, toutsup, xferack;
  int checks = 0, failures = 0;
  longint cyc = 0;

  shim_timer dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(4'hF), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(sel), .OPB_seqaddr(1'b0),
    .Sln_DBus(sln_dbus), .Sln_errAck(errack), .Sln_retry(retry),
    .Sln_toutSup(toutsup), .Sln_xferAck(xferack));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // start: cycle count at the first clock edge of the transfer
  task automatic opb_xfer(input logic [31:0] a, input logic r, input logic [31:0] d,
                          output logic [31:0] q, output longint start);
    int n;
    abus = a; rnw = r; dbus = d; sel = 1; n = 0; start = cyc;
    do begin @(negedge clk); n++; end while (!xferack && n < 20);
    q = sln_dbus;
    checks++; if (n != 3) begin failures++; $display("ack after %0d", n); end
    @(posedge clk); #1 sel = 0; abus = '0; dbus = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, wval;
    longint t_w, t_r;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 50; n++) begin
      wval = (n % 3 == 0) ? 32'h0 : $urandom;
      if (n == 49) wval = 32'hFFFF_FFF0;          // wrap-around
      opb_xfer(BASE, 1'b0, wval, q, t_w);          // reset_timer()
      repeat ($urandom_range(0, 40)) @(posedge clk);
      #1 opb_xfer(BASE, 1'b1, 32'h0, q, t_r);      // get_time()
      // written at the edge ending cycle t_w+1, visible from cycle t_w+2;
      // captured at the edge ending cycle t_r
      checks++;
      if (q !== wval + 32'(t_r - (t_w + 2)))
        begin failures++; $display("get_time %h exp %h", q, wval + 32'(t_r - t_w - 2)); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
