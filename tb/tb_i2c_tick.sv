// tb_i2c_tick: checks the enable pulse period for a small divider and for the
// default divider, the one-cycle pulse width and the distance from reset.
module tb_i2c_tick;
  logic clk = 0, rst = 1;
  logic tick5, tickd;
  int checks = 0, failures = 0;

  i2c_tick #(.DIV(5)) dut5 (.clk, .rst, .i2c_clock(tick5));
  i2c_tick            dutd (.clk, .rst, .i2c_clock(tickd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last5, lastd, n5, nd;
    @(posedge clk); #1 rst = 0;
    cyc = 0; last5 = 0; lastd = 0; n5 = 0; nd = 0;
    repeat (1000) begin
      @(posedge clk); #1 cyc++;
      if (tick5) begin
        checks++;
        if (cyc - last5 != 5) begin failures++; $display("DIV=5 gap %0d at %0d", cyc - last5, cyc); end
        last5 = cyc; n5++;
      end
      if (tickd) begin
        checks++;
        if (cyc - lastd != 125) begin failures++; $display("DIV=125 gap %0d", cyc - lastd); end
        lastd = cyc; nd++;
      end
    end
    checks++; if (n5 != 200) begin failures++; $display("DIV=5 count %0d", n5); end
    checks++; if (nd != 8)   begin failures++; $display("DIV=125 count %0d", nd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
