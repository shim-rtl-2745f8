// tb_shim_shared_var: random hardware and bus writes against a reference
// model of the precedence rule (reset, then bus write, then hardware write).
module tb_shim_shared_var;
  localparam int unsigned W = 12;
  logic clk = 0, rst = 1;
  logic hw_we = 0, bus_we = 0;
  logic [W-1:0] hw_d = '0, bus_d = '0, q, model;
  int checks = 0, failures = 0;
  int bus_wins = 0;

  shim_shared_var #(.WIDTH(W), .RESET_VAL(12'hA5C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst = 0;
    model = 12'hA5C;
    checks++; if (q !== model) begin failures++; $display("reset value %h", q); end
    for (int i = 0; i < 2000; i++) begin
      hw_we  = 1'($urandom);
      bus_we = 1'($urandom_range(0, 3) == 0);
      hw_d   = W'($urandom);
      bus_d  = W'($urandom);
      if (i == 1500) rst = 1;
      @(posedge clk); #1;
      if (rst)         model = 12'hA5C;
      else if (bus_we) model = bus_d;
      else if (hw_we)  model = hw_d;
      if (!rst && bus_we && hw_we) bus_wins++;
      rst = 0;
      checks++;
      if (q !== model) begin failures++; $display("step %0d q=%h exp=%h", i, q, model); end
    end
    checks++; if (bus_wins == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
