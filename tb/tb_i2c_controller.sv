// tb_i2c_controller: drives the controller's command input directly with
// the four-phase handshake, against a behavioural I2C slave on an open-drain
// bus.  Writes registers (START, SEND address, SEND sub-address, SEND data,
// STOP), reads them back (repeated START, RECEIVE, RECEIVE_LAST), checks the
// slave's memory, the received bytes, the acknowledge bit for a present and
// an absent device, the tick count of each command and that a software write
// to `state` or `SCL` overrides the controller.
module tb_i2c_controller
  import shim_pkg::*;
;
  localparam int DIV = 4;
  logic clk = 0, rst = 1;
  logic i2c_clock;
  logic [2:0] command = CMD_IDLE;
  logic [I2C_NREGS-1:0] bus_we = '0;
  logic [31:0] bus_d = '0;
  logic SCL, SDA, SDA_oe, ready, ack;
  logic [7:0] sreg;
  logic [4:0] state;
  logic sda_low, sda_bus;
  int checks = 0, failures = 0;
  int tick_n = 0;
  int phase_ticks;

  assign sda_bus = (SDA_oe ? 1'b1 : SDA) & !sda_low;

  i2c_tick #(.DIV(DIV)) u_tick (.clk, .rst, .i2c_clock);
  i2c_controller dut (.clk, .rst, .i2c_clock, .command, .SDA_in(sda_bus), .bus_we, .bus_d,
                      .SCL, .SDA, .SDA_oe, .sreg, .state, .ready,
                      .acknowledge_received(ack));
  i2c_slave_model #(.ADDR(7'h21)) slave (.clk, .rst, .scl(SCL), .sda(sda_bus), .sda_low);

  always #5 clk = ~clk;
  always @(posedge clk) if (i2c_clock) tick_n <= tick_n + 1;

  // one command with the four-phase handshake; returns the ticks from the
  // command being seen in IDLE to ready rising again
  task automatic do_cmd(input i2c_cmd_e c, output int ticks);
    int t0;
    while (!ready) @(posedge clk);
    #1 command = c; t0 = tick_n;
    while (ready) @(posedge clk);
    #1 command = CMD_IDLE;
    while (!ready) @(posedge clk);
    ticks = tick_n - t0;
  endtask

  task automatic send_byte(input logic [7:0] b, output logic a);
    int t;
    // software writes sreg through its bus port
    @(posedge clk); #1 bus_we[I2C_REG_SREG] = 1; bus_d = 32'(b);
    @(posedge clk); #1 bus_we = '0;
    do_cmd(CMD_SEND, t);
    a = ack;
    checks++; if (t != 32) begin failures++; $display("SEND took %0d ticks", t); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a;
    int t;
    logic [7:0] data [8];
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) data[i] = 8'($urandom);

    // write 8 registers starting at sub-address 0x10
    do_cmd(CMD_START, t);
    checks++; if (t != 7) begin failures++; $display("START took %0d ticks", t); end
    send_byte({7'h21, 1'b0}, a); checks++; if (a !== 1'b0) begin failures++; $display("no ack on address"); end
    send_byte(8'h10, a);         checks++; if (a !== 1'b0) failures++;
    for (int i = 0; i < 8; i++) begin
      send_byte(data[i], a); checks++; if (a !== 1'b0) failures++;
    end
    do_cmd(CMD_STOP, t);
    checks++; if (t != 6) begin failures++; $display("STOP took %0d ticks", t); end
    for (int i = 0; i < 8; i++) begin
      checks++; if (slave.mem[8'h10 + i] !== data[i]) begin failures++; $display("mem[%0d]", i); end
    end

    // read them back: set sub-address, repeated START, read with ACK, last with NACK
    do_cmd(CMD_START, t);
    send_byte({7'h21, 1'b0}, a);
    send_byte(8'h10, a);
    do_cmd(CMD_START, t);
    send_byte({7'h21, 1'b1}, a); checks++; if (a !== 1'b0) failures++;
    for (int i = 0; i < 8; i++) begin
      do_cmd(i == 7 ? CMD_RECEIVE_LAST : CMD_RECEIVE, t);
      checks++; if (t != 32) begin failures++; $display("RECEIVE took %0d ticks", t); end
      checks++; if (sreg !== data[i]) begin failures++; $display("read %0d got %h exp %h", i, sreg, data[i]); end
    end
    do_cmd(CMD_STOP, t);
    checks++; if (slave.bytes_read != 8) begin failures++; $display("slave sent %0d bytes", slave.bytes_read); end

    // absent device: no acknowledge (SDA stays high)
    do_cmd(CMD_START, t);
    send_byte({7'h55, 1'b0}, a); checks++; if (a !== 1'b1) begin failures++; $display("ack from absent device"); end
    do_cmd(CMD_STOP, t);
    checks++; if (slave.starts != 4 || slave.stops != 3) begin
      failures++; $display("starts %0d stops %0d", slave.starts, slave.stops); end

    // software write to state wins over the controller: force IDLE0
    while (!ready) @(posedge clk);
    @(negedge clk);
    while (!i2c_clock) @(negedge clk);
    bus_we[I2C_REG_STATE] = 1; bus_d = 32'(ST_IDLE0);
    @(posedge clk); #1 bus_we = '0;
    checks++; if (state !== 5'(ST_IDLE0)) begin failures++; $display("state write lost: %0d", state); end
    command = CMD_SEND;   // not IDLE: controller stays in IDLE0
    repeat (5 * DIV) @(posedge clk);
    checks++; if (state !== 5'(ST_IDLE0) || ready) failures++;
    #1 command = CMD_IDLE;
    while (!ready) @(posedge clk);
    // software write to SCL on a tick cycle
    @(negedge clk);
    while (!i2c_clock) @(negedge clk);
    bus_we[I2C_REG_SCL] = 1; bus_d = 32'h0;
    @(posedge clk); #1 bus_we = '0;
    checks++; if (SCL !== 1'b0) begin failures++; $display("SCL write lost"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
