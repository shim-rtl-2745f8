// tb_i2chw_core: the I2C peripheral driven over the OPB the way its device
// driver would be.  Software tasks mirror the driver functions: start(),
// send(byte), receive(last), stop() write `command` and poll `ready` for the
// four-phase handshake.  A behavioural slave sits on the open-drain bus.
// Checked: register writes land in the slave, read-back data, the
// acknowledge bit, read-back of every shared variable, a purely software
// (bit-banged) byte transfer through SCL/SDA/SDA_oe/SDA_data, SCL_oe, and
// the OPB acknowledge latency.
module tb_i2chw_core
  import shim_pkg::*;
;
  localparam logic [31:0] BASE = 32'hFEFF_0200;
  logic clk = 0, rst = 1;
  logic [31:0] abus = '0, dbus = '0, sln_dbus;
  logic rnw = 0, sel = 0;
  logic errack, retry, toutsup, xferack;
  logic SDA, SDA_oe, SCL, SCL_oe, sda_low, sda_bus;
  int checks = 0, failures = 0;

  assign sda_bus = (SDA_oe ? 1'b1 : SDA) & !sda_low;

  i2chw_core #(.I2C_DIV(4)) dut (
    .OPB_Clk(clk), .OPB_ABus(abus), .OPB_BE(4'hF), .OPB_DBus(dbus), .OPB_RNW(rnw),
    .OPB_Rst(rst), .OPB_select(sel), .OPB_seqaddr(1'b0),
    .Sln_DBus(sln_dbus), .Sln_errAck(errack), .Sln_retry(retry),
    .Sln_toutSup(toutsup), .Sln_xferAck(xferack),
    .SDA, .SDA_oe, .SDA_in(sda_bus), .SCL, .SCL_oe);

  i2c_slave_model #(.ADDR(7'h21)) slave (.clk, .rst, .scl(SCL), .sda(sda_bus), .sda_low);

  always #5 clk = ~clk;

  task automatic opb_xfer(input logic [31:0] a, input logic r, input logic [31:0] d,
                          output logic [31:0] q);
    int n;
    abus = a; rnw = r; dbus = d; sel = 1; n = 0;
    do begin @(negedge clk); n++; end while (!xferack && n < 20);
    q = sln_dbus;
    checks++; if (n != 3) begin failures++; $display("OPB ack after %0d", n); end
    @(posedge clk); #1 sel = 0; abus = '0; dbus = '0;
  endtask
  task automatic wr(input int unsigned reg_i, input logic [31:0] d);
    logic [31:0] q; opb_xfer(BASE + 32'(4*reg_i), 1'b0, d, q);
  endtask
  task automatic rd(input int unsigned reg_i, output logic [31:0] q);
    opb_xfer(BASE + 32'(4*reg_i), 1'b1, 32'h0, q);
  endtask

  // command = c; while (ready); command = IDLE; while (!ready);
  task automatic command(input i2c_cmd_e c);
    logic [31:0] q;
    wr(I2C_REG_COMMAND, 32'(c));
    do rd(I2C_REG_READY, q); while (q[0]);
    wr(I2C_REG_COMMAND, 32'(CMD_IDLE));
    do rd(I2C_REG_READY, q); while (!q[0]);
  endtask
  task automatic send(input logic [7:0] b, output logic acked);
    logic [31:0] q;
    wr(I2C_REG_SREG, 32'(b));
    command(CMD_SEND);
    rd(I2C_REG_ACK, q);
    acked = !q[0];
  endtask
  task automatic receive(input logic last, output logic [7:0] b);
    logic [31:0] q;
    command(last ? CMD_RECEIVE_LAST : CMD_RECEIVE);
    rd(I2C_REG_SREG, q);
    b = q[7:0];
  endtask

  // all-software byte send: toggle the pins from software, read the ack pin
  task automatic sw_delay(); repeat (6) @(posedge clk); #1; endtask
  task automatic sw_send(input logic [7:0] b, output logic acked);
    logic [31:0] q;
    wr(I2C_REG_SDA_OE, 0); sw_delay();
    for (int i = 7; i >= 0; i--) begin
      wr(I2C_REG_SDA, 32'(b[i])); sw_delay();
      wr(I2C_REG_SCL, 1); sw_delay();
      wr(I2C_REG_SCL, 0); sw_delay();
    end
    wr(I2C_REG_SDA_OE, 1); sw_delay();
    wr(I2C_REG_SCL, 1); sw_delay();
    rd(I2C_REG_SDA_IN, q); acked = !q[0];
    sw_delay();
    wr(I2C_REG_SCL, 0); sw_delay();
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic a;
    logic [7:0] b, data [6];
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 6; i++) data[i] = 8'($urandom);

    // reset values as seen by software
    rd(I2C_REG_SCL, q);    checks++; if (q !== 32'd1) failures++;
    rd(I2C_REG_SDA_OE, q); checks++; if (q !== 32'd1) failures++;
    rd(I2C_REG_SCL_OE, q); checks++; if (q !== 32'd0) failures++;
    rd(I2C_REG_COMMAND, q); checks++; if (q !== 32'd0) failures++;
    do rd(I2C_REG_READY, q); while (!q[0]);
    rd(I2C_REG_STATE, q);  checks++; if (q !== 32'(ST_IDLE)) failures++;

    // write six registers from sub-address 0x40
    command(CMD_START);
    send({7'h21, 1'b0}, a); checks++; if (!a) begin failures++; $display("address not acked"); end
    send(8'h40, a);         checks++; if (!a) failures++;
    for (int i = 0; i < 6; i++) begin send(data[i], a); checks++; if (!a) failures++; end
    command(CMD_STOP);
    for (int i = 0; i < 6; i++) begin
      checks++; if (slave.mem[8'h40 + i] !== data[i]) begin failures++; $display("mem %0d", i); end
    end

    // read back
    command(CMD_START);
    send({7'h21, 1'b0}, a);
    send(8'h40, a);
    command(CMD_START);
    send({7'h21, 1'b1}, a); checks++; if (!a) failures++;
    for (int i = 0; i < 6; i++) begin
      receive(i == 5, b);
      checks++; if (b !== data[i]) begin failures++; $display("rd %0d got %h exp %h", i, b, data[i]); end
    end
    command(CMD_STOP);

    // absent device
    command(CMD_START);
    send({7'h33, 1'b0}, a); checks++; if (a) begin failures++; $display("absent device acked"); end
    command(CMD_STOP);

    // all-software transfer through the same shared variables
    wr(I2C_REG_SDA_OE, 0); wr(I2C_REG_SDA, 1); wr(I2C_REG_SCL, 1); sw_delay();
    wr(I2C_REG_SDA, 0); sw_delay();                      // START
    wr(I2C_REG_SCL, 0); sw_delay();
    sw_send({7'h21, 1'b0}, a); checks++; if (!a) begin failures++; $display("sw address not acked"); end
    sw_send(8'h80, a);         checks++; if (!a) failures++;
    sw_send(8'hC3, a);         checks++; if (!a) failures++;
    wr(I2C_REG_SDA_OE, 0); wr(I2C_REG_SDA, 0); sw_delay();
    wr(I2C_REG_SCL, 1); sw_delay(); wr(I2C_REG_SDA, 1); sw_delay();   // STOP
    checks++; if (slave.mem[8'h80] !== 8'hC3) begin failures++; $display("sw write lost"); end
    checks++; if (slave.starts != 5 || slave.stops != 4) begin
      failures++; $display("starts %0d stops %0d", slave.starts, slave.stops); end

    // SCL_oe is software-owned
    wr(I2C_REG_SCL_OE, 1); rd(I2C_REG_SCL_OE, q);
    checks++; if (q !== 32'd1 || SCL_oe !== 1'b1) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
