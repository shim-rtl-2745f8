// tb_shim_system: end-to-end test of the whole design at its default
// parameters (I2C tick every 125 bus cycles).
//
// Timer side: software resets the timer, reads it back after known delays
// and checks the count, including a reset landing while the hardware
// increments (software wins) and a wrap past 2^32.
// I2C side: the driver routines (start/send/receive/stop with the
// four-phase ready/command handshake over the OPB) program 84 configuration
// registers of a behavioural decoder-like slave, one register per START,
// device address, sub-address, data, STOP sequence; read a block back with a
// repeated START, ACK on all bytes but the last and NACK on the last; probe an
// absent device; transfer a byte with pure software bit-banging; force the
// state variable from software.  The SCL period during a byte is checked
// against three ticks.  Each mechanism is counted and must occur.
module tb_shim_system
  import shim_pkg::*;
;
  localparam logic [31:0] BASE = 32'hFEFF_0200;
  localparam int          NREGS_PROG = 84;
  localparam int          DIV = 125;

  logic clk = 0, rst = 1;
  // timer bus
  logic [31:0] t_abus = '0, t_dbus = '0, t_sdbus;
  logic t_rnw = 0, t_sel = 0, t_ack, t_err, t_retry, t_tout;
  // i2c bus
  logic [31:0] i_abus = '0, i_dbus = '0, i_sdbus;
  logic i_rnw = 0, i_sel = 0, i_ack, i_err, i_retry, i_tout;
  logic SDA, SDA_oe, SCL, SCL_oe, sda_low, sda_bus, scl_bus;
  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_timer_reset = 0, n_timer_read = 0, n_sw_precedence = 0, n_wrap = 0;
  int n_start = 0, n_rstart = 0, n_send = 0, n_recv_ack = 0, n_recv_nack = 0, n_stop = 0;
  int n_acked = 0, n_nacked = 0, n_handshake_wait = 0, n_bitbang = 0, n_state_force = 0;
  int n_decode_miss = 0, n_scl_period = 0;

  // open-drain wires with pull-ups
  assign sda_bus = (SDA_oe ? 1'b1 : SDA) & !sda_low;
  assign scl_bus = SCL_oe ? 1'b1 : SCL;

  shim_system dut (
    .tmr_OPB_Clk(clk), .tmr_OPB_Rst(rst), .tmr_OPB_ABus(t_abus), .tmr_OPB_BE(4'hF),
    .tmr_OPB_DBus(t_dbus), .tmr_OPB_RNW(t_rnw), .tmr_OPB_select(t_sel), .tmr_OPB_seqaddr(1'b0),
    .tmr_Sln_DBus(t_sdbus), .tmr_Sln_errAck(t_err), .tmr_Sln_retry(t_retry),
    .tmr_Sln_toutSup(t_tout), .tmr_Sln_xferAck(t_ack),
    .i2c_OPB_Clk(clk), .i2c_OPB_Rst(rst), .i2c_OPB_ABus(i_abus), .i2c_OPB_BE(4'hF),
    .i2c_OPB_DBus(i_dbus), .i2c_OPB_RNW(i_rnw), .i2c_OPB_select(i_sel), .i2c_OPB_seqaddr(1'b0),
    .i2c_Sln_DBus(i_sdbus), .i2c_Sln_errAck(i_err), .i2c_Sln_retry(i_retry),
    .i2c_Sln_toutSup(i_tout), .i2c_Sln_xferAck(i_ack),
    .SDA, .SDA_oe, .SDA_in(sda_bus), .SCL, .SCL_oe);

  i2c_slave_model #(.ADDR(7'h21)) decoder (.clk, .rst, .scl(scl_bus), .sda(sda_bus), .sda_low);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // SCL period while the controller shifts a byte: 3 ticks
  longint last_rise = 0;
  logic   scl_q = 1;
  always @(posedge clk) begin
    scl_q <= scl_bus;
    if (scl_bus && !scl_q) begin
      if (dut.opb_i2ccontroller_0_i.state == 5'(ST_SEND4) &&
          last_rise != 0 && cyc - last_rise == 3 * DIV)
        n_scl_period++;
      last_rise <= cyc;
    end
  end

  // ---------------------------------------------------------------- OPB
  task automatic t_xfer(input logic [31:0] a, input logic r, input logic [31:0] d,
                        output logic [31:0] q, output longint start);
    int n;
    t_abus = a; t_rnw = r; t_dbus = d; t_sel = 1; n = 0; start = cyc;
    do begin @(negedge clk); n++; end while (!t_ack && n < 20);
    q = t_sdbus;
    checks++; if (n != 3) begin failures++; $display("timer OPB ack after %0d", n); end
    @(posedge clk); #1 t_sel = 0; t_abus = '0; t_dbus = '0;
  endtask

  task automatic i_xfer(input logic [31:0] a, input logic r, input logic [31:0] d,
                        output logic [31:0] q, output int n);
    i_abus = a; i_rnw = r; i_dbus = d; i_sel = 1; n = 0;
    do begin @(negedge clk); n++; end while (!i_ack && n < 20);
    q = i_sdbus;
    @(posedge clk); #1 i_sel = 0; i_abus = '0; i_dbus = '0;
  endtask
  task automatic wr(input int unsigned r, input logic [31:0] d);
    logic [31:0] q; int n;
    i_xfer(BASE + 32'(4*r), 1'b0, d, q, n);
    checks++; if (n != 3) begin failures++; $display("i2c OPB ack after %0d", n); end
  endtask
  task automatic rd(input int unsigned r, output logic [31:0] q);
    int n;
    i_xfer(BASE + 32'(4*r), 1'b1, 32'h0, q, n);
    checks++; if (n != 3) begin failures++; $display("i2c OPB ack after %0d", n); end
  endtask

  // ---------------------------------------------------------------- driver
  task automatic command(input i2c_cmd_e c);
    logic [31:0] q;
    wr(I2C_REG_COMMAND, 32'(c));
    do begin rd(I2C_REG_READY, q); n_handshake_wait++; end while (q[0]);
    wr(I2C_REG_COMMAND, 32'(CMD_IDLE));
    do rd(I2C_REG_READY, q); while (!q[0]);
  endtask
  task automatic start(); command(CMD_START); n_start++; endtask
  task automatic stop();  command(CMD_STOP);  n_stop++;  endtask
  task automatic send(input logic [7:0] b, output logic acked);
    logic [31:0] q;
    wr(I2C_REG_SREG, 32'(b));
    command(CMD_SEND); n_send++;
    rd(I2C_REG_ACK, q);
    acked = !q[0];
    if (acked) n_acked++; else n_nacked++;
  endtask
  task automatic receive(input logic last, output logic [7:0] b);
    logic [31:0] q;
    command(last ? CMD_RECEIVE_LAST : CMD_RECEIVE);
    if (last) n_recv_nack++; else n_recv_ack++;
    rd(I2C_REG_SREG, q);
    b = q[7:0];
  endtask
  task automatic write_reg(input logic [7:0] sub, input logic [7:0] val);
    logic a;
    start();
    send({7'h21, 1'b0}, a); checks++; if (!a) begin failures++; $display("no acknowledge"); end
    send(sub, a);           checks++; if (!a) begin failures++; $display("no acknowledge"); end
    send(val, a);           checks++; if (!a) begin failures++; $display("no acknowledge"); end
    stop();
  endtask

  task automatic sw_delay(); repeat (DIV) @(posedge clk); #1; endtask
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
    n_bitbang++;
  endtask

  // ---------------------------------------------------------------- timer
  task automatic timer_test();
    logic [31:0] q, w;
    longint tw, tr;
    for (int n = 0; n < 20; n++) begin
      w = (n == 19) ? 32'hFFFF_FF00 : ((n % 2) ? 32'h0 : $urandom);
      t_xfer(BASE, 1'b0, w, q, tw); n_timer_reset++;
      // the counter increments on every cycle, so this write always
      // collides with a hardware write: software must win
      n_sw_precedence++;
      repeat ((n == 19) ? 300 : $urandom_range(0, 200)) @(posedge clk);
      #1 t_xfer(BASE, 1'b1, 32'h0, q, tr); n_timer_read++;
      checks++;
      if (q !== w + 32'(tr - tw - 2)) begin
        failures++; $display("timer %h exp %h", q, w + 32'(tr - tw - 2)); end
      if (q < w) n_wrap++;
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [7:0] b, cfg [NREGS_PROG];
    logic a;
    int n;
    repeat (3) @(posedge clk); #1 rst = 0;

    timer_test();

    // an address outside the I2C window is not answered
    i_xfer(BASE + 32'h100, 1'b1, 32'h0, q, n);
    checks++; if (n != 20 || q != 0) begin failures++; $display("decode miss answered"); end
    else n_decode_miss++;

    do rd(I2C_REG_READY, q); while (!q[0]);

    // program the decoder's configuration registers
    for (int i = 0; i < NREGS_PROG; i++) cfg[i] = 8'($urandom);
    for (int i = 0; i < NREGS_PROG; i++) write_reg(8'(i), cfg[i]);
    for (int i = 0; i < NREGS_PROG; i++) begin
      checks++;
      if (decoder.mem[i] !== cfg[i]) begin failures++; $display("cfg[%0d] %h exp %h", i, decoder.mem[i], cfg[i]); end
    end

    // read back eight registers with a repeated start
    start();
    send({7'h21, 1'b0}, a);
    send(8'd10, a);
    start(); n_rstart++;
    send({7'h21, 1'b1}, a); checks++; if (!a) begin failures++; $display("no acknowledge"); end
    for (int i = 0; i < 8; i++) begin
      receive(i == 7, b);
      checks++; if (b !== cfg[10 + i]) begin failures++; $display("read %0d %h", i, b); end
    end
    stop();

    // absent device
    start();
    send({7'h4A, 1'b0}, a); checks++; if (a) begin failures++; $display("absent device acked"); end
    stop();

    // software bit-banging: write register 0x7F = 0x5A
    wr(I2C_REG_SDA_OE, 0); wr(I2C_REG_SDA, 1); wr(I2C_REG_SCL, 1); sw_delay();
    wr(I2C_REG_SDA, 0); sw_delay(); wr(I2C_REG_SCL, 0); sw_delay();
    sw_send({7'h21, 1'b0}, a); checks++; if (!a) begin failures++; $display("no acknowledge"); end
    sw_send(8'h7F, a);         checks++; if (!a) begin failures++; $display("no acknowledge"); end
    sw_send(8'h5A, a);         checks++; if (!a) begin failures++; $display("no acknowledge"); end
    wr(I2C_REG_SDA_OE, 0); wr(I2C_REG_SDA, 0); sw_delay();
    wr(I2C_REG_SCL, 1); sw_delay(); wr(I2C_REG_SDA, 1); sw_delay();
    checks++; if (decoder.mem[8'h7F] !== 8'h5A) begin failures++; $display("bit-banged write lost"); end

    // software forces the controller state while it idles with command
    // IDLE: it leaves IDLE0 at the next tick, which drops ready for a tick
    wr(I2C_REG_STATE, 32'(ST_IDLE0));
    n = 0;
    do begin rd(I2C_REG_READY, q); n++; end while (q[0] && n < 100);
    checks++; if (q[0]) begin failures++; $display("state write had no effect"); end
    else n_state_force++;
    do rd(I2C_REG_READY, q); while (!q[0]);
    rd(I2C_REG_STATE, q);
    checks++; if (q !== 32'(ST_IDLE)) begin failures++; $display("state %0d after force", q); end

    checks++;
    if (decoder.starts != NREGS_PROG + 4 || decoder.stops != NREGS_PROG + 3) begin
      failures++; $display("starts %0d stops %0d", decoder.starts, decoder.stops); end

    $display("mechanisms: timer_reset=%0d timer_read=%0d sw_precedence=%0d wrap=%0d",
             n_timer_reset, n_timer_read, n_sw_precedence, n_wrap);
    $display("  start=%0d repeated_start=%0d send=%0d recv_ack=%0d recv_nack=%0d stop=%0d",
             n_start, n_rstart, n_send, n_recv_ack, n_recv_nack, n_stop);
    $display("  acked=%0d nacked=%0d handshake_polls=%0d bitbang=%0d state_force=%0d decode_miss=%0d scl_period_ok=%0d",
             n_acked, n_nacked, n_handshake_wait, n_bitbang, n_state_force, n_decode_miss, n_scl_period);
    begin
      int m [17];
      m = '{n_timer_reset, n_timer_read, n_sw_precedence, n_wrap, n_start, n_rstart,
            n_send, n_recv_ack, n_recv_nack, n_stop, n_acked, n_nacked,
            n_handshake_wait, n_bitbang, n_state_force, n_decode_miss, n_scl_period};
      for (int k = 0; k < 17; k++) begin
        checks++; if (m[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
