// i2c_tick: the clock enable that paces the I2C controller.
//
// The controller's state machine advances only in cycles where i2c_clock is
// high.  This block produces that enable as a one-cycle pulse every DIV bus
// clock cycles from a down counter.  With the state machine spending four
// ticks per data bit, DIV = 125 on a 50 MHz bus clock gives a 100 kHz
// (standard mode) SCL; the divider value and the counter are this design's
// choice.  The first pulse comes DIV cycles after reset.
module i2c_tick #(
  parameter int unsigned DIV = 125
) (
  input  logic clk,
  input  logic rst,
  output logic i2c_clock
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= CW'(DIV - 1);
      i2c_clock <= 1'b0;
    end else if (cnt == '0) begin
      cnt       <= CW'(DIV - 1);
      i2c_clock <= 1'b1;
    end else begin
      cnt       <= cnt - 1'b1;
      i2c_clock <= 1'b0;
    end
  end

endmodule
