// i2c_slave_model: behavioural I2C slave for the testbenches, shaped like a
// video decoder's configuration port: 7-bit device address ADDR, a
// sub-address byte after the address byte, then data bytes written to or
// read from consecutive registers (auto-increment).  It oversamples SCL and
// the wired-AND SDA with the system clock and pulls SDA low (sda_low) to
// acknowledge or to send a 0.  It counts START and STOP conditions and the
// acknowledges it gave, and flags a data change while SCL is high that is
// not a START or STOP.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h21
) (
  input  logic clk,
  input  logic rst,
  input  logic scl,
  input  logic sda,
  output logic sda_low
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK_ADDR, S_WRITE, S_ACK_WRITE,
                            S_READ, S_ACK_READ} st_e;
  st_e         st;
  logic        scl_q, sda_q, rw, first, mack;
  logic [7:0]  shreg, ptr;
  logic [3:0]  bits;
  logic [7:0]  mem [256];
  int          starts = 0, stops = 0, acks = 0, bytes_written = 0, bytes_read = 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; scl_q <= 1'b1; sda_q <= 1'b1; sda_low <= 1'b0;
      bits <= '0; ptr <= '0; first <= 1'b0; rw <= 1'b0; mack <= 1'b0; shreg <= '0;
    end else begin
      scl_q <= scl; sda_q <= sda;
      if (scl && scl_q && sda_q && !sda) begin            // START
        st <= S_ADDR; bits <= '0; sda_low <= 1'b0; starts <= starts + 1;
      end else if (scl && scl_q && !sda_q && sda) begin   // STOP
        st <= S_IDLE; sda_low <= 1'b0; stops <= stops + 1;
      end else if (scl && !scl_q) begin                   // SCL rising
        case (st)
          S_ADDR, S_WRITE: begin shreg <= {shreg[6:0], sda}; bits <= bits + 1'b1; end
          S_ACK_READ:      mack <= !sda;
          default: ;
        endcase
      end else if (!scl && scl_q) begin                   // SCL falling
        case (st)
          S_ADDR: if (bits == 4'd8) begin
            if (shreg[7:1] == ADDR) begin
              sda_low <= 1'b1; rw <= shreg[0]; st <= S_ACK_ADDR; acks <= acks + 1;
              first <= 1'b1;
            end else st <= S_IDLE;
          end
          S_WRITE: if (bits == 4'd8) begin
            if (first) ptr <= shreg;
            else begin mem[ptr] <= shreg; ptr <= ptr + 1'b1; bytes_written <= bytes_written + 1; end
            first <= 1'b0; sda_low <= 1'b1; st <= S_ACK_WRITE; acks <= acks + 1;
          end
          S_ACK_ADDR: if (rw) begin
            shreg <= mem[ptr]; sda_low <= !mem[ptr][7]; ptr <= ptr + 1'b1;
            bits <= 4'd1; st <= S_READ; bytes_read <= bytes_read + 1;
          end else begin
            sda_low <= 1'b0; bits <= '0; st <= S_WRITE;
          end
          S_ACK_WRITE: begin sda_low <= 1'b0; bits <= '0; st <= S_WRITE; end
          S_READ: if (bits == 4'd8) begin
            sda_low <= 1'b0; st <= S_ACK_READ;
          end else begin
            sda_low <= !shreg[3'(7 - bits)]; bits <= bits + 1'b1;
          end
          S_ACK_READ: if (mack) begin
            shreg <= mem[ptr]; sda_low <= !mem[ptr][7]; ptr <= ptr + 1'b1;
            bits <= 4'd1; st <= S_READ; bytes_read <= bytes_read + 1;
          end else begin
            sda_low <= 1'b0; st <= S_IDLE;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
