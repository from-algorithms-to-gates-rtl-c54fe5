// uart_tx: byte-to-serial transmitter of the RS-232 link (8 data bits, no
// parity, one stop bit, LSB first).
//
// While idle the line is held high and `ready` is 1. A one-cycle `write`
// strobe while ready loads `data` and starts a frame: one start bit (0), the
// eight data bits LSB first and one stop bit (1), each CLKS_PER_BIT clocks
// long. `ready` drops at the clock edge that takes the byte and is high again
// in the last clock of the stop bit, so a byte written then follows without a
// gap and back-to-back frames take exactly 10 * CLKS_PER_BIT clocks each. A
// write while not ready is ignored. The frame format is this implementation's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = dsp_lab_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst,    // synchronous, active high
  input  logic [7:0] data,   // byte to send, sampled when write = 1
  input  logic       write,  // start sending data (one cycle, while ready)
  output logic       ready,  // transmitter idle, can take a byte
  output logic       txd     // serial output, idle high
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bits_left;  // frame bits still to send after the current one
  logic [8:0]    shift;      // {stop, data} still to be sent
  logic          busy;
  logic          last_clk;   // final clock of the stop bit

  assign last_clk = busy && (cnt == 0) && (bits_left == 0);
  assign ready    = !busy || last_clk;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      txd       <= 1'b1;
      cnt       <= '0;
      bits_left <= '0;
      shift     <= '1;
    end else if (ready && write) begin
      busy      <= 1'b1;
      txd       <= 1'b0;                 // start bit
      shift     <= {1'b1, data};
      cnt       <= CW'(CLKS_PER_BIT - 1);
      bits_left <= 4'd9;
    end else if (!busy || last_clk) begin
      busy <= 1'b0;                      // idle, or stop bit done
      txd  <= 1'b1;
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else begin
      txd       <= shift[0];
      shift     <= {1'b1, shift[8:1]};
      cnt       <= CW'(CLKS_PER_BIT - 1);
      bits_left <= bits_left - 1'b1;
    end
  end

endmodule
