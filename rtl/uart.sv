// uart: the serial side of the interface ("bits to bytes"), with the port set
// of the UART component of the original design.
//
// It pairs a receiver (uart_rx) and a transmitter (uart_tx) that share the
// system clock. Towards the sample processor it offers two byte channels:
//   receive : charin holds the last received byte while oready = 1; a
//             one-cycle read strobe consumes it.
//   transmit: iready = 1 while the transmitter can take a byte; a one-cycle
//             write strobe sends charout.
// The original component declares most of these ports bidirectional; here
// each has the single direction in which the port map uses it. The overrun
// and frame_err pulses are additions of this implementation for monitoring.
// Serial format: 8 data bits, no parity, 1 stop bit, CLKS_PER_BIT clocks per
// bit (434 = 50 MHz / 115200 baud by default, an assumed rate).
module uart #(
  parameter int unsigned CLKS_PER_BIT = dsp_lab_pkg::CLKS_PER_BIT
) (
  input  logic       clock,
  input  logic       reset,      // synchronous, active high
  // serial pins
  input  logic       sdatain,    // from the PC (idle high)
  output logic       sdataout,   // to the PC (idle high)
  // receive channel
  output logic [7:0] charin,     // received byte
  output logic       oready,     // received byte waiting
  input  logic       read,       // consume the received byte
  // transmit channel
  input  logic [7:0] charout,    // byte to send
  input  logic       write,      // send charout
  output logic       iready,     // transmitter can take a byte
  // status
  output logic       overrun,    // pulse: a received byte was lost
  output logic       frame_err   // pulse: a frame had a low stop bit
);

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk      (clock),
    .rst      (reset),
    .rxd      (sdatain),
    .data     (charin),
    .ready    (oready),
    .read     (read),
    .overrun  (overrun),
    .frame_err(frame_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk  (clock),
    .rst  (reset),
    .data (charout),
    .write(write),
    .ready(iready),
    .txd  (sdataout)
  );

endmodule
