// uart_rx: serial-to-byte receiver of the RS-232 link (8 data bits, no parity,
// one stop bit, LSB first).
//
// The serial input is brought into the clock domain by a two-flop
// synchroniser. A falling edge on the idle line starts a frame; the start bit
// is re-checked half a bit later, and each data bit and the stop bit are then
// sampled in the middle of their bit time, CLKS_PER_BIT clocks apart. A byte
// whose stop bit is 1 is placed in a one-byte holding register and `ready`
// goes high; the reader consumes it with a one-cycle `read` strobe, which
// clears `ready` at the next clock edge. A byte that completes while the
// holding register is still full is dropped and `overrun` pulses for one
// cycle; a frame with a low stop bit is dropped and `frame_err` pulses.
//
// The frame format, mid-bit sampling and the drop-on-overrun policy are this
// implementation's choices; the design description gives the receiver only as
// "bits to bytes".
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = dsp_lab_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       rxd,        // serial input, idle high
  output logic [7:0] data,       // received byte, valid while ready = 1
  output logic       ready,      // a byte waits in the holding register
  input  logic       read,       // consume the byte (one cycle)
  output logic       overrun,    // one-cycle pulse: byte lost, register full
  output logic       frame_err   // one-cycle pulse: stop bit was low
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  rx_state_e     state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shift;
  logic [1:0]    sync;

  wire rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= RX_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shift     <= '0;
      data      <= '0;
      ready     <= 1'b0;
      overrun   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      overrun   <= 1'b0;
      frame_err <= 1'b0;
      if (read) ready <= 1'b0;

      unique case (state)
        RX_IDLE: begin
          if (!rx_s) begin
            state <= RX_START;
            cnt   <= CW'(CLKS_PER_BIT / 2);
          end
        end
        RX_START: begin
          if (cnt == 0) begin
            if (!rx_s) begin   // still low in mid start bit: real frame
              state   <= RX_DATA;
              cnt     <= CW'(CLKS_PER_BIT - 1);
              bit_idx <= '0;
            end else begin     // glitch
              state <= RX_IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RX_DATA: begin
          if (cnt == 0) begin
            shift <= {rx_s, shift[7:1]};
            cnt   <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RX_STOP: begin
          if (cnt == 0) begin
            state <= RX_IDLE;
            if (!rx_s) begin
              frame_err <= 1'b1;
            end else if (ready && !read) begin
              overrun <= 1'b1;
            end else begin
              data  <= shift;
              ready <= 1'b1;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
