// dsp_lab_top: an FPGA test harness that lets a PC stream samples through a
// DSP design over an RS-232 link and read the results back.
//
// Three blocks are chained as in the original top-level design:
//   uart        serial bits <-> bytes
//   sample_proc bytes <-> 20-bit samples, with the five-signal sample
//               handshake towards the user design
//   fir_filter  the user design; here y[n] = x[n] - 1.625 x[n-1] + x[n-2]
// For every three-byte sample the PC sends, the design returns one
// three-byte result sample. All blocks run on the single board clock; the
// original design clocks the sample processor from a separate baud clock,
// which this implementation replaces by clock enables inside the UART.
//
// Ports: the board clock and reset, the two logic-level serial pins (the
// RS-232 line driver sits outside the FPGA) and sticky status flags that
// can drive LEDs. The flags are an addition of this implementation and are
// cleared by reset.
module dsp_lab_top #(
  parameter int unsigned CLKS_PER_BIT = dsp_lab_pkg::CLKS_PER_BIT
) (
  input  logic clock,
  input  logic reset,             // synchronous, active high
  input  logic sdatain,           // serial data from the PC
  output logic sdataout,          // serial data to the PC
  output logic status_overrun,    // a received byte was lost
  output logic status_frame_err,  // a received frame was malformed
  output logic status_resync,     // a non-header byte was skipped
  output logic status_overflow    // a filter result wrapped around
);

  // UART <-> sample processor
  logic       int_oready, int_iready, int_read, int_write;
  logic [7:0] int_charin, int_charout;
  logic       uart_overrun, uart_frame_err;
  // sample processor <-> filter
  dsp_lab_pkg::sample_t int_sample_out, int_sample_in;
  logic       int_sample_oready, int_sample_iready;
  logic       int_sample_read, int_sample_write, int_sample_clock;
  logic       proc_dropped, filt_overflow;

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) uart1 (
    .clock    (clock),
    .reset    (reset),
    .sdatain  (sdatain),
    .sdataout (sdataout),
    .charin   (int_charin),
    .oready   (int_oready),
    .read     (int_read),
    .charout  (int_charout),
    .write    (int_write),
    .iready   (int_iready),
    .overrun  (uart_overrun),
    .frame_err(uart_frame_err)
  );

  sample_proc sample_proc1 (
    .clock        (clock),
    .reset        (reset),
    .oready       (int_oready),
    .iready       (int_iready),
    .charin       (int_charin),
    .read         (int_read),
    .write        (int_write),
    .charout      (int_charout),
    .sample_out   (int_sample_out),
    .sample_oready(int_sample_oready),
    .sample_clock (int_sample_clock),
    .sample_read  (int_sample_read),
    .sample_in    (int_sample_in),
    .sample_iready(int_sample_iready),
    .sample_write (int_sample_write),
    .rx_stall     (),
    .byte_dropped (proc_dropped)
  );

  fir_filter filter1 (
    .clock        (clock),
    .reset        (reset),
    .sample_clock (int_sample_clock),
    .x            (int_sample_out),
    .sample_oready(int_sample_oready),
    .sample_iready(int_sample_iready),
    .read         (int_sample_read),
    .write        (int_sample_write),
    .y            (int_sample_in),
    .overflow     (filt_overflow)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      status_overrun   <= 1'b0;
      status_frame_err <= 1'b0;
      status_resync    <= 1'b0;
      status_overflow  <= 1'b0;
    end else begin
      status_overrun   <= status_overrun   | uart_overrun;
      status_frame_err <= status_frame_err | uart_frame_err;
      status_resync    <= status_resync    | proc_dropped;
      status_overflow  <= status_overflow  | filt_overflow;
    end
  end

endmodule
