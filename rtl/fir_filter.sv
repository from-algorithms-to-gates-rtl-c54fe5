// fir_filter: the example DSP design plugged into the sample interface, a
// direct-form FIR filter whose default taps give
//     y[n] = x[n] - 1.625 x[n-1] + x[n-2].
//
// Coefficients are signed fixed-point integers with COEF_FRAC fractional
// bits; the defaults 8, -13, 8 with 3 fractional bits are exactly 1, -1.625
// and 1, so the coefficients carry no quantisation error. The products are
// summed at full precision, the sum is shifted right arithmetically by
// COEF_FRAC (rounding towards minus infinity) and the result is cut to the
// 20-bit output bus. A result outside the 20-bit range wraps around in
// two's complement, as the unprotected hardware would; `overflow` pulses with
// such a result so the effect of too large an input scaling can be observed.
//
// Handshake with the sample processor. On the one-clock sample_clock pulse
// the filter takes x, computes y from x and the two delayed samples, and
// advances its delay line (the delay line is clocked by sample_clock). It then
// waits for sample_iready, and pulses write (result on y) together with read
// (acknowledging x) for one clock. Acknowledging only when the result has been
// written keeps the next input sample from arriving while a result is still
// waiting. Latency from sample_clock to write is two clocks when the
// transmitter is free. The taps and the datapath follow the filter of the
// design description; the fixed-point format, the rounding, the wrap-around,
// the reset input and the handshake timing are choices of this implementation.
module fir_filter
  import dsp_lab_pkg::*;
#(
  parameter int unsigned NTAPS     = 3,
  parameter int unsigned COEF_FRAC = 3,
  parameter int          COEFS [NTAPS] = '{8, -13, 8}
) (
  input  logic    clock,
  input  logic    reset,          // synchronous, active high
  input  logic    sample_clock,   // new input sample on x
  input  sample_t x,              // input sample (from sample_out)
  input  logic    sample_oready,  // x holds an unread sample
  input  logic    sample_iready,  // the processor can take a result
  output logic    read,           // x has been used
  output logic    write,          // y holds a result
  output sample_t y,              // output sample (to sample_in)
  output logic    overflow        // pulse: last result wrapped around
);

  localparam int unsigned ACC_W = SAMPLE_W + 16;

  typedef enum logic [1:0] {F_WAIT, F_OUT, F_ACK} f_state_e;

  f_state_e state;
  sample_t  dly [NTAPS];     // dly[0] unused: the current sample is x
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] y_full;

  always_comb begin
    acc = ACC_W'(COEFS[0]) * ACC_W'(x);
    for (int i = 1; i < NTAPS; i++) acc += ACC_W'(COEFS[i]) * ACC_W'(dly[i]);
    y_full = acc >>> COEF_FRAC;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state    <= F_WAIT;
      y        <= '0;
      read     <= 1'b0;
      write    <= 1'b0;
      overflow <= 1'b0;
      for (int i = 0; i < NTAPS; i++) dly[i] <= '0;
    end else begin
      overflow <= 1'b0;
      unique case (state)
        F_WAIT: if (sample_clock) begin
          y        <= sample_t'(y_full);
          overflow <= (y_full != ACC_W'(sample_t'(y_full)));
          dly[1]   <= x;
          for (int i = 2; i < NTAPS; i++) dly[i] <= dly[i-1];
          state    <= F_OUT;
        end
        F_OUT: if (sample_iready) begin
          write <= 1'b1;
          read  <= 1'b1;
          state <= F_ACK;
        end
        F_ACK: begin
          write <= 1'b0;
          read  <= 1'b0;
          state <= F_WAIT;
        end
        default: state <= F_WAIT;
      endcase
    end
  end

  // The filter never acknowledges a sample that is not there.
  a_read_valid : assert property (@(posedge clock) disable iff (reset)
    read |-> sample_oready);

endmodule
