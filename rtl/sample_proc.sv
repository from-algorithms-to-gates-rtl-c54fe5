// sample_proc: the sample buffer and processor. It turns the byte stream of
// the UART into 20-bit samples for the user's DSP design and turns the
// design's output samples back into bytes.
//
// Receive path. A sample arrives as three bytes, {HDR, s[19:16]}, s[15:8],
// s[7:0]. While hunting for a sample start, every byte whose upper nibble is
// not the header nibble is consumed and dropped (byte_dropped pulses), which
// resynchronises the stream after a lost byte. The next two bytes complete the
// sample. The finished sample is moved into the output buffer (sample_out) as
// soon as that buffer is empty: sample_oready rises and sample_clock pulses
// high for one clock in the same cycle. The user design reads sample_out and
// pulses sample_read, which empties the buffer (sample_oready falls at the
// next edge). If a sample is complete while the buffer is still full, the
// receive path stalls (rx_stall = 1) and leaves further bytes in the UART
// until the buffer is read.
//
// Transmit path. While sample_iready = 1 the user design may pulse
// sample_write with its result on sample_in. The sample is stored,
// sample_iready falls, and the three bytes are handed to the UART one by one,
// each when the UART reports iready. sample_iready rises again once the last
// byte has been handed over.
//
// UART strobes (read, write) and charout are combinational, so a byte is
// consumed or sent in the very cycle the UART offers it; all other outputs
// are registered. The buffer depth of one sample per direction, the header
// value and the byte order are choices of this implementation; the header
// nibble, the three bytes per sample, the 20-bit busses and the five control
// signals follow the design description. sample_clock is a one-clock pulse
// in the system clock domain rather than a separate clock.
module sample_proc
  import dsp_lab_pkg::*;
(
  input  logic                clock,
  input  logic                reset,          // synchronous, active high
  // UART side
  input  logic                oready,         // UART has a received byte
  input  logic                iready,         // UART can take a byte
  input  logic [7:0]          charin,         // received byte
  output logic                read,           // consume charin
  output logic                write,          // send charout
  output logic [7:0]          charout,        // byte to send
  // user design side
  output sample_t             sample_out,     // input sample for the design
  output logic                sample_oready,  // sample_out holds a new sample
  output logic                sample_clock,   // one-clock pulse per new sample
  input  logic                sample_read,    // design has read sample_out
  input  sample_t             sample_in,      // result from the design
  output logic                sample_iready,  // can take a result
  input  logic                sample_write,   // store sample_in and send it
  // status
  output logic                rx_stall,       // complete sample waits for buffer
  output logic                byte_dropped    // pulse: non-header byte discarded
);

  // ---------------------------------------------------------------- receive
  typedef enum logic [1:0] {RX_HUNT, RX_MID, RX_LOW, RX_FULL} rx_state_e;

  rx_state_e   rx_state;
  logic [19:0] rx_asm;     // sample being assembled
  logic        hdr_ok;

  assign hdr_ok   = (charin[7:4] == HDR_NIBBLE);
  assign read     = oready && (rx_state != RX_FULL);
  assign rx_stall = (rx_state == RX_FULL);

  // The output buffer is free when empty or being emptied in this cycle.
  logic obuf_free;
  assign obuf_free = !sample_oready || sample_read;

  always_ff @(posedge clock) begin
    if (reset) begin
      rx_state      <= RX_HUNT;
      rx_asm        <= '0;
      sample_out    <= '0;
      sample_oready <= 1'b0;
      sample_clock  <= 1'b0;
      byte_dropped  <= 1'b0;
    end else begin
      sample_clock <= 1'b0;
      byte_dropped <= 1'b0;
      if (sample_read) sample_oready <= 1'b0;

      unique case (rx_state)
        RX_HUNT: if (oready) begin
          if (hdr_ok) begin
            rx_asm[19:16] <= charin[3:0];
            rx_state      <= RX_MID;
          end else begin
            byte_dropped <= 1'b1;
          end
        end
        RX_MID: if (oready) begin
          rx_asm[15:8] <= charin;
          rx_state     <= RX_LOW;
        end
        RX_LOW: if (oready) begin
          if (obuf_free) begin
            sample_out    <= {rx_asm[19:8], charin};
            sample_oready <= 1'b1;
            sample_clock  <= 1'b1;
            rx_state      <= RX_HUNT;
          end else begin
            rx_asm[7:0] <= charin;
            rx_state    <= RX_FULL;
          end
        end
        RX_FULL: if (obuf_free) begin
          sample_out    <= rx_asm;
          sample_oready <= 1'b1;
          sample_clock  <= 1'b1;
          rx_state      <= RX_HUNT;
        end
        default: rx_state <= RX_HUNT;
      endcase
    end
  end

  // --------------------------------------------------------------- transmit
  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_MID, TX_LOW} tx_state_e;

  tx_state_e tx_state;
  sample_t   tx_buf;

  always_comb begin
    unique case (tx_state)
      TX_HDR:  charout = sample_byte(tx_buf, BYTE_HDR);
      TX_MID:  charout = sample_byte(tx_buf, BYTE_MID);
      TX_LOW:  charout = sample_byte(tx_buf, BYTE_LOW);
      default: charout = '0;
    endcase
  end

  assign write         = iready && (tx_state != TX_IDLE);
  assign sample_iready = (tx_state == TX_IDLE);

  always_ff @(posedge clock) begin
    if (reset) begin
      tx_state <= TX_IDLE;
      tx_buf   <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE: if (sample_write) begin
          tx_buf   <= sample_in;
          tx_state <= TX_HDR;
        end
        TX_HDR:  if (iready) tx_state <= TX_MID;
        TX_MID:  if (iready) tx_state <= TX_LOW;
        TX_LOW:  if (iready) tx_state <= TX_IDLE;
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // -------------------------------------------------------- handshake rules
  // The design may only acknowledge a sample that is there, and may only
  // write while the transmit buffer is free.
  a_read_when_ready : assert property (@(posedge clock) disable iff (reset)
    sample_read |-> sample_oready);
  a_write_when_ready : assert property (@(posedge clock) disable iff (reset)
    sample_write |-> sample_iready);
  // sample_clock marks exactly the cycles in which a new sample appears.
  a_clock_with_sample : assert property (@(posedge clock) disable iff (reset)
    sample_clock |-> sample_oready);

endmodule
