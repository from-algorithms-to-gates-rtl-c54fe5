// dsp_lab_pkg: shared constants and types of the serial DSP test bench-top.
//
// The PC sends every input sample as three bytes: a 4-bit header nibble
// followed by the 20-bit two's-complement sample, most significant bits first
// ({HDR, s[19:16]}, s[15:8], s[7:0]). Output samples travel back in the same
// format. The 20-bit sample width and the 4-bit header follow the design
// description; the header value, the byte order and the serial line rate are
// choices of this implementation.
package dsp_lab_pkg;

  // Sample width on both data busses (SAMPLE_IN and SAMPLE_OUT).
  localparam int unsigned SAMPLE_W = 20;
  // Header nibble carried in the upper half of the first byte of a sample.
  localparam logic [3:0] HDR_NIBBLE = 4'hA;

  // Default system clock and serial rate: 50 MHz board clock, 115200 baud.
  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned BAUD = 115_200;
  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;  // 434

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Position of a byte within one serialised sample.
  typedef enum logic [1:0] {
    BYTE_HDR = 2'd0,  // {HDR_NIBBLE, sample[19:16]}
    BYTE_MID = 2'd1,  // sample[15:8]
    BYTE_LOW = 2'd2   // sample[7:0]
  } byte_pos_e;

  // Build one byte of a serialised sample.
  function automatic logic [7:0] sample_byte(sample_t s, byte_pos_e pos);
    unique case (pos)
      BYTE_HDR: return {HDR_NIBBLE, s[19:16]};
      BYTE_MID: return s[15:8];
      default:  return s[7:0];
    endcase
  endfunction

endpackage
