// tb_dsp_lab_top: end-to-end test of the serial DSP harness at its default
// parameters (50 MHz clock, 434 clocks per bit, the 3-tap FIR filter).
//
// The testbench acts as the PC: it scales waveforms to integers, packs every
// sample as {header, s[19:16]}, s[15:8], s[7:0], sends the bytes on sdatain
// as 8N1 frames and decodes the frames coming back on sdataout into result
// samples. Each result is compared with y[n] = floor(x[n] - 1.625 x[n-1] +
// x[n-2]) computed here in real arithmetic and wrapped to 20 bits. Phases:
//   1. a 600 Hz cosine sampled at 8 kHz, scaled by 65535, 10 ms (80
//      samples); the result amplitude must be |H| = 2 cos(0.15 pi) - 1.625,
//      about 0.157 of the input; a stray byte before sample 10 must be
//      skipped;
//   1b. a sample whose last byte is lost: it is completed with the next
//      sample's header byte (one wrong result), the next sample is skipped
//      byte by byte, and the stream is back in step after that;
//   2. full-scale 20-bit samples of alternating sign, which overflow the
//      filter; results must wrap and the overflow flag must rise;
//   3. a 38-sample burst sent with a 4 % faster bit clock, so that input samples
//      arrive faster than results can leave: the receive path must stall and
//      the filter must wait for the transmit buffer, without losing data.
// Each mechanism (sample clock, resynchronisation, overflow, receive stall,
// filter wait) is counted, and one that never happens is a failure.
module tb_dsp_lab_top;
  import dsp_lab_pkg::*;

  localparam int unsigned N = CLKS_PER_BIT;

  logic clk = 1'b0;
  logic rst;
  logic sdatain, sdataout;
  logic status_overrun, status_frame_err, status_resync, status_overflow;

  int checks = 0, failures = 0;
  int n_sclk = 0, n_resync = 0, n_overflow = 0, n_stall = 0, n_fwait = 0;

  dsp_lab_top dut (
    .clock(clk), .reset(rst), .sdatain, .sdataout, .status_overrun,
    .status_frame_err, .status_resync, .status_overflow
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters (internal events)
  always @(posedge clk) if (!rst) begin
    if (dut.int_sample_clock) n_sclk++;
    if (dut.proc_dropped) n_resync++;
    if (dut.filt_overflow) n_overflow++;
    if (dut.sample_proc1.rx_stall) n_stall++;
    if (dut.filter1.state == dut.filter1.F_OUT && !dut.int_sample_iready) n_fwait++;
  end

  // ---- PC transmitter
  task automatic send_byte(input logic [7:0] b, input int bit_clks);
    sdatain <= 1'b0;
    repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      sdatain <= b[i];
      repeat (bit_clks) @(posedge clk);
    end
    sdatain <= 1'b1;
    repeat (bit_clks) @(posedge clk);
  endtask

  task automatic send_sample(input int v, input int bit_clks);
    sample_t s;
    s = sample_t'(v);
    send_byte({HDR_NIBBLE, s[19:16]}, bit_clks);
    send_byte(s[15:8], bit_clks);
    send_byte(s[7:0], bit_clks);
  endtask

  // ---- PC receiver: decodes frames and rebuilds samples
  int rx_q[$];
  initial begin
    logic [7:0] b;
    logic [7:0] by[3];
    int nb;
    nb = 0;
    forever begin
      @(posedge clk);
      if (!rst && !sdataout) begin
        repeat (N / 2) @(posedge clk);
        if (!sdataout) begin
          for (int i = 0; i < 8; i++) begin
            repeat (N) @(posedge clk);
            b[i] = sdataout;
          end
          repeat (N) @(posedge clk);
          check(sdataout, "returned frame has a stop bit");
          if (nb == 0) check(b[7:4] == HDR_NIBBLE, "returned sample starts with header");
          by[nb] = b;
          nb++;
          if (nb == 3) begin
            sample_t s;
            s = {by[0][3:0], by[1], by[2]};
            rx_q.push_back(int'(s));
            nb = 0;
          end
        end
      end
    end
  end

  // ---- reference filter
  int x1r = 0, x2r = 0;
  function automatic int ref_step(int x0);
    real    r;
    longint v;
    r   = real'(x0) - 1.625 * real'(x1r) + real'(x2r);
    v   = longint'($floor(r));
    x2r = x1r;
    x1r = x0;
    return int'(sample_t'(v));
  endfunction

  int exp_q[$];

  task automatic wait_results(input int count);
    int guard = 0;
    while (rx_q.size() < count && guard < 40 * N * 3) begin
      @(posedge clk);
      guard++;
    end
  endtask

  task automatic compare_all(input string phase);
    check(rx_q.size() == exp_q.size(),
          $sformatf("%s: %0d results for %0d samples", phase, rx_q.size(), exp_q.size()));
    while (rx_q.size() > 0 && exp_q.size() > 0) begin
      int g, e;
      g = rx_q.pop_front();
      e = exp_q.pop_front();
      check(g == e, $sformatf("%s: result %0d expected %0d", phase, g, e));
    end
    rx_q.delete();
    exp_q.delete();
  endtask

  initial begin
    int   xs[$];
    real  peak;
    rst = 1'b1; sdatain = 1'b1;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    repeat (3 * N) @(posedge clk);

    // phase 1: 600 Hz cosine, fs = 8 kHz, scale 65535, 10 ms
    for (int n = 0; n < 80; n++) begin
      int v;
      v = int'($floor(65535.0 * $cos(2.0 * 3.14159265358979 * 600.0 * n / 8000.0) + 0.5));
      if (n == 10) send_byte(8'h3C, N);   // stray byte, not a header
      send_sample(v, N);
      exp_q.push_back(ref_step(v));
    end
    xs = exp_q;
    wait_results(80);
    peak = 0.0;
    for (int n = 2; n < 80; n++) begin
      real a;
      a = (rx_q.size() > n) ? real'(rx_q[n]) : 0.0;
      if (a < 0.0) a = -a;
      if (a > peak) peak = a;
    end
    peak = peak / 65535.0;
    $display("600 Hz: output peak %f of input (|H| = %f)", peak,
             2.0 * $cos(0.15 * 3.14159265358979) - 1.625);
    check(peak > 0.150 && peak < 0.160, "600 Hz output amplitude");
    compare_all("600 Hz cosine");
    check(!status_overflow, "no overflow at 17-bit resolution");
    check(status_resync, "stray byte reported");

    // phase 1b: a sample loses its last byte. The processor completes it
    // with the next sample's header byte, then skips that sample's two
    // remaining bytes (no header nibble) and is back in step after that.
    begin
      int a, b2, c, d, corrupt, r0;
      sample_t sa, sb;
      r0 = n_resync;
      a  = 20000;  b2 = 1234;  c = -3000;  d = 4567;  // byte 1 and 2 of b2: 04, D2
      sa = sample_t'(a);
      sb = sample_t'(b2);
      send_byte({HDR_NIBBLE, sa[19:16]}, N);
      send_byte(sa[15:8], N);                        // sa[7:0] is lost
      send_sample(b2, N);
      send_sample(c, N);
      send_sample(d, N);
      corrupt = int'(sample_t'({sa[19:8], HDR_NIBBLE, sb[19:16]}));
      exp_q.push_back(ref_step(corrupt));
      exp_q.push_back(ref_step(c));
      exp_q.push_back(ref_step(d));
      wait_results(3);
      repeat (40 * N) @(posedge clk);
      compare_all("lost byte");
      check(n_resync - r0 == 2, $sformatf("bytes skipped after a lost byte: %0d", n_resync - r0));
    end

    // phase 2: full-scale input overflows the filter
    for (int n = 0; n < 8; n++) begin
      int v;
      v = (n % 2 == 0) ? 524287 : -524288;
      send_sample(v, N);
      exp_q.push_back(ref_step(v));
    end
    wait_results(8);
    compare_all("full scale");
    check(status_overflow, "overflow reported");

    // phase 3: burst at a 4 % faster bit rate
    for (int n = 0; n < 38; n++) begin
      int v;
      v = int'($urandom_range(0, 131070)) - 65535;
      send_sample(v, N - N / 25);
      exp_q.push_back(ref_step(v));
    end
    wait_results(38);
    compare_all("fast burst");

    repeat (40 * N) @(posedge clk);
    check(rx_q.size() == 0, "no extra results");
    check(!status_overrun && !status_frame_err, "no lost or malformed bytes");
    check(n_sclk == 129, $sformatf("sample clock pulses: %0d", n_sclk));
    check(n_resync > 0, "resynchronisation happened");
    check(n_overflow > 0, "overflow happened");
    check(n_stall > 0, "receive stall happened");
    check(n_fwait > 0, "filter waited for transmit buffer");
    $display("sample clocks %0d, resync %0d, overflows %0d, stall cycles %0d, filter wait cycles %0d",
             n_sclk, n_resync, n_overflow, n_stall, n_fwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
