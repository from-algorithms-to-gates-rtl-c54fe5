// tb_freq_response: measures the frequency response of the harness with its
// FIR filter the way a PC-side sweep would, and compares it with theory.
//
// For each tone f = 100, 200, ..., 4000 Hz (sampling rate 8 kHz) the
// testbench sends 30 ms (240 samples) of round(65535 cos(2 pi f n / fs)) over
// the serial link, collects the 240 results and estimates the output
// amplitude by correlating samples 80..239 (a whole number of periods for
// every tone, after the start-up transient) with a cosine and a sine of
// frequency f. The measured gain must match |H(f)| = |2 cos(w) - 1.625|,
// w = 2 pi f / fs, within 1e-3 absolute plus 0.5 % relative; the gain in dB
// is printed for every tone. Every individual result is also compared with
// the bit-exact reference filter. The serial bit time is shortened to 16
// clocks to keep the run short; the data path is the default one.
module tb_freq_response;
  import dsp_lab_pkg::*;

  localparam int unsigned N      = 16;
  localparam int          NF     = 40;
  localparam int          NS     = 240;
  localparam real         FS     = 8000.0;
  localparam real         SCALE  = 65535.0;
  localparam real         PI     = 3.14159265358979;

  logic clk = 1'b0;
  logic rst;
  logic sdatain, sdataout;
  logic status_overrun, status_frame_err, status_resync, status_overflow;

  int checks = 0, failures = 0;

  dsp_lab_top #(.CLKS_PER_BIT(N)) dut (
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

  task automatic send_byte(input logic [7:0] b);
    sdatain <= 1'b0;
    repeat (N) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      sdatain <= b[i];
      repeat (N) @(posedge clk);
    end
    sdatain <= 1'b1;
    repeat (N) @(posedge clk);
  endtask

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
        for (int i = 0; i < 8; i++) begin
          repeat (N) @(posedge clk);
          b[i] = sdataout;
        end
        repeat (N) @(posedge clk);
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

  initial begin
    rst = 1'b1; sdatain = 1'b1;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    repeat (3 * N) @(posedge clk);

    for (int k = 1; k <= NF; k++) begin
      real f, w, hth, c, s, mag, tol;
      int  x1, x2, guard;
      int  exp_y[NS];
      guard = 0;
      f = 100.0 * k;
      w = 2.0 * PI * f / FS;
      // the filter's delay line carries the previous tone's last samples
      x1 = dut.filter1.dly[1];
      x2 = dut.filter1.dly[2];
      for (int n = 0; n < NS; n++) begin
        int  v;
        sample_t sv;
        v  = int'($floor(SCALE * $cos(w * n) + 0.5));
        sv = sample_t'(v);
        exp_y[n] = int'(sample_t'(longint'($floor(real'(v) - 1.625 * real'(x1) + real'(x2)))));
        x2 = x1;
        x1 = v;
        send_byte({HDR_NIBBLE, sv[19:16]});
        send_byte(sv[15:8]);
        send_byte(sv[7:0]);
      end
      while (rx_q.size() < NS && guard < 100 * N) begin
        @(posedge clk);
        guard++;
      end
      check(rx_q.size() == NS, $sformatf("%0.0f Hz: %0d results", f, rx_q.size()));
      c = 0.0;
      s = 0.0;
      for (int n = 0; n < NS && rx_q.size() > 0; n++) begin
        int g;
        g = rx_q.pop_front();
        check(g == exp_y[n], $sformatf("%0.0f Hz sample %0d: %0d expected %0d", f, n, g, exp_y[n]));
        if (n >= 80) begin
          c += real'(g) * $cos(w * n);
          s += real'(g) * $sin(w * n);
        end
      end
      rx_q.delete();
      if (k == NF) mag = (c < 0.0 ? -c : c) / (160.0 * SCALE);   // Nyquist
      else         mag = 2.0 * $sqrt(c * c + s * s) / (160.0 * SCALE);
      hth = 2.0 * $cos(w) - 1.625;
      if (hth < 0.0) hth = -hth;
      tol = 1.0e-3 + 0.005 * hth;
      $display("f = %4.0f Hz  measured %8.3f dB  theory %8.3f dB", f,
               20.0 * $log10(mag + 1.0e-12), 20.0 * $log10(hth));
      check((mag - hth) < tol && (hth - mag) < tol,
            $sformatf("%0.0f Hz: gain %f expected %f", f, mag, hth));
    end
    check(!status_overrun && !status_frame_err && !status_overflow,
          "no lost bytes and no overflow during the sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * NS * 3 * 12 * N + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
