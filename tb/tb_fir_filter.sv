// tb_fir_filter: self-checking test of the example FIR filter and its side
// of the sample handshake.
//
// The testbench plays the sample processor: it presents a sample on x,
// raises sample_oready with a one-clock sample_clock pulse, and drops
// sample_oready when the filter acknowledges with read. sample_iready is held
// low for a random time to make the filter wait. Each result must equal
// floor(x[n] - 1.625 x[n-1] + x[n-2]) computed in real arithmetic, wrapped to
// 20 bits, and the overflow flag must be set exactly when wrapping happened.
// Inputs are random 17-bit values (no overflow possible) and, in a second
// phase, full-scale 20-bit values (overflow expected). The latency from
// sample_clock to write is checked against two clocks when the transmitter is
// free.
module tb_fir_filter;
  import dsp_lab_pkg::*;

  localparam int NSAMP = 400;

  logic    clk = 1'b0;
  logic    rst;
  logic    sample_clock, sample_oready, sample_iready, read, write, overflow;
  sample_t x, y;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_waits = 0;

  fir_filter dut (
    .clock(clk), .reset(rst), .sample_clock, .x, .sample_oready, .sample_iready,
    .read, .write, .y, .overflow
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference: real-valued filter, floor, wrap to 20 bits.
  function automatic sample_t ref_y(int x0, int x1, int x2, output bit ovf);
    real    r;
    longint v;
    r   = real'(x0) - 1.625 * real'(x1) + real'(x2);
    v   = longint'($floor(r));
    ovf = (v > 524287) || (v < -524288);
    return sample_t'(v);
  endfunction

  initial begin
    int x1 = 0, x2 = 0;
    rst = 1'b1; sample_clock = 1'b0; sample_oready = 1'b0; sample_iready = 1'b0;
    x = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < NSAMP; k++) begin
      int xv, lat, hold;
      bit ovf_exp, ovf_seen;
      sample_t yexp;
      if (k < NSAMP / 2) xv = $urandom_range(0, 131070) - 65535;   // 17 bits
      else               xv = $urandom_range(0, 1048575) - 524288; // 20 bits
      if (k == 0) xv = 65535;
      if (k == NSAMP / 2) xv = -524288;
      yexp = ref_y(xv, x1, x2, ovf_exp);
      hold = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 12) : 0;
      x <= sample_t'(xv);
      sample_oready <= 1'b1;
      sample_clock  <= 1'b1;
      sample_iready <= (hold == 0);
      @(posedge clk);
      sample_clock <= 1'b0;
      lat = 0;
      ovf_seen = 1'b0;
      if (hold > 0) begin
        n_waits++;
        repeat (hold) begin
          @(posedge clk);
          lat++;
          ovf_seen |= overflow;
          check(!write && !read, "no write while sample_iready low");
        end
        sample_iready <= 1'b1;
      end
      while (!write && lat < 40) begin
        @(posedge clk);
        lat++;
        ovf_seen |= overflow;
      end
      check(write && read, $sformatf("sample %0d: write and read together", k));
      check(y == yexp, $sformatf("sample %0d: x=%0d y=%0d expected %0d", k, xv, y, yexp));
      check(ovf_seen == ovf_exp, $sformatf("sample %0d: overflow %0b expected %0b", k, ovf_seen, ovf_exp));
      if (hold == 0) check(lat == 2, $sformatf("sample %0d: latency %0d clocks, expected 2", k, lat));
      if (ovf_exp) n_overflow++;
      sample_oready <= 1'b0;
      sample_iready <= 1'b0;
      @(posedge clk);
      check(!write && !read, "write and read are one-clock pulses");
      x2 = x1;
      x1 = xv;
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    check(n_overflow > 0, "overflow case exercised");
    check(n_waits > 0, "wait for sample_iready exercised");
    $display("overflows: %0d, waits: %0d", n_overflow, n_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
