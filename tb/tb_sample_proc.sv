// tb_sample_proc: self-checking test of the sample buffer and processor.
//
// The UART is replaced by two testbench models: a byte source that offers
// queued bytes on charin/oready (one byte is taken per read strobe, with
// random gaps between bytes) and a byte sink whose iready is random and which
// records every byte written. The user side behaves like a DSP design that
// waits for sample_clock, checks sample_out, and after a random delay writes
// back a known function of the sample (its bitwise inverse) and acknowledges
// the input. The byte stream contains random 20-bit samples, with stray
// non-header bytes in between to exercise resynchronisation, and the user
// side sometimes holds an input for a long time so that the receive path
// must stall. Checks: every sample arrives intact and in order, exactly one
// sample_clock pulse per sample, every result leaves as the correct three
// bytes with the header nibble, non-header bytes are dropped and reported,
// and the stall path is taken.
module tb_sample_proc;
  import dsp_lab_pkg::*;

  localparam int NSAMP = 200;

  logic    clk = 1'b0;
  logic    rst;
  logic    oready, iready, read, write;
  logic [7:0] charin, charout;
  sample_t sample_out, sample_in;
  logic    sample_oready, sample_clock, sample_read, sample_iready, sample_write;
  logic    rx_stall, byte_dropped;

  int checks = 0, failures = 0;
  int n_dropped = 0, n_stall_cycles = 0, n_sclk = 0, n_stray = 0;

  sample_proc dut (
    .clock(clk), .reset(rst), .oready, .iready, .charin, .read, .write, .charout,
    .sample_out, .sample_oready, .sample_clock, .sample_read, .sample_in,
    .sample_iready, .sample_write, .rx_stall, .byte_dropped
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  sample_t    sent_q[$];     // samples sent, in order
  logic [7:0] src_q[$];      // byte stream to the processor
  logic [7:0] sink_q[$];     // bytes the processor wrote
  sample_t    res_q[$];      // results expected back, in order

  // ---- byte source model
  int gap;
  always @(posedge clk) begin
    if (rst) begin
      oready <= 1'b0;
      gap    <= 0;
    end else begin
      if (oready && read) begin
        void'(src_q.pop_front());
        oready <= 1'b0;
        gap    <= $urandom_range(0, 6);
      end else if (!oready) begin
        if (gap > 0) gap <= gap - 1;
        else if (src_q.size() > 0) oready <= 1'b1;
      end
    end
  end
  assign charin = (src_q.size() > 0) ? src_q[0] : 8'h00;

  // ---- byte sink model
  always @(posedge clk) begin
    if (rst) iready <= 1'b0;
    else begin
      if (write) begin
        check(iready, "write only while iready");
        sink_q.push_back(charout);
      end
      iready <= (write) ? 1'b0 : ($urandom_range(0, 3) == 0);
    end
    if (!rst) begin
      if (byte_dropped) n_dropped++;
      if (rx_stall) n_stall_cycles++;
      if (sample_clock) n_sclk++;
    end
  end

  // ---- user-design model
  initial begin
    sample_read = 1'b0; sample_write = 1'b0; sample_in = '0;
    @(negedge rst);
    for (int k = 0; k < NSAMP; k++) begin
      sample_t expv, got;
      int d;
      @(posedge clk);
      while (!sample_clock) @(posedge clk);
      check(sample_oready, "sample_oready with sample_clock");
      expv = sent_q.pop_front();
      got  = sample_out;
      check(got == expv, $sformatf("sample %0d: got %05h expected %05h", k, got, expv));
      // hold the sample: long every 10th sample so the receive path stalls
      d = (k % 10 == 5) ? 400 : $urandom_range(0, 8);
      repeat (d) @(posedge clk);
      while (!sample_iready) @(posedge clk);
      sample_in    <= ~got;
      sample_write <= 1'b1;
      sample_read  <= 1'b1;
      res_q.push_back(~got);
      @(posedge clk);
      sample_write <= 1'b0;
      sample_read  <= 1'b0;
      sample_in    <= 20'h0;
    end
  end

  initial begin
    rst = 1'b1;
    // build the byte stream
    for (int k = 0; k < NSAMP; k++) begin
      sample_t s;
      s = sample_t'($urandom);
      if (k == 0) s = 20'h7FFFF;
      if (k == 1) s = 20'h80000;
      if (k % 7 == 3) begin   // a stray byte that is not a sample start
        logic [7:0] junk;
        junk = 8'($urandom);
        if (junk[7:4] == HDR_NIBBLE) junk[7:4] = ~HDR_NIBBLE;
        src_q.push_back(junk);
        n_stray++;
      end
      sent_q.push_back(s);
      src_q.push_back({HDR_NIBBLE, s[19:16]});
      src_q.push_back(s[15:8]);
      src_q.push_back(s[7:0]);
    end
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    check(sample_iready, "sample_iready after reset");

    while (sink_q.size() < 3 * NSAMP) @(posedge clk);
    repeat (20) @(posedge clk);
    check(sink_q.size() == 3 * NSAMP, "byte count returned");
    for (int k = 0; k < NSAMP; k++) begin
      sample_t r;
      logic [7:0] b0, b1, b2;
      r  = res_q.pop_front();
      b0 = sink_q.pop_front(); b1 = sink_q.pop_front(); b2 = sink_q.pop_front();
      check(b0 == {HDR_NIBBLE, r[19:16]} && b1 == r[15:8] && b2 == r[7:0],
            $sformatf("result %0d bytes %02h %02h %02h for %05h", k, b0, b1, b2, r));
    end
    check(n_sclk == NSAMP, $sformatf("sample_clock pulses %0d", n_sclk));
    check(n_dropped == n_stray, $sformatf("dropped %0d of %0d stray bytes", n_dropped, n_stray));
    check(n_stall_cycles > 0, "receive stall exercised");
    $display("stray bytes dropped: %0d, stall cycles: %0d", n_dropped, n_stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
