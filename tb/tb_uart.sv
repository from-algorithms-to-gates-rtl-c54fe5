// tb_uart: self-checking test of the UART (receiver and transmitter).
//
// A bit-banged serial source in the testbench sends random bytes (8N1) to
// sdatain; each must appear on charin with oready, and is consumed with a
// read strobe. Two bytes sent without reading must raise overrun and keep the
// first byte; a frame with a low stop bit must raise frame_err. On the
// transmit side random bytes are written and a sampling decoder in the
// testbench checks the start bit, the data bits, the stop bit and the frame
// length on sdataout, and a burst of four bytes, each written in the cycle
// iready rises, must leave with start bits exactly 10 bit times apart. The
// bit time is shortened to 16 clocks.
module tb_uart;
  localparam int unsigned N = 16;  // clocks per bit

  logic       clk = 1'b0;
  logic       rst;
  logic       sdatain, sdataout;
  logic [7:0] charin;
  logic       oready, read, iready, overrun, frame_err;
  wire        write;
  wire  [7:0] charout;

  int checks = 0, failures = 0;
  int n_overrun = 0, n_frame_err = 0;

  uart #(.CLKS_PER_BIT(N)) dut (
    .clock(clk), .reset(rst), .sdatain, .sdataout, .charin, .oready, .read,
    .charout, .write, .iready, .overrun, .frame_err
  );

  always #10 clk = ~clk;

  // Burst writer: writes in the very cycle iready is high, as sample_proc does.
  logic       burst_en = 1'b0;
  int         burst_left = 0;
  logic       write_tb;
  logic [7:0] charout_tb;
  logic       write_burst;
  assign write_burst = burst_en && iready && (burst_left > 0);
  assign write   = write_tb | write_burst;
  assign charout = burst_en ? 8'(8'h30 + burst_left) : charout_tb;
  always @(posedge clk) if (write_burst) burst_left <= burst_left - 1;

  always @(posedge clk) if (!rst) begin
    if (overrun) n_overrun++;
    if (frame_err) n_frame_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send one frame on sdatain; stop_bit = 0 makes a framing error.
  task automatic send_byte(input logic [7:0] b, input logic stop_bit = 1'b1);
    sdatain <= 1'b0;
    repeat (N) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      sdatain <= b[i];
      repeat (N) @(posedge clk);
    end
    sdatain <= stop_bit;
    repeat (N) @(posedge clk);
    sdatain <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic consume(input logic [7:0] expect_b, input string what);
    int waited = 0;
    while (!oready && waited < 20 * N) begin
      @(posedge clk);
      waited++;
    end
    check(oready, {what, ": oready"});
    check(charin == expect_b,
          $sformatf("%s: got %02h expected %02h", what, charin, expect_b));
    read <= 1'b1;
    @(posedge clk);
    read <= 1'b0;
    @(posedge clk);
    check(!oready, {what, ": oready cleared by read"});
  endtask

  // Decode one frame from sdataout, starting at its falling edge.
  task automatic receive_tx(output logic [7:0] b, output int frame_clks);
    int t0;
    t0 = 0;
    while (sdataout) @(posedge clk);
    repeat (N / 2) begin @(posedge clk); t0++; end
    check(!sdataout, "tx start bit low");
    for (int i = 0; i < 8; i++) begin
      repeat (N) begin @(posedge clk); t0++; end
      b[i] = sdataout;
    end
    repeat (N) begin @(posedge clk); t0++; end
    check(sdataout, "tx stop bit high");
    while (!iready) begin @(posedge clk); t0++; end
    frame_clks = t0;
  endtask

  logic [7:0] b, first;
  int fc;

  initial begin
    rst = 1'b1; sdatain = 1'b1; read = 1'b0; write_tb = 1'b0; charout_tb = '0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);

    // receive path
    check(!oready && sdataout && iready, "idle after reset");
    for (int k = 0; k < 20; k++) begin
      b = 8'($urandom);
      if (k == 0) b = 8'h00;
      if (k == 1) b = 8'hFF;
      send_byte(b);
      consume(b, $sformatf("rx byte %0d", k));
    end

    // overrun: second byte arrives while the first is still held
    first = 8'h5A;
    send_byte(first);
    send_byte(8'hC3);
    check(n_overrun == 1, "overrun flagged once");
    consume(first, "byte kept on overrun");

    // framing error
    send_byte(8'h81, 1'b0);
    repeat (N) @(posedge clk);
    check(n_frame_err == 1, "frame error flagged");
    check(!oready, "bad frame discarded");

    // transmit path
    for (int k = 0; k < 20; k++) begin
      logic [7:0] sent;
      sent = 8'($urandom);
      while (!iready) @(posedge clk);
      charout_tb <= sent;
      write_tb   <= 1'b1;
      @(posedge clk);
      write_tb   <= 1'b0;
      receive_tx(b, fc);
      check(b == sent, $sformatf("tx byte %0d: got %02h expected %02h", k, b, sent));
      check(fc >= 10 * N - 2 && fc <= 10 * N + 1,
            $sformatf("tx frame length %0d clocks, expected about %0d", fc, 10 * N));
    end

    // back-to-back: four bytes written as soon as iready rises must follow
    // each other without a gap, start bits exactly 10 bit times apart
    repeat (3 * N) @(posedge clk);
    begin
      int t_start[4];
      int t = 0, k = 0;
      logic prev = 1'b1;
      burst_left <= 4;
      burst_en   <= 1'b1;
      while (k < 4 && t < 60 * N) begin
        @(posedge clk);
        t++;
        // a start bit begins with a falling edge at a frame boundary
        if (prev && !sdataout && (k == 0 || t - t_start[k-1] >= 10 * N - 1)) begin
          t_start[k] = t;
          k++;
        end
        prev = sdataout;
      end
      check(k == 4, "four back-to-back frames seen");
      for (int i = 1; i < k; i++)
        check(t_start[i] - t_start[i-1] == 10 * N,
              $sformatf("frame spacing %0d clocks, expected %0d", t_start[i] - t_start[i-1], 10 * N));
      repeat (12 * N) @(posedge clk);
      burst_en <= 1'b0;
    end

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
