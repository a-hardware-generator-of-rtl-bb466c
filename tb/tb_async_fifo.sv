// tb_async_fifo: writes and reads the dual-clock FIFO from two unrelated
// clocks (10 ns and 13 ns) with random pacing, and checks every word read
// against a scoreboard queue. It fills the FIFO with the reader stopped and
// checks that wfull rises after exactly 2^AW words, then drains it and checks
// rempty. A write while full and a read while empty are never issued.
module tb_async_fifo;

  localparam int DW = 32;
  localparam int AW = 4;

  logic          wclk = 0, rclk = 0;
  logic          wrst_n = 0, rrst_n = 0;
  logic          winc = 0, rinc = 0;
  logic [DW-1:0] wdata = '0;
  logic          wfull, rempty;
  logic [DW-1:0] rdata;

  int checks = 0, failures = 0;
  logic [DW-1:0] sb [$];
  int nwritten = 0, nread = 0;
  bit reader_on = 0;
  int write_pct = 50;

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reader
  always @(negedge rclk) begin
    rinc <= 0;
    if (reader_on && !rempty && ($urandom % 100) < 60) begin
      check(sb.size() > 0, "read with empty scoreboard");
      if (sb.size() > 0) check(rdata == sb.pop_front(), "read data");
      nread++;
      rinc <= 1;
    end
  end

  task automatic write_words(int n);
    for (int i = 0; i < n; ) begin
      @(negedge wclk);
      winc = 0;
      if (!wfull && ($urandom % 100) < write_pct) begin
        wdata = $urandom;
        winc = 1;
        sb.push_back(wdata);
        nwritten++;
        i++;
      end
    end
    @(negedge wclk);
    winc = 0;
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge rclk);
    check(rempty && !wfull, "flags after reset");
    // fill with the reader stopped
    write_pct = 100;
    write_words(2**AW);
    repeat (2) @(negedge wclk);
    check(wfull, "full after 2^AW words");
    // drain
    reader_on = 1;
    wait (sb.size() == 0);
    repeat (10) @(posedge rclk);
    check(rempty, "empty after draining");
    check(!wfull, "not full after draining");
    // random traffic
    write_pct = 70;
    write_words(3000);
    wait (sb.size() == 0);
    repeat (10) @(posedge rclk);
    check(rempty, "empty at the end");
    check(nread == nwritten, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
