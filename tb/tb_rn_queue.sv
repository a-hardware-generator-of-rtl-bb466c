// tb_rn_queue: offers encoded numbers on every cycle in which fifo_full is
// low, for each scheme order, while a reader on an unrelated 13 ns clock reads
// words, first not at all (so the queue fills and fifo_full must rise after
// exactly 2^AW words), then at random. Every word read is compared with a
// reference packing of the numbers offered.
module tb_rn_queue;
  import mpd_pkg::*;
  import mpd_ref_pkg::*;

  localparam int AW = 3;

  logic        clk = 0, rd_clk = 0;
  logic        rst_n = 0, rd_rst_n = 0;
  order_e      order;
  logic        clear = 0;
  logic        buff_wr = 0;
  code_t       rn = '0;
  logic        fifo_full;
  logic        rd_en = 0;
  logic [31:0] rd_data;
  logic        rd_empty;

  int checks = 0, failures = 0;
  logic [31:0] sb [$];
  bit reader_on = 0;
  int full_cycles = 0;

  rn_queue #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always #6.5 rd_clk = ~rd_clk;

  initial begin
    #5_000_000;
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

  always @(negedge rd_clk) begin
    rd_en <= 0;
    if (reader_on && !rd_empty && ($urandom % 100) < 50) begin
      check(sb.size() > 0, "word read that was never completed");
      if (sb.size() > 0) check(rd_data == sb.pop_front(), $sformatf("word %h", rd_data));
      rd_en <= 1;
    end
  end

  task automatic offer(int ord, int nwords);
    bit [31:0] w;
    int k, done;
    int v;
    w = 0; k = 0; done = 0;
    while (done < nwords) begin
      @(negedge clk);
      buff_wr = 0;
      if (fifo_full) full_cycles++;
      else if ($urandom % 4 != 0) begin
        v = int'($urandom % 3) - 1;
        if (ord == 1 && v == 0) v = 1;
        rn = ref_code(ord, v);
        buff_wr = 1;
        w |= 32'(rn) << (k * ref_width(ord));
        k++;
        if (k == ref_per_word(ord)) begin sb.push_back(w); w = 0; k = 0; done++; end
      end
    end
    @(negedge clk);
    buff_wr = 0;
  endtask

  initial begin
    order = ORDER_1;
    repeat (3) @(posedge clk);
    rst_n = 1; rd_rst_n = 1;
    repeat (3) @(posedge clk);
    // fill with no reader
    order = ORDER_3;
    offer(3, 2**AW);
    repeat (3) @(negedge clk);
    check(fifo_full, "fifo_full after 2^AW words");
    // keep offering while full; the reader starts later
    fork
      offer(3, 3);
      begin repeat (50) @(negedge clk); reader_on = 1; end
    join
    for (int o = 1; o <= 3; o++) begin
      wait (sb.size() == 0);
      @(negedge clk);
      order = to_order(2'(o));
      offer(o, 200);
    end
    wait (sb.size() == 0);
    repeat (10) @(posedge rd_clk);
    check(rd_empty, "empty at the end");
    check(full_cycles > 0, "fifo_full stalled the writer");
    $display("full cycles %0d", full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
