// tb_mpd_rng: checks the generator (shift register generator plus
// accept/group logic) cycle by cycle against the bit-serial reference model
// for scheme orders 1, 2 and 3 on the order-31 and order-521 trinomials,
// with fifo_full raised at random. In each cycle without a stall the
// reference consumes the sample's bits; buff_wr must match its accept and rn
// its code. In a stalled cycle buff_wr must be low and the pending number
// must survive the stall. It also checks the rate: exactly one number per
// cycle at order 1, and close to 6/8 and 30/32 numbers per unstalled cycle
// at orders 2 and 3 (the document's 8/6 and 32/30 cycles per number).
module tb_mpd_rng;
  import mpd_pkg::*;
  import mpd_ref_pkg::*;

  localparam int NMAX = 521;
  localparam int LW = $clog2(NMAX + 1);

  logic            clk = 0;
  logic            rst_n = 0;
  logic [LW-1:0]   len;
  logic [NMAX-1:0] coef;
  order_e          order;
  logic            enable;
  logic            seed_we;
  logic [31:0]     seed_word;
  logic            fifo_full;
  code_t           rn;
  logic            buff_wr;

  int checks = 0, failures = 0;
  int stalls = 0, rejects = 0;

  mpd_rng #(.NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run(int n, int c, int ord, int ncycles, int stall_pct);
    ref_srg m = new(n);
    bit [4:0] xb;
    bit ok;
    int v, nums, steps;
    bit [31:0] w;
    m.set_coef(c);
    len = LW'(n); coef = '0; coef[c-1] = 1'b1;
    order = to_order(2'(ord));
    enable = 0; fifo_full = 0;
    @(negedge clk);
    for (int s = 0; s < (n + 31) / 32; s++) begin
      w = $urandom; w[0] = 1'b1;
      seed_we = 1; seed_word = w; m.seed_word(w);
      @(negedge clk);
    end
    seed_we = 0;
    enable = 1;
    nums = 0; steps = 0;
    for (int t = 0; t < ncycles; t++) begin
      fifo_full = ($urandom % 100) < stall_pct;
      #1;
      if (fifo_full) begin
        stalls++;
        check(!buff_wr, "buff_wr during stall");
      end else begin
        xb = '0;
        for (int b = 0; b < bits_for(ord); b++) xb[b] = m.next();
        v = ref_sample(ord, xb, ok);
        steps++;
        check(buff_wr == ok, $sformatf("n=%0d order %0d cycle %0d buff_wr", n, ord, t));
        if (ok) begin
          nums++;
          check(rn == ref_code(ord, v), $sformatf("n=%0d order %0d cycle %0d rn=%0d", n, ord, t, rn));
        end else rejects++;
      end
      @(negedge clk);
    end
    enable = 0;
    // rate
    case (ord)
      1: check(nums == steps, "order 1: one number per cycle");
      2: check(nums * 100 > steps * 70 && nums * 100 < steps * 80,
               $sformatf("order 2 rate %0d/%0d", nums, steps));
      default: check(nums * 100 > steps * 91 && nums * 100 < steps * 97,
               $sformatf("order 3 rate %0d/%0d", nums, steps));
    endcase
  endtask

  initial begin
    enable = 0; seed_we = 0; seed_word = '0; fifo_full = 0;
    len = LW'(31); coef = '0; order = ORDER_1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 1; o <= 3; o++) begin
      run(31, 3, o, 3000, 0);
      run(31, 3, o, 2000, 30);
      run(521, 32, o, 1500, 20);
    end
    check(stalls > 0 && rejects > 0, "stalls and rejects happened");
    $display("stalls=%0d rejects=%0d", stalls, rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
