// tb_srg_lfsr: checks the shift register generator against a bit-serial
// model of recurrence (18) for several polynomials (order 31 trinomial,
// order 521 trinomial, order 17 with many coefficients), with 1, 3 and 5
// bits per step mixed at random, seeds of one and of several words, and
// holds. It also checks that the bit stream of x^5 + x^2 + 1 has the full
// period 2^5 - 1 = 31.
module tb_srg_lfsr;
  import mpd_pkg::*;
  import mpd_ref_pkg::*;

  localparam int NMAX = 521;
  localparam int LW = $clog2(NMAX + 1);

  logic            clk = 0;
  logic            rst_n = 0;
  logic [LW-1:0]   len;
  logic [NMAX-1:0] coef;
  order_e          order;
  logic            seed_we;
  logic [31:0]     seed_word;
  logic            step;
  logic [4:0]      x;

  int checks = 0, failures = 0;

  srg_lfsr #(.NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_poly(int n, int coefs[$], int nseed, int nsteps);
    ref_srg m = new(n);
    bit [31:0] w;
    int ord, bits;
    bit [4:0] exp_x;
    coef = '0;
    foreach (coefs[i]) begin coef[coefs[i]-1] = 1'b1; m.set_coef(coefs[i]); end
    // junk above the order must be ignored
    for (int i = n; i < NMAX; i++) coef[i] = 1'($urandom);
    len  = LW'(n);
    step = 0;
    @(negedge clk);
    for (int s = 0; s < nseed; s++) begin
      w = $urandom;
      if (s == nseed - 1) w[0] = 1'b1;   // never all-zero
      seed_we = 1; seed_word = w; m.seed_word(w);
      @(negedge clk);
    end
    seed_we = 0;
    @(negedge clk);
    for (int t = 0; t < nsteps; t++) begin
      ord = 1 + ($urandom % 3);
      order = to_order(2'(ord));
      bits = bits_for(ord);
      #1;
      exp_x = '0;
      for (int b = 0; b < bits; b++) exp_x[b] = m.next();
      checks++;
      if (x !== exp_x) begin
        failures++;
        if (failures < 10) $display("n=%0d step %0d order %0d: x=%b expected %b", n, t, ord, x, exp_x);
      end
      if ($urandom % 5 == 0) begin
        // hold: no step, the same bits must come again
        step = 0;
        @(negedge clk);
        checks++;
        if (x !== exp_x) begin failures++; $display("hold moved the state"); end
      end
      step = 1;
      @(negedge clk);
      step = 0;
    end
  endtask

  initial begin
    int q[$];
    int period;
    bit seq [93];
    seed_we = 0; seed_word = '0; step = 0; order = ORDER_1;
    len = LW'(31); coef = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    q = '{3};            run_poly(31, q, 1, 600);
    q = '{3};            run_poly(31, q, 3, 300);
    q = '{32};           run_poly(521, q, 17, 400);
    q = '{1, 2, 5, 7, 11, 12, 16}; run_poly(17, q, 1, 400);

    // x^5 + x^2 + 1 (c2 = 1): the bit stream repeats after 31 bits, not before
    len = LW'(5); coef = '0; coef[1] = 1'b1; order = ORDER_1; step = 0;
    @(negedge clk);
    seed_we = 1; seed_word = 32'h0000_0013; @(negedge clk); seed_we = 0;
    @(negedge clk);
    for (int i = 0; i < 93; i++) begin
      #1 seq[i] = x[0];
      step = 1; @(negedge clk); step = 0;
    end
    period = 0;
    for (int p = 1; p <= 62 && period == 0; p++) begin
      bit same;
      same = 1;
      for (int i = 0; i + p < 93; i++) if (seq[i] != seq[i+p]) same = 0;
      if (same) period = p;
    end
    checks++;
    if (period != 31) begin failures++; $display("period %0d, expected 31", period); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
