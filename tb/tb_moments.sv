// tb_moments: statistical workload test of the whole generator at its default
// size. For each scheme order it programs the order-521 trinomial
// x^521 + x^32 + 1 with a random 17-word seed, reads tens of thousands of
// numbers through the read port, decodes them as the host would (code ->
// multiple of sqrt(D), D = 1) and checks
//   - the frequency of each value against the target distribution
//     (1/2,1/2; 1/6,2/3,1/6; 1/30,9/30,1/3,9/30,1/30),
//   - the moments the schemes need: E[W] = E[W^3] = E[W^5] = 0, E[W^2] = 1,
//     E[W^4] = 3 and, for the five-point variable, E[W^6] = 15,
// each within about five standard errors.
module tb_moments;
  import mpd_pkg::*;

  logic        ck = 0, hclk = 0, rd_clk = 0;
  logic        rst_n = 0, rd_rst_n = 0;
  logic        wr = 0;
  logic [1:0]  sel = '0;
  logic [31:0] seed_in = '0;
  logic        rd_en = 0;
  logic [31:0] rd_data;
  logic        rd_empty;
  code_t       rn;
  logic        buff_wr;
  logic        fifo_full;

  int checks = 0, failures = 0;

  mpd_rng_top dut (.*);

  always #4 ck = ~ck;
  always #3.5 hclk = ~hclk;
  always #15 rd_clk = ~rd_clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_near(real got, real exp, real tol, string what);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL: %s = %f, expected %f +- %f", what, got, exp, tol);
    end else
      $display("  %s = %f (target %f)", what, got, exp);
  endtask

  task automatic host_write(cfg_sel_e s, logic [31:0] d);
    @(posedge hclk);
    sel = s; seed_in = d; wr = 1;
    repeat (5) @(posedge hclk);
    wr = 0;
    repeat (5) @(posedge hclk);
  endtask

  // Value of a code, in units of sqrt(D)
  function automatic real decode(int ord, bit [2:0] c);
    real mag;
    if (ord == 1) return c[0] ? -1.0 : 1.0;
    case (c[2:1])
      2'd1: mag = (ord == 2) ? $sqrt(3.0) : 1.0;
      2'd2: mag = $sqrt(6.0);
      default: mag = 0.0;
    endcase
    return c[0] ? -mag : mag;
  endfunction

  task automatic run(int ord, int nwords);
    int w = 0, per, width, n;
    int cnt [8];
    real m [7];
    real v, p;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (m[i]) m[i] = 0.0;
    per   = (ord == 1) ? 32 : (ord == 2 ? 16 : 10);
    width = ord;
    for (int s = 0; s < 17; s++) host_write(CFG_SEED, $urandom | 32'(s == 16));
    host_write(CFG_CTRL, 32'(ord) | 32'h4);
    while (w < nwords) begin
      @(negedge rd_clk);
      rd_en = 0;
      if (!rd_empty) begin
        for (int i = 0; i < per; i++) begin
          bit [2:0] c;
          c = 3'((rd_data >> (i * width)) & ((1 << width) - 1));
          cnt[c]++;
          v = decode(ord, c);
          p = 1.0;
          for (int k = 1; k <= 6; k++) begin p *= v; m[k] += p; end
        end
        if (ord == 3) begin
          checks++;
          if (rd_data[31:30] != 2'b00) begin failures++; $display("FAIL: alignment bits set"); end
        end
        rd_en = 1;
        w++;
      end
    end
    @(negedge rd_clk);
    rd_en = 0;
    host_write(CFG_CTRL, 32'(ord));
    repeat (100) @(negedge rd_clk) rd_en = !rd_empty;
    rd_en = 0;
    n = nwords * per;
    for (int k = 1; k <= 6; k++) m[k] /= n;
    $display("scheme order %0d, %0d numbers", ord, n);
    case (ord)
      1: begin
        check_near(real'(cnt[0]) / n, 0.5, 5.0 * $sqrt(0.25 / n), "P(+1)");
        check_near(real'(cnt[1]) / n, 0.5, 5.0 * $sqrt(0.25 / n), "P(-1)");
        check_near(m[1], 0.0, 5.0 * $sqrt(1.0 / n), "E[W]");
        check_near(m[2], 1.0, 1e-9, "E[W^2]");
      end
      2: begin
        check_near(real'(cnt[0]) / n, 2.0/3, 5.0 * $sqrt(2.0/9 / n), "P(0)");
        check_near(real'(cnt[2]) / n, 1.0/6, 5.0 * $sqrt(5.0/36 / n), "P(+sqrt3)");
        check_near(real'(cnt[3]) / n, 1.0/6, 5.0 * $sqrt(5.0/36 / n), "P(-sqrt3)");
        check_near(m[1], 0.0, 5.0 * $sqrt(1.0 / n), "E[W]");
        check_near(m[2], 1.0, 5.0 * $sqrt(2.0 / n), "E[W^2]");
        check_near(m[3], 0.0, 5.0 * $sqrt(9.0 / n), "E[W^3]");
        check_near(m[4], 3.0, 5.0 * $sqrt(18.0 / n), "E[W^4]");
        check_near(m[5], 0.0, 5.0 * $sqrt(81.0 / n), "E[W^5]");
      end
      default: begin
        check_near(real'(cnt[0]) / n, 1.0/3, 5.0 * $sqrt(2.0/9 / n), "P(0)");
        check_near(real'(cnt[2]) / n, 0.3, 5.0 * $sqrt(0.21 / n), "P(+1)");
        check_near(real'(cnt[3]) / n, 0.3, 5.0 * $sqrt(0.21 / n), "P(-1)");
        check_near(real'(cnt[4]) / n, 1.0/30, 5.0 * $sqrt(29.0/900 / n), "P(+sqrt6)");
        check_near(real'(cnt[5]) / n, 1.0/30, 5.0 * $sqrt(29.0/900 / n), "P(-sqrt6)");
        checks++;
        if (cnt[1] + cnt[6] + cnt[7] != 0) begin failures++; $display("FAIL: unused codes seen"); end
        check_near(m[1], 0.0, 5.0 * $sqrt(1.0 / n), "E[W]");
        check_near(m[2], 1.0, 5.0 * $sqrt(2.0 / n), "E[W^2]");
        check_near(m[3], 0.0, 5.0 * $sqrt(15.0 / n), "E[W^3]");
        check_near(m[4], 3.0, 5.0 * $sqrt(78.0 / n), "E[W^4]");
        check_near(m[5], 0.0, 5.0 * $sqrt(3111.0 / n), "E[W^5]");
        check_near(m[6], 15.0, 5.0 * $sqrt(2886.0 / n), "E[W^6]");
      end
    endcase
  endtask

  initial begin
    repeat (3) @(posedge ck);
    rst_n = 1; rd_rst_n = 1;
    repeat (3) @(posedge ck);
    host_write(CFG_LEN, 32'd521);
    for (int i = 0; i < 16; i++) host_write(CFG_COEF, 32'h0);
    host_write(CFG_COEF, 32'h8000_0000);        // c32 = 1
    run(1, 3000);
    run(2, 6000);
    run(3, 10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
