// tb_cfg_loader: drives the asynchronous configuration port with writes whose
// timing is unrelated to CK (a 7 ns clock against CK at 10 ns) and checks the
// reset values, the one-cycle seed_we pulse with its word, the shifting of
// coefficient words, the clamping of the order, the control bits and the
// cfg_wr pulse per write. It also checks that a write takes effect within
// 2 to 4 CK cycles of wr rising.
module tb_cfg_loader;
  import mpd_pkg::*;

  localparam int NMAX = 521;
  localparam int LW = $clog2(NMAX + 1);

  logic            clk = 0;
  logic            hclk = 0;
  logic            rst_n = 0;
  logic            wr = 0;
  logic [1:0]      sel = '0;
  logic [31:0]     seed_in = '0;
  logic            seed_we;
  logic [31:0]     seed_word;
  logic [NMAX-1:0] coef;
  logic [LW-1:0]   len;
  order_e          order;
  logic            enable;
  logic            cfg_wr;

  int checks = 0, failures = 0;
  int seed_pulses = 0, cfg_pulses = 0;
  logic [31:0] last_seed;
  longint unsigned ck_count = 0;
  longint unsigned last_pulse_ck = 0;

  cfg_loader #(.NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;
  always #3.5 hclk = ~hclk;

  always @(posedge clk) begin
    ck_count++;
    if (seed_we) begin seed_pulses++; last_seed = seed_word; end
    if (cfg_wr) begin cfg_pulses++; last_pulse_ck = ck_count; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One write from the host clock domain
  task automatic host_write(cfg_sel_e s, logic [31:0] d);
    longint unsigned start;
    int n_before;
    n_before = cfg_pulses;
    @(posedge hclk);
    sel = s; seed_in = d; wr = 1;
    start = ck_count;
    repeat (5) @(posedge hclk);
    wr = 0;
    repeat (6) @(posedge hclk);
    check(cfg_pulses == n_before + 1, "one cfg_wr per write");
    check(last_pulse_ck - start >= 2 && last_pulse_ck - start <= 4,
          $sformatf("write latency %0d CK cycles", last_pulse_ck - start));
  endtask

  initial begin
    logic [NMAX-1:0] exp_coef;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(len == LW'(31), "reset order 31");
    check(coef == NMAX'(4), "reset coefficient c3");
    check(order == ORDER_1 && !enable, "reset control");

    host_write(CFG_SEED, 32'hDEAD_BEEF);
    check(seed_pulses == 1 && last_seed == 32'hDEAD_BEEF, "seed word 1");
    host_write(CFG_SEED, 32'h0123_4567);
    check(seed_pulses == 2 && last_seed == 32'h0123_4567, "seed word 2");

    exp_coef = NMAX'(4);
    for (int i = 0; i < 18; i++) begin
      logic [31:0] w;
      w = $urandom;
      host_write(CFG_COEF, w);
      exp_coef = NMAX'({exp_coef, w});
      check(coef == exp_coef, $sformatf("coefficient word %0d", i));
    end
    check(seed_pulses == 2, "no seed pulse on other writes");

    host_write(CFG_LEN, 32'd521);  check(len == LW'(521), "order 521");
    host_write(CFG_LEN, 32'd9999); check(len == LW'(NMAX), "order clamped to NMAX");
    host_write(CFG_LEN, 32'd1);    check(len == LW'(2), "order clamped to 2");
    host_write(CFG_LEN, 32'd89);   check(len == LW'(89), "order 89");

    host_write(CFG_CTRL, 32'b111); check(order == ORDER_3 && enable, "ctrl order 3 on");
    host_write(CFG_CTRL, 32'b010); check(order == ORDER_2 && !enable, "ctrl order 2 off");
    host_write(CFG_CTRL, 32'b100); check(order == ORDER_1 && enable, "ctrl 0 taken as order 1");
    check(len == LW'(89), "order kept across control writes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
