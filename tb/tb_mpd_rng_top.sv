// tb_mpd_rng_top: end-to-end test of the generator at its default size
// (polynomial orders up to 521, 256-word FIFO).
//
// A host task writes the configuration port from its own 7 ns clock; a
// reader on a 30 ns clock (one 32-bit word per 30 ns, like a 33 MHz PCI data
// phase) plays the DMA master; CK runs at 8 ns. Each run programs a
// polynomial (order and coefficients), uploads a seed of one or more words,
// enables the generator in one scheme order, reads a number of words, then
// disables it and drains the FIFO. Every word read is compared with words
// built from the bit-serial reference model, the reference acceptance
// mapping and the reference packing.
//
// Mechanisms made to happen and counted: rejected combinations (orders 2 and
// 3), FIFO_FULL stalls (the reader pauses long enough for the 256-word FIFO
// to fill), switches between scheme orders, multi-word seeds, order-521
// polynomials and dropped partial words at a disable. The generation rate is
// checked on the observation ports: one number per CK cycle at order 1, and
// 6/8 and 30/32 of the cycles at orders 2 and 3, outside stalls.
module tb_mpd_rng_top;
  import mpd_pkg::*;
  import mpd_ref_pkg::*;

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
  int n_stall = 0, n_reject = 0, n_switch = 0, n_multiseed = 0, n_long_poly = 0, n_partial = 0;
  int words_read = 0;

  // reader state
  bit          reader_on = 0;
  logic [31:0] got [$];

  // rate measurement on the CK side
  bit          measure = 0;
  int          m_cycles = 0, m_numbers = 0;
  bit          gen_on = 0;        // the generator has been enabled
  int          run_numbers = 0;   // numbers generated in the current run

  mpd_rng_top dut (.*);

  always #4 ck = ~ck;
  always #3.5 hclk = ~hclk;
  always #15 rd_clk = ~rd_clk;

  initial begin
    #60_000_000;
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

  always @(posedge ck) begin
    if (fifo_full && gen_on) n_stall++;
    if (buff_wr) run_numbers++;
    if (measure && !fifo_full) begin
      m_cycles++;
      if (buff_wr) m_numbers++;
    end
  end

  always @(negedge rd_clk) begin
    rd_en <= 0;
    if (reader_on && !rd_empty) begin
      got.push_back(rd_data);
      rd_en <= 1;
    end
  end

  task automatic host_write(cfg_sel_e s, logic [31:0] d);
    @(posedge hclk);
    sel = s; seed_in = d; wr = 1;
    repeat (5) @(posedge hclk);
    wr = 0;
    repeat (5) @(posedge hclk);
  endtask

  // Reference: next complete word of the stream
  function automatic bit [31:0] ref_word(ref_srg m, int ord, ref int rejects);
    bit [31:0] w;
    bit [4:0] xb;
    bit ok;
    int v, k;
    w = 0; k = 0;
    while (k < ref_per_word(ord)) begin
      xb = '0;
      for (int b = 0; b < bits_for(ord); b++) xb[b] = m.next();
      v = ref_sample(ord, xb, ok);
      if (!ok) begin rejects++; continue; end
      w |= 32'(ref_code(ord, v)) << (k * ref_width(ord));
      k++;
    end
    return w;
  endfunction

  // One run: program, seed, enable, read nwords (optionally pausing the
  // reader until the FIFO fills), disable, drain and compare.
  task automatic run(int n, int coefs[$], int nseed, int ord, int nwords, bit fill);
    ref_srg m = new(n);
    bit [31:0] w, exp_w;
    int rej;
    logic [NMAX_T-1:0] cbits;
    cbits = '0;
    foreach (coefs[i]) begin cbits[coefs[i]-1] = 1'b1; m.set_coef(coefs[i]); end
    host_write(CFG_LEN, 32'(n));
    for (int i = (n + 31) / 32 - 1; i >= 0; i--) host_write(CFG_COEF, cbits[i*32 +: 32]);
    for (int s = 0; s < nseed; s++) begin
      w = $urandom;
      if (s == nseed - 1) w[0] = 1'b1;
      host_write(CFG_SEED, w);
      m.seed_word(w);
    end
    if (nseed > 1) n_multiseed++;
    if (n > 64) n_long_poly++;
    got.delete();
    reader_on = !fill;
    run_numbers = 0;
    host_write(CFG_CTRL, 32'(ord) | 32'h4);
    gen_on = 1;
    if (fill) begin
      wait (fifo_full);
      repeat (200) @(posedge ck);
      check(fifo_full, "FIFO stays full while nobody reads");
      reader_on = 1;
    end
    measure = 1;
    wait (got.size() >= nwords);
    measure = 0;
    host_write(CFG_CTRL, 32'(ord));
    gen_on = 0;
    // drain what is left: the FIFO must go empty and stay empty
    begin
      int quiet = 0, guard = 0;
      while (quiet < 20 && guard < 2000) begin
        @(posedge rd_clk);
        guard++;
        quiet = rd_empty ? quiet + 1 : 0;
      end
    end
    check(rd_empty && !buff_wr, "generator stopped and FIFO drained");
    reader_on = 0;
    rej = 0;
    foreach (got[i]) begin
      exp_w = ref_word(m, ord, rej);
      check(got[i] == exp_w, $sformatf("order %0d n=%0d word %0d: %h expected %h", ord, n, i, got[i], exp_w));
    end
    words_read += got.size();
    n_reject += rej;
    if (ord == 3) check(rej > 0, "order 3 rejected some combinations");
    // numbers of a word left incomplete at the disable are dropped
    check(run_numbers >= got.size() * ref_per_word(ord) &&
          run_numbers < (got.size() + 1) * ref_per_word(ord),
          $sformatf("numbers generated %0d against words read %0d", run_numbers, got.size()));
    if (run_numbers > got.size() * ref_per_word(ord)) n_partial++;
    // rate, outside stalls
    case (ord)
      1: check(m_numbers == m_cycles, $sformatf("order 1 rate %0d/%0d", m_numbers, m_cycles));
      2: check(m_numbers * 100 >= m_cycles * 70 && m_numbers * 100 <= m_cycles * 80,
               $sformatf("order 2 rate %0d/%0d", m_numbers, m_cycles));
      default: check(m_numbers * 100 >= m_cycles * 90 && m_numbers * 100 <= m_cycles * 98,
               $sformatf("order 3 rate %0d/%0d", m_numbers, m_cycles));
    endcase
    m_cycles = 0; m_numbers = 0;
    n_switch++;
  endtask

  localparam int NMAX_T = 544;

  initial begin
    int q[$];
    repeat (3) @(posedge ck);
    rst_n = 1; rd_rst_n = 1;
    repeat (3) @(posedge ck);
    check(rd_empty && !fifo_full && !buff_wr, "idle after reset");

    q = '{3};                        run(31, q, 1, 1, 40, 0);
    q = '{3};                        run(31, q, 1, 2, 60, 0);
    q = '{3};                        run(31, q, 1, 3, 60, 1);
    q = '{32};                       run(521, q, 17, 3, 60, 0);
    q = '{32};                       run(521, q, 17, 1, 300, 1);
    q = '{32};                       run(521, q, 17, 2, 60, 0);
    q = '{1, 2, 5, 7, 11, 12, 16};   run(17, q, 1, 2, 30, 0);
    // order 31 with many non-null coefficients
    q = '{1, 3, 6, 8, 13, 20, 27, 30}; run(31, q, 1, 3, 40, 0);

    $display("words=%0d stalls=%0d rejects=%0d switches=%0d multiword_seeds=%0d order521=%0d partial_drops=%0d",
             words_read, n_stall, n_reject, n_switch, n_multiseed, n_long_poly, n_partial);
    check(n_stall > 0, "FIFO_FULL stall happened");
    check(n_reject > 0, "rejection happened");
    check(n_switch >= 3, "scheme order switches happened");
    check(n_multiseed > 0, "multi-word seed happened");
    check(n_long_poly > 0, "order-521 polynomial used");
    check(n_partial > 0, "partial word dropped at a disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
