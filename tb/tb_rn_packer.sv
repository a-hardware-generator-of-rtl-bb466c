// tb_rn_packer: feeds random codes with random gaps for each scheme order
// and checks every word against a reference packing (first number in the
// least significant bits, 32/16/10 numbers per word, zero alignment bits at
// order 3). word_valid must rise exactly with the number that completes a
// word. A clear in the middle of a word must drop the partial word.
module tb_rn_packer;
  import mpd_pkg::*;
  import mpd_ref_pkg::*;

  logic        clk = 0;
  logic        rst_n = 0;
  order_e      order;
  logic        clear;
  logic        in_valid;
  code_t       in_code;
  logic        word_valid;
  logic [31:0] word;

  int checks = 0, failures = 0;

  rn_packer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Send one number and check word_valid and, if the word is complete, word
  task automatic send(int ord, bit [2:0] c, ref bit [31:0] exp_word, ref int k);
    while ($urandom % 3 == 0) begin
      in_valid = 0; #1;
      check(!word_valid, "word_valid without a number");
      @(negedge clk);
    end
    in_valid = 1; in_code = c;
    exp_word |= 32'(c) << (k * ref_width(ord));
    k++;
    #1;
    check(word_valid == (k == ref_per_word(ord)), $sformatf("order %0d word_valid at number %0d", ord, k));
    if (k == ref_per_word(ord)) begin
      check(word == exp_word, $sformatf("order %0d word %h expected %h", ord, word, exp_word));
      exp_word = 0; k = 0;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic bit [2:0] rand_code(int ord);
    int v;
    v = int'($urandom % 5) - 2;
    if (ord == 1) v = (v < 0) ? -1 : 1;
    if (ord == 2 && (v == 2 || v == -2)) v = v / 2;
    return ref_code(ord, v);
  endfunction

  initial begin
    bit [31:0] exp_word;
    int k;
    in_valid = 0; in_code = '0; clear = 0; order = ORDER_1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 1; o <= 3; o++) begin
      order = to_order(2'(o));
      clear = 1; @(negedge clk); clear = 0;
      exp_word = 0; k = 0;
      for (int i = 0; i < ref_per_word(o) * 20; i++) send(o, rand_code(o), exp_word, k);
      // partial word, then clear
      for (int i = 0; i < 5; i++) send(o, rand_code(o), exp_word, k);
      clear = 1; @(negedge clk); clear = 0;
      exp_word = 0; k = 0;
      // clear together with a number: the number starts the new word
      for (int i = 0; i < 3; i++) send(o, rand_code(o), exp_word, k);
      clear = 1; exp_word = 0; k = 0;
      send(o, rand_code(o), exp_word, k);
      clear = 0;
      for (int i = 0; i < ref_per_word(o) * 3; i++) send(o, rand_code(o), exp_word, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
