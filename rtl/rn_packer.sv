// rn_packer: packs encoded random numbers into 32-bit transfer words.
//
// A code of width w = 1, 2 or 3 bits (scheme order 1, 2 or 3) is placed at
// bit position w*i of the word, i counting the numbers in arrival order from
// 0, so the first number of a word sits in its least significant bits. A
// word holds 32, 16 or 10 numbers; at order 3 its two top bits are
// alignment bits and are zero. When the number that completes a word arrives
// (in_valid), word_valid is high in that same cycle with the complete word on
// word, and the accumulator starts again empty. The caller must not present
// a number when the word could not be stored (it stalls on the FIFO's full
// flag). clear drops a partly filled word; a number arriving in the same cycle
// becomes the first of a new word. It is used when the configuration
// changes, so that every word holds numbers of one scheme order.
//
// The ceil(log2 n)-bit combinatorial encoding and the alignment bits follow
// the document; the bit order inside the word and the clear are this
// design's choices.
module rn_packer
  import mpd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  order_e      order,
  input  logic        clear,
  input  logic        in_valid,
  input  code_t       in_code,
  output logic        word_valid,
  output logic [31:0] word
);

  logic [31:0] acc_q;
  logic [4:0]  cnt_q;     // numbers already in acc_q
  logic [31:0] acc;       // accumulator after a clear
  logic [4:0]  cnt;
  logic [4:0]  last;
  logic [5:0]  w;

  always_comb begin
    acc        = clear ? '0 : acc_q;
    cnt        = clear ? '0 : cnt_q;
    w          = 6'(code_width(order));
    last       = 5'(codes_per_word(order) - 1);
    word       = acc | (32'(in_code) << (w * 6'(cnt)));
    word_valid = in_valid && (cnt == last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else if (word_valid || (clear && !in_valid)) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else if (in_valid) begin
      acc_q <= word;
      cnt_q <= cnt + 5'd1;
    end
  end

endmodule
