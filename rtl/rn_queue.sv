// rn_queue: output FIFO queue between the generator and the external reader.
//
// Encoded numbers arrive on CK with buff_wr (BUFF_WR). rn_packer gathers
// them into 32-bit words (32, 16 or 10 numbers each, by scheme order) and
// each complete word goes into a dual-clock FIFO of 2^AW words, which the
// external master (the bus/DMA side) reads on its own clock rd_clk with
// 32-bit data: rd_data shows the oldest word while rd_empty is low, and
// rd_en removes it. fifo_full (FIFO_FULL) is the FIFO's write-side full
// flag; the generator holds while it is high, so no number is ever lost.
// Since a word is only written when a number completes it, fifo_full may
// also stop a partly filled word; it continues once the reader makes room.
// clear drops a partly filled word (configuration change).
//
// A queue written at CK with encoded numbers and read asynchronously with
// 32-bit data, that suspends generation when full, follows the document; the
// depth and placing the packing in front of the FIFO are this design's
// choices.
module rn_queue
  import mpd_pkg::*;
#(
  parameter int unsigned AW = 8   // FIFO depth 2^AW 32-bit words
) (
  input  logic        clk,
  input  logic        rst_n,
  input  order_e      order,
  input  logic        clear,
  input  logic        buff_wr,
  input  code_t       rn,
  output logic        fifo_full,
  input  logic        rd_clk,
  input  logic        rd_rst_n,
  input  logic        rd_en,
  output logic [31:0] rd_data,
  output logic        rd_empty
);

  logic        word_valid;
  logic [31:0] word;

  rn_packer u_pack (
    .clk        (clk),
    .rst_n      (rst_n),
    .order      (order),
    .clear      (clear),
    .in_valid   (buff_wr),
    .in_code    (rn),
    .word_valid (word_valid),
    .word       (word)
  );

  async_fifo #(.DW(32), .AW(AW)) u_fifo (
    .wclk   (clk),
    .wrst_n (rst_n),
    .winc   (word_valid),
    .wdata  (word),
    .wfull  (fifo_full),
    .rclk   (rd_clk),
    .rrst_n (rd_rst_n),
    .rinc   (rd_en),
    .rdata  (rd_data),
    .rempty (rd_empty)
  );

  a_no_number_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(buff_wr && fifo_full))
    else $error("rn_queue: number offered while full");

endmodule
