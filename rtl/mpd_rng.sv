// mpd_rng: the multi-point distributed random number generator, a shift
// register generator followed by the accept/group logic.
//
// Each CK cycle in which the generator is enabled and the output queue is
// not full (fifo_full low), the shift register generator advances by the
// 1, 3 or 5 bits one sample of the selected scheme order needs, and the
// accept/group logic turns those bits into one encoded number on rn
// (RN[0:2]). buff_wr (BUFF_WR) is high in that same cycle when the
// combination was accepted; a rejected combination (2 of 8 at order 2,
// 2 of 32 at order 3) still consumes its bits but writes nothing, so on
// average a number appears every 1, 8/6 or 32/30 cycles. rn and buff_wr are
// combinational functions of the generator state register, so the number
// is written into the queue at the clock edge that advances the state, and a
// raised fifo_full holds the state, and so the pending number, until the
// queue has room. A seed write (seed_we) takes precedence over a step and
// suppresses buff_wr for that cycle.
//
// One number per clock, the stall on FIFO_FULL and the structure follow the
// document; making the outputs combinational from the state register is this
// design's choice.
module mpd_rng
  import mpd_pkg::*;
#(
  parameter int unsigned NMAX = 521,
  localparam int unsigned LW = $clog2(NMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LW-1:0]   len,
  input  logic [NMAX-1:0] coef,
  input  order_e          order,
  input  logic            enable,
  input  logic            seed_we,
  input  logic [31:0]     seed_word,
  input  logic            fifo_full,
  output code_t           rn,
  output logic            buff_wr
);

  logic [KMAX-1:0] x;
  logic            step;
  logic            accept;

  assign step    = enable & ~fifo_full & ~seed_we;
  assign buff_wr = step & accept;

  srg_lfsr #(.NMAX(NMAX)) u_srg (
    .clk       (clk),
    .rst_n     (rst_n),
    .len       (len),
    .coef      (coef),
    .order     (order),
    .seed_we   (seed_we),
    .seed_word (seed_word),
    .step      (step),
    .x         (x)
  );

  accept_group u_ag (
    .order  (order),
    .x      (x),
    .accept (accept),
    .code   (rn)
  );

endmodule
