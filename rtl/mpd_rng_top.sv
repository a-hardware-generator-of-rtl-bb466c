// mpd_rng_top: FPGA-side hardware generator of multi-point distributed
// random numbers for Monte Carlo simulation of simplified weak Taylor
// schemes.
//
// Three parts, all on CK except the read port:
//   cfg_loader  takes asynchronous 32-bit writes (seed_in = SEED[0:31], wr =
//               WR, sel = register select) for the seed, the polynomial
//               coefficients and order, the scheme order and the enable;
//   mpd_rng     the shift register generator and the accept/group logic,
//               one encoded number (rn, RN[0:2]) per CK cycle with buff_wr;
//   rn_queue    packs the numbers into 32-bit words and holds them in a
//               dual-clock FIFO; fifo_full stops the generator.
// The read port (rd_clk, rd_en, rd_data, rd_empty) is where a bus master
// moving the words to host memory (a PCI DMA engine in the intended
// system) connects. rn, buff_wr and fifo_full are brought out for
// observation.
//
// Timing: a write on the configuration port takes effect 2 to 4 CK cycles
// after wr rises (synchroniser plus register). Once enabled the generator
// produces one number per CK cycle less rejected combinations; a word is
// visible on the read side about three rd_clk cycles after its last number
// was generated.
//
// The partition and the signals named SEED, WR, RN, BUFF_WR and FIFO_FULL
// follow the document; the register map, FIFO depth and read handshake are
// this design's choices.
module mpd_rng_top
  import mpd_pkg::*;
#(
  parameter int unsigned NMAX    = 521,  // longest polynomial order supported
  parameter int unsigned FIFO_AW = 8     // FIFO depth 2^FIFO_AW words
) (
  input  logic        ck,
  input  logic        rst_n,
  // configuration port (asynchronous)
  input  logic        wr,
  input  logic [1:0]  sel,
  input  logic [31:0] seed_in,
  // read port
  input  logic        rd_clk,
  input  logic        rd_rst_n,
  input  logic        rd_en,
  output logic [31:0] rd_data,
  output logic        rd_empty,
  // observation
  output code_t       rn,
  output logic        buff_wr,
  output logic        fifo_full
);

  localparam int unsigned LW = $clog2(NMAX + 1);

  logic            seed_we;
  logic [31:0]     seed_word;
  logic [NMAX-1:0] coef;
  logic [LW-1:0]   len;
  order_e          order;
  logic            enable;
  logic            cfg_wr;

  cfg_loader #(.NMAX(NMAX)) u_cfg (
    .clk       (ck),
    .rst_n     (rst_n),
    .wr        (wr),
    .sel       (sel),
    .seed_in   (seed_in),
    .seed_we   (seed_we),
    .seed_word (seed_word),
    .coef      (coef),
    .len       (len),
    .order     (order),
    .enable    (enable),
    .cfg_wr    (cfg_wr)
  );

  mpd_rng #(.NMAX(NMAX)) u_rng (
    .clk       (ck),
    .rst_n     (rst_n),
    .len       (len),
    .coef      (coef),
    .order     (order),
    .enable    (enable),
    .seed_we   (seed_we),
    .seed_word (seed_word),
    .fifo_full (fifo_full),
    .rn        (rn),
    .buff_wr   (buff_wr)
  );

  rn_queue #(.AW(FIFO_AW)) u_queue (
    .clk       (ck),
    .rst_n     (rst_n),
    .order     (order),
    .clear     (cfg_wr),
    .buff_wr   (buff_wr),
    .rn        (rn),
    .fifo_full (fifo_full),
    .rd_clk    (rd_clk),
    .rd_rst_n  (rd_rst_n),
    .rd_en     (rd_en),
    .rd_data   (rd_data),
    .rd_empty  (rd_empty)
  );

endmodule
