// cfg_loader: configuration port of the generator (SEED[0:31] and WR).
//
// An external master writes 32-bit words asynchronously to CK: it sets sel
// and seed_in, raises wr, holds all three for at least three CK periods and
// then drops wr (low again for at least three CK periods before the next
// write). wr passes a two-flop synchroniser; on its synchronised rising edge
// the word is taken, as selected by sel (mpd_pkg::cfg_sel_e):
//
//   CFG_SEED  seed_we pulses for one CK cycle with seed_word; the shift
//             register generator shifts the word into its state. A seed of
//             any length is written as one or more words, last word newest.
//   CFG_COEF  the word is shifted into the coefficient register the same
//             way: the last word written holds c1..c32 (bit 0 = c1).
//   CFG_LEN   polynomial order n (values above NMAX are taken as NMAX,
//             below 2 as 2).
//   CFG_CTRL  bits [1:0] scheme order (1, 2 or 3; 0 is taken as 1), bit 2
//             enable of the generator.
//
// cfg_wr pulses with every accepted write; the output queue uses it to drop a
// partly filled word so that a word never mixes two configurations.
// After reset: order 31 with c3 = 1 (the primitive trinomial x^31 + x^3 + 1),
// scheme order 1, generator disabled.
//
// The seed upload through SEED and WR, in one or more asynchronous steps,
// and the programmable order and coefficients are the document's; the select
// input, the register map, the synchroniser and the reset values are this
// design's choices.
module cfg_loader
  import mpd_pkg::*;
#(
  parameter int unsigned NMAX = 521,
  localparam int unsigned LW = $clog2(NMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // asynchronous write port
  input  logic            wr,
  input  logic [1:0]      sel,
  input  logic [31:0]     seed_in,
  // configuration, CK domain
  output logic            seed_we,
  output logic [31:0]     seed_word,
  output logic [NMAX-1:0] coef,
  output logic [LW-1:0]   len,
  output order_e          order,
  output logic            enable,
  output logic            cfg_wr
);

  localparam logic [NMAX-1:0] COEF_RESET = NMAX'(3'b100);  // c3 = 1
  localparam logic [LW-1:0]   LEN_RESET  = LW'(31);

  logic [2:0] wr_sync;
  logic       wr_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_sync <= '0;
    else        wr_sync <= {wr_sync[1:0], wr};
  end

  assign wr_rise = wr_sync[1] & ~wr_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed_we   <= 1'b0;
      seed_word <= '0;
      coef      <= COEF_RESET;
      len       <= LEN_RESET;
      order     <= ORDER_1;
      enable    <= 1'b0;
      cfg_wr    <= 1'b0;
    end else begin
      seed_we <= 1'b0;
      cfg_wr  <= wr_rise;
      if (wr_rise) begin
        case (cfg_sel_e'(sel))
          CFG_SEED: begin
            seed_we   <= 1'b1;
            seed_word <= seed_in;
          end
          CFG_COEF: coef <= NMAX'({coef, seed_in});
          CFG_LEN: begin
            if (seed_in > 32'(NMAX)) len <= LW'(NMAX);
            else if (seed_in < 32'd2) len <= LW'(2);
            else                     len <= LW'(seed_in);
          end
          CFG_CTRL: begin
            order  <= to_order(seed_in[1:0]);
            enable <= seed_in[2];
          end
          default: ;
        endcase
      end
    end
  end

endmodule
