// srg_lfsr: shift register generator of random bits with programmable
// polynomial order and programmable non-null coefficients.
//
// For a primitive polynomial y(x) = 1 + c1 x + ... + c(n-1) x^(n-1) + x^n the
// register obeys the recurrence
//     a(k+1) = c1 a(k) ^ c2 a(k-1) ^ ... ^ c(n-1) a(k-n+2) ^ a(k-n+1)
// which has period 2^n - 1. state_q[0] holds the newest bit a(k) and
// state_q[i] holds a(k-i). The order n (len) and the coefficients c1..c(n-1)
// (coef[i-1] = ci) come from the configuration registers; the feedback taps
// are rebuilt from them into a register each cycle, so a change takes effect
// one clock later. coef bits at or above position n are ignored and the top
// tap (x^n) is always present.
//
// Per step the recurrence is unrolled 1, 3 or 5 times (nbits, from the scheme
// order), so one step yields all the bits one sample needs: x[0] is the first
// new bit (X1), x[1] the second (X2), and so on; unused x bits are zero. x is
// a combinational function of the current state. On `step` the state moves
// to the one after those bits. While seed_we is high the state instead shifts
// in seed_word, 32 bits at a time, the last word written becoming the newest
// bits, so a seed of any length is loaded in one or more writes. Every bit
// consumed by a sample is used exactly once, so the bit stream is the same as
// a bit-serial software generator running the same recurrence.
//
// The recurrence, its programmable order and coefficients follow the
// document; the multi-bit unrolling, the register layout and the seed shift
// order are this design's choices. The reset state (all zeros except the
// newest bit) only keeps the generator out of the all-zero lock-up state
// until a seed is written.
module srg_lfsr
  import mpd_pkg::*;
#(
  parameter int unsigned NMAX = 521,  // longest polynomial supported
  localparam int unsigned LW = $clog2(NMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LW-1:0]   len,        // polynomial order n, 2..NMAX
  input  logic [NMAX-1:0] coef,       // coef[i-1] = ci
  input  order_e          order,      // selects 1, 3 or 5 bits per step
  input  logic            seed_we,
  input  logic [31:0]     seed_word,
  input  logic            step,
  output logic [KMAX-1:0] x
);

  typedef logic [NMAX-1:0] state_t;

  state_t state_q, taps_q;
  state_t st [KMAX+1];
  logic [KMAX-1:0] bits;
  int unsigned nbits;

  // Feedback taps: tap i (bit i-1) is ci below the order, 1 at the order
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps_q <= '0;
    end else begin
      for (int unsigned i = 1; i <= NMAX; i++) begin
        if (i < int'(len))       taps_q[i-1] <= coef[i-1];
        else if (i == int'(len)) taps_q[i-1] <= 1'b1;
        else                     taps_q[i-1] <= 1'b0;
      end
    end
  end

  // Unrolled recurrence
  always_comb begin
    nbits = bits_per_sample(order);
    st[0] = state_q;
    for (int j = 0; j < int'(KMAX); j++) begin
      bits[j]  = ^(taps_q & st[j]);
      st[j+1]  = {st[j][NMAX-2:0], bits[j]};
    end
    x = '0;
    for (int j = 0; j < int'(KMAX); j++)
      if (j < int'(nbits)) x[j] = bits[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= state_t'(1);
    end else if (seed_we) begin
      state_q <= state_t'({state_q, seed_word});
    end else if (step) begin
      case (order)
        ORDER_2: state_q <= st[3];
        ORDER_3: state_q <= st[5];
        default: state_q <= st[1];
      endcase
    end
  end

  initial begin
    assert (NMAX >= 8) else $fatal(1, "srg_lfsr: NMAX must be at least 8");
  end

endmodule
