// mpd_pkg: types and constants shared by the multi-point distributed random
// number generator.
//
// The generator serves three simplified weak Taylor schemes. Each scheme order
// selects a multi-point distributed variable, the number of random bits one
// sample consumes, the width of its combinatorial code and how many codes fit
// into one 32-bit transfer word:
//
//   order 1: two-point   {+1, -1}            * sqrt(D)   1 bit,  1-bit code, 32 per word
//   order 2: three-point {0, +sqrt3, -sqrt3} * sqrt(D)   3 bits, 2-bit code, 16 per word
//   order 3: five-point  {0, +-1, +-sqrt6}   * sqrt(D)   5 bits, 3-bit code, 10 per word
//
// Code layout (this design's choice; the order-1 mapping 0 -> +sqrt(D),
// 1 -> -sqrt(D) is the document's): the least significant bit is the sign
// (0 positive, 1 negative), the bits above it the magnitude index (0 for the
// value zero, 1 for the middle magnitude, 2 for the largest one). Unused code
// bits are zero.
package mpd_pkg;

  localparam int unsigned CODE_W = 3;   // widest code, RN[0:2]
  localparam int unsigned KMAX   = 5;   // most random bits per sample (X1..X5)

  typedef enum logic [1:0] {
    ORDER_1 = 2'd1,
    ORDER_2 = 2'd2,
    ORDER_3 = 2'd3
  } order_e;

  // Magnitude indices inside a code
  localparam logic [1:0] MAG_ZERO = 2'd0;
  localparam logic [1:0] MAG_MID  = 2'd1;  // sqrt(D) for order 3; sqrt(3D) for order 2
  localparam logic [1:0] MAG_HIGH = 2'd2;  // sqrt(6D) for order 3

  typedef logic [CODE_W-1:0] code_t;

  // Register select of the configuration port
  typedef enum logic [1:0] {
    CFG_SEED = 2'd0,  // shift a 32-bit word into the seed (state) register
    CFG_COEF = 2'd1,  // shift a 32-bit word into the coefficient register
    CFG_LEN  = 2'd2,  // polynomial order n
    CFG_CTRL = 2'd3   // [1:0] scheme order, [2] enable
  } cfg_sel_e;

  // Random bits consumed per sample
  function automatic int unsigned bits_per_sample(order_e o);
    case (o)
      ORDER_2: return 3;
      ORDER_3: return 5;
      default: return 1;
    endcase
  endfunction

  // Code width, ceil(log2(points))
  function automatic int unsigned code_width(order_e o);
    case (o)
      ORDER_2: return 2;
      ORDER_3: return 3;
      default: return 1;
    endcase
  endfunction

  // Codes per 32-bit word; order 3 leaves 2 alignment bits
  function automatic int unsigned codes_per_word(order_e o);
    case (o)
      ORDER_2: return 16;
      ORDER_3: return 10;
      default: return 32;
    endcase
  endfunction

  // Any value other than 2 or 3 selects order 1
  function automatic order_e to_order(logic [1:0] v);
    case (v)
      2'd2: return ORDER_2;
      2'd3: return ORDER_3;
      default: return ORDER_1;
    endcase
  endfunction

endpackage
