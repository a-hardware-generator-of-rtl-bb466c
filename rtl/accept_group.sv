// accept_group: accept/group logic turning random bits into one encoded
// sample of a two-, three- or five-point distributed variable.
//
// Purely combinational. x[0] is the first random bit X1, x[4] the fifth X5.
//
//   order 1: one bit, always accepted. 0 -> +sqrt(D), 1 -> -sqrt(D).
//   order 2: X1 is the sign, m = {X3,X2} (0..3) the magnitude group.
//            m = 3 rejected (2 of 8 combinations), m = 2 -> +-sqrt(3D)
//            (1 each), m = 0,1 -> 0 (4 of 8). P = 1/6, 2/3, 1/6.
//   order 3: X1 is the sign, m = {X5,X4,X3,X2} (0..15) the magnitude group.
//            m = 15 rejected (2 of 32), m = 14 -> +-sqrt(6D) (1 each),
//            m = 9..13 -> 0 (10 of 32), m = 0..8 -> +-sqrt(D) (9 each).
//            P = 1/30, 9/30, 1/3, 9/30, 1/30 over the 30 accepted.
//
// The code is {magnitude index, sign} as laid out in mpd_pkg; the value zero
// is always coded 0 whatever its sign bit. `accept` is low for a rejected
// combination, and the sample is then dropped.
//
// How many combinations go to each value and the acceptance-rejection scheme
// are the document's; which combinations are grouped together is this
// design's choice (a sign bit plus a magnitude range, so the decode is a
// comparison on 2 or 4 bits).
module accept_group
  import mpd_pkg::*;
(
  input  order_e     order,
  input  logic [4:0] x,
  output logic       accept,
  output code_t      code
);

  logic       sign;
  logic [1:0] mag;
  logic [3:0] m4;
  logic [1:0] m2;

  always_comb begin
    sign   = x[0];
    m2     = x[2:1];
    m4     = x[4:1];
    accept = 1'b1;
    mag    = MAG_ZERO;
    case (order)
      ORDER_2: begin
        if (m2 == 2'd3)      accept = 1'b0;
        else if (m2 == 2'd2) mag = MAG_MID;
      end
      ORDER_3: begin
        if (m4 == 4'd15)     accept = 1'b0;
        else if (m4 == 4'd14) mag = MAG_HIGH;
        else if (m4 <= 4'd8)  mag = MAG_MID;
      end
      default: ;
    endcase
    if (order == ORDER_1)      code = {2'b00, sign};
    else if (mag == MAG_ZERO)  code = '0;
    else                       code = {mag, sign};
  end

endmodule
