// tb_accept_group: exhaustive check of the accept/group logic. For every
// scheme order and all 32 values of X1..X5 it compares accept and the code
// with the reference mapping, and it counts how many combinations reach each
// value: order 1 must give 1:1, order 2 (over X1..X3) 4 zeros, 1 of each
// sign and 2 rejects, order 3 10 zeros, 9 of +-sqrt(D), 1 of +-sqrt(6D) and
// 2 rejects. The counts check the probability distributions independently
// of which combinations are grouped together.
module tb_accept_group;
  import mpd_pkg::*;
  import mpd_ref_pkg::*;

  order_e     order;
  logic [4:0] x;
  logic       accept;
  code_t      code;

  int checks = 0, failures = 0;

  accept_group dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cnt [8];
    int rej, v, ncomb;
    bit ok;
    for (int o = 1; o <= 3; o++) begin
      foreach (cnt[i]) cnt[i] = 0;
      rej = 0;
      ncomb = (o == 1) ? 2 : (o == 2 ? 8 : 32);
      for (int i = 0; i < ncomb; i++) begin
        order = to_order(2'(o));
        x = 5'(i);
        #1;
        v = ref_sample(o, x, ok);
        expect_eq(int'(accept), int'(ok), $sformatf("order %0d x=%b accept", o, x));
        if (ok) expect_eq(int'(code), int'(ref_code(o, v)), $sformatf("order %0d x=%b code", o, x));
        if (!accept) rej++;
        else cnt[code]++;
        // bits beyond those of the order must not matter
        x = x | 5'(($urandom % 32) & ~(ncomb - 1));
        #1;
        expect_eq(int'(accept), int'(ok), "unused bits changed accept");
      end
      case (o)
        1: begin
          expect_eq(cnt[0], 1, "order 1 +sqrtD"); expect_eq(cnt[1], 1, "order 1 -sqrtD");
          expect_eq(rej, 0, "order 1 rejects");
        end
        2: begin
          expect_eq(cnt[0], 4, "order 2 zero"); expect_eq(cnt[2], 1, "order 2 +sqrt3D");
          expect_eq(cnt[3], 1, "order 2 -sqrt3D"); expect_eq(rej, 2, "order 2 rejects");
        end
        default: begin
          expect_eq(cnt[0], 10, "order 3 zero"); expect_eq(cnt[2], 9, "order 3 +sqrtD");
          expect_eq(cnt[3], 9, "order 3 -sqrtD"); expect_eq(cnt[4], 1, "order 3 +sqrt6D");
          expect_eq(cnt[5], 1, "order 3 -sqrt6D"); expect_eq(rej, 2, "order 3 rejects");
        end
      endcase
    end
    // the first order-1 code maps bit 0 to +sqrt(D) (code 0)
    order = ORDER_1; x = 5'b00000; #1;
    expect_eq(int'(code), 0, "order 1 bit 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
