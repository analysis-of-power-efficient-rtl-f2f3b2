// Self-checking test of the gray operator.
// 1. Every one of the 32 input combinations against the operator's equations.
// 2. Chains of two gray operators, the first with T tied to 0, on all valid
//    group pairs (a group that generates also propagates): the lateral output
//    of the second must be G_k + P_k & ~(G_x1 + P_x1 & G_x2), i.e. the low
//    group followed by the inverted concatenation of the two high groups.
module tb_gray_op;
  import modadd_pkg::*;
  gpt_t v1, vo1, vo2;
  gp_t  l1, l2;
  logic c1, c2;
  int checks = 0, failures = 0;

  gray_op dut  (.v(v1),  .lat(l1), .vo(vo1), .c(c1));
  gray_op dut2 (.v(vo1), .lat(l2), .vo(vo2), .c(c2));

  function automatic gp_t valid_pair(int code);  // 0:(0,0) 1:(0,1) 2:(1,1)
    return '{g: code == 2, p: code != 0};
  endfunction

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic eg, ep, et;
      v1 = '{g: i[0], p: i[1], t: i[2]};
      l1 = '{g: i[3], p: i[4]};
      l2 = '{g: 1'b0, p: 1'b0};
      #1;
      eg = i[0] | i[2];
      ep = i[1] & ~i[3];
      et = ep & ~i[4];
      checks++;
      if (vo1 !== {eg, ep, et} || c1 !== (eg | ep)) begin
        failures++;
        $display("FAIL eq in=%b vo=%b c=%b", i[4:0], vo1, c1);
      end
    end
    for (int k = 0; k < 3; k++)
      for (int x1 = 0; x1 < 3; x1++)
        for (int x2 = 0; x2 < 3; x2++) begin
          gp_t gk, gx1, gx2;
          logic exp_c, g_hi;
          gk = valid_pair(k); gx1 = valid_pair(x1); gx2 = valid_pair(x2);
          v1 = '{g: gk.g, p: gk.p, t: 1'b0};
          l1 = gx1;
          l2 = gx2;
          #1;
          g_hi  = gx1.g | (gx1.p & gx2.g);
          exp_c = gk.g | (gk.p & ~g_hi);
          checks++;
          if (c2 !== exp_c) begin
            failures++;
            $display("FAIL chain k=%0d x1=%0d x2=%0d c=%b", k, x1, x2, c2);
          end
          checks++;
          if (c1 !== (gk.g | (gk.p & ~gx1.g))) begin
            failures++;
            $display("FAIL first k=%0d x1=%0d c=%b", k, x1, c1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
