// Self-checking test of the unified post-processing stage. For every pair of
// 8-bit diminished-1 operands (including zero operands) the stage is fed the
// modulo 2^8-1 sum of the number parts (computed here arithmetically) and
// their half-sums; its output must be the diminished-1 modulo 257 sum. A
// 4-bit instance also runs the worked example 5 + 6 mod 17: A* = 4, B* = 5,
// modulo-15 sum 9, diminished-1 result 10.
module tb_unified_post;
  import modadd_ref_pkg::*;

  logic [7:0] a, b, sm, h, s;
  logic       az, bz, sz;
  logic [3:0] s4;
  logic       sz4;
  int checks = 0, failures = 0;

  unified_post #(.N(8)) dut (.s_m(sm), .h(h), .a_z(az), .b_z(bz), .s_p(s), .s_z(sz));
  unified_post #(.N(4)) dut4 (.s_m(4'd9), .h(4'b0100 ^ 4'b0101), .a_z(1'b0), .b_z(1'b0),
                              .s_p(s4), .s_z(sz4));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    checks++;
    if (s4 !== 4'd10 || sz4 !== 1'b0) begin
      failures++;
      $display("FAIL example: got %0d z=%b", s4, sz4);
    end
    for (int i = 0; i < 257; i++)
      for (int j = 0; j < 257; j++) begin
        bit ez; longint unsigned es;
        az = (i == 256); a = az ? 8'd0 : 8'(i);
        bz = (j == 256); b = bz ? 8'd0 : 8'(j);
        sm = 8'(mod2nm1_add(8, a, b));
        h  = a ^ b;
        #1;
        dim1_add(8, az, a, bz, b, ez, es);
        checks++;
        if (sz !== ez || s !== 8'(es)) begin
          failures++;
          if (failures < 20) $display("FAIL az=%b a=%h bz=%b b=%h s=%b/%h", az, a, bz, b, sz, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
