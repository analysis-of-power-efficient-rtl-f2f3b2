// Self-checking test of the prefix carry operator. Every (hi, lo) pair of
// single-bit groups is taken as two bit positions (a1 b1, a0 b0) and the
// result must be the carry out and the all-propagate of that 2-bit addition.
module tb_prefix_op;
  import modadd_pkg::*;
  gp_t hi, lo, y;
  int checks = 0, failures = 0;

  prefix_op dut (.hi(hi), .lo(lo), .y(y));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] a, b;
      logic       exp_g, exp_p;
      a = v[1:0]; b = v[3:2];
      hi = '{g: a[1] & b[1], p: a[1] | b[1]};
      lo = '{g: a[0] & b[0], p: a[0] | b[0]};
      #1;
      exp_g = ({1'b0, a} + {1'b0, b}) >= 3'd4;           // carry out of the 2 bits
      exp_p = ((a | b) == 2'b11);                          // a carry-in would ripple through
      checks++;
      if (y.g !== exp_g || y.p !== exp_p) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b%b", a, b, y.g, y.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
