// Self-checking test of the parallel-prefix modulo 2^n-1 adder at N=8
// (exhaustive), N=5, 6, 7 (exhaustive, widths that are not powers of two) and
// N=16 (random), plus N=8 and N=7 instances built with the extra
// increment level instead of the cyclic tree. The sum must match the end-around-carry definition, be
// congruent to A + B modulo 2^n-1, and h/cout must be A^B and the carry
// out of A + B.
module tb_mod2nm1_adder;
  import modadd_ref_pkg::*;

  logic [15:0] a, b;
  int checks = 0, failures = 0;

  logic [7:0]  s8,  h8;  logic co8;
  logic [4:0]  s5,  h5;  logic co5;
  logic [5:0]  s6,  h6;  logic co6;
  logic [6:0]  s7,  h7;  logic co7;
  logic [15:0] s16, h16; logic co16;
  logic [7:0]  si8, hi8; logic coi8;
  logic [6:0]  si7, hi7; logic coi7;

  mod2nm1_adder #(.N(8))  d8  (.a(a[7:0]), .b(b[7:0]), .s(s8),  .h(h8),  .cout(co8));
  mod2nm1_adder #(.N(5))  d5  (.a(a[4:0]), .b(b[4:0]), .s(s5),  .h(h5),  .cout(co5));
  mod2nm1_adder #(.N(6))  d6  (.a(a[5:0]), .b(b[5:0]), .s(s6),  .h(h6),  .cout(co6));
  mod2nm1_adder #(.N(7))  d7  (.a(a[6:0]), .b(b[6:0]), .s(s7),  .h(h7),  .cout(co7));
  mod2nm1_adder #(.N(8), .STYLE(modadd_pkg::M1_INCREMENT)) di8 (.a(a[7:0]), .b(b[7:0]), .s(si8), .h(hi8), .cout(coi8));
  mod2nm1_adder #(.N(7), .STYLE(modadd_pkg::M1_INCREMENT)) di7 (.a(a[6:0]), .b(b[6:0]), .s(si7), .h(hi7), .cout(coi7));
  mod2nm1_adder #(.N(16)) d16 (.a(a),      .b(b),      .s(s16), .h(h16), .cout(co16));

  task automatic check(string tag, int n, longint unsigned s, longint unsigned h, logic co);
    longint unsigned aa, bb, m;
    aa = a & mask(n); bb = b & mask(n); m = mask(n);
    checks++;
    if (s !== mod2nm1_add(n, aa, bb) || (s % m) !== ((aa + bb) % m) ||
        h !== (aa ^ bb) || co !== ((aa + bb) > m)) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h s=%h h=%h co=%b", tag, aa, bb, s, h, co);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      a[7:0] = 8'(i); b[7:0] = 8'(i >> 8);
      #1;
      check("n8", 8, s8, h8, co8);
      check("n8inc", 8, si8, hi8, coi8);
      check("n16", 16, s16, h16, co16);
      if (i[15:8] < 8'd128 && i[7] == 1'b0) begin
        check("n7", 7, s7, h7, co7);
        check("n7inc", 7, si7, hi7, coi7);
      end
      if (i[15:8] < 8'd64 && i[7:6] == 2'b00) begin
        check("n6", 6, s6, h6, co6);
      end
      if (i[15:8] < 8'd32 && i[7:5] == 3'b000) begin
        check("n5", 5, s5, h5, co5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
