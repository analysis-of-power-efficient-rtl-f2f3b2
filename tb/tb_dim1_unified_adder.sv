// Self-checking test of the unified diminished-1 modulo 2^n+1 adder:
// N=8 exhaustive over all 257 x 257 diminished-1 operand pairs, N=4 with the
// worked example 5 + 6 mod 17, and N=10 and N=16 with random operands
// (a tenth of them zero). An N=8 and an N=10 instance use the modulo 2^n-1
// adder with the extra increment level.
module tb_dim1_unified_adder;
  import modadd_ref_pkg::*;

  logic [15:0] a, b;
  logic        az, bz;
  int checks = 0, failures = 0;

  logic [7:0]  s8;  logic z8;
  logic [3:0]  s4;  logic z4;
  logic [9:0]  s10; logic z10;
  logic [15:0] s16; logic z16;
  logic [7:0]  si8;  logic zi8;
  logic [9:0]  si10; logic zi10;

  dim1_unified_adder #(.N(8))  d8  (.a_z(az), .a(a[7:0]), .b_z(bz), .b(b[7:0]), .s_z(z8),  .s(s8));
  dim1_unified_adder #(.N(4))  d4  (.a_z(az), .a(a[3:0]), .b_z(bz), .b(b[3:0]), .s_z(z4),  .s(s4));
  dim1_unified_adder #(.N(10)) d10 (.a_z(az), .a(a[9:0]), .b_z(bz), .b(b[9:0]), .s_z(z10), .s(s10));
  dim1_unified_adder #(.N(8),  .STYLE(modadd_pkg::M1_INCREMENT)) di8  (.a_z(az), .a(a[7:0]), .b_z(bz), .b(b[7:0]), .s_z(zi8),  .s(si8));
  dim1_unified_adder #(.N(10), .STYLE(modadd_pkg::M1_INCREMENT)) di10 (.a_z(az), .a(a[9:0]), .b_z(bz), .b(b[9:0]), .s_z(zi10), .s(si10));
  dim1_unified_adder #(.N(16)) d16 (.a_z(az), .a(a),      .b_z(bz), .b(b),      .s_z(z16), .s(s16));

  task automatic check(string tag, int n, logic gz, longint unsigned gs);
    bit ez; longint unsigned es;
    dim1_add(n, az, a & mask(n), bz, b & mask(n), ez, es);
    checks++;
    if (gz !== ez || gs !== es) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s az=%b a=%h bz=%b b=%h got %b/%h exp %b/%h", tag, az, a & mask(n), bz, b & mask(n), gz, gs, ez, es);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: A = 5, B = 6 modulo 17
    az = 0; bz = 0; a = 16'd4; b = 16'd5;
    #1;
    checks++;
    if (s4 !== 4'd10 || z4 !== 1'b0) begin
      failures++;
      $display("FAIL example got %0d", s4);
    end
    for (int i = 0; i < 257; i++)
      for (int j = 0; j < 257; j++) begin
        az = (i == 256); bz = (j == 256);
        a = az ? 16'd0 : 16'(i);
        b = bz ? 16'd0 : 16'(j);
        #1;
        check("n8", 8, z8, s8);
        check("n8inc", 8, zi8, si8);
      end
    for (int n = 0; n < 50000; n++) begin
      az = ($urandom % 10) == 0; bz = ($urandom % 10) == 0;
      a = az ? 16'd0 : 16'($urandom);
      b = bz ? 16'd0 : 16'($urandom);
      if (n[0] && !az && !bz) b = ~a;     // A* + B* = 2^n - 1: result zero
      #1;
      check("n16", 16, z16, s16);
      a[15:10] = '0; b[15:10] = '0;
      if (n[0] && !az && !bz) b[9:0] = ~a[9:0];
      #1;
      check("n10", 10, z10, s10);
      check("n10inc", 10, zi10, si10);
      a[15:4] = '0; b[15:4] = '0;
      #1;
      check("n4", 4, z4, s4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
