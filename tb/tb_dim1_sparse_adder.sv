// Self-checking test of the sparse diminished-1 modulo 2^n+1 adder.
//  * N=8 with sparsity 4 and 2: all 257 x 257 diminished-1 operand pairs.
//  * N=4/sparse-4: the worked example 5 + 6 mod 17, then all operand pairs.
//  * N=10/sparse-4 (blocks of 4, 4 and 2 bits): all 1025 x 1025 operand
//    pairs; N=12/sparse-4 (three blocks) on the same operand values.
//  * N=32/sparse-4, N=16/sparse-4 and N=16/sparse-2: random operands, a tenth
//    of them zero and half of the others with A* + B* = 2^n - 1 or close.
module tb_dim1_sparse_adder;
  import modadd_ref_pkg::*;

  logic [31:0] a, b;
  logic        az, bz;
  int checks = 0, failures = 0;

  logic [7:0]  s8;    logic z8;
  logic [3:0]  s4;    logic z4;
  logic [15:0] s16;   logic z16;
  logic [15:0] s16s2; logic z16s2;
  logic [31:0] s32;   logic z32;
  logic [7:0]  s8s2;  logic z8s2;
  logic [9:0]  s10;   logic z10;
  logic [11:0] s12;   logic z12;

  dim1_sparse_adder #(.N(8),  .SPARSITY(4)) d8    (.a_z(az), .a(a[7:0]),  .b_z(bz), .b(b[7:0]),  .s_z(z8),    .s(s8));
  dim1_sparse_adder #(.N(4),  .SPARSITY(4)) d4    (.a_z(az), .a(a[3:0]),  .b_z(bz), .b(b[3:0]),  .s_z(z4),    .s(s4));
  dim1_sparse_adder #(.N(16), .SPARSITY(4)) d16   (.a_z(az), .a(a[15:0]), .b_z(bz), .b(b[15:0]), .s_z(z16),   .s(s16));
  dim1_sparse_adder #(.N(16), .SPARSITY(2)) d16s2 (.a_z(az), .a(a[15:0]), .b_z(bz), .b(b[15:0]), .s_z(z16s2), .s(s16s2));
  dim1_sparse_adder #(.N(32), .SPARSITY(4)) d32   (.a_z(az), .a(a),       .b_z(bz), .b(b),       .s_z(z32),   .s(s32));
  dim1_sparse_adder #(.N(8),  .SPARSITY(2)) d8s2  (.a_z(az), .a(a[7:0]),  .b_z(bz), .b(b[7:0]),  .s_z(z8s2),  .s(s8s2));

  dim1_sparse_adder #(.N(10), .SPARSITY(4)) d10   (.a_z(az), .a(a[9:0]),  .b_z(bz), .b(b[9:0]),  .s_z(z10),   .s(s10));
  dim1_sparse_adder #(.N(12), .SPARSITY(4)) d12   (.a_z(az), .a(a[11:0]), .b_z(bz), .b(b[11:0]), .s_z(z12),   .s(s12));

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
    az = 0; bz = 0; a = 32'd4; b = 32'd5;
    #1;
    checks++;
    if (s4 !== 4'd10 || z4 !== 1'b0) begin
      failures++;
      $display("FAIL example got %0d", s4);
    end
    for (int i = 0; i < 257; i++)
      for (int j = 0; j < 257; j++) begin
        az = (i == 256); bz = (j == 256);
        a = az ? 32'd0 : 32'(i);
        b = bz ? 32'd0 : 32'(j);
        #1;
        check("n8s4", 8, z8, s8);
        check("n8s2", 8, z8s2, s8s2);
        if (i < 16 && j < 16) check("n4s4", 4, z4, s4);
      end
    for (int n = 0; n < 50000; n++) begin
      az = ($urandom % 10) == 0; bz = ($urandom % 10) == 0;
      a = az ? 32'd0 : $urandom;
      b = bz ? 32'd0 : $urandom;
      if (n % 4 == 1 && !az && !bz) b = ~a;
      if (n % 4 == 3 && !az && !bz) b = ~a ^ (32'd1 << ($urandom % 32));
      #1;
      check("n32s4", 32, z32, s32);
      a[31:16] = '0; b[31:16] = '0;
      if (n % 4 == 1 && !az && !bz) b[15:0] = ~a[15:0];
      #1;
      check("n16s4", 16, z16, s16);
      check("n16s2", 16, z16s2, s16s2);
    end
    // modulo 2^10+1 exhaustively, modulo 2^12+1 on the same operand values
    for (int i = 0; i <= 1024; i++)
      for (int j = 0; j <= 1024; j++) begin
        az = (i == 1024); bz = (j == 1024);
        a = az ? 32'd0 : 32'(i);
        b = bz ? 32'd0 : 32'(j);
        #1;
        check("n10s4", 10, z10, s10);
        check("n12s4", 12, z12, s12);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
