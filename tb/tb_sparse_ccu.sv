// Self-checking test of the sparse carry computation unit at several sizes:
// N=8/sparse-4 (exhaustive), N=16/sparse-4, N=32/sparse-4, N=16/sparse-2,
// N=4/sparse-4 (random), and widths whose block count is not a power of two
// or whose top block is narrower: N=10/sparse-4 (blocks 4+4+2),
// N=12/sparse-4, N=20/sparse-4 and N=10/sparse-2. Block carries are compared with the carries of the
// integer sum A + B + cin where cin = 1 exactly when A + B < 2^N (inverted
// end-around carry); the top block's output must be that cin. With the zero
// input set every carry must be 0.
module tb_sparse_ccu;
  import modadd_ref_pkg::*;

  logic [31:0] a, b;
  logic        zero;
  int checks = 0, failures = 0;

  logic [1:0]  c8;   logic ga8,  pa8;
  logic [3:0]  c16;  logic ga16, pa16;
  logic [7:0]  c32;  logic ga32, pa32;
  logic [7:0]  c16s2; logic ga16s2, pa16s2;
  logic [0:0]  c4;   logic ga4,  pa4;
  logic [2:0]  c10;  logic ga10, pa10;
  logic [2:0]  c12;  logic ga12, pa12;
  logic [4:0]  c20;  logic ga20, pa20;
  logic [4:0]  c10s2; logic ga10s2, pa10s2;

  sparse_ccu #(.N(8),  .SPARSITY(4)) d8  (.g(a[7:0] & b[7:0]),   .p(a[7:0] | b[7:0]),   .zero(zero), .c_blk(c8),  .g_all(ga8),  .p_all(pa8));
  sparse_ccu #(.N(16), .SPARSITY(4)) d16 (.g(a[15:0] & b[15:0]), .p(a[15:0] | b[15:0]), .zero(zero), .c_blk(c16), .g_all(ga16), .p_all(pa16));
  sparse_ccu #(.N(32), .SPARSITY(4)) d32 (.g(a & b),             .p(a | b),             .zero(zero), .c_blk(c32), .g_all(ga32), .p_all(pa32));
  sparse_ccu #(.N(16), .SPARSITY(2)) d16s2 (.g(a[15:0] & b[15:0]), .p(a[15:0] | b[15:0]), .zero(zero), .c_blk(c16s2), .g_all(ga16s2), .p_all(pa16s2));
  sparse_ccu #(.N(4),  .SPARSITY(4)) d4  (.g(a[3:0] & b[3:0]),   .p(a[3:0] | b[3:0]),   .zero(zero), .c_blk(c4),  .g_all(ga4),  .p_all(pa4));

  sparse_ccu #(.N(10), .SPARSITY(4)) d10 (.g(a[9:0] & b[9:0]),   .p(a[9:0] | b[9:0]),   .zero(zero), .c_blk(c10), .g_all(ga10), .p_all(pa10));
  sparse_ccu #(.N(12), .SPARSITY(4)) d12 (.g(a[11:0] & b[11:0]), .p(a[11:0] | b[11:0]), .zero(zero), .c_blk(c12), .g_all(ga12), .p_all(pa12));
  sparse_ccu #(.N(20), .SPARSITY(4)) d20 (.g(a[19:0] & b[19:0]), .p(a[19:0] | b[19:0]), .zero(zero), .c_blk(c20), .g_all(ga20), .p_all(pa20));
  sparse_ccu #(.N(10), .SPARSITY(2)) d10s2 (.g(a[9:0] & b[9:0]), .p(a[9:0] | b[9:0]), .zero(zero), .c_blk(c10s2), .g_all(ga10s2), .p_all(pa10s2));

  task automatic check(string tag, int n, int sp, logic [31:0] got, logic ga, logic pa);
    int m = (n + sp - 1) / sp;
    longint unsigned aa, bb;
    aa = a & mask(n); bb = b & mask(n);
    for (int j = 0; j < m; j++) begin
      logic e;
      if (zero) e = 1'b0;
      else if (j == m - 1) e = (aa + bb) < (64'd1 << n);
      else e = ieac_carry(n, j*sp + sp - 1, aa, bb);
      checks++;
      if (got[j] !== e) begin
        failures++;
        if (failures < 20) $display("FAIL %s a=%h b=%h zero=%b blk %0d got %b", tag, aa, bb, zero, j, got[j]);
      end
    end
    checks++;
    if (ga !== ((aa + bb) >= (64'd1 << n)) || pa !== ((aa | bb) == mask(n))) begin
      failures++;
      if (failures < 20) $display("FAIL %s group a=%h b=%h", tag, aa, bb);
    end
  endtask

  task automatic check_all();
    #1;
    check("n8s4",  8,  4, 32'(c8),    ga8,    pa8);
    check("n16s4", 16, 4, 32'(c16),   ga16,   pa16);
    check("n32s4", 32, 4, 32'(c32),   ga32,   pa32);
    check("n16s2", 16, 2, 32'(c16s2), ga16s2, pa16s2);
    check("n4s4",  4,  4, 32'(c4),    ga4,    pa4);
    check("n10s4", 10, 4, 32'(c10),   ga10,   pa10);
    check("n12s4", 12, 4, 32'(c12),   ga12,   pa12);
    check("n20s4", 20, 4, 32'(c20),   ga20,   pa20);
    check("n10s2", 10, 2, 32'(c10s2), ga10s2, pa10s2);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    zero = 1'b0;
    for (int i = 0; i < 65536; i++) begin
      a = $urandom; b = $urandom;
      a[7:0] = 8'(i); b[7:0] = 8'(i >> 8);
      check_all();
    end
    // sums close to 2^N - 1, where the end-around carry flips
    for (int i = 0; i < 20000; i++) begin
      a = $urandom;
      b = ~a ^ (32'd1 << ($urandom % 32));
      if (i[0]) b = ~a;
      if (i[1]) begin   // near-complement within the narrower widths
        a = $urandom % (1 << 10 + ($urandom % 11));
        b = ~a ^ (32'd1 << ($urandom % 20));
      end
      check_all();
    end
    zero = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
