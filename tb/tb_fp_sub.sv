// tb_fp_sub: self-checking testbench for fp_sub.
//
// Drives directed corner cases (exact cancellation, ties, signs, zeros) and
// a few thousand random normal operands, one per cycle, and compares each
// result, STAGES cycles later, with fp_ref_pkg (double-precision arithmetic
// rounded to single).  The latency is checked by comparing at exactly that
// cycle.
module tb_fp_sub;
  import fp_ref_pkg::*;

  localparam int STAGES = 2;
  localparam int N = 4000;

  logic clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_sub dut (.clk(clk), .a(a), .b(b), .y(y));

  logic [31:0] da [N];
  logic [31:0] db [N];

  initial begin
    // directed cases
    da[0] = 32'h3F80_0000; db[0] = 32'h3F80_0000;   // 1, 1
    da[1] = 32'h3F80_0001; db[1] = 32'hBF80_0000;   // cancellation
    da[2] = 32'h4B80_0000; db[2] = 32'h3F80_0000;   // 2^24 and 1: tie
    da[3] = 32'h4B80_0001; db[3] = 32'h3F80_0000;   // tie to even upward
    da[4] = 32'h0000_0000; db[4] = 32'h4040_0000;   // zero operand
    da[5] = 32'hC0A0_0000; db[5] = 32'h4040_0000;   // -5, 3
    da[6] = 32'h3EAA_AAAB; db[6] = 32'h4040_0000;   // 1/3, 3
    da[7] = 32'h4049_0FDB; db[7] = 32'h3F35_04F3;   // pi, 1/sqrt2
    for (int i = 8; i < N; i++) begin
      da[i] = rnd_fp((i < N / 2) ? 3 : 40, 1'b1);
      db[i] = (i % 7 == 0) ? {~da[i][31], da[i][30:2], 2'($urandom)} : rnd_fp((i < N / 2) ? 3 : 40, 1'b1);
    end
  end

  initial begin
    a = '0; b = '0;
    @(negedge clk);
    for (int i = 0; i < N + STAGES; i++) begin
      if (i < N) begin
        a = da[i]; b = db[i];
      end
      @(posedge clk);
      #1;
      if (i >= STAGES - 1 && i - (STAGES - 1) < N) begin
        logic [31:0] ea, eb, e;
        ea = da[i - (STAGES - 1)]; eb = db[i - (STAGES - 1)];
        begin
          logic [31:0] a, b;
          a = ea; b = eb;
          e = rsub(a, b);
        end
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("MISMATCH op %0d: %h %h -> %h expected %h", i - (STAGES - 1), ea, eb, y, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
