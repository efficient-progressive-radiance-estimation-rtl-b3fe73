// tb_fp_cmp: self-checking testbench for the combinational comparator fp_cmp.
//
// Compares le = (a <= b) with the ordering of the operands widened exactly to
// double precision, for directed signed-zero/equality cases and random
// operands of both signs, including many pairs that differ only in the last
// bits.
module tb_fp_cmp;
  import fp_ref_pkg::*;

  logic [31:0] a, b;
  logic        le;
  int checks = 0, failures = 0;

  fp_cmp dut (.a(a), .b(b), .le(le));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic e;
    a = x; b = y;
    #1;
    e = (f2r(x) <= f2r(y));
    checks++;
    if (le !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h <= %h gave %b", x, y, le);
    end
  endtask

  initial begin
    check(32'h0000_0000, 32'h8000_0000);
    check(32'h8000_0000, 32'h0000_0000);
    check(32'h3F80_0000, 32'h3F80_0000);
    check(32'h3F80_0001, 32'h3F80_0000);
    check(32'h3F80_0000, 32'h3F80_0001);
    check(32'hBF80_0000, 32'h3F80_0000);
    check(32'h3F80_0000, 32'hBF80_0000);
    check(32'hBF80_0001, 32'hBF80_0000);
    check(32'hBF80_0000, 32'hBF80_0001);
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x, y;
      x = rnd_fp(20, 1'b1);
      y = (i % 3 == 0) ? {x[31:3], 3'($urandom)} : rnd_fp(20, 1'b1);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
