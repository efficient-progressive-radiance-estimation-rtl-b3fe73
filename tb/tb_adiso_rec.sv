// tb_adiso_rec: self-checking testbench for the ADISO-REC leaping address
// generator.
//
// For several hit-point totals (including 256, where each group holds 64
// hit-points and the stride is 4: 0, 4, 8, ..., 60, 1, 5, ...) every lane's
// address stream is compared with a procedural walk of the flow chart
// (start at the group's first address, add leaping_value, restart at
// start+1 when the group end is reached).  Also checked: every address
// 0..N-1 appears exactly once, each lane stays inside its group, the run
// takes exactly max(group size) cycles, done pulses once, and for the larger
// totals two neighbouring addresses of a group are never issued fewer than
// 12 cycles apart (the radiance evaluation pipeline depth).
module tb_adiso_rec;

  localparam int N_SET = 4;
  localparam int N_PIP = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done;
  logic [31:0] n_hit;
  logic        addr_valid [N_SET];
  logic [31:0] addr       [N_SET];

  adiso_rec dut (.*);

  int checks = 0, failures = 0, restarts = 0;

  task automatic run(int unsigned n);
    int unsigned gb [N_SET], ge [N_SET];
    int unsigned exp_q [N_SET][$];
    int          seen [];
    int          when [];
    int          cycles, maxsz, ndone;
    int unsigned lv;
    int unsigned prev [N_SET];
    // group ends, written out for four groups
    ge[0] = n / 4; ge[1] = n / 2; ge[2] = n / 4 + n / 2; ge[3] = n;
    gb[0] = 0; gb[1] = ge[0]; gb[2] = ge[1]; gb[3] = ge[2];
    lv = n / 64;
    if (lv == 0) lv = 1;
    maxsz = 0;
    for (int i = 0; i < N_SET; i++) begin
      int unsigned st, la, k;
      st = gb[i]; la = st; k = 0;
      if (ge[i] - gb[i] > maxsz) maxsz = ge[i] - gb[i];
      while (k < ge[i] - gb[i]) begin
        exp_q[i].push_back(la);
        k++;
        la = la + lv;
        if (la >= ge[i]) begin
          st = st + 1;
          la = st;
        end
      end
    end
    seen = new[n];
    when = new[n];
    foreach (seen[a]) seen[a] = 0;
    @(negedge clk);
    n_hit = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0; ndone = 0;
    while (busy) begin
      for (int i = 0; i < N_SET; i++) begin
        if (addr_valid[i]) begin
          int unsigned e;
          checks++;
          e = (exp_q[i].size() > 0) ? exp_q[i].pop_front() : 32'hFFFF_FFFF;
          if (addr[i] != e) begin
            failures++;
            if (failures < 10) $display("N=%0d lane %0d: addr %0d expected %0d", n, i, addr[i], e);
          end
          if (addr[i] < gb[i] || addr[i] >= ge[i]) begin
            failures++;
            $display("N=%0d lane %0d: addr %0d outside group", n, i, addr[i]);
          end else begin
            seen[addr[i]]++;
            when[addr[i]] = cycles;
            if (cycles > 0 && addr[i] < prev[i]) restarts++;
            prev[i] = addr[i];
          end
        end else if (addr[i] != 0) begin
          failures++;
          $display("idle lane %0d shows a non-zero address", i);
        end
      end
      cycles++;
      @(negedge clk);
      if (done) ndone++;
    end
    @(negedge clk);
    if (done) ndone++;
    checks++;
    if (cycles != maxsz) begin
      failures++;
      $display("N=%0d: ran %0d cycles, expected %0d", n, cycles, maxsz);
    end
    checks++;
    if (ndone != 1) begin
      failures++;
      $display("N=%0d: done seen %0d times", n, ndone);
    end
    for (int a = 0; a < int'(n); a++) begin
      checks++;
      if (seen[a] != 1) begin
        failures++;
        if (failures < 10) $display("N=%0d: address %0d issued %0d times", n, a, seen[a]);
      end
    end
    // neighbouring addresses of one group are far apart in time
    if (n >= 256) begin
      for (int i = 0; i < N_SET; i++)
        for (int unsigned a = gb[i]; a + 1 < ge[i]; a++) begin
          int d;
          d = when[a + 1] - when[a];
          if (d < 0) d = -d;
          checks++;
          if (d < N_PIP) begin
            failures++;
            if (failures < 10) $display("N=%0d: addresses %0d and %0d only %0d cycles apart", n, a, a + 1, d);
          end
        end
    end
  endtask

  initial begin
    start = 1'b0; n_hit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(256);
    run(300);
    run(1000);
    run(4099);
    run(7);
    run(65);
    checks++;
    if (restarts == 0) begin
      failures++;
      $display("the leaping address never restarted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
