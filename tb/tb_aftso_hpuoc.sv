// tb_aftso_hpuoc: self-checking testbench for the AFTSO hit-point update
// operation controller.
//
// The reference is the order the work must come out in: photon after photon,
// each handing out index-table addresses p_addr+N-1 down to p_addr, packed
// into lanes 0..N_SET-1 cycle after cycle.  Every valid lane is compared with
// the next expected (photon, address) pair.  Checked as well:
//   * the worked example p_addr = 100, N = 3 -> 102, 101, 100, followed by
//     a photon of 6 hit-points that is split over two cycles;
//   * the 2-cycle latency from an accepted photon to its first lane;
//   * lanes are never partly empty unless flush is high (full utilisation);
//   * busy is raised when photons arrive faster than lanes drain, and input
//     is blocked while it is high;
//   * every mechanism happened: partial dispatch, several photons in one
//     cycle, busy, flush with empty lanes, photons with no hit-point.
module tb_aftso_hpuoc;
  import pree_pkg::*;

  localparam int N_SET = 4;
  localparam int NPH   = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, flush, busy;
  photon_entry_t in_entry;
  logic          out_valid    [N_SET];
  logic [31:0]   out_ref_addr [N_SET];
  photon_t       out_photon   [N_SET];

  aftso_hpuoc dut (.*);

  int checks = 0, failures = 0;
  int n_partial = 0, n_merge = 0, n_busy = 0, n_flush_part = 0, n_zero = 0;
  int n_disp_cycles = 0, n_lanes = 0;

  // expected lane stream
  int unsigned exp_id [$];
  int unsigned exp_addr [$];

  function automatic photon_t mk_photon(int unsigned id);
    photon_t p;
    p = '0;
    p.pos.x = id;
    p.phi.z = ~id;
    return p;
  endfunction

  int unsigned next_paddr = 0;

  task automatic send(int unsigned id, int unsigned p_addr, int unsigned n);
    in_valid = 1'b1;
    in_entry.ph = mk_photon(id);
    in_entry.p_addr = p_addr;
    in_entry.n_hp = n;
    #1;
    while (busy) begin
      n_busy++;
      @(negedge clk);
    end
    for (int k = int'(n) - 1; k >= 0; k--) begin
      exp_id.push_back(id);
      exp_addr.push_back(p_addr + k);
    end
    if (n == 0) n_zero++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // lane checker
  always @(posedge clk) begin
    if (rst_n) begin
      int nv; int unsigned first_id; bit multi; bit hole;
      nv = 0; multi = 0; hole = 0;
      for (int l = 0; l < N_SET; l++) begin
        if (out_valid[l]) begin
          if (hole) begin
            failures++;
            $display("lane %0d valid after empty lane", l);
          end
          checks++;
          if (exp_id.size() == 0) begin
            failures++;
            $display("unexpected lane output");
          end else begin
            int unsigned id, ad;
            id = exp_id.pop_front(); ad = exp_addr.pop_front();
            if (out_photon[l].pos.x != id || out_photon[l].phi.z != ~id || out_ref_addr[l] != ad) begin
              failures++;
              if (failures < 10)
                $display("lane %0d: photon %0d addr %0d, expected photon %0d addr %0d",
                         l, out_photon[l].pos.x, out_ref_addr[l], id, ad);
            end
            if (nv == 0) first_id = out_photon[l].pos.x;
            else if (out_photon[l].pos.x != first_id) multi = 1;
          end
          nv++;
        end else hole = 1;
      end
      if (nv > 0) begin
        n_disp_cycles++;
        n_lanes += nv;
      end
      if (multi) n_merge++;
      if (nv > 0 && nv < N_SET) n_flush_part++;
    end
  end

  // a photon whose addresses appear in two different cycles was split
  int unsigned last_top_id = '1;
  always @(posedge clk) begin
    if (rst_n && out_valid[0] && out_photon[0].pos.x == last_top_id) n_partial++;
    for (int l = 0; l < N_SET; l++) if (rst_n && out_valid[l]) last_top_id = out_photon[l].pos.x;
  end

  // flush must be the only reason for a partly filled cycle
  logic flush_d1, flush_d2;
  always @(posedge clk) begin
    flush_d1 <= flush;
    flush_d2 <= flush_d1;
    if (rst_n && out_valid[0] && !out_valid[N_SET-1] && !flush_d1 && !flush_d2) begin
      failures++;
      $display("partly filled lanes without flush");
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    in_valid = 1'b0; flush = 1'b0; in_entry = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // worked example and the split of the second photon; latency 2 cycles
    begin
      int t0;
      send(1, 100, 3);
      t0 = cyc;
      send(2, 200, 6);
      while (!out_valid[0]) @(negedge clk);
      checks++;
      if (cyc - t0 != 2) begin
        failures++;
        $display("latency %0d, expected 2", cyc - t0);
      end
    end
    repeat (3) @(negedge clk);
    // remaining hit-point 200 waits for more work: flush it out
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_id.size() != 0) begin
      failures++;
      $display("flush did not drain the buffer");
    end

    // random photon stream, bursts of large photons force busy
    next_paddr = 1000;
    for (int i = 10; i < 10 + NPH; i++) begin
      int unsigned n;
      if ((i / 50) % 2 == 1) n = $urandom_range(5, 12);
      else if ($urandom_range(19) == 0) n = 0;
      else if ($urandom_range(19) == 0) n = $urandom_range(13, 40);
      else n = $urandom_range(1, 5);
      send(i, next_paddr, n);
      next_paddr += n;
      if ($urandom_range(29) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    flush = 1'b1;
    repeat (20) @(negedge clk);
    flush = 1'b0;

    checks++;
    if (exp_id.size() != 0) begin
      failures++;
      $display("%0d expected lanes never came out", exp_id.size());
    end
    // mechanisms
    checks++; if (n_partial == 0)    begin failures++; $display("no partial dispatch"); end
    checks++; if (n_merge == 0)      begin failures++; $display("no multi-photon cycle"); end
    checks++; if (n_busy == 0)       begin failures++; $display("busy never raised"); end
    checks++; if (n_flush_part == 0) begin failures++; $display("no flush with empty lanes"); end
    checks++; if (n_zero == 0)       begin failures++; $display("no empty photon"); end
    $display("lanes=%0d dispatch_cycles=%0d partial=%0d merge=%0d busy=%0d flush_part=%0d",
             n_lanes, n_disp_cycles, n_partial, n_merge, n_busy, n_flush_part);
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
