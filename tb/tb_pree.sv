// tb_pree: end-to-end testbench of the progressive radiance estimation
// engine at its default size (four PREUs, four-entry photon buffer, 12-stage
// leaping).
//
// Workload: one photon pass of a 20x15 image, the size used for the engine's
// post-layout runs: 300 pixels, 400 hit-points (every third pixel owns two
// neighbouring hit-points), 1000 photons each affecting 0..190 hit-points,
// then one radiance evaluation pass.  Scene data are synthetic (random
// positions in a 4x4x4 box, random colours, radii and fluxes).
//
// The testbench plays the external data controller and memory: it feeds the
// photon stream, turns each lane's index-table address into a hit-point read
// one cycle later, writes PREU results back, and in evaluation mode reads and
// writes pixels.  It checks
//   * every hit-point (N, R^2, flux) after the update pass and every pixel
//     after the evaluation pass against pree_ref_pkg applied in photon order
//     and in leaping-address order;
//   * PREU latency 10 (update) and 12 (evaluation) on every result;
//   * at most one partly filled set of lanes (at the flush), lane
//     utilisation of at least 99% while photons are waiting, and evaluation
//     lasting exactly one cycle per hit-point of a group;
//   * no read-after-write hazard: no hit-point or pixel is read while an
//     update of it is still in a PREU;
//   * that each mechanism happened: busy stall, split photon, several
//     photons in one cycle, flush with empty lanes, photon with no
//     hit-point, hit and miss of the radius test, mode switch, leaping
//     restart, pixel with two neighbouring hit-points.
module tb_pree;
  import fp_ref_pkg::*;
  import pree_pkg::*;
  import pree_ref_pkg::*;

  localparam int N_SET = 4;
  localparam int NPIX  = 20 * 15;
  localparam int NHP   = 400;
  localparam int NPH   = 1000;
  localparam logic [31:0] ALPHA = 32'h3F33_3333;   // 0.7

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pree_mode_e    mode;
  logic          ph_valid, flush, busy;
  photon_entry_t ph_in;
  logic          re_start, re_busy, re_done;
  logic [31:0]   n_hit_total;
  logic          addr_valid  [N_SET];
  logic [31:0]   addr        [N_SET];
  photon_t       addr_photon [N_SET];
  logic          pu_valid [N_SET];
  logic [31:0]   pu_tag   [N_SET];
  logic [31:0]   pu_pix   [N_SET];
  hitpoint_t     pu_hp    [N_SET];
  photon_t       pu_ph    [N_SET];
  vec3_t         pu_l     [N_SET];
  logic [31:0]   alpha, n_emitted;
  logic          po_valid [N_SET];
  logic          po_write [N_SET];
  logic [31:0]   po_tag   [N_SET];
  logic [31:0]   po_pix   [N_SET];
  preu_out_t     po_data  [N_SET];

  pree dut (.*);

  int checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL: %s", msg);
  endtask

  // ------------------------------------------------------------- memory
  hitpoint_t   hpmem [NHP];
  hitpoint_t   hpref [NHP];
  int          pix_of [NHP];
  vec3_t       pixmem [NPIX];
  vec3_t       pixref [NPIX];
  photon_t     phmem [NPH];
  int unsigned ph_paddr [NPH];
  int unsigned ph_n [NPH];
  int unsigned ph_base [NPH];
  int unsigned idx_table [$];
  int          hp_busy [NHP];
  int          pix_busy [NPIX];
  int          n_double = 0;

  function automatic logic [31:0] rr(real lo, real hi);
    return r2f(lo + (hi - lo) * real'($urandom_range(100000)) / 100000.0);
  endfunction

  initial begin
    int a, b;
    // sequential allocation: hit-points of one pixel at neighbouring addresses,
    // never across a group boundary (NHP/4)
    a = 0;
    for (int p = 0; p < NPIX; p++) begin
      int rem_pix, rem_addr; bit two;
      rem_pix  = NPIX - p;
      rem_addr = NHP - a;
      two = (rem_addr > rem_pix) && ((p % 3 == 1) || (rem_addr - rem_pix >= rem_pix))
            && ((a + 1) % (NHP / 4) != 0);
      pix_of[a] = p; a++;
      if (two) begin
        pix_of[a] = p; a++;
        n_double++;
      end
      pixmem[p] = '0;
    end
    if (a != NHP) $fatal(1, "hit-point allocation failed (%0d)", a);
    for (int h = 0; h < NHP; h++) begin
      hpmem[h].pos   = '{x: rr(0, 4), y: rr(0, 4), z: rr(0, 4)};
      hpmem[h].color = '{x: rr(0.1, 0.9), y: rr(0.1, 0.9), z: rr(0.1, 0.9)};
      hpmem[h].tau   = '0;
      hpmem[h].r2    = rr(1.0, 4.0);
      hpmem[h].n     = '0;
      hp_busy[h]     = 0;
    end
    foreach (pix_busy[p]) pix_busy[p] = 0;
    hpref = hpmem;
    pixref = pixmem;
    // photons: each affects a window of consecutive hit-points that starts
    // where the previous photon's window ended
    b = 0;
    for (int k = 0; k < NPH; k++) begin
      int unsigned n;
      if (k % 10 == 3) n = $urandom_range(0, 5);
      else n = $urandom_range(60, 190);
      phmem[k].pos = '{x: rr(0, 4), y: rr(0, 4), z: rr(0, 4)};
      phmem[k].phi = '{x: rr(0.1, 1.0), y: rr(0.1, 1.0), z: rr(0.1, 1.0)};
      ph_paddr[k]  = idx_table.size();
      ph_n[k]      = n;
      ph_base[k]   = b;
      for (int j = 0; j < int'(n); j++) idx_table.push_back((b + j) % NHP);
      b = (b + n) % NHP;
    end
    // leave a remainder so that the end-of-pass flush has empty lanes
    if (idx_table.size() % N_SET == 0) begin
      idx_table.push_back(b % NHP);
      ph_n[NPH-1]++;
    end
  end

  // ------------------------------------------------- external data controller
  int cyc = 0;
  int iss_q [N_SET][$];
  int n_hit = 0, n_miss = 0, n_hazard = 0, n_results = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // write back first, then read for new issues
      for (int i = 0; i < N_SET; i++) begin
        if (po_valid[i]) begin
          int t0, lat;
          n_results++;
          t0  = (iss_q[i].size() > 0) ? iss_q[i].pop_front() : -100;
          lat = cyc - t0 - 1;
          checks++;
          if (lat != ((mode == MODE_RE) ? 12 : 10)) fail($sformatf("lane %0d latency %0d", i, lat));
          if (mode == MODE_HPUO) begin
            hp_busy[po_tag[i]]--;
            if (po_write[i]) begin
              n_hit++;
              hpmem[po_tag[i]].n   = po_data[i].n;
              hpmem[po_tag[i]].r2  = po_data[i].r2;
              hpmem[po_tag[i]].tau = po_data[i].rgb;
            end else n_miss++;
          end else begin
            pix_busy[po_pix[i]]--;
            if (po_write[i]) pixmem[po_pix[i]] = po_data[i].rgb;
          end
        end
      end
      for (int i = 0; i < N_SET; i++) begin
        pu_valid[i] <= 1'b0;
        if (addr_valid[i]) begin
          int h;
          if (mode == MODE_HPUO) begin
            h = idx_table[addr[i]];
            if (hp_busy[h] != 0) n_hazard++;
            hp_busy[h]++;
            pu_ph[i] <= addr_photon[i];
            pu_l[i]  <= '0;
          end else begin
            h = addr[i];
            if (pix_busy[pix_of[h]] != 0) n_hazard++;
            pix_busy[pix_of[h]]++;
            pu_ph[i] <= '0;
            pu_l[i]  <= pixmem[pix_of[h]];
          end
          pu_valid[i] <= 1'b1;
          pu_tag[i]   <= h;
          pu_pix[i]   <= pix_of[h];
          pu_hp[i]    <= hpmem[h];
          iss_q[i].push_back(cyc);
        end
      end
    end
  end

  // ----------------------------------------------------- lane statistics
  int n_lane_cycles = 0, n_part_cycles = 0, n_split = 0, n_merge = 0;
  int n_lanes = 0, n_restart = 0, re_cycles = 0, n_redone = 0;
  int first_disp = -1, last_disp = 0;
  logic [31:0] prev_ph_id, prev_addr [N_SET];

  always @(posedge clk) begin
    if (rst_n && mode == MODE_HPUO) begin
      int nv; bit multi;
      nv = 0; multi = 0;
      for (int i = 0; i < N_SET; i++) begin
        if (addr_valid[i]) begin
          if (nv == 0 && n_lane_cycles > 0 && addr_photon[i].pos == phmem[prev_ph_id].pos) n_split++;
          if (nv > 0 && addr_photon[i].pos != addr_photon[0].pos) multi = 1;
          for (int k = 0; k < NPH; k++) if (phmem[k].pos == addr_photon[i].pos) begin
            prev_ph_id = k;
            break;
          end
          nv++;
        end
      end
      if (nv > 0) begin
        if (first_disp < 0) first_disp = cyc;
        last_disp = cyc;
        n_lane_cycles++;
        n_lanes += nv;
        if (nv < N_SET) n_part_cycles++;
        if (multi) n_merge++;
      end
    end
    if (rst_n && mode == MODE_RE) begin
      if (re_busy) re_cycles++;
      if (re_done) n_redone++;
      for (int i = 0; i < N_SET; i++) begin
        if (addr_valid[i]) begin
          if (re_cycles > 1 && addr[i] < prev_addr[i]) n_restart++;
          prev_addr[i] = addr[i];
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  int n_busy = 0, n_zero = 0, total_ops = 0;

  initial begin
    mode = MODE_HPUO; ph_valid = 1'b0; ph_in = '0; flush = 1'b0;
    re_start = 1'b0; n_hit_total = '0;
    alpha = ALPHA;
    n_emitted = r2f(real'(NPH));
    for (int i = 0; i < N_SET; i++) begin
      pu_valid[i] = 1'b0; pu_tag[i] = '0; pu_pix[i] = '0;
      pu_hp[i] = '0; pu_ph[i] = '0; pu_l[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---------------- hit-point update pass
    for (int k = 0; k < NPH; k++) begin
      ph_valid = 1'b1;
      ph_in.ph = phmem[k];
      ph_in.p_addr = ph_paddr[k];
      ph_in.n_hp = ph_n[k];
      if (ph_n[k] == 0) n_zero++;
      total_ops += ph_n[k];
      #1;
      while (busy) begin
        n_busy++;
        @(negedge clk);
      end
      @(negedge clk);
    end
    ph_valid = 1'b0;
    // end of the pass: flush until the buffer is empty and the PREUs drained
    flush = 1'b1;
    while (n_lanes < total_ops) @(negedge clk);
    flush = 1'b0;
    repeat (20) @(negedge clk);

    // reference: photons in order
    for (int k = 0; k < NPH; k++) begin
      for (int j = 0; j < int'(ph_n[k]); j++) begin
        logic w; preu_out_t o; int h;
        h = (ph_base[k] + j) % NHP;
        ref_update(hpref[h], phmem[k], ALPHA, w, o);
        if (w) begin
          hpref[h].n = o.n; hpref[h].r2 = o.r2; hpref[h].tau = o.rgb;
        end
      end
    end
    for (int h = 0; h < NHP; h++) begin
      checks++;
      if (hpmem[h] != hpref[h])
        fail($sformatf("hit-point %0d: N %h R2 %h tau %h, expected N %h R2 %h tau %h", h,
             hpmem[h].n, hpmem[h].r2, hpmem[h].tau, hpref[h].n, hpref[h].r2, hpref[h].tau));
    end
    checks++;
    if (n_lanes != total_ops) fail($sformatf("%0d lanes for %0d operations", n_lanes, total_ops));
    checks++;
    if (n_part_cycles > 1) fail($sformatf("%0d partly filled lane sets", n_part_cycles));
    checks++;
    if (real'(total_ops) / real'(N_SET * (last_disp - first_disp + 1)) < 0.99)
      fail("lane utilisation below 99%");
    $display("update pass: %0d operations in %0d cycles, %0.2f M operations/s at 125 MHz",
             total_ops, last_disp - first_disp + 1,
             125.0 * real'(total_ops) / real'(last_disp - first_disp + 1));

    // ---------------- radiance evaluation pass
    mode = MODE_RE;
    @(negedge clk);
    n_hit_total = NHP;
    re_start = 1'b1;
    @(negedge clk);
    re_start = 1'b0;
    while (re_busy) @(negedge clk);
    repeat (30) @(negedge clk);

    // reference in leaping order: cycle by cycle, lanes 0..3
    begin
      int unsigned st [N_SET], la [N_SET], gb [N_SET], ge [N_SET], left [N_SET];
      int unsigned lv;
      bit any;
      lv = NHP / 64;
      for (int i = 0; i < N_SET; i++) begin
        gb[i] = i * NHP / 4; ge[i] = (i + 1) * NHP / 4;
        st[i] = gb[i]; la[i] = gb[i]; left[i] = ge[i] - gb[i];
      end
      do begin
        any = 0;
        for (int i = 0; i < N_SET; i++) begin
          if (left[i] > 0) begin
            int p;
            p = pix_of[la[i]];
            pixref[p] = ref_eval(hpref[la[i]], pixref[p], n_emitted);
            left[i]--;
            any = 1;
            if (la[i] + lv >= ge[i]) begin
              st[i]++;
              la[i] = st[i];
            end else la[i] = la[i] + lv;
          end
        end
      end while (any);
    end
    for (int p = 0; p < NPIX; p++) begin
      checks++;
      if (pixmem[p] != pixref[p])
        fail($sformatf("pixel %0d: %h expected %h", p, pixmem[p], pixref[p]));
    end
    checks++;
    if (re_cycles != NHP / 4) fail($sformatf("evaluation took %0d cycles", re_cycles));
    checks++;
    if (n_redone != 1) fail("re_done not seen once");
    checks++;
    if (n_hazard != 0) fail($sformatf("%0d read-after-write hazards", n_hazard));

    // mechanisms
    checks++; if (n_busy == 0)        fail("busy never raised");
    checks++; if (n_split == 0)       fail("no photon split over two cycles");
    checks++; if (n_merge == 0)       fail("no cycle with several photons");
    checks++; if (n_part_cycles == 0) fail("no flush with empty lanes");
    checks++; if (n_zero == 0)        fail("no photon without hit-points");
    checks++; if (n_hit == 0)         fail("no photon inside a radius");
    checks++; if (n_miss == 0)        fail("no photon outside a radius");
    checks++; if (n_restart == 0)     fail("leaping address never restarted");
    checks++; if (n_double == 0)      fail("no pixel with two hit-points");
    $display("busy=%0d split=%0d merge=%0d flush_part=%0d zero=%0d hit=%0d miss=%0d restart=%0d double=%0d hazard=%0d",
             n_busy, n_split, n_merge, n_part_cycles, n_zero, n_hit, n_miss, n_restart, n_double, n_hazard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
