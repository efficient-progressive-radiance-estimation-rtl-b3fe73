// tb_preu: self-checking testbench for the PREU.
//
// 1. Update mode, single operation: checks the 10-cycle latency.
// 2. Update mode, 600 back-to-back random hit-point/photon pairs (photons
//    inside and outside the radius, plus an exact D^2 == R^2 case) compared
//    with the reference of Eqs. (6)-(8) in pree_ref_pkg (one rounding per
//    operation in the data path's order).
// 3. Radiance evaluation mode, single operation (12-cycle latency) and 400
//    back-to-back random hit-points compared with L + tau/pi * 1/(N_em R^2).
module tb_preu;
  import fp_ref_pkg::*;
  import fp32_pkg::*;
  import pree_pkg::*;
  import pree_ref_pkg::*;

  localparam int NU = 600;
  localparam int NR = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pree_mode_e  mode;
  logic        in_valid;
  logic [31:0] in_tag, in_pix;
  hitpoint_t   in_hp;
  photon_t     in_ph;
  vec3_t       in_l;
  fp32_t       alpha, n_emitted;
  logic        out_valid, out_write;
  logic [31:0] out_tag, out_pix;
  preu_out_t   out_data;

  preu dut (.*);

  int checks = 0, failures = 0;
  int hits = 0, misses = 0;

  hitpoint_t hps [NU];
  photon_t   phs [NU];
  vec3_t     ls  [NU];

  function automatic fp32_t rr(real lo, real hi);
    return r2f(lo + (hi - lo) * real'($urandom_range(100000)) / 100000.0);
  endfunction

  initial begin
    for (int i = 0; i < NU; i++) begin
      hps[i].pos   = '{x: rr(-5, 5), y: rr(-5, 5), z: rr(-5, 5)};
      hps[i].color = '{x: rr(0.05, 1), y: rr(0.05, 1), z: rr(0.05, 1)};
      hps[i].tau   = '{x: rr(0.1, 50), y: rr(0.1, 50), z: rr(0.1, 50)};
      hps[i].r2    = rr(0.001, 0.05);
      hps[i].n     = r2f(real'($urandom_range(0, 300)));
      phs[i].pos   = '{x: radd(hps[i].pos.x, rr(-0.15, 0.15)),
                       y: radd(hps[i].pos.y, rr(-0.15, 0.15)),
                       z: radd(hps[i].pos.z, rr(-0.15, 0.15))};
      phs[i].phi   = '{x: rr(0.01, 2), y: rr(0.01, 2), z: rr(0.01, 2)};
      ls[i]        = '{x: rr(0, 3), y: rr(0, 3), z: rr(0, 3)};
    end
    // exact boundary: photon on the hit-point, zero radius
    phs[1].pos = hps[1].pos;
    hps[1].r2  = 32'h0;
  end

  // expected results in issue order
  logic      exp_w [$];
  preu_out_t exp_o [$];
  int        exp_tag [$];
  int        issue_cycle [$];
  int        cycle = 0;
  always @(posedge clk) cycle++;

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_tag.size() == 0) begin
        failures++;
        $display("unexpected output tag %0d", out_tag);
      end else begin
        logic w; preu_out_t o; int t;
        w = exp_w.pop_front(); o = exp_o.pop_front(); t = exp_tag.pop_front();
        void'(issue_cycle.pop_front());
        if (mode == MODE_RE) begin
          if (out_tag != t || out_pix != t + 7 || out_data.rgb != o.rgb || !out_write) begin
            failures++;
            if (failures < 10) $display("RE MISMATCH tag %0d: %h expected %h", t, out_data.rgb, o.rgb);
          end
        end else begin
          if (w) hits++; else misses++;
          if (out_tag != t || out_pix != t + 7 || out_write != w || out_data != o) begin
            failures++;
            if (failures < 10) $display("HPUO MISMATCH tag %0d: w=%b %h expected w=%b %h", t, out_write, out_data, w, o);
          end
        end
      end
    end
  end

  task automatic issue_update(int i);
    logic w; preu_out_t o;
    ref_update(hps[i], phs[i], alpha, w, o);
    exp_w.push_back(w); exp_o.push_back(o); exp_tag.push_back(i);
    in_valid = 1'b1; in_tag = i; in_pix = i + 7; in_hp = hps[i]; in_ph = phs[i];
  endtask

  task automatic issue_eval(int i);
    exp_w.push_back(1'b1); exp_o.push_back('{n: '0, r2: '0, rgb: ref_eval(hps[i], ls[i], n_emitted)});
    exp_tag.push_back(i);
    in_valid = 1'b1; in_tag = i; in_pix = i + 7; in_hp = hps[i]; in_l = ls[i];
  endtask

  task automatic measure_latency(int expect_lat, pree_mode_e m);
    int t0, lat;
    @(negedge clk);
    if (m == MODE_RE) issue_eval(3); else issue_update(0);
    t0 = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    lat = cycle - t0;
    checks++;
    if (lat != expect_lat) begin
      failures++;
      $display("latency %0d, expected %0d", lat, expect_lat);
    end
  endtask

  initial begin
    mode = MODE_HPUO; in_valid = 1'b0; in_tag = '0; in_pix = '0;
    in_hp = '0; in_ph = '0; in_l = '0;
    alpha = 32'h3F33_3333;       // 0.7
    n_emitted = 32'h4974_2400;   // 1,000,000
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure_latency(10, MODE_HPUO);
    repeat (15) @(negedge clk);
    for (int i = 0; i < NU; i++) begin
      issue_update(i);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    mode = MODE_RE;
    @(negedge clk);
    measure_latency(12, MODE_RE);
    repeat (15) @(negedge clk);
    for (int i = 0; i < NR; i++) begin
      issue_eval(i);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_tag.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_tag.size());
    end
    checks++;
    if (hits < 50 || misses < 50) begin
      failures++;
      $display("too few hits (%0d) or misses (%0d)", hits, misses);
    end
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
