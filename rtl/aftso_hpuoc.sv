// aftso_hpuoc: approximate full task schedule-oriented hit-point update
// operation controller.
//
// Each photon from the photon tracer affects N_hit-point hit-points, listed
// in a hit-point index table from address p_addr upwards.  The controller
// hands one (photon, index-table address) pair to each of the N_SET PREU
// lanes per cycle and keeps the lanes full by combining the hit-points of up
// to BUF_DEPTH buffered photons:
//   * accuHP_i = sum of the remaining hit-point counts of entries 0..i;
//   * dispatch_i = accuHP_i >= N_SET; buf_addr = first i with dispatch_i;
//   * entries below buf_addr are dispatched completely; entry buf_addr is
//     dispatched completely if accuHP_buf_addr <= N_SET, otherwise only the
//     hit-points that fill the remaining lanes;
//   * undispatched entries shift to the front, a new photon is written at the
//     first free position, and busy is raised while the buffer is full.
// A photon hands out its addresses from the top down (ref_addr =
// p_addr + remaining - 1, -2, ...), so a partly dispatched photon keeps its
// lowest addresses.
//
// Interface: a photon entry is accepted in a cycle with in_valid = 1 and
// busy = 0.  Lanes are registered: out_valid/out_ref_addr/out_photon change
// one cycle after the buffer state that produced them.  When no dispatch_i is
// true the controller waits for more photons, unless flush is high or the
// buffer is full; then it dispatches everything buffered and leaves the
// remaining lanes invalid.  A photon affecting no hit-point is accepted and
// dropped.
//
// The dispatch rule, the buffer, the top-down address order and the 16-bit
// accuHP width follow the engine's description; flush, dropping empty
// photons and the output register are this design's choices.  Counts are
// clipped to 2^ACC_W - 1 before accumulation and sums saturate, which does
// not change any comparison with N_SET.
module aftso_hpuoc
  import pree_pkg::*;
#(
    parameter int unsigned N_SET     = 4,
    parameter int unsigned BUF_DEPTH = 4,
    parameter int unsigned ACC_W     = 16
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          in_valid,
    input  photon_entry_t in_entry,
    input  logic          flush,
    output logic          busy,
    output logic          out_valid    [N_SET],
    output logic [31:0]   out_ref_addr [N_SET],
    output photon_t       out_photon   [N_SET]
);

  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam logic [ACC_W-1:0] ACC_MAX = '1;
  localparam logic [ACC_W-1:0] NSET_A  = ACC_W'(N_SET);

  photon_entry_t buf_q [BUF_DEPTH];
  logic [CW-1:0] cnt_q;     // the "last" pointer: number of occupied entries

  logic [ACC_W-1:0] rem  [BUF_DEPTH];
  logic [ACC_W-1:0] accu [BUF_DEPTH];
  logic [ACC_W-1:0] base [BUF_DEPTH];
  logic             disp [BUF_DEPTH];
  logic             found, go, partial;
  int unsigned      buf_addr;
  int unsigned      removed;

  assign busy = (cnt_q == CW'(BUF_DEPTH));

  // Block 5: accumulate, compare with N_SET, find the first true
  always_comb begin
    logic [ACC_W:0]   s;
    logic [ACC_W-1:0] run;
    run = '0;
    for (int i = 0; i < int'(BUF_DEPTH); i++) begin
      if (i < int'(cnt_q))
        rem[i] = (buf_q[i].n_hp > 32'(ACC_MAX)) ? ACC_MAX : buf_q[i].n_hp[ACC_W-1:0];
      else
        rem[i] = '0;
      base[i] = run;
      s       = {1'b0, run} + {1'b0, rem[i]};
      run     = s[ACC_W] ? ACC_MAX : s[ACC_W-1:0];
      accu[i] = run;
      disp[i] = (i < int'(cnt_q)) && (accu[i] >= NSET_A);
    end
    found    = 1'b0;
    buf_addr = 0;
    for (int i = BUF_DEPTH - 1; i >= 0; i--) begin
      if (disp[i]) begin
        found    = 1'b1;
        buf_addr = i;
      end
    end
    go      = found || ((cnt_q != '0) && (flush || busy));
    partial = found && (accu[buf_addr] > NSET_A);
    if (found)   removed = partial ? buf_addr : buf_addr + 1;
    else if (go) removed = int'(cnt_q);
    else         removed = 0;
  end

  // lane selection: left-side (entries below buf_addr) and right-side
  // (entry buf_addr) dispatch merged into one lane mux
  logic        lane_v    [N_SET];
  logic [31:0] lane_addr [N_SET];
  photon_t     lane_ph   [N_SET];

  always_comb begin
    for (int l = 0; l < int'(N_SET); l++) begin
      lane_v[l]    = 1'b0;
      lane_addr[l] = '0;
      lane_ph[l]   = '0;
      for (int e = 0; e < int'(BUF_DEPTH); e++) begin
        if (go && (e < int'(cnt_q)) && (!found || e <= int'(buf_addr)) &&
            (ACC_W'(l) >= base[e]) && (ACC_W'(l) < accu[e])) begin
          lane_v[l]    = 1'b1;
          lane_addr[l] = buf_q[e].p_addr + buf_q[e].n_hp - 32'd1 - 32'(ACC_W'(l) - base[e]);
          lane_ph[l]   = buf_q[e].ph;
        end
      end
    end
  end

  // shift forward, trim a partly dispatched entry, append the new photon
  photon_entry_t buf_d [BUF_DEPTH];
  logic [CW-1:0] cnt_d;

  always_comb begin
    int unsigned ncnt;
    for (int j = 0; j < int'(BUF_DEPTH); j++) buf_d[j] = buf_q[j];
    for (int j = 0; j < int'(BUF_DEPTH); j++) begin
      if (j + removed < BUF_DEPTH) buf_d[j] = buf_q[j + removed];
    end
    if (partial)
      buf_d[0].n_hp = buf_q[buf_addr].n_hp - 32'(NSET_A - base[buf_addr]);
    ncnt = int'(cnt_q) - removed;
    if (in_valid && !busy && (in_entry.n_hp != '0) && ncnt < BUF_DEPTH) begin
      buf_d[ncnt] = in_entry;
      ncnt++;
    end
    cnt_d = CW'(ncnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int l = 0; l < int'(N_SET); l++) out_valid[l] <= 1'b0;
    end else begin
      cnt_q <= cnt_d;
      for (int l = 0; l < int'(N_SET); l++) out_valid[l] <= lane_v[l];
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(BUF_DEPTH); j++) buf_q[j] <= buf_d[j];
    for (int l = 0; l < int'(N_SET); l++) begin
      out_ref_addr[l] <= lane_addr[l];
      out_photon[l]   <= lane_ph[l];
    end
  end

  // lanes fill from lane 0 upward: no valid lane after an empty one
  for (genvar l = 1; l < N_SET; l++) begin : g_prefix
    a_prefix : assert property (@(posedge clk) disable iff (!rst_n) out_valid[l] |-> out_valid[l-1])
      else $error("aftso_hpuoc: lane %0d valid after an empty lane", l);
  end

endmodule
