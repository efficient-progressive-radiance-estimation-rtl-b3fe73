// pree: progressive radiance estimation engine for progressive photon
// mapping.
//
// The engine accelerates the two per-pass steps of progressive photon
// mapping that run on stored hit-points:
//   * hit-point update (mode = MODE_HPUO): every traced photon refines each
//     hit-point within its radius (radius reduction, flux correction, photon
//     count);
//   * radiance evaluation (mode = MODE_RE): each hit-point's flux is turned
//     into radiance and added to its pixel.
// It consists of a control unit and N_SET = 4 PREUs (configurable
// floating-point data paths).  The control unit holds the AFTSO hit-point
// update operation controller, which packs the hit-points of up to four
// buffered photons into N_SET lanes per cycle, and the ADISO radiance
// evaluation controller, which walks the hit-point memory in N_SET groups with
// a leaping stride so that hit-points of one pixel never share a pipeline.
// mode selects which controller drives the address lanes and configures the
// PREUs.
//
// Memory (hit-point index table, hit-point records, photon records, pixels)
// and the data controller that accesses it are outside the engine.  So:
//   * addr_valid/addr/addr_photon carry, per lane, the index-table address
//     (ref_addr) and photon in update mode, or the hit-point address
//     (leaping_addr) in evaluation mode, to the external controller;
//   * the external controller returns, on pu_*, the addressed hit-point (and
//     pixel value) with the photon, any number of cycles later;
//   * po_* give the PREU results with the hit-point address and pixel index
//     to write back; po_write says whether the hit-point/pixel changes.
// Timing: photons enter on ph_valid when busy is low; lanes appear two cycles
// after a photon is accepted; PREU results appear 10 cycles (update) or 12
// cycles (evaluation) after pu_valid.  re_start (while in evaluation mode)
// loads n_hit_total; leaping addresses follow for as many cycles as the largest group
// has hit-points and
// re_done pulses at the end.  flush pushes out a partly filled last set of
// lanes at the end of a photon pass.  mode may change only when the PREUs are
// empty.
//
// The structure (control unit with the two controllers, four PREUs, mode
// signal, address/data interface towards an external data controller)
// follows the engine's system diagram; the individual handshake signals are
// this design's own.
module pree
  import fp32_pkg::*;
  import pree_pkg::*;
#(
    parameter int unsigned N_SET     = 4,
    parameter int unsigned BUF_DEPTH = 4,
    parameter int unsigned N_PIP     = 12
) (
    input  logic          clk,
    input  logic          rst_n,
    input  pree_mode_e    mode,
    // photon stream (photon data, p_addr, hit-point #)
    input  logic          ph_valid,
    input  photon_entry_t ph_in,
    input  logic          flush,
    output logic          busy,
    // radiance evaluation start (total hit-point #)
    input  logic          re_start,
    input  logic [31:0]   n_hit_total,
    output logic          re_busy,
    output logic          re_done,
    // address lanes towards the external data controller
    output logic          addr_valid  [N_SET],
    output logic [31:0]   addr        [N_SET],
    output photon_t       addr_photon [N_SET],
    // PREU input data from the external data controller
    input  logic          pu_valid [N_SET],
    input  logic [31:0]   pu_tag   [N_SET],
    input  logic [31:0]   pu_pix   [N_SET],
    input  hitpoint_t     pu_hp    [N_SET],
    input  photon_t       pu_ph    [N_SET],
    input  vec3_t         pu_l     [N_SET],
    input  fp32_t         alpha,
    input  fp32_t         n_emitted,
    // PREU results
    output logic          po_valid [N_SET],
    output logic          po_write [N_SET],
    output logic [31:0]   po_tag   [N_SET],
    output logic [31:0]   po_pix   [N_SET],
    output preu_out_t     po_data  [N_SET]
);

  // ------------------------------------------------------------ control unit
  logic        hu_valid [N_SET];
  logic [31:0] hu_addr  [N_SET];
  photon_t     hu_ph    [N_SET];
  logic        re_valid [N_SET];
  logic [31:0] re_addr  [N_SET];
  logic        is_re;

  assign is_re = (mode == MODE_RE);

  aftso_hpuoc #(
      .N_SET(N_SET),
      .BUF_DEPTH(BUF_DEPTH)
  ) u_aftso (
      .clk,
      .rst_n,
      .in_valid    (ph_valid && !is_re),
      .in_entry    (ph_in),
      .flush       (flush && !is_re),
      .busy,
      .out_valid   (hu_valid),
      .out_ref_addr(hu_addr),
      .out_photon  (hu_ph)
  );

  adiso_rec #(
      .N_SET(N_SET),
      .N_PIP(N_PIP),
      .ADDR_W(32)
  ) u_adiso (
      .clk,
      .rst_n,
      .start     (re_start && is_re),
      .n_hit     (n_hit_total),
      .addr_valid(re_valid),
      .addr      (re_addr),
      .busy      (re_busy),
      .done      (re_done)
  );

  // mode selects the address source
  always_comb begin
    for (int i = 0; i < int'(N_SET); i++) begin
      addr_valid[i]  = is_re ? re_valid[i] : hu_valid[i];
      addr[i]        = is_re ? re_addr[i]  : hu_addr[i];
      addr_photon[i] = is_re ? '0          : hu_ph[i];
    end
  end

  // ------------------------------------------------------------------ PREUs
  for (genvar i = 0; i < N_SET; i++) begin : g_preu
    preu u_preu (
        .clk,
        .rst_n,
        .mode,
        .in_valid (pu_valid[i]),
        .in_tag   (pu_tag[i]),
        .in_pix   (pu_pix[i]),
        .in_hp    (pu_hp[i]),
        .in_ph    (pu_ph[i]),
        .in_l     (pu_l[i]),
        .alpha,
        .n_emitted,
        .out_valid(po_valid[i]),
        .out_write(po_write[i]),
        .out_tag  (po_tag[i]),
        .out_pix  (po_pix[i]),
        .out_data (po_data[i])
    );
  end

endmodule
