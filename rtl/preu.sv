// preu: progressive radiance estimation unit, one configurable single-
// precision floating-point data path with two modes.
//
// Hit-point update (mode = MODE_HPUO), one hit-point H and one photon P per
// cycle, M = 1:
//   D^2    = (xH-xP)^2 + (yH-yP)^2 + (zH-zP)^2              (3 Sub, 3 Squa, 2 Add)
//   f      = (N + alpha) / (N + 1)                          (2 Add, Div)
//   R^2'   = R^2 * f                                        (Mult)
//   tau'_c = (tau_c + colour_c * phi_c * 1/pi) * f          (per colour: 3 Mult, Add)
//   N'     = N + 1
// If D^2 <= R^2 (Comp) the updated N', R^2', tau' are output with
// out_write = 1, otherwise the unchanged N, R^2, tau with out_write = 0.
//
// Radiance evaluation (mode = MODE_RE), one hit-point per cycle:
//   L'_c = L_c + (tau_c * 1/pi) * (1 / (N_emitted * R^2))
// reusing the red colour multiplier (N_emitted*R^2), the divider, the 1/pi
// multipliers, the flux-correction multipliers and the flux adders, which in
// this mode take their operands from the later multiplier stage.  Sharing
// thus saves seven multipliers, three adders and one divider against a
// separate evaluation path, the saving the engine's description states.
//
// Timing: one input register, the units' own pipelines (Add/Sub/Mult/Squa 2,
// Div 4) and one output register.  A result leaves LAT_HPUO = 10 cycles
// after its operands in update mode and LAT_RE = 12 cycles after them in
// evaluation mode; one operation may enter every cycle and the path never
// stalls.  The hit-point address (tag) and pixel index travel with the data.
// mode is static during a phase and may change only while the unit is empty
// (asserted).
//
// The unit list, the sharing between the two modes and the stage counts
// follow the engine's description; the placement of the input and output
// registers, the handling of photons outside the radius (unchanged values
// with out_write = 0) and the carried tags are this design's choices.
module preu
  import fp32_pkg::*;
  import pree_pkg::*;
#(
    parameter int unsigned LAT_HPUO = 10,
    parameter int unsigned LAT_RE   = 12
) (
    input  logic        clk,
    input  logic        rst_n,
    input  pree_mode_e  mode,
    input  logic        in_valid,
    input  logic [31:0] in_tag,      // hit-point address, returned with the result
    input  logic [31:0] in_pix,      // pixel index, returned with the result
    input  hitpoint_t   in_hp,
    input  photon_t     in_ph,
    input  vec3_t       in_l,        // pixel value (radiance evaluation)
    input  fp32_t       alpha,
    input  fp32_t       n_emitted,
    output logic        out_valid,
    output logic        out_write,
    output logic [31:0] out_tag,
    output logic [31:0] out_pix,
    output preu_out_t   out_data
);

  // the stage structure below realises exactly these latencies
  if (LAT_HPUO != 10 || LAT_RE != 12) begin : g_lat_check
    $error("preu: the data path is built for 10 and 12 stages");
  end

  localparam int unsigned TAGW = 32 + 32;

  logic  is_re;
  assign is_re = (mode == MODE_RE);

  // ---------------------------------------------------------------- stage 0
  logic        v_s0;
  logic [31:0] tag_s0, pix_s0;
  hitpoint_t   hp_s0;
  photon_t     ph_s0;
  vec3_t       l_s0;
  fp32_t       alpha_s0, nem_s0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_s0 <= 1'b0;
    else        v_s0 <= in_valid;
  end

  always_ff @(posedge clk) begin
    tag_s0   <= in_tag;
    pix_s0   <= in_pix;
    hp_s0    <= in_hp;
    ph_s0    <= in_ph;
    l_s0     <= in_l;
    alpha_s0 <= alpha;
    nem_s0   <= n_emitted;
  end

  // ------------------------------------------- Block 1: distance square D^2
  fp32_t dx_s2, dy_s2, dz_s2, sqx_s4, sqy_s4, sqz_s4, sqz_s6, d1_s6, d2_s8;

  fp_sub u_sub_x (.clk, .a(hp_s0.pos.x), .b(ph_s0.pos.x), .y(dx_s2));
  fp_sub u_sub_y (.clk, .a(hp_s0.pos.y), .b(ph_s0.pos.y), .y(dy_s2));
  fp_sub u_sub_z (.clk, .a(hp_s0.pos.z), .b(ph_s0.pos.z), .y(dz_s2));
  fp_square u_sq_x (.clk, .a(dx_s2), .y(sqx_s4));
  fp_square u_sq_y (.clk, .a(dy_s2), .y(sqy_s4));
  fp_square u_sq_z (.clk, .a(dz_s2), .y(sqz_s4));
  fp_add u_add_d1 (.clk, .a(sqx_s4), .b(sqy_s4), .y(d1_s6));
  delay_line #(.WIDTH(32), .DEPTH(2)) u_dl_sqz (.clk, .d(sqz_s4), .q(sqz_s6));
  fp_add u_add_d2 (.clk, .a(d1_s6), .b(sqz_s6), .y(d2_s8));

  // ----------------------- Block 2: radius reduction, photon count, divider
  fp32_t na_s2, n1_s2, q_s6, r2_s6, r2_s8, rr_s8, n1_s8, n_s8;
  fp32_t mc_s2 [3];
  fp32_t div_a, div_b;

  fp_add u_add_na (.clk, .a(hp_s0.n), .b(alpha_s0), .y(na_s2));
  fp_add u_add_n1 (.clk, .a(hp_s0.n), .b(FP_ONE),   .y(n1_s2));

  // update: (N + alpha) / (N + 1); evaluation: 1 / (N_emitted * R^2)
  assign div_a = is_re ? FP_ONE   : na_s2;
  assign div_b = is_re ? mc_s2[0] : n1_s2;
  fp_div u_div (.clk, .a(div_a), .b(div_b), .y(q_s6));

  delay_line #(.WIDTH(32), .DEPTH(6)) u_dl_r2a (.clk, .d(hp_s0.r2), .q(r2_s6));
  delay_line #(.WIDTH(32), .DEPTH(2)) u_dl_r2b (.clk, .d(r2_s6),    .q(r2_s8));
  fp_mult u_mul_r2 (.clk, .a(r2_s6), .b(q_s6), .y(rr_s8));
  delay_line #(.WIDTH(32), .DEPTH(6)) u_dl_n1 (.clk, .d(n1_s2),   .q(n1_s8));
  delay_line #(.WIDTH(32), .DEPTH(8)) u_dl_n  (.clk, .d(hp_s0.n), .q(n_s8));

  // -------------------- Block 3 / Block 4: flux correction, radiance sum
  fp32_t tau_s0 [3], col_s0 [3], phi_s0 [3], l_c_s0 [3];
  fp32_t tau_s2 [3], tau_s4 [3], tau_s8 [3], l_s8 [3];
  fp32_t mp_s4 [3], mp_s6 [3], at [3], mf_s8 [3];

  assign tau_s0 = '{hp_s0.tau.x, hp_s0.tau.y, hp_s0.tau.z};
  assign col_s0 = '{hp_s0.color.x, hp_s0.color.y, hp_s0.color.z};
  assign phi_s0 = '{ph_s0.phi.x, ph_s0.phi.y, ph_s0.phi.z};
  assign l_c_s0 = '{l_s0.x, l_s0.y, l_s0.z};

  for (genvar c = 0; c < 3; c++) begin : g_color
    fp32_t mc_a, mc_b, mp_a, at_a, at_b, mf_a;

    // colour * photon flux; in evaluation mode the red one forms N_emitted*R^2
    if (c == 0) begin : g_red
      assign mc_a = is_re ? nem_s0   : col_s0[c];
      assign mc_b = is_re ? hp_s0.r2 : phi_s0[c];
    end else begin : g_gb
      assign mc_a = col_s0[c];
      assign mc_b = phi_s0[c];
    end
    fp_mult u_mul_c (.clk, .a(mc_a), .b(mc_b), .y(mc_s2[c]));

    delay_line #(.WIDTH(32), .DEPTH(2)) u_dl_t2 (.clk, .d(tau_s0[c]), .q(tau_s2[c]));
    delay_line #(.WIDTH(32), .DEPTH(2)) u_dl_t4 (.clk, .d(tau_s2[c]), .q(tau_s4[c]));
    delay_line #(.WIDTH(32), .DEPTH(4)) u_dl_t8 (.clk, .d(tau_s4[c]), .q(tau_s8[c]));
    delay_line #(.WIDTH(32), .DEPTH(8)) u_dl_l  (.clk, .d(l_c_s0[c]), .q(l_s8[c]));

    // * 1/pi: tau_M in update mode, tau/pi in evaluation mode
    assign mp_a = is_re ? tau_s2[c] : mc_s2[c];
    fp_mult u_mul_pi (.clk, .a(mp_a), .b(FP_INV_PI), .y(mp_s4[c]));
    delay_line #(.WIDTH(32), .DEPTH(2)) u_dl_mp (.clk, .d(mp_s4[c]), .q(mp_s6[c]));

    // tau_N + tau_M (update, out at stage 6) or L + tau/(pi R^2 N_emitted)
    // (evaluation, fed back from the multiplier, out at stage 10)
    assign at_a = is_re ? l_s8[c]  : tau_s4[c];
    assign at_b = is_re ? mf_s8[c] : mp_s4[c];
    fp_add u_add_t (.clk, .a(at_a), .b(at_b), .y(at[c]));

    // flux correction: tau_{N+M} * f, or (tau/pi) * 1/(N_emitted R^2)
    assign mf_a = is_re ? mp_s6[c] : at[c];
    fp_mult u_mul_f (.clk, .a(mf_a), .b(q_s6), .y(mf_s8[c]));
  end

  // ------------------------------------------------ tags and comparison
  logic [TAGW-1:0] tg_s8, tg_s10;
  logic            v_s8, v_s10;
  logic [31:0]     tag_s8, pix_s8, tag_s10, pix_s10;
  logic            hit_s8;

  delay_line #(.WIDTH(TAGW), .DEPTH(8)) u_dl_tg8  (.clk, .d({tag_s0, pix_s0}), .q(tg_s8));
  delay_line #(.WIDTH(TAGW), .DEPTH(2)) u_dl_tg10 (.clk, .d(tg_s8), .q(tg_s10));
  assign {tag_s8, pix_s8}   = tg_s8;
  assign {tag_s10, pix_s10} = tg_s10;

  // valid bits are reset so that the pipeline starts empty
  logic [10:1] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[9:1], v_s0};
  end
  assign v_s8  = vpipe[8];
  assign v_s10 = vpipe[10];

  fp_cmp u_cmp (.a(d2_s8), .b(r2_s8), .le(hit_s8));

  // ---------------------------------------------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_write <= 1'b0;
    end else begin
      out_valid <= is_re ? v_s10 : v_s8;
      out_write <= is_re ? v_s10 : (v_s8 & hit_s8);
    end
  end

  always_ff @(posedge clk) begin
    if (is_re) begin
      out_tag      <= tag_s10;
      out_pix      <= pix_s10;
      out_data.n   <= '0;
      out_data.r2  <= '0;
      out_data.rgb <= '{x: at[0], y: at[1], z: at[2]};
    end else begin
      out_tag      <= tag_s8;
      out_pix      <= pix_s8;
      out_data.n   <= hit_s8 ? n1_s8 : n_s8;
      out_data.r2  <= hit_s8 ? rr_s8 : r2_s8;
      out_data.rgb <= hit_s8 ? '{x: mf_s8[0], y: mf_s8[1], z: mf_s8[2]}
                             : '{x: tau_s8[0], y: tau_s8[1], z: tau_s8[2]};
    end
  end

  // mode is a per-phase setting: it may only change while the unit is empty
  pree_mode_e mode_q;
  always_ff @(posedge clk) mode_q <= mode;
  a_mode_static : assert property (@(posedge clk) disable iff (!rst_n)
      (mode != mode_q) |-> !(v_s0 || (|vpipe)))
    else $error("preu: mode changed while operations were in flight");

endmodule
