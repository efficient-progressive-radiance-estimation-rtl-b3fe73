// pree_ref_pkg: reference model of the PREU arithmetic for testbenches.
//
// ref_update applies Eqs. (6)-(8) of progressive photon mapping with M = 1
// (distance square, radius reduction, flux correction, photon count) and
// ref_eval the radiance sum L + tau/pi * 1/(N_emitted R^2).  Every operation
// is rounded to single precision through fp_ref_pkg, in the order the data
// path evaluates it: D^2 = (dx^2 + dy^2) + dz^2, f = (N + alpha)/(N + 1),
// tau' = (tau + (colour*phi)*(1/pi)) * f.
package pree_ref_pkg;
  import fp_ref_pkg::*;
  import pree_pkg::*;

  localparam logic [31:0] ONE    = 32'h3F80_0000;
  localparam logic [31:0] INV_PI = 32'h3EA2_F983;

  // returns write = (D^2 <= R^2) and the hit-point fields to write back
  function automatic void ref_update(hitpoint_t h, photon_t p, logic [31:0] al,
                                     output logic w, output preu_out_t o);
    logic [31:0] d2, f, n1, tm [3], t [3], tn [3], col [3], phi [3];
    d2 = radd(radd(rmul(rsub(h.pos.x, p.pos.x), rsub(h.pos.x, p.pos.x)),
                   rmul(rsub(h.pos.y, p.pos.y), rsub(h.pos.y, p.pos.y))),
              rmul(rsub(h.pos.z, p.pos.z), rsub(h.pos.z, p.pos.z)));
    w  = (f2r(d2) <= f2r(h.r2));
    n1 = radd(h.n, ONE);
    f  = rdiv(radd(h.n, al), n1);
    tn  = '{h.tau.x, h.tau.y, h.tau.z};
    col = '{h.color.x, h.color.y, h.color.z};
    phi = '{p.phi.x, p.phi.y, p.phi.z};
    for (int c = 0; c < 3; c++) begin
      tm[c] = rmul(rmul(col[c], phi[c]), INV_PI);
      t[c]  = rmul(radd(tn[c], tm[c]), f);
    end
    if (w) begin
      o.n = n1; o.r2 = rmul(h.r2, f); o.rgb = '{x: t[0], y: t[1], z: t[2]};
    end else begin
      o.n = h.n; o.r2 = h.r2; o.rgb = h.tau;
    end
  endfunction

  function automatic vec3_t ref_eval(hitpoint_t h, vec3_t l, logic [31:0] nem);
    logic [31:0] q, tn [3], lc [3], r [3];
    q  = rdiv(ONE, rmul(nem, h.r2));
    tn = '{h.tau.x, h.tau.y, h.tau.z};
    lc = '{l.x, l.y, l.z};
    for (int c = 0; c < 3; c++) r[c] = radd(lc[c], rmul(rmul(tn[c], INV_PI), q));
    return '{x: r[0], y: r[1], z: r[2]};
  endfunction

endpackage
