// pree_pkg: data types shared by the progressive radiance estimation engine.
//
// All arithmetic values are IEEE 754 single-precision numbers (fp32_t).  A
// hit-point record carries position, surface colour, accumulated flux tau_N,
// squared radius R^2 and the accumulated photon count N; a photon record
// carries position and flux (6 x 32 = 192 bits); a photon buffer entry adds
// the photon's first index-table address p_addr and the number of hit-points
// it affects (256 bits in all).
package pree_pkg;
  import fp32_pkg::*;

  typedef struct packed {
    fp32_t x;
    fp32_t y;
    fp32_t z;
  } vec3_t;

  typedef struct packed {
    vec3_t pos;
    vec3_t color;
    vec3_t tau;    // accumulated (unnormalised) flux, r/g/b
    fp32_t r2;     // squared radius
    fp32_t n;      // accumulated photon count
  } hitpoint_t;

  typedef struct packed {
    vec3_t pos;
    vec3_t phi;    // photon flux, r/g/b
  } photon_t;

  typedef struct packed {
    photon_t     ph;
    logic [31:0] p_addr;   // first index-table address of this photon
    logic [31:0] n_hp;     // number of hit-points the photon affects
  } photon_entry_t;

  // PREU result: updated N, R^2 and flux in hit-point update mode; in
  // radiance evaluation mode rgb holds the refined pixel value.
  typedef struct packed {
    fp32_t n;
    fp32_t r2;
    vec3_t rgb;
  } preu_out_t;

  typedef enum logic {
    MODE_HPUO = 1'b0,   // hit-point update operation
    MODE_RE   = 1'b1    // radiance evaluation
  } pree_mode_e;

endpackage
