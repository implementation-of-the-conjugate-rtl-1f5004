// lqcd_pkg: shared types and helpers of the Wilson-Dirac stencil accelerator.
//
// The data types mirror the abstract types the stencil is written in:
// complex, su3_vector (3 colours), su3_matrix (3x3) and su3_spinor (4 spin
// components of an su3_vector). Every real number is an IEEE-754 double held
// as a 64-bit word. All types are packed so that a whole spinor or matrix is
// one memory word. Index 0 of every packed array is its lowest slice.
//
// The helpers are exact operations that need no floating-point unit: sign
// flips and multiplication by a phase +1, +i, -1, -i (a swap of real and
// imaginary part plus sign flips). The spin projectors P = 1 +- gamma_mu and
// the reconstruction of the lower spin components are built from them.
// The gamma matrices are in the DeGrand-Rossi basis; this basis is a choice
// of this design.
package lqcd_pkg;

  typedef logic [63:0] fp64_t;

  typedef struct packed {
    fp64_t im;
    fp64_t re;
  } complex_t;

  typedef complex_t [2:0] su3_vector_t;        // colour index
  typedef su3_vector_t [2:0] su3_matrix_t;     // [row][col]
  typedef su3_vector_t [3:0] su3_spinor_t;     // spin index
  typedef su3_vector_t [1:0] half_spinor_t;    // projected upper components

  // Phase factors, encoded so that multiplying two phases adds the codes mod 4.
  typedef enum logic [1:0] {
    PH_P1 = 2'd0,  // +1
    PH_PI = 2'd1,  // +i
    PH_M1 = 2'd2,  // -1
    PH_MI = 2'd3   // -i
  } phase_e;

  localparam int NDIR   = 4;                   // space-time dimensions
  localparam int NHOP   = 2 * NDIR;            // hopping terms per site

  localparam fp64_t FP_ZERO = 64'h0;

  // Operator applied by one accelerator run.
  typedef enum logic [1:0] {
    OP_D     = 2'd0,   // chi = D psi
    OP_DDAG  = 2'd1,   // chi = D-dagger psi
    OP_DDAGD = 2'd2    // chi = D-dagger D psi, two passes
  } op_e;

  function automatic fp64_t fneg(input fp64_t a);
    return {~a[63], a[62:0]};
  endfunction

  function automatic complex_t cphase(input complex_t a, input logic [1:0] ph);
    complex_t r;
    unique case (ph)
      2'd0: begin r.re = a.re;       r.im = a.im;       end
      2'd1: begin r.re = fneg(a.im); r.im = a.re;       end
      2'd2: begin r.re = fneg(a.re); r.im = fneg(a.im); end
      default: begin r.re = a.im;    r.im = fneg(a.re); end
    endcase
    return r;
  endfunction

  function automatic su3_vector_t vphase(input su3_vector_t a, input logic [1:0] ph);
    su3_vector_t r;
    for (int c = 0; c < 3; c++) r[c] = cphase(a[c], ph);
    return r;
  endfunction

  // Spin projection (1 + s*gamma_mu) psi, upper components h0, h1:
  //   h0 = psi[0] + ph0 * psi[p0],  h1 = psi[1] + ph1 * psi[p1]
  // with phases for s = +1; s = -1 adds 2 (a factor -1) to the phase code.
  function automatic logic [1:0] proj_partner(input int mu, input int h);
    case (mu)
      0, 1:    return (h == 0) ? 2'd3 : 2'd2;
      default: return (h == 0) ? 2'd2 : 2'd3;
    endcase
  endfunction

  function automatic logic [1:0] proj_phase(input int mu, input int h);
    case (mu)
      0:       return 2'd1;                           // +i, +i
      1:       return (h == 0) ? 2'd2 : 2'd0;         // -1, +1
      2:       return (h == 0) ? 2'd1 : 2'd3;         // +i, -i
      default: return 2'd0;                           // +1, +1
    endcase
  endfunction

  // Reconstruction of lower components: out[2+l] = ph * v[src], for s = +1.
  function automatic logic recon_src(input int mu, input int l);
    case (mu)
      0, 1:    return (l == 0) ? 1'b1 : 1'b0;
      default: return (l == 0) ? 1'b0 : 1'b1;
    endcase
  endfunction

  function automatic logic [1:0] recon_phase(input int mu, input int l);
    case (mu)
      0:       return 2'd3;                           // -i, -i
      1:       return (l == 0) ? 2'd0 : 2'd2;         // +1, -1
      2:       return (l == 0) ? 2'd3 : 2'd1;         // -i, +i
      default: return 2'd0;                           // +1, +1
    endcase
  endfunction

endpackage
