// spin_project: stage 2 of the Wilson-Dirac stencil.
//
// For each of the eight hopping terms it applies the spin projector
// P = 1 + s*gamma_mu to the neighbour spinor and keeps only the two upper spin
// components h0, h1 (the lower two are fixed multiples of them and are
// rebuilt after the colour multiplication, which halves the work there).
// Each half spinor costs two su3_vector additions, each of six double
// additions: 16 su3_vector operations and 96 adders, all in parallel, so the
// stage takes one adder latency (14 cycles) and accepts a site every cycle.
//
// Term k = 0..3 is the forward neighbour n+mu (mu = k), projector 1 - gamma_mu;
// k = 4..7 is the backward neighbour n-mu (mu = k-4), projector 1 + gamma_mu.
// With dagger = 1 both signs flip, which applies D-dagger = gamma5 D gamma5.
// The partner component and the phase (+-1, +-i) of each row come from the
// gamma matrices of lqcd_pkg; multiplying by a phase is exact and needs no
// adder.
//
// Interface: psi[k] and dagger are sampled every cycle; h[k] appears LAT
// cycles later. No valid signal: the caller delays its own.
module spin_project
  import lqcd_pkg::*;
#(
  parameter int LAT = 14
) (
  input  logic         clk,
  input  logic         dagger,
  input  su3_spinor_t  psi [NHOP],
  output half_spinor_t h   [NHOP]
);

  for (genvar k = 0; k < NHOP; k++) begin : g_term
    localparam int MU = k % NDIR;
    // s = -1 for forward terms of D and backward terms of D-dagger
    logic s_neg;
    assign s_neg = (k < NDIR) ? ~dagger : dagger;

    for (genvar hc = 0; hc < 2; hc++) begin : g_half
      su3_vector_t q;
      always_comb q = vphase(psi[k][proj_partner(MU, hc)],
                             proj_phase(MU, hc) + {s_neg, 1'b0});

      for (genvar c = 0; c < 3; c++) begin : g_col
        fp64_add #(.LAT(LAT)) u_re (.clk(clk), .a(psi[k][hc][c].re), .b(q[c].re), .y(h[k][hc][c].re));
        fp64_add #(.LAT(LAT)) u_im (.clk(clk), .a(psi[k][hc][c].im), .b(q[c].im), .y(h[k][hc][c].im));
      end
    end
  end

endmodule
