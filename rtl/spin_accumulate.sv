// spin_accumulate: stage 4 of the Wilson-Dirac stencil.
//
// Input: the eight colour-multiplied half spinors prod[k] (k as in
// spin_project), the centre spinor psi_c = psi(n), the mass coefficient
// coef = 2*(m_q + 4) and the dagger bit of the same site. Output:
//   out = ( ((t0+t1)+(t2+t3)) + ((t4+t5)+(t6+t7)) + coef*psi_c ) / 2
// which equals (m_q+4) psi(n) + 1/2 * sum of the eight hopping terms.
// t_k is prod[k] expanded to four spin components: the lower two are the
// upper two times a phase +-1 or +-i fixed by gamma_mu and the projector sign,
// an exact rescaling without arithmetic.
//
// Layers (each one unit latency, 14 cycles):
//   1: four pairwise sums (96 adders) and coef*psi_c (24 multipliers)
//   2: two pairwise sums (48 adders)
//   3: the total of the hopping terms (24 adders)
//   4: plus the mass term (24 adders)
// then one register cycle that halves each double by decrementing its
// exponent (exact; a result that would leave the normal range flushes to a
// signed zero). 216 double operations, latency 4*LAT + 1 = 57 cycles.
// Folding the factor 1/2 into the mass coefficient and an exponent step is
// this design's way of meeting that operation count and depth.
module spin_accumulate
  import lqcd_pkg::*;
#(
  parameter int LAT = 14
) (
  input  logic         clk,
  input  logic         dagger,
  input  half_spinor_t prod [NHOP],
  input  su3_spinor_t  psi_c,
  input  fp64_t        coef,
  output su3_spinor_t  out
);

  localparam int NCOMP = 24;      // doubles per spinor

  function automatic fp64_t fhalf(input fp64_t x);
    if (x[62:52] == 11'h000 || x[62:52] == 11'h7FF) return x;
    if (x[62:52] == 11'h001) return {x[63], 63'd0};
    return {x[63], x[62:52] - 11'd1, x[51:0]};
  endfunction

  // expand to full spinors
  su3_spinor_t t [NHOP];
  for (genvar k = 0; k < NHOP; k++) begin : g_recon
    localparam int MU = k % NDIR;
    logic s_neg;
    assign s_neg = (k < NDIR) ? ~dagger : dagger;
    always_comb begin
      t[k][0] = prod[k][0];
      t[k][1] = prod[k][1];
      for (int l = 0; l < 2; l++)
        t[k][2+l] = vphase(prod[k][recon_src(MU, l)], recon_phase(MU, l) + {s_neg, 1'b0});
    end
  end

  // flat views: double c of a spinor is bits [64c +: 64], c = 6*spin + 2*colour + (imaginary part)
  logic [NCOMP*64-1:0] tf [NHOP];
  logic [NCOMP*64-1:0] l1 [4];
  logic [NCOMP*64-1:0] l2 [2];
  logic [NCOMP*64-1:0] l3, l4, mass, mass_d, psi_cf, out_f;

  assign psi_cf = psi_c;
  assign out    = out_f;

  for (genvar k = 0; k < NHOP; k++) begin : g_flat
    assign tf[k] = t[k];
  end

  for (genvar c = 0; c < NCOMP; c++) begin : g_comp
    for (genvar p = 0; p < 4; p++) begin : g_l1
      fp64_add #(.LAT(LAT)) u (.clk(clk), .a(tf[2*p][64*c +: 64]), .b(tf[2*p+1][64*c +: 64]),
                               .y(l1[p][64*c +: 64]));
    end
    fp64_mul #(.LAT(LAT)) u_mass (.clk(clk), .a(coef), .b(psi_cf[64*c +: 64]),
                                  .y(mass[64*c +: 64]));
    for (genvar p = 0; p < 2; p++) begin : g_l2
      fp64_add #(.LAT(LAT)) u (.clk(clk), .a(l1[2*p][64*c +: 64]), .b(l1[2*p+1][64*c +: 64]),
                               .y(l2[p][64*c +: 64]));
    end
    fp64_add #(.LAT(LAT)) u_l3 (.clk(clk), .a(l2[0][64*c +: 64]), .b(l2[1][64*c +: 64]), .y(l3[64*c +: 64]));
    fp64_add #(.LAT(LAT)) u_l4 (.clk(clk), .a(l3[64*c +: 64]), .b(mass_d[64*c +: 64]), .y(l4[64*c +: 64]));
  end

  pipe_delay #(.W(NCOMP*64), .N(2 * LAT)) d_mass (.clk(clk), .rst(1'b0), .d(mass), .q(mass_d));

  always_ff @(posedge clk) begin
    for (int c = 0; c < NCOMP; c++) out_f[64*c +: 64] <= fhalf(l4[64*c +: 64]);
  end

endmodule
