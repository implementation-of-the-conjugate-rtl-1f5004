// dslash_kernel: the fully pipelined Wilson-Dirac stencil for one lattice
// site, in double precision:
//   out(n) = (m_q+4) psi(n) + 1/2 sum_mu [ U_mu(n) P-_mu psi(n+mu)
//                                         + U_mu(n-mu)^dagger P+_mu psi(n-mu) ]
// with P-+_mu = 1 -+ gamma_mu (the signs swap when dagger = 1, giving D-dagger).
//
// It takes the operands that stage 1 (the one-cycle read of all banks of the
// field memories) delivers and runs the other three stages of the stencil:
//   stage 2  spin_project     16 su3_vector add/sub          14 cycles
//   stage 3  16 x su3_matvec  8 U*h and 8 U-dagger*h         70 cycles
//   stage 4  spin_accumulate  rebuild, sum, mass, halve      57 cycles
// 1464 double operations per site, latency 10*LAT + 1 = 141 cycles here, 142
// counted from the memory read, and one new site accepted every cycle
// (initiation interval 1). Links and the centre spinor ride in delay lines
// beside the cascades; valid, site index and dagger bit ride beside too.
//
// Interface: u[k] is the link of hopping term k (k = mu forward, uses U; k =
// 4+mu backward, the stored U_mu(n-mu) is used as U-dagger), psi[k] the
// matching neighbour spinor, psi_c the centre spinor, coef = 2*(m_q+4).
// valid_o/site_o/dagger_o/out describe the site that entered 10*LAT+1
// cycles earlier. rst (synchronous, active high) clears the valid pipeline.
module dslash_kernel
  import lqcd_pkg::*;
#(
  parameter int LAT    = 14,
  parameter int SITE_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_i,
  input  logic [SITE_W-1:0] site_i,
  input  logic              dagger_i,
  input  fp64_t             coef,
  input  su3_matrix_t       u     [NHOP],
  input  su3_spinor_t       psi   [NHOP],
  input  su3_spinor_t       psi_c,
  output logic              valid_o,
  output logic [SITE_W-1:0] site_o,
  output logic              dagger_o,
  output su3_spinor_t       out
);

  localparam int LAT_S2 = LAT;
  localparam int LAT_S3 = 5 * LAT;
  localparam int LAT_S4 = 4 * LAT + 1;
  localparam int LATENCY = LAT_S2 + LAT_S3 + LAT_S4;

  // ---- stage 2
  half_spinor_t h [NHOP];
  spin_project #(.LAT(LAT)) u_s2 (.clk(clk), .dagger(dagger_i), .psi(psi), .h(h));

  // ---- stage 3
  su3_matrix_t  u_d  [NHOP];
  half_spinor_t prod [NHOP];
  for (genvar k = 0; k < NHOP; k++) begin : g_s3
    pipe_delay #(.W($bits(su3_matrix_t)), .N(LAT_S2)) d_u (.clk(clk), .rst(1'b0), .d(u[k]), .q(u_d[k]));
    for (genvar hc = 0; hc < 2; hc++) begin : g_half
      su3_matvec #(.LAT(LAT), .ADJ(k >= NDIR)) u_mv (.clk(clk), .u(u_d[k]), .v(h[k][hc]), .w(prod[k][hc]));
    end
  end

  // ---- stage 4
  su3_spinor_t psi_c_d;
  fp64_t       coef_d;
  logic        dagger_s4;
  pipe_delay #(.W($bits(su3_spinor_t)), .N(LAT_S2 + LAT_S3)) d_psic (.clk(clk), .rst(1'b0), .d(psi_c), .q(psi_c_d));
  pipe_delay #(.W(64), .N(LAT_S2 + LAT_S3)) d_coef (.clk(clk), .rst(1'b0), .d(coef), .q(coef_d));
  pipe_delay #(.W(1), .N(LAT_S2 + LAT_S3)) d_dag (.clk(clk), .rst(1'b0), .d(dagger_i), .q(dagger_s4));

  spin_accumulate #(.LAT(LAT)) u_s4 (.clk(clk), .dagger(dagger_s4), .prod(prod), .psi_c(psi_c_d),
                                     .coef(coef_d), .out(out));

  // ---- tags
  pipe_delay #(.W(1), .N(LATENCY), .HAS_RST(1'b1)) d_valid (.clk(clk), .rst(rst), .d(valid_i), .q(valid_o));
  pipe_delay #(.W(SITE_W + 1), .N(LATENCY)) d_site (.clk(clk), .rst(1'b0), .d({dagger_i, site_i}), .q({dagger_o, site_o}));

endmodule
