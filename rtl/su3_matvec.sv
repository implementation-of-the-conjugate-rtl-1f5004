// su3_matvec: stage-3 unit of the stencil, w = U v or w = U-dagger v
// (ADJ = 1) for a 3x3 complex matrix U and a colour vector v, in doubles.
//
// The product is a five-layer cascade of floating-point units, each layer one
// unit latency (14 cycles), 70 cycles in all, with a new matrix and vector
// accepted every cycle:
//   layer 1: the 36 real products a.re*v.re, a.im*v.im, a.re*v.im, a.im*v.re
//   layer 2: 18 add/sub forming the nine complex products
//            (re = rr - ii, im = ri + ir; for U-dagger the conjugate
//             re = rr + ii, im = ri - ir with a = U[j][i])
//   layers 3-5: each row accumulates its three complex products in turn into
//            an accumulator that starts at zero (18 additions).
// That is 72 double operations per product, 1152 for the 16 products of a
// site, and 5 layers, which is the operation count and depth stage 3 is
// specified with. Later terms of the sum are delayed to meet the accumulator.
//
// Interface: u, v sampled every cycle; w appears 5*LAT cycles later.
module su3_matvec
  import lqcd_pkg::*;
#(
  parameter int LAT = 14,
  parameter bit ADJ = 1'b0
) (
  input  logic        clk,
  input  su3_matrix_t u,
  input  su3_vector_t v,
  output su3_vector_t w
);

  // complex products, layer-2 outputs, [row][col]
  complex_t prod [3][3];

  for (genvar i = 0; i < 3; i++) begin : g_row
    for (genvar j = 0; j < 3; j++) begin : g_col
      complex_t a;
      fp64_t rr, ii, ri, ir;
      assign a = ADJ ? u[j][i] : u[i][j];

      fp64_mul #(.LAT(LAT)) m_rr (.clk(clk), .a(a.re), .b(v[j].re), .y(rr));
      fp64_mul #(.LAT(LAT)) m_ii (.clk(clk), .a(a.im), .b(v[j].im), .y(ii));
      fp64_mul #(.LAT(LAT)) m_ri (.clk(clk), .a(a.re), .b(v[j].im), .y(ri));
      fp64_mul #(.LAT(LAT)) m_ir (.clk(clk), .a(a.im), .b(v[j].re), .y(ir));

      fp64_add #(.LAT(LAT)) a_re (.clk(clk), .a(rr), .b(ADJ ? ii : fneg(ii)), .y(prod[i][j].re));
      fp64_add #(.LAT(LAT)) a_im (.clk(clk), .a(ri), .b(ADJ ? fneg(ir) : ir), .y(prod[i][j].im));
    end

    // accumulation chain: acc0 = 0 + p0, acc1 = acc0 + p1, acc2 = acc1 + p2
    complex_t p1_d, p2_d, acc0, acc1;

    pipe_delay #(.W($bits(complex_t)), .N(LAT))     d_p1 (.clk(clk), .rst(1'b0), .d(prod[i][1]), .q(p1_d));
    pipe_delay #(.W($bits(complex_t)), .N(2 * LAT)) d_p2 (.clk(clk), .rst(1'b0), .d(prod[i][2]), .q(p2_d));

    fp64_add #(.LAT(LAT)) c0_re (.clk(clk), .a(FP_ZERO), .b(prod[i][0].re), .y(acc0.re));
    fp64_add #(.LAT(LAT)) c0_im (.clk(clk), .a(FP_ZERO), .b(prod[i][0].im), .y(acc0.im));
    fp64_add #(.LAT(LAT)) c1_re (.clk(clk), .a(acc0.re), .b(p1_d.re), .y(acc1.re));
    fp64_add #(.LAT(LAT)) c1_im (.clk(clk), .a(acc0.im), .b(p1_d.im), .y(acc1.im));
    fp64_add #(.LAT(LAT)) c2_re (.clk(clk), .a(acc1.re), .b(p2_d.re), .y(w[i].re));
    fp64_add #(.LAT(LAT)) c2_im (.clk(clk), .a(acc1.im), .b(p2_d.im), .y(w[i].im));
  end

endmodule
