// tb_cg_solve: the accelerator inside a conjugate-gradient solver.
//
// The testbench plays the host: it keeps the vectors of the CG iteration in
// `real` arithmetic and, for every matrix product, loads the search
// direction p into the accelerator, runs OP_DDAGD and reads back
// A p = D-dagger D p. It solves A x = b for a random b on a 4^4 lattice
// (random links scaled by 0.2 so that the system is well conditioned), and
// checks that the residual norm falls below 1e-20 of |b|^2 within 40
// iterations, that it fell in every iteration, and finally, using the
// reference operator of dirac_ref_pkg (not the accelerator), that
// |b - D-dagger D x|^2 / |b|^2 < 1e-18.
module tb_cg_solve;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int LX = 4, LY = 4, LZ = 4, LT = 4;
  localparam int NSITE = LX * LY * LZ * LT;
  localparam int SW = $clog2(NSITE);
  localparam int EXT [4] = '{LX, LY, LZ, LT};
  localparam int NC = 24;

  logic          clk = 1'b0, rst = 1'b1;
  logic          ld_psi_we = 1'b0, ld_u_we = 1'b0;
  logic [SW-1:0] ld_psi_site = '0, ld_u_site = '0;
  logic [1:0]    ld_u_mu = '0;
  su3_spinor_t   ld_psi_data;
  su3_matrix_t   ld_u_data;
  fp64_t         coef;
  logic          start = 1'b0;
  op_e           op = OP_DDAGD;
  logic          busy, done, res_valid;
  logic [SW-1:0] res_site;
  su3_spinor_t   res_data;

  dslash_accel #(.LX(LX), .LY(LY), .LZ(LZ), .LT(LT)) dut (
    .clk, .rst, .ld_psi_we, .ld_psi_site, .ld_psi_data, .ld_u_we, .ld_u_site, .ld_u_mu, .ld_u_data,
    .coef, .start, .op, .busy, .done, .res_valid, .res_site, .res_data);

  always #5 clk = ~clk;

  su3_matrix_t gauge [NSITE][4];
  real x [NSITE][NC], r [NSITE][NC], p [NSITE][NC], ap [NSITE][NC], b [NSITE][NC];
  real coef_r = 2.0 * (0.2 + 4.0);
  int checks = 0, failures = 0, n_products = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic su3_spinor_t pack(input real v [NC]);
    su3_spinor_t s;
    logic [NC*64-1:0] f;
    for (int c = 0; c < NC; c++) f[64*c +: 64] = $realtobits(v[c]);
    s = f;
    return s;
  endfunction

  function automatic int step(input int n, input int mu, input int dir);
    int c [4], idx;
    idx = n;
    for (int m = 0; m < 4; m++) begin c[m] = idx % EXT[m]; idx = idx / EXT[m]; end
    c[mu] = (c[mu] + dir + EXT[mu]) % EXT[mu];
    return c[0] + EXT[0] * (c[1] + EXT[1] * (c[2] + EXT[2] * c[3]));
  endfunction

  // ap = D-dagger D p on the accelerator
  task automatic hw_apply();
    logic [NC*64-1:0] f;
    int got;
    for (int n = 0; n < NSITE; n++) begin
      ld_psi_we = 1'b1; ld_psi_site = SW'(n); ld_psi_data = pack(p[n]);
      @(posedge clk); #1;
    end
    ld_psi_we = 1'b0;
    op = OP_DDAGD; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    got = 0;
    while (!done) begin
      if (res_valid) begin
        f = res_data;
        for (int c = 0; c < NC; c++) ap[res_site][c] = $bitstoreal(f[64*c +: 64]);
        got++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (got != NSITE) begin failures++; $display("product returned %0d sites", got); end
    n_products++;
  endtask

  function automatic real dot(input real a [NSITE][NC], input real c [NSITE][NC]);
    real s = 0.0;
    for (int n = 0; n < NSITE; n++) for (int k = 0; k < NC; k++) s += a[n][k] * c[n][k];
    return s;
  endfunction

  initial begin
    real rr, rr_new, bb, pap, alpha, beta, res;
    int it;
    su3_spinor_t sx [NSITE], sd [NSITE], sdd [NSITE];
    su3_matrix_t u8 [8];
    su3_spinor_t p8 [8];
    logic [NC*64-1:0] f;

    coef = $realtobits(coef_r);
    for (int n = 0; n < NSITE; n++)
      for (int mu = 0; mu < 4; mu++) begin
        gauge[n][mu] = rnd_matrix();
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
          gauge[n][mu][i][j].re = $realtobits($bitstoreal(gauge[n][mu][i][j].re) * 0.2);
          gauge[n][mu][i][j].im = $realtobits($bitstoreal(gauge[n][mu][i][j].im) * 0.2);
        end
      end
    for (int n = 0; n < NSITE; n++) for (int c = 0; c < NC; c++) begin
      b[n][c] = $bitstoreal(rnd_fp()); x[n][c] = 0.0; r[n][c] = b[n][c]; p[n][c] = b[n][c];
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 4 * NSITE; i++) begin
      ld_u_we = 1'b1; ld_u_site = SW'(i / 4); ld_u_mu = 2'(i % 4); ld_u_data = gauge[i / 4][i % 4];
      @(posedge clk); #1;
    end
    ld_u_we = 1'b0;

    bb = dot(b, b);
    rr = bb;
    it = 0;
    while (rr > 1e-20 * bb && it < 40) begin
      hw_apply();
      pap   = dot(p, ap);
      alpha = rr / pap;
      for (int n = 0; n < NSITE; n++) for (int c = 0; c < NC; c++) begin
        x[n][c] += alpha * p[n][c];
        r[n][c] -= alpha * ap[n][c];
      end
      rr_new = dot(r, r);
      checks++;
      if (!(rr_new < rr)) begin failures++; $display("iteration %0d: residual did not fall", it); end
      beta = rr_new / rr;
      rr = rr_new;
      for (int n = 0; n < NSITE; n++) for (int c = 0; c < NC; c++) p[n][c] = r[n][c] + beta * p[n][c];
      it++;
      $display("iteration %0d: |r|^2/|b|^2 = %e", it, rr / bb);
    end
    checks++;
    if (rr > 1e-20 * bb) begin failures++; $display("no convergence in %0d iterations", it); end

    // independent check of the solution with the reference operator
    for (int n = 0; n < NSITE; n++) sx[n] = pack(x[n]);
    for (int pass = 0; pass < 2; pass++)
      for (int n = 0; n < NSITE; n++) begin
        for (int mu = 0; mu < 4; mu++) begin
          u8[mu] = gauge[n][mu];
          u8[4 + mu] = gauge[step(n, mu, -1)][mu];
          p8[mu] = (pass == 0) ? sx[step(n, mu, 1)] : sd[step(n, mu, 1)];
          p8[4 + mu] = (pass == 0) ? sx[step(n, mu, -1)] : sd[step(n, mu, -1)];
        end
        if (pass == 0) sd[n] = stencil(u8, p8, sx[n], coef_r, 1'b0);
        else           sdd[n] = stencil(u8, p8, sd[n], coef_r, 1'b1);
      end
    res = 0.0;
    for (int n = 0; n < NSITE; n++) begin
      f = sdd[n];
      for (int c = 0; c < NC; c++) res += (b[n][c] - $bitstoreal(f[64*c +: 64])) ** 2;
    end
    checks++;
    if (res > 1e-18 * bb) begin failures++; end
    $display("converged in %0d iterations (%0d accelerator products), true residual %e", it, n_products, res / bb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
