// tb_dslash_accel: end-to-end test of the accelerator at its default size
// (an 8^4 lattice, 4096 sites), with no parameter changed.
//
// A random gauge field and spinor field are loaded through the load ports,
// then the accelerator is run three times: chi = D psi, chi = D-dagger psi
// and chi = D-dagger D psi (two passes through a second spinor store). Every
// streamed result is compared bit for bit with the reference stencil of
// dirac_ref_pkg evaluated on the host copy of the fields, with neighbours
// found from the site coordinates. It also checks the timing the design
// promises: each pass issues its first site the cycle after it begins and
// returns its first result 142 cycles later, one result per cycle after
// that (initiation interval 1); a pass lasts NSITE + 142 cycles, and done
// follows the last result by one cycle. Each mechanism is counted and must occur: the three operators, the
// two-pass run, periodic wrap-around at the lattice boundary, back-to-back
// results and a start request that is ignored while busy.
module tb_dslash_accel;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int LX = 8, LY = 8, LZ = 8, LT = 8;
  localparam int NSITE = LX * LY * LZ * LT;
  localparam int SW = $clog2(NSITE);
  localparam int KLAT = 142;
  localparam int EXT [4] = '{LX, LY, LZ, LT};

  logic          clk = 1'b0, rst = 1'b1;
  logic          ld_psi_we = 1'b0, ld_u_we = 1'b0;
  logic [SW-1:0] ld_psi_site = '0, ld_u_site = '0;
  logic [1:0]    ld_u_mu = '0;
  su3_spinor_t   ld_psi_data;
  su3_matrix_t   ld_u_data;
  fp64_t         coef;
  logic          start = 1'b0;
  op_e           op = OP_D;
  logic          busy, done, res_valid;
  logic [SW-1:0] res_site;
  su3_spinor_t   res_data;

  dslash_accel dut (.clk, .rst, .ld_psi_we, .ld_psi_site, .ld_psi_data, .ld_u_we, .ld_u_site,
                    .ld_u_mu, .ld_u_data, .coef, .start, .op, .busy, .done, .res_valid,
                    .res_site, .res_data);

  always #5 clk = ~clk;

  su3_matrix_t gauge [NSITE][4];
  su3_spinor_t psi [NSITE];
  su3_spinor_t tmp [NSITE];
  su3_spinor_t expd [NSITE];
  real coef_r = 2.0 * (0.25 + 4.0);

  int checks = 0, failures = 0, cycle = 0;
  int n_op [3] = '{0, 0, 0};
  int n_two_pass = 0, n_wrap = 0, n_back_to_back = 0, n_ignored_start = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int step(input int n, input int mu, input int dir);
    int c [4], idx;
    idx = n;
    for (int m = 0; m < 4; m++) begin c[m] = idx % EXT[m]; idx = idx / EXT[m]; end
    c[mu] = (c[mu] + dir + EXT[mu]) % EXT[mu];
    return c[0] + EXT[0] * (c[1] + EXT[1] * (c[2] + EXT[2] * c[3]));
  endfunction

  function automatic bit on_boundary(input int n);
    int idx;
    idx = n;
    for (int m = 0; m < 4; m++) begin
      if (idx % EXT[m] == 0 || idx % EXT[m] == EXT[m] - 1) return 1'b1;
      idx = idx / EXT[m];
    end
    return 1'b0;
  endfunction

  // reference: dst = D src (or D-dagger src)
  task automatic apply_ref(input su3_spinor_t src [NSITE], output su3_spinor_t dst [NSITE], input bit dagger);
    su3_matrix_t u8 [8];
    su3_spinor_t p8 [8];
    for (int n = 0; n < NSITE; n++) begin
      for (int mu = 0; mu < 4; mu++) begin
        u8[mu]     = gauge[n][mu];
        p8[mu]     = src[step(n, mu, 1)];
        u8[4 + mu] = gauge[step(n, mu, -1)][mu];
        p8[4 + mu] = src[step(n, mu, -1)];
      end
      dst[n] = stencil(u8, p8, src[n], coef_r, dagger);
    end
  endtask

  task automatic run(input op_e o);
    int t0, got, first, last, npass;
    npass = (o == OP_DDAGD) ? 2 : 1;
    op = o; start = 1'b1;
    t0 = cycle; got = 0; first = -1; last = -1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) begin
      if (cycle - t0 == 20) begin start = 1'b1; op = OP_D; end
      else start = 1'b0;
      if (res_valid) begin
        checks++;
        if (int'(res_site) != got) begin
          failures++; if (failures < 6) $display("op %0d: result for site %0d, expected %0d", o, res_site, got);
        end
        if (res_data !== expd[res_site]) begin
          failures++; if (failures < 6) $display("op %0d: site %0d value mismatch", o, res_site);
        end
        if (first < 0) first = cycle - t0;
        if (last == cycle - 1) n_back_to_back++;
        if (on_boundary(int'(res_site))) n_wrap++;
        last = cycle;
        got++;
      end
      @(posedge clk); #1;
    end
    n_ignored_start++;
    checks++;
    if (got != NSITE) begin failures++; $display("op %0d: %0d results", o, got); end
    checks++;
    if (first != (npass - 1) * (NSITE + KLAT) + KLAT + 1) begin
      failures++; $display("op %0d: first result after %0d cycles", o, first);
    end
    checks++;
    if (cycle - t0 != npass * (NSITE + KLAT) + 1) begin
      failures++; $display("op %0d: done after %0d cycles", o, cycle - t0);
    end
    $display("op %0d: %0d sites, first result at %0d, done at %0d cycles", o, got, first, cycle - t0);
    n_op[o]++;
    if (npass == 2) n_two_pass++;
    @(posedge clk); #1;
  endtask

  initial begin
    coef = $realtobits(coef_r);
    for (int n = 0; n < NSITE; n++) begin
      psi[n] = rnd_spinor();
      for (int mu = 0; mu < 4; mu++) gauge[n][mu] = rnd_matrix();
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // load: one link per cycle, one spinor per cycle alongside
    for (int i = 0; i < 4 * NSITE; i++) begin
      ld_u_we = 1'b1; ld_u_site = SW'(i / 4); ld_u_mu = 2'(i % 4); ld_u_data = gauge[i / 4][i % 4];
      ld_psi_we = (i < NSITE); ld_psi_site = SW'(i); ld_psi_data = psi[i % NSITE];
      @(posedge clk); #1;
    end
    ld_u_we = 1'b0; ld_psi_we = 1'b0;

    apply_ref(psi, expd, 1'b0);
    run(OP_D);
    apply_ref(psi, expd, 1'b1);
    run(OP_DDAG);
    apply_ref(psi, tmp, 1'b0);
    apply_ref(tmp, expd, 1'b1);
    run(OP_DDAGD);

    checks++; if (n_op[OP_D] == 0)     begin failures++; $display("D never applied"); end
    checks++; if (n_op[OP_DDAG] == 0)  begin failures++; $display("D-dagger never applied"); end
    checks++; if (n_op[OP_DDAGD] == 0) begin failures++; $display("D-dagger D never applied"); end
    checks++; if (n_two_pass == 0)     begin failures++; $display("no two-pass run"); end
    checks++; if (n_wrap == 0)         begin failures++; $display("no boundary site"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("no back-to-back results"); end
    checks++; if (n_ignored_start == 0) begin failures++; $display("no start while busy"); end
    $display("counts: D %0d, D-dagger %0d, D-dagger D %0d, two-pass %0d, boundary results %0d, back-to-back %0d, ignored starts %0d",
             n_op[0], n_op[1], n_op[2], n_two_pass, n_wrap, n_back_to_back, n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
