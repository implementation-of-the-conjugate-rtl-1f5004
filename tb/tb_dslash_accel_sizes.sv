// tb_dslash_accel_sizes: D-dagger D on the two other lattice sizes the
// design is meant for, 6^3 x 8 (1728 sites) and 8^3 x 12 (6144 sites),
// each in its own accelerator instance built with those extents, both
// running at the same time. Random fields are loaded, OP_DDAGD is run, and
// every streamed result is compared bit for bit with the reference operator
// applied twice on the host copy; the run must last 2 * (V + 142) + 1 cycles.
module tb_dslash_accel_sizes;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int NCFG = 2;
  localparam int KLAT = 142;

  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0, cycle = 0;
  bit   fin [NCFG] = '{0, 0};
  real  coef_r = 2.0 * (-0.1 + 4.0);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int LX = (g == 0) ? 6 : 8, LY = LX, LZ = LX, LT = (g == 0) ? 8 : 12;
    localparam int NSITE = LX * LY * LZ * LT;
    localparam int SW = $clog2(NSITE);
    localparam int EXT [4] = '{LX, LY, LZ, LT};

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

    su3_matrix_t gauge [NSITE][4];
    su3_spinor_t psi [NSITE], tmp [NSITE], expd [NSITE];

    function automatic int step(input int n, input int mu, input int dir);
      int c [4], idx;
      idx = n;
      for (int m = 0; m < 4; m++) begin c[m] = idx % EXT[m]; idx = idx / EXT[m]; end
      c[mu] = (c[mu] + dir + EXT[mu]) % EXT[mu];
      return c[0] + EXT[0] * (c[1] + EXT[1] * (c[2] + EXT[2] * c[3]));
    endfunction

    initial begin
      su3_matrix_t u8 [8];
      su3_spinor_t p8 [8];
      int t0, got;
      coef = $realtobits(coef_r);
      for (int n = 0; n < NSITE; n++) begin
        psi[n] = rnd_spinor();
        for (int mu = 0; mu < 4; mu++) gauge[n][mu] = rnd_matrix();
      end
      for (int pass = 0; pass < 2; pass++)
        for (int n = 0; n < NSITE; n++) begin
          for (int mu = 0; mu < 4; mu++) begin
            u8[mu] = gauge[n][mu];
            u8[4 + mu] = gauge[step(n, mu, -1)][mu];
            p8[mu] = (pass == 0) ? psi[step(n, mu, 1)] : tmp[step(n, mu, 1)];
            p8[4 + mu] = (pass == 0) ? psi[step(n, mu, -1)] : tmp[step(n, mu, -1)];
          end
          if (pass == 0) tmp[n] = stencil(u8, p8, psi[n], coef_r, 1'b0);
          else           expd[n] = stencil(u8, p8, tmp[n], coef_r, 1'b1);
        end
      wait (!rst);
      @(posedge clk); #1;
      for (int i = 0; i < 4 * NSITE; i++) begin
        ld_u_we = 1'b1; ld_u_site = SW'(i / 4); ld_u_mu = 2'(i % 4); ld_u_data = gauge[i / 4][i % 4];
        ld_psi_we = (i < NSITE); ld_psi_site = SW'(i % NSITE); ld_psi_data = psi[i % NSITE];
        @(posedge clk); #1;
      end
      ld_u_we = 1'b0; ld_psi_we = 1'b0;
      start = 1'b1; t0 = cycle; got = 0;
      @(posedge clk); #1;
      start = 1'b0;
      while (!done) begin
        if (res_valid) begin
          checks++;
          if (int'(res_site) != got || res_data !== expd[res_site]) begin
            failures++;
            if (failures < 6) $display("%0dx%0dx%0dx%0d: site %0d mismatch", LX, LY, LZ, LT, res_site);
          end
          got++;
        end
        @(posedge clk); #1;
      end
      checks++;
      if (got != NSITE || cycle - t0 != 2 * (NSITE + KLAT) + 1) begin
        failures++; $display("%0dx%0dx%0dx%0d: %0d results, %0d cycles", LX, LY, LZ, LT, got, cycle - t0);
      end
      $display("%0dx%0dx%0dx%0d: %0d sites of D-dagger D checked, %0d cycles", LX, LY, LZ, LT, got, cycle - t0);
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
