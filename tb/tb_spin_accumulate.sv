// tb_spin_accumulate: self-checking test of stage 4.
// Each cycle, eight random spinors are projected with the explicit gamma
// matrices (1 -+ gamma_mu, signs set by a random dagger bit); only their
// upper halves go to the block, which must rebuild the lower halves itself.
// Expected: (((t0+t1)+(t2+t3)) + ((t4+t5)+(t6+t7)) + coef*psi_c) * 0.5 over
// the full projected spinors, bit for bit, exactly 4*LAT+1 = 57 cycles later.
module tb_spin_accumulate;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int LAT   = 14;
  localparam int DEPTH = 4 * LAT + 1;
  localparam int N     = 300;

  logic         clk = 1'b0, dagger = 1'b0;
  half_spinor_t prod [NHOP];
  su3_spinor_t  psi_c, out;
  fp64_t        coef;
  su3_spinor_t  exp_q [$];
  int checks = 0, failures = 0;
  real coef_r = 2.0 * (-0.35 + 4.0);

  spin_accumulate #(.LAT(LAT)) dut (.clk, .dagger, .prod, .psi_c, .coef, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (N + DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dirac_ref_pkg::rspin_t t [8];
    dirac_ref_pkg::rspin_t s, pc;
    su3_spinor_t e;
    coef = $realtobits(coef_r);
    for (int i = 0; i < N + DEPTH; i++) begin
      if (i < N) begin
        dagger = 1'($urandom);
        for (int k = 0; k < NHOP; k++) begin
          int sgn;
          sgn  = (k < 4) ? (dagger ? 1 : -1) : (dagger ? -1 : 1);
          t[k] = project(to_rspin(rnd_spinor()), k % 4, sgn);
          for (int a = 0; a < 2; a++) for (int c = 0; c < 3; c++) prod[k][a][c] = to_c(t[k][a][c]);
        end
        psi_c = rnd_spinor();
        pc = to_rspin(psi_c);
        s  = spin_add(spin_add(spin_add(t[0], t[1]), spin_add(t[2], t[3])),
                      spin_add(spin_add(t[4], t[5]), spin_add(t[6], t[7])));
        for (int a = 0; a < 4; a++) for (int c = 0; c < 3; c++) begin
          s[a][c].re = (s[a][c].re + coef_r * pc[a][c].re) * 0.5;
          s[a][c].im = (s[a][c].im + coef_r * pc[a][c].im) * 0.5;
        end
        e = from_rspin(s);
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
      if (i >= DEPTH - 1 && exp_q.size() > 0 && i - DEPTH + 1 < N) begin
        e = exp_q.pop_front();
        checks++;
        if (out !== e) begin
          failures++;
          if (failures < 6) $display("input %0d mismatch", i - DEPTH + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
