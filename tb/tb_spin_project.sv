// tb_spin_project: self-checking test of stage 2, the spin projection.
// Random neighbour spinors and dagger bits are applied every cycle; each
// output half spinor must equal the upper two components of
// (1 -+ gamma_mu) psi computed from the explicit gamma matrices of
// dirac_ref_pkg, bit for bit, exactly LAT cycles later.
module tb_spin_project;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int LAT = 14;
  localparam int N   = 300;

  logic         clk = 1'b0, dagger = 1'b0;
  su3_spinor_t  psi [NHOP];
  half_spinor_t h   [NHOP];
  typedef half_spinor_t [NHOP-1:0] hs8_t;
  hs8_t exp_q [$];
  int checks = 0, failures = 0;

  spin_project #(.LAT(LAT)) dut (.clk, .dagger, .psi, .h);

  always #5 clk = ~clk;

  initial begin
    repeat (N + LAT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hs8_t e;
    dirac_ref_pkg::rspin_t pr;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        dagger = 1'($urandom);
        for (int k = 0; k < NHOP; k++) begin
          int sgn;
          psi[k] = rnd_spinor();
          sgn = (k < 4) ? (dagger ? 1 : -1) : (dagger ? -1 : 1);
          pr = project(to_rspin(psi[k]), k % 4, sgn);
          for (int s = 0; s < 2; s++) for (int c = 0; c < 3; c++) e[k][s][c] = to_c(pr[s][c]);
        end
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && exp_q.size() > 0 && i - LAT + 1 < N) begin
        e = exp_q.pop_front();
        for (int k = 0; k < NHOP; k++) begin
          checks++;
          if (h[k] !== e[k]) begin
            failures++;
            if (failures < 6) $display("input %0d term %0d mismatch", i - LAT + 1, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
