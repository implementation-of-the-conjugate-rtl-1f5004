// tb_su3_matvec: self-checking test of the stage-3 colour multiplication.
// Two instances, U*v and U-dagger*v, get a random matrix and vector every
// cycle; each result must equal the reference product of dirac_ref_pkg
// (same operation order, IEEE doubles) bit for bit exactly 5*LAT = 70 cycles
// later.
module tb_su3_matvec;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int LAT = 14;
  localparam int DEPTH = 5 * LAT;
  localparam int N   = 400;

  logic        clk = 1'b0;
  su3_matrix_t u;
  su3_vector_t v, w0, w1;
  typedef su3_vector_t [1:0] pair_t;
  pair_t exp_q [$];
  int checks = 0, failures = 0;

  su3_matvec #(.LAT(LAT), .ADJ(1'b0)) dut_u   (.clk, .u, .v, .w(w0));
  su3_matvec #(.LAT(LAT), .ADJ(1'b1)) dut_adj (.clk, .u, .v, .w(w1));

  always #5 clk = ~clk;

  initial begin
    repeat (N + DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pair_t e;
    dirac_ref_pkg::rvec_t rv, rw;
    for (int i = 0; i < N + DEPTH; i++) begin
      if (i < N) begin
        u = rnd_matrix();
        for (int c = 0; c < 3; c++) begin v[c].re = rnd_fp(); v[c].im = rnd_fp(); rv[c] = to_rc(v[c]); end
        rw = matvec(u, rv, 1'b0);
        for (int c = 0; c < 3; c++) e[0][c] = to_c(rw[c]);
        rw = matvec(u, rv, 1'b1);
        for (int c = 0; c < 3; c++) e[1][c] = to_c(rw[c]);
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
      if (i >= DEPTH - 1 && exp_q.size() > 0 && i - DEPTH + 1 < N) begin
        e = exp_q.pop_front();
        checks += 2;
        if (w0 !== e[0]) begin failures++; if (failures < 6) $display("U*v mismatch at %0d", i - DEPTH + 1); end
        if (w1 !== e[1]) begin failures++; if (failures < 6) $display("U^dag*v mismatch at %0d", i - DEPTH + 1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
