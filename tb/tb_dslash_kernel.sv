// tb_dslash_kernel: self-checking test of the stencil pipeline (stages 2-4).
//
// Random links, neighbour spinors, centre spinors and dagger bits are applied
// with random gaps in the valid stream, then back to back. Every output
// site must equal the reference stencil of dirac_ref_pkg bit for bit, carry
// the right site index and dagger bit, and appear exactly 10*LAT+1 = 141
// cycles after its inputs. The number of sites that went through back to
// back (initiation interval 1) is counted and must be non-zero.
module tb_dslash_kernel;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int LAT     = 14;
  localparam int SITE_W  = 12;
  localparam int LATENCY = 10 * LAT + 1;
  localparam int NSITE   = 400;

  logic              clk = 1'b0, rst = 1'b1;
  logic              valid_i = 1'b0, dagger_i = 1'b0;
  logic [SITE_W-1:0] site_i = '0;
  fp64_t             coef;
  su3_matrix_t       u [NHOP];
  su3_spinor_t       psi [NHOP];
  su3_spinor_t       psi_c;
  logic              valid_o, dagger_o;
  logic [SITE_W-1:0] site_o;
  su3_spinor_t       out;

  typedef struct { int cycle; logic [SITE_W-1:0] site; bit dagger; su3_spinor_t res; } exp_t;
  exp_t exp_q [$];

  int checks = 0, failures = 0, cycle = 0, sent = 0, got = 0, back_to_back = 0;
  bit prev_valid = 0;

  dslash_kernel #(.LAT(LAT), .SITE_W(SITE_W)) dut (
    .clk, .rst, .valid_i, .site_i, .dagger_i, .coef, .u, .psi, .psi_c,
    .valid_o, .site_o, .dagger_o, .out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3 * NSITE + LATENCY + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (!rst && valid_o) begin
      exp_t e;
      got++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (cycle != e.cycle + LATENCY) begin
          failures++; $display("site %0d: latency %0d, expected %0d", e.site, cycle - e.cycle, LATENCY);
        end
        if (site_o !== e.site || dagger_o !== e.dagger) begin
          failures++; $display("tag mismatch: site %0d/%0d dagger %0d/%0d", site_o, e.site, dagger_o, e.dagger);
        end
        if (out !== e.res) begin
          failures++;
          if (failures < 6) $display("site %0d dagger %0d: result mismatch", e.site, e.dagger);
        end
      end
    end
  end

  initial begin
    real coef_r;
    coef_r = 2.0 * (0.1 + 4.0);
    coef   = $realtobits(coef_r);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (sent < NSITE) begin
      bit v;
      v = (sent > NSITE / 2) || ($urandom % 3 != 0);
      if (v) begin
        exp_t e;
        for (int k = 0; k < NHOP; k++) begin u[k] = rnd_matrix(); psi[k] = rnd_spinor(); end
        psi_c = rnd_spinor();
        e.site   = SITE_W'($urandom);
        e.dagger = 1'($urandom);
        e.cycle  = cycle;
        e.res    = stencil(u, psi, psi_c, coef_r, e.dagger);
        exp_q.push_back(e);
        site_i = e.site; dagger_i = e.dagger;
        sent++;
        if (prev_valid) back_to_back++;
      end
      valid_i = v;
      prev_valid = v;
      @(posedge clk);
      #1;
    end
    valid_i = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    checks++;
    if (got != NSITE || exp_q.size() != 0) begin
      failures++; $display("sent %0d sites, got %0d", NSITE, got);
    end
    checks++;
    if (back_to_back == 0) begin
      failures++; $display("no back-to-back sites");
    end
    $display("back-to-back sites: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
