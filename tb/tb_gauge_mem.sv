// tb_gauge_mem: loads random links into a small gauge store and reads it
// back. Expected: bank mu at address m holds U_mu(m); bank 4+mu at address
// m' holds the link written with waddr_fwd = m'. Reads are checked one cycle
// after the address is applied, for every bank and every address.
module tb_gauge_mem;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int DEPTH = 32;
  localparam int AW    = 5;

  logic          clk = 1'b0, we = 1'b0;
  logic [1:0]    wmu = '0;
  logic [AW-1:0] waddr = '0, waddr_fwd = '0, raddr = '0;
  su3_matrix_t   wdata;
  su3_matrix_t   rdata [NHOP];
  su3_matrix_t   model [NHOP][DEPTH];
  int checks = 0, failures = 0;

  gauge_mem #(.DEPTH(DEPTH)) dut (.clk, .we, .wmu, .waddr, .waddr_fwd, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < DEPTH; m++)
      for (int mu = 0; mu < 4; mu++) begin
        we = 1'b1; wmu = 2'(mu); waddr = AW'(m);
        waddr_fwd = AW'((m + 3 * mu + 1) % DEPTH);   // any permutation will do
        wdata = rnd_matrix();
        model[mu][m] = wdata;
        model[4+mu][(m + 3 * mu + 1) % DEPTH] = wdata;
        @(posedge clk); #1;
      end
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      @(posedge clk); #1;
      for (int k = 0; k < NHOP; k++) begin
        checks++;
        if (rdata[k] !== model[k][a]) begin
          failures++;
          if (failures < 6) $display("address %0d bank %0d mismatch", a, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
