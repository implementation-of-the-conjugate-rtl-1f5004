// tb_spinor_mem: random writes and nine independent random reads per cycle
// on a small replicated spinor store, against a plain array model. Each
// read must return, one cycle later, the word stored before that clock edge
// (a read of the address being written returns the old word).
module tb_spinor_mem;
  import lqcd_pkg::*;
  import dirac_ref_pkg::*;

  localparam int DEPTH = 64;
  localparam int NRD   = 9;
  localparam int AW    = 6;

  logic          clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0;
  su3_spinor_t   wdata;
  logic [AW-1:0] raddr [NRD];
  su3_spinor_t   rdata [NRD];
  su3_spinor_t   model [DEPTH];
  su3_spinor_t   expd  [NRD];
  int checks = 0, failures = 0, same_addr = 0;

  spinor_mem #(.DEPTH(DEPTH), .NRD(NRD)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = rnd_spinor(); model[a] = wdata;
      for (int r = 0; r < NRD; r++) raddr[r] = '0;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 500; i++) begin
      we    = 1'($urandom);
      waddr = AW'($urandom);
      wdata = rnd_spinor();
      for (int r = 0; r < NRD; r++) begin
        raddr[r] = (r == 0) ? waddr : AW'($urandom);
        expd[r]  = model[raddr[r]];
      end
      if (we) same_addr++;
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rdata[r] !== expd[r]) begin
          failures++;
          if (failures < 6) $display("cycle %0d port %0d mismatch", i, r);
        end
      end
    end
    checks++;
    if (same_addr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
