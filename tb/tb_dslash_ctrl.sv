// tb_dslash_ctrl: drives the sequencer with a model kernel (a valid bit
// delayed by L cycles) on a 20-site lattice. For each operator it checks the
// issued site sequence 0..NSITE-1 of every pass, the dagger bit and the
// store selection of each pass, that done comes NSITE + L + 1 cycles after
// start per pass, and that start is ignored while busy.
module tb_dslash_ctrl;
  import lqcd_pkg::*;

  localparam int NSITE = 20;
  localparam int SW    = 5;
  localparam int L     = 30;

  logic          clk = 1'b0, rst = 1'b1, start = 1'b0, res_valid;
  op_e           op = OP_D;
  logic          iss_valid, iss_dagger, rd_tmp, wr_tmp, busy, done;
  logic [SW-1:0] iss_site;
  logic [L-1:0]  kdelay;
  int checks = 0, failures = 0, cycle = 0;

  dslash_ctrl #(.NSITE(NSITE)) dut (.clk, .rst, .start, .op, .res_valid, .iss_valid, .iss_site,
                                    .iss_dagger, .rd_tmp, .wr_tmp, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle  <= cycle + 1;
    kdelay <= rst ? '0 : {kdelay[L-2:0], iss_valid};
  end
  assign res_valid = kdelay[L-1];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input op_e o);
    int t0, npass, pass, next, extra_start;
    npass = (o == OP_DDAGD) ? 2 : 1;
    op = o; start = 1'b1;
    t0 = cycle;
    @(posedge clk); #1;
    start = 1'b0;
    pass = 0; next = 0; extra_start = 0;
    while (!done) begin
      if (iss_valid) begin
        check(int'(iss_site) == next, $sformatf("op %0d pass %0d: site %0d, expected %0d", o, pass, iss_site, next));
        check(iss_dagger == (o == OP_DDAG || (o == OP_DDAGD && pass == 1)), "dagger bit");
        check(rd_tmp == (o == OP_DDAGD && pass == 1) && wr_tmp == (o == OP_DDAGD && pass == 0), "store select");
        next++;
        if (next == NSITE) begin next = 0; pass++; end
      end
      if (busy && !extra_start && cycle - t0 == 5) begin start = 1'b1; op = OP_DDAGD; extra_start = 1; end
      else start = 1'b0;
      @(posedge clk); #1;
    end
    check(pass == npass, $sformatf("op %0d: %0d passes", o, pass));
    check(cycle - t0 == npass * (NSITE + L) + 1, $sformatf("op %0d: done after %0d cycles", o, cycle - t0));
    @(posedge clk); #1;
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    run(OP_D);
    run(OP_DDAG);
    run(OP_DDAGD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
