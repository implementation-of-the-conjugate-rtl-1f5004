// spinor_mem: on-chip store of one spinor field, replicated NRD times.
//
// A stencil needs the spinors of all its neighbour sites (and the centre
// site) in the same cycle, but one memory block delivers one word per cycle.
// The field is therefore held in NRD identical copies: every write goes to
// all copies at the same address, and copy r is read at raddr[r]. Each word
// is a whole su3_spinor (24 doubles, 1536 bits). Reads are synchronous: the
// data for raddr presented in one cycle appear in the next (stage 1 of the
// stencil). Memory contents are not reset.
module spinor_mem
  import lqcd_pkg::*;
#(
  parameter int DEPTH  = 4096,
  parameter int NRD    = 9,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  su3_spinor_t       wdata,
  input  logic [ADDR_W-1:0] raddr [NRD],
  output su3_spinor_t       rdata [NRD]
);

  for (genvar r = 0; r < NRD; r++) begin : g_copy
    su3_spinor_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata[r] <= mem[raddr[r]];
    end
  end

endmodule
