// gauge_mem: on-chip store of the gauge field, partitioned into eight banks.
//
// The stencil at site n needs eight links in one cycle: U_mu(n) for the four
// forward terms and U_mu(n - mu-hat) for the four backward terms. Bank mu
// holds U_mu(m) at address m; bank 4+mu holds the same link again at address
// m + mu-hat. So all eight banks are read at the same address n, and each
// link is stored twice. A load writes link U_mu(m) into bank mu at waddr = m
// and into bank 4+mu at waddr_fwd = m + mu-hat (given by the caller).
// Reads are synchronous (one cycle). Each word is an su3_matrix of 18
// doubles (1152 bits). Memory contents are not reset.
module gauge_mem
  import lqcd_pkg::*;
#(
  parameter int DEPTH  = 4096,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [1:0]        wmu,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [ADDR_W-1:0] waddr_fwd,
  input  su3_matrix_t       wdata,
  input  logic [ADDR_W-1:0] raddr,
  output su3_matrix_t       rdata [NHOP]
);

  for (genvar k = 0; k < NHOP; k++) begin : g_bank
    localparam int MU = k % NDIR;
    su3_matrix_t mem [DEPTH];
    logic [ADDR_W-1:0] wa;
    assign wa = (k < NDIR) ? waddr : waddr_fwd;

    always_ff @(posedge clk) begin
      if (we && wmu == 2'(MU)) mem[wa] <= wdata;
      rdata[k] <= mem[raddr];
    end
  end

endmodule
