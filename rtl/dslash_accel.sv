// dslash_accel: programmable-logic accelerator that multiplies a spinor
// field by the Wilson-Dirac operator D, by D-dagger, or by D-dagger*D, in
// double precision, for the conjugate-gradient solver running on the host.
//
// The gauge field (four links per site) and the spinor field are first
// loaded into on-chip memory through the load ports, one word per cycle.
// The memories are laid out so that one cycle reads everything a stencil
// needs: gauge_mem keeps each link twice so that all eight links of a site
// sit at the site's own address in eight banks, and spinor_mem keeps nine
// copies of the field so that the eight neighbours and the centre site are
// read at once. On start, dslash_ctrl issues one site per cycle; the
// one-cycle memory read (stage 1) feeds dslash_kernel (stages 2-4), and each
// result leaves on the result port 142 cycles after its site was issued, one
// per cycle. For D-dagger*D the results of the first pass (D) go into a
// second spinor store instead, and the second pass (D-dagger) reads from it.
//
// Interface:
//   ld_psi_*   write spinor psi(site) into the input field store
//   ld_u_*     write link U_mu(site)
//   coef       2*(m_q + 4) as a double, held static during a run
//   start/op   begin a run (op_e: OP_D, OP_DDAG, OP_DDAGD); busy, done
//   res_*      result stream, one spinor per valid cycle, in site order
// Loads must not be issued while busy. rst is synchronous, active high.
// Lattice extents LX..LT set the memory depth; 8^4 by default.
module dslash_accel
  import lqcd_pkg::*;
#(
  parameter int LX     = 8,
  parameter int LY     = 8,
  parameter int LZ     = 8,
  parameter int LT     = 8,
  parameter int LAT    = 14,
  parameter int NSITE  = LX * LY * LZ * LT,
  parameter int SITE_W = $clog2(NSITE)
) (
  input  logic              clk,
  input  logic              rst,
  // field loading
  input  logic              ld_psi_we,
  input  logic [SITE_W-1:0] ld_psi_site,
  input  su3_spinor_t       ld_psi_data,
  input  logic              ld_u_we,
  input  logic [SITE_W-1:0] ld_u_site,
  input  logic [1:0]        ld_u_mu,
  input  su3_matrix_t       ld_u_data,
  // run control
  input  fp64_t             coef,
  input  logic              start,
  input  op_e               op,
  output logic              busy,
  output logic              done,
  // results
  output logic              res_valid,
  output logic [SITE_W-1:0] res_site,
  output su3_spinor_t       res_data
);

  localparam int NRD = NHOP + 1;   // eight neighbours and the centre

  // ---- sequencer
  logic              iss_valid, iss_dagger, rd_tmp, wr_tmp;
  logic [SITE_W-1:0] iss_site;
  logic              k_valid, k_dagger;
  logic [SITE_W-1:0] k_site;
  su3_spinor_t       k_out;

  dslash_ctrl #(.NSITE(NSITE), .SITE_W(SITE_W)) u_ctrl (
    .clk, .rst, .start, .op, .res_valid(k_valid),
    .iss_valid, .iss_site, .iss_dagger, .rd_tmp, .wr_tmp, .busy, .done);

  // ---- addressing
  logic [SITE_W-1:0] nbr [NHOP];
  logic [SITE_W-1:0] ld_nbr [NHOP];
  logic [SITE_W-1:0] rd_addr [NRD];

  lattice_nbr #(.LX(LX), .LY(LY), .LZ(LZ), .LT(LT), .SITE_W(SITE_W)) u_nbr    (.site(iss_site),  .nbr(nbr));
  lattice_nbr #(.LX(LX), .LY(LY), .LZ(LZ), .LT(LT), .SITE_W(SITE_W)) u_ld_nbr (.site(ld_u_site), .nbr(ld_nbr));

  always_comb begin
    for (int k = 0; k < NHOP; k++) rd_addr[k] = nbr[k];
    rd_addr[NHOP] = iss_site;
  end

  // ---- field memories (stage 1: one-cycle read)
  su3_matrix_t u_rd [NHOP];
  su3_spinor_t psi_rd_in [NRD];
  su3_spinor_t psi_rd_tmp [NRD];
  su3_spinor_t psi_rd [NRD];
  logic        rd_tmp_q;

  gauge_mem #(.DEPTH(NSITE), .ADDR_W(SITE_W)) u_gauge (
    .clk, .we(ld_u_we), .wmu(ld_u_mu), .waddr(ld_u_site), .waddr_fwd(ld_nbr[{1'b0, ld_u_mu}]),
    .wdata(ld_u_data), .raddr(iss_site), .rdata(u_rd));

  spinor_mem #(.DEPTH(NSITE), .NRD(NRD), .ADDR_W(SITE_W)) u_psi_in (
    .clk, .we(ld_psi_we), .waddr(ld_psi_site), .wdata(ld_psi_data),
    .raddr(rd_addr), .rdata(psi_rd_in));

  spinor_mem #(.DEPTH(NSITE), .NRD(NRD), .ADDR_W(SITE_W)) u_psi_tmp (
    .clk, .we(k_valid && wr_tmp), .waddr(k_site), .wdata(k_out),
    .raddr(rd_addr), .rdata(psi_rd_tmp));

  always_comb
    for (int r = 0; r < NRD; r++) psi_rd[r] = rd_tmp_q ? psi_rd_tmp[r] : psi_rd_in[r];

  // tags aligned with the read data
  logic              s1_valid, s1_dagger;
  logic [SITE_W-1:0] s1_site;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= iss_valid;
    s1_site   <= iss_site;
    s1_dagger <= iss_dagger;
    rd_tmp_q  <= rd_tmp;
  end

  // ---- stencil stages 2-4
  su3_spinor_t psi_nb [NHOP];
  always_comb for (int k = 0; k < NHOP; k++) psi_nb[k] = psi_rd[k];

  dslash_kernel #(.LAT(LAT), .SITE_W(SITE_W)) u_kernel (
    .clk, .rst, .valid_i(s1_valid), .site_i(s1_site), .dagger_i(s1_dagger), .coef,
    .u(u_rd), .psi(psi_nb), .psi_c(psi_rd[NHOP]),
    .valid_o(k_valid), .site_o(k_site), .dagger_o(k_dagger), .out(k_out));

  // ---- result stream
  assign res_valid = k_valid && !wr_tmp;
  assign res_site  = k_site;
  assign res_data  = k_out;

  a_no_load_when_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !(ld_psi_we || ld_u_we));
  // passes never overlap, so every result belongs to the current pass
  a_pass_order: assert property (@(posedge clk) disable iff (rst) k_valid |-> k_dagger == iss_dagger);

endmodule
