// dslash_ctrl: sequencer of the stencil pipeline.
//
// On start it sweeps all NSITE lattice sites in order, issuing one site per
// cycle (initiation interval 1), then waits until the kernel has returned
// all NSITE results (counted on res_valid) before it reports done. For
// OP_D and OP_DDAG this is one pass. For OP_DDAGD it makes two passes: pass
// 0 applies D to the loaded field and has its results written into the
// second spinor store (wr_tmp = 1); pass 1 applies D-dagger to that store
// (rd_tmp = 1) and streams the results out. The second pass must wait for
// the first to drain because each site needs its neighbours' results.
// A pass thus takes NSITE + latency cycles, the V*delta + tau of the
// performance model with delta = 1.
//
// Interface: start is honoured only when idle (busy = 0); op is sampled
// with it. iss_valid/iss_site/iss_dagger go to the memory read (stage 1).
// done is a one-cycle pulse. rst is synchronous and active high.
module dslash_ctrl
  import lqcd_pkg::*;
#(
  parameter int NSITE  = 4096,
  parameter int SITE_W = $clog2(NSITE)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  op_e               op,
  input  logic              res_valid,
  output logic              iss_valid,
  output logic [SITE_W-1:0] iss_site,
  output logic              iss_dagger,
  output logic              rd_tmp,
  output logic              wr_tmp,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;

  state_e            state;
  op_e               op_q;
  logic              pass;
  logic [SITE_W-1:0] n;
  logic [SITE_W:0]   cnt, cnt_next;

  assign cnt_next   = cnt + (SITE_W+1)'(res_valid);
  assign iss_valid  = (state == S_ISSUE);
  assign iss_site   = n;
  assign iss_dagger = (op_q == OP_DDAG) || (op_q == OP_DDAGD && pass);
  assign rd_tmp     = (op_q == OP_DDAGD) && pass;
  assign wr_tmp     = (op_q == OP_DDAGD) && !pass;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      op_q  <= OP_D;
      pass  <= 1'b0;
      n     <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) cnt <= cnt_next;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          pass  <= 1'b0;
          n     <= '0;
          cnt   <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          n <= n + 1'b1;
          if (n == SITE_W'(NSITE - 1)) state <= S_DRAIN;
        end
        S_DRAIN: if (cnt_next == (SITE_W+1)'(NSITE)) begin
          if (op_q == OP_DDAGD && !pass) begin
            pass  <= 1'b1;
            n     <= '0;
            cnt   <= '0;
            state <= S_ISSUE;
          end else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // results never outnumber issued sites
  a_count: assert property (@(posedge clk) disable iff (rst) cnt <= (SITE_W+1)'(NSITE));

endmodule
