// pipe_delay: a chain of N registers of width W (N >= 1) that moves one word
// per cycle, used to keep side data (site index, valid bit, spinors, links)
// aligned with the floating-point cascades of the stencil pipeline.
// With HAS_RST set, an active-high synchronous reset clears every stage (used
// for valid bits); wide data paths leave it clear and need no reset.
module pipe_delay #(
  parameter int W       = 1,
  parameter int N       = 1,
  parameter bit HAS_RST = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] stage [N];

  always_ff @(posedge clk) begin
    if (HAS_RST && rst) begin
      for (int i = 0; i < N; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[N-1];

endmodule
