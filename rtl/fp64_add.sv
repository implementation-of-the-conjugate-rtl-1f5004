// fp64_add: pipelined IEEE-754 double-precision adder, y = a + b.
//
// One new operand pair is accepted every cycle and its sum leaves LAT cycles
// later (LAT = 14 as in the target device's double-precision adder). The sum
// is formed in the first stage (align with guard/round/sticky bits, add or
// subtract the significands, normalise, round to nearest even) and then
// travels through LAT-1 further registers; synthesis retiming is expected to
// spread the logic over them. Subtraction is done by the caller by flipping
// the sign bit of b, which is exact.
//
// Number handling (a choice of this design, the stencil never meets these
// cases with physical data): subnormal inputs are read as zero and results
// below the normal range are flushed to a zero of the result's sign;
// overflow gives infinity; any NaN operand or inf - inf gives the quiet NaN
// 0x7FF8000000000000. An exact cancellation gives +0, and (-0) + (-0) = -0.
//
// Interface: clk, a, b in; y out. The unit has no valid or enable signal:
// the surrounding pipeline carries its own valid bits alongside.
module fp64_add #(
  parameter int LAT = 14
) (
  input  logic        clk,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic [63:0] fadd(input logic [63:0] a_in, input logic [63:0] b_in);
    logic        sx, sy, sub, g, rs;
    logic [10:0] ex, ey;
    logic [51:0] fx, fy;
    logic [55:0] mx, my, mask;
    logic [56:0] sum;
    logic [53:0] m;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    int          d, e;

    a_nan  = (a_in[62:52] == 11'h7FF) && (a_in[51:0] != '0);
    b_nan  = (b_in[62:52] == 11'h7FF) && (b_in[51:0] != '0);
    a_inf  = (a_in[62:52] == 11'h7FF) && (a_in[51:0] == '0);
    b_inf  = (b_in[62:52] == 11'h7FF) && (b_in[51:0] == '0);
    a_zero = (a_in[62:52] == 11'h000);
    b_zero = (b_in[62:52] == 11'h000);

    if (a_nan || b_nan) return QNAN;
    if (a_inf && b_inf) return (a_in[63] == b_in[63]) ? a_in : QNAN;
    if (a_inf) return a_in;
    if (b_inf) return b_in;
    if (a_zero && b_zero) return {a_in[63] & b_in[63], 63'd0};
    if (a_zero) return b_in;
    if (b_zero) return a_in;

    // x is the operand of larger magnitude
    if (a_in[62:0] >= b_in[62:0]) begin
      sx = a_in[63]; ex = a_in[62:52]; fx = a_in[51:0];
      sy = b_in[63]; ey = b_in[62:52]; fy = b_in[51:0];
    end else begin
      sx = b_in[63]; ex = b_in[62:52]; fx = b_in[51:0];
      sy = a_in[63]; ey = a_in[62:52]; fy = a_in[51:0];
    end

    mx = {1'b1, fx, 3'b000};
    my = {1'b1, fy, 3'b000};
    d  = int'(ex) - int'(ey);
    if (d >= 56) begin
      my = 56'd1;                          // only the sticky bit survives
    end else if (d > 0) begin
      mask = (56'd1 << d) - 56'd1;
      rs   = |(my & mask);
      my   = my >> d;
      my[0] = my[0] | rs;
    end

    sub = sx ^ sy;
    sum = sub ? ({1'b0, mx} - {1'b0, my}) : ({1'b0, mx} + {1'b0, my});
    if (sum == '0) return 64'd0;

    e = int'(ex);
    if (sum[56]) begin
      sum = {1'b0, sum[56:2], sum[1] | sum[0]};
      e   = e + 1;
    end else begin
      for (int i = 0; i < 55; i++) begin
        if (!sum[55]) begin
          sum = sum << 1;
          e   = e - 1;
        end
      end
    end

    m  = {1'b0, sum[55:3]};
    g  = sum[2];
    rs = sum[1] | sum[0];
    if (g && (rs || m[0])) m = m + 54'd1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 1;
    end

    if (e >= 2047) return {sx, 11'h7FF, 52'd0};
    if (e <= 0)    return {sx, 63'd0};
    return {sx, e[10:0], m[51:0]};
  endfunction

  logic [63:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= fadd(a, b);
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[LAT-1];

endmodule
