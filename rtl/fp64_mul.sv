// fp64_mul: pipelined IEEE-754 double-precision multiplier, y = a * b.
//
// One new operand pair is accepted every cycle and its product leaves LAT
// cycles later (LAT = 14 as in the target device's double-precision
// multiplier). The first stage multiplies the 53-bit significands (a 106-bit
// product, mapped to DSP blocks by synthesis), normalises by at most one
// place and rounds to nearest even; LAT-1 further registers follow for
// retiming.
//
// Number handling (a choice of this design): subnormal inputs are read as
// zero, results below the normal range flush to a signed zero, overflow
// gives a signed infinity, NaN operands and 0 * inf give the quiet NaN
// 0x7FF8000000000000.
//
// Interface: clk, a, b in; y out; no valid or enable signal.
module fp64_mul #(
  parameter int LAT = 14
) (
  input  logic        clk,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic [63:0] fmul(input logic [63:0] a_in, input logic [63:0] b_in);
    logic         s, g, st;
    logic [105:0] p;
    logic [53:0]  m;
    logic         a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    int           e;

    s      = a_in[63] ^ b_in[63];
    a_nan  = (a_in[62:52] == 11'h7FF) && (a_in[51:0] != '0);
    b_nan  = (b_in[62:52] == 11'h7FF) && (b_in[51:0] != '0);
    a_inf  = (a_in[62:52] == 11'h7FF) && (a_in[51:0] == '0);
    b_inf  = (b_in[62:52] == 11'h7FF) && (b_in[51:0] == '0);
    a_zero = (a_in[62:52] == 11'h000);
    b_zero = (b_in[62:52] == 11'h000);

    if (a_nan || b_nan) return QNAN;
    if ((a_inf && b_zero) || (b_inf && a_zero)) return QNAN;
    if (a_inf || b_inf) return {s, 11'h7FF, 52'd0};
    if (a_zero || b_zero) return {s, 63'd0};

    p = {53'd0, 1'b1, a_in[51:0]} * {53'd0, 1'b1, b_in[51:0]};
    e = int'(a_in[62:52]) + int'(b_in[62:52]) - 1023;
    if (p[105]) begin
      m  = {1'b0, p[105:53]};
      g  = p[52];
      st = |p[51:0];
      e  = e + 1;
    end else begin
      m  = {1'b0, p[104:52]};
      g  = p[51];
      st = |p[50:0];
    end

    if (g && (st || m[0])) m = m + 54'd1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 1;
    end

    if (e >= 2047) return {s, 11'h7FF, 52'd0};
    if (e <= 0)    return {s, 63'd0};
    return {s, e[10:0], m[51:0]};
  endfunction

  logic [63:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= fmul(a, b);
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[LAT-1];

endmodule
