// tb_fp64_add: self-checking test of the pipelined double-precision adder.
//
// A new operand pair is applied every cycle: random normal numbers over a
// wide exponent range, operands of equal magnitude and opposite sign, near
// values whose difference cancels many bits, signed zeros, infinities and
// NaN. The expected result is the simulator's own IEEE double arithmetic
// (`real`), which rounds to nearest even; each result must match it bit for
// bit exactly LAT cycles after its operands were applied.
module tb_fp64_add;
  localparam int LAT = 14;
  localparam int N   = 4000;

  logic        clk = 1'b0;
  logic [63:0] a, b, y;
  logic [63:0] exp_q [$];
  int          checks = 0, failures = 0, cycle = 0;

  fp64_add #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_normal(input int emin, input int emax);
    logic [63:0] r;
    r[63]    = 1'($urandom);
    r[62:52] = 11'(emin + ($urandom % (emax - emin + 1)));
    r[51:0]  = {20'($urandom), 32'($urandom)};
    return r;
  endfunction

  function automatic logic [63:0] reference(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] r;
    r = $realtobits($bitstoreal(a) + $bitstoreal(b));
    if (r[62:52] == 11'h7FF && r[51:0] != 0) r = 64'h7FF8_0000_0000_0000;
    return r;
  endfunction

  task automatic pick(input int i, output logic [63:0] x, output logic [63:0] z);
    int k;
    k = i % 10;
    x = rnd_normal(700, 1340);
    z = rnd_normal(700, 1340);
    case (k)
      0: z = {~x[63], x[62:0]};                          // exact cancellation
      1: z = {~x[63], x[62:8], 8'($urandom)};            // near cancellation
      2: z = {1'($urandom), x[62:52] - 11'($urandom % 60), 52'($urandom)};
      3: if (i % 7 == 0) z = {1'($urandom), 63'd0};      // signed zero
      4: if (i % 13 == 0) z = {1'($urandom), 11'h7FF, 52'd0}; // infinity
      5: if (i % 17 == 0) begin x = {1'b0, 11'h7FF, 52'd5}; end // NaN
      6: z = {1'($urandom), x[62:52], 52'($urandom)};   // equal exponents
      default: ;
    endcase
    if (i % 101 == 0) begin x = {1'b1, 63'd0}; z = {1'b1, 63'd0}; end
  endtask

  initial begin
    logic [63:0] ea, eb, r;
    a = '0; b = '0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        pick(i, ea, eb);
        r = reference(ea, eb);
        if (r[62:52] == 11'd0 && r[51:0] != 0) begin   // subnormal: not modelled
          eb = {1'b0, 11'd1023, 52'd0};
          r  = reference(ea, eb);
        end
        a <= ea; b <= eb;
        exp_q.push_back(r);
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && exp_q.size() > 0 && i - (LAT - 1) < N) begin
        r = exp_q.pop_front();
        checks++;
        if (y !== r) begin
          failures++;
          if (failures < 10) $display("mismatch result %0d: got %h expected %h", i - LAT + 1, y, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
