// tb_fp_multiplier: self-checking testbench of the single-precision multiplier.
//
// Drives operand pairs as the controller would, one operation every other cycle,
// with some cycles of enable low in between. Checks that ready rises exactly one
// enabled cycle after start and only then, that the intermediate result is
// normalized, and that rounding it in each of the four modes gives the same
// result and flags as the exact reference model in fp_ref_pkg. A few directed
// cases with hand-worked single-precision results are checked as well.
module tb_fp_multiplier;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 1 + EXP_W + MAN_W;
  localparam int SW    = MAN_W + 1 + GRS_W;
  localparam int N     = 20000;
  typedef fp_ref #(EXP_W, MAN_W) ref_t;

  logic                    clock = 1'b0;
  logic                    reset = 1'b1;
  logic                    enable = 1'b0;
  logic                    start = 1'b0;
  logic [W-1:0]            intA = '0, intB = '0;
  logic                    ready, res_sign;
  logic signed [EXP_W+1:0] res_exp;
  logic [SW-1:0]           res_sig;
  int checks = 0, failures = 0, stalls = 0;

  fp_multiplier dut (
    .clock, .reset, .enable, .start, .intA, .intB, .ready, .res_sign, .res_exp, .res_sig
  );

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (20 * N + 1000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: A=%h B=%h", what, intA, intB);
    end
  endtask

  // Apply one operation and check its result. 'want' is a hand-worked
  // round-to-nearest result, or 0 to skip that check.
  task automatic run_one(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] want);
    ref_result_t r;
    @(negedge clock);
    intA  = a;
    intB  = b;
    start = 1'b1;
    if ($urandom % 8 == 0) begin
      // Stall: start is held but enable is low, so nothing may happen.
      enable = 1'b0;
      @(negedge clock);
      check(!ready, "ready during stall");
      stalls++;
      enable = 1'b1;
    end
    @(negedge clock);
    start = 1'b0;
    check(ready, "ready one cycle after start");
    check(res_sig[SW-1] || res_sig == '0,
          "normalized");
    check(ref_t::check_intermediate(res_sign, int'(res_exp), big_t'(res_sig), 128'(a), 128'(b),
                                    2) == 0, "rounds like the reference");
    if (want != '0) begin
      r = ref_t::round_exact(res_sign, big_t'(res_sig), int'(res_exp) - ref_t::BIAS - MAN_W - 3, 0);
      check(r.bits[W-1:0] == want, "hand-worked result");
    end
    @(negedge clock);
    check(!ready, "ready is a single-cycle pulse");
  endtask

  initial begin
    logic [W-1:0] a, b, t;
    repeat (2) @(negedge clock);
    reset  = 1'b0;
    enable = 1'b1;
      run_one(32'h3FC00000, 32'h40100000, 32'h40580000); // 1.5 * 2.25 = 3.375
      run_one(32'hC0000000, 32'h40400000, 32'hC0C00000); // -2 * 3 = -6 (sign XOR)
      run_one(32'h00000001, 32'h4B000000, 32'h00800000); // least subnormal * 2^23 = 2^-149 * 2^23 = 2^-126
      run_one(32'h3F800001, 32'h3F800001, 32'h3F800002); // (1+u)^2 rounds to 1+2u
    for (int i = 0; i < N; i++) begin
      a = W'(ref_t::rand_finite(1 + int'($urandom % 254)));
      b = W'(ref_t::rand_finite(ref_t::expf(128'(a))));
      // Multiplier operands are used as they are.
      run_one(a, b, '0);
    end
    check(stalls > 0, "a stall was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
