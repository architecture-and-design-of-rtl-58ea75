// tb_fp_rounding: self-checking testbench of the single-precision rounding unit.
//
// Feeds random intermediate results - exponents from far below the subnormal range
// to above the overflow limit, significands with random guard, round and sticky
// bits, and unnormalized significands at exponent 1 - in all four rounding modes,
// and compares the rounded sign, exponent field, fraction, inexact and
// tininess-based underflow with the exact-integer reference rounding of
// fp_ref_pkg. Results the reference reports as overflow are checked only for a
// rounded exponent at or above the all-ones exponent. Directed ties check
// ties-to-even and the directed modes by hand-worked values.
module tb_fp_rounding;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 1 + EXP_W + MAN_W;
  localparam int SW    = MAN_W + 1 + GRS_W;
  localparam int N     = 100000;
  typedef fp_ref #(EXP_W, MAN_W) ref_t;

  rmode_e                  rmode;
  logic                    in_sign;
  logic signed [EXP_W+1:0] in_exp;
  logic [SW-1:0]           in_sig;
  logic                    out_sign, out_lead, inexact, tiny, zero;
  logic signed [EXP_W+1:0] out_exp;
  logic [MAN_W-1:0]        out_frac;
  int checks = 0, failures = 0;

  fp_rounding dut (.*);

  initial begin : watchdog
    #(10 * N + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: rm=%0d s=%b e=%0d sig=%h", what, rmode, in_sign, in_exp, in_sig);
    end
  endtask

  function automatic logic [W-1:0] packed_out();
    return {out_sign, out_lead ? out_exp[EXP_W-1:0] : {EXP_W{1'b0}}, out_frac};
  endfunction

  task automatic run_one(input logic s, input int e, input logic [SW-1:0] sig, input int rm);
    ref_result_t r;
    in_sign = s;
    in_exp  = (EXP_W + 2)'(e);
    in_sig  = sig;
    rmode   = rmode_e'(rm);
    #1;
    check(zero == (sig == '0), "zero flag");
    if (sig == '0) return;
    r = ref_t::round_exact(s, big_t'(sig), e - ref_t::BIAS - MAN_W - 3, rm);
    if (r.overflow) begin
      check(out_lead && out_exp >= ref_t::EMAX, "overflow exponent");
    end else begin
      check(packed_out() == r.bits[W-1:0], "rounded value");
      check(inexact == r.inexact, "inexact");
      check((tiny && inexact) == r.underflow, "underflow");
    end
  endtask

  initial begin
    logic [SW-1:0] sig;
    int e;
    // 1 + 2^-24 (a tie) rounds to even 1.0; 1 + 3*2^-24 (tie) rounds up to 1 + 2^-22.
    run_one(0, 127, {1'b1, 23'd0, 3'b100}, 0);
    check(packed_out() == 32'h3F800000 && inexact, "tie to even, down");
    run_one(0, 127, {1'b1, 23'd1, 3'b100}, 0);
    check(packed_out() == 32'h3F800002, "tie to even, up");
    run_one(1, 127, {1'b1, 23'd0, 3'b001}, 1);
    check(packed_out() == 32'hBF800000, "negative value rounded up is truncated");
    run_one(1, 127, {1'b1, 23'd0, 3'b001}, 2);
    check(packed_out() == 32'hBF800001, "negative value rounded down grows");
    run_one(0, 127, {1'b1, 23'h7FFFFF, 3'b111}, 3);
    check(packed_out() == 32'h3FFFFFFF, "toward zero truncates");
    run_one(0, 127, {1'b1, 23'h7FFFFF, 3'b100}, 0);
    check(packed_out() == 32'h40000000 && out_exp == 128, "carry out of rounding");
    run_one(0, 0, {1'b1, 23'd0, 3'b000}, 0);
    check(packed_out() == 32'h00400000 && tiny && !inexact, "exact subnormal");

    for (int i = 0; i < N; i++) begin
      sig = {$urandom, $urandom};
      case ($urandom % 4)
        0: e = int'($urandom % 40) - 38;     // deep subnormal range and below
        1: e = 1;                            // subnormal, possibly unnormalized
        2: e = 250 + int'($urandom % 8);     // around overflow
        default: e = 1 + int'($urandom % 254);
      endcase
      if (e != 1) sig[SW-1] = 1'b1;
      if ($urandom % 4 == 0) sig[GRS_W-1:0] = 3'b100;  // exact ties
      run_one(1'($urandom), e, sig, int'($urandom % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
