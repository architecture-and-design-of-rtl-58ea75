// tb_fp_exceptions: self-checking testbench of the single-precision exception unit.
//
// Drives operand pairs of every class (zero, subnormal, normal, infinity, quiet and
// signalling NaN) on each datapath, together with a rounded result of a chosen kind
// (normal, subnormal, exact zero, overflowing exponent) in each rounding mode, and
// compares out and the four flags with values worked out by hand-written IEEE 754
// rules below using the single-precision constants. Also checks that the result is
// registered - ready one enabled cycle after in_valid, for one cycle - and that
// out holds while enable is low.
module tb_fp_exceptions;
  import fpu_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 32;
  localparam int N     = 20000;

  localparam logic [31:0] QNAN   = 32'h7FC00000;
  localparam logic [31:0] PINF   = 32'h7F800000;
  localparam logic [31:0] MAXFIN = 32'h7F7FFFFF;

  logic clock = 1'b0, reset = 1'b1, enable = 1'b0, in_valid = 1'b0;
  path_e path = PATH_ADD;
  rmode_e rmode = RM_NEAREST_EVEN;
  logic [W-1:0] opA = '0, opB = '0;
  logic rnd_sign = 1'b0, rnd_lead = 1'b0, rnd_inexact = 1'b0, rnd_tiny = 1'b0, rnd_zero = 1'b0;
  logic signed [EXP_W+1:0] rnd_exp = '0;
  logic [MAN_W-1:0] rnd_frac = '0;
  logic [W-1:0] out;
  logic ready, overflow, underflow, inexact, invalid;
  int checks = 0, failures = 0;
  int seen_nan = 0, seen_invalid = 0, seen_inf = 0, seen_ovf = 0, seen_unf = 0, seen_zero = 0;

  fp_exceptions dut (.*);

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (4 * N + 1000) @(posedge clock);
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
        $display("FAIL %s: path=%0d rm=%0d A=%h B=%h out=%h flags=%b%b%b%b", what, path, rmode,
                 opA, opB, out, overflow, underflow, inexact, invalid);
    end
  endtask

  function automatic logic [31:0] rand_class(input int k);
    logic [31:0] r = {1'($urandom), 31'($urandom)};
    case (k)
      0: r[30:0] = '0;                                    // zero
      1: r[30:23] = 8'h00;                                // subnormal (or zero)
      2: r[30:0] = 31'h7F800000;                          // infinity
      3: begin r[30:22] = 9'h1FF; end                     // quiet NaN
      4: begin r[30:22] = 9'h1FE; r[0] = 1'b1; end        // signalling NaN
      default: r[30:23] = 8'd1 + 8'($urandom % 254);      // normal
    endcase
    return r;
  endfunction

  initial begin
    logic [31:0] want;
    bit w_ovf, w_unf, w_inx, w_inv;
    bit a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, snan;
    int kind;
    repeat (2) @(negedge clock);
    reset  = 1'b0;
    enable = 1'b1;
    for (int i = 0; i < N; i++) begin
      opA   = rand_class(int'($urandom % 8));
      opB   = rand_class(int'($urandom % 8));
      path  = path_e'(1 + $urandom % 3);
      rmode = rmode_e'($urandom % 4);
      kind  = int'($urandom % 4);
      rnd_sign    = 1'($urandom);
      rnd_frac    = 23'($urandom);
      rnd_inexact = 1'($urandom);
      rnd_zero    = (kind == 2);
      rnd_lead    = (kind != 1) && (kind != 2);
      rnd_tiny    = (kind == 1);
      rnd_exp     = (kind == 3) ? 10'(255 + $urandom % 3) : (kind == 0) ? 10'(1 + $urandom % 254) : 10'd1;
      if (kind == 2) begin rnd_frac = '0; rnd_inexact = 1'b0; end
      in_valid = 1'b1;

      // Expected result, by the IEEE 754 rules.
      a_nan  = opA[30:23] == 8'hFF && opA[22:0] != 0;
      b_nan  = opB[30:23] == 8'hFF && opB[22:0] != 0;
      a_inf  = opA[30:0] == 31'h7F800000;
      b_inf  = opB[30:0] == 31'h7F800000;
      a_zero = opA[30:0] == 0;
      b_zero = opB[30:0] == 0;
      snan   = (a_nan && !opA[22]) || (b_nan && !opB[22]);
      w_ovf = 0; w_unf = 0; w_inx = 0; w_inv = 0;
      if (a_nan || b_nan) begin
        want = QNAN; w_inv = snan; seen_nan++;
      end else if ((path == PATH_SUB && a_inf && b_inf) ||
                   (path == PATH_MUL && ((a_inf && b_zero) || (b_inf && a_zero)))) begin
        want = QNAN; w_inv = 1; seen_invalid++;
      end else if (a_inf || b_inf) begin
        want = PINF | {rnd_sign, 31'd0}; seen_inf++;
      end else if (kind == 2) begin
        want = {path == PATH_SUB ? rmode == RM_DOWN : rnd_sign, 31'd0}; seen_zero++;
      end else if (kind == 3) begin
        w_ovf = 1; w_inx = 1; seen_ovf++;
        if (rmode == RM_ZERO || (rmode == RM_UP && rnd_sign) || (rmode == RM_DOWN && !rnd_sign))
          want = MAXFIN | {rnd_sign, 31'd0};
        else
          want = PINF | {rnd_sign, 31'd0};
      end else begin
        want  = {rnd_sign, kind == 1 ? 8'd0 : rnd_exp[7:0], rnd_frac};
        w_inx = rnd_inexact;
        w_unf = rnd_tiny && rnd_inexact;
        if (w_unf) seen_unf++;
      end

      if ($urandom % 8 == 0) begin
        enable = 1'b0;
        @(negedge clock);
        check(!ready, "no result while stalled");
        enable = 1'b1;
      end
      @(negedge clock);
      in_valid = 1'b0;
      check(ready, "ready one cycle after in_valid");
      check(out == want, "result");
      check({overflow, underflow, inexact, invalid} == {w_ovf, w_unf, w_inx, w_inv}, "flags");
      opA = ~opA;
      @(negedge clock);
      check(!ready && out == want, "ready is a pulse and out holds");
    end
    check(seen_nan > 0 && seen_invalid > 0 && seen_inf > 0 && seen_ovf > 0 && seen_unf > 0
          && seen_zero > 0, "every special case was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
