// fp_rounding: rounding unit of the generic floating point unit.
//
// Takes the intermediate result of the adder, subtractor or multiplier - sign,
// signed biased exponent, and a significand of MAN_W+1 bits with guard, round and
// sticky bits below it - and rounds it to MAN_W fraction bits in the rounding mode
// chosen by the user:
//   round to nearest, ties to even; round up (toward +inf); round down (toward -inf);
//   round toward zero.
// A result whose exponent is below 1 is first shifted right into subnormal form
// (exponent 1, leading bit 0), with the shifted-out bits folded into the sticky bit.
// A carry out of the rounding increment shifts the significand and bumps the
// exponent; a subnormal that rounds up into the normal range simply gets its
// leading bit set.
//
// Outputs: the rounded sign, exponent (still signed and unbounded above, so the
// exception unit can see overflow), fraction and leading bit (0 only for
// subnormals and zero); inexact when any guard bit was set; tiny when the result was
// below the normal range before rounding; zero when the input significand was an
// exact zero. Purely combinational.
//
// The four rounding modes are the IEEE ones the design supports; tininess is
// detected before rounding, one of the two choices IEEE 754 allows.
module fp_rounding
  import fpu_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned P  = MAN_W + 1,
  localparam int unsigned SW = P + GRS_W
) (
  input  rmode_e                  rmode,
  input  logic                    in_sign,
  input  logic signed [EXP_W+1:0] in_exp,
  input  logic [SW-1:0]           in_sig,
  output logic                    out_sign,
  output logic signed [EXP_W+1:0] out_exp,
  output logic                    out_lead,
  output logic [MAN_W-1:0]        out_frac,
  output logic                    inexact,
  output logic                    tiny,
  output logic                    zero
);

  logic [EXP_W+1:0]        denorm_amount;
  logic [SW-1:0]           denorm_sig;
  logic [SW-1:0]           sig;
  logic signed [EXP_W+1:0] exp_d;
  logic                    lsb, guard, rest;
  logic                    round_up;
  logic [P:0]              rounded;

  // 1 - in_exp, used only when in_exp < 1.
  assign denorm_amount = (EXP_W + 2)'(1) - in_exp;

  fp_rshift_sticky #(.WIDTH(SW), .SHW(EXP_W + 2)) u_denorm (
    .in     (in_sig),
    .amount (denorm_amount),
    .out    (denorm_sig)
  );

  always_comb begin
    if (in_exp < 1) begin
      sig   = denorm_sig;
      exp_d = 1;
    end else begin
      sig   = in_sig;
      exp_d = in_exp;
    end

    zero  = (in_sig == '0);
    tiny  = !sig[SW-1] && !zero;
    lsb   = sig[GRS_W];
    guard = sig[GRS_W-1];
    rest  = |sig[GRS_W-2:0];
    inexact = guard | rest;

    unique case (rmode)
      RM_NEAREST_EVEN: round_up = guard & (rest | lsb);
      RM_UP:           round_up = inexact & ~in_sign;
      RM_DOWN:         round_up = inexact & in_sign;
      default:         round_up = 1'b0;
    endcase

    rounded = {1'b0, sig[SW-1:GRS_W]} + (P + 1)'(round_up);
    out_sign = in_sign;
    if (rounded[P]) begin
      // Carry out: the significand became 10.00..0; renormalize.
      out_exp  = exp_d + 1;
      out_lead = 1'b1;
      out_frac = rounded[P-1:1];
    end else begin
      out_exp  = exp_d;
      out_lead = rounded[P-1];
      out_frac = rounded[P-2:0];
    end
  end

endmodule
