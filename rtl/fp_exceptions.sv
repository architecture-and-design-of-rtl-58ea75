// fp_exceptions: special cases, exception flags and output register of the
// generic floating point unit.
//
// Checks the operands and the rounded result for every special case and builds the
// final result:
//   - a NaN operand gives the canonical quiet NaN (sign 0, exponent all ones,
//     fraction MSB 1); a signalling NaN operand also raises invalid;
//   - infinity minus infinity (effective subtraction) and zero times infinity give
//     the quiet NaN and raise invalid;
//   - any other infinite operand gives an infinity with the result's sign;
//   - an exact zero from the subtractor is +0, or -0 when rounding down;
//   - a rounded exponent of all ones or more is an overflow: the result is infinity
//     or the largest finite number, depending on rounding mode and sign, and
//     overflow and inexact are raised;
//   - a tiny result that is also inexact raises underflow;
//   - inexact follows the rounding unit.
// Division by zero cannot occur: the unit has no divider.
//
// Timing: the result and flags are registered on an enabled clock edge where
// in_valid is high, and ready is high for that one enabled cycle. out and the flags
// then hold until the next result. enable low holds every register. reset is
// synchronous, active high, and clears out, ready and the flags.
//
// Which cases are special, and the flags overflow, underflow, inexact and invalid,
// follow IEEE 754 as the design intends; the canonical NaN, the before-rounding
// tininess and the register placement are this design's choices.
module fp_exceptions
  import fpu_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W = 1 + EXP_W + MAN_W
) (
  input  logic                    clock,
  input  logic                    reset,
  input  logic                    enable,
  input  logic                    in_valid,
  input  path_e                   path,
  input  rmode_e                  rmode,
  input  logic [W-1:0]            opA,
  input  logic [W-1:0]            opB,
  input  logic                    rnd_sign,
  input  logic signed [EXP_W+1:0] rnd_exp,
  input  logic                    rnd_lead,
  input  logic [MAN_W-1:0]        rnd_frac,
  input  logic                    rnd_inexact,
  input  logic                    rnd_tiny,
  input  logic                    rnd_zero,
  output logic [W-1:0]            out,
  output logic                    ready,
  output logic                    overflow,
  output logic                    underflow,
  output logic                    inexact,
  output logic                    invalid
);

  localparam logic [EXP_W-1:0] EXP_MAX = '1;
  localparam logic [W-1:0] QNAN = {1'b0, EXP_MAX, 1'b1, {(MAN_W-1){1'b0}}};

  logic a_nan, b_nan, a_snan, b_snan, a_inf, b_inf, a_zero, b_zero;
  logic [W-1:0] res_d;
  logic         ovf_d, unf_d, inx_d, inv_d;
  logic         to_inf;

  always_comb begin
    a_nan  = (opA[W-2 -: EXP_W] == EXP_MAX) && (opA[MAN_W-1:0] != '0);
    b_nan  = (opB[W-2 -: EXP_W] == EXP_MAX) && (opB[MAN_W-1:0] != '0);
    a_snan = a_nan && !opA[MAN_W-1];
    b_snan = b_nan && !opB[MAN_W-1];
    a_inf  = (opA[W-2 -: EXP_W] == EXP_MAX) && (opA[MAN_W-1:0] == '0);
    b_inf  = (opB[W-2 -: EXP_W] == EXP_MAX) && (opB[MAN_W-1:0] == '0);
    a_zero = (opA[W-2:0] == '0);
    b_zero = (opB[W-2:0] == '0);

    ovf_d = 1'b0;
    unf_d = 1'b0;
    inx_d = 1'b0;
    inv_d = 1'b0;
    // Overflow result: infinity unless the rounding direction points back to zero.
    unique case (rmode)
      RM_NEAREST_EVEN: to_inf = 1'b1;
      RM_UP:           to_inf = !rnd_sign;
      RM_DOWN:         to_inf = rnd_sign;
      default:         to_inf = 1'b0;
    endcase

    if (a_nan || b_nan) begin
      res_d = QNAN;
      inv_d = a_snan || b_snan;
    end else if ((path == PATH_SUB && a_inf && b_inf) ||
                 (path == PATH_MUL && ((a_inf && b_zero) || (a_zero && b_inf)))) begin
      res_d = QNAN;
      inv_d = 1'b1;
    end else if (a_inf || b_inf) begin
      res_d = {rnd_sign, EXP_MAX, {MAN_W{1'b0}}};
    end else if (rnd_zero) begin
      // Exact zero: an exact difference of equal magnitudes is +0, or -0 rounding down.
      res_d = {(path == PATH_SUB) ? (rmode == RM_DOWN) : rnd_sign, {(W-1){1'b0}}};
    end else if (rnd_lead && rnd_exp >= $signed({2'b00, EXP_MAX})) begin
      ovf_d = 1'b1;
      inx_d = 1'b1;
      res_d = to_inf ? {rnd_sign, EXP_MAX, {MAN_W{1'b0}}}
                     : {rnd_sign, EXP_MAX - 1'b1, {MAN_W{1'b1}}};
    end else begin
      inx_d = rnd_inexact;
      unf_d = rnd_tiny && rnd_inexact;
      res_d = {rnd_sign, rnd_lead ? rnd_exp[EXP_W-1:0] : {EXP_W{1'b0}}, rnd_frac};
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      out       <= '0;
      ready     <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      inexact   <= 1'b0;
      invalid   <= 1'b0;
    end else if (enable) begin
      ready <= in_valid;
      if (in_valid) begin
        out       <= res_d;
        overflow  <= ovf_d;
        underflow <= unf_d;
        inexact   <= inx_d;
        invalid   <= inv_d;
      end
    end
  end

  // A result never raises overflow and underflow together.
  assert property (@(posedge clock) disable iff (reset) !(overflow && underflow));

endmodule
