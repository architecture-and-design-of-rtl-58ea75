// fp_multiplier: multiplier of the generic floating point unit.
//
// The operands are split into sign, exponent and mantissa. Each mantissa is joined
// with its leading bit (1 for a normal number, 0 for a subnormal one, whose exponent
// then counts as 1) to form the two significand registers' contents. The result sign
// is the XOR of the operand signs; the result exponent is the sum of the operand
// exponents minus the bias; the significands are multiplied into a double-length
// product. The normalizer shifts the product left until its leading 1 is at the top
// and corrects the exponent, then keeps the top MAN_W+1 bits plus guard, round and
// sticky bits for rounding. The exponent is signed and may fall below 1 or rise above
// the format's range; the rounding and exception units deal with that. A zero
// operand gives a zero significand.
//
// Output format, timing and handshake are those of fp_adder: one cycle, inputs used
// on an enabled edge with start high, ready high for one enabled cycle.
//
// Sign XOR, exponent add, bias subtraction, significand product and normalizer follow
// the multiplier's block diagram; the single-cycle product and the guard bits are
// this design's choices.
module fp_multiplier
  import fpu_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W    = 1 + EXP_W + MAN_W,
  localparam int unsigned P    = MAN_W + 1,
  localparam int unsigned SW   = P + GRS_W,
  localparam int unsigned BIAS = (1 << (EXP_W - 1)) - 1
) (
  input  logic                    clock,
  input  logic                    reset,
  input  logic                    enable,
  input  logic                    start,
  input  logic [W-1:0]            intA,
  input  logic [W-1:0]            intB,
  output logic                    ready,
  output logic                    res_sign,
  output logic signed [EXP_W+1:0] res_exp,
  output logic [SW-1:0]           res_sig
);

  logic [EXP_W-1:0]        e1, e2, e1_eff, e2_eff;
  logic [P-1:0]            sig1, sig2;
  logic [2*P-1:0]          product;
  logic [2*P-1:0]          norm;
  logic [EXP_W:0]          lz;
  logic signed [EXP_W+1:0] exp_sum;
  logic signed [EXP_W+1:0] norm_exp;
  logic [SW-1:0]           norm_sig;
  logic                    sign;

  always_comb begin
    e1      = intA[W-2 -: EXP_W];
    e2      = intB[W-2 -: EXP_W];
    e1_eff  = (e1 == '0) ? EXP_W'(1) : e1;
    e2_eff  = (e2 == '0) ? EXP_W'(1) : e2;
    sig1    = {e1 != '0, intA[MAN_W-1:0]};
    sig2    = {e2 != '0, intB[MAN_W-1:0]};
    sign    = intA[W-1] ^ intB[W-1];
    // Biased exponent of the product, for a leading 1 one place below the top.
    exp_sum = $signed((EXP_W + 2)'(e1_eff)) + $signed((EXP_W + 2)'(e2_eff))
            - $signed((EXP_W + 2)'(BIAS));
    product = sig1 * sig2;

    // Leading-zero count of the product (2P when it is zero).
    lz = (EXP_W + 1)'(2 * P);
    for (int i = 0; i < 2 * P; i++) begin
      if (product[i]) lz = (EXP_W + 1)'(2 * P - 1 - i);
    end

    norm     = product << lz;
    norm_sig = {norm[2*P-1 -: P+GRS_W-1], |norm[P-GRS_W:0]};
    norm_exp = exp_sum + 1 - $signed((EXP_W + 2)'(lz));
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      ready    <= 1'b0;
      res_sign <= 1'b0;
      res_exp  <= '0;
      res_sig  <= '0;
    end else if (enable) begin
      ready <= start;
      if (start) begin
        res_sign <= sign;
        res_exp  <= norm_exp;
        res_sig  <= norm_sig;
      end
    end
  end

endmodule
