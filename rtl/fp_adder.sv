// fp_adder: magnitude adder of the generic floating point unit.
//
// Adds the magnitudes of intA and intB; signs are not looked at, except that the
// sign of intA (set by the controller to the sign of the result) is passed on;
// the sign bit of intB is not used.
// The controller guarantees |intA| >= |intB|. The operands are split into sign,
// exponent and mantissa; the exponent difference e1 - e2 sets how far the smaller
// significand (with its hidden bit) is shifted right, the two significands are added
// and a carry out is normalized by one right shift and an exponent increment.
// Subnormal operands (exponent field 0) take exponent 1 and hidden bit 0.
//
// The intermediate result is sign, a signed exponent (biased) and a significand of
// MAN_W+1 bits followed by guard, round and sticky bits, leading bit at the top.
// A subnormal sum keeps exponent 1 with a leading 0.
//
// Timing: one cycle. The inputs are used on an enabled clock edge with start high;
// the result and ready are registered and ready is high for one enabled cycle.
// enable low holds everything. reset is synchronous, active high.
//
// The split into fields, the subtract / shift / add structure and the normalizer
// follow the block diagram of the adder; the guard, round and sticky bits are this
// design's way of keeping what the rounding unit needs.
module fp_adder
  import fpu_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W  = 1 + EXP_W + MAN_W,
  localparam int unsigned SW = MAN_W + 1 + GRS_W
) (
  input  logic                   clock,
  input  logic                   reset,
  input  logic                   enable,
  input  logic                   start,
  input  logic [W-1:0]           intA,
  input  logic [W-1:0]           intB,
  output logic                   ready,
  output logic                   res_sign,
  output logic signed [EXP_W+1:0] res_exp,
  output logic [SW-1:0]          res_sig
);

  logic [EXP_W-1:0] e1, e2, e1_eff, e2_eff, diff;
  logic [MAN_W:0]   sig1, sig2;
  logic [SW-1:0]    sig2_aligned;
  logic [SW:0]      sum;
  logic [SW-1:0]    norm_sig;
  logic [EXP_W+1:0] norm_exp;

  always_comb begin
    e1     = intA[W-2 -: EXP_W];
    e2     = intB[W-2 -: EXP_W];
    e1_eff = (e1 == '0) ? EXP_W'(1) : e1;
    e2_eff = (e2 == '0) ? EXP_W'(1) : e2;
    sig1   = {e1 != '0, intA[MAN_W-1:0]};
    sig2   = {e2 != '0, intB[MAN_W-1:0]};
    diff   = e1_eff - e2_eff;
  end

  fp_rshift_sticky #(.WIDTH(SW), .SHW(EXP_W)) u_align (
    .in     ({sig2, {GRS_W{1'b0}}}),
    .amount (diff),
    .out    (sig2_aligned)
  );

  always_comb begin
    sum = {1'b0, sig1, {GRS_W{1'b0}}} + {1'b0, sig2_aligned};
    if (sum[SW]) begin
      // Carry out: shift right once, keeping the dropped bit in the sticky.
      norm_sig = {sum[SW:2], sum[1] | sum[0]};
      norm_exp = (EXP_W + 2)'(e1_eff) + 1'b1;
    end else begin
      norm_sig = sum[SW-1:0];
      norm_exp = (EXP_W + 2)'(e1_eff);
    end
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
        res_sign <= intA[W-1];
        res_exp  <= norm_exp;
        res_sig  <= norm_sig;
      end
    end
  end

endmodule
