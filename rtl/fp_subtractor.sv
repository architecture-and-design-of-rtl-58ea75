// fp_subtractor: magnitude subtractor of the generic floating point unit.
//
// Computes |intA| - |intB|; the controller guarantees |intA| >= |intB| and sets the
// sign of intA to the sign of the result, which is passed on (the sign bit of intB
// is not used). As in the adder the
// exponent difference sets the right shift of the smaller significand, which keeps
// guard, round and sticky bits. The shifted significand is subtracted from the
// larger one and the difference is normalized by a left shift of its leading zeros,
// decrementing the exponent - the "underflow" of the significand that the adder's
// carry mirrors. The left shift stops at exponent 1 so that results below the
// normal range come out already in subnormal form. An exact zero difference
// gives a zero significand.
//
// Output format, timing and handshake are those of fp_adder: one cycle, inputs
// used on an enabled edge with start high, ready high for one enabled cycle.
//
// The block structure follows the subtractor's block diagram; the leading-zero
// count, its limit at exponent 1 and the guard bits are this design's choices.
module fp_subtractor
  import fpu_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W  = 1 + EXP_W + MAN_W,
  localparam int unsigned SW = MAN_W + 1 + GRS_W
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

  logic [EXP_W-1:0] e1, e2, e1_eff, e2_eff, diff;
  logic [MAN_W:0]   sig1, sig2;
  logic [SW-1:0]    sig2_aligned;
  logic [SW-1:0]    delta;
  logic [EXP_W-1:0] lz;
  logic [EXP_W-1:0] shift;
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
    delta = {sig1, {GRS_W{1'b0}}} - sig2_aligned;

    // Leading-zero count of the difference (SW when it is zero).
    lz = EXP_W'(SW);
    for (int i = 0; i < SW; i++) begin
      if (delta[i]) lz = EXP_W'(SW - 1 - i);
    end

    // Normalize, but never below exponent 1 (the subnormal range).
    shift    = (lz < e1_eff - 1'b1) ? lz : e1_eff - 1'b1;
    norm_sig = delta << shift;
    norm_exp = (EXP_W + 2)'(e1_eff - shift);
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
