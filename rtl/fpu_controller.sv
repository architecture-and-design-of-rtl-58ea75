// fpu_controller: operand registers and unit selection of the floating point unit.
//
// On a clock edge with enable and load high the controller stores operands A and B
// in its two operand registers (sign, exponent and mantissa fields s1/e1/m1 and
// s2/e2/m2) and raises exactly one of add_enable, sub_enable or multi_enable for the
// next cycle. For addition and subtraction it works out the effective operation from
// the opcode and the two signs: an addition of operands with different signs goes to
// the subtractor, and a subtraction of operands with different signs goes to the
// adder, with the signs adjusted so that intA always carries the sign of the result.
// It also orders the operands so that intA holds the operand of larger magnitude and
// intB the smaller one, which is what the adder and subtractor expect. For
// multiplication the operands pass unchanged.
//
// Interface: A, B, opcode and rmode are sampled when enable && load. intA, intB,
// path_q and rmode_q hold the last accepted operation. The *_enable outputs are high
// for one enabled cycle after the operation was accepted. When enable is low every
// register holds its value, so the whole unit stalls. reset is synchronous and
// active high.
//
// The register contents, the routing rule and the three enable outputs follow the
// block diagram of the controller; the magnitude ordering is done here because the
// adder description says the larger operand reaches the larger field "because of the
// controlling from controller module". Encodings, reset and stall behaviour are this
// design's own choices.
module fpu_controller
  import fpu_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W = 1 + EXP_W + MAN_W
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         enable,
  input  logic         load,
  input  logic [W-1:0] A,
  input  logic [W-1:0] B,
  input  opcode_e      opcode,
  input  rmode_e       rmode,
  output logic [W-1:0] intA,
  output logic [W-1:0] intB,
  output path_e        path_q,
  output rmode_e       rmode_q,
  output logic         add_enable,
  output logic         sub_enable,
  output logic         multi_enable
);

  logic         sA, sB_eff;
  logic [W-2:0] magA, magB;
  logic         a_ge_b;
  logic         s_res;
  path_e        path_d;
  logic [W-1:0] intA_d, intB_d;

  always_comb begin
    sA     = A[W-1];
    magA   = A[W-2:0];
    magB   = B[W-2:0];
    // Subtraction is addition of B with its sign inverted.
    sB_eff = (opcode == OP_SUB) ? ~B[W-1] : B[W-1];
    // Exponent and mantissa fields together order magnitudes as unsigned integers.
    a_ge_b = (magA >= magB);
    s_res  = a_ge_b ? sA : sB_eff;

    if (opcode == OP_MUL) begin
      path_d = PATH_MUL;
      intA_d = A;
      intB_d = B;
    end else begin
      path_d = (sA == sB_eff) ? PATH_ADD : PATH_SUB;
      if (a_ge_b) begin
        intA_d = {s_res, magA};
        intB_d = {sB_eff, magB};
      end else begin
        intA_d = {s_res, magB};
        intB_d = {sA, magA};
      end
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      intA         <= '0;
      intB         <= '0;
      path_q       <= PATH_NONE;
      rmode_q      <= RM_NEAREST_EVEN;
      add_enable   <= 1'b0;
      sub_enable   <= 1'b0;
      multi_enable <= 1'b0;
    end else if (enable) begin
      add_enable   <= load && (path_d == PATH_ADD);
      sub_enable   <= load && (path_d == PATH_SUB);
      multi_enable <= load && (path_d == PATH_MUL);
      if (load) begin
        intA    <= intA_d;
        intB    <= intB_d;
        path_q  <= path_d;
        rmode_q <= rmode;
      end
    end
  end

  // At most one datapath unit is started per operation.
  assert property (@(posedge clock) disable iff (reset)
                   $onehot0({add_enable, sub_enable, multi_enable}));

endmodule
