// fpu_top: generic IEEE-754 floating point unit (adder, subtractor, multiplier).
//
// One parameter, WIDTH, picks the binary interchange format: 32 (single), 64
// (double) or 128 (quadruple precision); the exponent and mantissa widths follow.
// The unit is built from a controller, three arithmetic units (adder, subtractor,
// multiplier), a rounding unit and an exception unit:
//
//   A, B, opcode, rmode -> controller -> adder | subtractor | multiplier
//                       -> rounding -> exceptions -> out, ready, flags
//
// The controller stores the operands, orders them by magnitude and picks the unit:
// an addition of operands with unlike signs, or a subtraction of operands with like
// signs, is done by the subtractor, and the other additions and subtractions by the
// adder. The units produce an unrounded result with guard, round and sticky bits;
// the rounding unit rounds it in the mode on rmode; the exception unit replaces it
// for NaN, infinity, zero and overflow cases and raises the flags overflow,
// underflow, inexact and invalid.
//
// Interface and timing: present A, B, opcode and rmode with load high on a rising
// clock edge while enable is high. Three enabled clock edges later out and the flags
// hold the result and ready is high for one cycle. A new operation may be loaded on
// every enabled edge, so the unit accepts one operation per cycle. With enable low
// every register holds its value and the pipeline stalls. reset is synchronous and
// active high. opcode: 0 add, 1 subtract, 2 multiply; rmode: 0 nearest-even, 1 up,
// 2 down, 3 toward zero.
//
// The blocks and the top-level ports follow the unit's published block diagram.
// The three-stage pipeline, the stall behaviour of enable, the code values and the
// operand delay register that lines the operands up with the unit results for the
// exception checks are this design's own choices.
module fpu_top
  import fpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned EXP_W = exp_width(WIDTH),
  localparam int unsigned MAN_W = WIDTH - 1 - EXP_W,
  localparam int unsigned SW    = MAN_W + 1 + GRS_W
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             enable,
  input  logic             load,
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [1:0]       opcode,
  input  logic [1:0]       rmode,
  output logic [WIDTH-1:0] out,
  output logic             ready,
  output logic             overflow,
  output logic             underflow,
  output logic             inexact,
  output logic             invalid
);

  // Controller outputs (stage 1 inputs).
  logic [WIDTH-1:0] intA, intB;
  path_e            path_q;
  rmode_e           rmode_q;
  logic             add_enable, sub_enable, multi_enable;

  // Unit results (stage 1 outputs).
  logic                    add_ready, sub_ready, mul_ready;
  logic                    add_sign, sub_sign, mul_sign;
  logic signed [EXP_W+1:0] add_exp, sub_exp, mul_exp;
  logic [SW-1:0]           add_sig, sub_sig, mul_sig;

  // Operands, path and rounding mode delayed to line up with the unit results.
  logic [WIDTH-1:0] opA_d, opB_d;
  path_e            path_d;
  rmode_e           rmode_d;

  // Selected intermediate result.
  logic                    unit_valid;
  logic                    sel_sign;
  logic signed [EXP_W+1:0] sel_exp;
  logic [SW-1:0]           sel_sig;

  // Rounded result.
  logic                    rnd_sign, rnd_lead, rnd_inexact, rnd_tiny, rnd_zero;
  logic signed [EXP_W+1:0] rnd_exp;
  logic [MAN_W-1:0]        rnd_frac;

  fpu_controller #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_controller (
    .clock, .reset, .enable, .load, .A, .B,
    .opcode (opcode_e'(opcode)),
    .rmode  (rmode_e'(rmode)),
    .intA, .intB, .path_q, .rmode_q,
    .add_enable, .sub_enable, .multi_enable
  );

  fp_adder #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_adder (
    .clock, .reset, .enable, .start(add_enable), .intA, .intB,
    .ready(add_ready), .res_sign(add_sign), .res_exp(add_exp), .res_sig(add_sig)
  );

  fp_subtractor #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_subtractor (
    .clock, .reset, .enable, .start(sub_enable), .intA, .intB,
    .ready(sub_ready), .res_sign(sub_sign), .res_exp(sub_exp), .res_sig(sub_sig)
  );

  fp_multiplier #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_multiplier (
    .clock, .reset, .enable, .start(multi_enable), .intA, .intB,
    .ready(mul_ready), .res_sign(mul_sign), .res_exp(mul_exp), .res_sig(mul_sig)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      opA_d   <= '0;
      opB_d   <= '0;
      path_d  <= PATH_NONE;
      rmode_d <= RM_NEAREST_EVEN;
    end else if (enable && (add_enable || sub_enable || multi_enable)) begin
      opA_d   <= intA;
      opB_d   <= intB;
      path_d  <= path_q;
      rmode_d <= rmode_q;
    end
  end

  always_comb begin
    unit_valid = add_ready || sub_ready || mul_ready;
    unique case (path_d)
      PATH_ADD: begin sel_sign = add_sign; sel_exp = add_exp; sel_sig = add_sig; end
      PATH_SUB: begin sel_sign = sub_sign; sel_exp = sub_exp; sel_sig = sub_sig; end
      default:  begin sel_sign = mul_sign; sel_exp = mul_exp; sel_sig = mul_sig; end
    endcase
  end

  fp_rounding #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_rounding (
    .rmode    (rmode_d),
    .in_sign  (sel_sign),
    .in_exp   (sel_exp),
    .in_sig   (sel_sig),
    .out_sign (rnd_sign),
    .out_exp  (rnd_exp),
    .out_lead (rnd_lead),
    .out_frac (rnd_frac),
    .inexact  (rnd_inexact),
    .tiny     (rnd_tiny),
    .zero     (rnd_zero)
  );

  fp_exceptions #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_exceptions (
    .clock, .reset, .enable,
    .in_valid (unit_valid),
    .path     (path_d),
    .rmode    (rmode_d),
    .opA      (opA_d),
    .opB      (opB_d),
    .rnd_sign, .rnd_exp, .rnd_lead, .rnd_frac, .rnd_inexact, .rnd_tiny, .rnd_zero,
    .out, .ready, .overflow, .underflow, .inexact, .invalid
  );

  // The three units never finish in the same cycle.
  assert property (@(posedge clock) disable iff (reset)
                   $onehot0({add_ready, sub_ready, mul_ready}));

endmodule
