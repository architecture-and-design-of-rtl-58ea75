// tb_fpu_controller: self-checking testbench of the single-precision controller.
//
// Loads random operand pairs with random opcodes and rounding modes and checks,
// one enabled cycle later: that exactly the expected unit enable is high (adder
// for like effective signs, subtractor for unlike ones, multiplier for opcode 2)
// and only for one cycle; that the rounding mode was stored; that intA is the
// operand of larger magnitude; that for a multiplication the operands pass
// unchanged; and that adding or subtracting the magnitudes of intA and intB with
// the sign of intA gives, in every rounding mode, exactly the result the reference
// model gives for A op B. Cycles with enable low must change nothing.
module tb_fpu_controller;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 32;
  localparam int N     = 20000;
  typedef fp_ref #(EXP_W, MAN_W) ref_t;

  logic clock = 1'b0, reset = 1'b1, enable = 1'b0, load = 1'b0;
  logic [W-1:0] A = '0, B = '0;
  opcode_e opcode = OP_ADD;
  rmode_e  rmode = RM_NEAREST_EVEN;
  logic [W-1:0] intA, intB;
  path_e  path_q;
  rmode_e rmode_q;
  logic add_enable, sub_enable, multi_enable;
  int checks = 0, failures = 0;
  int n_add_to_sub = 0, n_sub_to_add = 0, n_swap = 0, n_stall = 0;

  fpu_controller dut (.*);

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
        $display("FAIL %s: op=%0d A=%h B=%h intA=%h intB=%h en=%b%b%b", what, opcode, A, B,
                 intA, intB, add_enable, sub_enable, multi_enable);
    end
  endtask

  initial begin
    bit like_signs, want_add, want_sub, want_mul;
    logic [W-1:0] hold_a;
    int bad;
    repeat (2) @(negedge clock);
    reset  = 1'b0;
    enable = 1'b1;
    for (int i = 0; i < N; i++) begin
      A      = W'(ref_t::rand_any(1 + int'($urandom % 254)));
      B      = W'(ref_t::rand_any(ref_t::expf(128'(A))));
      opcode = opcode_e'($urandom % 3);
      rmode  = rmode_e'($urandom % 4);
      load   = 1'b1;
      like_signs = (A[W-1] == B[W-1]);
      want_mul = (opcode == OP_MUL);
      want_add = !want_mul && (like_signs == (opcode == OP_ADD));
      want_sub = !want_mul && !want_add;
      if (opcode == OP_ADD && !like_signs) n_add_to_sub++;
      if (opcode == OP_SUB && !like_signs) n_sub_to_add++;
      if (!want_mul && B[W-2:0] > A[W-2:0]) n_swap++;
      if ($urandom % 8 == 0) begin
        hold_a = intA;
        enable = 1'b0;
        @(negedge clock);
        check(intA == hold_a && !add_enable && !sub_enable && !multi_enable, "stall holds");
        n_stall++;
        enable = 1'b1;
      end
      @(negedge clock);
      load = 1'b0;
      check({add_enable, sub_enable, multi_enable} == {want_add, want_sub, want_mul}, "unit enable");
      check(rmode_q == rmode, "rounding mode stored");
      if (want_mul) begin
        check(intA == A && intB == B && path_q == PATH_MUL, "multiply operands unchanged");
      end else begin
        check(intA[W-2:0] >= intB[W-2:0], "larger magnitude in intA");
        check({intA[W-2:0], intB[W-2:0]} == {A[W-2:0], B[W-2:0]} ||
              {intA[W-2:0], intB[W-2:0]} == {B[W-2:0], A[W-2:0]}, "operands kept");
        bad = 0;
        for (int rm = 0; rm < 4; rm++) begin
          // The units combine magnitudes and give the result intA's sign.
          if (ref_t::compute(128'(intA), 128'({want_add ? intA[W-1] : ~intA[W-1], intB[W-2:0]}),
                             0, rm)
              != ref_t::compute(128'(A), 128'(B), int'(opcode), rm)) bad++;
        end
        check(bad == 0, "routing and sign preserve the operation");
      end
      @(negedge clock);
      check(!add_enable && !sub_enable && !multi_enable, "enables are one-cycle pulses");
    end
    check(n_add_to_sub > 0 && n_sub_to_add > 0 && n_swap > 0 && n_stall > 0, "all routings seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
