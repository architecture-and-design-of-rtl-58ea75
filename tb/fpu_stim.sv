// fpu_stim: stimulus and checker for a whole fpu_top of a given WIDTH.
//
// After a reset it issues NOPS operations, the first of them hand-derived vectors
// (exact sums and products, ties, signed zeros, overflow, underflow to zero, the
// subnormal boundary, invalid operations) whose results are written out in the
// format's fields and checked against the reference model too. It loads a new
// operation on most cycles, so operations follow each other back to back, and now
// and then drops enable to stall the pipeline. Operands are drawn from every class - zeros, subnormals,
// normals near each other and at the ends of the exponent range, infinities,
// quiet and signalling NaNs - with a share of equal and opposite operand pairs.
// Each accepted operation's expected result and flags come from the exact
// reference model of fp_ref_pkg and wait in a queue. After every enabled clock
// edge the checker expects ready exactly when an operation was accepted three
// enabled edges before (the unit's latency) and then compares out and the four
// flags. It counts how often each mechanism of the unit happened and reports a
// failure for any that never did.
module fpu_stim
  import fp_ref_pkg::*;
#(
  parameter int WIDTH = 32,
  parameter int NOPS  = 2000
) (
  input  logic             clock,
  output logic             reset,
  output logic             enable,
  output logic             load,
  output logic [WIDTH-1:0] A,
  output logic [WIDTH-1:0] B,
  output logic [1:0]       opcode,
  output logic [1:0]       rmode,
  input  logic [WIDTH-1:0] out,
  input  logic             ready,
  input  logic             overflow,
  input  logic             underflow,
  input  logic             inexact,
  input  logic             invalid,
  output int               checks,
  output int               failures,
  output logic             done
);

  localparam int EXP_W = (WIDTH == 64) ? 11 : (WIDTH == 128) ? 15 : 8;
  localparam int MAN_W = WIDTH - 1 - EXP_W;
  typedef fp_ref #(EXP_W, MAN_W) ref_t;

  typedef struct {
    ref_result_t want;
    int          accept_edge;
    logic [WIDTH-1:0] a, b;
    int          op;
  } pending_t;

  // Mechanisms of the unit, counted as they happen.
  typedef enum int {
    M_ADD, M_SUB, M_MUL, M_ADD_TO_SUB, M_SUB_TO_ADD, M_SWAP, M_CARRY, M_CANCEL,
    M_RNE, M_RUP, M_RDN, M_RTZ, M_OVERFLOW, M_UNDERFLOW, M_INEXACT, M_INVALID,
    M_NAN, M_INF, M_SUBNORMAL, M_ZERO, M_STALL, M_BACK_TO_BACK, M_DIRECTED, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  pending_t q[$];

  // Hand-derived vectors, built from the fields so they hold in every format:
  // value = (-1)^s * 1.f * 2^(e - bias).
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [EXP_W-1:0] EALL = '1;
  function automatic logic [WIDTH-1:0] fp(input logic s, input int e, input logic [MAN_W-1:0] f);
    return {s, EXP_W'(e), f};
  endfunction
  typedef struct {
    logic [WIDTH-1:0] a, b, want;
    int               op, rm;
    logic [3:0]       flags;  // overflow, underflow, inexact, invalid
  } directed_t;
  directed_t dir[$];

  function automatic void make_directed();
    logic [MAN_W-1:0] z = '0;
    logic [MAN_W-1:0] ones = '1;
    // 1.5 + 2.25 = 3.75
    dir.push_back('{fp(0, BIAS, z | (1 << (MAN_W-1))), fp(0, BIAS+1, z | (1 << (MAN_W-3))),
                    fp(0, BIAS+1, z | (7 << (MAN_W-3))), 0, 0, 4'b0000});
    // 3.75 - 1.5 = 2.25
    dir.push_back('{fp(0, BIAS+1, z | (7 << (MAN_W-3))), fp(0, BIAS, z | (1 << (MAN_W-1))),
                    fp(0, BIAS+1, z | (1 << (MAN_W-3))), 1, 0, 4'b0000});
    // 1.5 * -2.25 = -3.375
    dir.push_back('{fp(0, BIAS, z | (1 << (MAN_W-1))), fp(1, BIAS+1, z | (1 << (MAN_W-3))),
                    fp(1, BIAS+1, z | (11 << (MAN_W-4))), 2, 0, 4'b0000});
    // -1 + 1 = +0, and -0 when rounding toward -inf
    dir.push_back('{fp(1, BIAS, z), fp(0, BIAS, z), fp(0, 0, z), 0, 0, 4'b0000});
    dir.push_back('{fp(1, BIAS, z), fp(0, BIAS, z), fp(1, 0, z), 0, 2, 4'b0000});
    // 1 + half an ulp is a tie: to even gives 1, toward +inf gives 1 + ulp
    dir.push_back('{fp(0, BIAS, z), fp(0, BIAS-MAN_W-1, z), fp(0, BIAS, z), 0, 0, 4'b0010});
    dir.push_back('{fp(0, BIAS, z), fp(0, BIAS-MAN_W-1, z), fp(0, BIAS, z | 1), 0, 1, 4'b0010});
    // largest finite + largest finite overflows: inf to nearest, largest finite toward zero
    dir.push_back('{fp(0, int'(EALL)-1, ones), fp(0, int'(EALL)-1, ones), fp(0, int'(EALL), z),
                    0, 0, 4'b1010});
    dir.push_back('{fp(0, int'(EALL)-1, ones), fp(0, int'(EALL)-1, ones), fp(0, int'(EALL)-1, ones),
                    0, 3, 4'b1010});
    // least subnormal * 0.5 is a tie between 0 and the least subnormal
    dir.push_back('{fp(0, 0, z | 1), fp(0, BIAS-1, z), fp(0, 0, z), 2, 0, 4'b0110});
    dir.push_back('{fp(0, 0, z | 1), fp(0, BIAS-1, z), fp(0, 0, z | 1), 2, 1, 4'b0110});
    // smallest normal - least subnormal = largest subnormal, exact
    dir.push_back('{fp(0, 1, z), fp(0, 0, z | 1), fp(0, 0, ones), 1, 0, 4'b0000});
    // inf - inf and 0 * inf are invalid
    dir.push_back('{fp(0, int'(EALL), z), fp(0, int'(EALL), z),
                    fp(0, int'(EALL), z | (1 << (MAN_W-1))), 1, 0, 4'b0001});
    dir.push_back('{fp(1, 0, z), fp(0, int'(EALL), z),
                    fp(0, int'(EALL), z | (1 << (MAN_W-1))), 2, 0, 4'b0001});
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d-bit] %s", WIDTH, what);
    end
  endtask

  function automatic int efield(input logic [WIDTH-1:0] x);
    return int'(x[WIDTH-2 -: EXP_W]);
  endfunction

  initial begin
    int edges, last_load_edge;
    bit prev_enabled;
    pending_t p;
    logic [WIDTH-1:0] a, b, r;
    int op, rm, k;
    bit eff_add;
    checks = 0; failures = 0; done = 1'b0;
    foreach (mech[i]) mech[i] = 0;
    reset = 1'b1; enable = 1'b0; load = 1'b0;
    A = '0; B = '0; opcode = '0; rmode = '0;
    edges = 0; last_load_edge = -10; prev_enabled = 0;
    make_directed();
    repeat (3) @(negedge clock);
    reset = 1'b0;

    for (int issued = 0; issued < NOPS || q.size() > 0; ) begin
      // Look at what the last clock edge produced.
      if (prev_enabled) begin
        if (q.size() > 0 && q[0].accept_edge == edges - 2) begin
          p = q.pop_front();
          check(ready, "ready three enabled edges after load");
          check(out == p.want.bits[WIDTH-1:0],
                $sformatf("result of %h op%0d %h: got %h want %h", p.a, p.op, p.b, out,
                          p.want.bits[WIDTH-1:0]));
          check({overflow, underflow, inexact, invalid} ==
                {p.want.overflow, p.want.underflow, p.want.inexact, p.want.invalid},
                $sformatf("flags of %h op%0d %h: got %b%b%b%b", p.a, p.op, p.b,
                          overflow, underflow, inexact, invalid));
          r = out;
          if (p.want.overflow)  mech[M_OVERFLOW]++;
          if (p.want.underflow) mech[M_UNDERFLOW]++;
          if (p.want.inexact)   mech[M_INEXACT]++;
          if (p.want.invalid)   mech[M_INVALID]++;
          if (ref_t::is_nan(128'(r))) mech[M_NAN]++;
          if (ref_t::is_inf(128'(r)) && !p.want.overflow) mech[M_INF]++;
          if (ref_t::is_zero(128'(r))) mech[M_ZERO]++;
          if (efield(r) == 0 && r[WIDTH-2:0] != 0) mech[M_SUBNORMAL]++;
        end else begin
          check(!ready, "no ready without an operation due");
        end
      end

      // Drive the next cycle.
      enable = ($urandom % 10 != 0) || issued >= NOPS;
      if (!enable && q.size() > 0) mech[M_STALL]++;
      load = (issued < NOPS) && ($urandom % 4 != 0);
      if (load) begin
        op = int'($urandom % 3);
        rm = int'($urandom % 4);
        a  = WIDTH'(ref_t::rand_any(1 + int'($urandom % (ref_t::EMAX - 1))));
        b  = WIDTH'(ref_t::rand_any(efield(a)));
        k  = int'($urandom % 16);
        if (k == 0) b = a;                                   // x - x
        if (k == 1) b = {~a[WIDTH-1], a[WIDTH-2:0]};         // x + (-x)
        if (k == 2) b = {a[WIDTH-1:1], ~a[0]};               // nearly equal
        if (issued < dir.size()) begin
          a = dir[issued].a; b = dir[issued].b; op = dir[issued].op; rm = dir[issued].rm;
        end
        A = a; B = b; opcode = 2'(op); rmode = 2'(rm);
        if (enable) begin
          p.a = a; p.b = b; p.op = op;
          p.want = ref_t::compute(128'(a), 128'(b), op, rm);
          if (issued < dir.size()) begin
            // The reference must agree with the hand-derived value; the unit is
            // then checked against both.
            check(p.want.bits[WIDTH-1:0] == dir[issued].want &&
                  {p.want.overflow, p.want.underflow, p.want.inexact, p.want.invalid}
                  == dir[issued].flags,
                  $sformatf("reference agrees with directed vector %0d", issued));
            mech[M_DIRECTED]++;
          end
          p.accept_edge = edges + 1;
          q.push_back(p);
          issued++;
          if (last_load_edge == edges) mech[M_BACK_TO_BACK]++;
          last_load_edge = edges + 1;
          mech[M_ADD + op]++;
          mech[M_RNE + rm]++;
          eff_add = (a[WIDTH-1] == (b[WIDTH-1] ^ (op == 1)));
          if (op == 0 && !eff_add) mech[M_ADD_TO_SUB]++;
          if (op == 1 && eff_add)  mech[M_SUB_TO_ADD]++;
          if (op != 2 && b[WIDTH-2:0] > a[WIDTH-2:0]) mech[M_SWAP]++;
          r = p.want.bits[WIDTH-1:0];
          if (op != 2 && !ref_t::is_nan(128'(r)) && !ref_t::is_inf(128'(r))) begin
            if (eff_add && efield(r) > efield(a) && efield(r) > efield(b)) mech[M_CARRY]++;
            if (!eff_add && !ref_t::is_zero(128'(r)) &&
                efield(r) + 1 < efield(a) && efield(r) + 1 < efield(b)) mech[M_CANCEL]++;
          end
        end
      end
      @(negedge clock);
      prev_enabled = enable;
      if (enable) edges++;
    end

    foreach (mech[i]) begin
      check(mech[i] > 0, $sformatf("mechanism %s happened", mech_e'(i)));
    end
    $display("[%0d-bit] mechanisms:", WIDTH);
    foreach (mech[i]) $display("  %-16s %0d", mech_e'(i), mech[i]);
    done = 1'b1;
  end
endmodule
