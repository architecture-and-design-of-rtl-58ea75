// tb_fpu_formats: end-to-end testbench of the floating point unit built for the
// double (64-bit) and quadruple (128-bit) precision formats.
//
// The same RTL is instantiated with WIDTH = 64 and WIDTH = 128, side by side, and
// each instance gets the random operation stream and exact-reference checks of
// fpu_stim: all three operations, all rounding modes, every operand class, back to
// back loads and stalls, with the latency of three enabled clock edges.
module tb_fpu_formats;
  logic clock = 1'b0;
  always #5 clock = ~clock;

  logic        reset_d, enable_d, load_d, ready_d, ovf_d, unf_d, inx_d, inv_d, done_d;
  logic [63:0] A_d, B_d, out_d;
  logic [1:0]  opcode_d, rmode_d;
  int          checks_d, failures_d;

  logic         reset_q, enable_q, load_q, ready_q, ovf_q, unf_q, inx_q, inv_q, done_q;
  logic [127:0] A_q, B_q, out_q;
  logic [1:0]   opcode_q, rmode_q;
  int           checks_q, failures_q;

  fpu_top #(.WIDTH(64)) dut_double (
    .clock, .reset(reset_d), .enable(enable_d), .load(load_d), .A(A_d), .B(B_d),
    .opcode(opcode_d), .rmode(rmode_d), .out(out_d), .ready(ready_d),
    .overflow(ovf_d), .underflow(unf_d), .inexact(inx_d), .invalid(inv_d)
  );
  fpu_stim #(.WIDTH(64), .NOPS(50000)) stim_double (
    .clock, .reset(reset_d), .enable(enable_d), .load(load_d), .A(A_d), .B(B_d),
    .opcode(opcode_d), .rmode(rmode_d), .out(out_d), .ready(ready_d),
    .overflow(ovf_d), .underflow(unf_d), .inexact(inx_d), .invalid(inv_d),
    .checks(checks_d), .failures(failures_d), .done(done_d)
  );

  fpu_top #(.WIDTH(128)) dut_quad (
    .clock, .reset(reset_q), .enable(enable_q), .load(load_q), .A(A_q), .B(B_q),
    .opcode(opcode_q), .rmode(rmode_q), .out(out_q), .ready(ready_q),
    .overflow(ovf_q), .underflow(unf_q), .inexact(inx_q), .invalid(inv_q)
  );
  fpu_stim #(.WIDTH(128), .NOPS(50000)) stim_quad (
    .clock, .reset(reset_q), .enable(enable_q), .load(load_q), .A(A_q), .B(B_q),
    .opcode(opcode_q), .rmode(rmode_q), .out(out_q), .ready(ready_q),
    .overflow(ovf_q), .underflow(unf_q), .inexact(inx_q), .invalid(inv_q),
    .checks(checks_q), .failures(failures_q), .done(done_q)
  );

  initial begin : watchdog
    repeat (1000000) @(posedge clock);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_d + checks_q,
             failures_d + failures_q + 1);
    $finish;
  end

  initial begin
    wait (done_d === 1'b1 && done_q === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks_d + checks_q, failures_d + failures_q);
    $finish;
  end
endmodule
