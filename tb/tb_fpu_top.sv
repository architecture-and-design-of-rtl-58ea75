// tb_fpu_top: end-to-end testbench of the floating point unit at its default,
// single-precision configuration.
//
// fpu_stim issues a stream of additions, subtractions and multiplications with
// operands of every class, in every rounding mode, back to back and with stalls,
// and checks each result, its flags and its three-cycle latency against the exact
// reference model. It reports how often each mechanism of the unit happened.
module tb_fpu_top;
  logic clock = 1'b0;
  logic reset, enable, load;
  logic [31:0] A, B, out;
  logic [1:0] opcode, rmode;
  logic ready, overflow, underflow, inexact, invalid;
  int checks, failures;
  logic done;

  always #5 clock = ~clock;

  fpu_top dut (.*);

  fpu_stim #(.WIDTH(32), .NOPS(100000)) stim (.*);

  initial begin : watchdog
    repeat (1000000) @(posedge clock);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
