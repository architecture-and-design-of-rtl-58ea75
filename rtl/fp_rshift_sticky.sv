// fp_rshift_sticky: right shifter that keeps a sticky bit.
//
// Shifts `in` right by `amount` and ORs every bit shifted out into the lowest bit
// of the result, so that a later rounding step still knows whether anything
// non-zero was lost. Shift amounts of WIDTH or more leave only the sticky bit.
// Purely combinational; SHW must not exceed 32. Used for exponent alignment in the adder and subtractor
// and for denormalizing tiny results in the rounding unit.
module fp_rshift_sticky #(
  parameter int unsigned WIDTH = 27,
  parameter int unsigned SHW   = 10
) (
  input  logic [WIDTH-1:0] in,
  input  logic [SHW-1:0]   amount,
  output logic [WIDTH-1:0] out
);

  logic [WIDTH-1:0] shifted;
  logic [WIDTH-1:0] lost_mask;
  logic             sticky;

  always_comb begin
    if (32'(amount) >= WIDTH) begin
      shifted   = '0;
      lost_mask = '1;
    end else begin
      shifted   = in >> amount;
      lost_mask = ~({WIDTH{1'b1}} << amount);
    end
    sticky = |(in & lost_mask);
    out    = shifted | {{(WIDTH-1){1'b0}}, sticky};
  end

endmodule
