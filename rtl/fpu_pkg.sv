// fpu_pkg: types and constants shared by the generic IEEE-754 floating point unit.
//
// The unit is generic in the binary interchange format: a format is chosen by its
// total width (32, 64 or 128 bits) and the field widths follow from it through
// exp_width(). The operation, rounding-mode and datapath-selection codes are this
// design's own encodings; the set of operations (add, subtract, multiply), the four
// rounding modes and the exception flags follow IEEE 754.
package fpu_pkg;

  // Operation requested on the opcode input.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } opcode_e;

  // IEEE 754 rounding-direction attributes, selected on the rmode input.
  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'd0,  // round to nearest, ties to even
    RM_UP           = 2'd1,  // toward +infinity
    RM_DOWN         = 2'd2,  // toward -infinity
    RM_ZERO         = 2'd3   // toward zero (truncate)
  } rmode_e;

  // Datapath unit that the controller sends an operand pair to.
  typedef enum logic [1:0] {
    PATH_NONE = 2'd0,
    PATH_ADD  = 2'd1,  // magnitudes are added
    PATH_SUB  = 2'd2,  // magnitudes are subtracted
    PATH_MUL  = 2'd3
  } path_e;

  // Exponent field width of the IEEE 754 binary interchange format of a given width.
  function automatic int unsigned exp_width(input int unsigned width);
    case (width)
      16:      return 5;
      32:      return 8;
      64:      return 11;
      128:     return 15;
      default: return 8;
    endcase
  endfunction

  // Number of guard bits carried below the result's last fraction bit between the
  // arithmetic units and the rounding unit: guard, round and sticky.
  localparam int unsigned GRS_W = 3;

endpackage
