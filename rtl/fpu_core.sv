// Floating_Point_Unit_core: a fully combinational floating-point unit whose
// number format is fixed at synthesis time.
//
// The format is one sign bit, E exponent bits and M mantissa bits (W = 1 + E
// + M, at most 64), so the same RTL gives IEEE half (E=5, M=10), single
// (E=8, M=23) and double (E=11, M=52) precision or any reduced-precision
// format in between. The default is single precision, the reference format
// of the unit's evaluation.
//
// Operations ('operation', codes in fpu_pkg::fpu_op_e): add, subtract,
// multiply, float-to-integer and integer-to-float. Each has its own unit; all
// of them see the operands and the selected one's result and flags are
// multiplexed to the outputs. There is no clock: the unit is meant to sit in
// a single pipeline stage of a CPU, with the result valid once the inputs
// have propagated.
//
// Denormal inputs are read as zero. Exceptions: an underflowing result is
// replaced by zero, an overflowing one by infinity, an invalid operation
// gives NaN; inexact is raised when rounding changed the value. 'control'
// selects signed or unsigned integers for the two conversions and enables
// the 'status' port; with exc_en low, status reads zero. The integer operand
// of OP_I2F is taken from 'a' and the integer result of OP_F2I is returned
// on 'result', both W bits wide. An operation code outside the five gives
// result 0 and, if enabled, the invalid flag. Rounding to nearest even, the
// integer width, the operation codes and the NaN/saturation values are this
// design's choices.
module fpu_core
  import fpu_pkg::*;
#(
  parameter int unsigned E = 8,
  parameter int unsigned M = 23,
  localparam int unsigned W = 1 + E + M
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   operation,
  input  fpu_ctrl_t    control,
  output logic [W-1:0] result,
  output fpu_status_t  status
);

  initial begin
    assert (W <= 64) else $error("fpu_core: format wider than 64 bits");
    assert (E >= 2 && M >= 2) else $error("fpu_core: E and M must be at least 2");
  end

  fpu_op_e     op;
  logic [W-1:0] r_as, r_mul, r_f2i, r_i2f;
  fpu_status_t f_as, f_mul, f_f2i, f_i2f, flags;

  assign op = fpu_op_e'(operation);

  fpu_addsub #(.E(E), .M(M)) u_addsub (
    .a(a), .b(b), .sub(op == OP_SUB), .result(r_as), .flags(f_as)
  );

  fpu_mul #(.E(E), .M(M)) u_mul (
    .a(a), .b(b), .result(r_mul), .flags(f_mul)
  );

  fpu_f2i #(.E(E), .M(M), .IW(W)) u_f2i (
    .a(a), .int_signed(control.int_signed), .result(r_f2i), .flags(f_f2i)
  );

  fpu_i2f #(.E(E), .M(M), .IW(W)) u_i2f (
    .x(a), .int_signed(control.int_signed), .result(r_i2f), .flags(f_i2f)
  );

  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB: begin result = r_as;  flags = f_as;  end
      OP_MUL:         begin result = r_mul; flags = f_mul; end
      OP_F2I:         begin result = r_f2i; flags = f_f2i; end
      OP_I2F:         begin result = r_i2f; flags = f_i2f; end
      default: begin
        result        = '0;
        flags         = STATUS_NONE;
        flags.invalid = 1'b1;
      end
    endcase
    status = control.exc_en ? flags : STATUS_NONE;
  end

endmodule
