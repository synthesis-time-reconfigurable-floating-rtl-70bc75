// Operand decoder of the floating-point unit.
//
// Splits a word of format {sign, E-bit biased exponent, M-bit mantissa} into
// its fields, classifies it and returns the significand with the hidden bit
// made explicit. An operand whose exponent field is zero is treated as zero
// whatever its mantissa: denormal inputs are flushed to zero, as the unit is
// specified to do (the same policy as a flush-to-zero FPU). A NaN with the
// mantissa's top bit clear is signalling, following IEEE 754-2008.
//
// Purely combinational.
module fpu_unpack #(
  parameter int unsigned E = 8,
  parameter int unsigned M = 23,
  localparam int unsigned W = 1 + E + M
) (
  input  logic [W-1:0] x,
  output logic         sign,
  output logic [E-1:0] exp_f,   // biased exponent field
  output logic [M:0]   sig,     // 1.mantissa (hidden bit at bit M)
  output logic         is_zero, // zero or denormal
  output logic         is_inf,
  output logic         is_nan,
  output logic         is_snan
);

  logic [M-1:0] man;

  always_comb begin
    sign    = x[W-1];
    exp_f   = x[W-2 -: E];
    man     = x[M-1:0];
    sig     = {1'b1, man};
    is_zero = (exp_f == '0);
    is_inf  = (exp_f == '1) && (man == '0);
    is_nan  = (exp_f == '1) && (man != '0);
    is_snan = is_nan && !man[M-1];
  end

endmodule
