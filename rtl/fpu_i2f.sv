// Integer-to-float converter of the reconfigurable FPU.
//
// Converts the IW-bit integer x to the format with E exponent and M mantissa
// bits. The sign comes from the control word: with 'int_signed' set, x is
// two's complement and a negative x gives a negative result; otherwise x is
// unsigned and the result is positive. The magnitude is normalised by its
// leading-zero count, its top M+1 bits become the significand, the next bit
// the guard bit and the rest the sticky bit, and the rounding stage rounds
// to nearest even. A magnitude beyond the format's range (possible for
// narrow exponents, e.g. a 16-bit integer into half precision) overflows to
// infinity. Zero converts to +0.
//
// The integer width IW defaults to the width of the floating-point word;
// that and the meaning of the sign control are this design's reading of
// the unit's specification.
//
// Purely combinational.
module fpu_i2f
  import fpu_pkg::*;
#(
  parameter int unsigned E  = 8,
  parameter int unsigned M  = 23,
  parameter int unsigned IW = 1 + E + M,
  localparam int unsigned W = 1 + E + M
) (
  input  logic [IW-1:0] x,
  input  logic          int_signed,
  output logic [W-1:0]  result,
  output fpu_status_t   flags
);

  localparam int unsigned EW   = E + $clog2(IW) + 2;
  localparam int unsigned LW   = $clog2(IW) + 1;
  localparam int unsigned BIAS = (1 << (E - 1)) - 1;

  logic                 neg;
  logic [IW-1:0]        mag, norm;
  logic [IW+1:0]        padded;
  logic [LW-1:0]        lz;
  logic signed [EW-1:0] exp_n;
  logic [W-1:0]         r_round;
  logic                 r_ovf, r_inx;

  always_comb begin
    neg = int_signed & x[IW-1];
    mag = neg ? -x : x;
    lz  = '0;
    for (int i = 0; i < int'(IW); i++) begin
      if (mag[i]) lz = LW'(IW - 1 - i);
    end
    norm   = mag << lz;
    padded = {norm, 2'b00};
    exp_n  = EW'(BIAS) + EW'(IW - 1) - EW'(lz);
  end

  fpu_round #(.E(E), .M(M), .EW(EW)) u_round (
    .sign(neg), .exp_in(exp_n), .sig(padded[IW+1 -: M+1]),
    .guard(padded[IW-M]),
    .sticky(|(padded & ~({(IW+2){1'b1}} << (IW-M)))),
    .result(r_round), .overflow(r_ovf), .underflow(), .inexact(r_inx)
  );

  always_comb begin
    flags  = STATUS_NONE;
    result = r_round;
    if (mag == '0) begin
      result = '0;
    end else begin
      flags.overflow = r_ovf;
      flags.inexact  = r_inx;
    end
  end

endmodule
