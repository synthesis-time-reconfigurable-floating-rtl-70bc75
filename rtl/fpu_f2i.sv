// Float-to-integer converter of the reconfigurable FPU.
//
// Converts operand a (E exponent, M mantissa bits) to an IW-bit integer,
// two's complement when 'int_signed' is set, unsigned otherwise. The value
// is truncated toward zero, as a C cast does. The significand is shifted
// left by the unbiased exponent into a field of IW + M + 1 bits: the upper
// IW + 1 bits are the integer part and the lower M bits the discarded
// fraction, whose OR raises inexact.
//
// Results that do not fit, infinities and NaNs raise invalid. Out-of-range
// values and infinities saturate to the nearest representable integer and a
// NaN gives 0, the convention of the ARM VFP, whose flush-to-zero policy
// the unit also follows. Treating out-of-range conversion as invalid (not
// overflow) follows IEEE 754. The integer width IW defaults to the width of
// the floating-point word, so the result fits the unit's result port; that
// and the saturation values are this design's choices.
//
// Purely combinational.
module fpu_f2i
  import fpu_pkg::*;
#(
  parameter int unsigned E  = 8,
  parameter int unsigned M  = 23,
  parameter int unsigned IW = 1 + E + M,
  localparam int unsigned W = 1 + E + M
) (
  input  logic [W-1:0]  a,
  input  logic          int_signed,
  output logic [IW-1:0] result,
  output fpu_status_t   flags
);

  localparam int unsigned EW   = E + 2;
  localparam int unsigned BW   = IW + M + 1;
  localparam int unsigned BIAS = (1 << (E - 1)) - 1;
  localparam logic [IW-1:0] SMAX = {1'b0, {(IW-1){1'b1}}};
  localparam logic [IW-1:0] SMIN = {1'b1, {(IW-1){1'b0}}};

  logic         sa;
  logic [E-1:0] ea;
  logic [M:0]   ma;
  logic         za, ia, na;

  fpu_unpack #(.E(E), .M(M)) u_ua (
    .x(a), .sign(sa), .exp_f(ea), .sig(ma),
    .is_zero(za), .is_inf(ia), .is_nan(na), .is_snan()
  );

  logic signed [EW-1:0] ue;
  logic [BW-1:0]        shifted;
  logic [IW:0]          ipart;
  logic                 frac_nz;
  logic [IW-1:0]        sat;

  always_comb begin
    ue      = EW'(ea) - EW'(BIAS);
    shifted = '0;
    if (ue >= 0 && ue <= EW'(IW)) shifted = BW'(ma) << ue;
    ipart   = shifted[BW-1:M];
    frac_nz = |shifted[M-1:0];

    // Saturation value for an out-of-range operand of sign sa.
    if (int_signed) sat = sa ? SMIN : SMAX;
    else            sat = sa ? '0 : '1;

    flags  = STATUS_NONE;
    result = '0;
    if (na) begin
      flags.invalid = 1'b1;
    end else if (ia) begin
      flags.invalid = 1'b1;
      result        = sat;
    end else if (za) begin
      result = '0;
    end else if (ue < 0) begin
      flags.inexact = 1'b1;              // |a| < 1 truncates to 0
    end else if (ue > EW'(IW)) begin
      flags.invalid = 1'b1;
      result        = sat;
    end else if (int_signed) begin
      if (!sa && ipart > (IW+1)'(SMAX)) begin
        flags.invalid = 1'b1;
        result        = SMAX;
      end else if (sa && ipart > (IW+1)'(SMIN)) begin
        flags.invalid = 1'b1;
        result        = SMIN;
      end else begin
        result        = sa ? IW'(-ipart) : ipart[IW-1:0];
        flags.inexact = frac_nz;
      end
    end else begin
      if (!sa && ipart[IW]) begin
        flags.invalid = 1'b1;
        result        = '1;
      end else if (sa && ipart != '0) begin
        flags.invalid = 1'b1;
        result        = '0;
      end else begin
        result        = ipart[IW-1:0];
        flags.inexact = frac_nz;
      end
    end
  end

endmodule
