// Rounding and packing stage shared by the arithmetic units.
//
// Takes a nonzero result as sign, biased exponent (signed, wide enough never
// to wrap), a normalised significand whose leading one is at bit M, and the
// guard and sticky bits of what was shifted out below it. Rounds to nearest,
// ties to even (the IEEE 754 default; the rounding mode itself is this
// design's choice), then packs the word.
//
// Out-of-range results are replaced as the unit is specified to do: an
// overflow gives infinity of the result's sign, an underflow gives zero of
// the result's sign. Underflow is detected after rounding, on the exponent
// the rounded result would have with an unbounded range. Both raise inexact.
//
// Purely combinational.
module fpu_round #(
  parameter int unsigned E  = 8,
  parameter int unsigned M  = 23,
  parameter int unsigned EW = E + 8,
  localparam int unsigned W = 1 + E + M
) (
  input  logic                 sign,
  input  logic signed [EW-1:0] exp_in,  // biased exponent of bit M of sig
  input  logic [M:0]           sig,
  input  logic                 guard,
  input  logic                 sticky,
  output logic [W-1:0]         result,
  output logic                 overflow,
  output logic                 underflow,
  output logic                 inexact
);

  localparam logic signed [EW-1:0] EXP_INF = EW'((1 << E) - 1);

  logic                 incr;
  logic [M+1:0]         sum;
  logic signed [EW-1:0] exp_r;

  always_comb begin
    incr  = guard & (sticky | sig[0]);
    sum   = {1'b0, sig} + (M+2)'(incr);
    exp_r = exp_in + EW'(sum[M+1]);

    overflow  = 1'b0;
    underflow = 1'b0;
    inexact   = guard | sticky;
    if (exp_r >= EXP_INF) begin
      overflow = 1'b1;
      inexact  = 1'b1;
      result   = {sign, {E{1'b1}}, {M{1'b0}}};
    end else if (exp_r < 1) begin
      underflow = 1'b1;
      inexact   = 1'b1;
      result    = {sign, {(W-1){1'b0}}};
    end else begin
      // After a carry out the significand is 10...0, whose mantissa is 0.
      result = {sign, exp_r[E-1:0], sum[M+1] ? {M{1'b0}} : sum[M-1:0]};
    end
  end

endmodule
