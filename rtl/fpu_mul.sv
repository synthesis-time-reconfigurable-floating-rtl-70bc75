// Floating-point multiplier of the reconfigurable FPU.
//
// Computes a * b for the format with E exponent and M mantissa bits. The two
// (M+1)-bit significands are multiplied exactly into a 2M+2 bit product in
// [1, 4); a product of 2 or more is shifted one place right and the exponent
// incremented. The top M+1 bits go to the rounding stage with the next bit
// as guard and the OR of the rest as sticky. The exponent is ea + eb - bias.
//
// Special operands follow IEEE 754 with denormals flushed to zero: a NaN
// input gives the canonical quiet NaN (invalid if signalling), inf * 0 is
// invalid, inf times a nonzero number is infinity, and zero times a finite
// number is zero, each with the XOR of the signs. The internal structure is
// this design's choice.
//
// Purely combinational.
module fpu_mul
  import fpu_pkg::*;
#(
  parameter int unsigned E = 8,
  parameter int unsigned M = 23,
  localparam int unsigned W = 1 + E + M
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result,
  output fpu_status_t  flags
);

  localparam int unsigned EW   = E + 3;
  localparam int unsigned BIAS = (1 << (E - 1)) - 1;
  localparam logic [W-1:0] QNAN = {1'b0, {E{1'b1}}, 1'b1, {(M-1){1'b0}}};

  logic         sa, sb, sr;
  logic [E-1:0] ea, eb;
  logic [M:0]   ma, mb;
  logic         za, zb, ia, ib, na, nb, qa, qb;

  fpu_unpack #(.E(E), .M(M)) u_ua (
    .x(a), .sign(sa), .exp_f(ea), .sig(ma),
    .is_zero(za), .is_inf(ia), .is_nan(na), .is_snan(qa)
  );
  fpu_unpack #(.E(E), .M(M)) u_ub (
    .x(b), .sign(sb), .exp_f(eb), .sig(mb),
    .is_zero(zb), .is_inf(ib), .is_nan(nb), .is_snan(qb)
  );

  logic [2*M+1:0]       prod;
  logic [M:0]           kept;
  logic                 guard, sticky;
  logic signed [EW-1:0] exp_p;
  logic [W-1:0]         r_round;
  logic                 r_ovf, r_unf, r_inx;

  always_comb begin
    sr   = sa ^ sb;
    prod = (2*M+2)'(ma) * (2*M+2)'(mb);
    if (prod[2*M+1]) begin
      kept   = prod[2*M+1:M+1];
      guard  = prod[M];
      sticky = |prod[M-1:0];
      exp_p  = EW'(ea) + EW'(eb) - EW'(BIAS) + EW'(1);
    end else begin
      kept   = prod[2*M:M];
      guard  = prod[M-1];
      sticky = |(prod[M-1:0] & ~(M'(1) << (M-1)));   // prod[M-2:0]
      exp_p  = EW'(ea) + EW'(eb) - EW'(BIAS);
    end
  end

  fpu_round #(.E(E), .M(M), .EW(EW)) u_round (
    .sign(sr), .exp_in(exp_p), .sig(kept), .guard(guard), .sticky(sticky),
    .result(r_round), .overflow(r_ovf), .underflow(r_unf), .inexact(r_inx)
  );

  always_comb begin
    flags  = STATUS_NONE;
    result = r_round;
    if (na || nb) begin
      result        = QNAN;
      flags.invalid = qa | qb;
    end else if ((ia && zb) || (ib && za)) begin
      result        = QNAN;
      flags.invalid = 1'b1;
    end else if (ia || ib) begin
      result = {sr, {E{1'b1}}, {M{1'b0}}};
    end else if (za || zb) begin
      result = {sr, {(W-1){1'b0}}};
    end else begin
      flags.overflow  = r_ovf;
      flags.underflow = r_unf;
      flags.inexact   = r_inx;
    end
  end

endmodule
