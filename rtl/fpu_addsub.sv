// Floating-point adder/subtractor of the reconfigurable FPU.
//
// Computes a + b, or a - b when 'sub' is set, for the format with E exponent
// and M mantissa bits. The classic single-path structure: the operand with
// the larger magnitude is selected, the other one's significand is shifted
// right by the exponent difference into a field with three extra bits
// (guard, round, sticky), the two are added or subtracted, the result is
// normalised (one place right after a carry, or left by its leading-zero
// count after a cancellation) and passed to the rounding stage.
//
// Special operands follow IEEE 754 with denormals flushed to zero: a NaN
// input gives the canonical quiet NaN (invalid if it was signalling),
// inf - inf is invalid, an exact zero sum is +0 unless both addends are -0.
// The internal structure is this design's choice; the unit is only
// specified by the operation it performs.
//
// Purely combinational: inputs to outputs in the same cycle.
module fpu_addsub
  import fpu_pkg::*;
#(
  parameter int unsigned E = 8,
  parameter int unsigned M = 23,
  localparam int unsigned W = 1 + E + M
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] result,
  output fpu_status_t  flags
);

  localparam int unsigned XW = M + 4;        // significand + guard, round, sticky
  localparam int unsigned EW = E + 3;
  localparam int unsigned LW = $clog2(XW + 1);
  localparam logic [W-1:0] QNAN = {1'b0, {E{1'b1}}, 1'b1, {(M-1){1'b0}}};

  logic         sa, sb, sb_eff;
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

  logic                 a_big, eff_sub, big_sign;
  logic [E-1:0]         big_exp, small_exp, diff;
  logic [XW-1:0]        big_x, small_x, small_al;
  logic                 align_sticky;
  logic [XW:0]          s;
  logic [XW-1:0]        norm;
  logic [LW-1:0]        lz;
  logic signed [EW-1:0] exp_n;
  logic [W-1:0]         r_round;
  logic                 r_ovf, r_unf, r_inx;

  always_comb begin
    sb_eff   = sb ^ sub;
    a_big    = (a[W-2:0] >= b[W-2:0]);
    big_sign = a_big ? sa : sb_eff;
    eff_sub  = sa ^ sb_eff;
    big_exp  = a_big ? ea : eb;
    small_exp = a_big ? eb : ea;
    big_x    = {(a_big ? ma : mb), 3'b000};
    small_x  = {(a_big ? mb : ma), 3'b000};
    diff     = big_exp - small_exp;

    // Alignment shift with sticky collection.
    if (diff >= E'(XW)) begin
      small_al     = '0;
      align_sticky = 1'b1;   // the smaller operand is nonzero here
    end else begin
      small_al     = small_x >> diff;
      align_sticky = |(small_x & ~({XW{1'b1}} << diff));
    end
    small_al[0] = small_al[0] | align_sticky;

    s = eff_sub ? ({1'b0, big_x} - {1'b0, small_al})
                : ({1'b0, big_x} + {1'b0, small_al});

    // Normalisation.
    lz = '0;
    for (int i = 0; i < int'(XW); i++) begin
      if (s[i]) lz = LW'(XW - 1 - i);
    end
    if (s[XW]) begin
      norm  = {s[XW:2], s[1] | s[0]};
      exp_n = EW'(big_exp) + EW'(1);
    end else begin
      norm  = s[XW-1:0] << lz;
      exp_n = EW'(big_exp) - EW'(lz);
    end
  end

  fpu_round #(.E(E), .M(M), .EW(EW)) u_round (
    .sign(big_sign), .exp_in(exp_n), .sig(norm[XW-1:3]),
    .guard(norm[2]), .sticky(norm[1] | norm[0]),
    .result(r_round), .overflow(r_ovf), .underflow(r_unf), .inexact(r_inx)
  );

  always_comb begin
    flags  = STATUS_NONE;
    result = r_round;
    if (na || nb) begin
      result        = QNAN;
      flags.invalid = qa | qb;
    end else if (ia && ib && eff_sub) begin
      result        = QNAN;
      flags.invalid = 1'b1;
    end else if (ia) begin
      result = {sa, {E{1'b1}}, {M{1'b0}}};
    end else if (ib) begin
      result = {sb_eff, {E{1'b1}}, {M{1'b0}}};
    end else if (za && zb) begin
      result = {sa & sb_eff, {(W-1){1'b0}}};
    end else if (za) begin
      result = {sb_eff, b[W-2:0]};
    end else if (zb) begin
      result = a;
    end else if (s == '0) begin
      result = '0;               // exact cancellation: +0 when rounding to nearest
    end else begin
      flags.overflow  = r_ovf;
      flags.underflow = r_unf;
      flags.inexact   = r_inx;
    end
  end

endmodule
