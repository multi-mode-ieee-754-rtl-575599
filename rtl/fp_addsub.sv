// fp_addsub: IEEE 754 adder/subtractor for one precision.
//
// Both operands are unpacked (hidden bit restored), the comparator and
// shifter (fp_align) put the larger magnitude first and shift the smaller
// significand right by the exponent difference, and the aligned
// significands are added, or subtracted when the effective signs differ
// (sub flips the sign of b). The raw sum, whose MSB is the carry position,
// goes to fp_normalize, which normalizes and truncates it and raises
// overflow when it exceeds the largest representable value. One instance
// per precision serves half (5/10), single (8/23) and double (11/52).
//
// Special operands follow IEEE 754 (this design's choice; the document
// does not treat them): a NaN operand or inf-inf gives the quiet NaN with
// only the top fraction bit set, inf-inf also raises invalid, an infinite
// operand gives an infinity, and an exact zero difference is +0 unless
// both operands are -0 in effect. Purely combinational.
//
// Ports: a, b (packed operands), sub (0 add, 1 subtract) in; result and
// flags (fpu_pkg::fp_flags_t) out.
module fp_addsub #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic [EXP_W+MAN_W:0] result,
  output fpu_pkg::fp_flags_t   flags
);
  localparam int unsigned XW   = MAN_W + 4;   // significand + guard/round/sticky
  localparam int unsigned EI_W = EXP_W + 3;

  logic             sa, sb, sb_eff;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W:0]   ma, mb;
  logic             a_inf, a_nan;
  logic             b_inf, b_nan;

  fp_unpack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unpack_a (
    .op(a), .sign(sa), .exp_eff(ea), .sig(ma),
    .is_zero(), .is_sub(), .is_inf(a_inf), .is_nan(a_nan));
  fp_unpack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unpack_b (
    .op(b), .sign(sb), .exp_eff(eb), .sig(mb),
    .is_zero(), .is_sub(), .is_inf(b_inf), .is_nan(b_nan));

  assign sb_eff = sb ^ sub;

  logic             big_sign, small_sign;
  logic [EXP_W-1:0] big_exp;
  logic [XW-1:0]    big_sig, small_sig;

  fp_align #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_align (
    .sign_a(sa), .exp_a(ea), .sig_a(ma),
    .sign_b(sb_eff), .exp_b(eb), .sig_b(mb),
    .swap(), .big_sign(big_sign), .small_sign(small_sign),
    .big_exp(big_exp), .big_sig(big_sig), .small_sig(small_sig));

  logic                   eff_sub;
  logic [XW:0]            sum;
  logic                   res_sign;
  logic signed [EI_W-1:0] res_exp;

  always_comb begin
    eff_sub  = big_sign ^ small_sign;
    sum      = eff_sub ? ({1'b0, big_sig} - {1'b0, small_sig})
                       : ({1'b0, big_sig} + {1'b0, small_sig});
    res_sign = (sum == '0) ? (sa & sb_eff) : big_sign;
    res_exp  = EI_W'(big_exp) + EI_W'(1);
  end

  logic [EXP_W+MAN_W:0] norm_result;
  logic                 n_ovf, n_unf, n_zero;

  fp_normalize #(.EXP_W(EXP_W), .MAN_W(MAN_W), .SIG_W(XW + 1), .EI_W(EI_W)) u_norm (
    .sign(res_sign), .exp_in(res_exp), .sig(sum),
    .result(norm_result), .overflow(n_ovf), .underflow(n_unf), .zero(n_zero));

  localparam logic [EXP_W+MAN_W:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  logic inf_minus_inf;

  always_comb begin
    inf_minus_inf  = a_inf & b_inf & (sa ^ sb_eff);
    flags          = '0;
    flags.infinity = a_inf | b_inf;
    if (a_nan || b_nan || inf_minus_inf) begin
      result        = QNAN;
      flags.invalid = inf_minus_inf;
    end else if (a_inf) begin
      result = {sa, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (b_inf) begin
      result = {sb_eff, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else begin
      result          = norm_result;
      flags.overflow  = n_ovf;
      flags.underflow = n_unf;
      flags.zero      = n_zero;
    end
  end
endmodule
