// fp_mul: IEEE 754 multiplier for one precision.
//
// Works in the four sections the design names: the result sign is the XOR
// of the input signs; the biased exponents are added and the bias
// 2^(EXP_W-1)-1 subtracted; the two significands (hidden bit restored) are
// multiplied into a 2*(MAN_W+1)-bit product; and the flags are raised. The
// product goes to fp_normalize, which moves its leading 1 to the hidden-bit
// position, adjusts the exponent by the shift, and truncates the low bits.
//
// Flags: infinity when an input is an infinity (all-ones exponent, zero
// fraction); zero when the result is zero; underflow when the exact product
// is below the smallest normal number (the exponent sum falls below the
// bias); overflow when the exponent is beyond the range, in which case the
// truncated result is the largest finite number. Subnormal inputs and
// outputs, NaN handling (quiet NaN out, 0*inf raising invalid) and the
// overflow value are this design's IEEE 754 choices. Purely combinational.
//
// Ports: a, b (packed operands) in; result and flags out.
module fp_mul #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] result,
  output fpu_pkg::fp_flags_t   flags
);
  localparam int unsigned PW   = 2 * (MAN_W + 1);
  localparam int unsigned EI_W = EXP_W + 3;
  localparam int signed   BIAS = (1 << (EXP_W - 1)) - 1;

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W:0]   ma, mb;
  logic             a_zero, a_inf, a_nan;
  logic             b_zero, b_inf, b_nan;

  fp_unpack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unpack_a (
    .op(a), .sign(sa), .exp_eff(ea), .sig(ma),
    .is_zero(a_zero), .is_sub(), .is_inf(a_inf), .is_nan(a_nan));
  fp_unpack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unpack_b (
    .op(b), .sign(sb), .exp_eff(eb), .sig(mb),
    .is_zero(b_zero), .is_sub(), .is_inf(b_inf), .is_nan(b_nan));

  logic                   res_sign;
  logic signed [EI_W-1:0] res_exp;
  logic [PW-1:0]          prod;

  always_comb begin
    res_sign = sa ^ sb;                                        // sign extraction
    // Exponent addition: the product MSB weighs 2^(ea+eb-2*bias+1).
    res_exp  = EI_W'(ea) + EI_W'(eb) - EI_W'(BIAS) + EI_W'(1);
    prod     = PW'(ma) * PW'(mb);                              // mantissa multiply
  end

  logic [EXP_W+MAN_W:0] norm_result;
  logic                 n_ovf, n_unf, n_zero;

  fp_normalize #(.EXP_W(EXP_W), .MAN_W(MAN_W), .SIG_W(PW), .EI_W(EI_W)) u_norm (
    .sign(res_sign), .exp_in(res_exp), .sig(prod),
    .result(norm_result), .overflow(n_ovf), .underflow(n_unf), .zero(n_zero));

  localparam logic [EXP_W+MAN_W:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  logic zero_times_inf;

  always_comb begin
    zero_times_inf = (a_inf & b_zero) | (b_inf & a_zero);
    flags          = '0;
    flags.infinity = a_inf | b_inf;
    if (a_nan || b_nan || zero_times_inf) begin
      result        = QNAN;
      flags.invalid = zero_times_inf;
    end else if (a_inf || b_inf) begin
      result = {res_sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else begin
      result          = norm_result;
      flags.overflow  = n_ovf;
      flags.underflow = n_unf;
      flags.zero      = n_zero;
    end
  end
endmodule
