// fp_unpack: splits one IEEE 754 operand into its fields and classifies it.
//
// The sign is the MSB, the next EXP_W bits are the biased exponent and the
// low MAN_W bits the fraction. Normal numbers get their implied leading 1
// restored; subnormals (exponent field 0, fraction non-zero) get a leading 0
// and the effective exponent 1, so both kinds can be aligned and multiplied
// alike. Infinity is an all-ones exponent with a zero fraction and zero is a
// zero exponent with a zero fraction, as the multiplier's flag rules specify;
// NaN detection (all-ones exponent, non-zero fraction) is this design's own
// addition. Purely combinational.
//
// Ports: op (packed operand) in; sign, exp_eff (effective biased exponent,
// >= 1 for every finite number), sig (hidden bit and fraction), and the class
// bits is_zero, is_sub, is_inf, is_nan out.
module fp_unpack #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] op,
  output logic                 sign,
  output logic [EXP_W-1:0]     exp_eff,
  output logic [MAN_W:0]       sig,
  output logic                 is_zero,
  output logic                 is_sub,
  output logic                 is_inf,
  output logic                 is_nan
);
  logic [EXP_W-1:0] exp_f;
  logic [MAN_W-1:0] frac;
  logic             exp_zero, exp_ones, frac_zero;

  always_comb begin
    sign      = op[EXP_W+MAN_W];
    exp_f     = op[EXP_W+MAN_W-1:MAN_W];
    frac      = op[MAN_W-1:0];
    exp_zero  = (exp_f == '0);
    exp_ones  = (exp_f == '1);
    frac_zero = (frac == '0);
    is_zero   = exp_zero & frac_zero;
    is_sub    = exp_zero & ~frac_zero;
    is_inf    = exp_ones & frac_zero;
    is_nan    = exp_ones & ~frac_zero;
    exp_eff   = exp_zero ? EXP_W'(1) : exp_f;
    sig       = {~exp_zero, frac};
  end
endmodule
