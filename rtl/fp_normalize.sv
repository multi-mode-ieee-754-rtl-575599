// fp_normalize: normalizes, truncates and packs one floating point result.
//
// The input is an unnormalized magnitude sig whose MSB carries the weight
// 2^(exp_in - bias); exp_in is a signed biased exponent that may lie far
// outside the format's range. A leading-zero count shifts the first 1 to
// the MSB and lowers the exponent by the same amount (a carry out of an
// addition is handled by the caller placing it in the MSB). The bits below
// the fraction are dropped: the result is truncated, i.e. rounded toward
// zero, as the document specifies for the multiplier and this design also
// uses for the adder. Out-of-range results follow IEEE 754
// round-toward-zero: an overflow gives the largest finite number of the
// right sign; a result below the smallest normal is delivered as a
// subnormal (or zero) and flagged as underflow. Purely combinational.
//
// Ports: sign, exp_in, sig in; result (packed), overflow, underflow, zero
// out. SIG_W must be at least MAN_W + 1, EI_W wide enough for exp_in.
module fp_normalize #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  parameter int unsigned SIG_W = MAN_W + 5,
  parameter int unsigned EI_W  = EXP_W + 3
) (
  input  logic                    sign,
  input  logic signed [EI_W-1:0]  exp_in,
  input  logic [SIG_W-1:0]        sig,
  output logic [EXP_W+MAN_W:0]    result,
  output logic                    overflow,
  output logic                    underflow,
  output logic                    zero
);
  localparam int unsigned LZW      = $clog2(SIG_W + 1);
  localparam int signed   EXP_MAXN = (1 << EXP_W) - 2;  // largest normal exponent field

  logic [LZW-1:0]         lz;
  logic                   found;
  logic [SIG_W-1:0]       norm;
  logic [SIG_W-1:0]       denorm;
  logic signed [EI_W:0]   exp_n;
  logic signed [EI_W:0]   sub_sh;
  logic [MAN_W-1:0]       frac;

  // Leading-zero count.
  always_comb begin
    lz    = '0;
    found = 1'b0;
    for (int i = SIG_W - 1; i >= 0; i--) begin
      if (!found) begin
        if (sig[i]) found = 1'b1;
        else        lz    = lz + 1'b1;
      end
    end
  end

  always_comb begin
    norm      = sig << lz;
    exp_n     = (EI_W+1)'(exp_in) - (EI_W+1)'(signed'({1'b0, lz}));
    sub_sh    = (EI_W+1)'(1) - exp_n;
    denorm    = '0;
    frac      = '0;
    result    = '0;
    overflow  = 1'b0;
    underflow = 1'b0;
    zero      = 1'b0;
    if (!found) begin
      result = {sign, {(EXP_W+MAN_W){1'b0}}};
      zero   = 1'b1;
    end else if (int'(exp_n) > EXP_MAXN) begin
      result   = {sign, EXP_W'(EXP_MAXN), {MAN_W{1'b1}}};
      overflow = 1'b1;
    end else if (exp_n >= 1) begin
      frac   = norm[SIG_W-2 -: MAN_W];
      result = {sign, exp_n[EXP_W-1:0], frac};
    end else begin
      // Gradual underflow: shift right until the exponent reaches 1.
      denorm    = (int'(sub_sh) >= int'(SIG_W)) ? '0 : (norm >> sub_sh);
      frac      = denorm[SIG_W-2 -: MAN_W];
      result    = {sign, {EXP_W{1'b0}}, frac};
      underflow = 1'b1;
      zero      = (frac == '0);
    end
  end
endmodule
