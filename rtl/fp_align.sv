// fp_align: the comparator and shifting stage of the adder/subtractor.
//
// The comparator orders the two operands by magnitude (exponent first, then
// significand), so that the later subtraction never goes negative. The
// significand of the smaller operand, with its hidden bit, is then shifted
// right by the exponent difference e. Three extra bits (guard, round,
// sticky) are kept below the LSB; every bit shifted beyond them is ORed into
// the sticky bit, which keeps a truncated subtraction exact. Extending the
// significands with guard/round/sticky bits is this design's own choice; the
// document only describes the compare-and-shift. Purely combinational.
//
// Ports: the two unpacked operands (sign, effective exponent >= 1,
// significand with hidden bit) in; out the larger operand (big_*) with its
// significand extended by three zero bits, the aligned smaller significand
// (small_sig), the smaller operand's sign, and swap (1 when b was larger).
module fp_align #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic             sign_a,
  input  logic [EXP_W-1:0] exp_a,
  input  logic [MAN_W:0]   sig_a,
  input  logic             sign_b,
  input  logic [EXP_W-1:0] exp_b,
  input  logic [MAN_W:0]   sig_b,
  output logic             swap,
  output logic             big_sign,
  output logic             small_sign,
  output logic [EXP_W-1:0] big_exp,
  output logic [MAN_W+3:0] big_sig,
  output logic [MAN_W+3:0] small_sig
);
  localparam int unsigned XW  = MAN_W + 4;
  localparam int unsigned SHW = $clog2(XW + 1);

  logic [EXP_W-1:0]  diff;
  logic [EXP_W-1:0]  small_exp;
  logic [MAN_W:0]    small_raw;
  logic [SHW-1:0]    shift_amt;
  logic [2*XW-1:0]   wide;
  logic              sticky;

  always_comb begin
    // Comparator: b is the larger magnitude -> swap.
    swap       = (exp_b > exp_a) || ((exp_b == exp_a) && (sig_b > sig_a));
    big_sign   = swap ? sign_b : sign_a;
    small_sign = swap ? sign_a : sign_b;
    big_exp    = swap ? exp_b  : exp_a;
    small_exp  = swap ? exp_a  : exp_b;
    big_sig    = {(swap ? sig_b : sig_a), 3'b000};
    small_raw  = swap ? sig_a : sig_b;

    // Shifter: right shift by e = big_exp - small_exp, saturated at XW.
    diff      = big_exp - small_exp;
    shift_amt = (32'(diff) >= XW) ? SHW'(XW) : SHW'(diff);
    wide      = {small_raw, 3'b000, {XW{1'b0}}} >> shift_amt;
    sticky    = |wide[XW-1:0];
    small_sig = {wide[2*XW-1:XW+1], wide[XW] | sticky};
  end
endmodule
