// tb_fp_normalize: self-checking testbench of the normalize/truncate/pack
// stage in single precision (SIG_W 28, as in the adder) and half precision
// (SIG_W 22, as in the multiplier). The exact value sig * 2^(exp_in - bias
// - (SIG_W-1)) is rescaled into units of the smallest subnormal and packed
// by the reference model's truncating packer; results and the overflow,
// underflow and zero flags are compared.
module tb_fp_normalize;
  import fpu_pkg::*;
  typedef fp_ref_pkg::fp_ref #(8, 23) ref_s;
  typedef fp_ref_pkg::fp_ref #(5, 10) ref_h;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_zero = 0, n_norm = 0;

  logic               s_sign, h_sign;
  logic signed [10:0] s_exp;
  logic signed [7:0]  h_exp;
  logic [27:0]        s_sig;
  logic [21:0]        h_sig;
  logic [31:0]        s_res;
  logic [15:0]        h_res;
  logic               s_ovf, s_unf, s_zero, h_ovf, h_unf, h_zero;

  fp_normalize dut_s (.sign(s_sign), .exp_in(s_exp), .sig(s_sig),
                      .result(s_res), .overflow(s_ovf), .underflow(s_unf), .zero(s_zero));
  fp_normalize #(.EXP_W(5), .MAN_W(10), .SIG_W(22), .EI_W(8)) dut_h (
                      .sign(h_sign), .exp_in(h_exp), .sig(h_sig),
                      .result(h_res), .overflow(h_ovf), .underflow(h_unf), .zero(h_zero));

  task automatic cmp(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h (s_exp=%0d s_sig=%h h_exp=%0d h_sig=%h)",
                                  what, got, exp, s_exp, s_sig, h_exp, h_sig);
    end
  endtask

  initial begin
    ref_s::big_t ns;
    ref_h::big_t nh;
    logic [31:0] es;
    logic [15:0] eh;
    fp_flags_t   fs, fh;
    int          k, lzs;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      s_sign = 1'($urandom);
      h_sign = 1'($urandom);
      s_exp  = 11'($urandom_range(320, 0) - 60);
      h_exp  = 8'($urandom_range(70, 0) - 35);
      lzs    = $urandom_range(28, 0);
      s_sig  = 28'($urandom) >> lzs;
      h_sig  = 22'($urandom) >> $urandom_range(22, 0);
      if (i % 50 == 0) s_sig = '0;
      #1;
      // single: units of 2^-149, shift = exp_in - SIG_W + MAN_W
      k = int'(s_exp) - 28 + 23;
      ns = (k >= 0) ? (ref_s::big_t'(s_sig) << k) : (ref_s::big_t'(s_sig) >> (-k));
      ref_s::pack(s_sign, ns, s_sig != 0, es, fs);
      k = int'(h_exp) - 22 + 10;
      nh = (k >= 0) ? (ref_h::big_t'(h_sig) << k) : (ref_h::big_t'(h_sig) >> (-k));
      ref_h::pack(h_sign, nh, h_sig != 0, eh, fh);
      cmp("single result", s_res, es);
      cmp("single flags", 32'({s_ovf, s_unf, s_zero}), 32'({fs.overflow, fs.underflow, fs.zero}));
      cmp("half result", 32'(h_res), 32'(eh));
      cmp("half flags", 32'({h_ovf, h_unf, h_zero}), 32'({fh.overflow, fh.underflow, fh.zero}));
      if (fs.overflow || fh.overflow) n_ovf++;
      if (fs.underflow || fh.underflow) n_unf++;
      if (fs.zero || fh.zero) n_zero++;
      if (!fs.overflow && !fs.underflow && !fs.zero) n_norm++;
    end
    // Hand-worked: 28'h4000000 with exp_in 128 is 1.0 x 2^0 -> 0x3F800000.
    @(posedge clk);
    s_sign = 1'b0; s_exp = 11'sd128; s_sig = 28'h400_0000;
    #1;
    cmp("single 1.0", s_res, 32'h3F80_0000);
    checks += 4;
    if (n_ovf == 0)  begin failures++; $display("FAIL no overflow"); end
    if (n_unf == 0)  begin failures++; $display("FAIL no underflow"); end
    if (n_zero == 0) begin failures++; $display("FAIL no zero"); end
    if (n_norm == 0) begin failures++; $display("FAIL no normal result"); end
    $display("ovf=%0d unf=%0d zero=%0d normal=%0d", n_ovf, n_unf, n_zero, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
