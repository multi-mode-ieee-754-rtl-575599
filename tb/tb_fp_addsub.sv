// tb_fp_addsub: self-checking testbench of the adder/subtractor in all three
// precisions (half 5/10, single 8/23, double 11/52). Each precision gets
// directed corner cases and random vectors compared with an exact-integer
// reference. Cancellation, far-apart exponents, overflow and underflow must
// each occur at least once. The unit is combinational; results are checked
// half a clock cycle after the operands change.
module tb_fp_addsub;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic go = 1'b0;
  logic dn_h, dn_s, dn_d;
  int   c_h, c_s, c_d, f_h, f_s, f_d;
  int   o_h, o_s, o_d, u_h, u_s, u_d, x_h, x_s, x_d, r_h, r_s, r_d;
  int   checks, failures;

  fp_unit_checker #(.EW(5),  .MW(10), .NUM(20000), .TEST_MUL(1'b0)) chk_half (
    .clk, .go, .done(dn_h), .checks(c_h), .failures(f_h), .n_ovf(o_h), .n_unf(u_h), .n_cancel(x_h), .n_far(r_h));
  fp_unit_checker #(.EW(8),  .MW(23), .NUM(8000), .TEST_MUL(1'b0)) chk_single (
    .clk, .go, .done(dn_s), .checks(c_s), .failures(f_s), .n_ovf(o_s), .n_unf(u_s), .n_cancel(x_s), .n_far(r_s));
  fp_unit_checker #(.EW(11), .MW(52), .NUM(3000), .TEST_MUL(1'b0)) chk_double (
    .clk, .go, .done(dn_d), .checks(c_d), .failures(f_d), .n_ovf(o_d), .n_unf(u_d), .n_cancel(x_d), .n_far(r_d));

  // Hand-worked values, independent of the reference model.
  logic [15:0] h_r;  fpu_pkg::fp_flags_t h_f;
  logic [31:0] s_r;  fpu_pkg::fp_flags_t s_f;
  logic [63:0] d_r;  fpu_pkg::fp_flags_t d_f;
  logic [15:0] h_a, h_b; logic [31:0] s_a, s_b; logic [63:0] d_a, d_b; logic hsub, ssub, dsub;
  fp_addsub #(.EXP_W(5),  .MAN_W(10)) dut_h (.a(h_a), .b(h_b), .sub(hsub), .result(h_r), .flags(h_f));
  fp_addsub #(.EXP_W(8),  .MAN_W(23)) dut_s (.a(s_a), .b(s_b), .sub(ssub), .result(s_r), .flags(s_f));
  fp_addsub #(.EXP_W(11), .MAN_W(52)) dut_d (.a(d_a), .b(d_b), .sub(dsub), .result(d_r), .flags(d_f));

  task automatic expect64(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    // 1.0 + 1.0 = 2.0 (half)
    h_a = 16'h3C00; h_b = 16'h3C00; hsub = 1'b0;
    // 1.0 + 2.0 = 3.0 (single)
    s_a = 32'h3F80_0000; s_b = 32'h4000_0000; ssub = 1'b0;
    // 2.5 - 4.0 = -1.5 (double)
    d_a = 64'h4004_0000_0000_0000; d_b = 64'h4010_0000_0000_0000; dsub = 1'b1;
    #1;
    expect64("half 1+1", 64'(h_r), 64'h4000);
    expect64("single 1+2", 64'(s_r), 64'h4040_0000);
    expect64("double 2.5-4", d_r, 64'hBFF8_0000_0000_0000);
    // 65504 + 65504 overflows in half precision: largest finite, overflow flag
    h_a = 16'h7BFF; h_b = 16'h7BFF; hsub = 1'b0;
    // 1.0 - 2^-24 truncates to 1 - 2^-23 ... exact 0x3F7FFFFF (single)
    s_a = 32'h3F80_0000; s_b = 32'h3380_0000; ssub = 1'b1;
    // 2^-1022 - 2^-1023 = 2^-1023, a subnormal (double)
    d_a = 64'h0010_0000_0000_0000; d_b = 64'h0008_0000_0000_0000; dsub = 1'b1;
    #1;
    expect64("half max+max", 64'(h_r), 64'h7BFF);
    expect64("half overflow flag", 64'(h_f.overflow), 64'd1);
    expect64("single 1-2^-24", 64'(s_r), 64'h3F7F_FFFF);
    expect64("double subnormal diff", d_r, 64'h0008_0000_0000_0000);
    expect64("double underflow flag", 64'(d_f.underflow), 64'd1);
    // 1.0 - 2^-30 truncates to 0x3F7FFFFF too (sticky borrow)
    s_a = 32'h3F80_0000; s_b = 32'h3080_0000; ssub = 1'b1;
    #1;
    expect64("single 1-2^-30", 64'(s_r), 64'h3F7F_FFFF);

    go = 1'b1;
    wait (dn_h && dn_s && dn_d);
    checks   += c_h + c_s + c_d;
    failures += f_h + f_s + f_d;
    $display("half: cancel=%0d far=%0d ovf=%0d unf=%0d", x_h, r_h, o_h, u_h);
    $display("single: cancel=%0d far=%0d ovf=%0d unf=%0d", x_s, r_s, o_s, u_s);
    $display("double: cancel=%0d far=%0d ovf=%0d unf=%0d", x_d, r_d, o_d, u_d);
    checks += 4;
    if (x_h == 0 || x_s == 0 || x_d == 0) begin failures++; $display("FAIL no cancellation case"); end
    if (r_h == 0 || r_s == 0 || r_d == 0) begin failures++; $display("FAIL no far-apart case"); end
    if (o_h == 0 || o_s == 0 || o_d == 0) begin failures++; $display("FAIL no overflow case"); end
    if (u_h == 0 || u_s == 0 || u_d == 0) begin failures++; $display("FAIL no underflow case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
