// tb_fp_mul: self-checking testbench of the multiplier in all three
// precisions (half 5/10, single 8/23, double 11/52): hand-worked products,
// then directed corner cases and random vectors against an exact-integer
// reference. Overflow and underflow must each occur at least once in
// every precision. The unit is combinational.
module tb_fp_mul;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic go = 1'b0;
  logic dn_h, dn_s, dn_d;
  int   c_h, c_s, c_d, f_h, f_s, f_d;
  int   o_h, o_s, o_d, u_h, u_s, u_d, x_h, x_s, x_d, r_h, r_s, r_d;
  int   checks, failures;

  fp_unit_checker #(.EW(5),  .MW(10), .NUM(20000), .TEST_ADD(1'b0)) chk_half (
    .clk, .go, .done(dn_h), .checks(c_h), .failures(f_h), .n_ovf(o_h), .n_unf(u_h), .n_cancel(x_h), .n_far(r_h));
  fp_unit_checker #(.EW(8),  .MW(23), .NUM(8000), .TEST_ADD(1'b0)) chk_single (
    .clk, .go, .done(dn_s), .checks(c_s), .failures(f_s), .n_ovf(o_s), .n_unf(u_s), .n_cancel(x_s), .n_far(r_s));
  fp_unit_checker #(.EW(11), .MW(52), .NUM(3000), .TEST_ADD(1'b0)) chk_double (
    .clk, .go, .done(dn_d), .checks(c_d), .failures(f_d), .n_ovf(o_d), .n_unf(u_d), .n_cancel(x_d), .n_far(r_d));

  logic [15:0] h_a, h_b, h_r;  fpu_pkg::fp_flags_t h_f;
  logic [31:0] s_a, s_b, s_r;  fpu_pkg::fp_flags_t s_f;
  logic [63:0] d_a, d_b, d_r;  fpu_pkg::fp_flags_t d_f;
  fp_mul #(.EXP_W(5),  .MAN_W(10)) dut_h (.a(h_a), .b(h_b), .result(h_r), .flags(h_f));
  fp_mul #(.EXP_W(8),  .MAN_W(23)) dut_s (.a(s_a), .b(s_b), .result(s_r), .flags(s_f));
  fp_mul #(.EXP_W(11), .MAN_W(52)) dut_d (.a(d_a), .b(d_b), .result(d_r), .flags(d_f));

  task automatic expect64(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    h_a = 16'h4200; h_b = 16'hC000;                               // 3 * -2 = -6
    s_a = 32'h3FC0_0000; s_b = 32'h3FC0_0000;                     // 1.5 * 1.5 = 2.25
    d_a = 64'h3FF0_0000_0000_0000; d_b = 64'h4000_0000_0000_0000; // 1 * 2 = 2
    #1;
    expect64("half 3*-2", 64'(h_r), 64'hC600);
    expect64("single 1.5*1.5", 64'(s_r), 64'h4010_0000);
    expect64("double 1*2", d_r, 64'h4000_0000_0000_0000);
    h_a = 16'h5C00; h_b = 16'h5C00;                               // 256^2 > 65504
    s_a = 32'h3F80_0001; s_b = 32'h3F80_0001;                     // (1+2^-23)^2 truncated
    d_a = 64'h0010_0000_0000_0000; d_b = 64'h3FE0_0000_0000_0000; // 2^-1022 * 0.5 = subnormal
    #1;
    expect64("half overflow value", 64'(h_r), 64'h7BFF);
    expect64("half overflow flag", 64'(h_f.overflow), 64'd1);
    expect64("single (1+u)^2", 64'(s_r), 64'h3F80_0002);
    expect64("double to subnormal", d_r, 64'h0008_0000_0000_0000);
    expect64("double underflow flag", 64'(d_f.underflow), 64'd1);
    h_a = 16'h7C00; h_b = 16'h0000;                               // inf * 0
    s_a = 32'hFF80_0000; s_b = 32'h4000_0000;                     // -inf * 2
    d_a = 64'h0000_0000_0000_0001; d_b = 64'h3FD0_0000_0000_0000; // min subnormal * 0.25 -> 0
    #1;
    expect64("half inf*0", 64'(h_r), 64'h7E00);
    expect64("half invalid flag", 64'(h_f.invalid), 64'd1);
    expect64("single -inf*2", 64'(s_r), 64'hFF80_0000);
    expect64("single infinity flag", 64'(s_f.infinity), 64'd1);
    expect64("double tiny product", d_r, 64'h0);
    expect64("double zero flag", 64'(d_f.zero), 64'd1);

    go = 1'b1;
    wait (dn_h && dn_s && dn_d);
    checks   += c_h + c_s + c_d;
    failures += f_h + f_s + f_d;
    $display("half: ovf=%0d unf=%0d  single: ovf=%0d unf=%0d  double: ovf=%0d unf=%0d",
             o_h, u_h, o_s, u_s, o_d, u_d);
    checks += 2;
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
