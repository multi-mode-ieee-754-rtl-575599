// tb_fp_unpack: self-checking testbench of the operand unpacker in single
// (8/23) and half (5/10) precision. The expected fields come from the
// operand's magnitude treated as an integer: zero is magnitude 0, a
// subnormal lies below the smallest normal's bit pattern, infinity equals
// the all-ones-exponent pattern, and NaN lies above it.
module tb_fp_unpack;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] s_op;  logic s_sign; logic [7:0] s_exp; logic [23:0] s_sig;
  logic s_zero, s_sub, s_inf, s_nan;
  logic [15:0] h_op;  logic h_sign; logic [4:0] h_exp; logic [10:0] h_sig;
  logic h_zero, h_sub, h_inf, h_nan;

  fp_unpack dut_s (.op(s_op), .sign(s_sign), .exp_eff(s_exp), .sig(s_sig),
                   .is_zero(s_zero), .is_sub(s_sub), .is_inf(s_inf), .is_nan(s_nan));
  fp_unpack #(.EXP_W(5), .MAN_W(10)) dut_h (.op(h_op), .sign(h_sign), .exp_eff(h_exp), .sig(h_sig),
                   .is_zero(h_zero), .is_sub(h_sub), .is_inf(h_inf), .is_nan(h_nan));

  task automatic check(string what, longint got, longint exp, logic [31:0] op);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%h got %0h exp %0h", what, op, got, exp);
    end
  endtask

  initial begin
    longint mag, e;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      case (i % 8)
        0: s_op = $urandom;
        1: s_op = {1'($urandom), 8'h00, 23'($urandom)};
        2: s_op = {1'($urandom), 8'hFF, 23'($urandom_range(3, 0))};
        3: s_op = {1'($urandom), 31'h0};
        default: s_op = {1'($urandom), 8'($urandom_range(2, 0)), 23'($urandom)};
      endcase
      h_op = s_op[15:0];
      if (i % 8 == 1) h_op[14:10] = 5'h00;
      if (i % 8 == 2) h_op[14:10] = 5'h1F;
      #1;
      mag = longint'(s_op[30:0]);
      e   = mag / (64'd1 << 23);
      check("s sign", s_sign, s_op[31], s_op);
      check("s zero", s_zero, mag == 0, s_op);
      check("s sub",  s_sub,  mag > 0 && mag < 64'h0080_0000, s_op);
      check("s inf",  s_inf,  mag == 64'h7F80_0000, s_op);
      check("s nan",  s_nan,  mag > 64'h7F80_0000, s_op);
      check("s exp",  s_exp,  (e == 0) ? 1 : e, s_op);
      check("s sig",  s_sig,  (mag % (64'd1 << 23)) + ((e != 0) ? (64'd1 << 23) : 0), s_op);
      mag = longint'(h_op[14:0]);
      e   = mag / 1024;
      check("h sign", h_sign, h_op[15], 32'(h_op));
      check("h zero", h_zero, mag == 0, 32'(h_op));
      check("h sub",  h_sub,  mag > 0 && mag < 1024, 32'(h_op));
      check("h inf",  h_inf,  mag == 64'h7C00, 32'(h_op));
      check("h nan",  h_nan,  mag > 64'h7C00, 32'(h_op));
      check("h exp",  h_exp,  (e == 0) ? 1 : e, 32'(h_op));
      check("h sig",  h_sig,  (mag % 1024) + ((e != 0) ? 1024 : 0), 32'(h_op));
    end
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
