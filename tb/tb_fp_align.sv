// tb_fp_align: self-checking testbench of the exponent comparator and
// alignment shifter (single precision, 8/23). The expected order comes from
// the operands' exact magnitudes, and the expected aligned significand from
// dividing the smaller significand (times 8, for the guard, round and sticky
// positions) by 2^e: the integer part, with its LSB set when the division
// leaves a remainder.
module tb_fp_align;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_far = 0, n_sticky = 0, n_swap = 0;

  logic        sa, sb, swap, big_sign, small_sign;
  logic [7:0]  ea, eb, big_exp;
  logic [23:0] ma, mb;
  logic [26:0] big_sig, small_sig;

  fp_align dut (.sign_a(sa), .exp_a(ea), .sig_a(ma), .sign_b(sb), .exp_b(eb), .sig_b(mb),
                .swap, .big_sign, .small_sign, .big_exp, .big_sig, .small_sig);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: ea=%0d ma=%h eb=%0d mb=%h got %h exp %h", what, ea, ma, eb, mb, got, exp);
    end
  endtask

  // Value compare without the hardware's field compare: scale both to a
  // common exponent in a wide integer.
  function automatic bit b_larger(logic [7:0] xa, logic [23:0] xma, logic [7:0] xb, logic [23:0] xmb);
    logic [300:0] va, vb;
    va = 301'(xma) << xa;
    vb = 301'(xmb) << xb;
    return vb > va;
  endfunction

  initial begin
    longint d, num, fl;
    logic   b_big;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      sa = 1'($urandom); sb = 1'($urandom);
      ea = 8'($urandom_range(254, 1));
      case (i % 4)
        0: eb = 8'($urandom_range(254, 1));
        1: eb = ea;
        default: eb = 8'(int'(ea) + $urandom_range(60, 0) - 30);
      endcase
      if (eb == 0 || eb == 255) eb = 8'd1;
      ma = {1'b1, 23'($urandom)};
      mb = {1'b1, 23'($urandom)};
      if (i % 16 == 5) mb = ma;
      if (i % 16 == 7) begin ma[23] = 1'b0; ea = 8'd1; end   // subnormal a
      #1;
      b_big = b_larger(ea, ma, eb, mb);
      check("swap", swap, b_big);
      check("big_sign", big_sign, b_big ? sb : sa);
      check("small_sign", small_sign, b_big ? sa : sb);
      check("big_exp", big_exp, b_big ? eb : ea);
      check("big_sig", big_sig, (b_big ? longint'(mb) : longint'(ma)) * 8);
      d   = b_big ? (longint'(eb) - longint'(ea)) : (longint'(ea) - longint'(eb));
      num = (b_big ? longint'(ma) : longint'(mb)) * 8;
      fl  = (d >= 40) ? 0 : num / (64'd1 << d);
      if (d >= 40 ? (num != 0) : (num % (64'd1 << d) != 0)) begin
        fl = fl | 1;
        n_sticky++;
      end
      if (d > 27) n_far++;
      if (b_big) n_swap++;
      check("small_sig", small_sig, fl);
    end
    checks += 3;
    if (n_far == 0)    begin failures++; $display("FAIL no shift beyond the width"); end
    if (n_sticky == 0) begin failures++; $display("FAIL no sticky case"); end
    if (n_swap == 0)   begin failures++; $display("FAIL no swap case"); end
    $display("far=%0d sticky=%0d swap=%0d", n_far, n_sticky, n_swap);
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
