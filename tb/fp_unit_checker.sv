// fp_unit_checker: drives one adder/subtractor and one multiplier of a
// given precision with random and corner-case operands and compares both
// against the exact-integer reference model in fp_ref_pkg.
//
// After go rises it applies NUM vectors, one per clock cycle: the inputs
// change on the rising edge and the outputs are compared on the falling
// edge. It then raises done. checks and failures count compared values
// (result and flags of each unit). The counters ovf/unf/sub/cancel count
// how often the vectors exercised overflow, underflow, a subtraction with
// massive cancellation and an operand shifted out entirely; the parent
// testbench requires each to be non-zero.
module fp_unit_checker #(
  parameter int EW  = 8,
  parameter int MW  = 23,
  parameter int NUM = 1000,
  parameter bit TEST_ADD = 1'b1,
  parameter bit TEST_MUL = 1'b1
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_ovf,
  output int   n_unf,
  output int   n_cancel,
  output int   n_far
);
  import fpu_pkg::*;
  typedef fp_ref_pkg::fp_ref #(EW, MW) ref_t;
  localparam int FW = EW + MW + 1;

  logic [FW-1:0] a, b, add_r, mul_r;
  logic          sub;
  fp_flags_t     add_f, mul_f;

  fp_addsub #(.EXP_W(EW), .MAN_W(MW)) u_add (.a(a), .b(b), .sub(sub), .result(add_r), .flags(add_f));
  fp_mul    #(.EXP_W(EW), .MAN_W(MW)) u_mul (.a(a), .b(b), .result(mul_r), .flags(mul_f));

  task automatic check_one(logic [FW-1:0] ta, logic [FW-1:0] tb_, logic tsub);
    logic [FW-1:0] er;
    fp_flags_t     ef;
    int            ea, eb;
    @(posedge clk);
    a   <= ta;
    b   <= tb_;
    sub <= tsub;
    @(negedge clk);
    if (TEST_ADD) begin
      ref_t::add(ta, tb_, tsub, er, ef);
      checks += 2;
      if (add_r !== er) begin
        failures++;
        if (failures < 10) $display("%m ADD%s a=%h b=%h got %h exp %h", tsub ? "(sub)" : "", ta, tb_, add_r, er);
      end
      if (add_f !== ef) begin
        failures++;
        if (failures < 10) $display("%m ADD flags a=%h b=%h sub=%0d got %b exp %b", ta, tb_, tsub, add_f, ef);
      end
      if (ef.overflow) n_ovf++;
      if (ef.underflow) n_unf++;
      ea = int'(ta[FW-2 -: EW]);
      eb = int'(tb_[FW-2 -: EW]);
      if (!ref_t::is_nan(ta) && !ref_t::is_nan(tb_) && !ref_t::is_inf(ta) && !ref_t::is_inf(tb_)) begin
        if ((ta[FW-1] ^ tb_[FW-1] ^ tsub) && (ea == eb) && (ea > 0) && (ea - int'(er[FW-2 -: EW]) > 3))
          n_cancel++;
        if ((ea - eb > MW + 4 || eb - ea > MW + 4) && ea > 0 && eb > 0) n_far++;
      end
    end
    if (TEST_MUL) begin
      ref_t::mul(ta, tb_, er, ef);
      checks += 2;
      if (mul_r !== er) begin
        failures++;
        if (failures < 10) $display("%m MUL a=%h b=%h got %h exp %h", ta, tb_, mul_r, er);
      end
      if (mul_f !== ef) begin
        failures++;
        if (failures < 10) $display("%m MUL flags a=%h b=%h got %b exp %b", ta, tb_, mul_f, ef);
      end
      if (ef.overflow) n_ovf++;
      if (ef.underflow) n_unf++;
    end
  endtask

  initial begin
    logic [FW-1:0] x, y, one;
    done = 1'b0; checks = 0; failures = 0;
    n_ovf = 0; n_unf = 0; n_cancel = 0; n_far = 0;
    a = '0; b = '0; sub = 1'b0;
    one = '0;
    one[FW-2 -: EW] = EW'((1 << (EW - 1)) - 1);
    wait (go);
    // Directed corner cases.
    check_one(one, one, 1'b0);
    check_one(one, one, 1'b1);
    x = '0; x[FW-2 -: EW] = '1; x[FW-2 -: EW] = x[FW-2 -: EW] - 1'b1; x[MW-1:0] = '1;  // max finite
    check_one(x, x, 1'b0);
    check_one(x, x, 1'b1);
    check_one(x, x ^ (FW'(1) << (FW - 1)), 1'b1);
    y = '0; y[0] = 1'b1;                                                               // min subnormal
    check_one(y, y, 1'b0);
    check_one(y, y, 1'b1);
    check_one(one, y, 1'b1);
    check_one(one, y, 1'b0);
    check_one(x, y, 1'b1);
    check_one(y, one, 1'b0);
    x = '0; x[FW-2 -: EW] = '1;                                                        // +inf
    check_one(x, x, 1'b1);
    check_one(x, x, 1'b0);
    check_one(x, '0, 1'b0);
    check_one('0, x, 1'b1);
    check_one('0, '0, 1'b0);
    check_one({1'b1, (FW-1)'(0)}, {1'b1, (FW-1)'(0)}, 1'b0);
    check_one({1'b1, (FW-1)'(0)}, '0, 1'b1);
    check_one(one ^ (FW'(1) << (FW - 1)), one ^ (FW'(1) << (FW - 1)), 1'b1);
    // Random vectors; b's exponent is steered near a's half of the time.
    for (int i = 0; i < NUM; i++) begin
      x = ref_t::rand_op((1 << (EW - 1)) - 1);
      y = ref_t::rand_op(int'(x[FW-2 -: EW]));
      if ($urandom_range(3, 0) == 0) y[MW-1:0] = x[MW-1:0] ^ MW'($urandom_range(3, 0));
      check_one(x, y, 1'($urandom_range(1, 0)));
    end
    done = 1'b1;
  end
endmodule
