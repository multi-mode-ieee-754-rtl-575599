// tb_fpu_top: end-to-end testbench of the multi-mode FPU at its default
// (and only) configuration.
//
// It resets the unit and issues NUM operations with random mode, function
// and operands, sometimes back to back and sometimes with idle cycles. The
// reserved mode and function codes are issued too. Each operation's
// expected result, flags and illegal bit come from the exact-integer
// reference model and wait in a scoreboard queue together with the cycle
// the operation started; when done is high the head of the queue must
// match and must have started exactly two clock cycles earlier. Every
// mechanism of
// the design must show up at least once: each mode, each function, a mode
// switch between consecutive operations, back-to-back issue, overflow,
// underflow, a zero result, an infinite operand, an invalid operation and
// an illegal code.
module tb_fpu_top;
  import fpu_pkg::*;
  typedef fp_ref_pkg::fp_ref #(5, 10)  ref_h;
  typedef fp_ref_pkg::fp_ref #(8, 23)  ref_s;
  typedef fp_ref_pkg::fp_ref #(11, 52) ref_d;

  localparam int NUM     = 30000;
  localparam int LATENCY = 2;

  logic        clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, start, done, illegal;
  logic [1:0]  mode, fpf;
  logic [15:0] a_short, b_short;
  logic [31:0] a_single, b_single;
  logic [63:0] a_double, b_double, result;
  fp_flags_t   flags;

  fpu_top dut (.*);

  typedef struct {
    logic [63:0] result;
    fp_flags_t   flags;
    logic        illegal;
    longint      cycle;
  } exp_t;
  exp_t   q[$];
  longint cycle = 0;
  int     checks = 0, failures = 0, completed = 0;
  int     cnt_mode[4], cnt_fpf[4];
  int     n_switch = 0, n_b2b = 0, n_ovf = 0, n_unf = 0, n_zero = 0, n_inf = 0, n_inv = 0, n_ill = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // Scoreboard: compare on the falling edge after done.
  always @(negedge clk) begin
    if (rst_n && done) begin
      exp_t e;
      checks += 4;
      if (q.size() == 0) fail("done without an outstanding operation");
      else begin
        e = q.pop_front();
        completed++;
        if (result !== e.result)    fail($sformatf("result %h expected %h", result, e.result));
        if (flags !== e.flags)      fail($sformatf("flags %b expected %b", flags, e.flags));
        if (illegal !== e.illegal)  fail($sformatf("illegal %b expected %b", illegal, e.illegal));
        if (cycle - e.cycle != longint'(LATENCY)) fail($sformatf("latency %0d expected %0d", cycle - e.cycle, LATENCY));
      end
    end
  end

  function automatic exp_t model(logic [1:0] m, logic [1:0] f);
    exp_t        e;
    logic [15:0] rh;
    logic [31:0] rs;
    logic [63:0] rd;
    fp_flags_t   ff;
    e.result  = '0;
    e.flags   = '0;
    e.illegal = (m == 2'b10) || (f == 2'b11);
    if (!e.illegal) begin
      case (m)
        2'b00: begin
          if (f == 2'b10) ref_h::mul(a_short, b_short, rh, ff);
          else            ref_h::add(a_short, b_short, f[0], rh, ff);
          e.result = 64'(rh);
        end
        2'b01: begin
          if (f == 2'b10) ref_s::mul(a_single, b_single, rs, ff);
          else            ref_s::add(a_single, b_single, f[0], rs, ff);
          e.result = 64'(rs);
        end
        default: begin
          if (f == 2'b10) ref_d::mul(a_double, b_double, rd, ff);
          else            ref_d::add(a_double, b_double, f[0], rd, ff);
          e.result = rd;
        end
      endcase
      e.flags = ff;
    end
    return e;
  endfunction

  initial begin
    exp_t        e;
    logic [1:0]  last_mode;
    bit          last_start;
    rst_n = 1'b0; start = 1'b0; mode = '0; fpf = '0;
    a_short = '0; b_short = '0; a_single = '0; b_single = '0; a_double = '0; b_double = '0;
    last_mode = 2'b00; last_start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < NUM; i++) begin
      // Operands for all three precisions change every time.
      a_short  = ref_h::rand_op(15);
      b_short  = ref_h::rand_op(int'(a_short[14:10]));
      a_single = ref_s::rand_op(127);
      b_single = ref_s::rand_op(int'(a_single[30:23]));
      a_double = ref_d::rand_op(1023);
      b_double = ref_d::rand_op(int'(a_double[62:52]));
      case ($urandom_range(18, 0) % 19)
        0:       mode = 2'b10;
        default: mode = (i % 3 == 0) ? 2'b00 : ((i % 3 == 1) ? 2'b01 : 2'b11);
      endcase
      if ($urandom_range(2, 0) == 0) mode = 2'($urandom_range(1, 0)) | 2'(($urandom_range(1, 0)) << 1) | 2'b01;
      fpf      = ($urandom_range(19, 0) == 0) ? 2'b11 : 2'($urandom_range(2, 0));
      start    = ($urandom_range(3, 0) != 0);
      if (start) begin
        e = model(mode, fpf);
        e.cycle = cycle;          // the cycle in which start is presented
        q.push_back(e);
        cnt_mode[mode]++;
        cnt_fpf[fpf]++;
        if (mode != last_mode) n_switch++;
        if (last_start) n_b2b++;
        if (e.flags.overflow)  n_ovf++;
        if (e.flags.underflow) n_unf++;
        if (e.flags.zero)      n_zero++;
        if (e.flags.infinity)  n_inf++;
        if (e.flags.invalid)   n_inv++;
        if (e.illegal)         n_ill++;
        last_mode = mode;
      end
      last_start = start;
      @(posedge clk);
      #1;
    end
    start = 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q.size() != 0) fail($sformatf("%0d operations never completed", q.size()));
    $display("completed=%0d half=%0d single=%0d double=%0d rsvd_mode=%0d add=%0d sub=%0d mul=%0d rsvd_fpf=%0d",
             completed, cnt_mode[0], cnt_mode[1], cnt_mode[3], cnt_mode[2],
             cnt_fpf[0], cnt_fpf[1], cnt_fpf[2], cnt_fpf[3]);
    $display("mode switches=%0d back-to-back=%0d overflow=%0d underflow=%0d zero=%0d infinity=%0d invalid=%0d illegal=%0d",
             n_switch, n_b2b, n_ovf, n_unf, n_zero, n_inf, n_inv, n_ill);
    foreach (cnt_mode[m]) begin
      checks++;
      if (cnt_mode[m] == 0) fail($sformatf("mode %0d never used", m));
    end
    foreach (cnt_fpf[f]) begin
      checks++;
      if (cnt_fpf[f] == 0) fail($sformatf("function %0d never used", f));
    end
    checks += 8;
    if (n_switch == 0) fail("no mode switch");
    if (n_b2b == 0)    fail("no back-to-back operations");
    if (n_ovf == 0)    fail("no overflow");
    if (n_unf == 0)    fail("no underflow");
    if (n_zero == 0)   fail("no zero result");
    if (n_inf == 0)    fail("no infinite operand");
    if (n_inv == 0)    fail("no invalid operation");
    if (n_ill == 0)    fail("no illegal code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NUM * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
