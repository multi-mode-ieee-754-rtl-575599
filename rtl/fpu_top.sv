// fpu_top: multi-mode IEEE 754 floating point unit (half, single, double).
//
// The unit is a co-processor that adds, subtracts and multiplies floating
// point numbers in one of three precisions. mode selects the precision
// (00 half-precision on a_short/b_short, 01 single precision on
// a_single/b_single, 11 double precision on a_double/b_double) and fpf the
// function (00 add, 01 subtract; 10 multiply is this design's own code).
// Each precision has its own adder/subtractor and multiplier; only the
// selected precision's operand registers load, so the other two units stay
// idle. A reserved mode (10) or function (11) produces a zero result with
// the illegal output set.
//
// Timing (this design's choice; the document gives none): a two-stage
// pipeline. On a clock edge with start high the operands, mode and fpf are
// registered; the arithmetic is then combinational, and on the next edge
// the selected result and its flags are registered and done is high for
// one cycle. Latency is two clock edges and a new operation may start
// every cycle. rst_n is an asynchronous active-low reset.
//
// Outputs: result holds the selected precision's result right-aligned in
// 64 bits (upper bits zero); flags are overflow, underflow, zero,
// infinity and invalid (fpu_pkg::fp_flags_t). Concurrent assertions at the
// end check the latency and that unselected operand registers hold.
module fpu_top
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  mode,
  input  logic [1:0]  fpf,
  input  logic [15:0] a_short,
  input  logic [15:0] b_short,
  input  logic [31:0] a_single,
  input  logic [31:0] b_single,
  input  logic [63:0] a_double,
  input  logic [63:0] b_double,
  output logic        done,
  output logic [63:0] result,
  output fp_flags_t   flags,
  output logic        illegal
);
  // ---------------------------------------------------------------- stage 1
  fp_mode_e    mode_q;
  fp_func_e    fpf_q;
  logic        valid_q;
  logic [15:0] ah_q, bh_q;
  logic [31:0] as_q, bs_q;
  logic [63:0] ad_q, bd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      mode_q  <= MODE_HALF;
      fpf_q   <= FPF_ADD;
      ah_q    <= '0;
      bh_q    <= '0;
      as_q    <= '0;
      bs_q    <= '0;
      ad_q    <= '0;
      bd_q    <= '0;
    end else begin
      valid_q <= start;
      if (start) begin
        mode_q <= fp_mode_e'(mode);
        fpf_q  <= fp_func_e'(fpf);
        unique case (fp_mode_e'(mode))
          MODE_HALF:   begin ah_q <= a_short;  bh_q <= b_short;  end
          MODE_SINGLE: begin as_q <= a_single; bs_q <= b_single; end
          MODE_DOUBLE: begin ad_q <= a_double; bd_q <= b_double; end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------ arithmetic units
  logic        sub_q;
  assign sub_q = (fpf_q == FPF_SUB);

  logic [15:0] h_add_r, h_mul_r;
  logic [31:0] s_add_r, s_mul_r;
  logic [63:0] d_add_r, d_mul_r;
  fp_flags_t   h_add_f, h_mul_f, s_add_f, s_mul_f, d_add_f, d_mul_f;

  fp_addsub #(.EXP_W(HALF_EXP_W), .MAN_W(HALF_MAN_W)) u_add_half (
    .a(ah_q), .b(bh_q), .sub(sub_q), .result(h_add_r), .flags(h_add_f));
  fp_mul #(.EXP_W(HALF_EXP_W), .MAN_W(HALF_MAN_W)) u_mul_half (
    .a(ah_q), .b(bh_q), .result(h_mul_r), .flags(h_mul_f));

  fp_addsub #(.EXP_W(SINGLE_EXP_W), .MAN_W(SINGLE_MAN_W)) u_add_single (
    .a(as_q), .b(bs_q), .sub(sub_q), .result(s_add_r), .flags(s_add_f));
  fp_mul #(.EXP_W(SINGLE_EXP_W), .MAN_W(SINGLE_MAN_W)) u_mul_single (
    .a(as_q), .b(bs_q), .result(s_mul_r), .flags(s_mul_f));

  fp_addsub #(.EXP_W(DOUBLE_EXP_W), .MAN_W(DOUBLE_MAN_W)) u_add_double (
    .a(ad_q), .b(bd_q), .sub(sub_q), .result(d_add_r), .flags(d_add_f));
  fp_mul #(.EXP_W(DOUBLE_EXP_W), .MAN_W(DOUBLE_MAN_W)) u_mul_double (
    .a(ad_q), .b(bd_q), .result(d_mul_r), .flags(d_mul_f));

  // ---------------------------------------------------- result selection
  logic [63:0] sel_r;
  fp_flags_t   sel_f;
  logic        sel_ill;
  logic        is_mul;

  always_comb begin
    is_mul  = (fpf_q == FPF_MUL);
    sel_r   = '0;
    sel_f   = '0;
    sel_ill = (fpf_q == FPF_RSVD);
    unique case (mode_q)
      MODE_HALF:   begin sel_r = 64'(is_mul ? h_mul_r : h_add_r); sel_f = is_mul ? h_mul_f : h_add_f; end
      MODE_SINGLE: begin sel_r = 64'(is_mul ? s_mul_r : s_add_r); sel_f = is_mul ? s_mul_f : s_add_f; end
      MODE_DOUBLE: begin sel_r = is_mul ? d_mul_r : d_add_r;      sel_f = is_mul ? d_mul_f : d_add_f; end
      default:     sel_ill = 1'b1;
    endcase
    if (sel_ill) begin
      sel_r = '0;
      sel_f = '0;
    end
  end

  // ---------------------------------------------------------------- stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done    <= 1'b0;
      result  <= '0;
      flags   <= '0;
      illegal <= 1'b0;
    end else begin
      done <= valid_q;
      if (valid_q) begin
        result  <= sel_r;
        flags   <= sel_f;
        illegal <= sel_ill;
      end
    end
  end

  // done must follow start by exactly two edges.
  a_done_follows_start: assert property (
    @(posedge clk) disable iff (!rst_n) start |=> ##1 done);
  // Operand isolation: a precision's operand registers only load when
  // that precision is selected.
  a_half_isolated: assert property (
    @(posedge clk) disable iff (!rst_n) !(start && mode == MODE_HALF) |=> $stable({ah_q, bh_q}));
  a_single_isolated: assert property (
    @(posedge clk) disable iff (!rst_n) !(start && mode == MODE_SINGLE) |=> $stable({as_q, bs_q}));
  a_double_isolated: assert property (
    @(posedge clk) disable iff (!rst_n) !(start && mode == MODE_DOUBLE) |=> $stable({ad_q, bd_q}));
endmodule
