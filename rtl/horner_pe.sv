// horner_pe: one processing element of the Horner-rule DFT array.
//
// Horner's rule writes the DFT as a chain of multiply-adds,
//   y(k) = (...((x(N-1) W^k + x(N-2)) W^k + x(N-3)) W^k ... ) W^k + x(0),
// and a linear array runs it with one stationary sample per element:
//   y' = y * W^k + x .
// A new k enters the array every clock, and the twiddle W^k travels with its
// partial result. So the element multiplies a complex partial result by a
// complex twiddle (four real multipliers) and adds a real sample.
// The sample register is loaded under tag control: the tag on tc travels with
// the first partial result of a pass, and when it arrives the element takes
// the sample on tp. A multiplexer passes the new sample straight into that
// same operation, so passes follow one another with no idle clock.
//
// Links: y, w and tc T registers, tp T+1 registers. With T = 1 (default)
// the element is one systolic stage and the sample stream moves at half
// speed, which lets one input channel reach every element just in time.
// With T > 1 the element is pipelined: the operation is followed by T
// registers, which synthesis retiming can spread through the multiplier and
// adder. The one extra register on tp keeps the same input schedule for
// every T. The register count of each link, for both forms, follows the
// source's table (T = t_a + t_m for an adder of t_a and a multiplier of t_m
// stages). Putting all T registers after the operation is this design's
// choice.
// Arithmetic: the product y*W (twiddles with CW-2 fractional bits) is rounded
// to nearest and scaled back to sample units before the add. y is YW bits.
module horner_pe #(
  parameter int L  = 16,
  parameter int CW = 16,
  parameter int YW = 24,
  parameter int T  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [YW-1:0] y_re_i,
  input  logic signed [YW-1:0] y_im_i,
  input  logic signed [CW-1:0] w_re_i,
  input  logic signed [CW-1:0] w_im_i,
  input  logic signed [L-1:0]  tp_i,
  input  logic                 tc_i,
  output logic signed [YW-1:0] y_re_o,
  output logic signed [YW-1:0] y_im_o,
  output logic signed [CW-1:0] w_re_o,
  output logic signed [CW-1:0] w_im_o,
  output logic signed [L-1:0]  tp_o,
  output logic                 tc_o
);
  localparam int FR = CW - 2;        // fractional bits of a twiddle
  localparam int PW = YW + CW + 1;   // full complex product

  initial assert (YW >= L + 1 && T >= 1) else $fatal(1, "horner_pe: YW too narrow or T < 1");

  logic signed [L-1:0] x_q, x_eff;
  assign x_eff = tc_i ? tp_i : x_q;

  logic signed [PW-1:0] p_re, p_im;
  always_comb begin
    p_re = PW'(y_re_i * w_re_i) - PW'(y_im_i * w_im_i);
    p_im = PW'(y_re_i * w_im_i) + PW'(y_im_i * w_re_i);
    p_re = (p_re + (PW'(1) <<< (FR - 1))) >>> FR;
    p_im = (p_im + (PW'(1) <<< (FR - 1))) >>> FR;
  end

  // register stages 1..T after the operation (tp: 1..T+1)
  logic signed [YW-1:0] r_re;
  logic signed [YW-1:0] sy_re [1:T];
  logic signed [YW-1:0] sy_im [1:T];
  logic signed [CW-1:0] sw_re [1:T];
  logic signed [CW-1:0] sw_im [1:T];
  logic signed [L-1:0]  stp   [1:T+1];
  logic                 stc   [1:T];
  assign r_re = YW'(p_re) + YW'(x_eff);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) x_q <= '0;
    else        x_q <= x_eff;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sy_re[1] <= '0;
      sy_im[1] <= '0;
      sw_re[1] <= '0;
      sw_im[1] <= '0;
      stc[1]   <= 1'b0;
      stp[1]   <= '0;
    end else begin
      sy_re[1] <= r_re;
      sy_im[1] <= YW'(p_im);
      sw_re[1] <= w_re_i;
      sw_im[1] <= w_im_i;
      stc[1]   <= tc_i;
      stp[1]   <= tp_i;
    end

  for (genvar s = 1; s < T; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        sy_re[s+1] <= '0;
        sy_im[s+1] <= '0;
        sw_re[s+1] <= '0;
        sw_im[s+1] <= '0;
        stc[s+1]   <= 1'b0;
      end else begin
        sy_re[s+1] <= sy_re[s];
        sy_im[s+1] <= sy_im[s];
        sw_re[s+1] <= sw_re[s];
        sw_im[s+1] <= sw_im[s];
        stc[s+1]   <= stc[s];
      end
  end
  for (genvar s = 1; s <= T; s++) begin : g_tp
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) stp[s+1] <= '0;
      else        stp[s+1] <= stp[s];
  end

  assign y_re_o = sy_re[T];
  assign y_im_o = sy_im[T];
  assign w_re_o = sw_re[T];
  assign w_im_o = sw_im[T];
  assign tc_o   = stc[T];
  assign tp_o   = stp[T+1];
endmodule
