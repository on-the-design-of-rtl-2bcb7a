// rader_dft: streaming N-point DFT engine for prime N (default N = 5),
// made of the boundary sequencer rader_ctrl and the array rader_array.
//
// It accepts one real sample per clock and delivers one complex output per
// clock. Each N-1 clocks it closes one transform ("bundle"), and bundles
// follow one another with no gap.
// Input: in every clock the engine names on x_idx_o the sample it wants. The
// source drives x_i = x(x_idx_o) of the current bundle in the same clock. In
// the clock where x_tag_o is high it must also drive x0_i = x(0), and in_valid_i
// there says whether the bundle holds real data.
// Output: y_re_o/y_im_o = y(y_k_o) while y_valid_o is high, in the order
// y(pi^1), y(pi^2), ..., y(pi^(N-1)). y(0) comes separately on y0_o with
// y0_valid_o. Latency from the tag clock: TA+1 clocks to y(0), and
// TM + TA*(N-1) clocks to the first of the other outputs.
module rader_dft #(
  parameter int N   = 5,
  parameter int L   = 16,
  parameter int CW  = 16,
  parameter int TA  = 2,
  parameter int TM  = 3,
  parameter int IW  = $clog2(N),
  parameter int YW  = L + CW + $clog2(N) + 1,
  parameter int Y0W = L + $clog2(N) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid_i,
  input  logic signed [L-1:0]   x_i,
  input  logic signed [L-1:0]   x0_i,
  output logic [IW-1:0]         x_idx_o,
  output logic                  x_tag_o,
  output logic signed [YW-1:0]  y_re_o,
  output logic signed [YW-1:0]  y_im_o,
  output logic                  y_valid_o,
  output logic [IW-1:0]         y_k_o,
  output logic signed [Y0W-1:0] y0_o,
  output logic                  y0_valid_o
);
  logic signed [CW-1:0] w_re, w_im;
  logic                 y0_bundle_valid, y0_ready;

  rader_ctrl #(.N(N), .CW(CW), .TA(TA), .TM(TM), .IW(IW)) u_ctrl (
    .clk, .rst_n,
    .in_valid_i,
    .x_idx_o,
    .tag_o(x_tag_o),
    .w_re_o(w_re), .w_im_o(w_im),
    .out_valid_o(y_valid_o),
    .out_k_o(y_k_o),
    .y0_valid_o(y0_bundle_valid)
  );

  rader_array #(.N(N), .L(L), .CW(CW), .TA(TA), .TM(TM), .YW(YW), .Y0W(Y0W)) u_array (
    .clk, .rst_n,
    .tp_i(x_i), .tc_i(x_tag_o), .x0_i,
    .w_re_i(w_re), .w_im_i(w_im),
    .y_re_o, .y_im_o,
    .y0_o, .y0_valid_o(y0_ready)
  );

  assign y0_valid_o = y0_ready && y0_bundle_valid;
endmodule
