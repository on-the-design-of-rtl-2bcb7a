// dft_arrays_top: the two DFT engines side by side, each with its own ports.
//
//  r_*  rader_dft: streaming N-point DFT for prime N (default 5) on a linear
//       array of N-1 multiply-add elements with stationary samples, pipelined
//       adders (TA = 2 stages) and multipliers (TM = 3 stages). It closes one
//       transform every N-1 clocks.
//  s_*  scheme1_array: N = P*Q point DFT (default 4*5 = 20) on a Horner array
//       of Q elements. A FIFO feeds the partial results back for P passes,
//       and one transform is done every P*N clocks.
//  g_*  scheme2_dft: N = N1*N2 point DFT (default 5*3 = 15) by the
//       prime-factor index maps: one N2-point Rader engine on the rows, a
//       three-bank transpose buffer, and two N1-point Rader engines on the
//       real and imaginary parts of the columns. One transform per frame of
//       12 clocks.
// Both engines run freely from reset and tell their source which sample they
// want in each clock (r_x_idx_o, s_x_idx_o). The outputs carry a valid flag and
// the frequency index. See the two modules for the exact schedules.
module dft_arrays_top #(
  parameter int L  = 16,
  parameter int CW = 16,
  // prime-length engine
  parameter int RN = 5,
  parameter int TA = 2,
  parameter int TM = 3,
  // scheme-1 engine
  parameter int P  = 4,
  parameter int Q  = 5,
  // scheme-2 engine
  parameter int N1 = 5,
  parameter int N2 = 3,
  parameter int RIW  = $clog2(RN),
  parameter int RYW  = L + CW + $clog2(RN) + 1,
  parameter int RY0W = L + $clog2(RN) + 1,
  parameter int SIW  = $clog2(P * Q),
  parameter int SYW  = L + $clog2(P * Q) + 2,
  parameter int GIW  = $clog2(N1 * N2),
  parameter int GXW  = L + $clog2(N2) + $clog2(N1) + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // prime-length engine
  input  logic                   r_in_valid_i,
  input  logic signed [L-1:0]    r_x_i,
  input  logic signed [L-1:0]    r_x0_i,
  output logic [RIW-1:0]         r_x_idx_o,
  output logic                   r_x_tag_o,
  output logic signed [RYW-1:0]  r_y_re_o,
  output logic signed [RYW-1:0]  r_y_im_o,
  output logic                   r_y_valid_o,
  output logic [RIW-1:0]         r_y_k_o,
  output logic signed [RY0W-1:0] r_y0_o,
  output logic                   r_y0_valid_o,
  // scheme-1 engine
  input  logic                   s_in_valid_i,
  input  logic signed [L-1:0]    s_x_i,
  output logic                   s_x_req_o,
  output logic [SIW-1:0]         s_x_idx_o,
  output logic signed [SYW-1:0]  s_y_re_o,
  output logic signed [SYW-1:0]  s_y_im_o,
  output logic                   s_y_valid_o,
  output logic [SIW-1:0]         s_y_k_o,
  // scheme-2 engine
  input  logic                   g_in_valid_i,
  output logic                   g_x_first_o,
  output logic                   g_x_req_o,
  output logic [GIW-1:0]         g_x_idx_o,
  output logic                   g_x_tag_o,
  output logic [GIW-1:0]         g_x0_idx_o,
  input  logic signed [L-1:0]    g_x_i,
  input  logic signed [L-1:0]    g_x0_i,
  output logic signed [GXW-1:0]  g_y_re_o,
  output logic signed [GXW-1:0]  g_y_im_o,
  output logic                   g_y_valid_o,
  output logic [GIW-1:0]         g_y_k_o,
  output logic signed [GXW-1:0]  g_y0_re_o,
  output logic signed [GXW-1:0]  g_y0_im_o,
  output logic                   g_y0_valid_o,
  output logic [GIW-1:0]         g_y0_k_o
);
  rader_dft #(.N(RN), .L(L), .CW(CW), .TA(TA), .TM(TM), .IW(RIW), .YW(RYW), .Y0W(RY0W)) u_rader (
    .clk, .rst_n,
    .in_valid_i(r_in_valid_i), .x_i(r_x_i), .x0_i(r_x0_i),
    .x_idx_o(r_x_idx_o), .x_tag_o(r_x_tag_o),
    .y_re_o(r_y_re_o), .y_im_o(r_y_im_o), .y_valid_o(r_y_valid_o), .y_k_o(r_y_k_o),
    .y0_o(r_y0_o), .y0_valid_o(r_y0_valid_o)
  );

  scheme1_array #(.P(P), .Q(Q), .L(L), .CW(CW), .IW(SIW), .YW(SYW)) u_scheme1 (
    .clk, .rst_n,
    .in_valid_i(s_in_valid_i), .x_i(s_x_i),
    .x_req_o(s_x_req_o), .x_idx_o(s_x_idx_o),
    .y_re_o(s_y_re_o), .y_im_o(s_y_im_o), .y_valid_o(s_y_valid_o), .y_k_o(s_y_k_o)
  );

  scheme2_dft #(.N1(N1), .N2(N2), .L(L), .CW(CW), .TA(TA), .TM(TM), .IW(GIW),
                .XW(GXW)) u_scheme2 (
    .clk, .rst_n,
    .in_valid_i(g_in_valid_i),
    .x_first_o(g_x_first_o), .x_req_o(g_x_req_o), .x_idx_o(g_x_idx_o),
    .x_tag_o(g_x_tag_o), .x0_idx_o(g_x0_idx_o), .x_i(g_x_i), .x0_i(g_x0_i),
    .y_re_o(g_y_re_o), .y_im_o(g_y_im_o), .y_valid_o(g_y_valid_o), .y_k_o(g_y_k_o),
    .y0_re_o(g_y0_re_o), .y0_im_o(g_y0_im_o), .y0_valid_o(g_y0_valid_o), .y0_k_o(g_y0_k_o)
  );
endmodule
