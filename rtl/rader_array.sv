// rader_array: linear array for an N-point DFT, N prime, after Rader.
//
// Re-indexing input and output by powers of a primitive root pi turns the
// DFT matrix, without its first row and column, into a circulant one. Then
//   y(pi^k) = x(0) + sum_{q=1..N-1} a_q * c_(k-q),
// where a_q = x(pi^-q) and c_m = W^(pi^m) (m taken mod N-1).
// White element q (q = 1..N-1) holds a_q and adds a_q * c_(k-q) to the partial
// result of every output k that passes. The twiddles c_m enter as one periodic
// stream, one per clock. The stream serves overlapping bundles, so N-1 values
// per transform are enough. A sum element at the left end supplies x(0) and
// forms y(0).
//
// Boundary schedule (clock t0 = tag clock of a bundle; see rader_ctrl, which
// produces it):
//   tp_i : a_(N-1), a_(N-2), ..., a_1 in the N-1 clocks ending at t0. In
//          natural indices that is x(pi^0), x(pi^1), ..., x(pi^(N-2)).
//   tc_i : 1 in clock t0 only.
//   x0_i : x(0) in clock t0.
//   w_i  : in every clock t, c_m with m = (t - t0 + 1) mod (N-1).
//   y_o  : y(pi^k), k = 1..N-1, in clocks t0 + TM + TA*(N-1) + k - 1, with
//          CW-2 fractional bits (the twiddles' scaling), exact: no rounding.
//   y0_o : y(0) in sample units (no fractional bits), exact, valid with
//          y0_valid_o in clock t0 + TA + 1.
// The next bundle's tag may follow N-1 clocks later, so one transform is done
// every N-1 clocks. From the first sample in to the last output out, a
// transform spans (N-1)*TA + TM + 2N - 3 clocks inclusive. For TA=2, TM=3,
// N=5 that is 18, and for TA=1, TM=0 it is 3N-4. These are the latencies the
// source gives for the pipelined and the plain array.
module rader_array #(
  parameter int N   = 5,
  parameter int L   = 16,
  parameter int CW  = 16,
  parameter int TA  = 2,
  parameter int TM  = 3,
  parameter int YW  = L + CW + $clog2(N) + 1,
  parameter int Y0W = L + $clog2(N) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [L-1:0]   tp_i,
  input  logic                  tc_i,
  input  logic signed [L-1:0]   x0_i,
  input  logic signed [CW-1:0]  w_re_i,
  input  logic signed [CW-1:0]  w_im_i,
  output logic signed [YW-1:0]  y_re_o,
  output logic signed [YW-1:0]  y_im_o,
  output logic signed [Y0W-1:0] y0_o,
  output logic                  y0_valid_o
);
  initial assert (dft_pkg::is_prime(N) && N >= 3)
    else $fatal(1, "rader_array: N must be an odd prime");

  // link signals between elements; index 0 is the left boundary
  logic signed [YW-1:0] yr [N];
  logic signed [YW-1:0] yi [N];
  logic signed [CW-1:0] wr [N];
  logic signed [CW-1:0] wi [N];
  logic signed [L-1:0]  tp [N];
  logic                 tc [N];
  logic signed [L-1:0]  seed;

  rader_sum_pe #(.N(N), .L(L), .TA(TA), .TM(TM), .Y0W(Y0W)) u_sum (
    .clk, .rst_n,
    .tp_i, .tc_i, .x0_i,
    .seed_o(seed), .y0_o, .y0_valid_o
  );

  // x(0) enters with the twiddles' CW-2 fractional bits, like the products
  assign yr[0] = YW'(seed) <<< (CW - 2);
  assign yi[0] = '0;
  assign wr[0] = w_re_i;
  assign wi[0] = w_im_i;
  assign tp[0] = tp_i;
  assign tc[0] = tc_i;

  for (genvar q = 1; q < N; q++) begin : g_pe
    rader_pe #(.L(L), .CW(CW), .YW(YW), .TA(TA), .TM(TM)) u_pe (
      .clk, .rst_n,
      .y_re_i(yr[q-1]), .y_im_i(yi[q-1]),
      .w_re_i(wr[q-1]), .w_im_i(wi[q-1]),
      .tp_i(tp[q-1]),   .tc_i(tc[q-1]),
      .y_re_o(yr[q]),   .y_im_o(yi[q]),
      .w_re_o(wr[q]),   .w_im_o(wi[q]),
      .tp_o(tp[q]),     .tc_o(tc[q])
    );
  end

  assign y_re_o = yr[N-1];
  assign y_im_o = yi[N-1];
endmodule
