// scheme2_dft: N = N1*N2 point DFT (defaults N1 = 5, N2 = 3, N = 15) built
// from two Rader engines and a transpose buffer, by the prime-factor
// (Good-Thomas) index maps. N1 and N2 must be distinct primes.
//
//   index map    x(n1,n2) = x((N2*n1 + N1*n2) mod N)
//                X(k1,k2) = X(crt(k1,k2)), crt(k1,k2) = k mod N with
//                k = k1 (mod N1) and k = k2 (mod N2)
//   stage 1      one N2-point real-input engine takes the N1 rows n1 one after
//                the other and writes Z(n1,k2) into a buffer bank
//   stage 2      two N1-point engines, one for Re Z and one for Im Z, take the
//                N2 columns k2 one after the other; X = A_re + j*A_im is
//                rebuilt from their outputs (a complex-input array split
//                into two real-input arrays of the same shape)
//
// Everything runs on a frame of F clocks (12 for 5 x 3). Stage 1 uses
// N1*(N2-1) clocks of each frame, stage 2 uses N2*(N1-1). Stage 2 works on
// the frame that stage 1 took in two frames earlier, so the buffer has three
// banks: one being written, one complete, one being read.
//
// Input: in every clock with x_req_o high the source drives x_i = x(x_idx_o),
// and in the clock with x_tag_o high it also drives x0_i = x(x0_idx_o).
// in_valid_i is sampled in the first clock of each frame (x_first_o high) and
// marks the whole frame as real data.
// Output: X(k) with k = y_k_o on y_re_o/y_im_o while y_valid_o is high, and,
// on separate ports, the outputs with k1 = 0 on y0_re_o/y0_im_o, y0_k_o,
// y0_valid_o. Both are in sample units (no twiddle scale).
// Timing (defaults): one transform per frame of 12 clocks; 50 clocks from the
// first sample of a frame to its last output.
// The two-stage order (rows of n2 points first, then columns of n1 points)
// and the use of the pipelined Rader arrays follow the source. The index
// maps are the standard prime-factor ones. The three-bank buffer, the frame
// schedule, the rounding of the row results and the split of the complex
// column transform into two real arrays are this design's choices.
module scheme2_dft #(
  parameter int N1  = 5,
  parameter int N2  = 3,
  parameter int L   = 16,
  parameter int CW  = 16,
  parameter int TA  = 2,
  parameter int TM  = 3,
  parameter int N   = N1 * N2,
  parameter int IW  = $clog2(N),
  parameter int ZW  = L + $clog2(N2) + 1,     // stage-1 results
  parameter int XW  = ZW + $clog2(N1) + 1     // final results
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  output logic                 x_first_o,
  output logic                 x_req_o,
  output logic [IW-1:0]        x_idx_o,
  output logic                 x_tag_o,
  output logic [IW-1:0]        x0_idx_o,
  input  logic signed [L-1:0]  x_i,
  input  logic signed [L-1:0]  x0_i,
  output logic signed [XW-1:0] y_re_o,
  output logic signed [XW-1:0] y_im_o,
  output logic                 y_valid_o,
  output logic [IW-1:0]        y_k_o,
  output logic signed [XW-1:0] y0_re_o,
  output logic signed [XW-1:0] y0_im_o,
  output logic                 y0_valid_o,
  output logic [IW-1:0]        y0_k_o
);
  import dft_pkg::*;

  localparam int F    = gt_frame(N1, N2);
  localparam int FW   = $clog2(F);
  localparam int I1W  = $clog2(N1);
  localparam int I2W  = $clog2(N2);
  localparam int YW1  = L + CW + $clog2(N2) + 1;
  localparam int Y0W1 = L + $clog2(N2) + 1;
  localparam int YW2  = ZW + CW + $clog2(N1) + 1;
  localparam int Y0W2 = ZW + $clog2(N1) + 1;
  localparam int D1   = TM + TA * (N2 - 1);   // stage-1 tag to first output
  localparam int D2   = TM + TA * (N1 - 1);   // stage-2 tag to first output
  localparam int SH   = CW - 2;               // twiddle scale of the engines

  // ---------------------------------------------------------------------------
  // frame position counters. Counter j gives the frame clock and the bank
  // (frame number mod 3) of the clock OFF[j] clocks ago:
  //   0  now                      stage-1 input, stage-2 input
  //   1  stage-1 main outputs     2  stage-1 k2 = 0 outputs
  //   3  stage-2 main outputs     4  stage-2 k1 = 0 outputs
  // ---------------------------------------------------------------------------
  localparam int NCNT = 5;
  localparam int OFF [NCNT] = '{0, (N2 - 2) + D1, (N2 - 2) + TA + 1,
                                (N1 - 2) + D2, (N1 - 2) + TA + 1};
  logic [FW-1:0] fc   [NCNT];
  logic [1:0]    bank [NCNT];

  for (genvar j = 0; j < NCNT; j++) begin : g_cnt
    localparam int LAPS = (OFF[j] + F - 1) / F;
    localparam int FC0  = (LAPS * F - OFF[j]) % F;
    localparam int BK0  = (3 - LAPS % 3) % 3;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        fc[j]   <= FW'(FC0);
        bank[j] <= 2'(BK0);
      end else if (fc[j] == FW'(F - 1)) begin
        fc[j]   <= '0;
        bank[j] <= (bank[j] == 2'd2) ? 2'd0 : bank[j] + 2'd1;
      end else begin
        fc[j] <= fc[j] + 1'b1;
      end
  end

  function automatic logic [1:0] bank_minus(logic [1:0] b, int d);
    return 2'((int'(b) + 3 - d % 3) % 3);
  endfunction

  // ---------------------------------------------------------------------------
  // buffer: three banks of N1 x N2 complex words, and one valid bit per bank
  // ---------------------------------------------------------------------------
  logic signed [ZW-1:0] z_re [3][N1][N2];
  logic signed [ZW-1:0] z_im [3][N1][N2];
  logic [2:0]           bank_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         bank_valid <= '0;
    else if (x_first_o) bank_valid[bank[0]] <= in_valid_i;

  // ---------------------------------------------------------------------------
  // stage 1: N2-point transforms of the rows
  // ---------------------------------------------------------------------------
  logic [I2W-1:0]         s1_idx, s1_k;
  logic                   s1_tag, s1_valid, s1_y0_valid;
  logic signed [YW1-1:0]  s1_re, s1_im;
  logic signed [Y0W1-1:0] s1_y0;
  int                     row_in, row_y, row_y0;

  assign row_in    = int'(fc[0]) / (N2 - 1);
  assign x_first_o = (fc[0] == '0);
  assign x_req_o   = (row_in < N1);
  assign x_tag_o   = s1_tag && x_req_o;
  assign x_idx_o   = IW'((N2 * row_in + N1 * int'(s1_idx)) % N);
  assign x0_idx_o  = IW'((N2 * row_in) % N);

  rader_dft #(.N(N2), .L(L), .CW(CW), .TA(TA), .TM(TM), .IW(I2W),
              .YW(YW1), .Y0W(Y0W1)) u_stage1 (
    .clk, .rst_n,
    .in_valid_i(x_req_o),
    .x_i, .x0_i,
    .x_idx_o(s1_idx), .x_tag_o(s1_tag),
    .y_re_o(s1_re), .y_im_o(s1_im), .y_valid_o(s1_valid), .y_k_o(s1_k),
    .y0_o(s1_y0), .y0_valid_o(s1_y0_valid)
  );

  // rounding from twiddle scale to sample units
  function automatic logic signed [ZW-1:0] round1(logic signed [YW1-1:0] v);
    return ZW'((v + (YW1'(1) <<< (SH - 1))) >>> SH);
  endfunction

  assign row_y  = int'(fc[1]) / (N2 - 1);
  assign row_y0 = int'(fc[2]) / (N2 - 1);

  always_ff @(posedge clk) begin
    if (s1_valid && row_y < N1) begin
      z_re[bank[1]][row_y][s1_k] <= round1(s1_re);
      z_im[bank[1]][row_y][s1_k] <= round1(s1_im);
    end
    if (s1_y0_valid && row_y0 < N1) begin
      z_re[bank[2]][row_y0][0] <= ZW'(s1_y0);
      z_im[bank[2]][row_y0][0] <= '0;
    end
  end

  // ---------------------------------------------------------------------------
  // stage 2: N1-point transforms of the columns, real and imaginary parts
  // ---------------------------------------------------------------------------
  logic [1:0]             rbank;
  int                     col_in, col_y, col_y0;
  logic                   s2_in_valid;
  logic [I1W-1:0]         a_idx, b_idx, a_k, b_k;
  logic                   a_tag, b_tag, a_valid, b_valid, a_y0_valid, b_y0_valid;
  logic signed [ZW-1:0]   a_x, a_x0, b_x, b_x0;
  logic signed [YW2-1:0]  a_re, a_im, b_re, b_im;
  logic signed [Y0W2-1:0] a_y0, b_y0;

  assign rbank       = bank_minus(bank[0], 2);
  assign col_in      = int'(fc[0]) / (N1 - 1);
  assign s2_in_valid = (col_in < N2) && bank_valid[rbank];

  always_comb begin
    a_x  = '0;
    a_x0 = '0;
    b_x  = '0;
    b_x0 = '0;
    if (col_in < N2) begin
      a_x = z_re[rbank][a_idx][col_in];
      b_x = z_im[rbank][b_idx][col_in];
      if (a_tag) a_x0 = z_re[rbank][0][col_in];
      if (b_tag) b_x0 = z_im[rbank][0][col_in];
    end
  end

  rader_dft #(.N(N1), .L(ZW), .CW(CW), .TA(TA), .TM(TM), .IW(I1W),
              .YW(YW2), .Y0W(Y0W2)) u_stage2_re (
    .clk, .rst_n,
    .in_valid_i(s2_in_valid),
    .x_i(a_x), .x0_i(a_x0),
    .x_idx_o(a_idx), .x_tag_o(a_tag),
    .y_re_o(a_re), .y_im_o(a_im), .y_valid_o(a_valid), .y_k_o(a_k),
    .y0_o(a_y0), .y0_valid_o(a_y0_valid)
  );

  rader_dft #(.N(N1), .L(ZW), .CW(CW), .TA(TA), .TM(TM), .IW(I1W),
              .YW(YW2), .Y0W(Y0W2)) u_stage2_im (
    .clk, .rst_n,
    .in_valid_i(s2_in_valid),
    .x_i(b_x), .x0_i(b_x0),
    .x_idx_o(b_idx), .x_tag_o(b_tag),
    .y_re_o(b_re), .y_im_o(b_im), .y_valid_o(b_valid), .y_k_o(b_k),
    .y0_o(b_y0), .y0_valid_o(b_y0_valid)
  );

  // X = A + jB, rounded once after the sum
  function automatic logic signed [XW-1:0] round2(logic signed [YW2:0] v);
    return XW'((v + ((YW2 + 1)'(1) <<< (SH - 1))) >>> SH);
  endfunction

  logic [IW-1:0] crt_tab [N1][N2];
  for (genvar a = 0; a < N1; a++) begin : g_crt_a
    for (genvar b = 0; b < N2; b++) begin : g_crt_b
      assign crt_tab[a][b] = IW'(crt_index(a, b, N1, N2));
    end
  end

  assign col_y  = int'(fc[3]) / (N1 - 1);
  assign col_y0 = int'(fc[4]) / (N1 - 1);

  assign y_re_o     = round2((YW2 + 1)'(a_re) - (YW2 + 1)'(b_im));
  assign y_im_o     = round2((YW2 + 1)'(a_im) + (YW2 + 1)'(b_re));
  assign y_valid_o  = a_valid && b_valid && (a_k == b_k) && (col_y < N2);
  assign y_k_o      = (col_y < N2) ? crt_tab[a_k][col_y] : '0;

  assign y0_re_o    = XW'(a_y0);
  assign y0_im_o    = XW'(b_y0);
  assign y0_valid_o = a_y0_valid && b_y0_valid && (col_y0 < N2);
  assign y0_k_o     = (col_y0 < N2) ? crt_tab[0][col_y0] : '0;
endmodule
