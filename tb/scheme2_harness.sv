// scheme2_harness: drives one scheme2_dft instance with NF random frames and
// checks every output twice:
//  - bit for bit against a model of the two stages done here: stage-1 sums
//    at twiddle scale rounded to sample units, then stage-2 sums rounded once;
//  - against a direct floating-point DFT of length N1*N2, within TOL.
// Every fourth frame is marked invalid and must produce no output. Each valid
// frame must give every frequency exactly once. It also checks the latency of
// frame 0 (first sample to last output) and that valid frames leave F clocks
// apart.
module scheme2_harness #(
  parameter int N1  = 5,
  parameter int N2  = 3,
  parameter int TA  = 2,
  parameter int TM  = 3,
  parameter int NF  = 10,
  parameter int L   = 16,
  parameter int CW  = 16,
  parameter int TOL = 64
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int N   = N1 * N2;
  localparam int IW  = $clog2(N);
  localparam int ZW  = L + $clog2(N2) + 1;
  localparam int XW  = ZW + $clog2(N1) + 1;
  localparam int SH  = CW - 2;
  localparam int F   = dft_pkg::gt_frame(N1, N2);
  localparam int D2  = TM + TA * (N1 - 1);
  localparam int LAT = 2 * F + (N2 - 1) * (N1 - 1) + (N1 - 2) + D2 + (N1 - 2) + 1;
  localparam real PI = 3.14159265358979323846;

  logic                 in_valid, x_first, x_req, x_tag;
  logic [IW-1:0]        x_idx, x0_idx;
  logic signed [L-1:0]  x_i, x0;
  logic signed [XW-1:0] y_re, y_im, y0_re, y0_im;
  logic                 y_valid, y0_valid;
  logic [IW-1:0]        y_k, y0_k;

  scheme2_dft #(.N1(N1), .N2(N2), .L(L), .CW(CW), .TA(TA), .TM(TM)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid),
    .x_first_o(x_first), .x_req_o(x_req), .x_idx_o(x_idx), .x_tag_o(x_tag),
    .x0_idx_o(x0_idx), .x_i, .x0_i(x0),
    .y_re_o(y_re), .y_im_o(y_im), .y_valid_o(y_valid), .y_k_o(y_k),
    .y0_re_o(y0_re), .y0_im_o(y0_im), .y0_valid_o(y0_valid), .y0_k_o(y0_k)
  );

  longint xs    [NF][N];
  longint ex_re [NF][N];
  longint ex_im [NF][N];
  real    fl_re [NF][N];
  real    fl_im [NF][N];
  int     nf;            // frame starts seen before this clock
  int     cyc;
  int     vq [$];        // valid frames awaiting main outputs
  int     v0q [$];       // valid frames awaiting k1 = 0 outputs
  int     nout, nout0;
  int     first_out_cyc [NF];
  int     n_frames_out, n_valid;
  logic   seen [NF][N];

  function automatic longint qround(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic longint shr_round(longint v);
    return (v + (longint'(1) <<< (SH - 1))) >>> SH;
  endfunction

  function automatic bit fvalid(int f);
    return (f % 4) != 2;
  endfunction

  // model of the two stages, and the plain DFT
  initial begin
    longint w1r [N2], w1i [N2], w2r [N1], w2i [N1];
    longint zr [N1][N2], zi [N1][N2];
    longint ar, ai, br, bi, xv;
    int     k;
    for (int e = 0; e < N2; e++) begin
      w1r[e] = qround($cos(2.0 * PI * e / N2) * real'(1 << SH));
      w1i[e] = qround(-$sin(2.0 * PI * e / N2) * real'(1 << SH));
    end
    for (int e = 0; e < N1; e++) begin
      w2r[e] = qround($cos(2.0 * PI * e / N1) * real'(1 << SH));
      w2i[e] = qround(-$sin(2.0 * PI * e / N1) * real'(1 << SH));
    end
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < N; i++) begin
        // full-scale extremes in frame 0, random elsewhere
        if (f == 0) xs[f][i] = (i % 2 == 0) ? -(longint'(1) << (L - 1)) : (longint'(1) << (L - 1)) - 1;
        else        xs[f][i] = longint'($signed(L'($urandom)));
      end
      // stage 1: rows n1, N2-point transforms over n2
      for (int n1 = 0; n1 < N1; n1++)
        for (int k2 = 0; k2 < N2; k2++) begin
          ar = 0;
          ai = 0;
          for (int n2 = 0; n2 < N2; n2++) begin
            xv = xs[f][(N2 * n1 + N1 * n2) % N];
            ar += xv * w1r[(n2 * k2) % N2];
            ai += xv * w1i[(n2 * k2) % N2];
          end
          if (k2 == 0) begin
            zr[n1][k2] = ar >>> SH;
            zi[n1][k2] = 0;
          end else begin
            zr[n1][k2] = shr_round(ar);
            zi[n1][k2] = shr_round(ai);
          end
        end
      // stage 2: columns k2, N1-point transforms over n1 of Re and Im parts
      for (int k1 = 0; k1 < N1; k1++)
        for (int k2 = 0; k2 < N2; k2++) begin
          ar = 0; ai = 0; br = 0; bi = 0;
          for (int n1 = 0; n1 < N1; n1++) begin
            ar += zr[n1][k2] * w2r[(n1 * k1) % N1];
            ai += zr[n1][k2] * w2i[(n1 * k1) % N1];
            br += zi[n1][k2] * w2r[(n1 * k1) % N1];
            bi += zi[n1][k2] * w2i[(n1 * k1) % N1];
          end
          k = dft_pkg::crt_index(k1, k2, N1, N2);
          if (k1 == 0) begin
            ex_re[f][k] = ar >>> SH;
            ex_im[f][k] = br >>> SH;
          end else begin
            ex_re[f][k] = shr_round(ar - bi);
            ex_im[f][k] = shr_round(ai + br);
          end
        end
      for (int kk = 0; kk < N; kk++) begin
        fl_re[f][kk] = 0.0;
        fl_im[f][kk] = 0.0;
        for (int i = 0; i < N; i++) begin
          fl_re[f][kk] += real'(xs[f][i]) * $cos(2.0 * PI * ((i * kk) % N) / N);
          fl_im[f][kk] -= real'(xs[f][i]) * $sin(2.0 * PI * ((i * kk) % N) / N);
        end
      end
    end
  end

  // drive the samples the engine asks for
  always_comb begin
    int f;
    f = x_first ? nf : nf - 1;
    if (f < 0)   f = 0;
    if (f >= NF) f = NF - 1;
    x_i      = x_req ? L'(xs[f][x_idx]) : '0;
    x0       = x_tag ? L'(xs[f][x0_idx]) : '0;
    in_valid = (nf < NF) && fvalid(nf);
  end

  function automatic bit far(real a, real b);
    return (a - b > real'(TOL)) || (b - a > real'(TOL));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      nf <= 0; cyc <= 0; nout <= 0; nout0 <= 0; n_frames_out <= 0; n_valid <= 0;
      checks <= 0; failures <= 0; done <= 1'b0;
      for (int f = 0; f < NF; f++)
        for (int k = 0; k < N; k++) seen[f][k] <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (x_first) begin
        nf <= nf + 1;
        if (nf < NF && fvalid(nf)) begin
          vq.push_back(nf);
          v0q.push_back(nf);
          n_valid <= n_valid + 1;
        end
      end

      if (y_valid) begin
        automatic int f;
        if (vq.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL N1=%0d N2=%0d: output with no frame pending", N1, N2);
        end else begin
          f = vq[0];
          checks <= checks + 3;
          if (longint'(y_re) != ex_re[f][y_k] || longint'(y_im) != ex_im[f][y_k]) begin
            failures <= failures + 1;
            $display("FAIL N1=%0d N2=%0d frame %0d X(%0d) = (%0d,%0d), want (%0d,%0d)",
                     N1, N2, f, y_k, y_re, y_im, ex_re[f][y_k], ex_im[f][y_k]);
          end
          if (far(real'(y_re), fl_re[f][y_k]) || far(real'(y_im), fl_im[f][y_k])) begin
            failures <= failures + 1;
            $display("FAIL N1=%0d N2=%0d frame %0d X(%0d) = (%0d,%0d), exact (%f,%f)",
                     N1, N2, f, y_k, y_re, y_im, fl_re[f][y_k], fl_im[f][y_k]);
          end
          if (seen[f][y_k] || int'(y_k) % N1 == 0) begin
            failures <= failures + 1;
            $display("FAIL N1=%0d N2=%0d frame %0d: X(%0d) on the wrong port or twice", N1, N2, f, y_k);
          end
          seen[f][y_k] <= 1'b1;
          if (nout == 0) first_out_cyc[f] = cyc;
          if (nout == (N1 - 1) * N2 - 1) begin
            // last output of the frame (the k1 = 0 stream always ends earlier)
            void'(vq.pop_front());
            nout <= 0;
            n_frames_out <= n_frames_out + 1;
            if (f == 0) begin
              checks <= checks + 3 + 1;
              if (cyc + 1 != LAT) begin
                failures <= failures + 1;
                $display("FAIL N1=%0d N2=%0d latency %0d, want %0d", N1, N2, cyc + 1, LAT);
              end
            end
            if (f == 1) begin
              checks <= checks + 3 + 1;
              if (first_out_cyc[1] - first_out_cyc[0] != F) begin
                failures <= failures + 1;
                $display("FAIL N1=%0d N2=%0d frame spacing %0d, want %0d", N1, N2,
                         first_out_cyc[1] - first_out_cyc[0], F);
              end
            end
          end else begin
            nout <= nout + 1;
          end
        end
      end

      if (y0_valid) begin
        automatic int f;
        if (v0q.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL N1=%0d N2=%0d: k1=0 output with no frame pending", N1, N2);
        end else begin
          f = v0q[0];
          checks <= checks + 3;
          if (longint'(y0_re) != ex_re[f][y0_k] || longint'(y0_im) != ex_im[f][y0_k]) begin
            failures <= failures + 1;
            $display("FAIL N1=%0d N2=%0d frame %0d X(%0d) = (%0d,%0d), want (%0d,%0d)",
                     N1, N2, f, y0_k, y0_re, y0_im, ex_re[f][y0_k], ex_im[f][y0_k]);
          end
          if (far(real'(y0_re), fl_re[f][y0_k]) || far(real'(y0_im), fl_im[f][y0_k])) begin
            failures <= failures + 1;
            $display("FAIL N1=%0d N2=%0d frame %0d X(%0d) = (%0d,%0d), exact (%f,%f)",
                     N1, N2, f, y0_k, y0_re, y0_im, fl_re[f][y0_k], fl_im[f][y0_k]);
          end
          if (seen[f][y0_k] || int'(y0_k) % N1 != 0) begin
            failures <= failures + 1;
            $display("FAIL N1=%0d N2=%0d frame %0d: X(%0d) on the wrong port or twice", N1, N2, f, y0_k);
          end
          seen[f][y0_k] <= 1'b1;
          if (nout0 == N2 - 1) begin
            void'(v0q.pop_front());
            nout0 <= 0;
          end else begin
            nout0 <= nout0 + 1;
          end
        end
      end

      if (!done && nf >= NF && n_frames_out == n_valid && vq.size() == 0 && v0q.size() == 0) begin
        done <= 1'b1;
        // every valid frame gave every frequency
        for (int f = 0; f < NF; f++)
          if (fvalid(f))
            for (int k = 0; k < N; k++)
              if (!seen[f][k]) begin
                failures <= failures + 1;
                $display("FAIL N1=%0d N2=%0d frame %0d: X(%0d) missing", N1, N2, f, k);
              end
        $display("N1=%0d N2=%0d TA=%0d TM=%0d: %0d valid frames, %0d frames out, frame %0d clocks, latency %0d",
                 N1, N2, TA, TM, n_valid, n_frames_out, F, LAT);
      end
    end
endmodule
