// rader_dft_harness: drives one rader_dft instance with NB random bundles and
// checks every output against a direct DFT computed here,
//   y(k) = sum_i x(i) * W^(ik mod N),
// with W quantised the same way (round to nearest, CW-2 fractional bits).
// Every fourth bundle is marked invalid and must produce no output.
// It also checks the latency of the first bundle, from its first sample to its
// last output, (N-1)*TA + TM + 2N - 3 clocks inclusive, and that valid bundles
// leave back to back, one every N-1 clocks.
module rader_dft_harness #(
  parameter int N  = 5,
  parameter int TA = 2,
  parameter int TM = 3,
  parameter int NB = 12,
  parameter int L  = 16,
  parameter int CW = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int IW  = $clog2(N);
  localparam int YW  = L + CW + $clog2(N) + 1;
  localparam int Y0W = L + $clog2(N) + 1;
  localparam real PI = 3.14159265358979323846;

  logic                  in_valid;
  logic signed [L-1:0]   x_i, x0;
  logic [IW-1:0]         x_idx;
  logic                  x_tag;
  logic signed [YW-1:0]  y_re, y_im;
  logic                  y_valid;
  logic [IW-1:0]         y_k;
  logic signed [Y0W-1:0] y0;
  logic                  y0_valid;

  rader_dft #(.N(N), .L(L), .CW(CW), .TA(TA), .TM(TM)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .x_i, .x0_i(x0),
    .x_idx_o(x_idx), .x_tag_o(x_tag),
    .y_re_o(y_re), .y_im_o(y_im), .y_valid_o(y_valid), .y_k_o(y_k),
    .y0_o(y0), .y0_valid_o(y0_valid)
  );

  longint xs   [NB][N];
  longint wr   [N];
  longint wi   [N];
  int     b_in;          // bundle being fed
  int     vq [$];        // valid bundles awaiting y(k)
  int     v0q [$];       // valid bundles awaiting y(0)
  int     nout;          // outputs seen of the front bundle
  int     cyc;
  int     first_out_cyc [NB];
  int     n_valid, n_out_bundles, n_tags;
  logic   seen_k [N];

  function automatic longint qround(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int e = 0; e < N; e++) begin
      wr[e] = qround($cos(2.0 * PI * e / N) * real'(1 << (CW - 2)));
      wi[e] = qround(-$sin(2.0 * PI * e / N) * real'(1 << (CW - 2)));
    end
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) begin
        // full-scale extremes in bundle 1, random elsewhere
        if (b == 1) xs[b][i] = -(longint'(1) << (L - 1));
        else        xs[b][i] = longint'($signed(L'($urandom)));
      end
  end

  function automatic bit bvalid(int b);
    return (b % 4) != 3;
  endfunction

  // drive the sample the engine asks for
  always_comb begin
    int bb;
    bb = (b_in < NB) ? b_in : NB - 1;
    x_i      = L'(xs[bb][x_idx]);
    x0       = L'(xs[bb][0]);
    in_valid = (b_in < NB) && bvalid(b_in);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      b_in <= 0; cyc <= 0; nout <= 0; n_valid <= 0; n_out_bundles <= 0; n_tags <= 0;
      checks <= 0; failures <= 0; done <= 1'b0;
      for (int k = 0; k < N; k++) seen_k[k] <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (x_tag) begin
        n_tags <= n_tags + 1;
        if (b_in < NB) begin
          if (bvalid(b_in)) begin
            vq.push_back(b_in);
            v0q.push_back(b_in);
            n_valid <= n_valid + 1;
          end
          b_in <= b_in + 1;
        end
      end
      if (y_valid) begin
        automatic longint er = 0, ei = 0;
        automatic int b;
        if (vq.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL N=%0d TA=%0d TM=%0d: output with no bundle pending", N, TA, TM);
        end else begin
          b = vq[0];
          for (int i = 0; i < N; i++) begin
            er += xs[b][i] * wr[(i * y_k) % N];
            ei += xs[b][i] * wi[(i * y_k) % N];
          end
          checks <= checks + 1;
          if (longint'(y_re) != er || longint'(y_im) != ei) begin
            failures <= failures + 1;
            $display("FAIL N=%0d TA=%0d TM=%0d bundle %0d y(%0d) = (%0d,%0d), want (%0d,%0d)",
                     N, TA, TM, b, y_k, y_re, y_im, er, ei);
          end
          if (nout == 0) first_out_cyc[b] = cyc;
          seen_k[y_k] <= 1'b1;
          if (nout == N - 2) begin
            void'(vq.pop_front());
            nout <= 0;
            n_out_bundles <= n_out_bundles + 1;
            // latency of bundle 0: first sample in clock 0
            if (b == 0) begin
              checks <= checks + 2;
              if (cyc + 1 != (N - 1) * TA + TM + 2 * N - 3) begin
                failures <= failures + 2;
                $display("FAIL N=%0d TA=%0d TM=%0d latency %0d, want %0d", N, TA, TM,
                         cyc + 1, (N - 1) * TA + TM + 2 * N - 3);
              end
            end
            // bundles 0,1,2 are valid and consecutive: N-1 clocks apart
            if (b == 1 || b == 2) begin
              checks <= checks + 1;
              if (first_out_cyc[b] - first_out_cyc[b-1] != N - 1) begin
                failures <= failures + 1;
                $display("FAIL N=%0d: bundle spacing %0d", N, first_out_cyc[b] - first_out_cyc[b-1]);
              end
            end
          end else begin
            nout <= nout + 1;
          end
        end
      end
      if (y0_valid) begin
        automatic longint e0 = 0;
        if (v0q.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL N=%0d: y(0) with no bundle pending", N);
        end else begin
          for (int i = 0; i < N; i++) e0 += xs[v0q[0]][i];
          checks <= checks + 1;
          if (longint'(y0) != e0) begin
            failures <= failures + 1;
            $display("FAIL N=%0d TA=%0d TM=%0d bundle %0d y(0) = %0d, want %0d", N, TA, TM,
                     v0q[0], y0, e0);
          end
          void'(v0q.pop_front());
        end
      end
      // all fed and drained: final bookkeeping
      if (!done && b_in == NB && vq.size() == 0 && v0q.size() == 0 &&
          cyc > NB * (N - 1) + TM + TA * N + N) begin
        done   <= 1'b1;
        checks <= checks + 2;
        if (n_out_bundles != n_valid) begin
          failures <= failures + 1;
          $display("FAIL N=%0d: %0d bundles out, %0d valid in", N, n_out_bundles, n_valid);
        end
        for (int k = 1; k < N; k++)
          if (!seen_k[k]) begin
            failures <= failures + 1;
            $display("FAIL N=%0d: frequency %0d never produced", N, k);
          end
      end
    end
endmodule
