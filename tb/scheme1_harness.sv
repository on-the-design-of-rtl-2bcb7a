// scheme1_harness: drives one scheme1_array with NT random transforms (every
// third marked invalid) and checks each output two ways:
//  * bit-exactly against a Horner evaluation written here in plain integer
//    arithmetic, y <- round(y * W^k / 2^(CW-2)) + x(i) for i = N-1 down to 0,
//    with the same rounding the array uses;
//  * against the exact DFT in floating point, within the rounding error that
//    N fixed-point steps can accumulate.
// It also checks the latency of the first transform (P*N + Q*T + Q - 1 clocks from
// its first sample to its last output, inclusive) and the spacing of P*N
// clocks between consecutive valid transforms.
module scheme1_harness #(
  parameter int P  = 4,
  parameter int Q  = 5,
  parameter int NT = 6,
  parameter int L  = 16,
  parameter int CW = 16,
  parameter int T  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_recirc,     // partial results fed back through the FIFO
  output int   n_new,        // transforms started by the demultiplexer
  output logic done
);
  localparam int N  = P * Q;
  localparam int IW = $clog2(N);
  localparam int YW = L + $clog2(N) + 2;
  localparam int FR = CW - 2;
  localparam real PI = 3.14159265358979323846;

  logic                 in_valid, x_req, y_valid;
  logic signed [L-1:0]  x_i;
  logic [IW-1:0]        x_idx, y_k;
  logic signed [YW-1:0] y_re, y_im;

  scheme1_array #(.P(P), .Q(Q), .L(L), .CW(CW), .T(T)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .x_i, .x_req_o(x_req), .x_idx_o(x_idx),
    .y_re_o(y_re), .y_im_o(y_im), .y_valid_o(y_valid), .y_k_o(y_k)
  );

  longint xs [NT][N];
  longint wr [N];
  longint wi [N];
  longint hr [NT][N];   // Horner reference
  longint hi [NT][N];
  real    fr [NT][N];   // floating-point DFT
  real    fi [NT][N];
  real    tol [NT];

  function automatic longint qround(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic bit tvalid(int t);
    return (t % 3) != 2;
  endfunction

  initial begin
    for (int e = 0; e < N; e++) begin
      wr[e] = qround($cos(2.0 * PI * e / N) * real'(1 << FR));
      wi[e] = qround(-$sin(2.0 * PI * e / N) * real'(1 << FR));
    end
    for (int t = 0; t < NT; t++) begin
      real sa;
      sa = 0.0;
      for (int i = 0; i < N; i++) begin
        if (t == 1) xs[t][i] = (i % 2 == 0) ? longint'(1 << (L - 1)) - 1 : -(longint'(1) << (L - 1));
        else        xs[t][i] = longint'($signed(L'($urandom)));
        sa += (xs[t][i] < 0) ? -real'(xs[t][i]) : real'(xs[t][i]);
      end
      tol[t] = 2.0 * N + 4.0 * N * sa / real'(1 << FR);
      for (int k = 0; k < N; k++) begin
        longint yr_, yi_, pr, pi_;
        yr_ = 0;
        yi_ = 0;
        fr[t][k] = 0.0;
        fi[t][k] = 0.0;
        for (int i = N - 1; i >= 0; i--) begin
          pr  = yr_ * wr[k] - yi_ * wi[k];
          pi_ = yr_ * wi[k] + yi_ * wr[k];
          yr_ = ((pr + (longint'(1) << (FR - 1))) >>> FR) + xs[t][i];
          yi_ = (pi_ + (longint'(1) << (FR - 1))) >>> FR;
        end
        hr[t][k] = yr_;
        hi[t][k] = yi_;
        for (int i = 0; i < N; i++) begin
          fr[t][k] += real'(xs[t][i]) * $cos(2.0 * PI * ((i * k) % N) / N);
          fi[t][k] -= real'(xs[t][i]) * $sin(2.0 * PI * ((i * k) % N) / N);
        end
      end
    end
  end

  int t_in;        // transform being fed
  int nslot;       // input slots of it seen
  int vq [$];
  int nout, cyc, n_valid, n_done;
  int first_in_cyc [NT];
  int first_out_cyc [NT];

  always_comb begin
    int tt;
    tt       = (t_in < NT) ? t_in : NT - 1;
    x_i      = x_req ? L'(xs[tt][x_idx]) : '0;
    in_valid = (t_in < NT) && tvalid(t_in);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      t_in <= 0; nslot <= 0; nout <= 0; cyc <= 0; n_valid <= 0; n_done <= 0;
      checks <= 0; failures <= 0; n_recirc <= 0; n_new <= 0; done <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (dut.pe1_pass != '0) n_recirc <= n_recirc + 1;
      if (dut.pe1_pass == '0 && dut.head) n_new <= n_new + 1;
      if (x_req && t_in < NT) begin
        if (nslot == 0) first_in_cyc[t_in] = cyc;
        if (nslot == N - 1) begin
          if (tvalid(t_in)) begin
            vq.push_back(t_in);
            n_valid <= n_valid + 1;
          end
          t_in  <= t_in + 1;
          nslot <= 0;
        end else begin
          nslot <= nslot + 1;
        end
      end
      if (y_valid) begin
        automatic int t;
        automatic real dr, di;
        if (vq.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL P=%0d Q=%0d: output with no transform pending", P, Q);
        end else begin
          t = vq[0];
          checks <= checks + 3;
          if (int'(y_k) != nout) begin
            failures <= failures + 1;
            $display("FAIL P=%0d Q=%0d: output index %0d, want %0d", P, Q, y_k, nout);
          end
          if (longint'(y_re) != hr[t][y_k] || longint'(y_im) != hi[t][y_k]) begin
            failures <= failures + 1;
            $display("FAIL P=%0d Q=%0d transform %0d y(%0d) = (%0d,%0d), Horner model (%0d,%0d)",
                     P, Q, t, y_k, y_re, y_im, hr[t][y_k], hi[t][y_k]);
          end
          dr = real'(y_re) - fr[t][y_k];
          di = real'(y_im) - fi[t][y_k];
          if (dr > tol[t] || -dr > tol[t] || di > tol[t] || -di > tol[t]) begin
            failures <= failures + 1;
            $display("FAIL P=%0d Q=%0d transform %0d y(%0d) off the exact DFT by (%f,%f)",
                     P, Q, t, y_k, dr, di);
          end
          if (nout == 0) first_out_cyc[t] = cyc;
          if (nout == N - 1) begin
            void'(vq.pop_front());
            nout   <= 0;
            n_done <= n_done + 1;
            if (t == 0) begin
              checks <= checks + 4;
              if (cyc - first_in_cyc[0] + 1 != P * N + Q * T + Q - 1) begin
                failures <= failures + 1;
                $display("FAIL P=%0d Q=%0d latency %0d, want %0d", P, Q,
                         cyc - first_in_cyc[0] + 1, P * N + Q * T + Q - 1);
              end
            end
            if (t == 1) begin
              checks <= checks + 4;
              if (first_out_cyc[1] - first_out_cyc[0] != P * N) begin
                failures <= failures + 1;
                $display("FAIL P=%0d Q=%0d spacing %0d", P, Q, first_out_cyc[1] - first_out_cyc[0]);
              end
            end
          end else begin
            nout <= nout + 1;
          end
        end
      end
      if (!done && t_in == NT && vq.size() == 0 && cyc > (NT + 1) * P * N + Q * T + Q) begin
        done   <= 1'b1;
        checks <= checks + 1;
        if (n_done != n_valid) begin
          failures <= failures + 1;
          $display("FAIL P=%0d Q=%0d: %0d transforms out, %0d valid in", P, Q, n_done, n_valid);
        end
      end
    end
endmodule
