// rader_array_harness: drives one rader_array directly with a boundary schedule
// built here, independent of rader_ctrl:
//   a primitive root g of N found by search; in the N-1 clocks of bundle b
//   (r = 0..N-2) tp carries x_b(g^r mod N); tc and x0 come in slot r = N-2;
//   w carries W^(g^m), m = (r+1) mod (N-1).
// Expected: y(g^k) of bundle b, k = 1..N-1, in clock t0 + TM + TA*(N-1) + k-1
// (t0 = the bundle's tag clock), and y(0) with its valid flag in t0 + TA + 1.
// Both are compared with a direct DFT.
module rader_array_harness #(
  parameter int N  = 5,
  parameter int TA = 2,
  parameter int TM = 3,
  parameter int NB = 10,
  parameter int L  = 16,
  parameter int CW = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int YW  = L + CW + $clog2(N) + 1;
  localparam int Y0W = L + $clog2(N) + 1;
  localparam real PI = 3.14159265358979323846;
  localparam int NCYC = (NB + 2) * (N - 1) + TM + TA * N + 4;

  logic signed [L-1:0]   tp, x0;
  logic                  tc;
  logic signed [CW-1:0]  w_re, w_im;
  logic signed [YW-1:0]  y_re, y_im;
  logic signed [Y0W-1:0] y0;
  logic                  y0v;

  rader_array #(.N(N), .L(L), .CW(CW), .TA(TA), .TM(TM)) dut (
    .clk, .rst_n, .tp_i(tp), .tc_i(tc), .x0_i(x0), .w_re_i(w_re), .w_im_i(w_im),
    .y_re_o(y_re), .y_im_o(y_im), .y0_o(y0), .y0_valid_o(y0v));

  longint xs [NB+2][N];
  longint wr [N], wi [N];
  int     gpow [N];
  int     g;

  function automatic longint qround(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  initial begin
    // primitive root by search
    g = 0;
    for (int c = 2; c < N && g == 0; c++) begin
      int v, ord;
      v = 1;
      ord = 0;
      for (int i = 1; i < N; i++) begin
        v = (v * c) % N;
        if (v == 1 && ord == 0) ord = i;
      end
      if (ord == N - 1) g = c;
    end
    gpow[0] = 1;
    for (int i = 1; i < N; i++) gpow[i] = (gpow[i-1] * g) % N;
    for (int e = 0; e < N; e++) begin
      wr[e] = qround($cos(2.0 * PI * e / N) * real'(1 << (CW - 2)));
      wi[e] = qround(-$sin(2.0 * PI * e / N) * real'(1 << (CW - 2)));
    end
    for (int b = 0; b < NB + 2; b++)
      for (int i = 0; i < N; i++) xs[b][i] = longint'($signed(L'($urandom)));
  end

  int cyc;
  always_comb begin
    int b, r;
    b = cyc / (N - 1);
    r = cyc % (N - 1);
    if (b > NB + 1) b = NB + 1;
    tp   = L'(xs[b][gpow[r]]);
    tc   = (r == N - 2);
    x0   = L'(xs[b][0]);
    w_re = CW'(wr[gpow[(r + 1) % (N - 1)]]);
    w_im = CW'(wi[gpow[(r + 1) % (N - 1)]]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cyc <= 0; checks <= 0; failures <= 0; done <= 1'b0;
    end else if (!done) begin
      automatic int rel = cyc - (N - 2) - TM - TA * (N - 1);  // clocks after bundle 0's first output
      automatic int rel0 = cyc - (N - 2) - TA - 1;
      cyc <= cyc + 1;
      if (rel >= 0 && rel / (N - 1) < NB) begin
        automatic int b = rel / (N - 1);
        automatic int k = rel % (N - 1) + 1;
        automatic int f = gpow[k];
        automatic longint er = 0, ei = 0;
        for (int i = 0; i < N; i++) begin
          er += xs[b][i] * wr[(i * f) % N];
          ei += xs[b][i] * wi[(i * f) % N];
        end
        checks <= checks + 1;
        if (longint'(y_re) != er || longint'(y_im) != ei) begin
          failures <= failures + 1;
          $display("FAIL N=%0d TA=%0d TM=%0d bundle %0d y(%0d) = (%0d,%0d) want (%0d,%0d)",
                   N, TA, TM, b, f, y_re, y_im, er, ei);
        end
      end
      if (rel0 >= 0 && rel0 / (N - 1) < NB) begin
        automatic bit want_v = (rel0 % (N - 1)) == 0;
        checks <= checks + 1;
        if (y0v != want_v) begin
          failures <= failures + 1;
          $display("FAIL N=%0d TA=%0d: y0_valid=%0d at clock %0d", N, TA, y0v, cyc);
        end else if (want_v) begin
          automatic longint e0 = 0;
          for (int i = 0; i < N; i++) e0 += xs[rel0 / (N - 1)][i];
          if (longint'(y0) != e0) begin
            failures <= failures + 1;
            $display("FAIL N=%0d TA=%0d: y(0)=%0d want %0d", N, TA, y0, e0);
          end
        end
      end
      if (cyc == NCYC) done <= 1'b1;
    end
endmodule
