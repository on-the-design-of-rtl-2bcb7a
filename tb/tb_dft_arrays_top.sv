// tb_dft_arrays_top: end-to-end test of the whole design at its default sizes
// (prime-length engine N=5, TA=2, TM=3; scheme-1 engine P=4, Q=5, N=20;
// scheme-2 engine 5 x 3 = 15 points). All three engines run at once on random data, some transforms marked invalid.
// Every output is compared with a direct DFT: exactly for the prime-length
// engine, which keeps full precision, and both bit-exactly against a
// fixed-point Horner model and within rounding error of the exact DFT for the
// scheme-1 engine. The test also counts each mechanism of the design and fails
// if one never happened:
//   tag loads of new samples into the elements, back-to-back bundles with no
//   idle clock, the TA partial sums of y(0) being combined, suppressed
//   invalid bundles, FIFO recirculation, new transforms started by the
//   demultiplexer, final-pass outputs, and for scheme 2: row transforms
//   written into the transpose buffer, column transforms read from it, the
//   idle input clocks of each frame and suppressed invalid frames.
// Scheme-2 outputs are checked bit for bit against a two-stage fixed-point
// model and within a tolerance against the exact 15-point DFT.
module tb_dft_arrays_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int L = 16, CW = 16, FR = CW - 2;
  localparam int RN = 5, TA = 2, TM = 3;
  localparam int P = 4, Q = 5, SN = P * Q;
  localparam int RNB = 30;   // prime-length bundles
  localparam int SNT = 8;    // scheme-1 transforms
  localparam int N1 = 5, N2 = 3, GN = N1 * N2;
  localparam int GNF = 15;   // scheme-2 frames
  localparam real PI = 3.14159265358979323846;

  logic                r_in_valid, s_in_valid;
  logic signed [L-1:0] r_x, r_x0, s_x;
  logic [2:0]          r_x_idx, r_y_k;
  logic                r_x_tag, r_y_valid, r_y0_valid;
  logic signed [35:0]  r_y_re, r_y_im;
  logic signed [19:0]  r_y0;
  logic                s_x_req, s_y_valid;
  logic [4:0]          s_x_idx, s_y_k;
  logic signed [22:0]  s_y_re, s_y_im;
  logic                g_in_valid, g_x_first, g_x_req, g_x_tag, g_y_valid, g_y0_valid;
  logic [3:0]          g_x_idx, g_x0_idx, g_y_k, g_y0_k;
  logic signed [L-1:0] g_x, g_x0;
  logic signed [22:0]  g_y_re, g_y_im, g_y0_re, g_y0_im;

  dft_arrays_top dut (
    .clk, .rst_n,
    .r_in_valid_i(r_in_valid), .r_x_i(r_x), .r_x0_i(r_x0),
    .r_x_idx_o(r_x_idx), .r_x_tag_o(r_x_tag),
    .r_y_re_o(r_y_re), .r_y_im_o(r_y_im), .r_y_valid_o(r_y_valid), .r_y_k_o(r_y_k),
    .r_y0_o(r_y0), .r_y0_valid_o(r_y0_valid),
    .s_in_valid_i(s_in_valid), .s_x_i(s_x),
    .s_x_req_o(s_x_req), .s_x_idx_o(s_x_idx),
    .s_y_re_o(s_y_re), .s_y_im_o(s_y_im), .s_y_valid_o(s_y_valid), .s_y_k_o(s_y_k),
    .g_in_valid_i(g_in_valid), .g_x_first_o(g_x_first), .g_x_req_o(g_x_req),
    .g_x_idx_o(g_x_idx), .g_x_tag_o(g_x_tag), .g_x0_idx_o(g_x0_idx),
    .g_x_i(g_x), .g_x0_i(g_x0),
    .g_y_re_o(g_y_re), .g_y_im_o(g_y_im), .g_y_valid_o(g_y_valid), .g_y_k_o(g_y_k),
    .g_y0_re_o(g_y0_re), .g_y0_im_o(g_y0_im), .g_y0_valid_o(g_y0_valid), .g_y0_k_o(g_y0_k)
  );

  function automatic longint qround(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // ------------------------------------------------------------ stimulus
  longint rx [RNB][RN];
  longint sx [SNT][SN];
  longint rwr [RN], rwi [RN], swr [SN], swi [SN];
  longint hr [SNT][SN], hi [SNT][SN];
  real    fr [SNT][SN], fi [SNT][SN], tol [SNT];

  function automatic bit r_ok(int b); return (b % 7) != 5; endfunction
  function automatic bit s_ok(int t); return (t % 4) != 2; endfunction
  function automatic bit g_ok(int f); return (f % 5) != 3; endfunction

  // scheme-2 data and its expected results
  longint gx [GNF][GN];
  longint gr [GNF][GN], gi [GNF][GN];
  real    gfr [GNF][GN], gfi [GNF][GN];

  function automatic longint rsh(longint v);
    return (v + (longint'(1) <<< (FR - 1))) >>> FR;
  endfunction

  initial begin
    longint w1r [N2], w1i [N2], w2r [N1], w2i [N1];
    longint zr [N1][N2], zi [N1][N2];
    longint ar, ai, br, bi;
    int     k;
    for (int e = 0; e < N2; e++) begin
      w1r[e] = qround($cos(2.0 * PI * e / N2) * real'(1 << FR));
      w1i[e] = qround(-$sin(2.0 * PI * e / N2) * real'(1 << FR));
    end
    for (int e = 0; e < N1; e++) begin
      w2r[e] = qround($cos(2.0 * PI * e / N1) * real'(1 << FR));
      w2i[e] = qround(-$sin(2.0 * PI * e / N1) * real'(1 << FR));
    end
    for (int f = 0; f < GNF; f++) begin
      for (int i = 0; i < GN; i++) gx[f][i] = longint'($signed(L'($urandom)));
      // rows: N2-point transforms, rounded to sample units except k2 = 0
      for (int n1 = 0; n1 < N1; n1++)
        for (int k2 = 0; k2 < N2; k2++) begin
          ar = 0;
          ai = 0;
          for (int n2 = 0; n2 < N2; n2++) begin
            ar += gx[f][(N2 * n1 + N1 * n2) % GN] * w1r[(n2 * k2) % N2];
            ai += gx[f][(N2 * n1 + N1 * n2) % GN] * w1i[(n2 * k2) % N2];
          end
          zr[n1][k2] = (k2 == 0) ? ar >>> FR : rsh(ar);
          zi[n1][k2] = (k2 == 0) ? 0 : rsh(ai);
        end
      // columns: N1-point transforms of the real and imaginary parts
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
          gr[f][k] = (k1 == 0) ? ar >>> FR : rsh(ar - bi);
          gi[f][k] = (k1 == 0) ? br >>> FR : rsh(ai + br);
        end
      for (int kk = 0; kk < GN; kk++) begin
        gfr[f][kk] = 0.0;
        gfi[f][kk] = 0.0;
        for (int i = 0; i < GN; i++) begin
          gfr[f][kk] += real'(gx[f][i]) * $cos(2.0 * PI * ((i * kk) % GN) / GN);
          gfi[f][kk] -= real'(gx[f][i]) * $sin(2.0 * PI * ((i * kk) % GN) / GN);
        end
      end
    end
  end

  initial begin
    for (int e = 0; e < RN; e++) begin
      rwr[e] = qround($cos(2.0 * PI * e / RN) * real'(1 << FR));
      rwi[e] = qround(-$sin(2.0 * PI * e / RN) * real'(1 << FR));
    end
    for (int e = 0; e < SN; e++) begin
      swr[e] = qround($cos(2.0 * PI * e / SN) * real'(1 << FR));
      swi[e] = qround(-$sin(2.0 * PI * e / SN) * real'(1 << FR));
    end
    for (int b = 0; b < RNB; b++)
      for (int i = 0; i < RN; i++) rx[b][i] = longint'($signed(L'($urandom)));
    for (int t = 0; t < SNT; t++) begin
      real sa;
      sa = 0.0;
      for (int i = 0; i < SN; i++) begin
        sx[t][i] = longint'($signed(L'($urandom)));
        sa += (sx[t][i] < 0) ? -real'(sx[t][i]) : real'(sx[t][i]);
      end
      tol[t] = 2.0 * SN + 4.0 * SN * sa / real'(1 << FR);
      for (int k = 0; k < SN; k++) begin
        longint a, b2, pr, pq;
        a = 0;
        b2 = 0;
        fr[t][k] = 0.0;
        fi[t][k] = 0.0;
        for (int i = SN - 1; i >= 0; i--) begin
          pr = a * swr[k] - b2 * swi[k];
          pq = a * swi[k] + b2 * swr[k];
          a  = ((pr + (longint'(1) << (FR - 1))) >>> FR) + sx[t][i];
          b2 = (pq + (longint'(1) << (FR - 1))) >>> FR;
        end
        hr[t][k] = a;
        hi[t][k] = b2;
        for (int i = 0; i < SN; i++) begin
          fr[t][k] += real'(sx[t][i]) * $cos(2.0 * PI * ((i * k) % SN) / SN);
          fi[t][k] -= real'(sx[t][i]) * $sin(2.0 * PI * ((i * k) % SN) / SN);
        end
      end
    end
  end

  int rb, st, sslot;   // bundle / transform being fed, slot within it
  int gf;              // scheme-2 frame starts seen
  always_comb begin
    int b, t, f;
    b = (rb < RNB) ? rb : RNB - 1;
    t = (st < SNT) ? st : SNT - 1;
    r_x        = L'(rx[b][r_x_idx]);
    r_x0       = L'(rx[b][0]);
    r_in_valid = (rb < RNB) && r_ok(rb);
    s_x        = s_x_req ? L'(sx[t][s_x_idx]) : '0;
    s_in_valid = (st < SNT) && s_ok(st);
    f = g_x_first ? gf : gf - 1;
    if (f < 0)    f = 0;
    if (f >= GNF) f = GNF - 1;
    g_x        = g_x_req ? L'(gx[f][g_x_idx]) : '0;
    g_x0       = g_x_tag ? L'(gx[f][g_x0_idx]) : '0;
    g_in_valid = (gf < GNF) && g_ok(gf);
  end

  // ------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  int rq [$], r0q [$], sq [$];
  int rn_out = 0, sn_out = 0;
  int n_tagload = 0, n_b2b = 0, n_y0 = 0, n_skip_r = 0, n_skip_s = 0;
  int n_recirc = 0, n_new = 0, n_final = 0;
  int last_r_out_cyc = -100, cyc = 0;
  int gq [$], g0q [$];
  int gn_out = 0, gn_out0 = 0;
  int n_rows = 0, n_cols = 0, n_idle = 0, n_skip_g = 0, n_gframes = 0;
  logic g_seen [GNF][GN];

  task automatic g_check(int f, int k, logic signed [22:0] yr, logic signed [22:0] yi, bit k1zero);
    real dr, di;
    checks += 3;
    if (longint'(yr) != gr[f][k] || longint'(yi) != gi[f][k])
      fail($sformatf("scheme-2 frame %0d X(%0d) = (%0d,%0d) model (%0d,%0d)",
                     f, k, yr, yi, gr[f][k], gi[f][k]));
    dr = real'(yr) - gfr[f][k];
    di = real'(yi) - gfi[f][k];
    if (dr > 64.0 || -dr > 64.0 || di > 64.0 || -di > 64.0)
      fail($sformatf("scheme-2 frame %0d X(%0d) off the exact DFT", f, k));
    if (g_seen[f][k] || ((k % N1 == 0) != k1zero))
      fail($sformatf("scheme-2 frame %0d X(%0d) twice or on the wrong port", f, k));
    g_seen[f][k] = 1'b1;
  endtask

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // mechanism counters from the design's own signals
    if (dut.u_rader.u_array.g_pe[RN-1].u_pe.tc_i) n_tagload++;
    if (dut.u_scheme1.pe1_pass != '0) n_recirc++;
    if (dut.u_scheme1.pe1_pass == '0 && dut.u_scheme1.head) n_new++;

    if (dut.u_scheme2.s1_valid) n_rows++;
    if (dut.u_scheme2.s2_in_valid && dut.u_scheme2.a_tag) n_cols++;

    // scheme-2 engine
    if (!g_x_req) n_idle++;
    if (g_x_first) begin
      if (gf < GNF) begin
        if (g_ok(gf)) begin
          gq.push_back(gf);
          g0q.push_back(gf);
        end else n_skip_g++;
      end
      gf++;
    end
    if (g_y_valid) begin
      if (gq.size() == 0) fail("scheme-2 engine: output with no frame pending");
      else begin
        g_check(gq[0], int'(g_y_k), g_y_re, g_y_im, 1'b0);
        if (gn_out == (N1 - 1) * N2 - 1) begin
          void'(gq.pop_front());
          gn_out = 0;
          n_gframes++;
        end else gn_out++;
      end
    end
    if (g_y0_valid) begin
      if (g0q.size() == 0) fail("scheme-2 engine: k1=0 output with no frame pending");
      else begin
        g_check(g0q[0], int'(g_y0_k), g_y0_re, g_y0_im, 1'b1);
        if (gn_out0 == N2 - 1) begin
          void'(g0q.pop_front());
          gn_out0 = 0;
        end else gn_out0++;
      end
    end

    // prime-length engine: input side
    if (r_x_tag && rb < RNB) begin
      if (r_ok(rb)) begin
        rq.push_back(rb);
        r0q.push_back(rb);
      end else n_skip_r++;
      rb++;
    end
    // prime-length engine: outputs
    if (r_y_valid) begin
      if (rq.size() == 0) fail("prime engine: output with no bundle pending");
      else begin
        longint er, ei;
        er = 0;
        ei = 0;
        for (int i = 0; i < RN; i++) begin
          er += rx[rq[0]][i] * rwr[(i * r_y_k) % RN];
          ei += rx[rq[0]][i] * rwi[(i * r_y_k) % RN];
        end
        checks++;
        if (longint'(r_y_re) != er || longint'(r_y_im) != ei)
          fail($sformatf("prime engine bundle %0d y(%0d) = (%0d,%0d) want (%0d,%0d)",
                         rq[0], r_y_k, r_y_re, r_y_im, er, ei));
        if (rn_out == 0 && last_r_out_cyc == cyc - 1) n_b2b++;
        last_r_out_cyc = cyc;
        if (rn_out == RN - 2) begin
          void'(rq.pop_front());
          rn_out = 0;
        end else rn_out++;
      end
    end
    if (r_y0_valid) begin
      if (r0q.size() == 0) fail("prime engine: y(0) with no bundle pending");
      else begin
        longint e0;
        e0 = 0;
        for (int i = 0; i < RN; i++) e0 += rx[r0q[0]][i];
        checks++;
        n_y0++;
        if (longint'(r_y0) != e0)
          fail($sformatf("prime engine bundle %0d y(0) = %0d want %0d", r0q[0], r_y0, e0));
        void'(r0q.pop_front());
      end
    end

    // scheme-1 engine: input side
    if (s_x_req && st < SNT) begin
      if (sslot == SN - 1) begin
        if (s_ok(st)) sq.push_back(st);
        else n_skip_s++;
        st++;
        sslot = 0;
      end else sslot++;
    end
    // scheme-1 engine: outputs
    if (s_y_valid) begin
      if (sq.size() == 0) fail("scheme-1 engine: output with no transform pending");
      else begin
        int t;
        real dr, di;
        t = sq[0];
        checks += 3;
        n_final++;
        if (int'(s_y_k) != sn_out) fail($sformatf("scheme-1 index %0d want %0d", s_y_k, sn_out));
        if (longint'(s_y_re) != hr[t][s_y_k] || longint'(s_y_im) != hi[t][s_y_k])
          fail($sformatf("scheme-1 transform %0d y(%0d) = (%0d,%0d) Horner model (%0d,%0d)",
                         t, s_y_k, s_y_re, s_y_im, hr[t][s_y_k], hi[t][s_y_k]));
        dr = real'(s_y_re) - fr[t][s_y_k];
        di = real'(s_y_im) - fi[t][s_y_k];
        if (dr > tol[t] || -dr > tol[t] || di > tol[t] || -di > tol[t])
          fail($sformatf("scheme-1 transform %0d y(%0d) off the exact DFT", t, s_y_k));
        if (sn_out == SN - 1) begin
          void'(sq.pop_front());
          sn_out = 0;
        end else sn_out++;
      end
    end
  end

  initial begin
    rb = 0; st = 0; sslot = 0; gf = 0;
    for (int f = 0; f < GNF; f++)
      for (int k = 0; k < GN; k++) g_seen[f][k] = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (st == SNT && sq.size() == 0 && rb == RNB && rq.size() == 0 && r0q.size() == 0 &&
          gf >= GNF && gq.size() == 0 && g0q.size() == 0);
    repeat (5) @(posedge clk);
    $display("mechanisms: tag loads %0d, back-to-back bundles %0d, y(0) sums %0d, skipped bundles %0d/%0d,",
             n_tagload, n_b2b, n_y0, n_skip_r, n_skip_s);
    $display("            FIFO recirculations %0d, new transforms %0d, final-pass outputs %0d",
             n_recirc, n_new, n_final);
    $display("            scheme 2: row outputs buffered %0d, columns %0d, idle input clocks %0d, skipped frames %0d, frames out %0d",
             n_rows, n_cols, n_idle, n_skip_g, n_gframes);
    checks += 14;
    for (int f = 0; f < GNF; f++)
      if (g_ok(f))
        for (int k = 0; k < GN; k++)
          if (!g_seen[f][k]) fail($sformatf("scheme-2 frame %0d X(%0d) missing", f, k));
    if (n_rows == 0)    fail("no row transform written");
    if (n_cols == 0)    fail("no column transform read");
    if (n_idle == 0)    fail("no idle input clock");
    if (n_skip_g == 0)  fail("no invalid scheme-2 frame");
    if (n_gframes == 0) fail("no scheme-2 frame out");
    if (n_gframes != GNF - GNF / 5) fail($sformatf("scheme-2 frames out %0d", n_gframes));
    if (n_tagload == 0) fail("no tag load");
    if (n_b2b == 0)     fail("no back-to-back bundles");
    if (n_y0 == 0)      fail("no y(0) result");
    if (n_skip_r == 0)  fail("no invalid prime-length bundle");
    if (n_skip_s == 0)  fail("no invalid scheme-1 transform");
    if (n_recirc == 0)  fail("no FIFO recirculation");
    if (n_new == 0)     fail("no new transform started");
    if (n_final == 0)   fail("no final-pass output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((SNT + 2) * P * SN + 200) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
