// tb_rader_ctrl: self-checking test of the boundary sequencer of the
// prime-length array, for N=5 (TA=2, TM=3) and N=7 (TA=1, TM=0). With a
// primitive root found here by search it predicts, clock by clock: the
// requested sample index g^r mod N, the tag in slot N-2, the twiddle
// W^(g^((r+1) mod (N-1))), and, for bundles marked valid at random, the output
// window (TM + TA*(N-1) clocks after the tag, indices g^1..g^(N-1)) and the
// y(0) flag (TA+1 clocks after the tag).
module tb_rader_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 2;
  localparam int NS  [NCFG] = '{5, 7};
  localparam int TAS [NCFG] = '{2, 1};
  localparam int TMS [NCFG] = '{3, 0};
  localparam int CW = 16;
  localparam int NCYC = 300;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic in_valid;
  logic [2:0] x_idx [NCFG];
  logic       tag [NCFG];
  logic signed [CW-1:0] w_re [NCFG], w_im [NCFG];
  logic       ov [NCFG];
  logic [2:0] ok [NCFG];
  logic       y0v [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_dut
    rader_ctrl #(.N(NS[c]), .CW(CW), .TA(TAS[c]), .TM(TMS[c])) dut (
      .clk, .rst_n, .in_valid_i(in_valid),
      .x_idx_o(x_idx[c]), .tag_o(tag[c]), .w_re_o(w_re[c]), .w_im_o(w_im[c]),
      .out_valid_o(ov[c]), .out_k_o(ok[c]), .y0_valid_o(y0v[c]));
  end

  function automatic int qround(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int proot(int n);
    for (int c = 2; c < n; c++) begin
      int v = 1, ord = 0;
      for (int i = 1; i < n; i++) begin
        v = (v * c) % n;
        if (v == 1 && ord == 0) ord = i;
      end
      if (ord == n - 1) return c;
    end
    return 1;
  endfunction

  function automatic int mpow(int b, int e, int n);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % n;
    return r;
  endfunction

  task automatic chk(string nm, int got, int want, int c, int t);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL N=%0d %s at clock %0d: got %0d want %0d", NS[c], nm, t, got, want);
    end
  endtask

  bit h_bv [NCFG][NCYC];

  initial begin
    int n_valid_out;
    n_valid_out = 0;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < NCYC; t++) begin
      in_valid = ($urandom % 3) != 0;
      #1;
      for (int c = 0; c < NCFG; c++) begin
        automatic int n = NS[c], g = proot(NS[c]);
        automatic int r = t % (n - 1);
        automatic int e = mpow(g, (r + 1) % (n - 1), n);
        automatic int d = TMS[c] + TAS[c] * (n - 1);
        automatic bit want_ov = 1'b0;
        automatic int want_k = 0;
        h_bv[c][t] = (r == n - 2) && in_valid;
        chk("x_idx", x_idx[c], mpow(g, r, n), c, t);
        chk("tag", tag[c], r == n - 2, c, t);
        chk("w_re", w_re[c], qround($cos(2.0 * PI * e / n) * 16384.0), c, t);
        chk("w_im", w_im[c], qround(-$sin(2.0 * PI * e / n) * 16384.0), c, t);
        // output window: clock t belongs to the bundle tagged at t0 = t - d - j
        if (t - d >= 0) begin
          automatic int j = (t - d - (n - 2)) % (n - 1);
          automatic int t0;
          if (j < 0) j += n - 1;
          t0 = t - d - j;
          if (t0 >= 0) begin
            want_ov = h_bv[c][t0];
            want_k  = mpow(g, j + 1, n);
          end
        end
        chk("out_valid", ov[c], want_ov, c, t);
        if (want_ov) begin
          chk("out_k", ok[c], want_k, c, t);
          n_valid_out++;
        end
        chk("y0_valid", y0v[c], (t >= TAS[c] + 1) ? h_bv[c][t - TAS[c] - 1] : 1'b0, c, t);
      end
      @(negedge clk);
    end
    checks++;
    if (n_valid_out < 50) begin
      failures++;
      $display("FAIL only %0d valid outputs", n_valid_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
