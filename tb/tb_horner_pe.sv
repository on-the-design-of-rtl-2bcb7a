// tb_horner_pe: self-checking test of the Horner-rule element. Random partial
// results, twiddles and samples every clock, tags at random. A model here
// keeps the stationary sample (reloaded from tp in the tag clock) and
// predicts, one clock later,
//   y_o = round(y * w / 2^(CW-2)) + x,  w_o = w, tc_o = tc,
// and tp_o two clocks later. A second, pipelined element (T = 3) on the same
// inputs must give the same results three clocks later, tp_o four.
module tb_horner_pe;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int L = 16, CW = 16, YW = 24, FR = CW - 2;
  localparam int NCYC = 400;

  int checks = 0, failures = 0, n_tags = 0;
  logic signed [YW-1:0] y_re, y_im, yo_re, yo_im;
  logic signed [CW-1:0] w_re, w_im, wo_re, wo_im;
  logic signed [L-1:0]  tp, tpo;
  logic                 tc, tco;

  horner_pe #(.L(L), .CW(CW), .YW(YW)) dut (
    .clk, .rst_n, .y_re_i(y_re), .y_im_i(y_im), .w_re_i(w_re), .w_im_i(w_im),
    .tp_i(tp), .tc_i(tc), .y_re_o(yo_re), .y_im_o(yo_im), .w_re_o(wo_re), .w_im_o(wo_im),
    .tp_o(tpo), .tc_o(tco));

  // pipelined element, T = 3: same results T clocks later, tp T+1 clocks later
  localparam int T3 = 3;
  logic signed [YW-1:0] p_re, p_im;
  logic signed [CW-1:0] pw_re, pw_im;
  logic signed [L-1:0]  ptp;
  logic                 ptc;
  horner_pe #(.L(L), .CW(CW), .YW(YW), .T(T3)) dut3 (
    .clk, .rst_n, .y_re_i(y_re), .y_im_i(y_im), .w_re_i(w_re), .w_im_i(w_im),
    .tp_i(tp), .tc_i(tc), .y_re_o(p_re), .y_im_o(p_im), .w_re_o(pw_re), .w_im_o(pw_im),
    .tp_o(ptp), .tc_o(ptc));

  longint h_yr [NCYC], h_yi [NCYC], h_wr [NCYC], h_wi [NCYC], h_tp [NCYC], h_x [NCYC];
  bit     h_tc [NCYC];

  function automatic longint rnd(longint p);
    return (p + (longint'(1) << (FR - 1))) >>> FR;
  endfunction

  task automatic chk(string nm, longint got, longint want, int t);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s at clock %0d: got %0d want %0d", nm, t, got, want);
    end
  endtask

  initial begin
    longint xm;
    xm = 0;
    y_re = '0; y_im = '0; w_re = '0; w_im = '0; tp = '0; tc = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < NCYC; t++) begin
      y_re = YW'($signed(21'($urandom)));
      y_im = YW'($signed(21'($urandom)));
      w_re = CW'($signed(15'($urandom)));
      w_im = CW'($signed(15'($urandom)));
      tp   = L'($urandom);
      tc   = (t == 0) || ($urandom % 4 == 0);
      if (tc) begin
        xm = longint'(tp);
        n_tags++;
      end
      h_yr[t] = y_re; h_yi[t] = y_im; h_wr[t] = w_re; h_wi[t] = w_im;
      h_tp[t] = tp;   h_tc[t] = tc;   h_x[t]  = xm;
      #1;
      if (t >= 1) begin
        chk("y_re", yo_re, rnd(h_yr[t-1] * h_wr[t-1] - h_yi[t-1] * h_wi[t-1]) + h_x[t-1], t);
        chk("y_im", yo_im, rnd(h_yr[t-1] * h_wi[t-1] + h_yi[t-1] * h_wr[t-1]), t);
        chk("w_re", wo_re, h_wr[t-1], t);
        chk("w_im", wo_im, h_wi[t-1], t);
        chk("tc",   tco,   h_tc[t-1], t);
      end
      if (t >= 2) chk("tp", tpo, h_tp[t-2], t);
      if (t >= T3) begin
        chk("T=3 y_re", p_re, rnd(h_yr[t-T3] * h_wr[t-T3] - h_yi[t-T3] * h_wi[t-T3]) + h_x[t-T3], t);
        chk("T=3 y_im", p_im, rnd(h_yr[t-T3] * h_wi[t-T3] + h_yi[t-T3] * h_wr[t-T3]), t);
        chk("T=3 w_re", pw_re, h_wr[t-T3], t);
        chk("T=3 w_im", pw_im, h_wi[t-T3], t);
        chk("T=3 tc",   ptc,   h_tc[t-T3], t);
      end
      if (t >= T3 + 1) chk("T=3 tp", ptp, h_tp[t-T3-1], t);
      @(negedge clk);
    end
    checks++;
    if (n_tags < 10) begin
      failures++;
      $display("FAIL only %0d tags", n_tags);
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
