// tb_rader_pe: self-checking test of one white element of the prime-length
// array, in its pipelined form (TA=2, TM=3) and its plain systolic form
// (TA=1, TM=0). Random partial results, twiddles and samples are driven every
// clock, and tags arrive at random. A model here tracks the stationary sample
// (reloaded from tp in the tag clock) and predicts
//   y_o(t) = y_i(t-TA) + x(t-TA-TM) * w(t-TA-TM),
// w_o and tp_o delayed TA+1 clocks, tc_o delayed TA clocks.
module tb_rader_pe;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int L = 16, CW = 16, YW = 36;
  localparam int NCYC = 400;

  int checks = 0, failures = 0, n_tags = 0;

  // stimulus, identical for both instances
  logic signed [YW-1:0] y_re, y_im;
  logic signed [CW-1:0] w_re, w_im;
  logic signed [L-1:0]  tp;
  logic                 tc;

  logic signed [YW-1:0] a_yr, a_yi, b_yr, b_yi;
  logic signed [CW-1:0] a_wr, a_wi, b_wr, b_wi;
  logic signed [L-1:0]  a_tp, b_tp;
  logic                 a_tc, b_tc;

  rader_pe #(.L(L), .CW(CW), .YW(YW), .TA(2), .TM(3)) dut_a (
    .clk, .rst_n, .y_re_i(y_re), .y_im_i(y_im), .w_re_i(w_re), .w_im_i(w_im),
    .tp_i(tp), .tc_i(tc), .y_re_o(a_yr), .y_im_o(a_yi), .w_re_o(a_wr), .w_im_o(a_wi),
    .tp_o(a_tp), .tc_o(a_tc));
  rader_pe #(.L(L), .CW(CW), .YW(YW), .TA(1), .TM(0)) dut_b (
    .clk, .rst_n, .y_re_i(y_re), .y_im_i(y_im), .w_re_i(w_re), .w_im_i(w_im),
    .tp_i(tp), .tc_i(tc), .y_re_o(b_yr), .y_im_o(b_yi), .w_re_o(b_wr), .w_im_o(b_wi),
    .tp_o(b_tp), .tc_o(b_tc));

  // history of inputs, index = clock number
  longint h_yr [NCYC], h_yi [NCYC], h_wr [NCYC], h_wi [NCYC], h_tp [NCYC], h_x [NCYC];
  bit     h_tc [NCYC];

  task automatic check(string nm, longint got, longint want, int t);
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
      // drive clock t
      y_re = YW'($signed($urandom));
      y_im = YW'($signed($urandom));
      w_re = CW'($urandom);
      w_im = CW'($urandom);
      tp   = L'($urandom);
      tc   = (t == 0) || ($urandom % 4 == 0);
      if (tc) begin
        xm = longint'(tp);
        n_tags++;
      end
      h_yr[t] = y_re; h_yi[t] = y_im; h_wr[t] = w_re; h_wi[t] = w_im;
      h_tp[t] = tp;   h_tc[t] = tc;   h_x[t]  = xm;
      #1;
      // outputs in clock t reflect inputs of earlier clocks
      if (t >= 5) begin
        check("A y_re", a_yr, h_yr[t-2] + h_x[t-5] * h_wr[t-5], t);
        check("A y_im", a_yi, h_yi[t-2] + h_x[t-5] * h_wi[t-5], t);
        check("A w_re", a_wr, h_wr[t-3], t);
        check("A w_im", a_wi, h_wi[t-3], t);
        check("A tp",   a_tp, h_tp[t-3], t);
        check("A tc",   a_tc, h_tc[t-2], t);
      end
      if (t >= 2) begin
        check("B y_re", b_yr, h_yr[t-1] + h_x[t-1] * h_wr[t-1], t);
        check("B y_im", b_yi, h_yi[t-1] + h_x[t-1] * h_wi[t-1], t);
        check("B w_re", b_wr, h_wr[t-2], t);
        check("B tp",   b_tp, h_tp[t-2], t);
        check("B tc",   b_tc, h_tc[t-1], t);
      end
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
