// tb_rader_sum_pe: self-checking test of the zero-index element for N = 5 with
// adder depths TA = 2 (the default), 1 and 4 (= N-1, the deepest allowed).
// A random sample stream runs on tp, with a tag every N-1 clocks and x(0) in the
// tag clock. Checks: y0_o = x(0) + the N-1 samples ending at the tag, valid
// exactly TA+1 clocks after the tag; seed_o = the current bundle's x(0)
// delayed TM clocks.
module tb_rader_sum_pe;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 5, L = 16, Y0W = L + $clog2(N) + 1;
  localparam int NCYC = 200;
  localparam int NCFG = 3;
  localparam int TAS [NCFG] = '{2, 1, 4};
  localparam int TMS [NCFG] = '{3, 0, 1};

  int checks = 0, failures = 0;
  logic signed [L-1:0] tp, x0;
  logic                tc;
  logic signed [L-1:0]   seed [NCFG];
  logic signed [Y0W-1:0] y0 [NCFG];
  logic                  y0v [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_dut
    rader_sum_pe #(.N(N), .L(L), .TA(TAS[c]), .TM(TMS[c])) dut (
      .clk, .rst_n, .tp_i(tp), .tc_i(tc), .x0_i(x0),
      .seed_o(seed[c]), .y0_o(y0[c]), .y0_valid_o(y0v[c]));
  end

  longint h_tp [NCYC], h_x0 [NCYC], h_cur [NCYC];
  bit     h_tc [NCYC];

  initial begin
    longint cur;
    int n_pulses;
    cur = 0;
    n_pulses = 0;
    tp = '0; x0 = '0; tc = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < NCYC; t++) begin
      tp = L'($urandom);
      x0 = L'($urandom);
      tc = (t % (N - 1)) == (N - 2);
      if (tc) cur = x0;
      h_tp[t] = tp; h_x0[t] = x0; h_tc[t] = tc; h_cur[t] = cur;
      #1;
      for (int c = 0; c < NCFG; c++) begin
        // y0 valid exactly TA+1 clocks after a tag
        automatic bit want_v = (t > TAS[c]) && h_tc[t - TAS[c] - 1];
        checks++;
        if (y0v[c] != want_v) begin
          failures++;
          $display("FAIL TA=%0d: y0_valid=%0d at clock %0d", TAS[c], y0v[c], t);
        end
        if (want_v) begin
          automatic int tg = t - TAS[c] - 1;
          automatic longint e = h_x0[tg];
          for (int j = 0; j < N - 1; j++) e += h_tp[tg - j];
          n_pulses++;
          checks++;
          if (longint'(y0[c]) != e) begin
            failures++;
            $display("FAIL TA=%0d: y0=%0d want %0d (tag clock %0d)", TAS[c], y0[c], e, tg);
          end
        end
        if (t >= N + TMS[c]) begin
          checks++;
          if (longint'(seed[c]) != h_cur[t - TMS[c]]) begin
            failures++;
            $display("FAIL TM=%0d: seed=%0d want %0d at clock %0d", TMS[c], seed[c],
                     h_cur[t - TMS[c]], t);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_pulses < 3 * (NCYC / (N - 1) - 3)) begin
      failures++;
      $display("FAIL only %0d y(0) results", n_pulses);
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
