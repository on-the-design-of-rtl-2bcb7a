// rader_sum_pe: the boundary element of the prime-length DFT array that
// handles the zero index.
//
// In Rader's form the zero frequency and the zero sample stand apart:
//   y(0)     = x(0) + sum_{i=1..N-1} x(i)
//   y(pi^k) starts its accumulation from x(0).
// This element therefore does two jobs for every bundle of N samples:
//  * It latches x(0), presented on x0_i in the tag clock, and drives it for
//    N-1 clocks as the initial value of the y link of the first white element
//    (seed_o). The seed is delayed TM clocks, like the products in the white
//    elements, so it meets the first partial result.
//  * It sums the N-1 samples of the tp stream. The stream brings one sample
//    per clock while the adder has TA pipeline stages, so the running sum
//    lives as TA interleaved partial sums inside the adder pipeline. After the
//    last sample (the one beside the tag) the TA partial sums leave the
//    pipeline in the next TA clocks. They are then added one by one, together
//    with x(0), in a separate accumulator. Meanwhile the adder's feedback is
//    forced to zero so that the next bundle starts clean. The source
//    describes this split into TA partial sums and a final addition. The
//    sequential final addition is this design's choice.
//
// Timing: with the tag in clock t, y0_o holds y(0) of that bundle from clock
// t+TA+1 on, and y0_valid_o pulses in clock t+TA+1. Requires TA <= N-1.
module rader_sum_pe #(
  parameter int N   = 5,
  parameter int L   = 16,
  parameter int TA  = 2,
  parameter int TM  = 3,
  parameter int Y0W = L + $clog2(N) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [L-1:0]   tp_i,
  input  logic                  tc_i,
  input  logic signed [L-1:0]   x0_i,
  output logic signed [L-1:0]   seed_o,
  output logic signed [Y0W-1:0] y0_o,
  output logic                  y0_valid_o
);
  localparam int CNTW = $clog2(TA + 2);

  initial begin
    assert (TA >= 1 && TA <= N - 1) else $fatal(1, "rader_sum_pe: need 1 <= TA <= N-1");
    assert (TM >= 0) else $fatal(1, "rader_sum_pe: TM must not be negative");
  end

  // x(0) of the current bundle
  logic signed [L-1:0] x0_q, x0_eff;
  assign x0_eff = tc_i ? x0_i : x0_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) x0_q <= '0;
    else        x0_q <= x0_eff;

  // seed for the y link, delayed TM clocks
  logic signed [L-1:0] sd [TM+1];
  assign sd[0] = x0_eff;
  for (genvar s = 0; s < TM; s++) begin : g_seed
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sd[s+1] <= '0;
      else        sd[s+1] <= sd[s];
  end
  assign seed_o = sd[TM];

  // clocks since the last tag: 1 in the clock after it, saturating at TA+1
  logic [CNTW-1:0] since;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 since <= CNTW'(TA + 1);
    else if (tc_i)              since <= CNTW'(1);
    else if (since != CNTW'(TA + 1)) since <= since + CNTW'(1);

  logic drain;  // the adder output is a finished partial sum
  assign drain = (since >= CNTW'(1)) && (since <= CNTW'(TA));

  // TA-stage accumulating adder
  logic signed [Y0W-1:0] acc [TA];
  logic signed [Y0W-1:0] fb, sum;
  assign fb  = drain ? '0 : acc[TA-1];
  assign sum = fb + Y0W'(tp_i);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc[0] <= '0;
    else        acc[0] <= sum;
  for (genvar s = 1; s < TA; s++) begin : g_acc
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) acc[s] <= '0;
      else        acc[s] <= acc[s-1];
  end

  // final addition of the TA partial sums and x(0)
  logic signed [Y0W-1:0] fin;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fin        <= '0;
      y0_valid_o <= 1'b0;
    end else begin
      y0_valid_o <= 1'b0;
      if (drain) begin
        fin        <= ((since == CNTW'(1)) ? Y0W'(x0_q) : fin) + acc[TA-1];
        y0_valid_o <= (since == CNTW'(TA));
      end
    end
  assign y0_o = fin;
endmodule
