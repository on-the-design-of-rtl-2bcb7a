// rader_pe: one white processing element of the prime-length DFT array.
//
// The array evaluates Rader's form of the DFT,
//   y(pi^k) = x(0) + sum_{j=1..N-1} x(pi^-j) * W^(pi^(k-j)),
// as a linear systolic array. Element q keeps one input sample a_q = x(pi^-q)
// in a local register and performs, for every partial result that passes,
//   y' = y + a_q * w .
// The real sample multiplies a complex twiddle, so the element needs two real
// multipliers and two real adders.
//
// Links (all enter on the left, leave on the right):
//   y   partial result, complex. It passes through the adder, so it is delayed
//       by TA clocks and has no other register on the link.
//   w   twiddle stream, complex. TA+1 registers, so w moves one clock slower
//       per element than y. That is what lines up a_q with W^(pi^(k-q)).
//   tp  sample stream, real. TA+1 registers.
//   tc  one-bit tag. TA registers, so it stays beside the y wavefront.
// When the tag arrives, the element takes the sample then on tp as its new
// a_q. The multiplexer lets the new sample be used in that same clock, so one
// bundle follows another with no idle clock. These register counts follow the
// source's table for the pipelined version of this array. With TA = 1 and
// TM = 0 the element is the plain systolic cell: multiply-add in one clock.
//
// Pipelining: the multiplier reads w and the sample TM clocks before the
// partial result arrives and its product is delayed TM registers. The sum is
// formed, then delayed TA registers. Putting all of the delay after the
// arithmetic is this design's simplification: synthesis retiming can spread
// it through the operators. Widths: sample L bits, twiddle CW bits, partial
// result YW bits. Partial results are kept to full precision.
module rader_pe #(
  parameter int L  = 16,
  parameter int CW = 16,
  parameter int YW = 36,
  parameter int TA = 2,
  parameter int TM = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [YW-1:0] y_re_i,
  input  logic signed [YW-1:0] y_im_i,
  input  logic signed [CW-1:0] w_re_i,
  input  logic signed [CW-1:0] w_im_i,
  input  logic signed [L-1:0]  tp_i,
  input  logic                 tc_i,
  output logic signed [YW-1:0] y_re_o,
  output logic signed [YW-1:0] y_im_o,
  output logic signed [CW-1:0] w_re_o,
  output logic signed [CW-1:0] w_im_o,
  output logic signed [L-1:0]  tp_o,
  output logic                 tc_o
);
  localparam int PW = L + CW;

  initial begin
    assert (TA >= 1) else $fatal(1, "rader_pe: TA must be at least 1");
    assert (TM >= 0) else $fatal(1, "rader_pe: TM must not be negative");
    assert (YW >= PW) else $fatal(1, "rader_pe: YW too narrow for a product");
  end

  // stationary sample, reloaded under tag control
  logic signed [L-1:0] x_q, x_eff;
  assign x_eff = tc_i ? tp_i : x_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) x_q <= '0;
    else        x_q <= x_eff;

  // real x complex multiplication, TM pipeline registers
  logic signed [PW-1:0] m_re [TM+1];
  logic signed [PW-1:0] m_im [TM+1];
  assign m_re[0] = x_eff * w_re_i;
  assign m_im[0] = x_eff * w_im_i;

  for (genvar s = 0; s < TM; s++) begin : g_mul
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        m_re[s+1] <= '0;
        m_im[s+1] <= '0;
      end else begin
        m_re[s+1] <= m_re[s];
        m_im[s+1] <= m_im[s];
      end
  end

  // complex addition, TA pipeline registers
  logic signed [YW-1:0] a_re [TA+1];
  logic signed [YW-1:0] a_im [TA+1];
  assign a_re[0] = y_re_i + YW'(m_re[TM]);
  assign a_im[0] = y_im_i + YW'(m_im[TM]);

  for (genvar s = 0; s < TA; s++) begin : g_add
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        a_re[s+1] <= '0;
        a_im[s+1] <= '0;
      end else begin
        a_re[s+1] <= a_re[s];
        a_im[s+1] <= a_im[s];
      end
  end
  assign y_re_o = a_re[TA];
  assign y_im_o = a_im[TA];

  // w and tp links: TA+1 registers each; tc link: TA registers
  logic signed [CW-1:0] wr_d [TA+2];
  logic signed [CW-1:0] wi_d [TA+2];
  logic signed [L-1:0]  tp_d [TA+2];
  logic                 tc_d [TA+1];
  assign wr_d[0] = w_re_i;
  assign wi_d[0] = w_im_i;
  assign tp_d[0] = tp_i;
  assign tc_d[0] = tc_i;

  for (genvar s = 0; s <= TA; s++) begin : g_wtp
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        wr_d[s+1] <= '0;
        wi_d[s+1] <= '0;
        tp_d[s+1] <= '0;
      end else begin
        wr_d[s+1] <= wr_d[s];
        wi_d[s+1] <= wi_d[s];
        tp_d[s+1] <= tp_d[s];
      end
  end

  for (genvar s = 0; s < TA; s++) begin : g_tc
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) tc_d[s+1] <= 1'b0;
      else        tc_d[s+1] <= tc_d[s];
  end

  assign w_re_o = wr_d[TA+1];
  assign w_im_o = wi_d[TA+1];
  assign tp_o   = tp_d[TA+1];
  assign tc_o   = tc_d[TA];
endmodule
