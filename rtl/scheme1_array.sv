// scheme1_array: DFT of length N = P*Q on a Horner array of only Q elements.
//
// The index split i = i'' + Q*i' turns the Horner chain of N multiply-adds
// into P passes of Q steps each:
//   y(k) = (...(y(k,P-1) W^(Qk) + y(k,P-2)) W^(Qk) + ...) W^(Qk) + y(k,0),
// where y(k,i') = sum_{i''} x(i''+Q*i') W^(i''k). The Q multiplications by
// W^k inside one pass build up the factor W^(Qk). So the array keeps running
// the same Horner step y' = y*W^k + x. In pass s the elements hold the
// segment i' = P-1-s, element q holding x(Q*i' + Q - q). The right-most
// element's partial results and tags go through a FIFO of N-Q*T words back to
// the left-most element. The loop is then exactly N clocks long: every
// partial result y(k) meets its own W^k again one pass later. A multiplexer
// in front of the first element selects 0 instead of the FIFO for pass 0,
// which starts a new transform. The recirculated tag reloads the elements'
// samples at the head of every later pass.
//
// Schedule: a slot counter sc = 0..N-1 and a pass counter ps = 0..P-1 run
// freely from reset.
//   x_req_o   high for the Q clocks sc = 0..Q-1 of each pass. In them the
//             source drives x_i = x(x_idx_o), x_idx_o = Q*(P-1-ps) + sc. That
//             is one segment of the current transform in ascending order,
//             segments in descending order.
//   in_valid_i  sampled in the last input clock of a transform (ps = P-1,
//             sc = Q-1) and marks that transform as valid.
//   y_*_o     y(y_k_o) of a valid transform while y_valid_o is high, natural
//             order k = 0..N-1, one per clock, after the final pass.
// One transform every P*N clocks. From its first sample in to its last output
// a transform spans P*N + Q*T + Q - 1 clocks inclusive (P*N + 2Q - 1 for the
// plain array, T = 1). T > 1 gives the pipelined array: each element takes T
// clocks, and the FIFO shrinks to keep the loop N clocks long (Q*T <= N).
// With P = 1 nothing recirculates and any T is allowed: that is the plain
// Horner array, pipelined or not.
// Arithmetic as in horner_pe: after each multiplication the partial result is
// rounded back to sample units. The default sizes are Q = 5 elements, as in
// the source's example, and P = 4 passes (N = 20), which is this design's
// choice.
module scheme1_array #(
  parameter int P  = 4,
  parameter int Q  = 5,
  parameter int L  = 16,
  parameter int CW = 16,
  parameter int N  = P * Q,
  parameter int IW = $clog2(N),
  parameter int YW = L + $clog2(N) + 2,
  parameter int T  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  input  logic signed [L-1:0]  x_i,
  output logic                 x_req_o,
  output logic [IW-1:0]        x_idx_o,
  output logic signed [YW-1:0] y_re_o,
  output logic signed [YW-1:0] y_im_o,
  output logic                 y_valid_o,
  output logic [IW-1:0]        y_k_o
);
  localparam int SW = $clog2(N);
  localparam int PSW = (P > 1) ? $clog2(P) : 1;
  localparam int FD = N - Q * T;       // FIFO depth: the loop is N clocks

  initial assert (P >= 1 && Q >= 1 && N == P * Q && T >= 1 && (P == 1 || FD >= 0))
    else $fatal(1, "scheme1_array: need N = P*Q and, for P > 1, Q*T <= N");

  // ---------------------------------------------------------------- counters
  logic [SW-1:0]  sc;
  logic [PSW-1:0] ps;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sc <= '0;
      ps <= '0;
    end else if (sc == SW'(N - 1)) begin
      sc <= '0;
      ps <= (ps == PSW'(P - 1)) ? '0 : ps + PSW'(1);
    end else begin
      sc <= sc + SW'(1);
    end

  assign x_req_o = (sc < SW'(Q));
  assign x_idx_o = IW'(Q * (P - 1 - int'(ps)) + int'(sc));

  // pass and frequency of the partial result entering element 1 this clock
  logic [PSW-1:0] pe1_pass;
  logic [IW-1:0]  pe1_k;
  always_comb begin
    if (sc >= SW'(Q - 1)) begin
      pe1_pass = ps;
      pe1_k    = IW'(int'(sc) - (Q - 1));
    end else begin
      pe1_pass = (ps == '0) ? PSW'(P - 1) : ps - PSW'(1);
      pe1_k    = IW'(int'(sc) + N - Q + 1);
    end
  end

  // twiddle W^k for the partial result entering element 1
  logic signed [CW-1:0] wre_tab [N];
  logic signed [CW-1:0] wim_tab [N];
  for (genvar k = 0; k < N; k++) begin : g_tw
    assign wre_tab[k] = CW'(dft_pkg::tw_re(k, N, CW));
    assign wim_tab[k] = CW'(dft_pkg::tw_im(k, N, CW));
  end

  // --------------------------------------------------------------- the loop
  // element inputs (y_in, t_in) and outputs (yr, yi, tc) kept apart, so the
  // loop is closed only through the element registers
  logic signed [YW-1:0] y_in_re [Q];
  logic signed [YW-1:0] y_in_im [Q];
  logic                 t_in    [Q];
  logic signed [YW-1:0] yr [1:Q];
  logic signed [YW-1:0] yi [1:Q];
  logic signed [CW-1:0] wr [Q+1];
  logic signed [CW-1:0] wi [Q+1];
  logic signed [L-1:0]  tp [Q+1];
  logic                 tc [1:Q];
  logic signed [YW-1:0] fy_re, fy_im;   // FIFO output
  logic                 f_tc;
  logic                 head;

  assign head  = (sc == SW'(Q - 1));
  // demultiplexer: a new transform starts from 0, later passes from the FIFO
  assign y_in_re[0] = (pe1_pass == '0) ? '0 : fy_re;
  assign y_in_im[0] = (pe1_pass == '0) ? '0 : fy_im;
  assign t_in[0]    = (pe1_pass == '0) ? head : f_tc;
  assign wr[0] = wre_tab[pe1_k];
  assign wi[0] = wim_tab[pe1_k];
  assign tp[0] = x_req_o ? x_i : '0;

  for (genvar q = 2; q <= Q; q++) begin : g_link
    assign y_in_re[q-1] = yr[q-1];
    assign y_in_im[q-1] = yi[q-1];
    assign t_in[q-1]    = tc[q-1];
  end

  for (genvar q = 1; q <= Q; q++) begin : g_pe
    horner_pe #(.L(L), .CW(CW), .YW(YW), .T(T)) u_pe (
      .clk, .rst_n,
      .y_re_i(y_in_re[q-1]), .y_im_i(y_in_im[q-1]),
      .w_re_i(wr[q-1]), .w_im_i(wi[q-1]),
      .tp_i(tp[q-1]),   .tc_i(t_in[q-1]),
      .y_re_o(yr[q]),   .y_im_o(yi[q]),
      .w_re_o(wr[q]),   .w_im_o(wi[q]),
      .tp_o(tp[q]),     .tc_o(tc[q])
    );
  end

  // FIFO of N-Q*T words from the right-most element back to the left-most
  if (P > 1 && FD > 0) begin : g_fifo
    typedef struct packed {
      logic                 tc;
      logic signed [YW-1:0] re;
      logic signed [YW-1:0] im;
    } word_t;
    localparam int FW = (FD > 1) ? $clog2(FD) : 1;
    word_t         mem [FD];
    logic [FW-1:0] ptr;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        ptr <= '0;
        for (int j = 0; j < FD; j++) mem[j] <= '0;
      end else begin
        mem[ptr] <= '{tc: tc[Q], re: yr[Q], im: yi[Q]};
        ptr      <= (ptr == FW'(FD - 1)) ? '0 : ptr + FW'(1);
      end
    assign fy_re = mem[ptr].re;
    assign fy_im = mem[ptr].im;
    assign f_tc  = mem[ptr].tc;
  end else if (P > 1) begin : g_nofifo
    // the elements alone make the N-clock loop
    assign fy_re = yr[Q];
    assign fy_im = yi[Q];
    assign f_tc  = tc[Q];
  end else begin : g_single
    // one pass: nothing comes back (pass 0 always starts from 0)
    assign fy_re = '0;
    assign fy_im = '0;
    assign f_tc  = 1'b0;
  end

  // ------------------------------------------------------------ output side
  logic dv_q, dv;
  assign dv = (ps == PSW'(P - 1) && head) ? in_valid_i : dv_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dv_q <= 1'b0;
    else        dv_q <= dv;

  // {final pass of a valid transform, k} follows its partial result Q*T clocks
  localparam int OD = Q * T;
  logic          od_v [OD+1];
  logic [IW-1:0] od_k [OD+1];
  assign od_v[0] = (pe1_pass == PSW'(P - 1)) && dv;
  assign od_k[0] = pe1_k;
  for (genvar s = 0; s < OD; s++) begin : g_od
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        od_v[s+1] <= 1'b0;
        od_k[s+1] <= '0;
      end else begin
        od_v[s+1] <= od_v[s];
        od_k[s+1] <= od_k[s];
      end
  end

  assign y_re_o    = yr[Q];
  assign y_im_o    = yi[Q];
  assign y_valid_o = od_v[OD];
  assign y_k_o     = od_k[OD];
endmodule
