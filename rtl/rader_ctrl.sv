// rader_ctrl: boundary sequencer for rader_array.
//
// The array takes its samples, twiddles and tags at its left end in a fixed
// cyclic schedule of N-1 clocks. This block produces that schedule from a
// slot counter r = 0..N-2 that runs freely from reset.
//   x_idx_o  the index i of the sample x(i) the array takes on tp in this
//            clock: i = pi^r mod N. The input order is thus x(1), x(pi),
//            x(pi^2), ..., x(pi^(N-2)).
//   tag_o    high in the last slot (r = N-2): the tag for the tc link. In the
//            same clock the array also takes x(0).
//   w_*_o    the twiddle stream, c_m = W^(pi^m) with m = (r+1) mod (N-1).
//            The stream repeats every N-1 clocks and is shared by
//            consecutive bundles.
//   in_valid_i is sampled in the tag clock and marks the bundle as valid.
//   out_valid_o, out_k_o: the array's output y_o holds y(out_k_o) of a valid
//            bundle. The output order is y(pi^1), y(pi^2), ..., y(pi^(N-1)).
//            That is, outputs leave TM + TA*(N-1) clocks after the tag.
//   y0_valid_o: a valid bundle's y(0) is due TA+1 clocks after its tag.
// The twiddle and index tables are computed at elaboration (dft_pkg).
module rader_ctrl #(
  parameter int N  = 5,
  parameter int CW = 16,
  parameter int TA = 2,
  parameter int TM = 3,
  parameter int IW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  output logic [IW-1:0]        x_idx_o,
  output logic                 tag_o,
  output logic signed [CW-1:0] w_re_o,
  output logic signed [CW-1:0] w_im_o,
  output logic                 out_valid_o,
  output logic [IW-1:0]        out_k_o,
  output logic                 y0_valid_o
);
  localparam int PI_G = dft_pkg::prim_root(N);
  localparam int D    = TM + TA * (N - 1);   // tag to first output
  localparam int RW   = $clog2(N);           // holds 0..N-1

  // index and twiddle tables, one entry per slot
  logic [IW-1:0]        pow_tab [N];        // pi^j mod N
  logic signed [CW-1:0] cre_tab [N];        // Re c_((j+1) mod (N-1)); slot
  logic signed [CW-1:0] cim_tab [N];        // N-1 never occurs
  for (genvar j = 0; j < N; j++) begin : g_pow
    assign pow_tab[j] = IW'(dft_pkg::modpow(PI_G, j, N));
  end
  for (genvar j = 0; j < N; j++) begin : g_tw
    localparam int E = dft_pkg::modpow(PI_G, (j + 1) % (N - 1), N);
    assign cre_tab[j] = CW'(dft_pkg::tw_re(E, N, CW));
    assign cim_tab[j] = CW'(dft_pkg::tw_im(E, N, CW));
  end

  // slot counter
  logic [RW-1:0] r;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 r <= '0;
    else if (r == RW'(N - 2))   r <= '0;
    else                        r <= r + RW'(1);

  assign tag_o   = (r == RW'(N - 2));
  assign x_idx_o = pow_tab[r];
  assign w_re_o  = cre_tab[r];
  assign w_im_o  = cim_tab[r];

  logic bv;  // this clock closes a valid bundle
  assign bv = tag_o && in_valid_i;

  // tag and bundle-valid delayed D-1 clocks, then registered into the window
  logic [1:0] od [D];
  assign od[0] = {tag_o, bv};
  for (genvar s = 1; s < D; s++) begin : g_od
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) od[s] <= '0;
      else        od[s] <= od[s-1];
  end

  logic [RW-1:0] kk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      kk          <= RW'(1);
      out_valid_o <= 1'b0;
    end else if (od[D-1][1]) begin
      kk          <= RW'(1);
      out_valid_o <= od[D-1][0];
    end else if (kk == RW'(N - 1)) begin
      kk          <= RW'(1);
      out_valid_o <= 1'b0;
    end else begin
      kk          <= kk + RW'(1);
    end
  assign out_k_o = pow_tab[kk];

  // bundle-valid delayed TA+1 clocks for y(0)
  logic yd [TA+2];
  assign yd[0] = bv;
  for (genvar s = 0; s <= TA; s++) begin : g_yd
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) yd[s+1] <= 1'b0;
      else        yd[s+1] <= yd[s];
  end
  assign y0_valid_o = yd[TA+1];
endmodule
