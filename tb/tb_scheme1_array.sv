// tb_scheme1_array: self-checking test of the scheme-1 long-length DFT array
// at its default size (P=4 passes over Q=5 elements, N=20), with a single
// pass (P=1, Q=5: the plain Horner array, no FIFO), with P=3, Q=4, and with
// pipelined elements: T=3 clocks at the default size (FIFO of N-Q*T = 5
// words), and T=5 (an adder of 2 and a multiplier of 3 stages) with P=Q=5,
// where the loop through the elements alone is N = 25 clocks and there is no
// FIFO, and T=5 with P=1 (the single-pass array with pipelined elements).
module tb_scheme1_array;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2, r0, r1, r2, n0, n1, n2;
  int c3, f3, c4, f4, r3, r4, n3, n4, c5, f5, r5, n5;
  logic d0, d1, d2, d3, d4, d5;

  scheme1_harness #(.P(4), .Q(5), .NT(6)) h0 (.clk, .rst_n, .checks(c0), .failures(f0),
                                              .n_recirc(r0), .n_new(n0), .done(d0));
  scheme1_harness #(.P(1), .Q(5), .NT(6)) h1 (.clk, .rst_n, .checks(c1), .failures(f1),
                                              .n_recirc(r1), .n_new(n1), .done(d1));
  scheme1_harness #(.P(3), .Q(4), .NT(6)) h2 (.clk, .rst_n, .checks(c2), .failures(f2),
                                              .n_recirc(r2), .n_new(n2), .done(d2));
  scheme1_harness #(.P(4), .Q(5), .T(3), .NT(6)) h3 (.clk, .rst_n, .checks(c3), .failures(f3),
                                                     .n_recirc(r3), .n_new(n3), .done(d3));
  scheme1_harness #(.P(5), .Q(5), .T(5), .NT(6)) h4 (.clk, .rst_n, .checks(c4), .failures(f4),
                                                     .n_recirc(r4), .n_new(n4), .done(d4));
  scheme1_harness #(.P(1), .Q(5), .T(5), .NT(6)) h5 (.clk, .rst_n, .checks(c5), .failures(f5),
                                                     .n_recirc(r5), .n_new(n5), .done(d5));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3 && d4 && d5);
    @(posedge clk);
    checks   = c0 + c1 + c2 + c3 + c4 + c5 + 1;
    failures = f0 + f1 + f2 + f3 + f4 + f5;
    // the multi-pass arrays must have recirculated through their FIFO
    if (r0 == 0 || r2 == 0 || r3 == 0 || r4 == 0 || r1 != 0 || r5 != 0) begin
      failures++;
      $display("FAIL recirculation counts %0d %0d %0d %0d %0d %0d", r0, r1, r2, r3, r4, r5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5, f0 + f1 + f2 + f3 + f4 + f5 + 1);
    $finish;
  end
endmodule
