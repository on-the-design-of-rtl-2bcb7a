// tb_rader_dft: self-checking test of the prime-length DFT engine in three
// configurations: the pipelined array of the default (N=5, TA=2, TM=3), the
// plain systolic array (N=5, TA=1, TM=0) and a longer pipelined one (N=7,
// TA=2, TM=3). Each harness feeds random back-to-back bundles, one in four
// marked invalid, and compares every output with a direct DFT.
module tb_rader_dft;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  rader_dft_harness #(.N(5), .TA(2), .TM(3), .NB(12)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  rader_dft_harness #(.N(5), .TA(1), .TM(0), .NB(12)) h1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  rader_dft_harness #(.N(7), .TA(2), .TM(3), .NB(12)) h2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d0 && d1 && d2);
    @(posedge clk);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
