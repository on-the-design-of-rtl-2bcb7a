// tb_scheme2_dft: self-checking test of the prime-factor DFT engine in three
// configurations: 5 x 3 = 15 points with the pipelined arrays (TA=2, TM=3),
// the same size with plain systolic arrays (TA=1, TM=0), and 3 x 7 = 21
// points with the stages in the other order of sizes.
module tb_scheme2_dft;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  scheme2_harness #(.N1(5), .N2(3), .TA(2), .TM(3), .NF(10)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  scheme2_harness #(.N1(5), .N2(3), .TA(1), .TM(0), .NF(8))  h1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  scheme2_harness #(.N1(3), .N2(7), .TA(2), .TM(3), .NF(8))  h2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

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
    repeat (3000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
